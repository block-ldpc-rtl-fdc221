// Testbench of bldpc_encoder at full size: random information frames enter in consecutive
// epochs (so up to eight frames are in the pipeline at once) and once more after a gap.
// Every output frame [z1 z2 z3] must have a zero syndrome H*c = 0 and equal the direct
// reference encoder; its parity must start exactly 7 epochs (7 * max(l_max,k-1) * p
// cycles) after its information bits started, and frames must come out in order.
module tb_bldpc_encoder;
  import bldpc_code_pkg::*;
  import bldpc_ref_pkg::*;
  localparam int unsigned EPOCH = ((L_AC > K - 1) ? L_AC : K - 1) * P;
  localparam int NF = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          in_ready, in_valid, out_valid;
  logic [NI-1:0] z1_bits;
  logic [PW-1:0] out_addr;
  logic [M-1:0]  par_bits;
  bldpc_encoder u_dut (.clk, .rst_n, .in_ready, .in_valid, .z1_bits, .out_valid, .out_addr, .par_bits);

  cw_t info [NF];
  longint t_in [NF];
  longint t_out [NF];
  longint cyc = 0;
  int     nout = 0, max_inflight = 0;
  cw_t    cap;
  int     ocnt = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (30 * EPOCH) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // collect parity
  always @(negedge clk) if (rst_n && out_valid) begin
    if (ocnt == 0) t_out[nout] = cyc;
    for (int i = 0; i < M; i++) cap[NI + i][out_addr] = par_bits[i];
    check(int'(out_addr) == ocnt, "output bit order");
    ocnt++;
    if (ocnt == int'(P)) begin
      cw_t c;
      c = info[nout];
      for (int unsigned j = NI; j < N; j++) c[j] = cap[j];
      check(syndrome_weight(c) == 0, $sformatf("frame %0d syndrome", nout));
      check(c == encode(info[nout]), $sformatf("frame %0d equals reference", nout));
      check(t_out[nout] - t_in[nout] == longint'(7 * EPOCH), $sformatf("frame %0d latency %0d", nout, t_out[nout] - t_in[nout]));
      nout++;
      ocnt = 0;
    end
  end

  initial begin
    for (int f = 0; f < NF; f++)
      for (int j = 0; j < N; j++) info[f][j] = (j < NI) ? P'({$urandom, $urandom}) : '0;
    in_valid = 0; z1_bits = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      if (f == NF - 1) repeat (3 * EPOCH) @(negedge clk);   // a gap before the last frame
      while (!(in_ready && u_dut.bitc == 0)) @(negedge clk);
      t_in[f] = cyc;
      for (int b = 0; b < int'(P); b++) begin
        in_valid = 1;
        for (int j = 0; j < NI; j++) z1_bits[j] = info[f][j][b];
        @(negedge clk);
      end
      in_valid = 0;
      if (f + 1 - nout > max_inflight) max_inflight = f + 1 - nout;
    end
    while (nout < NF) @(negedge clk);
    check(max_inflight >= 5, $sformatf("pipeline overlap (%0d frames in flight)", max_inflight));
    $display("frames=%0d max_in_flight=%0d", nout, max_inflight);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
