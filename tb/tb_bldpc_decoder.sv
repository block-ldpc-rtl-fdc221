// Testbench of bldpc_decoder at full size (p = 32, 64 x 128 blocks, 8 iterations).
// Codewords come from the reference encoder; the channel model gives every bit a
// confidence of 6..20 with the correct sign and then turns NERR random bits into wrong
// decisions of low confidence (1..5). Each frame must decode to the transmitted codeword,
// take exactly 1 + p*(1 + 2*ITER) cycles from start to done (initialization plus 2p cycles
// per iteration), and the next frame is always written into the other channel bank while
// the current one decodes.
module tb_bldpc_decoder;
  import bldpc_code_pkg::*;
  import bldpc_ref_pkg::*;
  localparam int unsigned Q = 6, ITER = 8;
  localparam int NF = 4;
  localparam int NERR = 12;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                llr_we, start, busy, done;
  logic [PW-1:0]       llr_addr, hd_addr;
  logic signed [Q-1:0] llr_in [N];
  logic [N-1:0]        hd_out;
  bldpc_decoder #(.Q(Q), .ITER(ITER)) u_dut (.clk, .rst_n, .llr_we, .llr_addr, .llr_in,
    .start, .busy, .done, .hd_addr, .hd_out);

  cw_t cw [NF];
  int  llr [NF][N][P];
  int  n_load_busy = 0, n_corrected = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic make_frame(input int f);
    cw_t info;
    for (int j = 0; j < N; j++) info[j] = (j < NI) ? P'({$urandom, $urandom}) : '0;
    cw[f] = encode(info);
    for (int j = 0; j < N; j++)
      for (int b = 0; b < P; b++) begin
        int mag;
        mag = int'($urandom_range(6, 20));
        llr[f][j][b] = cw[f][j][b] ? -mag : mag;
      end
    for (int e = 0; e < ((f == 0) ? 0 : NERR); e++) begin
      int j, b, mag;
      j = int'($urandom_range(0, N - 1));
      b = int'($urandom_range(0, P - 1));
      mag = int'($urandom_range(1, 5));
      llr[f][j][b] = cw[f][j][b] ? mag : -mag;
    end
  endtask

  task automatic load_frame(input int f);
    for (int b = 0; b < int'(P); b++) begin
      llr_we = 1; llr_addr = PW'(b);
      for (int j = 0; j < N; j++) llr_in[j] = Q'(llr[f][j][b]);
      if (busy) n_load_busy++;
      @(negedge clk);
    end
    llr_we = 0;
  endtask

  initial begin
    repeat (NF * 1500 + 500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    llr_we = 0; start = 0; hd_addr = '0; llr_addr = '0;
    foreach (llr_in[j]) llr_in[j] = '0;
    for (int f = 0; f < NF; f++) make_frame(f);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    load_frame(0);
    for (int f = 0; f < NF; f++) begin
      int lat, wrong, chan_wrong;
      start = 1;
      @(negedge clk);
      start = 0;
      lat = 1;
      if (f + 1 < NF) begin
        load_frame(f + 1);
        lat += int'(P);
      end
      while (!done) begin @(negedge clk); lat++; end
      check(lat == 1 + int'(P * (1 + 2 * ITER)), $sformatf("frame %0d latency %0d", f, lat));
      wrong = 0; chan_wrong = 0;
      for (int b = 0; b < int'(P); b++) begin
        hd_addr = PW'(b);
        #1;
        for (int j = 0; j < N; j++) begin
          if (hd_out[j] != cw[f][j][b]) wrong++;
          if ((llr[f][j][b] < 0) != cw[f][j][b]) chan_wrong++;
        end
      end
      check(wrong == 0, $sformatf("frame %0d: %0d wrong bits after decoding (%0d before)", f, wrong, chan_wrong));
      if (chan_wrong > 0 && wrong == 0) n_corrected++;
      @(negedge clk);
    end
    check(n_load_busy > 0, "next frame loaded while decoding");
    check(n_corrected > 0, "channel errors corrected");
    $display("load_while_busy=%0d corrected_frames=%0d", n_load_busy, n_corrected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
