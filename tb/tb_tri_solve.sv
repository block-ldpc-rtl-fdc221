// Testbench of tri_solve: random input vectors in consecutive epochs; the streamed output
// must equal inv(T)*x computed by forward substitution in bldpc_ref_pkg. Band i must come
// out in slot i-2 (band 1 in slot 0), so the whole solve ends after (k-1)*P cycles.
module tb_tri_solve;
  import bldpc_code_pkg::*;
  import bldpc_ref_pkg::*;
  localparam int unsigned NS  = L_AC;
  localparam int unsigned NEP = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [PW-1:0] bitc;
  logic [7:0]    slot, nslot;
  logic          ld, eoe;
  enc_timer #(.P(P), .NSLOT(NS)) u_tim (.clk, .rst_n, .bitc, .slot, .nslot, .ld, .eoe);

  logic [NT-1:0] x_we, x_bit, y_v, y_b;
  logic [PW-1:0] y_a;
  tri_solve u_dut (.clk, .rst_n, .swap(eoe), .bitc, .slot, .nslot, .ld,
    .x_we, .x_waddr(bitc), .x_wbit(x_bit), .y_valid(y_v), .y_addr(y_a), .y_bit(y_b));

  rv_t xin [NEP];
  rv_t cap;
  int  last_slot [NT];
  int  cnt [NT];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < NEP; e++)
      for (int i = 0; i < M; i++) xin[e][i] = (i < NT) ? P'({$urandom, $urandom}) : '0;
    x_we = '0; x_bit = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    while (!(slot == 0 && bitc == 0)) @(negedge clk);
    for (int e = 0; e <= NEP; e++) begin
      for (int i = 0; i < NT; i++) begin cap[i] = '0; cnt[i] = 0; last_slot[i] = -1; end
      for (int c = 0; c < int'(NS * P); c++) begin
        if (e < NEP && slot == 0) begin
          x_we = '1;
          for (int i = 0; i < NT; i++) x_bit[i] = xin[e][i][bitc];
        end else x_we = '0;
        for (int i = 0; i < NT; i++)
          if (y_v[i]) begin cap[i][y_a] = y_b[i]; cnt[i]++; last_slot[i] = int'(slot); end
        @(negedge clk);
      end
      if (e > 0) begin
        rv_t ref_y;
        ref_y = tsolve(xin[e-1]);
        for (int i = 0; i < NT; i++) begin
          int exp_slot;
          exp_slot = (band_of(i) == 0) ? 0 : int'(band_of(i)) - 1;
          check(cap[i] == ref_y[i], $sformatf("row %0d epoch %0d", i, e));
          check(cnt[i] == P && last_slot[i] == exp_slot, $sformatf("row %0d slot", i));
          check(last_slot[i] < int'(K) - 1, "solve within (k-1)*P cycles");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
