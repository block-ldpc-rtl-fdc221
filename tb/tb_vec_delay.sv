// Testbench of vec_delay: vectors written in one epoch (at scattered addresses, bit by bit)
// must be streamed back unchanged in slot 0 of the following epoch, while the next vector
// is being written.
module tb_vec_delay;
  localparam int unsigned P = 32, NR = 5, NS = 3, NEP = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [4:0] bitc;
  logic [7:0] slot, nslot;
  logic       ld, eoe;
  enc_timer #(.P(P), .NSLOT(NS)) u_tim (.clk, .rst_n, .bitc, .slot, .nslot, .ld, .eoe);

  logic [NR-1:0] we, wbit, y_v, y_b;
  logic [4:0]    waddr, y_a;
  vec_delay #(.P(P), .NR(NR)) u_dut (.clk, .rst_n, .swap(eoe), .bitc, .slot,
    .we, .waddr, .wbit, .y_valid(y_v), .y_addr(y_a), .y_bit(y_b));

  logic [P-1:0] d [NEP][NR];
  logic [P-1:0] cap [NR];
  int cnt;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < NEP; e++) for (int i = 0; i < NR; i++) d[e][i] = $urandom;
    we = '0; wbit = '0; waddr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    while (!(slot == 0 && bitc == 0)) @(negedge clk);
    for (int e = 0; e <= NEP; e++) begin
      cnt = 0;
      for (int i = 0; i < NR; i++) cap[i] = '0;
      for (int c = 0; c < int'(NS * P); c++) begin
        // write in slot 1, addresses in reversed order
        if (e < NEP && slot == 1) begin
          we = '1;
          waddr = 5'(P - 1) - bitc;
          for (int i = 0; i < NR; i++) wbit[i] = d[e][i][waddr];
        end else we = '0;
        if (y_v[0]) begin
          cnt++;
          for (int i = 0; i < NR; i++) cap[i][y_a] = y_b[i];
        end
        @(negedge clk);
      end
      if (e > 0) begin
        for (int i = 0; i < NR; i++) begin
          checks++;
          if (cap[i] != d[e-1][i]) begin failures++; $display("FAIL: row %0d epoch %0d", i, e); end
        end
        checks++;
        if (cnt != int'(P)) begin failures++; $display("FAIL: stream length %0d", cnt); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
