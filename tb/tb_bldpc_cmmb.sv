// Testbench of bldpc_cmmb: a frame written into the receiving bank appears on the read
// side only after swap, in counter order; writing the next frame meanwhile does not disturb
// the frame being read.
module tb_bldpc_cmmb;
  localparam int P = 32, Q = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic swap, we, ld;
  logic [4:0] waddr;
  logic signed [Q-1:0] wdata, rdata;
  logic signed [Q-1:0] fr [4][P];
  bldpc_cmmb #(.P(P), .Q(Q)) u_dut (.clk, .rst_n, .swap, .we, .waddr, .wdata, .ld, .rdata);

  initial begin
    foreach (fr[f, i]) fr[f][i] = Q'($urandom);
    swap = 0; we = 0; ld = 1; waddr = '0; wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // frame 0 into the receiving bank
    for (int i = 0; i < P; i++) begin
      we = 1; waddr = 5'(P - 1 - i); wdata = fr[0][P - 1 - i];
      @(negedge clk);
    end
    we = 0;
    for (int f = 0; f < 3; f++) begin
      swap = 1; ld = 1;
      @(negedge clk);
      swap = 0; ld = 0;
      for (int i = 0; i < P; i++) begin
        checks++;
        if (rdata != fr[f][i]) begin failures++; if (failures < 10) $display("FAIL frame %0d word %0d", f, i); end
        we = 1; waddr = 5'(i); wdata = fr[f + 1][i];   // next frame meanwhile
        @(negedge clk);
      end
      we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
