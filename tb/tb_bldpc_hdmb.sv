// Testbench of bldpc_hdmb: bits written in counter order are read back through the
// separate read address; bits not written (we low) keep their value.
module tb_bldpc_hdmb;
  localparam int P = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic ld, we, wbit, rbit;
  logic [4:0] raddr;
  logic [P-1:0] model;
  bldpc_hdmb #(.P(P)) u_dut (.clk, .rst_n, .ld, .we, .wbit, .raddr, .rbit);

  initial begin
    model = '0; ld = 1; we = 0; wbit = 0; raddr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int rep = 0; rep < 4; rep++) begin
      for (int c = 0; c < P; c++) begin
        ld = (c == P - 1);
        we = (rep != 2) && (c % 3 != 1);
        wbit = 1'($urandom);
        if (we) model[c] = wbit;
        @(negedge clk);
      end
      we = 0;
      for (int a = 0; a < P; a++) begin
        raddr = 5'(a);
        #1;
        checks++;
        if (rbit != model[a]) begin failures++; if (failures < 10) $display("FAIL bit %0d", a); end
      end
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
