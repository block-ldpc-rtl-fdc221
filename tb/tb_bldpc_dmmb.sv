// Testbench of bldpc_dmmb (p = 32, shift 13): messages written in variable-node order
// (counter from 0) must be read back in check-node order starting at the shift, i.e. in
// cycle r of a check phase the memory presents entry (r + 13) mod 32; a check-phase write
// must land in that same entry (read-modify-write).
module tb_bldpc_dmmb;
  localparam int P = 32, Q = 6, SH = 13;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic ld, ld_chk, we;
  logic signed [Q-1:0] wdata, rdata;
  logic signed [Q-1:0] model [P];
  bldpc_dmmb #(.P(P), .Q(Q), .SH(SH)) u_dut (.clk, .rst_n, .ld, .ld_chk, .we, .wdata, .rdata);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    ld = 1; ld_chk = 0; we = 0; wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);                    // counter loaded with 0
    for (int rep = 0; rep < 3; rep++) begin
      // variable-order write
      for (int c = 0; c < P; c++) begin
        ld = (c == P - 1); ld_chk = 1; we = 1;
        wdata = Q'($urandom); model[c] = wdata;
        @(negedge clk);
      end
      // check order: read, then write back a new value
      for (int r = 0; r < P; r++) begin
        chk(rdata == model[(r + SH) % P], $sformatf("check-order read %0d", r));
        ld = (r == P - 1); ld_chk = 0; we = 1;
        wdata = Q'($urandom); model[(r + SH) % P] = wdata;
        @(negedge clk);
      end
      // variable order read
      for (int c = 0; c < P; c++) begin
        chk(rdata == model[c], $sformatf("variable-order read %0d", c));
        ld = (c == P - 1); ld_chk = 0; we = 0;
        @(negedge clk);
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
