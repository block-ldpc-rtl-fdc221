// Testbench of enc_timer: bitc counts 0..P-1, slot 0..NSLOT-1, ld exactly in the last cycle
// of each slot with nslot naming the following slot, eoe once every NSLOT*P cycles.
module tb_enc_timer;
  localparam int unsigned P = 16, NS = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [3:0] bitc;
  logic [7:0] slot, nslot;
  logic       ld, eoe;
  enc_timer #(.P(P), .NSLOT(NS)) u_dut (.clk, .rst_n, .bitc, .slot, .nslot, .ld, .eoe);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_eoe, n_eoe;
    last_eoe = -1; n_eoe = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      check(int'(bitc) == (t + 1) % P, "bit counter");
      check(int'(slot) == ((t + 1) / P) % NS, "slot counter");
      check(ld == (int'(bitc) == P - 1), "ld");
      if (ld) check(int'(nslot) == (int'(slot) + 1) % NS, "nslot");
      else    check(nslot == slot, "nslot hold");
      if (eoe) begin
        if (last_eoe >= 0) check(t - last_eoe == int'(NS * P), "epoch length");
        last_eoe = t; n_eoe++;
      end
    end
    check(n_eoe == 1000 / (NS * P), "number of epochs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
