// Testbench of bldpc_vnu (degree 2 and 5): random channel and check messages; each output
// must be the saturated sum of all inputs except its own, and the hard decision the sign of
// the full sum.
module tb_bldpc_vnu;
  localparam int Q = 6;
  int checks = 0, failures = 0;
  logic signed [Q-1:0] ch2, ch5;
  logic signed [Q-1:0] c2 [2], v2 [2];
  logic signed [Q-1:0] c5 [5], v5 [5];
  logic                hd2, hd5;
  bldpc_vnu #(.DV(2), .Q(Q)) u2 (.ch(ch2), .c2v(c2), .v2c(v2), .hd(hd2));
  bldpc_vnu #(.DV(5), .Q(Q)) u5 (.ch(ch5), .c2v(c5), .v2c(v5), .hd(hd5));

  function automatic int sat(input int v);
    return v > 31 ? 31 : (v < -31 ? -31 : v);
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int a [5], s2, s5, x2, x5;
      x2 = int'($urandom_range(0, 62)) - 31;
      x5 = int'($urandom_range(0, 62)) - 31;
      ch2 = Q'(x2); ch5 = Q'(x5);
      s2 = x2; s5 = x5;
      for (int i = 0; i < 5; i++) begin
        a[i] = int'($urandom_range(0, 62)) - 31;
        c5[i] = Q'(a[i]); s5 += a[i];
        if (i < 2) begin c2[i] = Q'(a[i]); s2 += a[i]; end
      end
      #1;
      for (int i = 0; i < 2; i++) chk(int'(v2[i]) == sat(s2 - a[i]), "dv2 message");
      for (int i = 0; i < 5; i++) chk(int'(v5[i]) == sat(s5 - a[i]), "dv5 message");
      chk(hd2 == (s2 < 0), "dv2 decision");
      chk(hd5 == (s5 < 0), "dv5 decision");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
