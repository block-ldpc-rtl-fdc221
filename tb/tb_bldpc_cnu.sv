// Testbench of bldpc_cnu (degree 7 and degree 11): random messages, including zeros, ties
// and the extreme values; each output is compared with the min-sum rule evaluated by brute
// force (sign product and minimum magnitude over all other inputs).
module tb_bldpc_cnu;
  localparam int Q = 6;
  int checks = 0, failures = 0;
  logic signed [Q-1:0] a7 [7], o7 [7];
  logic signed [Q-1:0] a11 [11], o11 [11];
  bldpc_cnu #(.DC(7), .Q(Q))  u7  (.v2c(a7),  .c2v(o7));
  bldpc_cnu #(.DC(11), .Q(Q)) u11 (.v2c(a11), .c2v(o11));

  function automatic int rnd_msg();
    int v;
    v = int'($urandom_range(0, 62)) - 31;
    return v;
  endfunction

  function automatic int ref_out(input int v [], input int k);
    int s, mn;
    s = 1; mn = 1000;
    foreach (v[i]) if (i != k) begin
      if (v[i] < 0) s = -s;
      if ((v[i] < 0 ? -v[i] : v[i]) < mn) mn = (v[i] < 0 ? -v[i] : v[i]);
    end
    return s * mn;
  endfunction

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int v7 [], v11 [];
      v7 = new[7];
      v11 = new[11];
      foreach (v7[i]) begin v7[i] = rnd_msg(); if (t % 7 == 0 && i == 2) v7[i] = 0; a7[i] = Q'(v7[i]); end
      foreach (v11[i]) begin v11[i] = (t % 5 == 0) ? 31 - 62 * (i % 2) : rnd_msg(); a11[i] = Q'(v11[i]); end
      #1;
      foreach (v7[i]) begin
        checks++;
        if (int'(o7[i]) != ref_out(v7, i)) begin failures++; if (failures < 10) $display("FAIL dc7 %0d: %0d vs %0d", i, o7[i], ref_out(v7, i)); end
      end
      foreach (v11[i]) begin
        checks++;
        if (int'(o11[i]) != ref_out(v11, i)) begin failures++; if (failures < 10) $display("FAIL dc11 %0d", i); end
      end
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
