// Testbench of phi_mul: for random e the streamed z2 must satisfy Phi*z2 = e, with Phi
// applied as E*inv(T)*B + D through the reference matrix products (so the check does not
// use the PHI_INV table it tests). Output must appear in slot 0 of the next epoch.
module tb_phi_mul;
  import bldpc_code_pkg::*;
  import bldpc_ref_pkg::*;
  localparam int unsigned NS  = 2;
  localparam int unsigned NEP = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [PW-1:0] bitc;
  logic [7:0]    slot, nslot;
  logic          ld, eoe;
  enc_timer #(.P(P), .NSLOT(NS)) u_tim (.clk, .rst_n, .bitc, .slot, .nslot, .ld, .eoe);

  logic [GAM-1:0] x_we, x_bit, y_v, y_b;
  logic [PW-1:0]  y_a;
  phi_mul u_dut (.clk, .rst_n, .swap(eoe), .bitc, .slot,
    .x_we, .x_waddr(bitc), .x_wbit(x_bit), .y_valid(y_v), .y_addr(y_a), .y_bit(y_b));

  logic [G-1:0] ein [NEP];
  logic [G-1:0] cap;
  int cnt;

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
    for (int e = 0; e < NEP; e++) ein[e] = G'({$urandom, $urandom});
    x_we = '0; x_bit = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    while (!(slot == 0 && bitc == 0)) @(negedge clk);
    for (int e = 0; e <= NEP; e++) begin
      cap = '0; cnt = 0;
      for (int c = 0; c < int'(NS * P); c++) begin
        if (e < NEP && slot == 0) begin
          x_we = '1;
          for (int i = 0; i < GAM; i++) x_bit[i] = ein[e][i*P + int'(bitc)];
        end else x_we = '0;
        for (int i = 0; i < GAM; i++)
          if (y_v[i]) begin cap[i*P + int'(y_a)] = y_b[i]; cnt++; check(slot == 0, "output in slot 0"); end
        @(negedge clk);
      end
      if (e > 0) begin
        cw_t x;
        rv_t bz, w, ew, dz;
        logic [G-1:0] back;
        foreach (x[j]) x[j] = '0;
        for (int i = 0; i < GAM; i++) x[NI + i] = cap[i*P +: P];
        bz = hmul(x, 0, NT, NI, NI + GAM);
        w  = tsolve(bz);
        ew = hmul(rows_to_tcols(w), NT, M, TC0, N);
        dz = hmul(x, NT, M, NI, NI + GAM);
        for (int i = 0; i < GAM; i++) back[i*P +: P] = ew[NT + i] ^ dz[NT + i];
        check(back == ein[e-1], $sformatf("Phi*z2 = e, epoch %0d", e));
        check(cnt == int'(G), "P output cycles");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
