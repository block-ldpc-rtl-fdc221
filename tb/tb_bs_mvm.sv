// Testbench of bs_mvm: the A block (63 x 64 blocks, colour-scheduled) and the B block with
// its addend input, both fed with random vectors in consecutive epochs (pipelined: the next
// vector is written while the previous one is computed). The output streams are collected
// and compared with the direct matrix product of bldpc_ref_pkg; every output sub-vector must
// be valid in exactly one slot (P cycles) of each epoch, i.e. the product takes NSLOT*P
// cycles as scheduled.
module tb_bs_mvm;
  import bldpc_code_pkg::*;
  import bldpc_ref_pkg::*;
  localparam int unsigned NS  = L_AC;
  localparam int unsigned NEP = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [PW-1:0] bitc;
  logic [7:0]    slot, nslot;
  logic          ld, eoe;
  enc_timer #(.P(P), .NSLOT(NS)) u_tim (.clk, .rst_n, .bitc, .slot, .nslot, .ld, .eoe);

  logic [NI-1:0]  xa_we, xa_bit;
  logic [NT-1:0]  ya_v, ya_b;
  logic [PW-1:0]  ya_a, yb_a;
  logic [GAM-1:0] xb_we, xb_bit;
  logic [NT-1:0]  ab_we, ab_bit, yb_v, yb_b;

  bs_mvm u_a (.clk, .rst_n, .swap(eoe), .bitc, .slot, .nslot, .ld,
    .x_we(xa_we), .x_waddr(bitc), .x_wbit(xa_bit), .a_we('0), .a_wbit('0),
    .y_valid(ya_v), .y_addr(ya_a), .y_bit(ya_b));
  bs_mvm #(.ROW0(0), .NR(NT), .COL0(NI), .NC(GAM), .NSLOT(NS), .ADD(1'b1)) u_b (
    .clk, .rst_n, .swap(eoe), .bitc, .slot, .nslot, .ld,
    .x_we(xb_we), .x_waddr(bitc), .x_wbit(xb_bit), .a_we(ab_we), .a_wbit(ab_bit),
    .y_valid(yb_v), .y_addr(yb_a), .y_bit(yb_b));

  cw_t  xin [NEP];
  rv_t  add [NEP];
  rv_t  capa, capb;
  int unsigned cnta [NT], cntb [NT];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < NEP; e++) begin
      for (int j = 0; j < N; j++) xin[e][j] = (j < NI + GAM) ? P'({$urandom, $urandom}) : '0;
      for (int i = 0; i < M; i++) add[e][i] = P'({$urandom, $urandom});
    end
    xa_we = '0; xb_we = '0; ab_we = '0; xa_bit = '0; xb_bit = '0; ab_bit = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    while (!(slot == 0 && bitc == 0)) @(negedge clk);
    for (int e = 0; e <= NEP; e++) begin
      for (int i = 0; i < NT; i++) begin
        capa[i] = '0; capb[i] = '0; cnta[i] = 0; cntb[i] = 0;
      end
      for (int c = 0; c < int'(NS * P); c++) begin
        // write vector e during slot 0
        if (e < NEP && slot == 0) begin
          xa_we = '1; xb_we = '1; ab_we = '1;
          for (int j = 0; j < NI; j++) xa_bit[j] = xin[e][j][bitc];
          for (int j = 0; j < GAM; j++) xb_bit[j] = xin[e][NI + j][bitc];
          for (int i = 0; i < NT; i++) ab_bit[i] = add[e][i][bitc];
        end else begin
          xa_we = '0; xb_we = '0; ab_we = '0;
        end
        for (int i = 0; i < NT; i++) begin
          if (ya_v[i]) begin capa[i][ya_a] = ya_b[i]; cnta[i]++; end
          if (yb_v[i]) begin capb[i][yb_a] = yb_b[i]; cntb[i]++; end
        end
        @(negedge clk);
      end
      if (e > 0) begin
        rv_t ra, rb;
        ra = hmul(xin[e-1], 0, NT, 0, NI);
        rb = hmul(xin[e-1], 0, NT, NI, NI + GAM);
        for (int i = 0; i < NT; i++) begin
          check(capa[i] == ra[i], $sformatf("A row %0d epoch %0d", i, e));
          check(capb[i] == (rb[i] ^ add[e-1][i]), $sformatf("B row %0d epoch %0d", i, e));
          check(cnta[i] == P && cntb[i] == P, "one slot per row per epoch");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
