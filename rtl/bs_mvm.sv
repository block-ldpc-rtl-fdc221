// Block-structured sparse matrix-vector multiplier over GF(2).
// Computes y_i = sum over non-zero blocks (i,j) of x_j shifted up cyclically by d_ij (plus an
// optional addend a_i) for one rectangular region of the parity check matrix H: block rows
// ROW0..ROW0+NR-1 and block columns COL0..COL0+NC-1, taken from bldpc_code_pkg.
// Inter-vector parallel, intra-vector serial: all output sub-vectors of one colour (time slot)
// are computed together, one bit per clock, so the product takes NSLOT*P cycles. Each input
// sub-vector x_j sits in one P-bit single-port register file X_j read through a binary counter
// RAG_j that is loaded with d_ij at the start of every slot in which x_j is used; the bits are
// routed by a hard-wired network into one XOR tree per output sub-vector. The slot of every
// block row (the row-conflict graph colouring) is H_SLOT in the package.
// The input register files are double banked: the producer writes the receiving bank bit by
// bit through x_we/x_waddr/x_wbit while the working bank is read; swap (last cycle of an
// epoch) exchanges them. With ADD the module also holds a double-banked addend vector a that
// is XORed into the outputs (used for E*w + C*z1 and B*z2 + A*z1).
// Output: during the slot of row i, y_valid[i] is high and y_bit[i] is bit y_addr of y_i;
// the stream has the same format as the write port, so it feeds the next stage directly.
// Register files, counters and colour scheduling follow the Block-LDPC architecture; the addend port, the per-cycle
// stream format and the region selection are this design's choices.
module bs_mvm
  import bldpc_code_pkg::*;
#(
  parameter int unsigned ROW0  = 0,
  parameter int unsigned NR    = NT,
  parameter int unsigned COL0  = 0,
  parameter int unsigned NC    = NI,
  parameter int unsigned NSLOT = L_AC,
  parameter bit          ADD   = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              swap,
  input  logic [PW-1:0]     bitc,
  input  logic [7:0]        slot,
  input  logic [7:0]        nslot,
  input  logic              ld,
  input  logic [NC-1:0]     x_we,
  input  logic [PW-1:0]     x_waddr,
  input  logic [NC-1:0]     x_wbit,
  input  logic [NR-1:0]     a_we,
  input  logic [NR-1:0]     a_wbit,
  output logic [NR-1:0]     y_valid,
  output logic [PW-1:0]     y_addr,
  output logic [NR-1:0]     y_bit
);
  function automatic bit in_region(input int unsigned b);
    // unsigned differences wrap for indices below the region, so one compare per side
    return (H_ROW[b] - ROW0) < NR && (H_COL[b] - COL0) < NC;
  endfunction

  // slot of a block row of the region (rows without blocks in the region use slot 0)
  function automatic int unsigned row_slot(input int unsigned i);
    for (int unsigned b = 0; b < NNZ; b++)
      if (in_region(b) && H_ROW[b] == ROW0 + i) return H_SLOT[b];
    return 0;
  endfunction

  logic [P-1:0]  xrf [2][NC];   // input register files X_j, two banks
  logic [P-1:0]  arf [2][NR];   // addend register files, two banks
  logic          rsel;          // working bank
  logic [PW-1:0] rag [NC];      // read address generators RAG_j
  logic [NC-1:0] ren;           // X_j enabled in this slot
  logic [PW-1:0] nsh [NC];      // shift value of X_j for the next slot
  logic [NC-1:0] nen;
  logic [NC-1:0] xbit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rsel <= 1'b0;
    else if (swap) rsel <= ~rsel;
  end

  always_ff @(posedge clk) begin
    for (int j = 0; j < NC; j++)
      if (x_we[j]) xrf[~rsel][j][x_waddr] <= x_wbit[j];
    if (ADD)
      for (int i = 0; i < NR; i++)
        if (a_we[i]) arf[~rsel][i][x_waddr] <= a_wbit[i];
  end

  // shift values for the slot that starts next (task schedule ROM)
  always_comb begin
    for (int j = 0; j < NC; j++) begin
      nsh[j] = '0;
      nen[j] = 1'b0;
    end
    for (int unsigned b = 0; b < NNZ; b++)
      if (in_region(b) && H_SLOT[b] == 32'(nslot)) begin
        nsh[H_COL[b] - COL0] = PW'(H_SH[b]);
        nen[H_COL[b] - COL0] = 1'b1;
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < NC; j++) rag[j] <= '0;
      ren <= '0;
    end else if (ld) begin
      for (int j = 0; j < NC; j++) rag[j] <= nsh[j];
      ren <= nen;
    end else begin
      for (int j = 0; j < NC; j++) rag[j] <= rag[j] + 1'b1;
    end
  end

  always_comb
    for (int j = 0; j < NC; j++) xbit[j] = ren[j] & xrf[rsel][j][rag[j]];

  // hard-wired interconnect and XOR trees XT_i
  always_comb begin
    y_bit = '0;
    for (int unsigned b = 0; b < NNZ; b++)
      if (in_region(b)) y_bit[H_ROW[b] - ROW0] ^= xbit[H_COL[b] - COL0];
    if (ADD)
      for (int i = 0; i < NR; i++) y_bit[i] ^= arf[rsel][i][bitc];
  end

  for (genvar i = 0; i < NR; i++) begin : g_row
    localparam int unsigned RS = row_slot(i);
    assign y_valid[i] = (32'(slot) == RS);
  end

  assign y_addr = bitc;  // WAG: restarts at 0 every slot

  initial assert (NSLOT >= 1 && P == (1 << PW)) else $error("bs_mvm: bad parameters");
endmodule
