// Multiplication with inv(T) by k-stage back substitution (function blocks T1 and T2).
// T is lower macro-block triangular with identity macro-blocks I_1..I_k on its diagonal, so
// y_1 = x_1 and y_i = x_i + sum_{j<i} T_ij*y_j. Because every block column has at most one
// non-zero block inside each macro band, each band is one time slot of P cycles: band i
// (i = 2..k) is computed in slot i-2, all its sub-vectors in parallel, bit-serially, each
// earlier sub-vector y_j read through its own counter loaded with the block's shift. y_1 is
// read straight from the input bank (it equals x_1) and streamed out in slot 0, so the whole
// solve takes (k-1)*P cycles as in the Block-LDPC architecture.
// The input x is double banked (write port as in bs_mvm, swap at the epoch end); the results
// y_2..y_k are kept in an internal register file for the later bands. Output: the rows of the
// band being computed are valid, one bit per sub-vector per cycle at address y_addr.
module tri_solve
  import bldpc_code_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              swap,
  input  logic [PW-1:0]     bitc,
  input  logic [7:0]        slot,
  input  logic [7:0]        nslot,
  input  logic              ld,
  input  logic [NT-1:0]     x_we,
  input  logic [PW-1:0]     x_waddr,
  input  logic [NT-1:0]     x_wbit,
  output logic [NT-1:0]     y_valid,
  output logic [PW-1:0]     y_addr,
  output logic [NT-1:0]     y_bit
);
  // lower (off-diagonal) block of T
  function automatic bit is_low(input int unsigned b);
    return H_ROW[b] < NT && H_COL[b] >= TC0 && H_COL[b] - TC0 != H_ROW[b];
  endfunction

  logic [P-1:0]  xrf [2][NT];
  logic [P-1:0]  yrf [NT];
  logic          rsel;
  logic [PW-1:0] rag [NT];
  logic [NT-1:0] ren;
  logic [PW-1:0] nsh [NT];
  logic [NT-1:0] nen;
  logic [NT-1:0] ybit_src;   // bit of y_j read through RAG_j

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rsel <= 1'b0;
    else if (swap) rsel <= ~rsel;
  end

  always_ff @(posedge clk)
    for (int j = 0; j < NT; j++)
      if (x_we[j]) xrf[~rsel][j][x_waddr] <= x_wbit[j];

  always_comb begin
    for (int j = 0; j < NT; j++) begin
      nsh[j] = '0;
      nen[j] = 1'b0;
    end
    for (int unsigned b = 0; b < NNZ; b++)
      if (is_low(b) && H_SLOT[b] == 32'(nslot)) begin
        nsh[H_COL[b] - TC0] = PW'(H_SH[b]);
        nen[H_COL[b] - TC0] = 1'b1;
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < NT; j++) rag[j] <= '0;
      ren <= '0;
    end else if (ld) begin
      for (int j = 0; j < NT; j++) rag[j] <= nsh[j];
      ren <= nen;
    end else begin
      for (int j = 0; j < NT; j++) rag[j] <= rag[j] + 1'b1;
    end
  end

  for (genvar j = 0; j < NT; j++) begin : g_src
    localparam bit FIRST = band_of(j) == 0;
    if (FIRST) begin : g_x
      assign ybit_src[j] = ren[j] & xrf[rsel][j][rag[j]];
    end else begin : g_y
      assign ybit_src[j] = ren[j] & yrf[j][rag[j]];
    end
  end

  always_comb begin
    for (int i = 0; i < NT; i++) y_bit[i] = xrf[rsel][i][bitc];
    for (int unsigned b = 0; b < NNZ; b++)
      if (is_low(b)) y_bit[H_ROW[b]] ^= ybit_src[H_COL[b] - TC0];
  end

  for (genvar i = 0; i < NT; i++) begin : g_row
    localparam int unsigned B = band_of(i);
    assign y_valid[i] = (B == 0) ? (slot == 8'd0) : (32'(slot) == B - 1);
  end

  always_ff @(posedge clk)
    for (int i = 0; i < NT; i++)
      if (y_valid[i]) yrf[i][bitc] <= y_bit[i];

  assign y_addr = bitc;
endmodule
