// Multiplication with the small dense matrix inv(Phi), Phi = E*inv(T)*B + D.
// The g-bit input e arrives bit-serially into a double-banked register file (GAM sub-vectors
// of P bits). The product z2 = inv(Phi)*e is formed fully in parallel by a g-input, g-output
// XOR array from the constant PHI_INV of bldpc_code_pkg, so it is ready as soon as the bank
// is swapped; it is then streamed out one bit per sub-vector per cycle in slot 0.
// The fully parallel XOR array follows the Block-LDPC architecture; the stream interface is this design's.
module phi_mul
  import bldpc_code_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               swap,
  input  logic [PW-1:0]      bitc,
  input  logic [7:0]         slot,
  input  logic [GAM-1:0]     x_we,
  input  logic [PW-1:0]      x_waddr,
  input  logic [GAM-1:0]     x_wbit,
  output logic [GAM-1:0]     y_valid,
  output logic [PW-1:0]      y_addr,
  output logic [GAM-1:0]     y_bit
);
  logic [P-1:0] rf [2][GAM];
  logic         rsel;
  logic [G-1:0] e, z;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rsel <= 1'b0;
    else if (swap) rsel <= ~rsel;
  end

  always_ff @(posedge clk)
    for (int i = 0; i < GAM; i++)
      if (x_we[i]) rf[~rsel][i][x_waddr] <= x_wbit[i];

  always_comb begin
    for (int i = 0; i < GAM; i++) e[i*P +: P] = rf[rsel][i];
    for (int r = 0; r < G; r++) z[r] = ^(PHI_INV[r] & e);
    for (int i = 0; i < GAM; i++) y_bit[i] = z[i*P + int'(bitc)];
  end

  assign y_valid = {GAM{slot == 8'd0}};
  assign y_addr  = bitc;
endmodule
