// Pipeline carry register file.
// Holds a vector of NR P-bit sub-vectors for one pipeline period: it is written bit-serially
// during one epoch (receiving bank) and streamed out bit-serially during slot 0 of the next
// epoch (working bank), in the same stream format the stages use (valid per sub-vector,
// address, one bit per sub-vector). The encoder uses it to carry A*z1, C*z1 and z2 to the
// stage that consumes them, and as the double-banked parity output buffer.
// The Block-LDPC architecture gives the pipeline register budget; this way of carrying vectors between
// non-adjacent stages is this design's own.
module vec_delay #(
  parameter int unsigned P  = 32,
  parameter int unsigned NR = 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   swap,
  input  logic [$clog2(P)-1:0]   bitc,
  input  logic [7:0]             slot,
  input  logic [NR-1:0]          we,
  input  logic [$clog2(P)-1:0]   waddr,
  input  logic [NR-1:0]          wbit,
  output logic [NR-1:0]          y_valid,
  output logic [$clog2(P)-1:0]   y_addr,
  output logic [NR-1:0]          y_bit
);
  logic [P-1:0] rf [2][NR];
  logic         rsel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rsel <= 1'b0;
    else if (swap) rsel <= ~rsel;
  end

  always_ff @(posedge clk)
    for (int i = 0; i < NR; i++)
      if (we[i]) rf[~rsel][i][waddr] <= wbit[i];

  always_comb
    for (int i = 0; i < NR; i++) y_bit[i] = rf[rsel][i][bitc];

  assign y_valid = {NR{slot == 8'd0}};
  assign y_addr  = bitc;
endmodule
