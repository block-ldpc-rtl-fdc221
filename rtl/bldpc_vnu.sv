// Variable node computation unit (VNU).
// For one variable node per clock: adds the channel message and all DV check-to-variable
// messages, returns for each edge the total minus that edge's own message (saturated to
// the symmetric Q-bit range) as the new variable-to-check message, and the hard decision
// (1 when the total is negative; a positive message favours bit 0). Combinational; the VNU
// of block column j serves its p variable nodes in turn.
// The sum-minus-own-message rule is the usual one; the Block-LDPC description does not spell it out.
module bldpc_vnu #(
  parameter int unsigned DV = 3,
  parameter int unsigned Q  = 6
) (
  input  logic signed [Q-1:0] ch,
  input  logic signed [Q-1:0] c2v [DV],
  output logic signed [Q-1:0] v2c [DV],
  output logic                hd
);
  localparam int unsigned W = Q + 4;
  localparam logic signed [W-1:0] MAXV = W'((1 << (Q - 1)) - 1);
  logic signed [W-1:0] tot;

  always_comb begin
    tot = W'(ch);
    for (int unsigned k = 0; k < DV; k++) tot += W'(c2v[k]);
    for (int unsigned k = 0; k < DV; k++) begin
      logic signed [W-1:0] e;
      e = tot - W'(c2v[k]);
      if (e > MAXV)       v2c[k] = Q'(MAXV);
      else if (e < -MAXV) v2c[k] = Q'(-MAXV);
      else                v2c[k] = Q'(e);
    end
    hd = tot[W-1];
  end
endmodule
