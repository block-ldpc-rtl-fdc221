// Check node computation unit (CNU).
// Converts the DC variable-to-check messages of one check node into DC check-to-variable
// messages with the min-sum rule: output k carries the product of the signs and the
// smallest magnitude of all inputs other than k. Messages are Q-bit two's complement
// numbers kept in the symmetric range [-(2^(Q-1)-1), 2^(Q-1)-1]. Purely combinational: one
// check node per clock cycle, the CNU of block row i serving its p check nodes in turn.
// The Block-LDPC architecture gives the unit's place and cost but not its arithmetic; min-sum is this
// design's choice.
module bldpc_cnu #(
  parameter int unsigned DC = 6,
  parameter int unsigned Q  = 6
) (
  input  logic signed [Q-1:0] v2c [DC],
  output logic signed [Q-1:0] c2v [DC]
);
  logic [Q-1:0]  mag [DC];
  logic [DC-1:0] sgn;
  logic [Q-1:0]  min1, min2;
  int unsigned   idx1;
  logic          sprod;

  always_comb begin
    min1  = '1;
    min2  = '1;
    idx1  = 0;
    sprod = 1'b0;
    for (int unsigned k = 0; k < DC; k++) begin
      sgn[k] = v2c[k][Q-1];
      mag[k] = sgn[k] ? -v2c[k] : v2c[k];
      sprod ^= sgn[k];
      if (mag[k] < min1) begin
        min2 = min1;
        min1 = mag[k];
        idx1 = k;
      end else if (mag[k] < min2) begin
        min2 = mag[k];
      end
    end
    for (int unsigned k = 0; k < DC; k++) begin
      logic [Q-1:0] m;
      m = (k == idx1) ? min2 : min1;
      c2v[k] = (sprod ^ sgn[k]) ? -m : m;
    end
  end
endmodule
