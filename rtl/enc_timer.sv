// Encoder pipeline timer.
// Every pipeline stage of the Block-LDPC encoder works in lock step: one pipeline period
// ("epoch") is NSLOT time slots of P clock cycles, NSLOT = max(l_max, k-1), so every stage
// finishes its sparse matrix-vector product within one epoch and hands its result to the next
// stage at the epoch boundary. This module counts the bit index inside a slot (this is the
// write address generator WAG, restarted at 0 every slot) and the slot inside the epoch.
// Outputs: bitc/slot of the current cycle, nslot (slot that starts after this one; the
// register-file read counters are loaded with their shift values when ld is high, i.e. in the
// last cycle of a slot), and eoe, high in the last cycle of an epoch.
// The counters run freely from reset; the slot/epoch structure follows the Block-LDPC architecture, the
// free-running control is this design's choice.
module enc_timer #(
  parameter int unsigned P     = 32,
  parameter int unsigned NSLOT = 8
) (
  input  logic                         clk,
  input  logic                         rst_n,
  output logic [$clog2(P)-1:0]         bitc,
  output logic [7:0]                   slot,
  output logic [7:0]                   nslot,
  output logic                         ld,
  output logic                         eoe
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bitc <= '0;
      slot <= '0;
    end else if (bitc == $clog2(P)'(P - 1)) begin
      bitc <= '0;
      slot <= (slot == 8'(NSLOT - 1)) ? 8'd0 : slot + 8'd1;
    end else begin
      bitc <= bitc + 1'b1;
    end
  end

  assign ld    = (bitc == $clog2(P)'(P - 1));
  assign nslot = ld ? ((slot == 8'(NSLOT - 1)) ? 8'd0 : slot + 8'd1) : slot;
  assign eoe   = ld && (slot == 8'(NSLOT - 1));
endmodule
