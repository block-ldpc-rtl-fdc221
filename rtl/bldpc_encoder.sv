// Pipelined partially parallel Block-LDPC encoder.
// Encodes k_info = (n-m)*p information bits z1 into the parity bits z2 (g bits) and z3
// (m*p-g bits) of the code in bldpc_code_pkg, following
//   z2 = inv(Phi) * (E * inv(T) * (A*z1) + C*z1),   z3 = inv(T) * (A*z1 + B*z2).
// Seven function blocks form a pipeline whose stages all advance together once per epoch of
// max(l_max, k-1)*p cycles (enc_timer):
//   epoch 0  z1 is loaded into the input banks of A and C
//   epoch 1  A: u = A*z1,  C: v = C*z1
//   epoch 2  T1: w = inv(T)*u
//   epoch 3  E: e = E*w + v
//   epoch 4  Phi: z2 = inv(Phi)*e
//   epoch 5  B: b = B*z2 + u
//   epoch 6  T2: z3 = inv(T)*b
//   epoch 7  [z2 z3] streamed out
// u, v and z2 are carried between non-adjacent stages by vec_delay register files.
// Interface: z1 is taken bit-serially during slot 0 of an epoch (in_ready high): in cycle t of
// that slot z1_bits[j] is bit t of information sub-vector j; in_valid must be held for the
// whole slot. Seven epochs later the parity comes out the same way: out_valid for p cycles,
// par_bits[i] is bit out_addr of parity sub-vector i (i < g/p: z2, then z3). A new frame can
// enter every epoch, so the rate is (n-m)/max(l_max,k-1) information bits per clock.
// The stage order and the epoch length follow the Block-LDPC architecture; the stream interfaces, the carry
// registers and the eighth (output) epoch are this design's choices.
module bldpc_encoder
  import bldpc_code_pkg::*;
#(
  parameter int unsigned NSLOT = (L_AC > K - 1) ? L_AC : K - 1
) (
  input  logic            clk,
  input  logic            rst_n,
  output logic            in_ready,
  input  logic            in_valid,
  input  logic [NI-1:0]   z1_bits,
  output logic            out_valid,
  output logic [PW-1:0]   out_addr,
  output logic [M-1:0]    par_bits
);
  logic [PW-1:0] bitc;
  logic [7:0]    slot, nslot;
  logic          ld, eoe;
  logic [7:0]    fv;      // frame valid per pipeline epoch

  enc_timer #(.P(P), .NSLOT(NSLOT)) u_timer (
    .clk, .rst_n, .bitc, .slot, .nslot, .ld, .eoe
  );

  assign in_ready = (slot == 8'd0);
  wire   load     = in_ready && in_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fv <= '0;
    else begin
      if (load && bitc == '0) fv[0] <= 1'b1;
      if (eoe) fv <= {fv[6:0], 1'b0};
    end
  end

  // stream buses between stages
  logic [NT-1:0]  u_v, u_b, w_v, w_b, b_v, b_b, z3_v, z3_b, du1_v, du1_b, du2_v, du2_b, du3_v, du3_b;
  logic [GAM-1:0] c_v, c_b, dv_v, dv_b, e_v, e_b, z2_v, z2_b, dz1_v, dz1_b, dz2_v, dz2_b;
  logic [PW-1:0]  u_a, c_a, w_a, dv_a, e_a, z2_a, b_a, z3_a, du1_a, du2_a, du3_a, dz1_a, dz2_a;

  // stage 1: A and C
  bs_mvm #(.ROW0(0), .NR(NT), .COL0(0), .NC(NI), .NSLOT(NSLOT), .ADD(1'b0)) u_a_blk (
    .clk, .rst_n, .swap(eoe), .bitc, .slot, .nslot, .ld,
    .x_we({NI{load}}), .x_waddr(bitc), .x_wbit(z1_bits),
    .a_we('0), .a_wbit('0),
    .y_valid(u_v), .y_addr(u_a), .y_bit(u_b));

  bs_mvm #(.ROW0(NT), .NR(GAM), .COL0(0), .NC(NI), .NSLOT(NSLOT), .ADD(1'b0)) u_c_blk (
    .clk, .rst_n, .swap(eoe), .bitc, .slot, .nslot, .ld,
    .x_we({NI{load}}), .x_waddr(bitc), .x_wbit(z1_bits),
    .a_we('0), .a_wbit('0),
    .y_valid(c_v), .y_addr(c_a), .y_bit(c_b));

  // stage 2: T1, v and u carried
  tri_solve u_t1 (
    .clk, .rst_n, .swap(eoe), .bitc, .slot, .nslot, .ld,
    .x_we(u_v), .x_waddr(u_a), .x_wbit(u_b),
    .y_valid(w_v), .y_addr(w_a), .y_bit(w_b));

  vec_delay #(.P(P), .NR(GAM)) u_dv (
    .clk, .rst_n, .swap(eoe), .bitc, .slot,
    .we(c_v), .waddr(c_a), .wbit(c_b), .y_valid(dv_v), .y_addr(dv_a), .y_bit(dv_b));

  vec_delay #(.P(P), .NR(NT)) u_du1 (
    .clk, .rst_n, .swap(eoe), .bitc, .slot,
    .we(u_v), .waddr(u_a), .wbit(u_b), .y_valid(du1_v), .y_addr(du1_a), .y_bit(du1_b));

  // stage 3: E (+ C*z1)
  bs_mvm #(.ROW0(NT), .NR(GAM), .COL0(TC0), .NC(NT), .NSLOT(NSLOT), .ADD(1'b1)) u_e_blk (
    .clk, .rst_n, .swap(eoe), .bitc, .slot, .nslot, .ld,
    .x_we(w_v), .x_waddr(w_a), .x_wbit(w_b),
    .a_we(dv_v), .a_wbit(dv_b),
    .y_valid(e_v), .y_addr(e_a), .y_bit(e_b));

  vec_delay #(.P(P), .NR(NT)) u_du2 (
    .clk, .rst_n, .swap(eoe), .bitc, .slot,
    .we(du1_v), .waddr(du1_a), .wbit(du1_b), .y_valid(du2_v), .y_addr(du2_a), .y_bit(du2_b));

  // stage 4: Phi
  phi_mul u_phi (
    .clk, .rst_n, .swap(eoe), .bitc, .slot,
    .x_we(e_v), .x_waddr(e_a), .x_wbit(e_b),
    .y_valid(z2_v), .y_addr(z2_a), .y_bit(z2_b));

  vec_delay #(.P(P), .NR(NT)) u_du3 (
    .clk, .rst_n, .swap(eoe), .bitc, .slot,
    .we(du2_v), .waddr(du2_a), .wbit(du2_b), .y_valid(du3_v), .y_addr(du3_a), .y_bit(du3_b));

  // stage 5: B (+ A*z1), z2 carried
  bs_mvm #(.ROW0(0), .NR(NT), .COL0(NI), .NC(GAM), .NSLOT(NSLOT), .ADD(1'b1)) u_b_blk (
    .clk, .rst_n, .swap(eoe), .bitc, .slot, .nslot, .ld,
    .x_we(z2_v), .x_waddr(z2_a), .x_wbit(z2_b),
    .a_we(du3_v), .a_wbit(du3_b),
    .y_valid(b_v), .y_addr(b_a), .y_bit(b_b));

  vec_delay #(.P(P), .NR(GAM)) u_dz1 (
    .clk, .rst_n, .swap(eoe), .bitc, .slot,
    .we(z2_v), .waddr(z2_a), .wbit(z2_b), .y_valid(dz1_v), .y_addr(dz1_a), .y_bit(dz1_b));

  // stage 6: T2, z2 carried
  tri_solve u_t2 (
    .clk, .rst_n, .swap(eoe), .bitc, .slot, .nslot, .ld,
    .x_we(b_v), .x_waddr(b_a), .x_wbit(b_b),
    .y_valid(z3_v), .y_addr(z3_a), .y_bit(z3_b));

  vec_delay #(.P(P), .NR(GAM)) u_dz2 (
    .clk, .rst_n, .swap(eoe), .bitc, .slot,
    .we(dz1_v), .waddr(dz1_a), .wbit(dz1_b), .y_valid(dz2_v), .y_addr(dz2_a), .y_bit(dz2_b));

  // stage 7: parity output buffer [z2 z3]
  logic [M-1:0] ob_v;
  vec_delay #(.P(P), .NR(M)) u_out (
    .clk, .rst_n, .swap(eoe), .bitc, .slot,
    .we({z3_v, dz2_v}), .waddr(z3_a), .wbit({z3_b, dz2_b}),
    .y_valid(ob_v), .y_addr(out_addr), .y_bit(par_bits));

  assign out_valid = fv[7] && ob_v[0];

  // a frame, once started, is presented for the whole of slot 0
  assert property (@(posedge clk) disable iff (!rst_n)
                   (in_ready && bitc != '0 && $past(in_valid) && $past(in_ready)) |-> in_valid)
    else $error("bldpc_encoder: in_valid dropped inside slot 0");

  // all stages write with the common WAG address
  always_comb
    assert (dz2_a == z3_a && dv_a == w_a && du3_a == z2_a || !rst_n)
      else $error("bldpc_encoder: stage streams out of step");
endmodule
