// Block-LDPC coding system: the pipelined partially parallel encoder and the partially
// parallel decoder for one Block-LDPC code (bldpc_code_pkg: p = 32, 64 x 128 blocks,
// rate 1/2, 4096-bit codewords). Both are generated from the same parity check matrix, so a
// codeword [z1 z2 z3] produced by the encoder is decoded by the decoder. The two sit side by
// side, as transmitter and receiver; the channel between them is outside this design.
// Encoder ports: enc_in_ready/enc_in_valid/enc_z1 (information bits, one bit of every
// information sub-vector per cycle during slot 0 of an epoch), enc_out_valid/enc_out_addr/
// enc_par (parity bits [z2 z3], one bit of every parity sub-vector per cycle).
// Decoder ports: dec_llr_we/dec_llr_addr/dec_llr (channel messages of all n block columns
// for one bit position per cycle), dec_start/dec_busy/dec_done, dec_hd_addr/dec_hd.
module bldpc_top
  import bldpc_code_pkg::*;
#(
  parameter int unsigned Q    = 6,
  parameter int unsigned ITER = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  // encoder
  output logic                enc_in_ready,
  input  logic                enc_in_valid,
  input  logic [NI-1:0]       enc_z1,
  output logic                enc_out_valid,
  output logic [PW-1:0]       enc_out_addr,
  output logic [M-1:0]        enc_par,
  // decoder
  input  logic                dec_llr_we,
  input  logic [PW-1:0]       dec_llr_addr,
  input  logic signed [Q-1:0] dec_llr [N],
  input  logic                dec_start,
  output logic                dec_busy,
  output logic                dec_done,
  input  logic [PW-1:0]       dec_hd_addr,
  output logic [N-1:0]        dec_hd
);
  bldpc_encoder u_enc (
    .clk, .rst_n,
    .in_ready(enc_in_ready), .in_valid(enc_in_valid), .z1_bits(enc_z1),
    .out_valid(enc_out_valid), .out_addr(enc_out_addr), .par_bits(enc_par));

  bldpc_decoder #(.Q(Q), .ITER(ITER)) u_dec (
    .clk, .rst_n,
    .llr_we(dec_llr_we), .llr_addr(dec_llr_addr), .llr_in(dec_llr),
    .start(dec_start), .busy(dec_busy), .done(dec_done),
    .hd_addr(dec_hd_addr), .hd_out(dec_hd));
endmodule
