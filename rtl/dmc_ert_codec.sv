// dmc_ert_codec - DMC encoder and decoder sharing one encoder (error reuse
// technique, ERT).
//
// The decoder needs the check bits of the word it reads, which is exactly what the
// encoder computes on a write. Instead of a second set of adders and XOR gates, one
// dmc_encoder is multiplexed by mode:
//   mode = DMC_ENCODE   (write): the encoder sees d_wr; h_enc/v_enc are the check
//                                bits to store next to d_wr.
//   mode = DMC_SYNDROME (read) : the encoder sees d_rd; its outputs are compared with
//                                the stored h_rd/v_rd by dmc_decoder and d_correct
//                                is the corrected word.
// A write and a read therefore cannot share a cycle. d_correct, dh, s and
// err_detected are only meaningful in DMC_SYNDROME mode, h_enc/v_enc are the
// check bits to write only in DMC_ENCODE mode. Purely combinational.
// The sharing and the two modes (write = encoding, read = compute syndrome bits)
// follow the ERT description; the mode encoding is this implementation's.
module dmc_ert_codec
  import dmc_pkg::*;
#(
  parameter  int unsigned M  = DMC_M,
  parameter  int unsigned K1 = DMC_K1,
  parameter  int unsigned K2 = DMC_K2,
  localparam int unsigned N  = K1 * K2 * M,
  localparam int unsigned HW = K1 * (K2 / 2) * (M + 1),
  localparam int unsigned VW = K2 * M
) (
  input  dmc_mode_e     mode,          // DMC_ENCODE on a write, DMC_SYNDROME on a read
  input  logic [N-1:0]  d_wr,          // word to be written
  output logic [HW-1:0] h_enc,         // encoder output: horizontal bits
  output logic [VW-1:0] v_enc,         // encoder output: vertical bits
  input  logic [N-1:0]  d_rd,          // data read from memory
  input  logic [HW-1:0] h_rd,          // horizontal bits read from memory
  input  logic [VW-1:0] v_rd,          // vertical bits read from memory
  output logic [N-1:0]  d_correct,     // corrected read data
  output logic [HW-1:0] dh,            // horizontal syndrome
  output logic [VW-1:0] s,             // vertical syndrome
  output logic          err_detected   // some syndrome non-zero
);

  logic [N-1:0] enc_in;
  logic [N-1:0] enc_u;

  assign enc_in = (mode == DMC_ENCODE) ? d_wr : d_rd;

  dmc_encoder #(.M(M), .K1(K1), .K2(K2)) u_encoder (
    .d (enc_in),
    .h (h_enc),
    .v (v_enc),
    .u (enc_u)
  );

  dmc_decoder #(.M(M), .K1(K1), .K2(K2)) u_decoder (
    .d_read       (enc_u),
    .h_mem        (h_rd),
    .v_mem        (v_rd),
    .h_rec        (h_enc),
    .v_rec        (v_enc),
    .d_correct    (d_correct),
    .dh           (dh),
    .s            (s),
    .err_detected (err_detected)
  );

endmodule
