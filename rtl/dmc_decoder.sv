// dmc_decoder - DMC decoder back end: syndrome calculator, error locator and error
// corrector in a chain.
//
// Inputs are the word read from memory (data d_read, stored check bits h_mem and
// v_mem) and the check bits recomputed from d_read by the encoder (h_rec, v_rec).
// In this design the recomputation is done by the same encoder that encodes on a
// write (error reuse technique, see dmc_ert_codec), so the decoder itself holds no
// adders for re-encoding, only the subtracters, XORs, locator and corrector.
// Output d_correct is the corrected data word; dh and s are the horizontal and
// vertical syndromes and err_detected flags a non-zero syndrome. Purely
// combinational: one read is corrected in the same cycle it is read.
// The chain syndrome -> locator -> corrector follows the DMC decoder structure.
module dmc_decoder
  import dmc_pkg::*;
#(
  parameter  int unsigned M  = DMC_M,
  parameter  int unsigned K1 = DMC_K1,
  parameter  int unsigned K2 = DMC_K2,
  localparam int unsigned N  = K1 * K2 * M,
  localparam int unsigned HW = K1 * (K2 / 2) * (M + 1),
  localparam int unsigned VW = K2 * M
) (
  input  logic [N-1:0]  d_read,        // data read from the information memory
  input  logic [HW-1:0] h_mem,         // horizontal bits read from the redundancy memory
  input  logic [VW-1:0] v_mem,         // vertical bits read from the redundancy memory
  input  logic [HW-1:0] h_rec,         // horizontal bits recomputed from d_read
  input  logic [VW-1:0] v_rec,         // vertical bits recomputed from d_read
  output logic [N-1:0]  d_correct,     // corrected data
  output logic [HW-1:0] dh,            // horizontal syndrome
  output logic [VW-1:0] s,             // vertical syndrome
  output logic          err_detected   // some syndrome non-zero
);

  logic [N-1:0] loc;

  dmc_syndrome #(.M(M), .K1(K1), .K2(K2)) u_syndrome (
    .h_mem (h_mem),
    .v_mem (v_mem),
    .h_rec (h_rec),
    .v_rec (v_rec),
    .dh    (dh),
    .s     (s)
  );

  dmc_locator #(.M(M), .K1(K1), .K2(K2)) u_locator (
    .dh           (dh),
    .s            (s),
    .loc          (loc),
    .err_detected (err_detected)
  );

  dmc_corrector #(.N(N)) u_corrector (
    .d_read    (d_read),
    .loc       (loc),
    .d_correct (d_correct)
  );

endmodule
