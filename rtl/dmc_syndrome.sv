// dmc_syndrome - syndrome calculator of the DMC decoder (subtracters and XOR gates).
//
// Compares the check bits read from the redundancy memory with the check bits that
// the (shared) encoder recomputes from the data read from the information memory:
//   * horizontal syndrome, one per symbol pair:
//       dh[g] = h_rec[g] - h_mem[g]   (integer subtraction, modulo 2^(M+1))
//     e.g. dH4..dH0 = H4..H0(recomputed) - H4..H0(stored);
//   * vertical syndrome, one per column: s[j] = v_rec[j] ^ v_mem[j].
// A non-zero dh[g] says that one of the two symbols of pair g (or the stored sum)
// changed; a set s[j] says that column j flipped in an odd number of rows (or V[j]
// itself flipped). Purely combinational. Subtraction direction (recomputed minus
// stored) and the XOR follow the DMC decoding equations; the wrap-around of the
// subtraction to M+1 bits is this implementation's choice (the sign does not matter,
// only whether the result is zero).
module dmc_syndrome
  import dmc_pkg::*;
#(
  parameter  int unsigned M  = DMC_M,
  parameter  int unsigned K1 = DMC_K1,
  parameter  int unsigned K2 = DMC_K2,
  localparam int unsigned HW = K1 * (K2 / 2) * (M + 1),
  localparam int unsigned VW = K2 * M
) (
  input  logic [HW-1:0] h_mem,  // horizontal bits read from memory
  input  logic [VW-1:0] v_mem,  // vertical bits read from memory
  input  logic [HW-1:0] h_rec,  // horizontal bits recomputed from the read data
  input  logic [VW-1:0] v_rec,  // vertical bits recomputed from the read data
  output logic [HW-1:0] dh,     // horizontal syndrome, group g at dh[g*(M+1) +: M+1]
  output logic [VW-1:0] s       // vertical syndrome
);

  localparam int unsigned NG = K1 * (K2 / 2);

  always_comb begin
    dh = '0;
    for (int g = 0; g < int'(NG); g++) begin
      dh[g*(M+1) +: M+1] = h_rec[g*(M+1) +: M+1] - h_mem[g*(M+1) +: M+1];
    end
  end

  assign s = v_rec ^ v_mem;

endmodule
