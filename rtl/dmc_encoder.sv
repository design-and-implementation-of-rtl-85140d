// dmc_encoder - Decimal Matrix Code encoder.
//
// The N-bit word is viewed as K1 rows of K2 symbols of M bits (symbol s occupies
// d[s*M +: M]; row r holds symbols r*K2 .. r*K2+K2-1). Two kinds of check bits are
// produced, purely combinationally:
//   * horizontal bits: in each row, symbol c and symbol c+K2/2 are added as unsigned
//     integers ("decimal" addition) and the (M+1)-bit sum is stored. With the default
//     sizes: H4..H0 = D3..D0 + D11..D8, H9..H5 = D7..D4 + D15..D12,
//     H14..H10 = D19..D16 + D27..D24, H19..H15 = D23..D20 + D31..D28.
//   * vertical bits: bit j of all rows XORed, V[j] = D[j] ^ D[j+16] for the default.
// The data word is also passed through unchanged as u, the information part that is
// written to memory next to the check bits.
// The adder/XOR structure, the symbol pairing and the default sizes follow the DMC
// scheme this design implements; the generic parameterisation over M, K1 and K2 is
// this implementation's own (K2 must be even).
module dmc_encoder
  import dmc_pkg::*;
#(
  parameter  int unsigned M  = DMC_M,
  parameter  int unsigned K1 = DMC_K1,
  parameter  int unsigned K2 = DMC_K2,
  localparam int unsigned N  = K1 * K2 * M,
  localparam int unsigned HW = K1 * (K2 / 2) * (M + 1),
  localparam int unsigned VW = K2 * M
) (
  input  logic [N-1:0]  d,   // data word
  output logic [HW-1:0] h,   // horizontal check bits, group g at h[g*(M+1) +: M+1]
  output logic [VW-1:0] v,   // vertical check bits
  output logic [N-1:0]  u    // data passed through
);

  localparam int unsigned HALF = K2 / 2;

  always_comb begin
    h = '0;
    for (int r = 0; r < int'(K1); r++) begin
      for (int c = 0; c < int'(HALF); c++) begin
        h[(r*HALF + c)*(M+1) +: M+1] = {1'b0, d[(r*K2 + c)*M +: M]}
                                     + {1'b0, d[(r*K2 + c + HALF)*M +: M]};
      end
    end
  end

  always_comb begin
    v = '0;
    for (int r = 0; r < int'(K1); r++) begin
      v = v ^ d[r*VW +: VW];
    end
  end

  assign u = d;

  initial begin
    assert (K2 % 2 == 0) else $error("dmc_encoder: K2 must be even");
  end

endmodule
