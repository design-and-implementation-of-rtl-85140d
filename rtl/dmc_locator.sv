// dmc_locator - error locator of the DMC decoder.
//
// Turns the syndromes into a mask of data bits to flip. Data bit (row r, column j)
// belongs to symbol column c = j / M and so to horizontal group
// g = r*(K2/2) + (c mod K2/2). The bit is marked erroneous when its column's vertical
// syndrome s[j] is set AND its group's horizontal syndrome dh[g] is non-zero: the
// vertical syndrome gives the column, the horizontal syndrome tells which row (and
// which symbol pair) the error sits in. For the default sizes, D0 is marked when
// S0 = 1 and dH4..dH0 != 0, D16 when S0 = 1 and dH14..dH10 != 0.
// err_detected is set when any syndrome bit is non-zero. Purely combinational.
// The locating rule follows the DMC decoding description; the detection flag is this
// implementation's addition.
module dmc_locator
  import dmc_pkg::*;
#(
  parameter  int unsigned M  = DMC_M,
  parameter  int unsigned K1 = DMC_K1,
  parameter  int unsigned K2 = DMC_K2,
  localparam int unsigned N  = K1 * K2 * M,
  localparam int unsigned HW = K1 * (K2 / 2) * (M + 1),
  localparam int unsigned VW = K2 * M
) (
  input  logic [HW-1:0] dh,            // horizontal syndrome
  input  logic [VW-1:0] s,             // vertical syndrome
  output logic [N-1:0]  loc,           // 1 = flip this data bit
  output logic          err_detected   // some syndrome is non-zero
);

  localparam int unsigned HALF = K2 / 2;
  localparam int unsigned NG   = K1 * HALF;

  logic [NG-1:0] grp_err;   // horizontal syndrome of group g is non-zero

  always_comb begin
    for (int g = 0; g < int'(NG); g++) begin
      grp_err[g] = |dh[g*(M+1) +: M+1];
    end
  end

  always_comb begin
    loc = '0;
    for (int r = 0; r < int'(K1); r++) begin
      for (int j = 0; j < int'(VW); j++) begin
        loc[r*VW + j] = s[j] & grp_err[r*HALF + (j / M) % HALF];
      end
    end
  end

  assign err_detected = (|dh) | (|s);

endmodule
