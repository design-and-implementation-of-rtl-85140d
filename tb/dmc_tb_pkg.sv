// dmc_tb_pkg - reference values for the DMC testbenches, written out equation by
// equation for the 32-bit layout (two rows of four 4-bit symbols) rather than with
// the loops of the RTL, plus the expected outcome of a decode for the error classes
// the testbenches inject.
package dmc_tb_pkg;

  // horizontal check bits H19..H0
  function automatic logic [19:0] ref_h(input logic [31:0] d);
    logic [4:0] h0, h1, h2, h3;
    h0 = 5'(d[3:0])   + 5'(d[11:8]);    // H4..H0   = symbol 0 + symbol 2
    h1 = 5'(d[7:4])   + 5'(d[15:12]);   // H9..H5   = symbol 1 + symbol 3
    h2 = 5'(d[19:16]) + 5'(d[27:24]);   // H14..H10 = symbol 4 + symbol 6
    h3 = 5'(d[23:20]) + 5'(d[31:28]);   // H19..H15 = symbol 5 + symbol 7
    return {h3, h2, h1, h0};
  endfunction

  // vertical check bits V15..V0, V[j] = D[j] ^ D[j+16]
  function automatic logic [15:0] ref_v(input logic [31:0] d);
    return d[15:0] ^ d[31:16];
  endfunction

  // Which horizontal group (0..3) a data bit belongs to.
  function automatic int grp_of(input int bit_idx);
    int sym;
    sym = bit_idx / 4;
    case (sym)
      0, 2: return 0;
      1, 3: return 1;
      4, 6: return 2;
      default: return 3;   // 5, 7
    endcase
  endfunction

  // Expected corrected word when the data errors e lie in one row only (no check-bit
  // errors): every error is located and flipped back, except in a symbol pair whose
  // integer sum the errors left unchanged; those errors stay.
  function automatic logic [31:0] expect_one_row(input logic [31:0] d, input logic [31:0] e);
    logic [19:0] h_ok, h_bad;
    logic [31:0] res;
    h_ok  = ref_h(d);
    h_bad = ref_h(d ^ e);
    res   = d;
    for (int i = 0; i < 32; i++) begin
      if (e[i] && h_ok[grp_of(i)*5 +: 5] == h_bad[grp_of(i)*5 +: 5]) res[i] = ~d[i];
    end
    return res;
  endfunction

  // A random error pattern confined to one row, non-zero.
  function automatic logic [31:0] rand_one_row_err();
    logic [15:0] e;
    do e = 16'($urandom); while (e == 0);
    return ($urandom_range(0, 1) == 1) ? {e, 16'h0} : {16'h0, e};
  endfunction

endpackage
