// tb_dmc_alt_configs - runs the DMC codec at the two other symbol organisations of a
// 32-bit word that the design weighs against its default: m = 2 with k = 4 x 4 and
// m = 8 with k = 2 x 2. For each it checks the number of check bits, that a clean
// read has zero syndromes, and that every single-bit upset of the data is located
// and corrected (for m = 2 also every 2-bit burst inside a row, since two adjacent
// symbols are never paired there). The expected word is simply the written word.
module tb_dmc_alt_configs;
  import dmc_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(input string what, input logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // m = 2, k = 4 x 4: 4 rows of 8 bits, 4 x 2 x 3 = 24 horizontal + 8 vertical
  dmc_mode_e   mode_a;
  logic [31:0] dwr_a, drd_a, dc_a;
  logic [23:0] he_a, hrd_a, dh_a;
  logic [7:0]  ve_a, vrd_a, s_a;
  logic        det_a;
  dmc_ert_codec #(.M(2), .K1(4), .K2(4)) u_a (
    .mode(mode_a), .d_wr(dwr_a), .h_enc(he_a), .v_enc(ve_a), .d_rd(drd_a), .h_rd(hrd_a),
    .v_rd(vrd_a), .d_correct(dc_a), .dh(dh_a), .s(s_a), .err_detected(det_a));

  // m = 8, k = 2 x 2: 2 rows of 16 bits, 2 x 1 x 9 = 18 horizontal + 16 vertical
  dmc_mode_e   mode_b;
  logic [31:0] dwr_b, drd_b, dc_b;
  logic [17:0] he_b, hrd_b, dh_b;
  logic [15:0] ve_b, vrd_b, s_b;
  logic        det_b;
  dmc_ert_codec #(.M(8), .K1(2), .K2(2)) u_b (
    .mode(mode_b), .d_wr(dwr_b), .h_enc(he_b), .v_enc(ve_b), .d_rd(drd_b), .h_rd(hrd_b),
    .v_rd(vrd_b), .d_correct(dc_b), .dh(dh_b), .s(s_b), .err_detected(det_b));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, e;
    check("m=2: 32 redundant bits", $bits(he_a) + $bits(ve_a) == 32);
    check("m=8: 34 redundant bits", $bits(he_b) + $bits(ve_b) == 34);
    for (int i = 0; i < 300; i++) begin
      d = $urandom;
      // encode
      mode_a = DMC_ENCODE; dwr_a = d; drd_a = ~d;
      mode_b = DMC_ENCODE; dwr_b = d; drd_b = ~d;
      #1;
      hrd_a = he_a; vrd_a = ve_a;
      hrd_b = he_b; vrd_b = ve_b;
      check("m=2 horizontal sum of symbols 0 and 2",
            he_a[2:0] == 3'(d[1:0]) + 3'(d[5:4]));
      check("m=2 vertical bit 0", ve_a[0] == (d[0] ^ d[8] ^ d[16] ^ d[24]));
      check("m=8 horizontal sum of symbols 0 and 1",
            he_b[8:0] == 9'(d[7:0]) + 9'(d[15:8]));
      check("m=8 vertical bit 15", ve_b[15] == (d[15] ^ d[31]));
      // clean read
      mode_a = DMC_SYNDROME; dwr_a = $urandom; drd_a = d;
      mode_b = DMC_SYNDROME; dwr_b = $urandom; drd_b = d;
      #1;
      check("m=2 clean", dc_a == d && !det_a);
      check("m=8 clean", dc_b == d && !det_b);
      // single-bit upset
      e = 32'h1 << $urandom_range(0, 31);
      drd_a = d ^ e; drd_b = d ^ e;
      #1;
      check("m=2 single bit corrected", dc_a == d && det_a);
      check("m=8 single bit corrected", dc_b == d && det_b);
      // 2-bit burst inside one 8-bit row, m = 2 only
      e = 32'h3 << ($urandom_range(0, 3) * 8 + $urandom_range(0, 6));
      drd_a = d ^ e;
      #1;
      check("m=2 2-bit burst corrected", dc_a == d && det_a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
