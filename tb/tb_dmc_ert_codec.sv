// tb_dmc_ert_codec - checks the codec with the shared encoder in both modes: in
// encode mode the check bits must be those of d_wr (whatever d_rd holds), in
// syndrome mode the encoder must work on d_rd and the decoder correct it (whatever
// d_wr holds). Uses upsets within one row, of the check bits, and the worked example.
module tb_dmc_ert_codec;
  import dmc_pkg::*;
  import dmc_tb_pkg::*;

  dmc_mode_e   mode;
  logic [31:0] d_wr, d_rd, d_correct;
  logic [19:0] h_enc, h_rd, dh;
  logic [15:0] v_enc, v_rd, s;
  logic        det;
  int checks = 0, failures = 0;

  dmc_ert_codec dut (.mode(mode), .d_wr(d_wr), .h_enc(h_enc), .v_enc(v_enc),
                     .d_rd(d_rd), .h_rd(h_rd), .v_rd(v_rd), .d_correct(d_correct),
                     .dh(dh), .s(s), .err_detected(det));

  task automatic write_check(input logic [31:0] d);
    mode = DMC_ENCODE; d_wr = d; d_rd = ~d ^ 32'($urandom);
    h_rd = 20'($urandom); v_rd = 16'($urandom);
    #1;
    checks++;
    if (h_enc !== ref_h(d) || v_enc !== ref_v(d)) begin
      failures++;
      $display("FAIL encode %h: h=%b v=%b", d, h_enc, v_enc);
    end
  endtask

  task automatic read_check(input string what, input logic [31:0] d, input logic [31:0] e,
                            input logic [19:0] eh, input logic [15:0] ev,
                            input logic [31:0] exp_d, input logic exp_det);
    mode = DMC_SYNDROME; d_wr = $urandom;
    d_rd = d ^ e; h_rd = ref_h(d) ^ eh; v_rd = ref_v(d) ^ ev;
    #1;
    checks++;
    if (d_correct !== exp_d || det !== exp_det) begin
      failures++;
      $display("FAIL %s: d=%h e=%h out=%h (exp %h) det=%b", what, d, e, d_correct, exp_d, det);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, e;
    write_check(32'b1111_0101_1010_1111_1111_1001_1010_0110);
    read_check("example", 32'b1111_0101_1010_1111_1111_0110_1010_1100, 32'h0000_0103, 0, 0,
               32'b1111_0101_1010_1111_1111_0110_1010_1100, 1'b1);
    for (int i = 0; i < 1000; i++) begin
      d = $urandom;
      write_check(d);
      e = rand_one_row_err();
      read_check("one row", d, e, 0, 0, expect_one_row(d, e), 1'b1);
      read_check("clean", d, 0, 0, 0, d, 1'b0);
      read_check("check bit", d, 0, 20'h1 << $urandom_range(0, 19), 0, d, 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
