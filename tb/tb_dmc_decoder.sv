// tb_dmc_decoder - checks syndrome -> locator -> corrector as a chain. The stored
// check bits come from the reference equations, the recomputed ones from the
// reference equations applied to the corrupted data. Cases: the worked examples
// (2-bit + 1-bit upset in symbols 0 and 2, two upsets in symbol 0, 4-bit upsets in
// symbols 0 and 2 whose sums cancel), random error patterns within one row,
// upsets of horizontal or vertical check bits only, and upsets of both rows in one column.
module tb_dmc_decoder;
  import dmc_tb_pkg::*;

  logic [31:0] d_read, d_correct;
  logic [19:0] h_mem, h_rec, dh;
  logic [15:0] v_mem, v_rec, s;
  logic        det;
  int checks = 0, failures = 0;

  dmc_decoder dut (.d_read(d_read), .h_mem(h_mem), .v_mem(v_mem), .h_rec(h_rec),
                   .v_rec(v_rec), .d_correct(d_correct), .dh(dh), .s(s),
                   .err_detected(det));

  task automatic run(input string what, input logic [31:0] d, input logic [31:0] e,
                     input logic [19:0] eh, input logic [15:0] ev,
                     input logic [31:0] exp_d, input logic exp_det);
    h_mem  = ref_h(d) ^ eh;
    v_mem  = ref_v(d) ^ ev;
    d_read = d ^ e;
    h_rec  = ref_h(d_read);
    v_rec  = ref_v(d_read);
    #1;
    checks++;
    if (d_correct !== exp_d || det !== exp_det) begin
      failures++;
      $display("FAIL %s: d=%h e=%h out=%h (exp %h) det=%b (exp %b)", what, d, e,
               d_correct, exp_d, det, exp_det);
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
    logic [31:0] dA, dB, d, e;
    dA = 32'b1111_0101_1010_1111_1111_0110_1010_1100;
    dB = 32'b1111_0101_1010_1111_1111_1001_1010_0110;
    run("no error", dA, 0, 0, 0, dA, 1'b0);
    // symbol 0: 1100 -> 1111, symbol 2: 0110 -> 0111
    run("MCU symbols 0 and 2", dA, 32'h0000_0103, 0, 0, dA, 1'b1);
    checks++;
    if (dh !== 20'b00000_00000_00000_00100) begin
      failures++;
      $display("FAIL horizontal syndrome %b", dh);
    end
    // every bit of symbols 0 and 2 upset, sums equal: detected, not corrected
    run("equal sums", dB, 32'h0000_0f0f, 0, 0, dB ^ 32'h0000_0f0f, 1'b1);
    checks++;
    if (dh !== 20'h0 || s !== 16'h0f0f) begin
      failures++;
      $display("FAIL equal sums syndromes dh=%b s=%b", dh, s);
    end
    // symbol 0 1111 -> 1000 and D4 0 -> 1: dH = -7 and +1
    d = 32'hf5af_fbaf;
    run("negative syndrome", d, 32'h0000_0017, 0, 0, d, 1'b1);
    checks++;
    if (dh !== 20'b00000_00000_00001_11001 || s !== 16'h0017) begin
      failures++;
      $display("FAIL negative syndrome dh=%b s=%b", dh, s);
    end
    run("two bits of symbol 0", 32'h2ab3_2a02, 32'h0000_0009, 0, 0, 32'h2ab3_2a02, 1'b1);
    for (int i = 0; i < 3000; i++) begin
      d = $urandom;
      e = rand_one_row_err();
      run("one row", d, e, 0, 0, expect_one_row(d, e), 1'b1);
    end
    for (int i = 0; i < 500; i++) begin
      logic [19:0] eh;
      logic [15:0] ev;
      d = $urandom;
      // upsets of horizontal bits only or of vertical bits only: nothing to locate
      eh = 20'($urandom); ev = 16'($urandom);
      if (i % 2 == 0) eh = 0; else ev = 0;
      run("check bits", d, 0, eh, ev, d, (eh != 0) || (ev != 0));
    end
    for (int j = 0; j < 16; j++) begin
      d = $urandom;
      e = (32'h1 << j) | (32'h1 << (j + 16));
      run("same column both rows", d, e, 0, 0, d ^ e, 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
