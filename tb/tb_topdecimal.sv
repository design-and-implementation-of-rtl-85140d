// tb_topdecimal - end-to-end test of the DMC-protected memory register at its
// default sizes (32 data bits, 20 + 16 check bits).
// Every operation writes a word (write cycle), upsets the stored cells while it is
// read (read cycle) and checks the registered result one edge later: dout, d1,
// dout_valid (high for exactly the cycle after the read edge, i.e. 2 cycles from
// write to corrected word) and err_detected. Upset patterns: none, the five multiple
// cell upset types (single bit; non-adjacent bits in two adjacent symbols; a burst
// across two adjacent symbols; two non-adjacent symbols; a burst across four
// symbols), every 5-bit burst of a row, random patterns within one row, upsets of
// horizontal-only or vertical-only check bits, the equal-sum case that escapes
// correction and both rows of one column.
// Each mechanism is counted and one that never happened counts as a failure.
module tb_topdecimal;
  import dmc_tb_pkg::*;

  logic        clk = 0;
  logic        rst;
  logic [31:0] din, err_data, dout, d1;
  logic [19:0] err_h;
  logic [15:0] err_v;
  logic        dout_valid, err_detected;
  int checks = 0, failures = 0;
  int cycles = 0;

  // mechanism counters
  int n_write = 0, n_read = 0, n_clean = 0, n_corrected = 0, n_check_bits = 0;
  int n_type[1:5] = '{0, 0, 0, 0, 0};
  int n_burst5 = 0, n_equal_sum = 0, n_same_column = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  topdecimal dut (.clk(clk), .rst(rst), .din(din), .err_data(err_data), .err_h(err_h),
                  .err_v(err_v), .dout(dout), .d1(d1), .dout_valid(dout_valid),
                  .err_detected(err_detected));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cycles);
    end
  endtask

  // One write/read operation. Called just after a falling edge in a write cycle.
  // Returns whether the word came back equal to d.
  task automatic op(input string what, input logic [31:0] d, input logic [31:0] e,
                    input logic [19:0] eh, input logic [15:0] ev,
                    input logic [31:0] exp_d, input logic exp_det, output logic ok);
    int c0;
    din = d; err_data = '0; err_h = '0; err_v = '0;
    c0 = cycles;
    @(negedge clk);                       // write edge passed, now the read cycle
    n_write++;
    check({what, ": dout_valid low in read cycle"}, !dout_valid);
    din = ~d;                             // must not matter any more
    err_data = e; err_h = eh; err_v = ev;
    #1;
    check({what, ": d1 is the upset data"}, d1 === (d ^ e));
    @(negedge clk);                       // read edge passed
    n_read++;
    check({what, ": 2 cycles from write to corrected word"}, cycles - c0 == 2);
    check({what, ": dout_valid"}, dout_valid === 1'b1);
    check({what, ": err_detected"}, err_detected === exp_det);
    checks++;
    if (dout !== exp_d) begin
      failures++;
      $display("FAIL %s: d=%h e=%h eh=%h ev=%h dout=%h exp %h", what, d, e, eh, ev, dout, exp_d);
    end
    ok = (dout === d);
    err_data = '0; err_h = '0; err_v = '0;
  endtask

  initial begin
    logic        ok;
    logic [31:0] d, e;
    logic [31:0] dA, dB;
    dA = 32'b1111_0101_1010_1111_1111_0110_1010_1100;
    dB = 32'b1111_0101_1010_1111_1111_1001_1010_0110;
    din = '0; err_data = '0; err_h = '0; err_v = '0;
    rst = 1;
    repeat (3) @(negedge clk);
    check("reset clears dout", dout === 32'h0 && !dout_valid);
    rst = 0;

    // no upset
    for (int i = 0; i < 50; i++) begin
      d = $urandom;
      op("clean", d, 0, 0, 0, d, 1'b0, ok);
      if (ok) n_clean++;
    end
    // worked examples: 2-bit + 1-bit MCU in symbols 0 and 2; two bits of symbol 0
    op("example MCU", dA, 32'h0000_0103, 0, 0, dA, 1'b1, ok);
    if (ok) n_corrected++;
    op("example 2 bits", 32'h2ab3_2a02, 32'h0000_0009, 0, 0, 32'h2ab3_2a02, 1'b1, ok);
    if (ok) n_corrected++;
    // equal sums: symbols 0 and 2 (0110, 1001) all upset -> escapes correction
    op("equal sum", dB, 32'h0000_0f0f, 0, 0, dB ^ 32'h0000_0f0f, 1'b1, ok);
    if (!ok) n_equal_sum++;

    // the five upset types, random data
    for (int i = 0; i < 100; i++) begin
      logic [31:0] pat [1:5];
      int sh;
      sh = $urandom_range(0, 1) * 16;
      pat[1] = 32'h1 << $urandom_range(0, 31);                 // single bit
      pat[2] = 32'h0000_1400 << sh;                            // D12, D10
      pat[3] = 32'h0000_00f8 << sh;                            // D7..D3
      pat[4] = 32'h0000_0f0f << sh;                            // symbols 0 and 2
      pat[5] = 32'h0000_7ffe << sh;                            // D14..D1, four symbols
      for (int t = 1; t <= 5; t++) begin
        d = $urandom;
        op($sformatf("type %0d", t), d, pat[t], 0, 0, expect_one_row(d, pat[t]), 1'b1, ok);
        if (ok) n_type[t]++;
      end
    end
    // every 5-bit burst inside a row is corrected
    for (int r = 0; r < 2; r++) begin
      for (int p = 0; p <= 11; p++) begin
        d = $urandom;
        e = 32'h1f << (r*16 + p);
        op("5-bit burst", d, e, 0, 0, d, 1'b1, ok);
        if (ok) n_burst5++;
      end
    end
    // random patterns within one row
    for (int i = 0; i < 1000; i++) begin
      d = $urandom;
      e = rand_one_row_err();
      op("one row", d, e, 0, 0, expect_one_row(d, e), 1'b1, ok);
      if (ok) n_corrected++;
    end
    // horizontal-only or vertical-only check-bit upsets: data is never touched
    for (int i = 0; i < 200; i++) begin
      logic [19:0] eh;
      logic [15:0] ev;
      d = $urandom;
      eh = 20'($urandom); ev = 16'($urandom);
      if (i % 2 == 0) eh = 0; else ev = 0;
      if (eh == 0 && ev == 0) ev = 16'h1;
      op("check bits", d, 0, eh, ev, d, 1'b1, ok);
      if (ok) n_check_bits++;
    end
    // both rows of one column: invisible to the vertical syndrome
    for (int j = 0; j < 16; j++) begin
      d = $urandom;
      e = (32'h1 << j) | (32'h1 << (j + 16));
      op("same column", d, e, 0, 0, d ^ e, 1'b1, ok);
      if (!ok) n_same_column++;
    end
    // reset in the middle restarts with a write cycle
    rst = 1;
    @(negedge clk);
    @(negedge clk);
    rst = 0;
    check("reset clears dout_valid", !dout_valid);
    d = $urandom;
    op("after reset", d, 32'h0000_0001, 0, 0, d, 1'b1, ok);

    $display("writes=%0d reads=%0d clean=%0d corrected=%0d check_bit_upsets=%0d",
             n_write, n_read, n_clean, n_corrected, n_check_bits);
    $display("type1=%0d type2=%0d type3=%0d type4=%0d type5=%0d burst5=%0d",
             n_type[1], n_type[2], n_type[3], n_type[4], n_type[5], n_burst5);
    $display("equal_sum_escapes=%0d same_column_escapes=%0d", n_equal_sum, n_same_column);
    check("write happened", n_write > 0);
    check("read happened", n_read > 0);
    check("clean read happened", n_clean > 0);
    check("correction happened", n_corrected > 0);
    for (int t = 1; t <= 5; t++) check($sformatf("type %0d corrected", t), n_type[t] > 0);
    check("5-bit bursts all corrected", n_burst5 == 24);
    check("check-bit upsets ignored", n_check_bits == 200);
    check("equal-sum escape happened", n_equal_sum == 1);
    check("same-column escape happened", n_same_column == 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
