// tb_dmc_corrector - checks that the corrector flips exactly the located bits:
// walking single bits, all-ones mask and random words.
module tb_dmc_corrector;
  logic [31:0] d_read, loc, d_correct;
  int checks = 0, failures = 0;

  dmc_corrector dut (.d_read(d_read), .loc(loc), .d_correct(d_correct));

  task automatic check(input string what);
    logic [31:0] e;
    #1;
    for (int b = 0; b < 32; b++) e[b] = loc[b] ? ~d_read[b] : d_read[b];
    checks++;
    if (d_correct !== e) begin
      failures++;
      $display("FAIL %s: d=%h loc=%h out=%h exp=%h", what, d_read, loc, d_correct, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d_read = 32'h2ab3_2a0b; loc = 32'h0000_0009;
    check("example");
    if (d_correct !== 32'h2ab3_2a02) begin
      failures++;
      $display("FAIL example value %h", d_correct);
    end
    for (int b = 0; b < 32; b++) begin
      d_read = $urandom; loc = 32'h1 << b;
      check("walking");
    end
    d_read = $urandom; loc = '1;
    check("all");
    for (int i = 0; i < 1000; i++) begin
      d_read = $urandom; loc = $urandom;
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
