// tb_dmc_encoder - checks the DMC encoder against the two worked examples of a
// 32-bit word with its check bits and against the written-out equations for random
// words. Combinational block: each vector is applied and checked after 1 ns.
module tb_dmc_encoder;
  import dmc_tb_pkg::*;

  logic [31:0] d, u;
  logic [19:0] h;
  logic [15:0] v;
  int checks = 0, failures = 0;

  dmc_encoder dut (.d(d), .h(h), .v(v), .u(u));

  task automatic check(input string what, input logic [31:0] dd,
                       input logic [19:0] eh, input logic [15:0] ev);
    d = dd;
    #1;
    checks++;
    if (h !== eh || v !== ev || u !== dd) begin
      failures++;
      $display("FAIL %s: d=%h h=%b (exp %b) v=%b (exp %b) u=%h", what, dd, h, eh, v, ev, u);
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
    // word of the decimal-detection example: rows 1111_0110_1010_1100 / 1111_0101_1010_1111
    check("example A", 32'b1111_0101_1010_1111_1111_0110_1010_1100,
          20'b11001_10100_11001_10010, 16'b0000_0011_0000_0011);
    // word of the encoding waveform
    check("example B", 32'b1111_0101_1010_1111_1111_1001_1010_0110,
          20'b11001_10100_11001_01111, 16'b0000_1100_0000_1001);
    check("zeros", 32'h0, 20'h0, 16'h0);
    check("ones", 32'hffff_ffff, {4{5'd30}}, 16'h0);
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] r;
      r = $urandom;
      check("random", r, ref_h(r), ref_v(r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
