// tb_dmc_locator - checks the error locator: a data bit is marked when its column's
// vertical syndrome is set and its symbol pair's horizontal syndrome is non-zero.
// Directed cases for the four symbol pairs plus random syndromes.
module tb_dmc_locator;
  import dmc_tb_pkg::*;

  logic [19:0] dh;
  logic [15:0] s;
  logic [31:0] loc;
  logic        det;
  int checks = 0, failures = 0;

  dmc_locator dut (.dh(dh), .s(s), .loc(loc), .err_detected(det));

  task automatic check(input string what, input logic [31:0] eloc, input logic edet);
    #1;
    checks++;
    if (loc !== eloc || det !== edet) begin
      failures++;
      $display("FAIL %s: dh=%b s=%b loc=%h (exp %h) det=%b (exp %b)", what, dh, s, loc,
               eloc, det, edet);
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
    dh = '0; s = '0;
    check("no error", 32'h0, 1'b0);
    dh = 20'b00000_00000_00000_00100; s = 16'h0003;
    check("symbol 0 pair", 32'h0000_0003, 1'b1);
    dh = 20'b00000_00000_00000_00100; s = 16'h0f00;
    check("symbol 2", 32'h0000_0f00, 1'b1);
    dh = 20'b00000_00000_00000_00100; s = 16'h00f0;
    check("column of other pair", 32'h0, 1'b1);
    dh = 20'b00000_00001_00000_00000; s = 16'h0001;
    check("row 1 symbol 4", 32'h0001_0000, 1'b1);
    dh = 20'b11111_00000_00000_00000; s = 16'hf0f0;
    check("row 1 pair 5/7", 32'hf0f0_0000, 1'b1);
    dh = 20'h0; s = 16'h8000;
    check("vertical bit only", 32'h0, 1'b1);
    dh = 20'b00000_00000_00011_00000; s = 16'h0;
    check("horizontal bit only", 32'h0, 1'b1);
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] e;
      logic [3:0]  nz;
      dh = ($urandom_range(0, 3) == 0) ? 20'($urandom) & 20'h0_83e1 : 20'($urandom);
      s  = 16'($urandom);
      nz = {|dh[19:15], |dh[14:10], |dh[9:5], |dh[4:0]};
      for (int b = 0; b < 32; b++) e[b] = s[b % 16] & nz[grp_of(b)];
      check("random", e, (dh != 0) || (s != 0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
