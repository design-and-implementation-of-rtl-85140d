// tb_dmc_syndrome - checks the syndrome calculator: the horizontal syndrome is the
// 5-bit difference recomputed - stored per symbol pair, the vertical syndrome the
// XOR of recomputed and stored vertical bits. Worked examples plus random vectors.
module tb_dmc_syndrome;
  logic [19:0] h_mem, h_rec, dh;
  logic [15:0] v_mem, v_rec, s;
  int checks = 0, failures = 0;

  dmc_syndrome dut (.h_mem(h_mem), .v_mem(v_mem), .h_rec(h_rec), .v_rec(v_rec),
                    .dh(dh), .s(s));

  task automatic check(input string what, input logic [19:0] edh, input logic [15:0] es);
    #1;
    checks++;
    if (dh !== edh || s !== es) begin
      failures++;
      $display("FAIL %s: dh=%b (exp %b) s=%b (exp %b)", what, dh, edh, s, es);
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
    // 10110 - 10010 = 00100 in group 0
    h_mem = 20'b11001_10100_11001_10010; h_rec = 20'b11001_10100_11001_10110;
    v_mem = 16'h0303; v_rec = 16'h0303;
    check("example 2-bit MCU", 20'b00000_00000_00000_00100, 16'h0);
    // 01111 - 01111 = 00000: the pair sums agree
    h_mem = 20'b11001_10100_11001_01111; h_rec = h_mem;
    v_mem = 16'h0c09; v_rec = 16'h0c06;
    check("example equal sums", 20'h0, 16'h000f);
    // 01111 - 10110 = 11001 (wrap-around), 01001 - 01000 = 00001
    h_mem = 20'b11001_10100_01000_10110; h_rec = 20'b11001_10100_01001_01111;
    v_mem = 16'h0200; v_rec = 16'h0217;
    check("example negative", 20'b00000_00000_00001_11001, 16'h0017);
    for (int i = 0; i < 2000; i++) begin
      logic [19:0] e;
      h_mem = 20'($urandom); h_rec = 20'($urandom);
      v_mem = 16'($urandom); v_rec = 16'($urandom);
      e[4:0]   = 5'(h_rec[4:0]   - h_mem[4:0]);
      e[9:5]   = 5'(h_rec[9:5]   - h_mem[9:5]);
      e[14:10] = 5'(h_rec[14:10] - h_mem[14:10]);
      e[19:15] = 5'(h_rec[19:15] - h_mem[19:15]);
      check("random", e, v_rec ^ v_mem);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
