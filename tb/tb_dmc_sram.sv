// tb_dmc_sram - checks the storage array at 16 words of 36 bits (writes land at
// their address on the clock edge, reads are combinational, a disabled write changes
// nothing) and at its default single-word size.
module tb_dmc_sram;
  logic        clk = 0;
  logic        we, we1;
  logic [3:0]  waddr, raddr;
  logic [35:0] wdata, rdata;
  logic [31:0] wdata1, rdata1;
  logic [35:0] model [16];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dmc_sram #(.WIDTH(36), .DEPTH(16)) dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
                                          .raddr(raddr), .rdata(rdata));
  dmc_sram dut1 (.clk(clk), .we(we1), .waddr(1'b0), .wdata(wdata1), .raddr(1'b0),
                 .rdata(rdata1));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] last1;
    we = 0; we1 = 0; waddr = 0; raddr = 0; wdata = 0; wdata1 = 0;
    // fill every word
    for (int a = 0; a < 16; a++) begin
      @(negedge clk);
      we = 1; waddr = 4'(a); wdata = {4'($urandom), 32'($urandom)};
      model[a] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 4'($urandom); wdata = {4'($urandom), 32'($urandom)};
      raddr = 4'($urandom);
      #1;
      checks++;
      if (rdata !== model[raddr]) begin
        failures++;
        $display("FAIL read %0d: %h exp %h", raddr, rdata, model[raddr]);
      end
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    // single-word register
    @(negedge clk);
    we1 = 1; wdata1 = 32'h00bc_614e; last1 = wdata1;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      checks++;
      if (rdata1 !== last1) begin
        failures++;
        $display("FAIL register: %h exp %h", rdata1, last1);
      end
      we1 = 1'($urandom); wdata1 = $urandom;
      if (we1) last1 = wdata1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
