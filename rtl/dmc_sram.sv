// dmc_sram - storage array for the information bits or the redundancy bits of the
// DMC-protected memory.
//
// WIDTH-bit words, DEPTH entries. Write is synchronous (wdata is stored at waddr on
// the rising clock edge when we = 1); read is asynchronous (rdata follows raddr in
// the same cycle), as a register file. The contents are not reset: a word must be
// written before it is read. With DEPTH = 1 the array is the single memory register
// that the top level uses; the address ports are then one bit wide and ignored.
// That the information and check bits are kept in two separate arrays follows the
// design; the read/write timing and the lack of reset are this implementation's
// choices, as the array is a plain register model and not a foundry SRAM macro.
module dmc_sram #(
  parameter  int unsigned WIDTH = 32,
  parameter  int unsigned DEPTH = 1,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,      // write enable
  input  logic [AW-1:0]    waddr,   // write address
  input  logic [WIDTH-1:0] wdata,   // write data
  input  logic [AW-1:0]    raddr,   // read address
  output logic [WIDTH-1:0] rdata    // read data, combinational
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[(DEPTH > 1) ? int'(waddr) : 0] <= wdata;
  end

  assign rdata = mem[(DEPTH > 1) ? int'(raddr) : 0];

endmodule
