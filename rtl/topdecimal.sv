// topdecimal - fault-tolerant memory register protected by the Decimal Matrix Code.
//
// Data path: din -> DMC encoder -> memory (information array + redundancy array)
// -> DMC decoder -> dout. The encoder is shared between write and read (error reuse
// technique, dmc_ert_codec), so the controller alternates two phases:
//   PH_WRITE: the encoder encodes din; at the rising edge din goes to the
//             information array and its 20 horizontal + 16 vertical check bits go
//             to the redundancy array.
//   PH_READ:  the stored word is read; upsets are modelled by XORing err_data,
//             err_h and err_v into what is read (d1 is the possibly corrupted data).
//             The encoder recomputes the check bits of d1, the decoder forms the
//             syndromes, locates and corrects, and at the rising edge the corrected
//             word is registered on dout with dout_valid = 1 for one cycle.
// Timing: din must be stable in the PH_WRITE cycle, which is the first cycle after
// rst is released and then every second cycle; the corrected word appears on dout
// one cycle later (2 cycles from write to corrected read, one word every 2 cycles).
// rst is synchronous and active high; it restarts in PH_WRITE and clears dout.
// The block order and the ports din, clk, rst, dout and d1 follow the design; the
// memory depth of one word (a memory register), the alternating controller, the
// fault-injection inputs and the dout_valid/err_detected outputs are this
// implementation's own choices.
module topdecimal
  import dmc_pkg::*;
(
  input  logic              clk,
  input  logic              rst,           // synchronous, active high
  input  logic [DMC_N-1:0]  din,           // word to protect
  input  logic [DMC_N-1:0]  err_data,      // upset pattern on the stored data bits
  input  logic [DMC_HW-1:0] err_h,         // upset pattern on the stored horizontal bits
  input  logic [DMC_VW-1:0] err_v,         // upset pattern on the stored vertical bits
  output logic [DMC_N-1:0]  dout,          // corrected word
  output logic [DMC_N-1:0]  d1,            // data as read, after the upsets
  output logic              dout_valid,    // dout was updated at the last edge
  output logic              err_detected   // the word on dout had a non-zero syndrome
);

  dmc_phase_e phase;
  dmc_mode_e  mode;

  logic [DMC_HW-1:0] h_enc, h_mem, h_rd;
  logic [DMC_VW-1:0] v_enc, v_mem, v_rd;
  logic [DMC_N-1:0]  d_mem;
  logic [DMC_N-1:0]  d_correct;
  logic [DMC_HW-1:0] dh;
  logic [DMC_VW-1:0] s;
  logic              det;
  logic              we;

  // ---------------- controller: alternate write and read ----------------
  always_ff @(posedge clk) begin
    if (rst) phase <= PH_WRITE;
    else     phase <= (phase == PH_WRITE) ? PH_READ : PH_WRITE;
  end

  assign mode = (phase == PH_WRITE) ? DMC_ENCODE : DMC_SYNDROME;
  assign we   = (phase == PH_WRITE) && !rst;

  // ---------------- encoder / decoder with the shared encoder ----------------
  dmc_ert_codec u_codec (
    .mode         (mode),
    .d_wr         (din),
    .h_enc        (h_enc),
    .v_enc        (v_enc),
    .d_rd         (d1),
    .h_rd         (h_rd),
    .v_rd         (v_rd),
    .d_correct    (d_correct),
    .dh           (dh),
    .s            (s),
    .err_detected (det)
  );

  // ---------------- memory: information and redundancy ----------------
  dmc_sram #(.WIDTH(DMC_N), .DEPTH(1)) u_sram_info (
    .clk   (clk),
    .we    (we),
    .waddr (1'b0),
    .wdata (din),
    .raddr (1'b0),
    .rdata (d_mem)
  );

  dmc_sram #(.WIDTH(DMC_RW), .DEPTH(1)) u_sram_red (
    .clk   (clk),
    .we    (we),
    .waddr (1'b0),
    .wdata ({h_enc, v_enc}),
    .raddr (1'b0),
    .rdata ({h_mem, v_mem})
  );

  // upsets of the stored cells, as seen by the read
  assign d1   = d_mem ^ err_data;
  assign h_rd = h_mem ^ err_h;
  assign v_rd = v_mem ^ err_v;

  // ---------------- output register ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      dout         <= '0;
      dout_valid   <= 1'b0;
      err_detected <= 1'b0;
    end else if (phase == PH_READ) begin
      dout         <= d_correct;
      dout_valid   <= 1'b1;
      err_detected <= det;
    end else begin
      dout_valid   <= 1'b0;
    end
  end

  // the shared encoder may only encode while the memory is written
  a_we_encode : assert property (@(posedge clk) we |-> mode == DMC_ENCODE);
  // a corrected word is produced every second cycle
  a_valid_alt : assert property (@(posedge clk) disable iff (rst) dout_valid |=> !dout_valid);

endmodule
