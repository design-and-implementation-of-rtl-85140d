// dmc_corrector - error corrector of the DMC decoder.
//
// Flips every data bit that the locator marked: d_correct = d_read ^ loc. For bit
// D0 of the default layout this is D0correct = D0 ^ S0, applied when the error has
// been located to symbol 0 (the locator already folds the horizontal syndrome into
// loc). Purely combinational; follows the DMC correction equation.
module dmc_corrector
  import dmc_pkg::*;
#(
  parameter int unsigned N = DMC_N
) (
  input  logic [N-1:0] d_read,     // data as read from memory
  input  logic [N-1:0] loc,        // bits located as erroneous
  output logic [N-1:0] d_correct   // corrected data
);

  always_comb begin
    for (int i = 0; i < int'(N); i++) begin
      d_correct[i] = d_read[i] ^ loc[i];
    end
  end

endmodule
