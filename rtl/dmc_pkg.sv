// dmc_pkg - shared constants and types of the Decimal Matrix Code (DMC) memory.
//
// A 32-bit word is split into K = K1 x K2 symbols of M bits (N = K x M), laid out
// as K1 rows of K2 symbols. Row r holds symbols r*K2 .. r*K2+K2-1, lowest symbol at
// the lowest data bits. With the default K1 = 2, K2 = 4, M = 4 (the configuration
// the design is built for) row 0 holds D15..D0 (symbols 3..0) and row 1 holds
// D31..D16 (symbols 7..4).
//
// Horizontal check bits: in each row, symbol c is paired with symbol c + K2/2 and
// their decimal (integer) sum is stored in M+1 bits. Vertical check bits: bit j of
// every row is XORed into V[j]. The check-bit counts follow from these rules:
// 20 horizontal + 16 vertical = 36 redundant bits for the default.
package dmc_pkg;

  localparam int unsigned DMC_M  = 4;   // bits per symbol
  localparam int unsigned DMC_K1 = 2;   // rows
  localparam int unsigned DMC_K2 = 4;   // symbols per row

  localparam int unsigned DMC_N  = DMC_K1 * DMC_K2 * DMC_M;               // 32 data bits
  localparam int unsigned DMC_HW = DMC_K1 * (DMC_K2 / 2) * (DMC_M + 1);   // 20 horizontal bits
  localparam int unsigned DMC_VW = DMC_K2 * DMC_M;                        // 16 vertical bits
  localparam int unsigned DMC_RW = DMC_HW + DMC_VW;                       // 36 redundant bits

  // Operation of the shared (ERT) encoder: encode on a write, recompute the check
  // bits of the stored word for the syndrome on a read.
  typedef enum logic {
    DMC_ENCODE   = 1'b0,
    DMC_SYNDROME = 1'b1
  } dmc_mode_e;

  // Phase of the memory controller in the top level.
  typedef enum logic {
    PH_WRITE = 1'b0,
    PH_READ  = 1'b1
  } dmc_phase_e;

endpackage
