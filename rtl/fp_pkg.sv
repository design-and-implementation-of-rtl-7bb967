// fp_pkg: types and constants shared by the floating-point units.
// Words are laid out as sign | biased exponent | fraction, as IEEE 754 defines;
// the default format everywhere is binary32 (8-bit exponent with a bias of
// 127, 23-bit fraction). The four rounding modes
// (round to nearest even, round up, round down, round toward zero) are the ones
// the design supports; their 2-bit encoding is this design's own choice.
package fp_pkg;

  typedef enum logic [1:0] {
    RM_RNE = 2'b00,   // round to nearest, ties to even
    RM_RUP = 2'b01,   // round up, toward +infinity
    RM_RDN = 2'b10,   // round down, toward -infinity
    RM_RTZ = 2'b11    // round toward zero
  } round_mode_t;

  // Exception flags reported with every result.
  typedef struct packed {
    logic invalid;    // NaN produced from non-NaN operands (0 x inf, inf - inf)
    logic overflow;   // exponent too large after rounding
    logic underflow;  // result tiny (below the normal range) and inexact
    logic inexact;    // rounding changed the value
  } fp_flags_t;

  localparam logic [31:0] QNAN = 32'h7FC0_0000;   // binary32 quiet NaN
endpackage
