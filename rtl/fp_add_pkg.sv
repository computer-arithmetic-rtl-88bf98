// fp_add_pkg: types and helpers shared by the two-path floating-point adder.
//
// Holds the rounding-mode encoding, the exception-flag bundle and the
// rounding decision used by the far path. The four rounding modes are the
// directed and nearest modes of the IEEE binary standard; their two-bit
// encoding is this design's own choice.
package fp_add_pkg;

  // Rounding modes: round to nearest even, toward zero, toward +infinity
  // (RP) and toward -infinity (RM).
  typedef enum logic [1:0] {
    RM_RNE = 2'b00,
    RM_RTZ = 2'b01,
    RM_RUP = 2'b10,
    RM_RDN = 2'b11
  } round_mode_e;

  // Exception flags produced by one addition. Division by zero cannot occur,
  // and an addition never raises underflow (a tiny sum is always exact).
  typedef struct packed {
    logic invalid;
    logic overflow;
    logic inexact;
  } fp_flags_t;

  // Rounding decision from the least significant kept bit (lsb), the guard
  // bit, the sticky bit, the sign of the result and the rounding mode.
  function automatic logic round_up(round_mode_e rm, logic sign, logic lsb,
                                    logic guard, logic sticky);
    unique case (rm)
      RM_RNE:  return guard & (lsb | sticky);
      RM_RTZ:  return 1'b0;
      RM_RUP:  return ~sign & (guard | sticky);
      default: return sign & (guard | sticky);
    endcase
  endfunction

endpackage
