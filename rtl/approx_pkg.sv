// Shared definitions for the approximate arithmetic units.
//
// axpa_mode_e  : operating mode of the accuracy configurable prefix adder (axpa).
// sub_is_approx: in a recursive multiplier built from four half-width
//                sub-multipliers R1 = AL*BL, R2 = AL*BH, R3 = AH*BL, R4 = AH*BH,
//                the approximation level AX_L (0..4) says how many of them are
//                approximate. They are made approximate in the order R1, R2, R3,
//                R4, i.e. from the least significant product upwards; AX_L = 2
//                therefore means R1 and R2 approximate, R3 and R4 accurate.
package approx_pkg;

  typedef enum logic {
    AXPA_HALF_EXACT  = 1'b0,  // n/2-bit accurate adder on the low halves
    AXPA_FULL_APPROX = 1'b1   // n-bit approximate adder
  } axpa_mode_e;

  // Sub-multiplier index idx: 0 = R1, 1 = R2, 2 = R3, 3 = R4.
  function automatic bit sub_is_approx(int unsigned ax_l, int unsigned idx);
    return idx < ax_l;
  endfunction

endpackage
