// falcon_pkg: types shared by the Falcon CNN-UM emulator blocks.
//
// The emulator solves the forward-Euler form of the (multi-layer) CNN state
// equation, x(m+1) = sum A' * x(m) + g, one cell per update. A core runs in one
// of two modes: the iteration mode computes new states from the feedback
// template A' and the constant g; the input mode uses the same datapath with
// the control template B' to compute g = sum B' * u + h*I once, before the
// iterations start. The mode encoding is this design's own choice.
package falcon_pkg;

  typedef enum logic {
    MODE_ITERATE = 1'b0,  // out_state = saturated new state, out_const = const passed through
    MODE_INPUT   = 1'b1   // out_const = g (constant format), out_state = centre input passed through
  } mode_e;

  // arithmetic unit of a core
  typedef enum logic {
    ARITH_DA   = 1'b0,  // distributed-arithmetic FIR filter (da_arith_unit), the default
    ARITH_MULT = 1'b1   // row-serial multipliers (mult_arith_unit)
  } arith_e;

endpackage
