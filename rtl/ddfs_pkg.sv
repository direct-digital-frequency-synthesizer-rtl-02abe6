// ddfs_pkg: constants, types and helper functions shared by the CORDIC-based
// direct digital frequency synthesizer.
//
// Number formats used throughout:
//  * CORDIC angle: unsigned, W fractional bits, in radians (bit k weighs
//    2^(k-W)), so the angle word covers [0, 1) rad. This follows the shift
//    values of the micro-rotation algorithm (a set bit M means a rotation by
//    2^-(W-M) rad).
//  * CORDIC coordinates: unsigned W bits, 1.0 = 2^(W-1). The start vector is
//    (1.0, 0), as in the reference waveforms of the algorithm.
//  * Synthesizer outputs: signed two's complement W bits, +1.0 saturated to
//    2^(W-1)-1.
// The constant pi/4 and the octant encoding are this design's own choices.
package ddfs_pkg;

  // pi/4 with 32 fractional bits (0.785398163... * 2^32 = 0xC90FDAA2.2)
  localparam logic [31:0] PI4_Q32 = 32'hC90F_DAA2;

  // Width of a shift amount: enough for 3*W+3 with W up to 32.
  localparam int unsigned SHIFT_W = 7;
  typedef logic [SHIFT_W-1:0] shift_t;

  // Octant of the full turn: phase bits [top:top-2].
  typedef logic [2:0] octant_t;

  // pi/4 rounded to w fractional bits (w <= 32).
  function automatic logic [31:0] pi4_const(int unsigned w);
    logic [32:0] r;
    r = ({1'b0, PI4_Q32} + (33'd1 << (31 - w))) >> (32 - w);
    return r[31:0];
  endfunction

  // Upper bound on micro-rotations for any W-bit angle: at most two 0.25 rad
  // steps clear the 0.5 rad bit, then one rotation per remaining set bit.
  function automatic int unsigned max_rotations(int unsigned w);
    return w + 1;
  endfunction

  // Cycles from an accepted start to the next possible start of sf_cordic:
  // one load cycle, the rotations, one cycle that sees the zero residual.
  function automatic int unsigned cordic_period(int unsigned w);
    return max_rotations(w) + 2;
  endfunction

endpackage
