// octant_fold: maps a full-turn phase word onto a first-octant angle in
// radians for the CORDIC.
//
// The micro-rotation CORDIC only covers 0..pi/4; sine and cosine of any
// other angle follow from octant symmetry. The top three phase bits select
// the octant. The remaining R = P-3 bits give the position r inside the
// octant; in odd octants the angle is measured from the octant's far end,
// r' = 2^R - r (one bit wider than r, so r = 0 folds to exactly pi/4).
// The fraction is then scaled to radians with a W-bit constant pi/4:
//   theta = (r' * round(pi/4 * 2^W)) >> R      (W fractional bits)
// A constant multiply reduces to shifts and additions in hardware.
//
// Purely combinational. Using octant symmetry follows the published
// algorithm; the bit layout, the exact fold and the radian
// scaling are this design's own choices.
module octant_fold
  import ddfs_pkg::*;
#(
  parameter int unsigned P = 8,   // phase word width (>= 4)
  parameter int unsigned W = 16   // CORDIC angle width (<= 32)
) (
  input  logic [P-1:0] phase,     // fraction of a full turn
  output octant_t      octant,    // which eighth of the turn
  output logic [W-1:0] theta      // folded angle, radians, W fraction bits
);

  localparam int unsigned R = P - 3;
  localparam logic [W-1:0] PI4 = W'(pi4_const(W));

  logic [R-1:0]   r;
  logic [R:0]     r_f;
  logic [R+W:0]   prod;

  always_comb begin
    octant = phase[P-1 -: 3];
    r      = phase[R-1:0];
    r_f    = octant[0] ? (R+1)'(1 << R) - (R+1)'(r) : (R+1)'(r);
    prod   = (R+W+1)'(r_f) * (R+W+1)'(PI4);
    theta  = prod[R +: W];
  end

endmodule
