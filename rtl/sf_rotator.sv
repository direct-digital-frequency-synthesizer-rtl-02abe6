// sf_rotator: coordinate calculation of the scale-free micro-rotation
// CORDIC (one micro-rotation, counter-clockwise, by theta = 2^-s rad).
//
// sin and cos of the small angle are replaced by truncated Taylor series,
// cos ~ 1 - theta^2/2 and sin ~ theta - theta^3/8; with theta = 2^-s every
// product becomes a shift:
//   x' = (x - x>>(2s+1)) - (y>>s - y>>(3s+3))
//   y' = (x>>s - x>>(3s+3)) + (y - y>>(2s+1))
// The 1/8 in the cubic term (in place of 1/6) keeps the vector length at
// 1 + theta^6/64, so no scale-factor correction is needed. Both outputs use
// the old x and y, as in the published equations and datapath figure.
//
// Operands are unsigned (1.0 = 2^(W-1)); for a start vector (1.0, 0) and a
// total rotation below 1 rad, x only shrinks and y stays below 0.85, so no
// extra headroom bit is needed. Purely combinational: six shifters, four
// subtractors and two adders.
module sf_rotator
  import ddfs_pkg::*;
#(
  parameter int unsigned W = 16   // coordinate width
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  shift_t       s,         // i
  input  shift_t       s2,        // 2i+1
  input  shift_t       s3,        // 3i+3
  output logic [W-1:0] x_next,
  output logic [W-1:0] y_next
);

  logic [W-1:0] x_c, y_c, x_s, y_s;

  always_comb begin
    x_c    = x - (x >> s2);          // x * cos(theta)
    y_c    = y - (y >> s2);          // y * cos(theta)
    x_s    = (x >> s) - (x >> s3);   // x * sin(theta)
    y_s    = (y >> s) - (y >> s3);   // y * sin(theta)
    x_next = x_c - y_s;
    y_next = x_s + y_c;
  end

endmodule
