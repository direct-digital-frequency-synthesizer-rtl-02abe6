// sf_shift_gen: shift-value generator of the scale-free micro-rotation
// CORDIC, one micro-rotation per evaluation.
//
// It looks at the residual angle z (W fraction bits, radians) and finds the
// position M of its most significant one. If M is the top bit (0.5 rad),
// the Taylor terms would be too coarse, so a fixed 0.25 rad rotation is used
// instead: shift 2 and z' = z - 0.25. Otherwise bit M (worth 2^-(W-M) rad)
// is rotated away: shift s = W - M and z' = z with bit M cleared. The three
// shift amounts the rotator needs are s, 2s+1 and 3s+3. `active` is low
// once z is zero, which ends the rotation sequence.
//
// Purely combinational. The algorithm (steps 2 to 5 of the micro-rotation
// procedure and the shift set s, 2s+1, 3s+3) follows the published design;
// the outputs for z = 0 (all shifts 0) are this design's own choice.
module sf_shift_gen
  import ddfs_pkg::*;
#(
  parameter int unsigned W = 16   // angle width
) (
  input  logic [W-1:0]         z,        // residual angle
  output logic                 active,   // z != 0: a rotation is due
  output logic [$clog2(W)-1:0] msb,      // position M of the leading one
  output shift_t               s,        // shift s        (tan term)
  output shift_t               s2,       // shift 2s+1     (cos term)
  output shift_t               s3,       // shift 3s+3     (cubic sin term)
  output logic [W-1:0]         z_next    // residual after this rotation
);

  always_comb begin
    active = |z;
    msb    = '0;
    for (int unsigned k = 0; k < W; k++)
      if (z[k]) msb = k[$clog2(W)-1:0];

    if (!active) begin
      s      = '0;
      z_next = z;
    end else if (msb == $clog2(W)'(W-1)) begin
      s      = shift_t'(2);
      z_next = z - (W'(1) << (W-2));
    end else begin
      s      = shift_t'(W) - shift_t'(msb);
      z_next = z & ~(W'(1) << msb);
    end
    s2 = active ? shift_t'(2 * s + 1) : '0;
    s3 = active ? shift_t'(3 * s + 3) : '0;
  end

endmodule
