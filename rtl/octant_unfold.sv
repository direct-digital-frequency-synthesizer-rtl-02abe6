// octant_unfold: turns the first-octant CORDIC result back into the signed
// sine and cosine of the full-turn phase.
//
// With c = cos(theta), s = sin(theta) of the folded angle (odd octants
// measure theta back from the octant's far end, see octant_fold):
//   octant  0: ( s,  c)   1: ( c,  s)   2: ( c, -s)   3: ( s, -c)
//           4: (-s, -c)   5: (-c, -s)   6: (-c,  s)   7: (-s,  c)
// given as (sin, cos). Inputs are unsigned with 1.0 = 2^(W-1); outputs are
// W-bit two's complement, where +1.0 (only reached at theta = 0) saturates
// to 2^(W-1)-1 and -1.0 is exact.
//
// Purely combinational. Octant symmetry follows the published algorithm;
// the table, the number format and the saturation are this design's own.
module octant_unfold
  import ddfs_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  octant_t             octant,
  input  logic [W-1:0]        c,        // cos of the folded angle
  input  logic [W-1:0]        s,        // sin of the folded angle
  output logic signed [W-1:0] sin_out,
  output logic signed [W-1:0] cos_out
);

  // Apply a sign to an unsigned magnitude, saturating +1.0.
  function automatic logic signed [W-1:0] signed_of(logic [W-1:0] mag,
                                                    logic neg);
    logic signed [W:0] v;
    v = neg ? -$signed({1'b0, mag}) : $signed({1'b0, mag});
    if (v > $signed((W+1)'((1 << (W-1)) - 1)))
      return W'((1 << (W-1)) - 1);
    return v[W-1:0];
  endfunction

  logic [W-1:0] sin_mag, cos_mag;
  logic         sin_neg, cos_neg;

  always_comb begin
    // Odd octant pairs {1,2} and {5,6} swap the roles of c and s.
    if (octant[0] ^ octant[1]) begin
      sin_mag = c;
      cos_mag = s;
    end else begin
      sin_mag = s;
      cos_mag = c;
    end
    sin_neg = octant[2];
    cos_neg = octant[2] ^ octant[1];
    sin_out = signed_of(sin_mag, sin_neg);
    cos_out = signed_of(cos_mag, cos_neg);
  end

endmodule
