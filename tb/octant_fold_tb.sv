// octant_fold_tb: exhaustive check of the phase-to-angle fold for an 8-bit
// phase and 16-bit angle. For every phase p the octant must be p[7:5], and
// the angle must be within 1 LSB below the exact folded angle
//   theta = (odd octant ? pi/4 - f : f),  f = p[4:0]/32 * pi/4 rad,
// computed in floating point.
module octant_fold_tb;
  import ddfs_pkg::*;
  localparam int unsigned P = 8, W = 16;
  localparam real PI = 3.14159265358979323846;

  logic [P-1:0] phase;
  octant_t      octant;
  logic [W-1:0] theta;
  int unsigned  checks = 0, failures = 0;

  octant_fold #(.P(P), .W(W)) dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < (1 << P); p++) begin
      real f, t, err;
      phase = P'(p);
      #1;
      f = real'(p % 32) / 32.0 * PI / 4.0;
      t = ((p / 32) % 2 == 1) ? (PI / 4.0 - f) : f;
      t = t * 65536.0;
      err = t - real'(theta);
      checks++;
      if (octant !== 3'(p / 32) || err < -0.5 || err > 1.5) begin
        failures++;
        $display("p=%0d: octant=%0d theta=%0d ideal %f", p, octant, theta, t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
