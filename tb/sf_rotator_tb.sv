// sf_rotator_tb: checks one micro-rotation.
//  * The first rotation of the reference waveforms: (1.0, 0) by 2^-2 with
//    W = 16 gives x' = 0111110000000000b.
//  * Random vectors of length <= 1 and every shift 1..16: the result must
//    match the shift-and-add formula bit for bit (integer model) and lie
//    within a few LSBs of the exact rotation by the angle 2^-s rad
//    computed in floating point (x cos t - y sin t, x sin t + y cos t).
module sf_rotator_tb;
  import ddfs_pkg::*;
  localparam int unsigned W = 16;
  localparam real ONE = 32768.0;

  logic [W-1:0] x, y, x_next, y_next;
  shift_t       s, s2, s3;
  int unsigned checks = 0, failures = 0;

  sf_rotator #(.W(W)) dut (.*);

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint shr(longint v, int sh);
    return (sh >= 63) ? 0 : (v >>> sh);
  endfunction

  task automatic apply(int xv, int yv, int sv);
    longint ex, ey;
    real t, rx, ry, tol;
    x = W'(xv); y = W'(yv);
    s = shift_t'(sv); s2 = shift_t'(2*sv+1); s3 = shift_t'(3*sv+3);
    #1;
    ex = (xv - shr(xv, 2*sv+1)) - (shr(yv, sv) - shr(yv, 3*sv+3));
    ey = (shr(xv, sv) - shr(xv, 3*sv+3)) + (yv - shr(yv, 2*sv+1));
    checks++;
    if (x_next !== W'(ex) || y_next !== W'(ey)) begin
      failures++;
      $display("x=%0d y=%0d s=%0d: got %0d,%0d exp %0d,%0d", xv, yv, sv,
               x_next, y_next, ex, ey);
    end
    t  = 1.0 / real'(1 << sv);
    rx = xv * $cos(t) - yv * $sin(t);
    ry = xv * $sin(t) + yv * $cos(t);
    // Truncation of four shifted terms plus the Taylor remainder.
    tol = 4.0 + ONE * (t**4 / 24.0 + t**3 / 24.0 + t**6 / 64.0);
    checks++;
    if ((rx - x_next) > tol || (x_next - rx) > tol ||
        (ry - y_next) > tol || (y_next - ry) > tol) begin
      failures++;
      $display("x=%0d y=%0d s=%0d: got %0d,%0d ideal %f,%f", xv, yv, sv,
               x_next, y_next, rx, ry);
    end
  endtask

  initial begin
    apply(32768, 0, 2);
    checks++;
    if (x_next !== 16'b0111_1100_0000_0000) begin
      failures++; $display("reference rotation: x'=%b", x_next);
    end
    for (int k = 0; k < 4000; k++) begin
      real a, r;
      int sv;
      a  = ($urandom_range(0, 10000) / 10000.0) * 0.6;   // below 0.6 rad
      r  = 0.5 + ($urandom_range(0, 10000) / 10000.0) * 0.5;
      sv = $urandom_range(2, 16);
      apply($rtoi(r * $cos(a) * ONE), $rtoi(r * $sin(a) * ONE), sv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
