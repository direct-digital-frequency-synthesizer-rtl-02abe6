// sf_cordic_tb: self-checking test of the iterative scale-free CORDIC.
// For each angle it starts a conversion and checks:
//  * cos_out/sin_out bit-exact against a sequential model of the
//    micro-rotation algorithm written here from the algorithm's equations;
//  * both within 64 LSB (of 1.0 = 32768) of floating-point cos/sin for
//    angles below pi/4, the range the design is meant for;
//  * the latency: done exactly n+2 edges after the start edge, n being the
//    model's rotation count (one per set bit, two extra 0.25 rad steps at
//    most for angles >= 0.5 rad), and ready low while busy.
// Angles: 0, the reference angle 0101100101010001b (7 rotations), angles
// using the 0.25 rad step, the octant edge, the all-ones word, random ones.
module sf_cordic_tb;
  import ddfs_pkg::*;
  localparam int unsigned W = 16;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         start;
  logic [W-1:0] theta;
  logic         ready, done;
  logic [W-1:0] cos_out, sin_out;
  int unsigned  checks = 0, failures = 0;
  int unsigned  quarter_steps = 0, max_n = 0;

  always #5 clk = ~clk;

  sf_cordic #(.W(W)) dut (.*);

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Independent model: returns rotation count, final x and y.
  task automatic model(input logic [W-1:0] t, output int n,
                       output int xo, output int yo);
    int x, y, sh, xn, yn;
    logic [W-1:0] z;
    x = 1 << (W-1); y = 0; z = t; n = 0;
    while (z != 0) begin
      if (z[W-1]) begin
        sh = 2; z = z - (1 << (W-2)); quarter_steps++;
      end else begin
        int m;
        m = 0;
        for (int k = 0; k < W; k++) if (z[k]) m = k;
        sh = W - m; z[m] = 1'b0;
      end
      xn = (x - (x >> (2*sh+1))) - ((y >> sh) - (y >> (3*sh+3)));
      yn = ((x >> sh) - (x >> (3*sh+3))) + (y - (y >> (2*sh+1)));
      x = xn; y = yn; n++;
    end
    xo = x; yo = y;
  endtask

  task automatic convert(logic [W-1:0] t);
    int n, ex, ey, cycles;
    real a, ec, es;
    model(t, n, ex, ey);
    if (n > max_n) max_n = n;
    while (!ready) @(posedge clk);
    #1 start = 1'b1; theta = t;
    @(posedge clk);
    #1 start = 1'b0; theta = $urandom;   // input only sampled at start
    cycles = 0;
    while (!done) begin
      checks++;
      if (ready) begin
        failures++; $display("theta=%h: ready while busy", t);
      end
      @(posedge clk);
      #1 cycles++;
      if (cycles > 40) break;
    end
    checks++;
    if (cycles != n + 1) begin
      failures++;
      $display("theta=%h: done after %0d edges, exp %0d", t, cycles + 1, n + 2);
    end
    checks++;
    if (cos_out !== W'(ex) || sin_out !== W'(ey)) begin
      failures++;
      $display("theta=%h: got cos=%0d sin=%0d exp %0d %0d", t, cos_out,
               sin_out, ex, ey);
    end
    if (t < 16'hC910) begin
      a  = real'(t) / 65536.0;
      ec = $cos(a) * 32768.0;
      es = $sin(a) * 32768.0;
      checks++;
      if ((ec - cos_out) > 64.0 || (cos_out - ec) > 64.0 ||
          (es - sin_out) > 64.0 || (sin_out - es) > 64.0) begin
        failures++;
        $display("theta=%h: got cos=%0d sin=%0d ideal %f %f", t, cos_out,
                 sin_out, ec, es);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; theta = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (!ready || done) begin
      failures++; $display("not idle after reset");
    end
    convert(16'h0000);
    convert(16'b0101_1001_0101_0001);
    // 0.3489 rad: cos 0.9398, sin 0.3420 -> reference waveforms' angle
    convert(16'h8000);
    convert(16'hC000);
    convert(16'hC90F);
    convert(16'hBFFF);
    convert(16'hFFFF);
    convert(16'h0001);
    for (int k = 0; k < 3000; k++) convert(W'($urandom_range(0, 16'hC90F)));
    checks++;
    if (quarter_steps == 0 || max_n < W) begin
      failures++;
      $display("coverage: quarter_steps=%0d max_n=%0d", quarter_steps, max_n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
