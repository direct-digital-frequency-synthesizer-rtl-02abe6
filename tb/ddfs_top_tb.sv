// ddfs_top_tb: end-to-end test of the synthesizer at its default sizes
// (8-bit FCW and accumulator, 16-bit CORDIC, 19 clocks per sample).
// It plays the two frequency control words of the reference simulation,
// 00001111b and then 00111111b, for 300 samples each, followed by random
// FCWs, and for every output sample checks:
//  * sin_out/cos_out within 66 LSB (of 32768) of sin/cos(2*pi*p/256), with
//    p the phase from an accumulator model kept in this testbench;
//  * that samples come exactly every SAMPLE_CYCLES clocks, one sample
//    period after the tick that took their phase (constant sample rate);
//  * the accumulator phase and overflow flag after every clock against
//    the model.
// Per FCW it also counts the sine's upward zero crossings, which must equal
// the number of accumulator overflows (output frequency = FCW/256 of the
// sample rate). Mechanisms that must occur at least once: accumulator
// overflow, the 0.25 rad CORDIC step, all eight octants, +1.0 saturation,
// a change of FCW.
module ddfs_top_tb;
  import ddfs_pkg::*;
  localparam int unsigned N = 8, W = 16, SAMPLE_CYCLES = W + 3;
  localparam real PI = 3.14159265358979323846;

  logic                clk = 1'b0;
  logic                rst_n;
  logic [N-1:0]        fcw;
  logic signed [W-1:0] sin_out, cos_out;
  logic                sample_valid;
  logic [N-1:0]        phase;
  logic                phase_wrap;

  int unsigned checks = 0, failures = 0;
  int unsigned n_wrap = 0, n_quarter = 0, n_sat = 0, n_fcw_change = 0;
  bit [7:0]    octants_seen = '0;
  longint      cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  ddfs_top dut (.*);

  // 0.25 rad micro-rotations taken inside the CORDIC.
  always @(posedge clk)
    if (rst_n && !dut.u_cordic.ready && dut.u_cordic.active &&
        dut.u_cordic.msb == 4'(W - 1))
      n_quarter++;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Accumulator model on its own tick schedule: first tick on the first
  // edge after reset, then every SAMPLE_CYCLES clocks. Each tick queues the
  // phase it hands over and whether the addition overflowed.
  typedef struct { logic [N-1:0] p; logic ovf; } tick_t;
  tick_t        pending[$];
  logic [N-1:0] p_ref;
  int unsigned  tcnt;
  logic         model_tick, first_tick_done, ovf_ref;

  always @(posedge clk) begin
    logic [N:0] sum;
    model_tick = 1'b0;
    if (!rst_n) begin
      p_ref = '0; tcnt = 0; first_tick_done = 1'b0; ovf_ref = 1'b0;
    end else begin
      if (tcnt == 0) begin
        sum = {1'b0, p_ref} + {1'b0, fcw};
        pending.push_back('{p: p_ref, ovf: sum[N]});
        p_ref = sum[N-1:0];
        ovf_ref = sum[N];
        model_tick = first_tick_done;
        first_tick_done = 1'b1;
      end
      tcnt = (tcnt + 1) % SAMPLE_CYCLES;
    end
  end

  // Outputs must change exactly on model ticks, the accumulator must agree.
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      checks++;
      if (sample_valid !== model_tick || phase !== p_ref ||
          phase_wrap !== ovf_ref) begin
        failures++;
        $display("t=%0d valid=%0d exp %0d, phase=%0d/%0d exp %0d/%0d",
                 cycle, sample_valid, model_tick, phase, phase_wrap, p_ref,
                 ovf_ref);
      end
    end
  end

  // Wait for one sample and check it against the oldest queued phase.
  task automatic next_sample(output logic ovf);
    real es, ec;
    tick_t t;
    do @(posedge clk); while (!sample_valid);
    #2;
    t = pending.pop_front();
    ovf = t.ovf;
    es = $sin(2.0 * PI * real'(t.p) / 256.0) * 32768.0;
    ec = $cos(2.0 * PI * real'(t.p) / 256.0) * 32768.0;
    checks++;
    if ((es - sin_out) > 66.0 || (sin_out - es) > 66.0 ||
        (ec - cos_out) > 66.0 || (cos_out - ec) > 66.0) begin
      failures++;
      $display("p=%0d: sin=%0d cos=%0d ideal %f %f", t.p, sin_out, cos_out,
               es, ec);
    end
    octants_seen[t.p[N-1 -: 3]] = 1'b1;
    if (sin_out == 16'sd32767 || cos_out == 16'sd32767) n_sat++;
    if (ovf) n_wrap++;
  endtask

  task automatic play(logic [N-1:0] f, int samples);
    int crossings, wraps;
    logic signed [W-1:0] prev;
    logic ovf;
    if (fcw !== f) n_fcw_change++;
    fcw = f;
    crossings = 0; wraps = 0; prev = sin_out;
    for (int k = 0; k < samples; k++) begin
      next_sample(ovf);
      // the first samples after a change still use the previous FCW
      if (k > 1 && ovf) wraps++;
      if (k > 1 && prev < 0 && sin_out >= 0) crossings++;
      prev = sin_out;
    end
    checks++;
    if (crossings < wraps - 1 || crossings > wraps + 1) begin
      failures++;
      $display("fcw=%b: %0d zero crossings, %0d overflows", f, crossings,
               wraps);
    end
    $display("fcw=%b: %0d samples, %0d overflows, %0d zero crossings",
             f, samples, wraps, crossings);
  endtask

  initial begin
    rst_n = 1'b0; fcw = 8'b0000_1111;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    play(8'b0000_1111, 300);
    play(8'b0011_1111, 300);
    for (int k = 0; k < 6; k++) play(N'($urandom_range(1, 127)), 100);
    checks++;
    if (n_wrap == 0 || n_quarter == 0 || octants_seen != 8'hFF ||
        n_sat == 0 || n_fcw_change < 2) begin
      failures++;
      $display("coverage missing");
    end
    $display("overflows=%0d quarter_steps=%0d octants=%b saturations=%0d fcw_changes=%0d",
             n_wrap, n_quarter, octants_seen, n_sat, n_fcw_change);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
