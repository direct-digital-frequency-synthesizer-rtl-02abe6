// phase_accumulator_tb: self-checking test of the phase accumulator.
// Drives random FCWs and random step enables, keeps an independent model of
// the phase (a wide counter reduced modulo 2^N) and checks phase and the
// overflow flag after every edge, and that the phase holds without step.
module phase_accumulator_tb;
  localparam int unsigned N = 8;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         step;
  logic [N-1:0] fcw;
  logic [N-1:0] phase;
  logic         wrap;
  int unsigned  checks = 0, failures = 0;
  longint unsigned total;      // sum of all FCWs applied, never wraps
  int unsigned  wraps_seen = 0;

  always #5 clk = ~clk;

  phase_accumulator #(.N(N)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; step = 1'b0; fcw = '0; total = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (phase !== '0 || wrap !== 1'b0) begin
      failures++; $display("reset: phase=%0d wrap=%0d", phase, wrap);
    end
    for (int k = 0; k < 2000; k++) begin
      logic exp_wrap;
      longint unsigned prev_total;
      fcw  = (k < 300) ? N'(8'b0000_1111) : N'($urandom);
      step = ($urandom_range(0, 3) != 0);
      prev_total = total;
      @(posedge clk);
      #1;
      if (step) begin
        total = total + fcw;
        exp_wrap = ((prev_total % (1 << N)) + fcw) >= (1 << N);
        checks++;
        if (wrap !== exp_wrap) begin
          failures++; $display("k=%0d wrap=%0d exp=%0d", k, wrap, exp_wrap);
        end
        if (wrap) wraps_seen++;
      end
      checks++;
      if (phase !== N'(total % (1 << N))) begin
        failures++;
        $display("k=%0d phase=%0d exp=%0d", k, phase, total % (1 << N));
      end
    end
    checks++;
    if (wraps_seen == 0) begin
      failures++; $display("overflow never seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
