// ddfs_top: ROM-less direct digital frequency synthesizer built around a
// scale-free micro-rotation CORDIC. Produces sine and cosine samples whose
// frequency is set by the frequency control word (FCW).
//
// Data path, one output sample per SAMPLE_CYCLES clocks:
//   phase_accumulator -> octant_fold -> sf_cordic -> octant_unfold -> outputs
// A sample timer issues a tick every SAMPLE_CYCLES clocks. On a tick the
// CORDIC starts on the folded current phase (its octant is kept for the
// output stage) and the accumulator advances by FCW. The same tick loads
// the signed sine/cosine of the previous conversion into sin_out/cos_out
// and pulses sample_valid. Output frequency: f_clk/SAMPLE_CYCLES * FCW/2^N.
//
// SAMPLE_CYCLES defaults to the CORDIC's worst-case period (W+3), so the
// sample rate is constant whatever the angle; an assertion checks that the
// CORDIC is always ready on a tick. The phase taken at one tick appears on
// the outputs at the next tick, SAMPLE_CYCLES clocks later; sample_valid
// is high for the clock in which new samples appear. The first tick after reset gives no
// sample. cordic_done is not needed: a result is always complete by the
// next tick. The DAC and low-pass
// filter that follow in the published system are analog; sin_out/cos_out
// with sample_valid are their digital inputs.
//
// Following the published design: FCW and accumulator of equal width N,
// 8-bit FCW, 16-bit CORDIC, no lookup table. This design's own choices: the
// fixed sample timer, octant folding details, signed output format.
module ddfs_top
  import ddfs_pkg::*;
#(
  parameter int unsigned N             = 8,    // FCW / accumulator width
  parameter int unsigned W             = 16,   // CORDIC data width
  parameter int unsigned SAMPLE_CYCLES = cordic_period(W)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0]        fcw,          // frequency control word
  output logic signed [W-1:0] sin_out,      // to the sine DAC
  output logic signed [W-1:0] cos_out,      // to the cosine DAC
  output logic                sample_valid, // one-cycle pulse per sample
  output logic [N-1:0]        phase,        // accumulator phase
  output logic                phase_wrap    // accumulator overflowed on
                                            // the last tick
);

  localparam int unsigned TW = $clog2(SAMPLE_CYCLES);

  logic [TW-1:0] timer;
  logic          tick;
  octant_t       oct_now, oct_busy;
  logic [W-1:0]  theta;
  logic          cordic_ready, cordic_done;
  logic          primed;
  logic [W-1:0]  c_q, s_q;
  logic signed [W-1:0] sin_d, cos_d;

  // Sample timer: tick every SAMPLE_CYCLES clocks.
  always_ff @(posedge clk) begin
    if (!rst_n)
      timer <= '0;
    else if (timer == TW'(SAMPLE_CYCLES - 1))
      timer <= '0;
    else
      timer <= timer + 1'b1;
  end
  assign tick = (timer == '0) && rst_n;

  phase_accumulator #(.N(N)) u_acc (
    .clk(clk), .rst_n(rst_n), .step(tick), .fcw(fcw),
    .phase(phase), .wrap(phase_wrap)
  );

  octant_fold #(.P(N), .W(W)) u_fold (
    .phase(phase), .octant(oct_now), .theta(theta)
  );

  sf_cordic #(.W(W)) u_cordic (
    .clk(clk), .rst_n(rst_n), .start(tick), .theta(theta),
    .ready(cordic_ready), .done(cordic_done), .cos_out(c_q), .sin_out(s_q)
  );

  // Octant of the conversion in flight; `primed` once a conversion exists.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      oct_busy <= '0;
      primed   <= 1'b0;
    end else if (tick) begin
      oct_busy <= oct_now;
      primed   <= 1'b1;
    end
  end

  octant_unfold #(.W(W)) u_unfold (
    .octant(oct_busy), .c(c_q), .s(s_q), .sin_out(sin_d), .cos_out(cos_d)
  );

  // Output register, loaded on every tick with the conversion finished
  // during the sample period that the tick ends, so the DAC sees a constant
  // sample rate whatever the number of micro-rotations.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sin_out      <= '0;
      cos_out      <= '0;
      sample_valid <= 1'b0;
    end else begin
      sample_valid <= tick && primed;
      if (tick && primed) begin
        sin_out <= sin_d;
        cos_out <= cos_d;
      end
    end
  end

  // The sample period must cover the CORDIC's worst-case latency.
  a_cordic_ready: assert property (@(posedge clk) disable iff (!rst_n)
    tick |-> cordic_ready);

endmodule
