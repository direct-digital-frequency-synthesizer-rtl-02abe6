// phase_accumulator: the frequency-setting part of the synthesizer.
//
// An N-bit register that adds the frequency control word (FCW) to itself each
// time `step` is high and wraps around modulo 2^N, so the phase advances by
// FCW/2^N of a turn per output sample and the output frequency is
// f_sample * FCW / 2^N: directly proportional to the FCW. `wrap` is the
// adder's carry out (the accumulator overflow), registered together with the
// new phase, so it is high for the one sample in which a full turn completed.
//
// Timing: `phase` and `wrap` change on the rising clock edge at which `step`
// is sampled high. Reset (active low, synchronous) clears both.
// The structure (adder plus z^-1 register, FCW and accumulator of the same
// width N) follows the published block diagram; the step enable and the
// registered carry are this design's own choices.
module phase_accumulator #(
  parameter int unsigned N = 8   // width of FCW and accumulator
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,     // advance the phase by one sample
  input  logic [N-1:0] fcw,      // frequency control word
  output logic [N-1:0] phase,    // accumulated phase, fraction of a turn
  output logic         wrap      // carry out of the last addition
);

  logic [N:0] sum;
  assign sum = {1'b0, phase} + {1'b0, fcw};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= '0;
      wrap  <= 1'b0;
    end else if (step) begin
      phase <= sum[N-1:0];
      wrap  <= sum[N];
    end
  end

endmodule
