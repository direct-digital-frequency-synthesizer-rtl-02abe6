// sf_cordic: iterative scale-free micro-rotation CORDIC in rotation mode.
// Computes cos(theta) and sin(theta) for an angle theta in radians.
//
// On `start` (accepted while `ready`) the vector register is loaded with
// (1.0, 0) and the residual angle register with theta. Each following clock
// one micro-rotation is applied: sf_shift_gen picks the most significant set
// bit of the residual (or a 0.25 rad step when the 0.5 rad bit is set) and
// sf_rotator turns (x, y) by that angle using shifts and add/subtract only.
// All rotations are anticlockwise, so no direction bit is needed. When the
// residual is zero the vector is copied to cos_out/sin_out and `done`
// pulses for one cycle.
//
// Timing: a start sampled at edge 0 gives done (and new outputs) after edge
// n+1, where n is the number of micro-rotations: the number of set bits of
// theta, plus one or two for angles of 0.5 rad and above. `ready` returns
// together with done, so starts can follow every n+2 cycles; the worst case
// over all W-bit angles is W+3 cycles (ddfs_pkg::cordic_period).
// Outputs hold their value until the next done.
//
// Formats: theta unsigned with W fraction bits (so theta < 1 rad; results
// are most accurate below pi/4); cos_out, sin_out unsigned with
// 1.0 = 2^(W-1). The iterative structure, the micro-rotation rule and the
// start vector follow the published design; the handshake is this design's.
module sf_cordic
  import ddfs_pkg::*;
#(
  parameter int unsigned W = 16   // data width
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,     // begin a conversion (when ready)
  input  logic [W-1:0] theta,     // angle, radians, W fraction bits
  output logic         ready,     // idle, start will be accepted
  output logic         done,      // one-cycle pulse: outputs updated
  output logic [W-1:0] cos_out,
  output logic [W-1:0] sin_out
);

  typedef enum logic {IDLE, ROTATE} state_t;
  state_t state;

  logic [W-1:0] x, y, z;
  logic [W-1:0] x_nx, y_nx, z_nx;
  logic         active;
  shift_t       s, s2, s3;
  logic [$clog2(W)-1:0] msb;

  sf_shift_gen #(.W(W)) u_shift (
    .z(z), .active(active), .msb(msb), .s(s), .s2(s2), .s3(s3), .z_next(z_nx)
  );

  sf_rotator #(.W(W)) u_rot (
    .x(x), .y(y), .s(s), .s2(s2), .s3(s3), .x_next(x_nx), .y_next(y_nx)
  );

  assign ready = (state == IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= IDLE;
      x       <= '0;
      y       <= '0;
      z       <= '0;
      done    <= 1'b0;
      cos_out <= '0;
      sin_out <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          x     <= W'(1) << (W-1);
          y     <= '0;
          z     <= theta;
          state <= ROTATE;
        end
        ROTATE: if (active) begin
          x <= x_nx;
          y <= y_nx;
          z <= z_nx;
        end else begin
          cos_out <= x;
          sin_out <= y;
          done    <= 1'b1;
          state   <= IDLE;
        end
      endcase
    end
  end

  // The residual angle only ever decreases while rotating.
  a_z_decreases: assert property (@(posedge clk) disable iff (!rst_n)
    (state == ROTATE && active) |=> (z < $past(z)));

endmodule
