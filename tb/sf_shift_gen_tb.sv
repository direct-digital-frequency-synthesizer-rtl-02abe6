// sf_shift_gen_tb: exhaustive check of the shift-value generator over all
// 16-bit residual angles against a loop-based model of the micro-rotation
// rule, then the rotation sequence of the angle 0101100101010001b, whose
// leading-one positions and shift values are known from the reference
// waveforms: M = 14,12,11,8,6,4,0; s = 2,4,5,8,10,12,16;
// 2s+1 = 5,9,11,17,21,25,33; 3s+3 = 9,15,18,27,33,39,51.
module sf_shift_gen_tb;
  import ddfs_pkg::*;
  localparam int unsigned W = 16;

  logic [W-1:0]         z;
  logic                 active;
  logic [$clog2(W)-1:0] msb;
  shift_t               s, s2, s3;
  logic [W-1:0]         z_next;
  int unsigned checks = 0, failures = 0;
  int unsigned quarter_steps = 0;

  sf_shift_gen #(.W(W)) dut (.*);

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [W-1:0] zv);
    int m, es;
    logic [W-1:0] ez;
    m = -1;
    for (int k = W-1; k >= 0; k--)
      if (zv[k] && m < 0) m = k;
    if (m < 0) begin
      es = 0; ez = zv;
    end else if (m == W-1) begin
      es = 2; ez = zv - 16'h4000;
    end else begin
      es = W - m; ez = zv;
      ez[m] = 1'b0;
    end
    z = zv;
    #1;
    checks++;
    if (active !== (m >= 0) || z_next !== ez || s !== shift_t'(es) ||
        (m >= 0 && (s2 !== shift_t'(2*es+1) || s3 !== shift_t'(3*es+3))) ||
        (m >= 0 && msb !== 4'(m))) begin
      failures++;
      $display("z=%h: active=%0d msb=%0d s=%0d s2=%0d s3=%0d zn=%h exp m=%0d s=%0d zn=%h",
               zv, active, msb, s, s2, s3, z_next, m, es, ez);
    end
    if (m == W-1) quarter_steps++;
  endtask

  initial begin
    int exp_m[7]  = '{14, 12, 11, 8, 6, 4, 0};
    int exp_s[7]  = '{2, 4, 5, 8, 10, 12, 16};
    int exp_s2[7] = '{5, 9, 11, 17, 21, 25, 33};
    int exp_s3[7] = '{9, 15, 18, 27, 33, 39, 51};
    logic [W-1:0] zz;

    for (int v = 0; v < (1 << W); v++) check(W'(v));

    zz = 16'b0101_1001_0101_0001;
    for (int k = 0; k < 7; k++) begin
      z = zz;
      #1;
      checks++;
      if (!active || msb !== 4'(exp_m[k]) || s !== shift_t'(exp_s[k]) ||
          s2 !== shift_t'(exp_s2[k]) || s3 !== shift_t'(exp_s3[k])) begin
        failures++;
        $display("seq %0d: msb=%0d s=%0d s2=%0d s3=%0d", k, msb, s, s2, s3);
      end
      zz = z_next;
    end
    z = zz;
    #1;
    checks++;
    if (zz !== '0 || active) begin
      failures++; $display("sequence did not end at zero: %h", zz);
    end
    checks++;
    if (quarter_steps == 0) begin
      failures++; $display("0.25 rad step never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
