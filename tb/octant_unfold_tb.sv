// octant_unfold_tb: checks the octant symmetry mapping. For every octant
// and random first-octant angles t it feeds c = round(cos t), s = round(sin t)
// (1.0 = 32768) and expects sin/cos of the full-turn angle
//   phi = o*pi/4 + (o odd ? pi/4 - t : t)
// within 1 LSB, computed in floating point. Also checks the saturation of
// +1.0 to 32767 and the exact -1.0.
module octant_unfold_tb;
  import ddfs_pkg::*;
  localparam int unsigned W = 16;
  localparam real PI = 3.14159265358979323846;

  octant_t             octant;
  logic [W-1:0]        c, s;
  logic signed [W-1:0] sin_out, cos_out;
  int unsigned checks = 0, failures = 0;

  octant_unfold #(.W(W)) dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(int es, int ec);
    checks++;
    if (sin_out !== W'(es) || cos_out !== W'(ec)) begin
      failures++;
      $display("octant=%0d c=%0d s=%0d: sin=%0d cos=%0d exp %0d %0d",
               octant, c, s, sin_out, cos_out, es, ec);
    end
  endtask

  initial begin
    for (int o = 0; o < 8; o++) begin
      for (int k = 0; k < 500; k++) begin
        real t, phi, es, ec;
        t   = ($urandom_range(1, 9999) / 10000.0) * PI / 4.0;
        octant = 3'(o);
        c = W'($rtoi($cos(t) * 32768.0 + 0.5));
        s = W'($rtoi($sin(t) * 32768.0 + 0.5));
        #1;
        phi = o * PI / 4.0 + ((o % 2 == 1) ? (PI / 4.0 - t) : t);
        es = $sin(phi) * 32768.0;
        ec = $cos(phi) * 32768.0;
        checks++;
        if ((es - sin_out) > 1.01 || (sin_out - es) > 1.01 ||
            (ec - cos_out) > 1.01 || (cos_out - ec) > 1.01) begin
          failures++;
          $display("o=%0d t=%f: sin=%0d cos=%0d ideal %f %f", o, t, sin_out,
                   cos_out, es, ec);
        end
      end
    end
    // theta = 0 in each octant: (c, s) = (1.0, 0)
    c = 16'h8000; s = 16'h0000;
    octant = 3'd0; #1 expect_eq(0, 32767);
    octant = 3'd1; #1 expect_eq(32767, 0);
    octant = 3'd2; #1 expect_eq(32767, 0);
    octant = 3'd3; #1 expect_eq(0, -32768);
    octant = 3'd4; #1 expect_eq(0, -32768);
    octant = 3'd5; #1 expect_eq(-32768, 0);
    octant = 3'd6; #1 expect_eq(-32768, 0);
    octant = 3'd7; #1 expect_eq(0, 32767);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
