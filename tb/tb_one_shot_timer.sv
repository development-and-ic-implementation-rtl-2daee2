// tb_one_shot_timer: for a set of sampled voltages the pulse length must
// equal R*C*ln(VDD / (V - VTH)) (R = 1 kOhm, C = 500 pF, VDD = 3.3 V,
// VTH = 1.6 V), a higher voltage must give a shorter pulse, and a voltage
// at the threshold must give the clipped maximum length.
`timescale 1ps/1ps
module tb_one_shot_timer;
  logic trig, p;
  real  v;
  int checks = 0, failures = 0;

  one_shot_timer dut (.trigger(trig), .v_sample(v), .pulse_out(p));

  initial begin
    #1_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0, t1, prev;
    real vs [6] = '{1.8, 2.0, 2.4, 2.8, 3.2, 3.3};
    trig = 1'b0; v = 2.0; prev = 1.0e12;
    #1000;
    foreach (vs[i]) begin
      real exp_t;
      v = vs[i];
      trig = 1'b1; t0 = $realtime;
      #100 trig = 1'b0;
      @(negedge p); t1 = $realtime;
      exp_t = 500_000.0 * $ln(3.3 / (v - 1.6));
      checks++;
      if ((t1 - t0) - exp_t > 2.0 || exp_t - (t1 - t0) > 2.0) begin
        failures++; $display("FAIL v=%f pulse %0t exp %f", v, t1 - t0, exp_t);
      end
      checks++;
      if (t1 - t0 >= prev) begin failures++; $display("FAIL not decreasing"); end
      prev = t1 - t0;
      #10000;
    end
    v = 1.6;
    trig = 1'b1; t0 = $realtime; #100 trig = 1'b0;
    @(negedge p); t1 = $realtime;
    checks++;
    if (t1 - t0 != 5_000_000) begin failures++; $display("FAIL clip %0t", t1 - t0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
