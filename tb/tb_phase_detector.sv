// tb_phase_detector: PD-High must be high exactly while the variable pulse
// of the current conversion is high (PD-Low its complement), and a low
// enable must close the window.
`timescale 1ps/1ps
module tb_phase_detector;
  logic v, en, ph, pl;
  int checks = 0, failures = 0;

  phase_detector dut (.variable_pulse(v), .enable(en), .pd_high(ph), .pd_low(pl));

  task automatic chk(logic eh, logic el, string what);
    checks++;
    if (ph !== eh || pl !== ~eh || el !== 1'b0) begin
      failures++; $display("FAIL %s pd_high=%0d pd_low=%0d", what, ph, pl);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    v = 1'b0; en = 1'b0;
    #10 chk(0, 0, "disabled");
    en = 1'b1;
    #10 chk(0, 0, "idle");
    for (int i = 0; i < 20; i++) begin
      automatic int w = 100 + int'($urandom_range(0, 5000));
      v = 1'b1;
      #1 chk(1, 0, "after rise");
      #(w) chk(1, 0, "during pulse");
      v = 1'b0;
      #1 chk(0, 0, "after fall");
      #200 chk(0, 0, "between pulses");
    end
    v = 1'b1; #10 en = 1'b0;
    #1 chk(0, 0, "disable during pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
