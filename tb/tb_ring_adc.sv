// tb_ring_adc: sweeps the Ring ADC over its whole range like a saw tooth.
// Pulse k lasts k cell delays plus half a cell (300 ps cells), for
// k = 0 .. 1023; the result must be k. Longer pulses must saturate at 1023.
// Also checked: sample_ready is low during and high right after each
// conversion (the result is valid at the falling edge of the pulse, zero
// latency), Reset_MSB is high between conversions, the odd-propagation
// inversion and the counter overflow both happen, and with the external
// oscillator selected the MSBs count its edges instead of ring turns.
`timescale 1ps/1ps
module tb_ring_adc;
  localparam int D = 300, K = 128;
  logic       pulse, en, ext, ext_en;
  logic       rdy, pbd, pad, rmsb, e0, r0, f0;
  logic [9:0] res;
  int checks = 0, failures = 0;
  int n_odd = 0, n_sat = 0;

  ring_adc dut (
    .input_pulse(pulse), .adc_enable(en), .external_ring(ext), .external_ring_en(ext_en),
    .sample_ready(rdy), .pulse_before_delay(pbd), .pulse_after_delay(pad),
    .reset_msb(rmsb), .edge_0(e0), .rising_0(r0), .falling_0(f0), .adc_result(res)
  );

  task automatic convert(int cells, int expected, string what);
    pulse = 1'b1;
    #(D / 2);
    checks++;
    if (rdy !== 1'b0 || rmsb !== 1'b0) begin
      failures++; $display("FAIL %s: ready/reset high during conversion", what);
    end
    if (cells > 0) #(cells * D);
    pulse = 1'b0;
    #1;
    checks++;
    if (rdy !== 1'b1 || rmsb !== 1'b1) begin
      failures++; $display("FAIL %s: ready=%0d reset_msb=%0d after %0d cells at %0t", what, rdy, rmsb, cells, $time);
    end
    checks++;
    if (res !== 10'(expected)) begin
      failures++; $display("FAIL %s: %0d cells -> %0d, expected %0d", what, cells, res, expected);
    end
    #(K * D + D);   // let the ring empty
  endtask

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pulse = 1'b0; en = 1'b1; ext = 1'b0; ext_en = 1'b0;
    #10 en = 1'b0;
    #1000 en = 1'b1;
    // warm-up run so that every ring stage has switched once
    pulse = 1'b1; #(3 * K * D); pulse = 1'b0; #(2 * K * D);
    for (int k = 0; k < 1024; k++) begin
      convert(k, k, "sweep");
      if (((k / K) % 2) == 1) n_odd++;
    end
    for (int k = 1024; k < 1300; k += 37) begin
      convert(k, 1023, "saturation");
      n_sat++;
    end
    // external oscillator: 5 edges during the pulse -> MSB field 5
    ext_en = 1'b1;
    fork
      convert(200, 5 * K + 200 % K, "external ring");
      begin
        #(D * 10);
        repeat (5) begin ext = ~ext; #(D * 20); end
      end
    join
    ext_en = 1'b0; ext = 1'b0;
    // disabled: no ready flag
    en = 1'b0;
    pulse = 1'b1; #(50 * D); pulse = 1'b0; #1;
    checks++;
    if (rdy !== 1'b0) begin failures++; $display("FAIL ready while disabled"); end
    checks++;
    if (n_odd == 0 || n_sat == 0) begin failures++; $display("FAIL mechanism not exercised"); end
    $display("odd-propagation results=%0d saturated results=%0d", n_odd, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
