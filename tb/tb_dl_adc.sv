// tb_dl_adc: saw-tooth sweep of the basic 1023-cell delay-line ADC at its
// default size. Pulse k lasts k cell delays plus half a cell (300 ps
// cells) for k = 0 .. 1023 and must convert to k; longer pulses must give
// 1023. The result and sample_ready must be valid right at the falling
// edge of the pulse.
`timescale 1ps/1ps
module tb_dl_adc;
  localparam int D = 300, N = 1023;
  logic       en, pulse, rdy, pbd, pad;
  logic [9:0] res;
  int checks = 0, failures = 0;

  dl_adc dut (
    .enable(en), .input_pulse(pulse), .sample_ready(rdy),
    .pulse_before_delay(pbd), .pulse_after_delay(pad), .adc_result(res)
  );

  task automatic convert(int cells, int expected);
    pulse = 1'b1;
    #(D / 2);
    checks++;
    if (rdy !== 1'b0) begin failures++; $display("FAIL ready during conversion"); end
    if (cells > 0) #(cells * D);
    pulse = 1'b0;
    #1;
    checks++;
    if (rdy !== 1'b1 || res !== 10'(expected)) begin
      failures++; $display("FAIL %0d cells -> %0d (ready %0d), expected %0d", cells, res, rdy, expected);
    end
    #(N * D + D);
  endtask

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b1; pulse = 1'b0;
    #10 en = 1'b0;
    #1000 en = 1'b1;
    pulse = 1'b1; #(N * D + 1000); pulse = 1'b0; #(N * D + 1000);
    for (int k = 0; k <= 1023; k++) convert(k, k);
    for (int k = 1024; k < 1200; k += 50) convert(k, 1023);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
