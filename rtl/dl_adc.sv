// dl_adc: basic ("uncompressed") delay-line time-to-digital converter.
//
// The one-shot pulse runs into a string of N buffers. On its falling edge a
// register of N flip-flops freezes the string, which then holds a
// thermometer code whose length is the pulse duration in cell delays; a
// Wallace tree turns the number of ones into the binary result. With
// N = 2^n - 1 = 1023 cells the result has n = 10 bits and equals
// floor(T_pulse / CELL_PS), saturating at 1023. The line empties by itself
// N cell delays after the pulse, which bounds the sample rate.
//
// Interface: input_pulse from the one-shot timer, enable; sample_ready,
// first and last tap, adc_result. Timing: adc_result and sample_ready are
// valid from the falling edge of input_pulse until its next rising edge.
// From the text: the structure and the 1023 cells for 10 bits. This
// design's choices: the enable gating and the sample_ready flag.
`timescale 1ps/1ps
module dl_adc #(
  parameter  int unsigned N       = dpmp_pkg::DL_CELLS,
  parameter  int unsigned CELL_PS = dpmp_pkg::ADC_CELL_PS,
  localparam int unsigned OW      = $clog2(N + 1)
) (
  input  logic          enable,
  input  logic          input_pulse,
  output logic          sample_ready,
  output logic          pulse_before_delay,
  output logic          pulse_after_delay,
  output logic [OW-1:0] adc_result
);
  logic [N-1:0] tap, tap_q;
  logic         done;

  delay_line #(.N(N), .CELL_PS(CELL_PS)) u_dl (.din(input_pulse & enable), .tap(tap));

  tap_register #(.W(N)) u_taps (.clk_n(input_pulse), .clr(~enable), .d(tap), .q(tap_q));

  wallace_tree #(.N(N)) u_wt (.thermo(tap_q), .count(adc_result));

  always_ff @(negedge input_pulse, negedge enable) begin
    if (!enable) done <= 1'b0;
    else         done <= 1'b1;
  end

  assign sample_ready       = done & ~input_pulse & enable;
  assign pulse_before_delay = tap[0];
  assign pulse_after_delay  = tap[N-1];
endmodule
