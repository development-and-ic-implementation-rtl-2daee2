// window_adc: 5-bit time-to-digital converter that measures a voltage as the
// difference between two one-shot pulses around a bias point.
//
// Two one-shot timers fire together: the stable pulse (timer biased at the
// operating point) and the variable pulse (timer biased by the sensed
// voltage). The phase detector keeps PD-High set for the length of the
// variable pulse; the error window is "stable pulse over and variable pulse
// still high", i.e. how much longer the variable pulse lasts. The window
// runs into a CELLS-long buffer string; when the conversion ends (falling
// edge of stable_pulse | PD-High) the tap register freezes the string and a
// Wallace tree counts the cells the window travelled. A variable pulse
// shorter than the stable one gives 0, a window of CELLS-1 cells or more
// saturates at 2^BITS - 1. With SIGNED_RESULT = 1 the result is offset by
// half the range and read as two's complement (bias point = 0), otherwise
// it is unsigned (bias point = half scale when the stable pulse is set half
// a window short).
//
// en_external_pulse replaces the error window by external_pulse (the chip's
// artificial-pulse test input). Interface: the Window ADC chip pins plus the
// mode enable. Timing: adc_result and sample_ready are valid from the end of
// the conversion until the next stable or variable pulse starts.
//
// From the text: the 32-bit-in / 5-bit-out Wallace tree, the PD-High/PD-Low
// detector, the pins, signed and unsigned readings, 0..31 range. This
// design's choices: the capture event, the saturation, the signed offset.
`timescale 1ps/1ps
module window_adc #(
  parameter  int unsigned CELLS         = dpmp_pkg::WIN_CELLS,
  parameter  int unsigned BITS          = dpmp_pkg::WIN_BITS,
  parameter  int unsigned CELL_PS       = dpmp_pkg::WIN_CELL_PS,
  parameter  bit          SIGNED_RESULT = 1'b0,
  localparam int unsigned CW            = $clog2(CELLS + 1)
) (
  input  logic            enable,
  input  logic            stable_pulse,
  input  logic            variable_pulse,
  input  logic            external_pulse,
  input  logic            en_external_pulse,
  output logic            sample_ready,
  output logic            pulse_before_delay,
  output logic            pulse_after_delay,
  output logic [BITS-1:0] adc_result
);
  localparam logic [CW-1:0] SAT = CW'((1 << BITS) - 1);

  logic             pd_high, pd_low;
  logic             err, dl_in, conv;
  logic [CELLS-1:0] tap, tap_q;
  logic [CW-1:0]    cnt;
  logic [BITS-1:0]  ucode;
  logic             done;

  phase_detector u_pd (
    .variable_pulse(variable_pulse), .enable(enable),
    .pd_high(pd_high), .pd_low(pd_low)
  );

  assign err   = enable & ~stable_pulse & pd_high;
  assign dl_in = en_external_pulse ? (enable & external_pulse) : err;
  assign conv  = en_external_pulse ? external_pulse : (stable_pulse | pd_high);

  delay_line #(.N(CELLS), .CELL_PS(CELL_PS)) u_dl (.din(dl_in), .tap(tap));

  tap_register #(.W(CELLS)) u_taps (.clk_n(conv), .clr(~enable), .d(tap), .q(tap_q));

  wallace_tree #(.N(CELLS)) u_wt (.thermo(tap_q), .count(cnt));

  always_comb begin
    ucode = (cnt > SAT) ? SAT[BITS-1:0] : cnt[BITS-1:0];
    if (SIGNED_RESULT) adc_result = {~ucode[BITS-1], ucode[BITS-2:0]};
    else               adc_result = ucode;
  end

  always_ff @(negedge conv, negedge enable) begin
    if (!enable) done <= 1'b0;
    else         done <= 1'b1;
  end

  assign sample_ready       = done & ~conv & enable;
  assign pulse_before_delay = dl_in;
  assign pulse_after_delay  = tap[CELLS-1];
endmodule
