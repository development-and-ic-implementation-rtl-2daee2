// dpm_platform: the all-digital building blocks of a digital power-supply
// controller, side by side.
//   * chip_*: the ADC test chip (dpmp_chip) with its Ring ADC, Window ADC
//     and full adder macros and the two-bit working mode.
//   * dl_*:   the basic 1023-cell delay-line ADC (dl_adc), the straight-
//     forward 10-bit converter the Ring ADC is compared with and the one
//     used as the voltage sensor of the current-mode controller.
//   * dpwm_*: the ring-oscillator DPWM (ring_dpwm).
//   * chip_segments: the chip result as four decimal seven-segment digits
//     (seven_segment_display), the read-out of the prototype board.
// Each part keeps its own pins. The analog one-shot timers that turn the
// sensed voltages into pulses sit outside (one_shot_timer models them), and
// so do the control laws that would close the loop between ADC and DPWM.
// All timing is asynchronous to any system clock: the ADCs are timed by
// their input pulses, the DPWM by its reference clock. Interface: plain
// signals only; chip_mode is the 2-bit code of dpmp_pkg::chip_mode_e.
//
// From the source: the three designs and their pins. This design's choice:
// placing them in one top with prefixed pin names, and the display on the
// chip result pins.
`timescale 1ps/1ps
module dpm_platform (
  // ADC test chip
  input  logic [1:0]                             chip_mode,
  input  logic                                   chip_external_ring,
  input  logic                                   chip_external_ring_en,
  input  logic                                   chip_input_pulse,
  input  logic                                   chip_adc_enable,
  output logic                                   chip_reset_msb,
  output logic                                   chip_edge_0,
  output logic                                   chip_rising_0,
  output logic                                   chip_falling_0,
  input  logic                                   chip_variable_pulse,
  input  logic                                   chip_stable_pulse,
  input  logic                                   chip_external_pulse,
  input  logic                                   chip_en_external_pulse,
  input  logic                                   chip_fa_enable,
  input  logic                                   chip_a_in,
  input  logic                                   chip_b_in,
  input  logic                                   chip_carry_in,
  output logic                                   chip_sum_out,
  output logic                                   chip_carry_out,
  output logic                                   chip_sample_adc_ready,
  output logic                                   chip_pulse_before_delay,
  output logic                                   chip_pulse_after_delay,
  output logic [dpmp_pkg::RING_N_BITS-1:0]       chip_adc_result,
  output logic [3:0][6:0]                        chip_segments,
  // Basic delay-line ADC
  input  logic                                   dl_enable,
  input  logic                                   dl_input_pulse,
  output logic                                   dl_sample_ready,
  output logic                                   dl_pulse_before_delay,
  output logic                                   dl_pulse_after_delay,
  output logic [$clog2(dpmp_pkg::DL_CELLS+1)-1:0] dl_adc_result,
  // Ring-oscillator DPWM
  input  logic                                   dpwm_ref_clk,
  input  logic                                   dpwm_enable,
  input  logic [dpmp_pkg::DPWM_BITS-1:0]         dpwm_value,
  output logic                                   dpwm_out,
  output logic                                   dpwm_new_value_req,
  output logic [dpmp_pkg::DPWM_BITS-1:0]         dpwm_max_value,
  output logic                                   dpwm_rough,
  output logic                                   dpwm_fine
);
  dpmp_chip u_chip (
    .mode(dpmp_pkg::chip_mode_e'(chip_mode)),
    .external_ring(chip_external_ring), .external_ring_en(chip_external_ring_en),
    .input_pulse(chip_input_pulse), .adc_enable(chip_adc_enable),
    .reset_msb(chip_reset_msb), .edge_0(chip_edge_0),
    .rising_0(chip_rising_0), .falling_0(chip_falling_0),
    .variable_pulse(chip_variable_pulse), .stable_pulse(chip_stable_pulse),
    .external_pulse(chip_external_pulse), .en_external_pulse(chip_en_external_pulse),
    .fa_enable(chip_fa_enable), .a_in(chip_a_in), .b_in(chip_b_in),
    .carry_in(chip_carry_in), .sum_out(chip_sum_out), .carry_out(chip_carry_out),
    .sample_adc_ready(chip_sample_adc_ready),
    .pulse_before_delay(chip_pulse_before_delay), .pulse_after_delay(chip_pulse_after_delay),
    .adc_result(chip_adc_result)
  );

  // decimal read-out of the chip result
  seven_segment_display #(.W(dpmp_pkg::RING_N_BITS)) u_display (
    .value(chip_adc_result), .segments(chip_segments)
  );

  dl_adc u_dl (
    .enable(dl_enable), .input_pulse(dl_input_pulse), .sample_ready(dl_sample_ready),
    .pulse_before_delay(dl_pulse_before_delay), .pulse_after_delay(dl_pulse_after_delay),
    .adc_result(dl_adc_result)
  );

  ring_dpwm u_dpwm (
    .ref_clk(dpwm_ref_clk), .enable(dpwm_enable), .dpwm_value(dpwm_value),
    .dpwm_out(dpwm_out), .new_value_req(dpwm_new_value_req),
    .max_value(dpwm_max_value), .rough(dpwm_rough), .fine(dpwm_fine)
  );
endmodule
