// dpmp_chip: the delay-line ADC test chip. Three macros share one die and
// one set of result pins; a two-bit working mode enables exactly one of them:
//   00 shut down   - every macro disabled, shared outputs low
//   01 Window ADC  - window_adc enabled
//   10 Ring ADC    - ring_adc enabled (and gated by its own ADC_Enable pin)
//   11 full adder  - full_adder_macro enabled (and gated by its Enable pin)
// The macros' private pins (the Ring ADC's oscillator and debug pins, the
// Window ADC's pulse inputs, the full adder's operands) are separate ports;
// Sample_ADC_Ready, Pulse_Before_Delay, Pulse_After_Delay and ADC_Result
// appear under the same name for both ADCs in the pin table and are
// therefore multiplexed here by the mode (the Window ADC's 5-bit result is
// zero-extended). The mode table and the pin list follow the text; sharing
// the result pins through a multiplexer is this design's reading of the
// shared pin names. No clock: both ADCs are timed by their input pulses.
`timescale 1ps/1ps
module dpmp_chip #(
  parameter  int unsigned RING_CELL_PS = dpmp_pkg::ADC_CELL_PS,
  parameter  int unsigned WIN_CELL_PS  = dpmp_pkg::WIN_CELL_PS,
  localparam int unsigned RB           = dpmp_pkg::RING_N_BITS,
  localparam int unsigned WB           = dpmp_pkg::WIN_BITS
) (
  input  dpmp_pkg::chip_mode_e mode,
  // Ring ADC pins
  input  logic          external_ring,
  input  logic          external_ring_en,
  input  logic          input_pulse,
  input  logic          adc_enable,
  output logic          reset_msb,
  output logic          edge_0,
  output logic          rising_0,
  output logic          falling_0,
  // Window ADC pins
  input  logic          variable_pulse,
  input  logic          stable_pulse,
  input  logic          external_pulse,
  input  logic          en_external_pulse,
  // Full adder pins
  input  logic          fa_enable,
  input  logic          a_in,
  input  logic          b_in,
  input  logic          carry_in,
  output logic          sum_out,
  output logic          carry_out,
  // Shared result pins
  output logic          sample_adc_ready,
  output logic          pulse_before_delay,
  output logic          pulse_after_delay,
  output logic [RB-1:0] adc_result
);
  import dpmp_pkg::*;

  logic          ring_on, win_on, fa_on;
  logic          r_rdy, r_pbd, r_pad;
  logic [RB-1:0] r_res;
  logic          w_rdy, w_pbd, w_pad;
  logic [WB-1:0] w_res;

  always_comb begin
    ring_on = (mode == MODE_RING_ADC)   & adc_enable;
    win_on  = (mode == MODE_WINDOW_ADC);
    fa_on   = (mode == MODE_FULL_ADDER) & fa_enable;
  end

  ring_adc #(.CELL_PS(RING_CELL_PS)) u_ring (
    .input_pulse(input_pulse), .adc_enable(ring_on),
    .external_ring(external_ring), .external_ring_en(external_ring_en),
    .sample_ready(r_rdy), .pulse_before_delay(r_pbd), .pulse_after_delay(r_pad),
    .reset_msb(reset_msb), .edge_0(edge_0), .rising_0(rising_0), .falling_0(falling_0),
    .adc_result(r_res)
  );

  window_adc #(.CELL_PS(WIN_CELL_PS)) u_win (
    .enable(win_on), .stable_pulse(stable_pulse), .variable_pulse(variable_pulse),
    .external_pulse(external_pulse), .en_external_pulse(en_external_pulse),
    .sample_ready(w_rdy), .pulse_before_delay(w_pbd), .pulse_after_delay(w_pad),
    .adc_result(w_res)
  );

  full_adder_macro u_fa (
    .enable(fa_on), .a_in(a_in), .b_in(b_in), .carry_in(carry_in),
    .sum_out(sum_out), .carry_out(carry_out)
  );

  always_comb begin
    unique case (mode)
      MODE_RING_ADC: begin
        sample_adc_ready   = r_rdy;
        pulse_before_delay = r_pbd;
        pulse_after_delay  = r_pad;
        adc_result         = r_res;
      end
      MODE_WINDOW_ADC: begin
        sample_adc_ready   = w_rdy;
        pulse_before_delay = w_pbd;
        pulse_after_delay  = w_pad;
        adc_result         = RB'(w_res);
      end
      default: begin
        sample_adc_ready   = 1'b0;
        pulse_before_delay = 1'b0;
        pulse_after_delay  = 1'b0;
        adc_result         = '0;
      end
    endcase
  end
endmodule
