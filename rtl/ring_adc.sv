// ring_adc: 10-bit time-to-digital converter built around a short ring
// oscillator (the "compressed" delay-line ADC).
//
// A basic delay-line converter needs 2^n cells for n bits. Here the line is
// closed into a ring of K = 2^(n-m) stages and an m-bit counter counts how
// many times the wave has run all the way round. While input_pulse (the
// one-shot timer output) is high and adc_enable is set, the ring runs; on
// the falling edge of input_pulse
//   * the tap register freezes the K ring taps,
//   * the propagation count (edge_counter, both edges of the last tap) is
//     frozen as the m MSBs,
//   * a Wallace tree counts the ones in the first K-1 captured taps and the
//     normaliser inverts that count when the wave was a wave of zeros (odd
//     propagation), giving the n-m LSBs.
// The result equals floor(T_pulse / CELL_PS); pulses beyond 2^n - 1 cells
// saturate at all ones. While input_pulse is low the ring is stopped and
// empties, and Reset_MSB (reset_msb) holds the counter cleared. Emptying
// takes K cell delays, so consecutive input pulses must be at least K cells
// apart (38.4 ns at the default size).
//
// Interface: the chip pins of the Ring ADC (Input_Pulse, ADC_Enable,
// External_Ring, External_Ring_En, Sample_ADC_Ready, Pulse_Before_Delay,
// Pulse_After_Delay, Reset_MSB, Edge_0, Rising_0, Falling_0, ADC_Result).
// external_ring_en makes the counter count external_ring instead of the
// ring's last tap (test mode; how the pin is used is this design's reading
// of its name). Timing: adc_result and sample_ready are valid from the
// falling edge of input_pulse until its next rising edge; sample_ready is
// low while a conversion runs. There is no clock: the converter is timed by
// the pulse itself.
//
// From the text: K = 2^(n-m) with n-m = 7, n = 10, the dual-edge counter,
// falling-edge capture, the inverting normalisation. This design's choices:
// m = 3 (so that 2^m propagations of 128 cells span the 10-bit range), the
// saturation of the result, sample_ready and the reset scheme.
`timescale 1ps/1ps
module ring_adc #(
  parameter  int unsigned N_BITS   = dpmp_pkg::RING_N_BITS,
  parameter  int unsigned CNT_BITS = dpmp_pkg::RING_CNT_BITS,
  parameter  int unsigned CELL_PS  = dpmp_pkg::ADC_CELL_PS,
  localparam int unsigned F        = N_BITS - CNT_BITS,
  localparam int unsigned K        = 1 << F
) (
  input  logic              input_pulse,
  input  logic              adc_enable,
  input  logic              external_ring,
  input  logic              external_ring_en,
  output logic              sample_ready,
  output logic              pulse_before_delay,
  output logic              pulse_after_delay,
  output logic              reset_msb,
  output logic              edge_0,
  output logic              rising_0,
  output logic              falling_0,
  output logic [N_BITS-1:0] adc_result
);
  logic              run;
  logic [K-1:0]      tap, tap_q;
  logic              cnt_clk;
  logic [CNT_BITS-1:0] cnt;
  logic              cnt_ovf;
  logic [CNT_BITS:0] cnt_q;          // {overflow, count} frozen at capture
  logic [F-1:0]      pc, fine;
  logic              done;

  assign run       = input_pulse & adc_enable;
  assign reset_msb = ~run;

  ring_oscillator #(.K(K), .CELL_PS(CELL_PS)) u_ring (.enable(run), .tap(tap));

  assign cnt_clk = external_ring_en ? external_ring : tap[K-1];

  edge_counter #(.M(CNT_BITS)) u_cnt (
    .clk_src(cnt_clk), .rst(reset_msb), .count(cnt), .overflow(cnt_ovf),
    .rising_0(rising_0), .falling_0(falling_0), .edge_0(edge_0)
  );

  tap_register #(.W(K)) u_taps (
    .clk_n(input_pulse), .clr(~adc_enable), .d(tap), .q(tap_q)
  );

  tap_register #(.W(CNT_BITS + 1)) u_msb (
    .clk_n(input_pulse), .clr(~adc_enable), .d({cnt_ovf, cnt}), .q(cnt_q)
  );

  wallace_tree #(.N(K - 1)) u_wt (.thermo(tap_q[K-2:0]), .count(pc));

  // The value entering the first buffer is the inverse of the last tap.
  ring_normalizer #(.F(F)) u_norm (.raw(pc), .sel_in(~tap_q[K-1]), .fine(fine));

  always_comb begin
    if (cnt_q[CNT_BITS]) adc_result = '1;
    else                 adc_result = {cnt_q[CNT_BITS-1:0], fine};
  end

  always_ff @(negedge input_pulse, negedge adc_enable) begin
    if (!adc_enable) done <= 1'b0;
    else             done <= 1'b1;
  end

  assign sample_ready       = done & ~input_pulse & adc_enable;
  assign pulse_before_delay = tap[0];
  assign pulse_after_delay  = tap[K-1];
endmodule
