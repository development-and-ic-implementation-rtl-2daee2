// ring_dpwm: digital pulse-width modulator that reaches the resolution of
// one delay cell with a short ring oscillator instead of a fast clock.
//
// The switching period is set by ref_clk; a period starts at each falling
// edge of ref_clk. At that edge the new duty value is loaded and the ring is
// stopped for K cell delays (ring_enable is ref_clk's falling edge stretched
// by a K-cell delay line), so every period the ring restarts from the same
// empty state. While it runs, an XOR of tap 0 and tap K/2 gives one rising
// edge per full propagation through the K stages (the XOR frequency doubler,
// which replaces a dual-edge counter) and a counter counts them.
//   * Rough PWM: high from the ring start until the counter passes the MSB
//     field of the value (value / K), i.e. MSB*K + 1 cell delays long.
//   * Fine PWM: the rough pulse runs through a second K-cell line; the LSB
//     field (value mod K) selects how many taps take part: fine is the OR of
//     taps 0..LSB, i.e. the rough pulse stretched by LSB cell delays. (A
//     plain one-tap mux ORed with rough leaves a gap when the rough pulse
//     is a single cell, MSB = 0, so the taps are combined instead.)
//   * dpwm_out = fine: high for (value + 1) cell delays from the ring
//     start. When MSB = 0 neighbouring taps hand over at the same instant;
//     a real gate tree has overlap there, an event simulator may show a
//     zero-width glitch.
// Calibration and limiter: the number of propagations counted in a whole
// period, times K, is the largest value that fits the period (max_value,
// "Max DPWM Value", tracks 1 / f_ref). A value of at least max_value makes
// the output stay high for the whole period; 0 keeps it low. No output is
// produced until one full period has been measured.
//
// Interface: ref_clk, enable, dpwm_value; dpwm_out, new_value_req (high
// while the ring is stopped at the period start: the moment the value is
// taken), max_value, rough and fine PWM for observation. Timing: value and
// max_value change only at the falling edge of ref_clk.
//
// From the text: ring oscillator, counting of full propagations through an
// XOR frequency multiplier, MSB/LSB split into rough and fine PWM, LSB
// selected delay taps, update at the period end, limiter forcing '1', ring reset window as long
// as the line. This design's choices: K = 32, 18-bit value, the period
// starting at the falling edge of ref_clk, the one-cell offset of the output, the
// OR of taps in place of a single-tap mux. A value in the top K codes below
// max_value can end up to K-1 cells after the period end (the ring is stopped
// for K cells at the period start); the pulse is then cut at the next start.
`timescale 1ps/1ps
module ring_dpwm #(
  parameter  int unsigned W       = dpmp_pkg::DPWM_BITS,
  parameter  int unsigned L       = dpmp_pkg::DPWM_FINE_BITS,
  parameter  int unsigned CELL_PS = dpmp_pkg::DPWM_CELL_PS,
  localparam int unsigned K       = 1 << L,
  localparam int unsigned CW      = W - L
) (
  input  logic         ref_clk,
  input  logic         enable,
  input  logic [W-1:0] dpwm_value,
  output logic         dpwm_out,
  output logic         new_value_req,
  output logic [W-1:0] max_value,
  output logic         rough,
  output logic         fine
);
  localparam logic [CW-1:0] CMAX = '1;

  logic [K-1:0]  ref_dly;
  logic          ring_en;
  logic [K-1:0]  tap;
  logic          tick;
  logic [CW-1:0] cnt;
  logic [W-1:0]  value_q;
  logic          cal_q;
  logic          limited;
  logic [K-2:0]  fine_tap;
  logic [K-1:0]  fine_src;
  logic [K-1:0]  fine_mask;

  // Ring reset window: ref_clk low but its K-cell delayed copy still high.
  delay_line #(.N(K), .CELL_PS(CELL_PS)) u_refdly (.din(ref_clk), .tap(ref_dly));
  assign ring_en       = enable & ~(~ref_clk & ref_dly[K-1]);
  assign new_value_req = enable & ~ring_en;

  ring_oscillator #(.K(K), .CELL_PS(CELL_PS)) u_ring (.enable(ring_en), .tap(tap));

  // Frequency doubler: one rising edge per full propagation.
  assign tick = tap[0] ^ tap[K/2];

  always_ff @(posedge tick, negedge ring_en) begin
    if (!ring_en)          cnt <= '0;
    else if (cnt != CMAX)  cnt <= cnt + 1'b1;
  end

  // Period boundary: take the new value and the calibration of the period
  // that just ended (cnt still holds its count at this edge).
  always_ff @(negedge ref_clk, negedge enable) begin
    if (!enable) begin
      value_q   <= '0;
      max_value <= '0;
      cal_q     <= 1'b0;
    end else begin
      value_q   <= dpwm_value;
      max_value <= {cnt, L'(0)};
      cal_q     <= (cnt != '0);
    end
  end

  assign limited = (value_q >= max_value);

  assign rough = ring_en & (value_q != '0) & (cnt <= value_q[W-1:L]);

  delay_line #(.N(K - 1), .CELL_PS(CELL_PS)) u_fine (.din(rough), .tap(fine_tap));
  assign fine_src = {fine_tap, rough};
  // taps 0..LSB take part
  assign fine_mask = {K{1'b1}} >> (K - 1 - int'(value_q[L-1:0]));
  assign fine      = |(fine_src & fine_mask);

  always_comb begin
    if (!enable || !cal_q) dpwm_out = 1'b0;
    else if (limited)      dpwm_out = 1'b1;
    else                   dpwm_out = fine;
  end
endmodule
