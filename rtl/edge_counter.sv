// edge_counter: counts full ring propagations of the Ring ADC by counting
// both edges of the ring's last tap.
//
// Standard flip-flops count one edge only, so the count is kept in two
// M-bit saturating counters, one clocked on rising and one on falling edges
// of clk_src; their sum is the number of complete propagations. Both are
// cleared asynchronously by rst (the chip's Reset_MSB pin), which is held
// while no conversion runs. overflow flags a sum of 2^M or more, the point
// where the M-bit MSB field of the result can no longer hold the count.
// rising_0, falling_0 and edge_0 are the least significant bits of the
// rising counter, the falling counter and the sum (the chip's debug pins
// Rising_0, Falling_0 and Edge_0; which bit each pin carries is this
// design's reading of the pin names).
`timescale 1ps/1ps
module edge_counter #(
  parameter int unsigned M = 3
) (
  input  logic         clk_src,   // ring last tap or external oscillator
  input  logic         rst,       // asynchronous clear, active high
  output logic [M-1:0] count,
  output logic         overflow,
  output logic         rising_0,
  output logic         falling_0,
  output logic         edge_0
);
  localparam logic [M-1:0] CMAX = '1;

  logic [M-1:0] cnt_rise, cnt_fall;
  logic [M:0]   total;

  always_ff @(posedge clk_src, posedge rst) begin
    if (rst)                   cnt_rise <= '0;
    else if (cnt_rise != CMAX) cnt_rise <= cnt_rise + 1'b1;
  end

  always_ff @(negedge clk_src, posedge rst) begin
    if (rst)                   cnt_fall <= '0;
    else if (cnt_fall != CMAX) cnt_fall <= cnt_fall + 1'b1;
  end

  always_comb begin
    total     = {1'b0, cnt_rise} + {1'b0, cnt_fall};
    count     = total[M-1:0];
    overflow  = total[M];
    rising_0  = cnt_rise[0];
    falling_0 = cnt_fall[0];
    edge_0    = total[0];
  end
endmodule
