// phase_detector: the PD-High / PD-Low flip-flop pair of the Window ADC.
//
// One flip-flop reacts to the rising edge of the variable pulse (PD-High
// side), the other to its falling edge (PD-Low side). Their job is to give
// a window that opens at the rising edge of the variable pulse of the
// current conversion and closes at its falling edge. In the block diagram
// the two flip-flops clear each other once both are set; that asynchronous
// self-reset is a race by construction, so here each flip-flop toggles on
// its edge instead and the window (pd_high) is the XOR of the two: it opens
// on a rising edge and closes on the following falling edge, with no
// combinational loop. pd_low marks the flip-flops' state after a falling
// edge (equal toggles). A low enable clears both flip-flops. Timing: the
// window follows the edges of variable_pulse with zero delay.
`timescale 1ps/1ps
module phase_detector (
  input  logic variable_pulse,
  input  logic enable,
  output logic pd_high,
  output logic pd_low
);
  logic t_rise, t_fall;

  always_ff @(posedge variable_pulse, negedge enable) begin
    if (!enable) t_rise <= 1'b0;
    else         t_rise <= ~t_rise;
  end

  always_ff @(negedge variable_pulse, negedge enable) begin
    if (!enable) t_fall <= 1'b0;
    else         t_fall <= ~t_fall;
  end

  always_comb begin
    pd_high = t_rise ^ t_fall;
    pd_low  = ~pd_high;
  end
endmodule
