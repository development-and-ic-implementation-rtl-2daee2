// full_adder_macro: the stand-alone full adder macro of the ADC test chip,
// selected by working mode 11. Its pins are Enable, A_In, B_In, Carry_In,
// Sum_Out and Carry_Out, as listed in the chip's pin table.
//
// When enabled it adds the three input bits with one full-adder cell; when
// disabled both outputs are held at 0 (the text only says the macro is
// disabled in the other modes; forcing the outputs low is this design's
// choice). Purely combinational, no clock.
`timescale 1ps/1ps
module full_adder_macro (
  input  logic enable,
  input  logic a_in,
  input  logic b_in,
  input  logic carry_in,
  output logic sum_out,
  output logic carry_out
);
  logic s, c;

  full_adder u_fa (.a(a_in), .b(b_in), .cin(carry_in), .sum(s), .cout(c));

  always_comb begin
    sum_out   = enable & s;
    carry_out = enable & c;
  end
endmodule
