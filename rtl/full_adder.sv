// full_adder: one-bit full adder, the unit cell of the Wallace tree ones
// counter and of the stand-alone full adder macro.
// sum = a ^ b ^ cin, cout = majority(a, b, cin). Purely combinational.
`timescale 1ps/1ps
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  always_comb begin
    sum  = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end
endmodule
