// tap_register: the latch register of a delay-line TDC. One D flip-flop per
// delay-line tap; all of them load on the falling edge of the measured pulse,
// freezing how far the pulse travelled (a thermometer code).
//
// The falling-edge clocking follows the text. An active-high asynchronous
// clear (used while the converter is disabled) is this design's addition.
// Timing: q is valid right after the falling edge of clk_n and holds until
// the next one.
`timescale 1ps/1ps
module tap_register #(
  parameter int unsigned W = 32
) (
  input  logic         clk_n,   // measured pulse; captures on its falling edge
  input  logic         clr,     // asynchronous clear, active high
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(negedge clk_n, posedge clr) begin
    if (clr) q <= '0;
    else     q <= d;
  end
endmodule
