// ring_normalizer: output-result normalisation of the Ring ADC.
//
// Every full propagation through the ring inverts all taps, so on odd
// propagations the captured thermometer code is made of zeros following
// ones and its ones count is the complement of the distance travelled.
// The selection logic looks at the value entering the first buffer
// (sel_in): 1 passes the Wallace tree output straight through (path "A"),
// 0 sends it through a row of inverters (path "B"), as in the selection
// table of the normalisation scheme. Purely combinational.
`timescale 1ps/1ps
module ring_normalizer #(
  parameter int unsigned F = 7
) (
  input  logic [F-1:0] raw,      // Wallace tree output
  input  logic         sel_in,   // value entering the first buffer
  output logic [F-1:0] fine
);
  always_comb fine = sel_in ? raw : ~raw;
endmodule
