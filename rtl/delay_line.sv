// delay_line: behavioural model of a tapped string of N standard-cell
// buffers, each with a propagation delay of CELL_PS picoseconds.
//
// tap[i] is the input delayed by (i+1) cell delays, so a pulse entering the
// line fills the taps like a thermometer: t ps after its rising edge the
// first floor(t / CELL_PS) taps are high. Each cell is a transport delay
// (pulses shorter than one cell still travel), and the line powers up
// empty. In silicon the line is a chain of buffer cells kept from being
// optimised away; the delays here stand in for the cells' propagation
// times, which the design relies on, so this file is a simulation model and
// not synthesizable logic. The cell delay is a fixed value (no process,
// voltage or temperature spread).
// Tool notes: each cell output carries a declaration initial value of 0
// and is then driven by its delayed assignment; that is the power-up state
// of the model, not a conflict. Lint may also see the cell outputs as
// flopped both by the pulse-clocked tap registers and asynchronously,
// which is what a delay line sampled by its own pulse is.
`timescale 1ps/1ps
module delay_line #(
  parameter int unsigned N       = 32,
  parameter int unsigned CELL_PS = 300
) (
  input  logic         din,
  output logic [N-1:0] tap
);
  for (genvar i = 0; i < N; i++) begin : g_cell
    logic d;
    logic q = 1'b0;
    if (i == 0) begin : g_first
      assign d = din;
    end else begin : g_next
      assign d = tap[i-1];
    end
    always @(d) q <= #(CELL_PS) d;
    assign tap[i] = q;
  end
endmodule
