// ring_oscillator: behavioural model of a gated ring of K delay stages with
// every stage output brought out as a tap.
//
// Stage 0 is the gating stage: while enable is high it inverts the last tap,
// while enable is low it drives 0, so the ring empties to all zeros within
// K stage delays and always restarts from the same state. Stages 1..K-1 are
// buffers. After enable rises, a wave of ones runs through the K taps (one
// full propagation takes K * CELL_PS), then a wave of zeros, and so on: the
// last tap toggles once per full propagation. The ring is a combinational
// loop on purpose. Each stage is a transport delay of CELL_PS and the ring
// powers up empty; in silicon these are standard cells, so the file is a
// simulation model, not synthesizable logic.
// Tool notes: each cell output carries a declaration initial value of 0
// and is then driven by its delayed assignment; that is the power-up state
// of the model, not a conflict. Lint may also see the cell outputs as
// flopped both by the pulse-clocked tap registers and asynchronously,
// which is what a delay line sampled by its own pulse is.
`timescale 1ps/1ps
module ring_oscillator #(
  parameter int unsigned K       = 128,
  parameter int unsigned CELL_PS = 300
) (
  input  logic         enable,
  output logic [K-1:0] tap
);
  for (genvar i = 0; i < K; i++) begin : g_stage
    logic d;
    logic q = 1'b0;
    if (i == 0) begin : g_gate
      assign d = enable & ~tap[K-1];
    end else begin : g_buf
      assign d = tap[i-1];
    end
    always @(d) q <= #(CELL_PS) d;
    assign tap[i] = q;
  end
endmodule
