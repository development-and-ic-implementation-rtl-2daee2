// wallace_tree: thermometer-to-binary converter that counts the ones in an
// N-bit word with a tree of full adders.
//
// The input is padded with zeros to P = 2^LV bits. Level 0 holds P one-bit
// counts; every following level adds neighbouring pairs of counts with a
// ripple row of full adders, so level l holds P / 2^l counts of l + 1 bits,
// and the single count of level LV is the number of ones. Because the
// result is a population count and not the position of the first 0, a
// bubble (an isolated wrong bit) in the thermometer code moves the result
// by one count only.
//
// The text specifies a full-adder Wallace tree and its input and output
// widths; the arrangement of the adder levels is this design's own. Purely
// combinational; the depth is about LV * (LV + 1) / 2 full-adder delays.
`timescale 1ps/1ps
module wallace_tree #(
  parameter  int unsigned N  = 32,
  localparam int unsigned OW = $clog2(N + 1),
  localparam int unsigned LV = (N < 2) ? 1 : $clog2(N),
  localparam int unsigned P  = 1 << LV
) (
  input  logic [N-1:0]  thermo,
  output logic [OW-1:0] count
);

  for (genvar l = 0; l <= LV; l++) begin : g_lvl
    // P >> l counts of l + 1 bits each.
    logic [l:0] vals [P >> l];

    if (l == 0) begin : g_in
      for (genvar j = 0; j < P; j++) begin : g_bit
        if (j < N) begin : g_used
          assign vals[j] = thermo[j];
        end else begin : g_pad
          assign vals[j] = 1'b0;
        end
      end
    end else begin : g_add
      for (genvar j = 0; j < (P >> l); j++) begin : g_pair
        logic [l:0]   c;
        logic [l-1:0] s;
        assign c[0] = 1'b0;
        for (genvar b = 0; b < l; b++) begin : g_fa
          full_adder u_fa (
            .a(g_lvl[l-1].vals[2*j][b]), .b(g_lvl[l-1].vals[2*j+1][b]), .cin(c[b]),
            .sum(s[b]), .cout(c[b+1])
          );
        end
        assign vals[j] = {c[l], s};
      end
    end
  end

  // The final count has LV + 1 bits; OW of them can be non-zero.
  assign count = g_lvl[LV].vals[0][OW-1:0];

endmodule
