// seven_segment_display: shows a binary ADC result as decimal digits on
// seven-segment displays (the read-out of the FPGA prototype of the ring
// ADC).
//
// How it works: the binary value is turned into binary-coded decimal with
// the shift-and-add-3 method (double dabble), all in combinational logic:
// the value is shifted in one bit at a time and every BCD digit that has
// reached 5 or more gets 3 added before the next shift. Each BCD digit then
// goes through a 16-entry decoder to its segment pattern.
//
// Interface: value (W bits); segments, one 7-bit pattern per digit, digit 0
// the units. Segment order {g, f, e, d, c, b, a}, a lit segment is 1.
// Purely combinational, no clock.
//
// From the text: a binary-to-seven-segment converter for the ADC result.
// This design's choices: decimal display, digit count from the width,
// segment order and polarity, blanking of the codes above 9.
`timescale 1ps/1ps
module seven_segment_display #(
  parameter  int unsigned W      = dpmp_pkg::RING_N_BITS,
  localparam int unsigned DIGITS = (W * 30103 + 99_999) / 100_000 + 1   // > W*log10(2)
) (
  input  logic [W-1:0]         value,
  output logic [DIGITS-1:0][6:0] segments
);
  logic [4*DIGITS-1:0] bcd;

  always_comb begin
    bcd = '0;
    for (int i = W - 1; i >= 0; i--) begin
      for (int dg = 0; dg < DIGITS; dg++)
        if (bcd[4*dg +: 4] >= 4'd5) bcd[4*dg +: 4] = bcd[4*dg +: 4] + 4'd3;
      bcd = {bcd[4*DIGITS-2:0], value[i]};
    end
  end

  for (genvar dg = 0; dg < DIGITS; dg++) begin : g_digit
    always_comb begin
      unique case (bcd[4*dg +: 4])
        4'd0:    segments[dg] = 7'b011_1111;
        4'd1:    segments[dg] = 7'b000_0110;
        4'd2:    segments[dg] = 7'b101_1011;
        4'd3:    segments[dg] = 7'b100_1111;
        4'd4:    segments[dg] = 7'b110_0110;
        4'd5:    segments[dg] = 7'b110_1101;
        4'd6:    segments[dg] = 7'b111_1101;
        4'd7:    segments[dg] = 7'b000_0111;
        4'd8:    segments[dg] = 7'b111_1111;
        4'd9:    segments[dg] = 7'b110_1111;
        default: segments[dg] = 7'b000_0000;
      endcase
    end
  end
endmodule
