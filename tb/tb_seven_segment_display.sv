// tb_seven_segment_display: exhaustive test of the binary-to-seven-segment
// converter at 10 bits. For every value 0..1023 the four digit patterns are
// decoded back to decimal digits with a table written from the segment
// drawing (independent of the decoder's own table) and the number they show
// must equal the input value.
`timescale 1ps/1ps
module tb_seven_segment_display;
  localparam int W = 10, DIGITS = 4;
  logic [W-1:0]                  value;
  logic [DIGITS-1:0][6:0]        seg;
  int checks = 0, failures = 0;

  seven_segment_display #(.W(W)) dut (.value(value), .segments(seg));

  // segments {g,f,e,d,c,b,a} -> digit, -1 for an unknown pattern
  function automatic int shown(logic [6:0] s);
    case (s)
      7'h3F: return 0;  7'h06: return 1;  7'h5B: return 2;  7'h4F: return 3;
      7'h66: return 4;  7'h6D: return 5;  7'h7D: return 6;  7'h07: return 7;
      7'h7F: return 8;  7'h6F: return 9;
      default: return -1;
    endcase
  endfunction

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << W); v++) begin
      automatic int num = 0;
      automatic bit bad = 1'b0;
      value = W'(v);
      #10;
      for (int dg = DIGITS - 1; dg >= 0; dg--) begin
        if (shown(seg[dg]) < 0) bad = 1'b1;
        num = num * 10 + shown(seg[dg]);
      end
      checks++;
      if (bad || num != v) begin
        failures++;
        $display("FAIL value %0d shows %h %h %h %h", v, seg[3], seg[2], seg[1], seg[0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
