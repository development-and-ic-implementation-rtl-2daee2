// tb_ring_normalizer: with sel_in = 1 the Wallace tree value passes
// unchanged, with sel_in = 0 it is inverted bit by bit (every value).
`timescale 1ps/1ps
module tb_ring_normalizer;
  logic [6:0] raw, fine;
  logic       sel;
  int checks = 0, failures = 0;

  ring_normalizer #(.F(7)) dut (.raw(raw), .sel_in(sel), .fine(fine));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++) begin
      for (int v = 0; v < 128; v++) begin
        sel = s[0]; raw = v[6:0];
        #1;
        checks++;
        if (fine != (s ? v[6:0] : 7'(127 - v))) begin
          failures++; $display("FAIL sel=%0d raw=%0d fine=%0d", s, v, fine);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
