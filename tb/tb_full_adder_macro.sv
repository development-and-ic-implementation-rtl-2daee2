// tb_full_adder_macro: exhaustive test of the stand-alone full adder macro.
// All eight operand combinations are applied with the macro enabled and
// compared with the arithmetic sum a + b + cin; with the macro disabled both
// outputs must stay low.
`timescale 1ps/1ps
module tb_full_adder_macro;
  logic en, a, b, c, s, co;
  int checks = 0, failures = 0;

  full_adder_macro dut (.enable(en), .a_in(a), .b_in(b), .carry_in(c), .sum_out(s), .carry_out(co));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int v = 0; v < 8; v++) begin
        int exp_sum;
        en = e[0]; {a, b, c} = v[2:0];
        #10;
        exp_sum = e ? (int'(a) + int'(b) + int'(c)) : 0;
        checks++;
        if ({co, s} != exp_sum[1:0]) begin
          failures++;
          $display("FAIL en=%0d a=%0d b=%0d c=%0d -> %0d%0d", en, a, b, c, co, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
