// tb_edge_counter: drives a number of full clock periods and half periods
// into the dual-edge counter and checks that count equals the number of
// edges seen, that overflow rises at 2^M edges, that the LSB debug outputs
// follow the rising, falling and total counts, and that rst clears it.
`timescale 1ps/1ps
module tb_edge_counter;
  localparam int M = 3;
  logic         clk, rst;
  logic [M-1:0] count;
  logic         ovf, r0, f0, e0;
  int checks = 0, failures = 0;

  edge_counter #(.M(M)) dut (
    .clk_src(clk), .rst(rst), .count(count), .overflow(ovf),
    .rising_0(r0), .falling_0(f0), .edge_0(e0)
  );

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 1'b0; rst = 1'b1;
    for (int n = 0; n <= 12; n++) begin
      int exp_tot, rises, falls;
      clk = 1'b0; rst = 1'b1; #10; rst = 1'b0; #10;
      for (int e = 0; e < n; e++) begin
        clk = ~clk; #10;
      end
      rises   = (n + 1) / 2;
      falls   = n / 2;
      if (rises > 7) rises = 7;
      if (falls > 7) falls = 7;
      exp_tot = rises + falls;
      checks++;
      if ({ovf, count} != 4'(exp_tot)) begin
        failures++; $display("FAIL n=%0d got ovf=%0d cnt=%0d exp %0d", n, ovf, count, exp_tot);
      end
      checks++;
      if (r0 != rises[0] || f0 != falls[0] || e0 != exp_tot[0]) begin
        failures++; $display("FAIL n=%0d debug bits %b%b%b", n, r0, f0, e0);
      end
    end
    rst = 1'b1; #1;
    checks++;
    if (count != 0 || ovf) begin failures++; $display("FAIL reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
