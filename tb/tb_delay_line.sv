// tb_delay_line: a pulse entering a 64-cell line of 300 ps cells. At
// random times the taps must form a thermometer code whose length is the
// elapsed time in whole cell delays, and a pulse must leave the line
// unchanged after 64 cell delays.
`timescale 1ps/1ps
module tb_delay_line;
  localparam int N = 64, D = 300;
  logic         din;
  logic [N-1:0] tap;
  int checks = 0, failures = 0;

  delay_line #(.N(N), .CELL_PS(D)) dut (.din(din), .tap(tap));

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 1'b1; #(N * D + 100);
    din = 1'b0; #(N * D + 100);
    for (int i = 0; i < 40; i++) begin
      automatic int k = int'($urandom_range(0, N - 1));
      logic [N-1:0] exp_t;
      din = 1'b1;
      #(k * D + D / 2);
      exp_t = (N'(1) << k) - 1'b1;
      checks++;
      if (tap !== exp_t) begin
        failures++; $display("FAIL k=%0d tap=%h", k, tap);
      end
      din = 1'b0;
      #(N * D + 100);
      checks++;
      if (tap !== '0) begin failures++; $display("FAIL line not empty"); end
    end
    // pulse transit time through the whole line
    begin
      realtime t0, t1;
      din = 1'b1; t0 = $realtime;
      @(posedge tap[N-1]); t1 = $realtime;
      checks++;
      if (t1 - t0 != realtime'(N * D)) begin
        failures++; $display("FAIL transit %0t", t1 - t0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
