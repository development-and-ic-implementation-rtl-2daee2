// tb_ring_oscillator: a 16-stage ring of 300 ps stages. After enable the
// last tap must toggle once every 16 stage delays (period 2 * 16 * 300 ps),
// the first edge must come after 16 stage delays, and after enable drops
// the ring must be empty (all taps 0) within 16 stage delays.
`timescale 1ps/1ps
module tb_ring_oscillator;
  localparam int K = 16, D = 300;
  logic         en;
  logic [K-1:0] tap;
  int checks = 0, failures = 0;
  realtime t_en, t_prev, t_now;

  ring_oscillator #(.K(K), .CELL_PS(D)) dut (.enable(en), .tap(tap));

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b1; #(4 * K * D);
    en = 1'b0; #(2 * K * D);
    checks++;
    if (tap !== '0) begin failures++; $display("FAIL not flushed %h", tap); end
    for (int run = 0; run < 3; run++) begin
      en = 1'b1; t_en = $realtime;
      @(tap[K-1]); t_now = $realtime;
      checks++;
      if (t_now - t_en != realtime'(K * D)) begin
        failures++; $display("FAIL first edge after %0t", t_now - t_en);
      end
      for (int e = 0; e < 10; e++) begin
        t_prev = t_now;
        @(tap[K-1]); t_now = $realtime;
        checks++;
        if (t_now - t_prev != realtime'(K * D)) begin
          failures++; $display("FAIL half period %0t", t_now - t_prev);
        end
      end
      #(D / 2) en = 1'b0;
      #(K * D + D);
      checks++;
      if (tap !== '0) begin failures++; $display("FAIL not empty after stop %h", tap); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
