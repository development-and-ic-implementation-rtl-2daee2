// tb_window_adc: stable pulse of 20 ns, variable pulse 20 ns + e cells +
// half a cell (500 ps cells) for e = -4 .. 40, both starting together. The
// unsigned instance must return max(0, min(e, 31)), the signed instance the
// same value minus 16 in two's complement. Then the artificial external
// pulse replaces the error window. sample_ready must be low during and high
// right after each conversion.
`timescale 1ps/1ps
module tb_window_adc;
  localparam int D = 500, S = 20_000, CELLS = 32;
  logic       en, sp, vp, xp, xen;
  logic       rdy, pbd, pad, rdy_s, pbd_s, pad_s;
  logic [4:0] res, res_s;
  int checks = 0, failures = 0;

  window_adc dut_u (
    .enable(en), .stable_pulse(sp), .variable_pulse(vp), .external_pulse(xp),
    .en_external_pulse(xen), .sample_ready(rdy), .pulse_before_delay(pbd),
    .pulse_after_delay(pad), .adc_result(res)
  );
  window_adc #(.SIGNED_RESULT(1'b1)) dut_s (
    .enable(en), .stable_pulse(sp), .variable_pulse(vp), .external_pulse(xp),
    .en_external_pulse(xen), .sample_ready(rdy_s), .pulse_before_delay(pbd_s),
    .pulse_after_delay(pad_s), .adc_result(res_s)
  );

  task automatic expect_result(int e, string what);
    int u;
    logic [4:0] s;
    u = (e < 0) ? 0 : (e > 31 ? 31 : e);
    s = 5'(u - 16);
    checks++;
    if (rdy !== 1'b1) begin failures++; $display("FAIL %s e=%0d: not ready", what, e); end
    checks++;
    if (res !== 5'(u)) begin failures++; $display("FAIL %s e=%0d: unsigned %0d exp %0d", what, e, res, u); end
    checks++;
    if (res_s !== s) begin failures++; $display("FAIL %s e=%0d: signed %0d exp %0d", what, e, $signed(res_s), $signed(s)); end
  endtask

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b1; sp = 1'b0; vp = 1'b0; xp = 1'b0; xen = 1'b0;
    #10 en = 1'b0;               // clear edge for the asynchronous clears
    #1000 en = 1'b1;
    // warm-up: one long window so that every cell has switched
    sp = 1'b1; vp = 1'b1; #S; sp = 1'b0; #(40 * D); vp = 1'b0; #(2 * CELLS * D);
    for (int e = -4; e <= 40; e++) begin
      int tv;
      tv = S + e * D + D / 2;
      sp = 1'b1; vp = 1'b1;
      #(D);
      checks++;
      if (rdy !== 1'b0) begin failures++; $display("FAIL ready during conversion"); end
      if (tv < S) begin
        #(tv - D) vp = 1'b0;
        #(S - tv) sp = 1'b0;
      end else begin
        #(S - D) sp = 1'b0;
        #(tv - S) vp = 1'b0;
      end
      #1;
      expect_result(e, "window");
      #(2 * CELLS * D);
    end
    // artificial external pulse
    xen = 1'b1;
    for (int e = 0; e <= 34; e += 2) begin
      xp = 1'b1; #(e * D + D / 2); xp = 1'b0; #1;
      expect_result(e, "external");
      #(2 * CELLS * D);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
