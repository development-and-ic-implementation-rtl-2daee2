// tb_ring_dpwm: self-checking test of the ring-oscillator DPWM at its default
// size (K = 32 cells of 538 ps, 18-bit value).
//
// A reference clock with a 50 % duty cycle sets the period; a period starts
// at its falling edge. For each period the bench accumulates the time
// dpwm_out spends high and the time of its first rising edge, and checks:
//   * no output before the first period start (nothing measured yet);
//   * the high time is exactly (value + 1) cell delays and begins K cells
//     after the period start, for value 2502 at 100/200/300/400 kHz (the
//     duty-cycle experiment) and for random values at 100 kHz;
//   * max_value = K * (number of ring propagations that fit the period);
//   * value 0 gives no pulse; a value >= max_value holds the output high
//     for the whole period (limiter);
//   * new_value_req is high for K cells right after each period start;
//   * after a change of the reference frequency max_value follows.
`timescale 1ps/1ps
module tb_ring_dpwm;
  localparam int  D = 538, K = 32, W = 18;
  logic         ref_clk = 1'b1, en;
  logic [W-1:0] value;
  logic         out, nvr, rough, fine;
  logic [W-1:0] max_value;
  longint       half = 5_000_000;
  int           checks = 0, failures = 0;

  // per-period measurement
  longint t_rise, acc, first_rise, t_req;
  int     n_rise;

  ring_dpwm dut (
    .ref_clk(ref_clk), .enable(en), .dpwm_value(value), .dpwm_out(out),
    .new_value_req(nvr), .max_value(max_value), .rough(rough), .fine(fine)
  );

  always begin
    #(half) ref_clk = 1'b0;
    #(half) ref_clk = 1'b1;
  end

  // A fall and a rise in the same instant (tap hand-over) are one pulse.
  longint t_fall = -1;
  always @(posedge out) begin
    t_rise = $time;
    if (n_rise == 0) first_rise = $time;
    if ($time != t_fall) n_rise++;
  end
  always @(negedge out) begin
    acc += $time - t_rise;
    t_fall = $time;
  end

  always @(posedge nvr) t_req = $time;
  always @(negedge nvr) if (en && $time > 2000) begin
    checks++;
    if ($time - t_req != longint'(K * D)) begin
      failures++;
      $display("FAIL new_value_req width %0d", $time - t_req);
    end
  end

  function automatic longint exp_max(longint period);
    return ((period - K * D - D) / (K * D) + 1) * K;
  endfunction

  // Wait for the next period start and clear the accumulators.
  task automatic period_start(output longint t0);
    @(negedge ref_clk);
    t0 = $time;
    acc = 0; n_rise = 0; first_rise = -1;
    if (out) begin t_rise = $time; n_rise = 1; first_rise = $time; end
  endtask

  // High time of the period that ends at the next period start.
  task automatic period_end(output longint high);
    @(negedge ref_clk);
    high = acc + (out ? $time - t_rise : 0);
  endtask

  // Run one period with value v (loaded at the period start) and check it.
  task automatic run_value(logic [W-1:0] v, string what);
    longint t0, high, want;
    value = v;
    period_start(t0);
    period_end(high);
    if (v == 0) want = 0;
    else if (v >= max_value) want = 2 * half;
    else want = (longint'(v) + 1) * D;
    checks++;
    if (high != want) begin
      failures++;
      $display("FAIL %s value=%0d max=%0d: high %0d ps, expected %0d", what, v, max_value, high, want);
    end
    if (v != 0 && v < max_value) begin
      checks++;
      if (first_rise - t0 != longint'(K * D) || n_rise != 1) begin
        failures++;
        $display("FAIL %s value=%0d: start %0d ps after period start, %0d pulses", what, v, first_rise - t0, n_rise);
      end
    end
  endtask

  task automatic check_max(longint period, string what);
    #1;                                 // max_value updates at the edge
    checks++;
    if (longint'(max_value) != exp_max(period)) begin
      failures++;
      $display("FAIL %s: max_value %0d expected %0d", what, max_value, exp_max(period));
    end
  endtask

  initial begin
    #5_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0, high, period;
    en = 1'b1; value = 18'd2502;
    #10 en = 1'b0;
    #1000 en = 1'b1;
    acc = 0; n_rise = 0;
    // up to the first period start nothing has been measured: output low
    @(negedge ref_clk);
    checks++;
    if (n_rise != 0 || out !== 1'b0 || max_value != 0) begin
      failures++; $display("FAIL output before calibration");
    end
    // the first measurement covers a partial period; the next one is full
    period_start(t0);
    period_end(high);
    check_max(2 * half, "first calibration");

    // duty-cycle experiment: value 2502 at 100..400 kHz
    for (int f = 100; f <= 400; f += 100) begin
      half = 500_000_000 / f;           // half period in ps
      period = 2 * half;
      period_start(t0);                 // first period at the new frequency
      period_end(high);
      check_max(period, $sformatf("%0d kHz", f));
      run_value(18'd2502, $sformatf("%0d kHz", f));
      $display("%0d kHz: max_value=%0d duty=%0.4f %%", f, max_value,
               100.0 * real'(high) / real'(period));
      check_max(period, $sformatf("%0d kHz steady", f));
    end

    // back to 100 kHz, random values below the limit
    half = 5_000_000;
    period_start(t0);
    period_end(high);
    check_max(2 * half, "back to 100 kHz");
    for (int i = 0; i < 12; i++)
      run_value(W'($urandom_range(1, max_value - K - 1)), "random");
    run_value(18'd1, "one");
    run_value(18'(K - 1), "fine only");
    run_value(18'(K), "one rough step");
    run_value(18'd0, "zero");
    run_value(max_value, "limit");
    run_value(18'h3FFFF, "full scale");
    run_value(18'd100, "after limit");

    // disable: output low at once
    en = 1'b0;
    #1000;
    checks++;
    if (out !== 1'b0 || max_value !== 0) begin failures++; $display("FAIL disable"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
