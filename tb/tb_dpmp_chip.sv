// tb_dpmp_chip: self-checking test of the ADC test chip (ring ADC, window
// ADC and full adder behind the 2-bit mode selection and shared result
// pins).
//
// Pulses are driven directly by the bench (no one-shot timers). Checks:
//   * shutdown (mode 00): all result pins and the adder outputs stay low
//     while pulses arrive on every input;
//   * ring ADC mode (10): random pulse widths k cells + half a cell give
//     min(k, 1023) on the shared result pins, sample ready after each
//     conversion; adc_enable low blocks conversions;
//   * window ADC mode (01): random differences of e cells between the
//     variable and the stable pulse give max(0, min(e, 31)) on the low 5
//     result bits, upper bits zero; the artificial external pulse as well;
//   * full adder mode (11): truth table with enable high, zeros with enable
//     low, shared ADC pins low;
//   * leaving a mode clears that converter (its enable is the mode decode).
`timescale 1ps/1ps
module tb_dpmp_chip;
  import dpmp_pkg::*;
  localparam int RD = ADC_CELL_PS, WD = WIN_CELL_PS;
  chip_mode_e mode;
  logic ext_ring, ext_ring_en, in_pulse, adc_en;
  logic var_p, stab_p, ext_p, ext_p_en;
  logic fa_en, a, b, ci;
  logic rst_msb, e0, r0, f0, sum, co, rdy, pbd, pad;
  logic [RING_N_BITS-1:0] res;
  int checks = 0, failures = 0;

  dpmp_chip dut (
    .mode(mode), .external_ring(ext_ring), .external_ring_en(ext_ring_en),
    .input_pulse(in_pulse), .adc_enable(adc_en), .reset_msb(rst_msb),
    .edge_0(e0), .rising_0(r0), .falling_0(f0),
    .variable_pulse(var_p), .stable_pulse(stab_p), .external_pulse(ext_p),
    .en_external_pulse(ext_p_en), .fa_enable(fa_en), .a_in(a), .b_in(b),
    .carry_in(ci), .sum_out(sum), .carry_out(co), .sample_adc_ready(rdy),
    .pulse_before_delay(pbd), .pulse_after_delay(pad), .adc_result(res)
  );

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic ring_conv(int k);
    int exp_v;
    exp_v = (k > 1023) ? 1023 : k;
    in_pulse = 1'b1;
    #(k * RD + RD / 2);
    in_pulse = 1'b0;
    #1;
    check(rdy === 1'b1 && res === RING_N_BITS'(exp_v),
          $sformatf("ring k=%0d: result %0d ready %b", k, res, rdy));
    #((1 << (RING_N_BITS - RING_CNT_BITS)) * RD + 2000);   // ring flush time
  endtask

  task automatic win_conv(int e);
    int u, tv;
    u  = (e < 0) ? 0 : (e > 31 ? 31 : e);
    tv = 10_000 + e * WD + WD / 2;
    stab_p = 1'b1; var_p = 1'b1;
    if (tv < 10_000) begin
      #(tv) var_p = 1'b0;
      #(10_000 - tv) stab_p = 1'b0;
    end else begin
      #(10_000) stab_p = 1'b0;
      #(tv - 10_000) var_p = 1'b0;
    end
    #1;
    check(rdy === 1'b1 && res === RING_N_BITS'(u),
          $sformatf("window e=%0d: result %0d ready %b", e, res, rdy));
    #(40 * WD);
  endtask

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ext_ring = 0; ext_ring_en = 0; in_pulse = 0; adc_en = 1;
    var_p = 0; stab_p = 0; ext_p = 0; ext_p_en = 0; fa_en = 1; a = 0; b = 0; ci = 0;
    // walk through the modes once so that every asynchronous clear sees an edge
    mode = MODE_WINDOW_ADC;
    #5 mode = MODE_RING_ADC;
    #5 mode = MODE_SHUTDOWN;
    #1000;

    // shutdown: inputs toggle, nothing comes out
    fork
      begin in_pulse = 1; #5000 in_pulse = 0; end
      begin stab_p = 1; var_p = 1; #3000 stab_p = 0; #2000 var_p = 0; end
      begin a = 1; b = 1; ci = 1; end
    join
    #10;
    check(res === '0 && rdy === 0 && pbd === 0 && pad === 0 && sum === 0 && co === 0,
          "shutdown outputs");
    a = 0; b = 0; ci = 0;

    // ring ADC mode
    mode = MODE_RING_ADC;
    #1000;
    ring_conv(0);
    ring_conv(1023);
    ring_conv(1100);
    for (int i = 0; i < 25; i++) ring_conv(int'($urandom_range(0, 1023)));
    check(pbd === 1'b0 && sum === 1'b0, "ring mode: idle pins");
    // adc_enable low: result cleared, no conversion
    adc_en = 0;
    #10;
    in_pulse = 1; #(100 * RD) in_pulse = 0; #1;
    check(res === '0 && rdy === 1'b0, "ring mode with adc_enable low");
    adc_en = 1;
    #1000;
    ring_conv(77);

    // window ADC mode
    mode = MODE_WINDOW_ADC;
    #1000;
    check(res === '0, "window result cleared after mode switch");
    for (int e = -3; e <= 34; e++) win_conv(e);
    for (int i = 0; i < 10; i++) win_conv(int'($urandom_range(0, 31)));
    check(res[RING_N_BITS-1:WIN_BITS] === '0, "window upper bits zero");
    ext_p_en = 1;
    for (int e = 0; e < 32; e += 5) begin
      ext_p = 1; #(e * WD + WD / 2); ext_p = 0; #1;
      check(rdy === 1'b1 && res === RING_N_BITS'(e), $sformatf("external pulse e=%0d: %0d", e, res));
      #(40 * WD);
    end
    ext_p_en = 0;

    // back in ring mode the ring converter starts from a cleared state
    mode = MODE_RING_ADC;
    #10;
    check(res === '0 && rdy === 1'b0, "ring result cleared after mode switch");
    ring_conv(500);

    // full adder mode
    mode = MODE_FULL_ADDER;
    for (int en = 1; en >= 0; en--) begin
      fa_en = 1'(en);
      for (int v = 0; v < 8; v++) begin
        {a, b, ci} = 3'(v);
        #10;
        check({co, sum} === (en ? 2'(a + b + ci) : 2'b00),
              $sformatf("adder en=%0d v=%0d: %b%b", en, v, co, sum));
        check(res === '0 && rdy === 0 && pbd === 0 && pad === 0, "adder mode: ADC pins low");
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
