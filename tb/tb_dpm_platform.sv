// tb_dpm_platform: end-to-end test of the whole platform at its default
// parameters (10-bit ring ADC with 128 stages, 5-bit window ADC, 1023-cell
// delay-line ADC, 18-bit ring DPWM with 32 cells).
//
// The analog front end is modelled by one_shot_timer instances (RC one-shot
// with a threshold): the sampled voltage sets the pulse width, which the
// converters turn into a number. The bench computes the same pulse width
// from the RC equation and expects floor(width / cell delay), within one
// LSB. The window ADC gets two one-shots started together: the stable one
// sees the 3.66 V reference, the variable one the sampled voltage.
//
// Every mechanism below is counted; any that never happens is a failure:
//   ring ADC conversion, odd (inverted) and even propagation at capture,
//   saturation, counting of the external ring input, window ADC positive
//   error, negative error (reads 0), saturation at 31, external pulse,
//   full adder mode, shutdown mode, delay-line ADC conversion and
//   saturation, DPWM pulse with rough and fine parts, zero duty, limiter,
//   max_value following a change of the reference frequency, and the
//   decimal seven-segment read-out of the chip result.
`timescale 1ps/1ps
module tb_dpm_platform;
  import dpmp_pkg::*;
  localparam real R_OHM = 200.0, C_PF = 500.0, VDD = 3.3, VTH = 1.6;
  localparam real TAU_PS = R_OHM * C_PF;
  localparam real V_REF_WIN = 3.66;
  localparam int  RD = ADC_CELL_PS, WD = WIN_CELL_PS, PD = DPWM_CELL_PS;
  localparam int  K_RING = 1 << (RING_N_BITS - RING_CNT_BITS);
  localparam int  K_DPWM = 1 << DPWM_FINE_BITS;

  // top-level pins
  logic [1:0] mode;
  logic ext_ring, ext_ring_en, adc_en, ext_p, ext_p_en;
  logic fa_en, a, b, ci;
  logic in_pulse, var_p, stab_p;
  logic rst_msb, e0, r0, f0, sum, co, rdy, pbd, pad;
  logic [RING_N_BITS-1:0] res;
  logic [3:0][6:0] segs;
  logic dl_en, dl_pulse, dl_rdy, dl_pbd, dl_pad;
  logic [$clog2(DL_CELLS+1)-1:0] dl_res;
  logic ref_clk = 1'b1, dpwm_en, nvr, rough, fine, pwm;
  logic [DPWM_BITS-1:0] value, max_value;

  // analog front end
  logic trig_ring = 0, trig_win = 0, trig_dl = 0;
  real  v_ring = 0.0, v_win = 0.0, v_dl = 0.0, v_ref = V_REF_WIN;

  int checks = 0, failures = 0;
  int n_ring, n_odd, n_even, n_ring_sat, n_ext_ring;
  int n_win_pos, n_win_neg, n_win_sat, n_win_ext;
  int n_fa, n_shutdown, n_dl, n_dl_sat;
  int n_pwm, n_pwm_zero, n_pwm_limit, n_pwm_freq, n_display;

  one_shot_timer #(.R_OHM(R_OHM), .C_PF(C_PF), .VDD(VDD), .VTH(VTH)) u_os_ring (
    .trigger(trig_ring), .v_sample(v_ring), .pulse_out(in_pulse));
  one_shot_timer #(.R_OHM(R_OHM), .C_PF(C_PF), .VDD(VDD), .VTH(VTH)) u_os_stab (
    .trigger(trig_win), .v_sample(v_ref), .pulse_out(stab_p));
  one_shot_timer #(.R_OHM(R_OHM), .C_PF(C_PF), .VDD(VDD), .VTH(VTH)) u_os_var (
    .trigger(trig_win), .v_sample(v_win), .pulse_out(var_p));
  one_shot_timer #(.R_OHM(R_OHM), .C_PF(C_PF), .VDD(VDD), .VTH(VTH)) u_os_dl (
    .trigger(trig_dl), .v_sample(v_dl), .pulse_out(dl_pulse));

  dpm_platform dut (
    .chip_mode(mode), .chip_external_ring(ext_ring), .chip_external_ring_en(ext_ring_en),
    .chip_input_pulse(in_pulse), .chip_adc_enable(adc_en), .chip_reset_msb(rst_msb),
    .chip_edge_0(e0), .chip_rising_0(r0), .chip_falling_0(f0),
    .chip_variable_pulse(var_p), .chip_stable_pulse(stab_p),
    .chip_external_pulse(ext_p), .chip_en_external_pulse(ext_p_en),
    .chip_fa_enable(fa_en), .chip_a_in(a), .chip_b_in(b), .chip_carry_in(ci),
    .chip_sum_out(sum), .chip_carry_out(co), .chip_sample_adc_ready(rdy),
    .chip_pulse_before_delay(pbd), .chip_pulse_after_delay(pad), .chip_adc_result(res), .chip_segments(segs),
    .dl_enable(dl_en), .dl_input_pulse(dl_pulse), .dl_sample_ready(dl_rdy),
    .dl_pulse_before_delay(dl_pbd), .dl_pulse_after_delay(dl_pad), .dl_adc_result(dl_res),
    .dpwm_ref_clk(ref_clk), .dpwm_enable(dpwm_en), .dpwm_value(value),
    .dpwm_out(pwm), .dpwm_new_value_req(nvr), .dpwm_max_value(max_value),
    .dpwm_rough(rough), .dpwm_fine(fine)
  );

  // ---------------------------------------------------------------- helpers
  function automatic longint pulse_ps(real v);
    if (v - VTH <= VDD * $exp(-10.0)) return longint'(TAU_PS * 10.0);
    return longint'(TAU_PS * $ln(VDD / (v - VTH)));
  endfunction

  function automatic int cells(longint t, int d, int full);
    longint c;
    c = (t < 0) ? 0 : t / d;
    return (c > full) ? full : int'(c);
  endfunction

  // number shown by four digits, segments {g,f,e,d,c,b,a}; -1 if unreadable
  function automatic int shown(logic [3:0][6:0] sg);
    int num = 0;
    for (int dg = 3; dg >= 0; dg--) begin
      int x;
      case (sg[dg])
        7'h3F: x = 0;  7'h06: x = 1;  7'h5B: x = 2;  7'h4F: x = 3;  7'h66: x = 4;
        7'h6D: x = 5;  7'h7D: x = 6;  7'h07: x = 7;  7'h7F: x = 8;  7'h6F: x = 9;
        default: return -1;
      endcase
      num = num * 10 + x;
    end
    return num;
  endfunction

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic logic near(int got, int want, int tol);
    return (got >= want - tol) && (got <= want + tol);
  endfunction

  task automatic fire(ref logic trig);
    trig = 1'b1; #100 trig = 1'b0;
  endtask

  // one ring ADC sample of voltage v
  task automatic ring_sample(real v);
    longint t;
    int want;
    t = pulse_ps(v);
    want = cells(t, RD, 1023);
    v_ring = v;
    fire(trig_ring);
    @(negedge in_pulse);
    #1;
    check(rdy === 1'b1 && near(int'(res), want, 1),
          $sformatf("ring v=%0.3f T=%0d: result %0d expected %0d", v, t, res, want));
    if (near(int'(res), want, 1)) begin
      n_ring++;
      if (dut.u_chip.u_ring.tap_q[K_RING-1]) n_odd++; else n_even++;
      if (res == '1 && want == 1023) n_ring_sat++;
    end
    check(shown(segs) == int'(res), $sformatf("display shows %0d for %0d", shown(segs), res));
    if (shown(segs) == int'(res)) n_display++;
    #(K_RING * RD + 5000);
  endtask

  // one window ADC sample of voltage v against the reference
  task automatic win_sample(real v);
    longint dt;
    int want;
    dt = pulse_ps(v) - pulse_ps(v_ref);
    want = cells(dt, WD, 31);
    v_win = v;
    fire(trig_win);
    wait (stab_p === 1'b0 && var_p === 1'b0);
    #1;
    check(rdy === 1'b1 && near(int'(res), want, 1),
          $sformatf("window v=%0.4f dT=%0d: result %0d expected %0d", v, dt, res, want));
    if (near(int'(res), want, 1)) begin
      if (dt < 0 && res == 0) n_win_neg++;
      else if (want == 31 && res == 31) n_win_sat++;
      else if (res > 0) n_win_pos++;
    end
    #(40 * WD);
  endtask

  task automatic dl_sample(real v);
    longint t;
    int want;
    t = pulse_ps(v);
    want = cells(t, RD, DL_CELLS);
    v_dl = v;
    fire(trig_dl);
    @(negedge dl_pulse);
    #1;
    check(dl_rdy === 1'b1 && near(int'(dl_res), want, 1),
          $sformatf("dl v=%0.3f T=%0d: result %0d expected %0d", v, t, dl_res, want));
    if (near(int'(dl_res), want, 1)) begin
      n_dl++;
      if (want == DL_CELLS && dl_res == DL_CELLS) n_dl_sat++;
    end
    #(DL_CELLS * RD + 5000);
  endtask

  // DPWM: high time of one period with value v
  longint t_rise, acc;
  always @(posedge pwm) t_rise = $time;
  always @(negedge pwm) acc += $time - t_rise;

  task automatic pwm_period(logic [DPWM_BITS-1:0] v, output longint high);
    value = v;
    @(negedge ref_clk);
    acc = 0;
    if (pwm) t_rise = $time;
    @(negedge ref_clk);
    high = acc + (pwm ? $time - t_rise : 0);
  endtask

  longint half = 5_000_000;
  always begin
    #(half) ref_clk = 1'b0;
    #(half) ref_clk = 1'b1;
  end

  initial begin
    #3_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------ test
  initial begin
    longint high, per;
    ext_ring = 0; ext_ring_en = 0; adc_en = 1; ext_p = 0; ext_p_en = 0;
    fa_en = 1; a = 0; b = 0; ci = 0;
    dl_en = 1; dpwm_en = 1; value = 18'd2502;
    // one edge on every enable so that the asynchronous clears act
    mode = 2'(MODE_WINDOW_ADC);
    #5 mode = 2'(MODE_RING_ADC);
    #5 mode = 2'(MODE_SHUTDOWN);
    dl_en = 0; dpwm_en = 0;
    #1000 dl_en = 1; dpwm_en = 1;

    // shutdown: one-shots fire, nothing comes out of the chip
    v_ring = 2.5; v_win = 3.0;
    fork fire(trig_ring); fire(trig_win); join
    #400_000;
    check(res === '0 && rdy === 0 && pbd === 0 && pad === 0 && sum === 0 && co === 0,
          "shutdown outputs");
    if (res === '0 && sum === 0) n_shutdown++;

    // ring ADC over the whole range and beyond
    mode = 2'(MODE_RING_ADC);
    #1000;
    for (int i = 0; i < 40; i++) ring_sample(1.75 + 0.05 * i);
    for (int i = 0; i < 20; i++) ring_sample(1.8 + real'($urandom_range(0, 3000)) / 1000.0);
    ring_sample(1.65);                                  // beyond full scale
    // external ring: 5 edges counted instead of ring propagations
    begin
      longint t;
      int lsb;
      v_ring = 2.2;
      t = pulse_ps(v_ring);
      lsb = cells(t, RD, 1023) % K_RING;
      ext_ring_en = 1;
      fork
        fire(trig_ring);
        begin
          #10_000;
          repeat (5) begin ext_ring = ~ext_ring; #10_000; end
        end
      join
      @(negedge in_pulse);
      #1;
      check(res[RING_N_BITS-1:RING_N_BITS-RING_CNT_BITS] == 3'd5 &&
            near(int'(res[RING_N_BITS-RING_CNT_BITS-1:0]), lsb, 1),
            $sformatf("external ring: result %0d (msb %0d) lsb expected %0d", res,
                      res[RING_N_BITS-1:RING_N_BITS-RING_CNT_BITS], lsb));
      if (res[RING_N_BITS-1:RING_N_BITS-RING_CNT_BITS] == 3'd5) n_ext_ring++;
      ext_ring = 0;
      ext_ring_en = 0;
      #(K_RING * RD + 5000);
    end

    // window ADC around the 3.66 V reference
    mode = 2'(MODE_WINDOW_ADC);
    #1000;
    for (int i = 0; i < 40; i++) win_sample(3.70 - 0.005 * i);
    win_sample(3.0);
    ext_p_en = 1;
    ext_p = 1; #(12 * WD + WD / 2); ext_p = 0; #1;
    check(rdy === 1'b1 && res === 10'd12, $sformatf("external pulse: %0d", res));
    if (res === 10'd12) n_win_ext++;
    ext_p_en = 0;
    #(40 * WD);

    // full adder mode
    mode = 2'(MODE_FULL_ADDER);
    for (int v = 0; v < 8; v++) begin
      {a, b, ci} = 3'(v);
      #10;
      check({co, sum} === 2'(a + b + ci), $sformatf("adder %b%b%b: %b%b", a, b, ci, co, sum));
      if ({co, sum} === 2'(a + b + ci)) n_fa++;
    end
    mode = 2'(MODE_SHUTDOWN);

    // delay-line ADC
    for (int i = 0; i < 12; i++) dl_sample(1.72 + 0.15 * i);
    dl_sample(1.65);

    // DPWM: value 2502 at 100 kHz, zero, limiter, then 400 kHz
    pwm_period(18'd2502, high);
    pwm_period(18'd2502, high);
    check(high == 2503 * PD, $sformatf("dpwm high %0d", high));
    if (high == 2503 * PD) n_pwm++;
    pwm_period(18'd0, high);
    check(high == 0, "dpwm zero");
    if (high == 0) n_pwm_zero++;
    pwm_period(18'd30000, high);
    check(high == 2 * half, $sformatf("dpwm limiter %0d", high));
    if (high == 2 * half) n_pwm_limit++;
    half = 1_250_000;
    per = 2 * half;
    pwm_period(18'd2502, high);
    pwm_period(18'd2502, high);
    #1;
    check(max_value == ((per - K_DPWM * PD - PD) / (K_DPWM * PD) + 1) * K_DPWM &&
          high == 2503 * PD, $sformatf("dpwm 400 kHz: max %0d high %0d", max_value, high));
    if (max_value < 5000 && max_value > 4000) n_pwm_freq++;
    $display("dpwm 400 kHz: max_value=%0d duty=%0.3f %%", max_value, 100.0 * real'(high) / real'(per));

    // every mechanism must have happened
    begin
      int n [string];
      n["ring conversion"] = n_ring;       n["odd propagation"] = n_odd;
      n["even propagation"] = n_even;      n["ring saturation"] = n_ring_sat;
      n["external ring"] = n_ext_ring;     n["window positive"] = n_win_pos;
      n["window negative"] = n_win_neg;    n["window saturation"] = n_win_sat;
      n["window external pulse"] = n_win_ext;
      n["full adder"] = n_fa;              n["shutdown"] = n_shutdown;
      n["dl conversion"] = n_dl;           n["dl saturation"] = n_dl_sat;
      n["dpwm pulse"] = n_pwm;             n["dpwm zero"] = n_pwm_zero;
      n["dpwm limiter"] = n_pwm_limit;     n["dpwm frequency change"] = n_pwm_freq;
      n["decimal display"] = n_display;
      foreach (n[m]) begin
        $display("mechanism %-22s %0d", m, n[m]);
        checks++;
        if (n[m] == 0) begin failures++; $display("FAIL mechanism never seen: %s", m); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
