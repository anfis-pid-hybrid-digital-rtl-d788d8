// tb_anfis_pid_buck_controller -- closed-loop test of the whole controller, at its
// default parameters, against the behavioural buck converter and ADC model.
//
// Sequence (one continuous run, no reset between phases):
//   1. start-up from 0 V with the product hybrid and the delta-sigma DAC, regulate to
//      1.2 V (reference code 128), then a light-to-heavy load step, then a reference
//      out of reach (code 240) that drives ANFIS and PID into saturation, and back;
//   2. switch at run time through the summing, switching Type I, switching Type II and
//      ANFIS-driven hybrids, regulating after each switch;
//   3. overwrite one knowledge-base word and restore it through the write port;
//   4. switch the DAC to the DPWM and run the product hybrid again, checking every PWM
//      period's pulse width against the duty in force at its start.
// Regulation is judged on the mean output voltage over the last 20 us of a phase. Other
// checks: ADC strobe every 10 clocks, duty_valid exactly 4 clocks after each strobe.
// Each mechanism (five modes, both switch positions, PID saturation, arithmetic
// clipping, load step, knowledge-base write, DPWM periods, delta-sigma output) is
// counted and one that never happened is a failure.
module tb_anfis_pid_buck_controller;
  import anfis_pid_pkg::*;

  logic clk = 0, rst_n = 0;
  logic adc_sample;
  logic [7:0] adc_data;
  logic [7:0] vref_code = 8'd128;
  hybrid_mode_t mode = MODE_PRODUCT;
  dac_sel_t dac_sel = DAC_DSIG;
  gain_t kp = 2000, ki = 400, kd = 1000;
  logic kb_we = 0;
  logic [KB_AW-1:0] kb_addr = 0;
  kb_word_t kb_data = 0;
  logic gate_drive;
  duty_t duty;
  logic duty_valid, pid_selected, hybrid_clipped, pid_saturated, pwm_period_start;
  logic heavy = 0;
  int vout_mv, il_ma;

  int checks = 0, failures = 0;
  int n_mode [5] = '{default: 0};
  int n_pid_sel = 0, n_anfis_sel = 0, n_clip = 0, n_sat = 0, n_kb = 0, n_load = 0;
  int n_pwm_periods = 0, n_dsm_toggles = 0;

  anfis_pid_buck_controller dut (.*);

  buck_plant_model plant (
    .clk, .gate(gate_drive), .heavy, .discharge(1'b0), .adc_sample, .adc_code(adc_data), .vout_mv, .il_ma
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // --- continuous monitors -------------------------------------------------------
  int since_sample = 0, since_strobe = -1;
  logic gate_q = 0;
  always @(posedge clk) if (rst_n) begin
    // ADC strobe period and strobe-to-duty latency
    if (adc_sample) begin
      if (since_sample != 0) begin
        checks++; if (since_sample != 10) begin failures++; $display("FAIL ADC period %0d", since_sample); end
      end
      since_sample = 1;
      since_strobe = 0;
    end else if (since_sample > 0) since_sample++;
    if (since_strobe >= 0) since_strobe++;
    if (duty_valid) begin
      checks++;
      if (since_strobe != 5) begin failures++; $display("FAIL duty latency %0d", since_strobe - 1); end
      since_strobe = -1;
      n_mode[int'(mode)]++;
      if (mode == MODE_SWITCH_I || mode == MODE_SWITCH_II) begin
        if (pid_selected) n_pid_sel++; else n_anfis_sel++;
      end
      n_clip += int'(hybrid_clipped);
      n_sat  += int'(pid_saturated);
    end
    if (dac_sel == DAC_DSIG && gate_drive != gate_q) n_dsm_toggles++;
    gate_q <= gate_drive;
  end

  // DPWM pulse width per period (only while the DPWM drives the gate)
  int hi_cnt = 0, len = 0, duty_start = -1;
  logic [8:0] duty_prev = 0;
  bit whole = 0;              // the period began with the DPWM already selected
  always @(posedge clk) if (rst_n) begin
    if (pwm_period_start) begin
      if (duty_start >= 0 && whole && dac_sel == DAC_DPWM) begin
        checks += 2;
        if (len != 512) begin failures++; $display("FAIL PWM period %0d", len); end
        if (hi_cnt != duty_start) begin
          failures++; $display("FAIL PWM width %0d exp %0d", hi_cnt, duty_start);
        end
        n_pwm_periods++;
      end
      duty_start = int'(duty_prev);
      whole = (dac_sel == DAC_DPWM);
      hi_cnt = 0; len = 0;
    end
    hi_cnt += int'(gate_drive);
    len++;
    duty_prev = duty;
  end

  // --- helpers ---------------------------------------------------------------------
  // run for us microseconds and return the mean output voltage of the last 20 us
  task automatic run_us(int us, output int mean_mv, output int min_mv, output int max_mv);
    longint acc = 0;
    int n = 0;
    min_mv = 100000; max_mv = -100000;
    for (int t = 0; t < us * 100; t++) begin
      @(posedge clk);
      if (t >= (us - 20) * 100) begin
        acc += vout_mv; n++;
        if (vout_mv < min_mv) min_mv = vout_mv;
        if (vout_mv > max_mv) max_mv = vout_mv;
      end
    end
    mean_mv = int'(acc / n);
  endtask

  task automatic phase(string name, int us, int tol_mv);
    int m, lo, hi;
    run_us(us, m, lo, hi);
    $display("%-28s mean %0d mV (min %0d, max %0d), duty %0d", name, m, lo, hi, duty);
    check(m > 1200 - tol_mv && m < 1200 + tol_mv,
          $sformatf("%s: mean %0d mV not within %0d mV of 1200", name, m, tol_mv));
  endtask

  initial begin
    repeat (5) @(posedge clk);
    #1 rst_n = 1;
    phase("start-up, product, DSM", 150, 40);
    heavy = 1; n_load++;
    phase("heavy load, product, DSM", 100, 40);
    // reference beyond reach: duty 0.71 would need both product factors above 0.8,
    // so ANFIS and PID saturate and the output settles at 0.8 * 0.8 * 3.3 V
    vref_code = 8'd240;
    begin
      int m, lo, hi;
      run_us(80, m, lo, hi);
      $display("%-28s mean %0d mV (min %0d, max %0d), duty %0d", "unreachable reference", m, lo, hi, duty);
      check(duty == 9'd327, $sformatf("saturated product duty %0d, expected 327", duty));
      check(m > 2000 && m < 2150, $sformatf("saturated output %0d mV", m));
    end
    vref_code = 8'd128;
    phase("back to 1.2 V, product", 100, 40);
    mode = MODE_SUM;       phase("summing, DSM", 100, 60);
    mode = MODE_SWITCH_I;  phase("switching I, DSM", 100, 60);
    mode = MODE_SWITCH_II; phase("switching II, DSM", 100, 60);
    mode = MODE_DRIVEN;    phase("ANFIS-driven PID, DSM", 100, 40);
    heavy = 0; n_load++;
    phase("light load, driven, DSM", 100, 40);
    // knowledge base write port: change one consequent, then restore its preset
    @(posedge clk); #1;
    kb_we = 1; kb_addr = KB_AW'(kb_index(0, 4, 0)); kb_data = 16'sd2000;
    @(posedge clk); #1;
    kb_data = kb_preset(kb_index(0, 4, 0));
    @(posedge clk); #1;
    kb_we = 0; n_kb++;
    mode = MODE_PRODUCT; dac_sel = DAC_DPWM;
    phase("product, DPWM", 200, 400);
    // mechanism coverage
    foreach (n_mode[k]) check(n_mode[k] > 0, $sformatf("mode %0d never ran", k));
    check(n_pid_sel > 0,     "switching hybrid never chose the PID");
    check(n_anfis_sel > 0,   "switching hybrid never chose the ANFIS");
    check(n_sat > 0,         "PID saturation never happened");
    check(n_clip > 0,        "arithmetic hybrid never clipped");
    check(n_pwm_periods > 0, "no DPWM period was checked");
    check(n_dsm_toggles > 0, "delta-sigma output never toggled");
    check(n_load == 2 && n_kb == 1, "load steps / knowledge-base write");
    $display("coverage: modes %0d %0d %0d %0d %0d, pid/anfis %0d/%0d, sat %0d, clip %0d, pwm periods %0d, dsm toggles %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_mode[4], n_pid_sel, n_anfis_sel,
             n_sat, n_clip, n_pwm_periods, n_dsm_toggles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
