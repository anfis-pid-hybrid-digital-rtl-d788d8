// tb_step_response -- the evaluation the controller was designed for: start-up of the
// 3.3 V to 1.2 V buck converter (1 uH / 2 uF, 20 mOhm ESRs, 8-bit ADC at 10 MHz, 100 MHz
// modulator clock) from an empty output, for every hybrid with both the DPWM and the
// delta-sigma DAC. For each of the ten runs it measures the figures the converter is
// judged by -- steady-state error, overshoot, 10-90 % rise time, 2 % settling time and
// peak-to-peak ripple -- and prints them as a table. The controller and the converter
// model are reset before each run; the controller keeps its default parameters.
// Checks: with the delta-sigma DAC every hybrid must hold the mean within 30 mV of 1.2 V
// and all but Switching Type II must settle within 2 % (Type II keeps a limit cycle
// around its switching threshold, hence not required to settle); with the DPWM (a 195 kHz switching period, close to the
// 113 kHz LC resonance, so the ripple is large) the mean must be within 150 mV.
module tb_step_response;
  import anfis_pid_pkg::*;

  logic clk = 0, rst_n = 0;
  logic adc_sample;
  logic [7:0] adc_data;
  logic [7:0] vref_code = 8'd128;
  hybrid_mode_t mode = MODE_SWITCH_I;
  dac_sel_t dac_sel = DAC_DPWM;
  gain_t kp = 2000, ki = 400, kd = 1000;
  logic kb_we = 0;
  logic [KB_AW-1:0] kb_addr = 0;
  kb_word_t kb_data = 0;
  logic gate_drive;
  duty_t duty;
  logic duty_valid, pid_selected, hybrid_clipped, pid_saturated, pwm_period_start;
  logic discharge = 0;
  int vout_mv, il_ma;
  int checks = 0, failures = 0;

  localparam int RUN_US = 200;
  localparam int N = RUN_US * 100;

  anfis_pid_buck_controller dut (.*);

  buck_plant_model plant (
    .clk, .gate(gate_drive), .heavy(1'b0), .discharge, .adc_sample, .adc_code(adc_data),
    .vout_mv, .il_ma
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10 * (N + 100) + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int trace [N];

  initial begin
    string names [5] = '{"Switching I", "Switching II", "Summing", "Product", "ANFIS-driven"};
    $display("%-13s %-5s %9s %9s %9s %10s %9s", "hybrid", "DAC", "err(mV)", "over(%)",
             "rise(us)", "settle(us)", "ripple");
    for (int d = 0; d < 2; d++) begin
      for (int m = 0; m < 5; m++) begin
        longint acc;
        int mean, vmax, vmin, t10, t90, tset, err;
        mode = hybrid_mode_t'(m);
        dac_sel = dac_sel_t'(d);
        // fresh start
        rst_n = 0; discharge = 1;
        repeat (5) @(posedge clk);
        #1 rst_n = 1; discharge = 0;
        for (int t = 0; t < N; t++) begin
          @(posedge clk);
          trace[t] = vout_mv;
        end
        // steady state over the last 20 us
        acc = 0; vmax = -100000; vmin = 100000;
        for (int t = N - 2000; t < N; t++) begin
          acc += trace[t];
          if (trace[t] > vmax) vmax = trace[t];
          if (trace[t] < vmin) vmin = trace[t];
        end
        mean = int'(acc / 2000);
        err  = mean - 1200;
        t10 = -1; t90 = -1; tset = 0;
        for (int t = 0; t < N; t++) begin
          if (t10 < 0 && trace[t] >= 120)  t10 = t;
          if (t90 < 0 && trace[t] >= 1080) t90 = t;
          if (trace[t] > 1224 || trace[t] < 1176) tset = t + 1;
        end
        begin
          int peak;
          peak = 0;
          for (int t = 0; t < N; t++) if (trace[t] > peak) peak = trace[t];
          $display("%-13s %-5s %9d %9.1f %9.2f %10s %9d", names[m], d ? "DSM" : "DPWM", err,
                   100.0 * real'(peak - 1200) / 1200.0,
                   (t10 >= 0 && t90 >= 0) ? real'(t90 - t10) / 100.0 : -1.0,
                   (tset < N) ? $sformatf("%0.2f", real'(tset) / 100.0) : "none",
                   vmax - vmin);
        end
        if (d == 1) begin
          if (m != int'(MODE_SWITCH_II))
            check(tset < N, $sformatf("%s with DSM did not settle within 2 %%", names[m]));
          check(err < 30 && err > -30, $sformatf("%s with DSM: error %0d mV", names[m], err));
        end else begin
          check(err < 150 && err > -150, $sformatf("%s with DPWM: error %0d mV", names[m], err));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
