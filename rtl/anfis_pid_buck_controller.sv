// anfis_pid_buck_controller -- digital voltage-mode controller for a synchronous buck
// converter using ANFIS-PID hybrid control.
//
// Signal flow (one clock domain, the 100 MHz modulator clock):
//   ADC code --> error_adder (e = vref - v) --> hybrid_controller --> duty (9 bit)
//            --> dpwm or delta_sigma_mod --> gate_drive (to the gate driver of S1/S2)
// The ADC runs at clk / ADC_DIV (10 MHz for the thesis' 100 MHz / 10 MHz pair):
// adc_sample is a one-clock strobe at which adc_data is taken. Both modulators always
// run; dac_sel picks which one drives the converter, so the DAC type can be changed
// without resetting. mode selects the hybrid (see anfis_pid_pkg::hybrid_mode_t) and may
// change at any time; the PID and ANFIS states carry over.
// Timing: adc_data taken at adc_sample reaches duty four clocks later (error_adder 1,
// hybrid_controller 3). The DPWM applies a new duty at its next period boundary, the
// delta-sigma modulator at once.
// What the thesis fixes: the error adder, ANFIS and PID in parallel, the five hybrids,
// the DPWM and delta-sigma DACs, 8-bit ADC, 9-bit modulators, 10 MHz / 100 MHz clocks,
// 10 % switching threshold. Run-time selection of hybrid and DAC in one design, the
// number formats and the knowledge-base write port are this design's choices.
module anfis_pid_buck_controller
  import anfis_pid_pkg::*;
#(
  parameter int ADC_DIV       = 10,    // modulator clocks per ADC sample
  parameter int DSM_ORDER     = 2,     // delta-sigma modulator order
  parameter bit DPWM_TRAILING = 1'b1   // trailing-edge DPWM
) (
  input  logic             clk,
  input  logic             rst_n,       // synchronous, active low
  // ADC side
  output logic             adc_sample,
  input  logic [ADC_W-1:0] adc_data,
  input  logic [ADC_W-1:0] vref_code,
  // configuration
  input  hybrid_mode_t     mode,
  input  dac_sel_t         dac_sel,
  input  gain_t            kp,
  input  gain_t            ki,          // Ki * Ts
  input  gain_t            kd,
  input  logic             kb_we,
  input  logic [KB_AW-1:0] kb_addr,
  input  kb_word_t         kb_data,
  // converter side
  output logic             gate_drive,
  // status
  output duty_t            duty,
  output logic             duty_valid,
  output logic             pid_selected,
  output logic             hybrid_clipped,
  output logic             pid_saturated,
  output logic             pwm_period_start
);

  localparam int DIV_W = (ADC_DIV > 1) ? $clog2(ADC_DIV) : 1;

  logic [DIV_W-1:0] div_cnt;
  err_t             e;
  logic             e_valid, pwm, dsm;

  // ADC sample strobe.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      div_cnt    <= '0;
      adc_sample <= 1'b0;
    end else begin
      adc_sample <= (div_cnt == DIV_W'(ADC_DIV - 1));
      div_cnt    <= (div_cnt == DIV_W'(ADC_DIV - 1)) ? '0 : div_cnt + 1'b1;
    end
  end

  error_adder u_err (
    .clk, .rst_n, .sample_en(adc_sample), .adc_code(adc_data), .vref_code,
    .e, .e_valid
  );

  hybrid_controller u_ctrl (
    .clk, .rst_n, .e_valid, .e, .mode, .vref_code, .kp, .ki, .kd,
    .kb_we, .kb_addr, .kb_data,
    .u(), .duty, .duty_valid, .pid_sel(pid_selected), .clipped(hybrid_clipped),
    .pid_sat(pid_saturated)
  );

  dpwm #(.N(DUTY_W), .TRAILING_EDGE(DPWM_TRAILING)) u_dpwm (
    .clk, .rst_n, .duty, .pwm, .period_start(pwm_period_start)
  );

  delta_sigma_mod #(.N(DUTY_W), .ORDER(DSM_ORDER)) u_dsm (
    .clk, .rst_n, .din(duty), .dout(dsm)
  );

  assign gate_drive = (dac_sel == DAC_DSIG) ? dsm : pwm;

  initial assert (ADC_DIV >= 4) else $error("ADC_DIV must leave room for the 4-clock pipeline");

endmodule
