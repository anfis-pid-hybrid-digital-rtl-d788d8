// hybrid_controller -- the ANFIS-PID hybrid control core.
//
// An ANFIS and a velocity-form PID run side by side on the same error samples, and the
// mode input picks which of the thesis' five hybrids forms the output:
//   MODE_SWITCH_I / MODE_SWITCH_II  -- switching_hybrid (Sec. 3.2)
//   MODE_SUM / MODE_PRODUCT         -- arithmetic_hybrid (Sec. 3.3)
//   MODE_DRIVEN                     -- PID whose gains are K + dK from the ANFIS (Sec. 3.4)
// In the other modes the PID uses the base gains unchanged. One ANFIS with four output
// channels serves all modes (channel 0 for the hybrids, channels 1-3 for the driven
// PID); having all hybrids in one run-time selectable core is this design's choice, the
// thesis built each hybrid separately.
// Pipeline, one stage per clock after e_valid:
//   +1  ANFIS outputs (u_anfis, dK) registered
//   +2  PID output registered (it uses the dK of the same sample in MODE_DRIVEN)
//   +3  hybrid result u and the 9-bit duty registered, duty_valid high for one clock
// so a new sample may arrive at most every third clock (the top samples every tenth).
// duty = u >> (24 - 9), u being already limited to [0, 0.8].
module hybrid_controller
  import anfis_pid_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,        // synchronous, active low
  input  logic             e_valid,
  input  err_t             e,
  input  hybrid_mode_t     mode,
  input  logic [ADC_W-1:0] vref_code,
  input  gain_t            kp,
  input  gain_t            ki,           // Ki * Ts
  input  gain_t            kd,
  input  logic             kb_we,
  input  logic [KB_AW-1:0] kb_addr,
  input  kb_word_t         kb_data,
  output ctrl_t            u,            // hybrid output, controller format
  output duty_t            duty,         // duty command for the modulators
  output logic             duty_valid,
  output logic             pid_sel,      // switching hybrids: the PID is passed through
  output logic             clipped,      // arithmetic hybrids: result hit a limit
  output logic             pid_sat       // PID accumulator hit a limit
);

  ctrl_t u_anfis, u_pid, u_sw, u_ar;
  gain_t dk [3];
  gain_t kp_eff, ki_eff, kd_eff, kp_use, ki_use, kd_use;
  logic  a_valid, p_valid, sw_pid, ar_clip, sat_hi, sat_lo;
  err_t  e_d, e_dd;

  anfis u_anfis_core (
    .clk, .rst_n, .in_valid(e_valid), .e,
    .kb_we, .kb_addr, .kb_data,
    .u_anfis, .dk, .out_valid(a_valid)
  );

  anfis_driven_coeffs u_coeffs (
    .kp, .ki, .kd, .dk, .kp_eff, .ki_eff, .kd_eff
  );

  always_comb begin
    if (mode == MODE_DRIVEN) begin
      kp_use = kp_eff; ki_use = ki_eff; kd_use = kd_eff;
    end else begin
      kp_use = kp;     ki_use = ki;     kd_use = kd;
    end
  end

  pid_incremental u_pid_core (
    .clk, .rst_n, .in_valid(a_valid), .e(e_d),
    .kp(kp_use), .ki(ki_use), .kd(kd_use),
    .u(u_pid), .out_valid(p_valid), .sat_hi, .sat_lo
  );

  switching_hybrid u_switch (
    .type_ii(mode == MODE_SWITCH_II), .e(e_dd), .vref_code,
    .u_pid, .u_anfis, .u(u_sw), .pid_sel(sw_pid)
  );

  arithmetic_hybrid u_arith (
    .product(mode == MODE_PRODUCT), .u_anfis, .u_pid, .u(u_ar), .clipped(ar_clip)
  );

  // Error samples travel along with the pipeline.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      e_d  <= '0;
      e_dd <= '0;
    end else begin
      if (e_valid) e_d  <= e;
      if (a_valid) e_dd <= e_d;
    end
  end

  // Output stage: mode multiplexer and duty quantiser.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      u          <= U_MIN;
      duty       <= '0;
      duty_valid <= 1'b0;
      pid_sel    <= 1'b0;
      clipped    <= 1'b0;
      pid_sat    <= 1'b0;
    end else begin
      duty_valid <= p_valid;
      if (p_valid) begin
        unique case (mode)
          MODE_SWITCH_I, MODE_SWITCH_II: begin
            u    <= u_sw;
            duty <= duty_t'(u_sw >>> (U_FRAC - DUTY_W));
          end
          MODE_SUM, MODE_PRODUCT: begin
            u    <= u_ar;
            duty <= duty_t'(u_ar >>> (U_FRAC - DUTY_W));
          end
          default: begin
            u    <= u_pid;
            duty <= duty_t'(u_pid >>> (U_FRAC - DUTY_W));
          end
        endcase
        pid_sel <= (mode == MODE_SWITCH_I || mode == MODE_SWITCH_II) && sw_pid;
        clipped <= (mode == MODE_SUM || mode == MODE_PRODUCT) && ar_clip;
        pid_sat <= sat_hi || sat_lo;
      end
    end
  end

  // A new sample must not enter before the previous one has left the pipeline.
  a_spacing: assert property (@(posedge clk) disable iff (!rst_n)
                              e_valid |-> !a_valid && !p_valid);

endmodule
