// pid_incremental -- discrete PID in velocity (incremental) form, Eq. 3.10 of the thesis:
//
//   U[n] = U[n-1] + Kp*(e[n] - e[n-1]) + Ki*e[n] + Kd*(e[n] - 2e[n-1] + e[n-2])
//
// where Ki already contains the sampling time Ts. The gains are inputs, not parameters,
// so the ANFIS-driven hybrid can change them every sample (Eq. 3.20). U is kept in the
// controller format (2**24 = duty 1.0) and saturated to [U_MIN, U_MAX]; saturating the
// accumulated output is also what keeps the integral from winding up. The saturation
// and the reset of U and the error history to zero are this design's choices.
// Timing: on a clock with in_valid high the new U is registered and out_valid rises one
// clock later; the error history shifts at the same time. sat_hi / sat_lo flag an update
// that hit a limit.
module pid_incremental
  import anfis_pid_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,          // synchronous, active low
  input  logic  in_valid,
  input  err_t  e,
  input  gain_t kp,
  input  gain_t ki,             // Ki * Ts
  input  gain_t kd,
  output ctrl_t u,
  output logic  out_valid,
  output logic  sat_hi,
  output logic  sat_lo
);

  localparam int D_W = ERR_W + 3;       // room for e - 2e1 + e2
  localparam int S_W = D_W + K_W + 3;   // sum of three products

  err_t e1, e2;                         // e[n-1], e[n-2]
  logic signed [D_W-1:0] d1, d2;
  logic signed [S_W-1:0] du;
  logic signed [63:0]    u_next;

  always_comb begin
    d1 = D_W'(e) - D_W'(e1);
    d2 = D_W'(e) - (D_W'(e1) <<< 1) + D_W'(e2);
    du = S_W'(kp) * S_W'(d1) + S_W'(ki) * S_W'(e) + S_W'(kd) * S_W'(d2);
    u_next = 64'(u) + 64'(du);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      u         <= U_MIN;
      e1        <= '0;
      e2        <= '0;
      out_valid <= 1'b0;
      sat_hi    <= 1'b0;
      sat_lo    <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        u      <= sat_ctrl(u_next, U_MIN, U_MAX);
        sat_hi <= u_next > 64'(U_MAX);
        sat_lo <= u_next < 64'(U_MIN);
        e2     <= e1;
        e1     <= e;
      end
    end
  end

  // The output never leaves the saturation window.
  a_u_range: assert property (@(posedge clk) disable iff (!rst_n) u >= U_MIN && u <= U_MAX);

endmodule
