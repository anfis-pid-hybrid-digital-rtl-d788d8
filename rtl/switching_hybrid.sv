// switching_hybrid -- the logical (switching) ANFIS-PID hybrids, Types I and II.
//
// The threshold dE is 10% of the reference voltage; the thesis found that value best. It
// is computed here as (vref_code * 205) >> 11, i.e. 0.1001 * vref, rounded down.
//   Type I  (Eq. 3.12/3.13): |e| <= dE -> U_PID,   |e| > dE -> U_ANFIS
//                            (ANFIS handles the transient, PID the steady state)
//   Type II (Eq. 3.14/3.15): |e| >  dE -> U_PID,   |e| <= dE -> U_ANFIS
//                            (priorities reversed)
// The test uses the error magnitude, as the text says. At |e| == dE Type I takes the PID
// (Eq. 3.13's "<="), which is what makes the two types exact complements. Purely
// combinational; pid_sel tells which controller was passed through.
module switching_hybrid
  import anfis_pid_pkg::*;
(
  input  logic             type_ii,    // 0: Type I, 1: Type II
  input  err_t             e,
  input  logic [ADC_W-1:0] vref_code,
  input  ctrl_t            u_pid,
  input  ctrl_t            u_anfis,
  output ctrl_t            u,
  output logic             pid_sel
);

  logic [ERR_W-1:0]     e_abs;
  logic [ADC_W+11-1:0]  thr_full;
  logic [ADC_W-1:0]     thr;
  logic                 small_err;     // the condition C of Eq. 3.12 / 3.14

  always_comb begin
    e_abs     = e[ERR_W-1] ? ERR_W'(-e) : ERR_W'(e);
    thr_full  = (ADC_W+11)'(vref_code) * (ADC_W+11)'(205);
    thr       = ADC_W'(thr_full >> 11);
    small_err = e_abs <= ERR_W'(thr);
    pid_sel   = type_ii ? !small_err : small_err;
    u         = pid_sel ? u_pid : u_anfis;
  end

endmodule
