// anfis_driven_coeffs -- gain adjustment of the ANFIS-driven PID (Eq. 3.20).
//
// Forms the effective PID gains K + dK_ANFIS for the proportional, integral and
// derivative terms from the fixed base gains and the three signed ANFIS outputs. The
// sums saturate to the 16-bit gain range (this design's choice; the thesis does not say
// what happens on overflow). Purely combinational.
module anfis_driven_coeffs
  import anfis_pid_pkg::*;
(
  input  gain_t kp,
  input  gain_t ki,
  input  gain_t kd,
  input  gain_t dk [3],       // dKp, dKi, dKd from the ANFIS
  output gain_t kp_eff,
  output gain_t ki_eff,
  output gain_t kd_eff
);

  always_comb begin
    kp_eff = sat_gain(64'(kp) + 64'(dk[0]));
    ki_eff = sat_gain(64'(ki) + 64'(dk[1]));
    kd_eff = sat_gain(64'(kd) + 64'(dk[2]));
  end

endmodule
