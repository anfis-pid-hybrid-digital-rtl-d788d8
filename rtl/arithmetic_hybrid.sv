// arithmetic_hybrid -- the summing and product ANFIS-PID hybrids.
//
//   Summing (Eq. 3.16): U = U_ANFIS + U_PID
//   Product (Eq. 3.18): U = U_ANFIS * U_PID
// Both are signed, as the thesis requires. With the controller format (2**24 = 1.0) the
// product is the full 56-bit signed product shifted right by 24 (arithmetic shift, so it
// rounds toward minus infinity); the ANFIS output then scales the PID output as a gain.
// The result is saturated to the duty window [U_MIN, U_MAX] and clipped reports that it
// had to be. Purely combinational; the thesis used vendor signed adder / multiplier
// cores here, this is plain RTL for the same operations.
module arithmetic_hybrid
  import anfis_pid_pkg::*;
(
  input  logic  product,    // 0: summing hybrid, 1: product hybrid
  input  ctrl_t u_anfis,
  input  ctrl_t u_pid,
  output ctrl_t u,
  output logic  clipped
);

  logic signed [2*U_W-1:0] prod;
  logic signed [63:0]      raw;

  always_comb begin
    prod = (2*U_W)'(u_anfis) * (2*U_W)'(u_pid);
    if (product) raw = 64'(prod >>> U_FRAC);
    else         raw = 64'(u_anfis) + 64'(u_pid);
    u       = sat_ctrl(raw, U_MIN, U_MAX);
    clipped = raw > 64'(U_MAX) || raw < 64'(U_MIN);
  end

endmodule
