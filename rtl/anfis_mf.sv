// anfis_mf -- ANFIS layer 1: fuzzification of one input with triangular sets.
//
// For each of the N sets the degree of membership of x is evaluated with Eq. 3.11 of
// the thesis:  0 for x <= a,  (x-a)/(b-a) for a <= x <= b,  (c-x)/(c-b) for b <= x <= c,
// and 0 for x >= c. Comparators pick the segment and a constant-divisor scaling gives the
// slope, so the set corners are elaboration-time parameters (offline training fixes
// them). Degrees are unsigned with MU_ONE (256) meaning 1.0. As this design's own
// extension, a set with a == b is a left shoulder (degree 1 for every x <= b) and one
// with b == c a right shoulder, so inputs beyond the outer sets stay covered.
// Purely combinational.
module anfis_mf
  import anfis_pid_pkg::*;
#(
  parameter int W     = ERR_W,          // input width (signed)
  parameter int N     = NMF,            // number of sets
  parameter int A [N] = E_A,            // left feet
  parameter int B [N] = E_B,            // peaks
  parameter int C [N] = E_C             // right feet
) (
  input  logic signed [W-1:0] x,
  output mu_t                 mu [N]
);

  for (genvar i = 0; i < N; i++) begin : g_set
    initial begin
      assert (A[i] <= B[i] && B[i] <= C[i] && A[i] < C[i])
        else $error("anfis_mf: set %0d corners out of order", i);
    end

    always_comb begin
      int xv;
      xv = int'(x);
      if (A[i] == B[i] && xv <= B[i])
        mu[i] = mu_t'(MU_ONE);
      else if (B[i] == C[i] && xv >= B[i])
        mu[i] = mu_t'(MU_ONE);
      else if (xv <= A[i] || xv >= C[i])
        mu[i] = '0;
      else if (xv <= B[i])
        mu[i] = mu_t'(((xv - A[i]) * MU_ONE) / (B[i] - A[i]));
      else
        mu[i] = mu_t'(((C[i] - xv) * MU_ONE) / (C[i] - B[i]));
    end
  end

endmodule
