// differentiator -- backward difference of the error for the second ANFIS input.
//
// de = e - e_prev is combinational; e_prev is loaded with e on every clock where en is
// high, so de is the change of the error from the previous sample to the current one
// (the discrete d/dt of the thesis with Ts folded into the ANFIS scaling). The result is
// one bit wider than the input, so it never overflows. e_prev resets to zero.
// In the thesis the differentiator sits in front of the ANFIS (block diagrams) and was
// folded into the ANFIS block in the HDL; here it is a submodule of the ANFIS.
module differentiator #(
  parameter int W = 9                   // input width
) (
  input  logic                clk,
  input  logic                rst_n,    // synchronous, active low
  input  logic                en,       // a new sample is present on x
  input  logic signed [W-1:0] x,
  output logic signed [W:0]   dx        // x - previous sampled x
);

  logic signed [W-1:0] x_prev;

  always_ff @(posedge clk) begin
    if (!rst_n)  x_prev <= '0;
    else if (en) x_prev <= x;
  end

  assign dx = (W+1)'(x) - (W+1)'(x_prev);

endmodule
