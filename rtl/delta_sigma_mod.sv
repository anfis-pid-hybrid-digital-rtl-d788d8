// delta_sigma_mod -- single-bit delta-sigma modulator used as the converter's DAC.
//
// Built from difference stages, adders, registers and a comparator, as the thesis
// describes. The N-bit unsigned input is first centred, x = in - 2**(N-1), and the
// one-bit output is fed back as +/-2**(N-1). For ORDER = 1 this is exactly the
// conventional loop of the thesis' block diagram:
//     s1 <= s1 + (x - fb);       out = (s1 >= 0)
// For ORDER = 2 (default; the thesis uses a second-order modulator) a second
// accumulating stage follows, fed back the same way:
//     s1 <= s1 + (x - fb);  s2 <= s2 + (s1 - fb);  out = (s2 >= 0)
// The comparator reads the last register (its sign), so out is a register bit and
// changes on the clock edge only. The density of ones equals in / 2**N. Both states saturate at
// 2**(N+4) so an out-of-range input cannot wrap them (this design's choice); with
// the duty limited to 0.8 the second-order loop stays well inside that bound.
module delta_sigma_mod #(
  parameter int N     = 9,
  parameter int ORDER = 2
) (
  input  logic         clk,
  input  logic         rst_n,         // synchronous, active low
  input  logic [N-1:0] din,
  output logic         dout
);

  localparam int S_W = N + 6;
  localparam logic signed [S_W-1:0] LIM  = S_W'(1) <<< (N + 4);
  localparam logic signed [S_W-1:0] HALF = S_W'(1) <<< (N - 1);

  logic signed [S_W-1:0] x, fb, s1, s2, s1_next, s2_next;

  function automatic logic signed [S_W-1:0] sat(logic signed [S_W+1:0] v);
    if (v >  (S_W+2)'(LIM)) return LIM;
    if (v < -(S_W+2)'(LIM)) return -LIM;
    return S_W'(v);
  endfunction

  always_comb begin
    x       = $signed(S_W'(din)) - HALF;
    fb      = dout ? HALF : -HALF;
    s1_next = sat((S_W+2)'(s1) + (S_W+2)'(x) - (S_W+2)'(fb));
    s2_next = (ORDER >= 2) ? sat((S_W+2)'(s2) + (S_W+2)'(s1) - (S_W+2)'(fb)) : '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1 <= '0;
      s2 <= '0;
    end else begin
      s1 <= s1_next;
      s2 <= s2_next;
    end
  end

  assign dout = (ORDER >= 2) ? (s2 >= 0) : (s1 >= 0);

  initial assert (ORDER == 1 || ORDER == 2) else $error("delta_sigma_mod: ORDER must be 1 or 2");

endmodule
