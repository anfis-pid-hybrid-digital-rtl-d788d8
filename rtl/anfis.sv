// anfis -- two-input, first-order Sugeno ANFIS controller with four output channels.
//
// Inputs are the error e and its change de (from the built-in differentiator). The five
// layers of the thesis are evaluated in one clock whenever in_valid is high:
//   1. fuzzification: three triangular sets per input (anfis_mf, Eq. 3.11);
//   2. rule strength: w_k = mu_e(i) * mu_de(j) for the nine rules k = 3*i + j;
//   3. normalisation: w_k / sum(w);
//   4. consequents:   f_k = p*e + q*de + r, p/q/r read from the knowledge base;
//   5. summation:     y = sum(w_k * f_k) / sum(w)  (normalisation folded into one divide).
// Channel 0 is the required rate of change of the duty (the thesis' ANFIS output); it is
// accumulated into u_anfis, which saturates to [U_MIN, U_MAX]. Channels 1..3 are the
// signed gain corrections dKp, dKi, dKd of the ANFIS-driven PID (Eq. 3.20) and are
// registered, saturated to the gain width. Sharing layers 1-3 between the four channels,
// the single divide and the accumulator are this design's choices. The thesis' own HDL
// used a comparator decision tree over a trained look-up table; its training data is
// not available, so the knowledge base starts from the preset in anfis_pid_pkg and can
// be rewritten through the kb_* port.
// Timing: outputs and out_valid are registered, one clock after in_valid. The divide is
// combinational; at 100 MHz with a 10 MHz sample rate it may be treated as a multicycle
// path since inputs are stable between samples.
module anfis
  import anfis_pid_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,        // synchronous, active low
  input  logic             in_valid,     // new error sample
  input  err_t             e,
  // knowledge base write port (offline-trained data)
  input  logic             kb_we,
  input  logic [KB_AW-1:0] kb_addr,
  input  kb_word_t         kb_data,
  output ctrl_t            u_anfis,      // accumulated ANFIS duty command
  output gain_t            dk [3],       // dKp, dKi, dKd
  output logic             out_valid
);

  localparam int W_W   = 2 * MU_W;              // rule strength width (unsigned)
  localparam int WS_W  = W_W + $clog2(NRULE);   // sum of strengths
  localparam int F_W   = KB_DW + DE_W + 2;      // consequent value
  localparam int ACC_W = F_W + W_W + $clog2(NRULE) + 1;

  derr_t    de;
  mu_t      mu_e [NMF];
  mu_t      mu_d [NMF];
  kb_word_t kbw  [KB_DEPTH];

  differentiator #(.W(ERR_W)) u_diff (
    .clk, .rst_n, .en(in_valid), .x(e), .dx(de)
  );

  anfis_mf #(.W(ERR_W), .N(NMF), .A(E_A), .B(E_B), .C(E_C)) u_mf_e (.x(e),  .mu(mu_e));
  anfis_mf #(.W(DE_W),  .N(NMF), .A(D_A), .B(D_B), .C(D_C)) u_mf_d (.x(de), .mu(mu_d));

  anfis_kb u_kb (
    .clk, .rst_n, .wr_en(kb_we), .wr_addr(kb_addr), .wr_data(kb_data), .words(kbw)
  );

  // Layers 2-5.
  logic        [W_W-1:0]  w    [NRULE];
  logic        [WS_W-1:0] wsum;
  logic signed [ACC_W-1:0] y   [NCH];

  always_comb begin
    logic signed [F_W-1:0]   f;
    logic signed [ACC_W-1:0] num;
    wsum = '0;
    for (int k = 0; k < NRULE; k++) begin
      w[k] = W_W'(mu_e[k / NMF]) * W_W'(mu_d[k % NMF]);
      wsum = wsum + WS_W'(w[k]);
    end
    for (int ch = 0; ch < NCH; ch++) begin
      num = '0;
      for (int k = 0; k < NRULE; k++) begin
        f = F_W'(kbw[kb_index(ch, k, 0)]) * F_W'(e)
          + F_W'(kbw[kb_index(ch, k, 1)]) * F_W'(de)
          + F_W'(kbw[kb_index(ch, k, 2)]);
        num = num + ACC_W'(f) * $signed({1'b0, w[k]});
      end
      if (wsum == '0) y[ch] = '0;
      else            y[ch] = num / ACC_W'($signed({1'b0, wsum}));
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      u_anfis   <= U_MIN;
      dk        <= '{default: '0};
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        u_anfis <= sat_ctrl(64'(u_anfis) + 64'(y[0]), U_MIN, U_MAX);
        for (int i = 0; i < 3; i++) dk[i] <= sat_gain(64'(y[i+1]));
      end
    end
  end

endmodule
