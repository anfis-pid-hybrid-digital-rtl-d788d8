// error_adder -- the signed adder that forms the controller's error signal.
//
// On every ADC sample strobe (sample_en) it registers e = vref_code - adc_code as a
// 9-bit signed number in ADC LSBs and raises e_valid for one clock. Both operands are
// 8-bit unsigned codes, so the result cannot overflow. The thesis describes this block
// only as "a simple signed adder"; registering it on the sample strobe is this design's
// choice. Latency: e and e_valid appear one clock after sample_en.
module error_adder
  import anfis_pid_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,       // synchronous, active low
  input  logic             sample_en,   // ADC sample strobe
  input  logic [ADC_W-1:0] adc_code,    // measured output voltage
  input  logic [ADC_W-1:0] vref_code,   // desired output voltage
  output err_t             e,           // vref_code - adc_code
  output logic             e_valid
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      e       <= '0;
      e_valid <= 1'b0;
    end else begin
      e_valid <= sample_en;
      if (sample_en)
        e <= err_t'($signed({1'b0, vref_code}) - $signed({1'b0, adc_code}));
    end
  end

endmodule
