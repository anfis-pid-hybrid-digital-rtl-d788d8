// buck_plant_model -- behavioural model (not synthesizable) of the synchronous buck power
// stage and its output-voltage ADC, for closed-loop testbenches.
//
// Power stage: ideal complementary switches (gate = 1 connects the inductor to VIN,
// gate = 0 to ground), inductor L with series resistance RL, capacitor C with series
// resistance RC, resistive load R. Values are those of the thesis' simulation setup:
// 3.3 V in, 1 uH / 20 mOhm, 2 uF / 20 mOhm. The state equations are integrated with a
// forward-Euler step of one clock period (TSTEP, 10 ns at 100 MHz). heavy selects the
// load: R_LIGHT (0.5 A at 1.2 V) or R_HEAVY (2 A). discharge empties L and C at once
// (a fresh start-up).
// ADC: on each sample strobe the output voltage is converted to an 8-bit code,
// round(vout / VFS * 256), clipped to 0..255; the code appears one clock later and is
// held. VFS = 2.4 V puts the 1.2 V target at code 128 (the ADC range is this model's
// assumption). vout_mv gives the output voltage in millivolts for checking.
module buck_plant_model #(
  parameter real VIN     = 3.3,
  parameter real L       = 1.0e-6,
  parameter real RL      = 0.020,
  parameter real C       = 2.0e-6,
  parameter real RC      = 0.020,
  parameter real R_LIGHT = 2.4,
  parameter real R_HEAVY = 0.6,
  parameter real VFS     = 2.4,
  parameter real TSTEP   = 10.0e-9
) (
  input  logic       clk,
  input  logic       gate,
  input  logic       heavy,
  input  logic       discharge,
  input  logic       adc_sample,
  output logic [7:0] adc_code,
  output int         vout_mv,
  output int         il_ma
);

  real il = 0.0, vc = 0.0, vout = 0.0;

  initial adc_code = '0;

  always @(posedge clk) begin
    real r, vsw, dil, dvc, code;
    if (discharge) begin
      il = 0.0;
      vc = 0.0;
    end
    r    = heavy ? R_HEAVY : R_LIGHT;
    vsw  = gate ? VIN : 0.0;
    vout = r * (vc + RC * il) / (r + RC);
    dil  = (vsw - RL * il - vout) / L;
    dvc  = (il - vout / r) / C;
    il   = il + dil * TSTEP;
    vc   = vc + dvc * TSTEP;
    vout = r * (vc + RC * il) / (r + RC);
    if (adc_sample) begin
      code = vout / VFS * 256.0 + 0.5;
      if (code < 0.0) code = 0.0;
      if (code > 255.0) code = 255.0;
      adc_code <= 8'($rtoi(code));
    end
    vout_mv = $rtoi(vout * 1000.0);
    il_ma   = $rtoi(il * 1000.0);
  end

endmodule
