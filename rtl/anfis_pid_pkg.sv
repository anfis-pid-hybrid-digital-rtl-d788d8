// anfis_pid_pkg -- widths, number formats, types and preset constants shared by the
// ANFIS-PID hybrid buck controller.
//
// Number formats (all two's complement unless noted):
//   * ADC code            : ADC_W = 8 bits, unsigned (8-bit ADC of the thesis tables).
//   * error e             : ERR_W = 9 bits signed, in ADC LSBs (e = vref - vout).
//   * error difference de : DE_W  = 10 bits signed, in ADC LSBs per sample.
//   * controller value U  : U_W = 28 bits signed, U_FRAC = 24 fraction bits, so a duty
//                           cycle of 1.0 is 2**24. PID output, ANFIS output and the
//                           hybrid results all use this format.
//   * gain K              : K_W = 16 bits signed, in units of 2**-24 duty per ADC LSB
//                           (Ki already contains the sampling time Ts of Eq. 3.10).
//   * membership degree   : MU_W = 9 bits unsigned, 256 = 1.0.
//   * duty command        : DUTY_W = 9 bits unsigned (the 9-bit DPWM / delta-sigma).
// The 8-bit ADC, 9-bit modulators and the 10 MHz / 100 MHz clock ratio follow the thesis;
// the fixed-point formats, the duty limit and the preset knowledge base are this design's
// own choices (the trained ANFIS data of the thesis is not published).
package anfis_pid_pkg;

  localparam int ADC_W  = 8;
  localparam int ERR_W  = 9;
  localparam int DE_W   = 10;
  localparam int U_W    = 28;
  localparam int U_FRAC = 24;
  localparam int K_W    = 16;
  localparam int MU_W   = 9;
  localparam int MU_ONE = 256;
  localparam int DUTY_W = 9;

  // Controller output limits: duty between 0 and 0.8 (the switching-duty plots saturate
  // at 0.8).
  localparam logic signed [U_W-1:0] U_MIN = '0;
  localparam logic signed [U_W-1:0] U_MAX = U_W'(13421773);   // 0.8 * 2**24

  // ANFIS structure: two inputs (e, de), three triangular sets per input, nine rules,
  // four output channels (duty rate, dKp, dKi, dKd).
  localparam int NMF    = 3;
  localparam int NRULE  = NMF * NMF;
  localparam int NCH    = 4;
  localparam int NCOEF  = 3;                        // p, q, r of a first-order consequent
  localparam int KB_DEPTH = NCH * NRULE * NCOEF;    // 108 words
  localparam int KB_AW  = $clog2(KB_DEPTH);
  localparam int KB_DW  = 16;

  typedef logic signed [ERR_W-1:0] err_t;
  typedef logic signed [DE_W-1:0]  derr_t;
  typedef logic signed [U_W-1:0]   ctrl_t;
  typedef logic signed [K_W-1:0]   gain_t;
  typedef logic [MU_W-1:0]         mu_t;
  typedef logic [DUTY_W-1:0]       duty_t;
  typedef logic signed [KB_DW-1:0] kb_word_t;

  // Which hybrid drives the converter.
  typedef enum logic [2:0] {
    MODE_SWITCH_I  = 3'd0,   // |e| <= 10% of vref -> PID, else ANFIS (Eq. 3.13)
    MODE_SWITCH_II = 3'd1,   // |e| >  10% of vref -> PID, else ANFIS (Eq. 3.15)
    MODE_SUM       = 3'd2,   // U_ANFIS + U_PID                       (Eq. 3.16)
    MODE_PRODUCT   = 3'd3,   // U_ANFIS * U_PID                       (Eq. 3.18)
    MODE_DRIVEN    = 3'd4    // PID with gains K + dK_ANFIS           (Eq. 3.20)
  } hybrid_mode_t;

  typedef enum logic {
    DAC_DPWM  = 1'b0,
    DAC_DSIG  = 1'b1
  } dac_sel_t;

  // Triangular membership sets (a, b, c of Eq. 3.11), in ADC LSBs. a == b makes a left
  // shoulder (degree 1 below b), b == c a right shoulder. Sets N, Z, P.
  localparam int E_A [NMF] = '{-40, -40,   0};
  localparam int E_B [NMF] = '{-40,   0,  40};
  localparam int E_C [NMF] = '{  0,  40,  40};
  localparam int D_A [NMF] = '{-20, -20,   0};
  localparam int D_B [NMF] = '{-20,   0,  20};
  localparam int D_C [NMF] = '{  0,  20,  20};

  // Knowledge base word address: ((channel * NRULE) + rule) * 3 + coef, coef 0=p,1=q,2=r.
  // Rule index = i_e * NMF + i_de.
  function automatic int kb_index(int ch, int rule, int coef);
    return (ch * NRULE + rule) * NCOEF + coef;
  endfunction

  // Preset consequents loaded at reset (stand-in for offline training data).
  //   channel 0 (duty rate): an incremental PI surface, stronger for large errors:
  //            p = 300 (outer error sets) or 150 (Z), q = 1500, r = 0.
  //   channels 1..3 (dKp, dKi, dKd): raise Kp, Ki and Kd while the error is large,
  //            zero around the set point.
  function automatic kb_word_t kb_preset(int addr);
    int ch, rule, coef, ie;
    ch   = addr / (NRULE * NCOEF);
    rule = (addr / NCOEF) % NRULE;
    coef = addr % NCOEF;
    ie   = rule / NMF;
    case (ch)
      0: case (coef)
           0: return (ie == 1) ? kb_word_t'(150) : kb_word_t'(300);
           1: return kb_word_t'(1500);
           default: return '0;
         endcase
      1: return (coef == 2 && ie != 1) ? kb_word_t'(2000) : '0;
      2: return (coef == 2 && ie != 1) ? kb_word_t'(20)   : '0;
      default: return (coef == 2 && ie != 1) ? kb_word_t'(1000) : '0;
    endcase
  endfunction

  // Saturate a wide signed value into the controller range [lo, hi].
  function automatic ctrl_t sat_ctrl(logic signed [63:0] x, ctrl_t lo, ctrl_t hi);
    if (x > 64'(hi)) return hi;
    if (x < 64'(lo)) return lo;
    return ctrl_t'(x);
  endfunction

  // Saturate a wide signed value into a gain word.
  function automatic gain_t sat_gain(logic signed [63:0] x);
    if (x > 64'sd32767)  return gain_t'(16'sh7fff);
    if (x < -64'sd32768) return gain_t'(16'sh8000);
    return gain_t'(x);
  endfunction

endpackage
