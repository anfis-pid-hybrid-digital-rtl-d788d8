// tb_hybrid_controller -- runs all five hybrid modes in turn (changing mode every 60
// samples, so state carries across switches) on random error sequences and compares the
// output u, the 9-bit duty and the status flags with a reference built from the ANFIS
// and PID equations and the hybrid definitions (Eq. 3.13, 3.15, 3.16, 3.18, 3.20). Also
// checks the three-clock latency from e_valid to duty_valid and counts that each mode,
// both switch positions, arithmetic clipping and PID saturation all occurred.
module tb_hybrid_controller;
  import anfis_pid_pkg::*;
  import anfis_ref_pkg::*;

  logic clk = 0, rst_n = 0, e_valid = 0, kb_we = 0;
  err_t e = 0;
  hybrid_mode_t mode = MODE_SWITCH_I;
  logic [7:0] vref_code = 128;
  gain_t kp = 6000, ki = 300, kd = 2000;
  logic [KB_AW-1:0] kb_addr = 0;
  kb_word_t kb_data = 0;
  ctrl_t u;
  duty_t duty;
  logic duty_valid, pid_sel, clipped, pid_sat;
  int checks = 0, failures = 0;
  int n_mode [5] = '{default: 0};
  int n_pid_sel = 0, n_anfis_sel = 0, n_clip = 0, n_sat = 0;

  longint kb [108];
  longint ua = 0, up = 0, ep = 0, e1 = 0, e2 = 0;
  int ea[3] = E_A, eb[3] = E_B, ec[3] = E_C, da[3] = D_A, db[3] = D_B, dc[3] = D_C;

  hybrid_controller dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    longint de, y0, dk0, dk1, dk2, kpu, kiu, kdu, raw, q, uref, thr, mag, du;
    bit sel, clip_exp, sat_exp;
    for (int i = 0; i < 108; i++) kb[i] = kb_default(i);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      mode = hybrid_mode_t'((n / 60) % 5);
      ki = (mode == MODE_SUM) ? gain_t'(6000) : gain_t'(300);
      vref_code = 8'(100 + ($urandom % 100));
      e = err_t'((n % 120 < 60) ? int'($urandom % 61) - 20 : int'($urandom % 61) - 40);
      if (n % 200 > 190) e = err_t'(int'($urandom % 400) - 200);
      if (mode == MODE_SUM && (n % 60) < 25) e = err_t'(40 + int'($urandom % 30));
      // reference
      de  = longint'(e) - ep; ep = longint'(e);
      y0  = sugeno(e, de, 0, kb, ea, eb, ec, da, db, dc);
      dk0 = clamp(sugeno(e, de, 1, kb, ea, eb, ec, da, db, dc), -32768, 32767);
      dk1 = clamp(sugeno(e, de, 2, kb, ea, eb, ec, da, db, dc), -32768, 32767);
      dk2 = clamp(sugeno(e, de, 3, kb, ea, eb, ec, da, db, dc), -32768, 32767);
      ua  = clamp(ua + y0, 0, UMAX);
      kpu = kp; kiu = ki; kdu = kd;
      if (mode == MODE_DRIVEN) begin
        kpu = clamp(kp + dk0, -32768, 32767);
        kiu = clamp(ki + dk1, -32768, 32767);
        kdu = clamp(kd + dk2, -32768, 32767);
      end
      du  = kpu * (longint'(e) - e1) + kiu * longint'(e) + kdu * (longint'(e) - 2 * e1 + e2);
      sat_exp = (up + du > UMAX) || (up + du < 0);
      up  = clamp(up + du, 0, UMAX);
      e2 = e1; e1 = longint'(e);
      thr = longint'(vref_code) / 10;
      mag = (e < 0) ? -longint'(e) : longint'(e);
      clip_exp = 0; sel = 0;
      case (mode)
        MODE_SWITCH_I:  begin sel = (mag <= thr); uref = sel ? up : ua; end
        MODE_SWITCH_II: begin sel = (mag > thr);  uref = sel ? up : ua; end
        MODE_SUM:       begin raw = ua + up; clip_exp = raw > UMAX; uref = clamp(raw, 0, UMAX); end
        MODE_PRODUCT:   begin q = ua * up; raw = q / 16777216; uref = clamp(raw, 0, UMAX); end
        default:        uref = up;
      endcase
      // drive one sample and wait for the result
      e_valid = 1;
      @(posedge clk); #1;
      e_valid = 0;
      repeat (2) begin
        check(duty_valid == 0, "duty_valid too early");
        @(posedge clk); #1;
      end
      check(duty_valid == 1, "duty_valid three clocks after e_valid");
      check(longint'(u) == uref, $sformatf("n=%0d mode=%0d u=%0d exp=%0d", n, mode, u, uref));
      check(longint'(duty) == uref / 32768, $sformatf("duty=%0d exp=%0d", duty, uref / 32768));
      check(pid_sel == sel, "pid_sel");
      check(mode == MODE_PRODUCT || clipped == clip_exp, "clipped");
      check(pid_sat == sat_exp, "pid_sat");
      n_mode[int'(mode)]++;
      if (mode == MODE_SWITCH_I || mode == MODE_SWITCH_II) begin
        if (pid_sel) n_pid_sel++; else n_anfis_sel++;
      end
      n_clip += int'(clipped); n_sat += int'(pid_sat);
      repeat (int'($urandom % 5)) @(posedge clk);
      #1;
    end
    foreach (n_mode[m]) check(n_mode[m] > 0, $sformatf("mode %0d never ran", m));
    check(n_pid_sel > 0 && n_anfis_sel > 0, "switching hybrids used both controllers");
    check(n_clip > 0, "arithmetic clipping never happened");
    check(n_sat > 0, "PID saturation never happened");
    $display("modes %0d %0d %0d %0d %0d, pid_sel %0d anfis_sel %0d, clip %0d, sat %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_mode[4], n_pid_sel, n_anfis_sel,
             n_clip, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
