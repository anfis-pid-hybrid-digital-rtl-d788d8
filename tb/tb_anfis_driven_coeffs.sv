// tb_anfis_driven_coeffs -- random base gains and ANFIS corrections; each effective gain
// must be K + dK (Eq. 3.20), saturated to the signed 16-bit range, which the test drives
// into at both ends.
module tb_anfis_driven_coeffs;
  import anfis_pid_pkg::*;
  import anfis_ref_pkg::*;

  gain_t kp, ki, kd, kp_eff, ki_eff, kd_eff;
  gain_t dk [3];
  int checks = 0, failures = 0;

  anfis_driven_coeffs dut (.*);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      kp = gain_t'($urandom); ki = gain_t'($urandom); kd = gain_t'($urandom);
      for (int i = 0; i < 3; i++) dk[i] = gain_t'($urandom);
      #1;
      checks += 3;
      if (longint'(kp_eff) != clamp(longint'(kp) + longint'(dk[0]), -32768, 32767)) failures++;
      if (longint'(ki_eff) != clamp(longint'(ki) + longint'(dk[1]), -32768, 32767)) failures++;
      if (longint'(kd_eff) != clamp(longint'(kd) + longint'(dk[2]), -32768, 32767)) failures++;
    end
    // hand-worked: 1000 + (-300) = 700; 30000 + 10000 saturates to 32767
    kp = 1000; dk[0] = -300; ki = 30000; dk[1] = 10000; kd = -30000; dk[2] = -10000; #1;
    checks++;
    if (kp_eff != 700 || ki_eff != 32767 || kd_eff != -32768) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
