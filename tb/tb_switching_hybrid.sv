// tb_switching_hybrid -- random errors, references and controller outputs for both
// types; the expected choice follows Eq. 3.13 (Type I) and Eq. 3.15 (Type II) with the
// threshold 10% of the reference, including errors exactly at the threshold.
module tb_switching_hybrid;
  import anfis_pid_pkg::*;

  logic type_ii;
  err_t e;
  logic [7:0] vref_code;
  ctrl_t u_pid, u_anfis, u;
  logic pid_sel;
  int checks = 0, failures = 0, n_pid = 0, n_anfis = 0;

  switching_hybrid dut (.*);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int mag, thr;
      bit exp_pid;
      type_ii   = n[0];
      vref_code = 8'($urandom);
      thr       = int'(vref_code) / 10;            // 10 % of the reference
      case (n % 4)
        0: e = err_t'(thr);                        // exactly at the threshold
        1: e = err_t'(-thr - 1);                   // just above it
        default: e = err_t'($urandom);
      endcase
      u_pid   = ctrl_t'($urandom);
      u_anfis = ctrl_t'($urandom);
      #1;
      mag     = (int'(e) < 0) ? -int'(e) : int'(e);
      exp_pid = type_ii ? (mag > thr) : (mag <= thr);
      checks++;
      if (pid_sel != exp_pid || u != (exp_pid ? u_pid : u_anfis)) begin
        failures++;
        $display("FAIL type_ii=%0d e=%0d vref=%0d pid_sel=%0d", type_ii, e, vref_code, pid_sel);
      end
      if (exp_pid) n_pid++; else n_anfis++;
    end
    checks++;
    if (n_pid == 0 || n_anfis == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
