// tb_pid_incremental -- random error samples and random gains (changed every sample, as
// the ANFIS-driven hybrid does), gaps between samples, and checks every update against
// Eq. 3.10 with saturation to [0, 0.8] computed in 64-bit integers. Also checks the
// one-clock latency of out_valid, that U holds between samples, and that both
// saturation limits were reached.
module tb_pid_incremental;
  import anfis_pid_pkg::*;
  import anfis_ref_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0;
  err_t e = 0;
  gain_t kp = 0, ki = 0, kd = 0;
  ctrl_t u;
  logic out_valid, sat_hi, sat_lo;
  int checks = 0, failures = 0, n_hi = 0, n_lo = 0;
  longint ref_u = 0, e1 = 0, e2 = 0;

  pid_incremental dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    longint du, raw;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      // bias the error so U wanders over the whole range
      e  = err_t'((n % 800 < 400) ? ($urandom % 120) - 20 : ($urandom % 120) - 100);
      kp = gain_t'($urandom % 20000);
      ki = gain_t'($urandom % 3000);
      kd = gain_t'(int'($urandom % 20000) - 10000);
      in_valid = 1;
      du  = longint'(kp) * (longint'(e) - e1) + longint'(ki) * longint'(e)
          + longint'(kd) * (longint'(e) - 2 * e1 + e2);
      raw = ref_u + du;
      ref_u = clamp(raw, 0, UMAX);
      e2 = e1; e1 = longint'(e);
      @(posedge clk); #1;
      in_valid = 0;
      check(out_valid == 1, "out_valid one clock after in_valid");
      check(longint'(u) == ref_u, $sformatf("n=%0d u=%0d exp=%0d", n, u, ref_u));
      check(sat_hi == (raw > UMAX) && sat_lo == (raw < 0), "saturation flags");
      n_hi += int'(sat_hi); n_lo += int'(sat_lo);
      repeat ($urandom % 3) begin
        @(posedge clk); #1;
        check(out_valid == 0 && longint'(u) == ref_u, "U holds between samples");
      end
    end
    check(n_hi > 0 && n_lo > 0, $sformatf("both limits reached (hi %0d lo %0d)", n_hi, n_lo));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
