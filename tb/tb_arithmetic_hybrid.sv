// tb_arithmetic_hybrid -- random controller outputs (in and beyond the duty window) for
// the summing (Eq. 3.16) and product (Eq. 3.18) hybrids; the reference is 64-bit
// integer arithmetic with the product scaled by 2**-24 (floor) and the result limited to
// [0, 0.8]. Includes hand-worked products: 0.5 * 0.5 = 0.25, 0.75 * 0.5 = 0.375.
module tb_arithmetic_hybrid;
  import anfis_pid_pkg::*;
  import anfis_ref_pkg::*;

  logic product;
  ctrl_t u_anfis, u_pid, u;
  logic clipped;
  int checks = 0, failures = 0, n_clip = 0;

  arithmetic_hybrid dut (.*);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    longint raw, q;
    product = 1; u_anfis = 28'sd8388608; u_pid = 28'sd8388608; #1;     // 0.5 * 0.5
    check(u == 28'sd4194304, "0.5*0.5");
    u_anfis = 28'sd12582912; #1;                                        // 0.75 * 0.5
    check(u == 28'sd6291456, "0.75*0.5");
    product = 0; #1;                                                    // 1.25 -> 0.8
    check(u == ctrl_t'(UMAX) && clipped, "sum clips at 0.8");
    for (int n = 0; n < 20000; n++) begin
      product = n[0];
      u_anfis = ctrl_t'(int'($urandom % 40000000) - 10000000);
      u_pid   = ctrl_t'(int'($urandom % 40000000) - 10000000);
      #1;
      if (product) begin
        q   = longint'(u_anfis) * longint'(u_pid);
        raw = (q >= 0) ? q / 16777216 : -((-q + 16777215) / 16777216);  // floor
      end else begin
        raw = longint'(u_anfis) + longint'(u_pid);
      end
      check(longint'(u) == clamp(raw, 0, UMAX) && clipped == (raw < 0 || raw > UMAX),
            $sformatf("product=%0d a=%0d b=%0d u=%0d exp=%0d", product, u_anfis, u_pid, u,
                      clamp(raw, 0, UMAX)));
      n_clip += int'(clipped);
    end
    check(n_clip > 0 && n_clip < 20000, "some results clipped, some not");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
