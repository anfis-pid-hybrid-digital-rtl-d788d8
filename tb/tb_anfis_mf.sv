// tb_anfis_mf -- sweeps every input value through the default error sets and a second
// instance with plain (non-shoulder) triangles such as trimf [3 6 8] scaled by 10, and
// compares each degree with Eq. 3.11 evaluated in the reference package.
module tb_anfis_mf;
  import anfis_pid_pkg::*;
  import anfis_ref_pkg::*;

  localparam int TA [3] = '{30, -100, -60};
  localparam int TB [3] = '{60,  -20,   0};
  localparam int TC [3] = '{80,   50,  90};

  logic signed [8:0] x;
  mu_t mu_d [3];
  mu_t mu_t3 [3];
  int checks = 0, failures = 0;

  anfis_mf #(.W(9), .N(3), .A(E_A), .B(E_B), .C(E_C)) dut_def (.x, .mu(mu_d));
  anfis_mf #(.W(9), .N(3), .A(TA), .B(TB), .C(TC))    dut_tri (.x, .mu(mu_t3));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -256; v < 256; v++) begin
      x = 9'(v);
      #1;
      for (int i = 0; i < 3; i++) begin
        checks += 2;
        if (longint'(mu_d[i]) != trimf(v, E_A[i], E_B[i], E_C[i])) begin
          failures++; $display("FAIL default set %0d x=%0d mu=%0d", i, v, mu_d[i]);
        end
        if (longint'(mu_t3[i]) != trimf(v, TA[i], TB[i], TC[i])) begin
          failures++; $display("FAIL triangle %0d x=%0d mu=%0d", i, v, mu_t3[i]);
        end
      end
    end
    // spot values worked by hand: set [30 60 80] at 45 -> 0.5, at 70 -> 0.5, at 60 -> 1
    x = 9'sd45; #1; checks++; if (mu_t3[0] != 128) failures++;
    x = 9'sd70; #1; checks++; if (mu_t3[0] != 128) failures++;
    x = 9'sd60; #1; checks++; if (mu_t3[0] != 256) failures++;
    // default sets: error -20 is half N and half Z
    x = -9'sd20; #1; checks++; if (mu_d[0] != 128 || mu_d[1] != 128 || mu_d[2] != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
