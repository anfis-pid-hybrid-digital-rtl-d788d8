// tb_dpwm -- runs a trailing-edge and a leading-edge DPWM side by side with random duty
// commands that change at random clocks, also mid-period. For every clock it checks the
// output against the ideal waveform: the duty in force is the command present at the
// period boundary, the period is 2**9 = 512 clocks, the trailing-edge pulse occupies the
// first duty clocks and the leading-edge pulse the last duty clocks. Duty 0 and 511 are
// included.
module tb_dpwm;
  localparam int N = 9, P = 1 << N;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] duty = 0;
  logic pwm_t, pwm_l, ps_t, ps_l;
  int checks = 0, failures = 0, periods = 0;

  dpwm #(.N(N), .TRAILING_EDGE(1'b1)) dut_t (.clk, .rst_n, .duty, .pwm(pwm_t), .period_start(ps_t));
  dpwm #(.N(N), .TRAILING_EDGE(1'b0)) dut_l (.clk, .rst_n, .duty, .pwm(pwm_l), .period_start(ps_l));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus: new random duty at random clocks
  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    forever begin
      repeat ($urandom % 700) @(posedge clk);
      #1;
      case ($urandom % 6)
        0: duty = '0;
        1: duty = N'(P - 1);
        default: duty = N'($urandom);
      endcase
    end
  end

  // checker
  initial begin
    int idx, d_now, high_t, high_l;
    logic [N-1:0] duty_at_edge;
    idx = -1; d_now = 0; high_t = 0; high_l = 0;
    @(posedge rst_n);
    while (periods < 120) begin
      duty_at_edge = duty;
      @(posedge clk); #2;
      if (ps_t) begin
        if (idx >= 0) begin
          checks += 3;
          if (idx != P)        begin failures++; $display("FAIL period %0d clocks", idx); end
          if (high_t != d_now) begin failures++; $display("FAIL trailing high %0d exp %0d", high_t, d_now); end
          if (high_l != d_now) begin failures++; $display("FAIL leading high %0d exp %0d", high_l, d_now); end
          periods++;
        end
        idx = 0; high_t = 0; high_l = 0;
        d_now = int'(duty_at_edge);
      end
      if (idx >= 0) begin
        checks += 3;
        if (ps_l != ps_t) failures++;
        if (pwm_t != (idx < d_now)) begin
          failures++; $display("FAIL trailing idx=%0d duty=%0d pwm=%0d", idx, d_now, pwm_t);
        end
        if (pwm_l != (idx >= P - d_now)) begin
          failures++; $display("FAIL leading idx=%0d duty=%0d pwm=%0d", idx, d_now, pwm_l);
        end
        high_t += int'(pwm_t); high_l += int'(pwm_l);
        idx++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
