// tb_delta_sigma_mod -- second-order (default) and first-order modulators side by side.
// Each output bit is compared with a reference loop written from the difference
// equations, and for a set of constant inputs the density of ones over 8192 clocks must
// be within 3/512 of din/512. A random-input phase exercises changing commands.
module tb_delta_sigma_mod;
  localparam int N = 9;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] din = 0;
  logic d2, d1;
  int checks = 0, failures = 0;
  longint r1a = 0, r2a = 0, r1b = 0;     // reference states: order 2 (a), order 1 (b)

  delta_sigma_mod #(.N(N), .ORDER(2)) dut2 (.clk, .rst_n, .din, .dout(d2));
  delta_sigma_mod #(.N(N), .ORDER(1)) dut1 (.clk, .rst_n, .din, .dout(d1));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint lim(longint v);
    return (v > 8192) ? 8192 : (v < -8192) ? -8192 : v;
  endfunction

  // one clock of both reference loops; returns nothing, updates states
  task automatic ref_step();
    longint x, fa, fb;
    x  = longint'(din) - 256;
    fa = (r2a >= 0) ? 256 : -256;
    fb = (r1b >= 0) ? 256 : -256;
    r2a = lim(r2a + r1a - fa);      // uses the old first state
    r1a = lim(r1a + x - fa);
    r1b = lim(r1b + x - fb);
  endtask

  task automatic run(int cycles, bit random_in, output int ones2, output int ones1);
    ones2 = 0; ones1 = 0;
    for (int n = 0; n < cycles; n++) begin
      if (random_in && n % 37 == 0) din = N'($urandom % 410);
      @(posedge clk);
      ref_step();
      #1;
      checks += 2;
      if (d2 != (r2a >= 0)) begin failures++; if (failures < 10) $display("FAIL order 2 bit"); end
      if (d1 != (r1b >= 0)) begin failures++; if (failures < 10) $display("FAIL order 1 bit"); end
      ones2 += int'(d2); ones1 += int'(d1);
    end
  endtask

  initial begin
    int o2, o1;
    int levels [6] = '{0, 51, 128, 205, 300, 409};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    #0;
    foreach (levels[k]) begin
      din = N'(levels[k]);
      run(2048, 0, o2, o1);             // settle
      run(8192, 0, o2, o1);
      checks += 2;
      if ((o2 - levels[k] * 16) > 48 || (levels[k] * 16 - o2) > 48) begin
        failures++; $display("FAIL order 2 density %0d/8192 for %0d", o2, levels[k]);
      end
      if ((o1 - levels[k] * 16) > 48 || (levels[k] * 16 - o1) > 48) begin
        failures++; $display("FAIL order 1 density %0d/8192 for %0d", o1, levels[k]);
      end
    end
    run(20000, 1, o2, o1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
