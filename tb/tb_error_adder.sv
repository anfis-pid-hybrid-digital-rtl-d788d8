// tb_error_adder -- random ADC and reference codes; checks e = vref - adc, that e only
// changes on a sample strobe, and the one-clock latency of e_valid.
module tb_error_adder;
  import anfis_pid_pkg::*;

  logic clk = 0, rst_n = 0, sample_en = 0;
  logic [7:0] adc_code = 0, vref_code = 0;
  err_t e;
  logic e_valid;
  int checks = 0, failures = 0;

  error_adder dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int exp_e;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    check(e_valid == 0 && e == 0, "reset state");
    for (int n = 0; n < 2000; n++) begin
      adc_code  <= 8'($urandom);
      vref_code <= 8'($urandom);
      sample_en <= ($urandom % 3) == 0;
      @(posedge clk);
      #1;
      if (sample_en) begin
        exp_e = int'(vref_code) - int'(adc_code);
        @(posedge clk); #1;
        check(e_valid == 1, "valid one clock after strobe");
        check(int'(e) == exp_e, $sformatf("e=%0d exp=%0d", e, exp_e));
        sample_en <= 0;
        adc_code  <= 8'($urandom);    // must not reach e without a strobe
        @(posedge clk); #1;
        check(e_valid == 0, "valid is a single pulse");
        check(int'(e) == exp_e, "e holds between strobes");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
