// tb_differentiator -- random samples with a random enable; dx must equal the current
// input minus the input at the last enabled clock (0 after reset).
module tb_differentiator;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [8:0] x = 0;
  logic signed [9:0] dx;
  int checks = 0, failures = 0;
  int last = 0;

  differentiator #(.W(9)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      @(posedge clk);
      if (en) last = int'(x);       // the edge just taken stored x when en was high
      #1;
      x  = 9'($urandom);
      en = ($urandom % 2) == 1;
      #1;
      checks++;
      if (int'(dx) != int'(x) - last) begin
        failures++;
        $display("FAIL n=%0d x=%0d last=%0d dx=%0d", n, x, last, dx);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
