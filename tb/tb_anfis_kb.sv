// tb_anfis_kb -- checks the preset contents after reset, random writes read back on the
// next clock, an out-of-range address being ignored, and a second reset restoring the
// preset.
module tb_anfis_kb;
  import anfis_pid_pkg::*;
  import anfis_ref_pkg::*;

  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [KB_AW-1:0] wr_addr = 0;
  kb_word_t wr_data = 0;
  kb_word_t words [KB_DEPTH];
  longint shadow [KB_DEPTH];
  int checks = 0, failures = 0;

  anfis_kb dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all(string what);
    for (int i = 0; i < KB_DEPTH; i++) begin
      checks++;
      if (longint'(words[i]) != shadow[i]) begin
        failures++;
        $display("FAIL %s word %0d = %0d exp %0d", what, i, words[i], shadow[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < KB_DEPTH; i++) shadow[i] = kb_default(i);
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    check_all("preset");
    for (int n = 0; n < 500; n++) begin
      int a;
      a = $urandom % 128;
      wr_en   = 1;
      wr_addr = KB_AW'(a);
      wr_data = kb_word_t'($urandom);
      @(posedge clk); #1;
      if (a < KB_DEPTH) shadow[a] = longint'(wr_data);
      wr_en = 0;
      checks++;
      if (a < KB_DEPTH && longint'(words[a]) != shadow[a]) begin
        failures++; $display("FAIL write %0d got %0d exp %0d en=%0d addr=%0d", a, words[a], shadow[a], wr_en, wr_addr);
      end
    end
    @(posedge clk); #1;
    check_all("after writes");
    rst_n = 0;
    @(posedge clk); #1;
    rst_n = 1;
    for (int i = 0; i < KB_DEPTH; i++) shadow[i] = kb_default(i);
    check_all("reset again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
