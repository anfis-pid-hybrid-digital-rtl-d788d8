// tb_anfis -- drives random error sequences (small and large, so every rule fires) into
// the ANFIS, first with the preset knowledge base and then after overwriting it with
// random data through the write port, and compares the accumulated duty output and the
// three gain corrections with the Sugeno reference model (Eq. 3.11, rule products,
// weighted average) after every sample. Checks the one-clock latency.
module tb_anfis;
  import anfis_pid_pkg::*;
  import anfis_ref_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0, kb_we = 0;
  err_t e = 0;
  logic [KB_AW-1:0] kb_addr = 0;
  kb_word_t kb_data = 0;
  ctrl_t u_anfis;
  gain_t dk [3];
  logic out_valid;
  int checks = 0, failures = 0;
  longint kb [108];
  longint ref_u = 0, e_prev = 0;
  int ea[3] = E_A, eb[3] = E_B, ec[3] = E_C, da[3] = D_A, db[3] = D_B, dc[3] = D_C;

  anfis dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_samples(int count, int span);
    longint de, y;
    for (int n = 0; n < count; n++) begin
      e = err_t'(int'($urandom % (2 * span + 1)) - span);
      in_valid = 1;
      de = longint'(e) - e_prev;
      @(posedge clk); #1;
      in_valid = 0;
      ref_u = clamp(ref_u + sugeno(e, de, 0, kb, ea, eb, ec, da, db, dc), 0, UMAX);
      check(out_valid == 1, "out_valid latency");
      check(longint'(u_anfis) == ref_u,
            $sformatf("u_anfis=%0d exp=%0d (e=%0d de=%0d)", u_anfis, ref_u, e, de));
      for (int ch = 1; ch < 4; ch++) begin
        y = clamp(sugeno(e, de, ch, kb, ea, eb, ec, da, db, dc), -32768, 32767);
        check(longint'(dk[ch-1]) == y, $sformatf("dk[%0d]=%0d exp=%0d", ch-1, dk[ch-1], y));
      end
      e_prev = longint'(e);
      @(posedge clk); #1;
    end
  endtask

  initial begin
    for (int i = 0; i < 108; i++) kb[i] = kb_default(i);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run_samples(300, 30);     // around the set point
    run_samples(300, 256);    // whole range, shoulders included
    // load random consequents (as offline training would)
    for (int i = 0; i < 108; i++) begin
      kb_we = 1; kb_addr = KB_AW'(i);
      kb_data = kb_word_t'(int'($urandom % 4001) - 2000);
      kb[i] = longint'(kb_data);
      @(posedge clk); #1;
    end
    kb_we = 0;
    run_samples(600, 80);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
