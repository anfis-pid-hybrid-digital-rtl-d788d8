// dpwm -- counter-based digital pulse width modulator.
//
// A free-running N-bit counter clocked at the modulator clock (100 MHz in the thesis,
// 9-bit resolution, so one switching period is 2**N = 512 clocks), a comparator and a
// set/reset flip-flop, as in the conventional DPWM structure the thesis draws. The duty
// input is sampled once per period, when the counter overflows, so a command that
// changes mid-period never produces a runt pulse (this design's choice).
//   TRAILING_EDGE = 1 (default): overflow sets the flip-flop and the comparator match
//     count == duty resets it -- the trailing-edge modulator the thesis names.
//   TRAILING_EDGE = 0: the comparator sets the flip-flop and overflow resets it, the
//     wiring of the conventional block diagram (leading-edge modulation); the compare
//     value is then 2**N - duty so that the high time still equals duty.
// In both cases the output is high for exactly duty clocks of every period; duty = 0
// gives no pulse (reset wins over set). The flip-flop is a clocked register fed by the
// next counter value, so the pulse is aligned with the counter and glitch free.
// period_start is high on the first clock of each period.
module dpwm #(
  parameter int N             = 9,
  parameter bit TRAILING_EDGE = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,         // synchronous, active low
  input  logic [N-1:0] duty,          // on-time in clocks per 2**N-clock period
  output logic         pwm,
  output logic         period_start
);

  logic [N-1:0] count, count_next, duty_l, duty_next;
  logic         overflow, set, rst;

  always_comb begin
    overflow   = &count;
    count_next = count + 1'b1;
    duty_next  = overflow ? duty : duty_l;
    if (TRAILING_EDGE) begin
      set = overflow;
      rst = (count_next == duty_next);
    end else begin
      set = (duty_next != '0) && (count_next == N'(-duty_next));
      rst = overflow;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count        <= '1;               // first clock after reset starts a period
      duty_l       <= '0;
      pwm          <= 1'b0;
      period_start <= 1'b0;
    end else begin
      count        <= count_next;
      duty_l       <= duty_next;
      period_start <= overflow;
      if (rst)      pwm <= 1'b0;
      else if (set) pwm <= 1'b1;
    end
  end

endmodule
