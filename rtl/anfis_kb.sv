// anfis_kb -- the ANFIS knowledge base: rule consequents held in a register file.
//
// Holds KB_DEPTH (108) signed 16-bit words: for each of the four output channels and
// each of the nine rules the coefficients p, q, r of a first-order Sugeno consequent
// f = p*e + q*de + r (address map in anfis_pid_pkg::kb_index). The thesis stores offline
// training results in a look-up-table knowledge base with preset data; here the preset
// (anfis_pid_pkg::kb_preset) is loaded by reset and a simple write port lets a host load
// other trained data. Every word is read in parallel because all rules are evaluated at
// once. Timing: a write on wr_en is visible on the next clock; reset takes one clock.
module anfis_kb
  import anfis_pid_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,       // synchronous, active low: load preset
  input  logic             wr_en,
  input  logic [KB_AW-1:0] wr_addr,
  input  kb_word_t         wr_data,
  output kb_word_t         words [KB_DEPTH]
);

  kb_word_t mem [KB_DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < KB_DEPTH; i++) mem[i] <= kb_preset(i);
    end else if (wr_en && int'(wr_addr) < KB_DEPTH) begin
      mem[wr_addr] <= wr_data;
    end
  end

  assign words = mem;

endmodule
