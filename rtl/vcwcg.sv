// vcwcg - variable count word clock generator.
//
// Divides the output high speed clock into the OUTPUT WORD CLOCK. A word
// period normally lasts 64 clocks; the 2-bit VCWCG code read from the FIFO
// with a word stretches or shortens the period in which it is read: 01 gives
// 63 clocks (timing advanced one bit), 10 gives 65 (retarded one bit), 11
// gives 56 (coarse step used during acquisition), 00 leaves 64. This repeats
// at the RDS output the bit insertion and deletion the ground terminal made
// with its own word clock.
//
// Interface: clk (output high speed clock), clr, code/code_load (code of the
// word just read, one-clock load pulse, must arrive before clock 55 of the
// period). strobe is a one-clock pulse at the first clock of each word
// period; word_clk is the square OUTPUT WORD CLOCK (high for the first 32
// clocks).
//
// From the source design: the four divide ratios and their codes, the code
// delayed with the data. Own choices: the code acts on the period in which
// the word is read and is forgotten at the next period; the duty cycle.
module vcwcg
  import rds_pkg::*;
(
  input  logic     clk,
  input  logic     clr,
  input  vc_code_e code,
  input  logic     code_load,
  output logic     strobe,
  output logic     word_clk
);

  logic [6:0] cnt, period;
  vc_code_e   cur;

  assign period = 7'(vc_divisor(code_load ? code : cur));

  always_ff @(posedge clk) begin
    if (clr) begin
      cnt <= '0;
      cur <= VC_NOMINAL;
    end else if (cnt == period - 7'd1) begin
      cnt <= '0;
      cur <= VC_NOMINAL;
    end else begin
      cnt <= cnt + 7'd1;
      if (code_load) cur <= code;
    end
  end

  assign strobe   = (cnt == '0) && !clr;
  assign word_clk = (cnt < 7'd32);

endmodule
