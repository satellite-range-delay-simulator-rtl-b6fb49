// postmod_switch - POST MOD SWITCH CONTROL for the modulator's output switch.
//
// The modulator's output switch must be closed only around valid bursts: the
// control rises half a word time (32 bits) before the first bit of a valid
// burst and falls half a word time after its last bit. The VALID WORD bit
// delayed with each word marks the burst; the P/S converter reports the
// validity of the word being sent, of the one before and of the next one and
// how far the word boundaries are, and this block forms the control from them.
//
// Interface: clk (output high speed clock), clr, the P/S converter's
// cur_valid, prev_valid, next_valid, bits_to_next, bit_pos. ctrl is
// registered; its thresholds are set one clock early so that it rises
// exactly HALF clocks before the first serial bit of a burst and falls HALF
// clocks after the last one.
//
// From the source design: the half-word lead and lag and the use of the
// VALID WORD bit. Own choice: HALF = 32 clocks as the half word.
module postmod_switch #(
  parameter int unsigned HALF = 32
) (
  input  logic       clk,
  input  logic       clr,
  input  logic       cur_valid,
  input  logic       prev_valid,
  input  logic       next_valid,
  input  logic [7:0] bits_to_next,
  input  logic [5:0] bit_pos,
  output logic       ctrl
);

  always_ff @(posedge clk) begin
    if (clr) ctrl <= 1'b0;
    else ctrl <= cur_valid
              || (next_valid && bits_to_next <= 8'(HALF))
              || (prev_valid && bit_pos < 6'(HALF - 1));
  end

endmodule
