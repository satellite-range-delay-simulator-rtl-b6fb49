// input_register - latches the ground terminal's word into the RDS.
//
// The ground terminal presents a 64-bit data word and its four control bits
// (VCWCG code, VALID WORD, LAST WORD) once per INPUT WORD CLOCK. The register
// runs on the input high speed clock, of which the word clock is a divided
// copy: the word clock is passed through two flops, its rising edge is found,
// and on that clock the word is latched. The following clock raises `strobe`
// for one period; that pulse steps the write side of the FIFO.
//
// Interface: clk (input high speed clock), word_clk (INPUT WORD CLOCK),
// data/ctrl from the terminal (held for the whole word). q holds the latched
// word in memory layout (spare channels zero) until the next word clock.
// Timing: q changes three clocks after the word clock's rising edge; strobe
// is high in the clock after that.
//
// From the source design: 64 data + 4 control bits latched at the input word
// clock rate. Own choices: sampling in the high speed clock domain, the
// latency, and zero in the two spare channels.
module input_register
  import rds_pkg::*;
(
  input  logic              clk,
  input  logic              word_clk,
  input  logic [DATA_W-1:0] data,
  input  word_ctrl_t        ctrl,
  output mem_word_t         q,
  output logic              strobe
);

  logic wc_meta, wc_s, wc_q, edge_seen;

  always_ff @(posedge clk) begin
    wc_meta   <= word_clk;
    wc_s      <= wc_meta;
    wc_q      <= wc_s;
    edge_seen <= 1'b0;
    if (wc_s && !wc_q) begin
      q.data    <= data;
      q.ctrl    <= ctrl;
      q.spare   <= '0;
      edge_seen <= 1'b1;
    end
  end

  assign strobe = edge_seen;

endmodule
