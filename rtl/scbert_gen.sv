// scbert_gen - pattern generator half of the single channel bit error rate
// tester (SCBERT) built into the RDS.
//
// The SCBERT tests one of the 70 memory channels at a time. At each write
// word strobe the generator emits the next bit of a pattern that repeats
// every N words (N = 2..16, from on-board switches; the pattern's bits come
// from a 16-bit switch word, bit 0 first). That bit replaces the selected
// channel of the word being written. With `all_chan` set, every other channel
// is also filled with pseudo data: channel c carries the pattern delayed by
// (c mod 8) words, giving eight signals offset by one bit period each. With
// `inject` set, one bit is inverted every 65,536 pattern repetitions, to
// check the tester itself (about 3 per second for N = 15 at 3.456 MHz).
//
// Interface: clk/clr, strobe (input word strobe), enable, len (N), pattern,
// chan (0..69), all_chan, inject, d (the word from the input register).
// Outputs q and q_strobe: the word to write, registered, and its strobe one
// clock after `strobe`. With enable low q is d unchanged.
//
// From the source design: channel selection, N from 2 to 16, eight offset
// signals, the injection rate. Own choices: the pattern switch word, the
// registering, which bit is inverted (the first of a repetition).
module scbert_gen
  import rds_pkg::*;
(
  input  logic             clk,
  input  logic             clr,
  input  logic             strobe,
  input  logic             enable,
  input  logic [4:0]       len,
  input  logic [15:0]      pattern,
  input  logic [6:0]       chan,
  input  logic             all_chan,
  input  logic             inject,
  input  logic [MEM_W-1:0] d,
  output logic [MEM_W-1:0] q,
  output logic             q_strobe
);

  logic [3:0]  idx;   // position in the pattern
  logic [15:0] reps;  // pattern repetitions, for error injection
  logic [6:0]  hist;  // last seven bits sent, for the offset signals
  logic        bit_now;
  logic [7:0]  sig;
  logic [MEM_W-1:0] word;

  assign bit_now = pattern[idx] ^ (inject && idx == 4'd0 && reps == 16'd0);
  assign sig     = {hist, bit_now};

  always_comb begin
    word = d;
    if (enable) begin
      if (all_chan)
        for (int c = 0; c < MEM_W; c++) word[c] = sig[c % 8];
      if (int'(chan) < MEM_W) word[chan] = bit_now;
    end
  end

  always_ff @(posedge clk) begin
    q_strobe <= strobe;
    if (clr) begin
      idx  <= '0;
      reps <= '0;
      hist <= '0;
    end else if (strobe) begin
      q    <= word;
      hist <= {hist[5:0], bit_now};
      if (32'(idx) + 1 >= 32'(len)) begin
        idx  <= '0;
        reps <= reps + 16'd1;
      end else begin
        idx <= idx + 4'd1;
      end
    end
  end

endmodule
