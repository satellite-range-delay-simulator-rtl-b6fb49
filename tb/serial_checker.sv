// serial_checker - watches the RDS serial output for the testbenches. Word
// boundaries come from the P/S converter's word_start. Each word's 32 upper
// bits give the ground terminal's sequence number; a word sent in full (64
// bits) must also carry the matching check value, and sequence numbers must
// follow one another. Frame-end words shorter or longer than 64 bits are
// counted as truncated or stretched. The post-mod switch control is sampled
// at bits 16 and 48 of each word and compared with the VALID WORD pattern.
module serial_checker #(
  parameter int FRAME = 16
) (
  input  logic clk,
  input  logic restart,
  input  logic word_start,
  input  logic ser,
  input  logic pm,
  output int   words,
  output int   errors,
  output int   truncated,
  output int   stretched,
  output int   pm_rises,
  output int   pm_falls
);
  logic [63:0] sh;
  int   len, prev_seq, cur_seq;
  logic pm_q;
  bit   have_prev, have_cur;

  function automatic logic [31:0] check_of(int s);
    return 32'(s) * 32'h9E3779B1 ^ 32'h5A5A1234;
  endfunction
  function automatic bit valid_of(int s);
    int w, f;
    if (s < 0) return 0;
    w = s % FRAME; f = s / FRAME;
    return (w >= 2) && (w < 2 + 3 + f % 5) && (w != FRAME - 1);
  endfunction

  initial begin words = 0; errors = 0; truncated = 0; stretched = 0; pm_rises = 0; pm_falls = 0;
                have_prev = 0; have_cur = 0; len = 0; pm_q = 0; end

  task automatic close_word();
    int s;
    if (len < 33) return;
    s = cur_seq;
    if (len < 64) truncated++;
    else if (len > 64) stretched++;
    else begin
      words++;
      if (sh[31:0] != check_of(s)) begin
        errors++;
        $display("FAIL %0t: word seq %0d check value wrong", $time, s);
      end
    end
    if (have_prev && s != prev_seq + 1) begin
      errors++;
      $display("FAIL %0t: sequence %0d after %0d", $time, s, prev_seq);
    end
    prev_seq = s; have_prev = 1;
  endtask

  always @(posedge clk) begin
    #0.01;
    if (restart) begin
      have_prev = 0; have_cur = 0; len = 0;
    end else begin
      if (word_start) begin
        if (have_cur) close_word();
        have_cur = 1; len = 0; sh = '0;
      end
      if (have_cur) begin
        if (len < 64) sh = {sh[62:0], ser};
        len++;
        if (len == 32) cur_seq = int'(sh[31:0]);
        if (len == 49 && have_prev) begin
          if (pm != (valid_of(cur_seq) || valid_of(cur_seq + 1))) begin
            errors++; $display("FAIL %0t: post-mod control %0b at bit 48 of word %0d", $time, pm, cur_seq);
          end
        end
        if (len == 17 && have_prev) begin
          if (pm != (valid_of(prev_seq + 1) || valid_of(prev_seq))) begin
            errors++; $display("FAIL %0t: post-mod control %0b at bit 16 of word %0d", $time, pm, prev_seq + 1);
          end
        end
      end
      if (pm && !pm_q) pm_rises++;
      if (!pm && pm_q) pm_falls++;
      pm_q = pm;
    end
  end
endmodule
