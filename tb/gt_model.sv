// gt_model - behavioural ground terminal for the RDS testbenches. It makes
// the input high speed clock and, from it, the INPUT WORD CLOCK: 64 clocks
// per word, except that the last word of a frame may carry a VCWCG code and
// then lasts 63 (01), 65 (10) or 56 (11) clocks, as the terminal's own timing
// corrections do. Frames are FRAME words long. Each word carries its
// sequence number in bits 63:32 and a check value of it in bits 31:0; the
// VALID WORD flag marks a burst of 3 to 7 words starting at word 2 of each
// frame, LAST WORD marks the final word. Codes cycle through CODE_SEQ.
module gt_model #(
  parameter int  FRAME   = 16,
  parameter real HALF_NS = 2.2606
) (
  input  logic        run,
  output logic        hs_clk,
  output logic        word_clk,
  output logic [63:0] data,
  output logic [3:0]  ctrl,   // {last, valid, code[1:0]}
  output int          seq,
  output int          n_adv,
  output int          n_ret,
  output int          n_coarse
);
  logic [1:0] code_seq [8] = '{2'b00, 2'b01, 2'b10, 2'b00, 2'b11, 2'b01, 2'b10, 2'b10};

  function automatic logic [31:0] check_of(int s);
    return 32'(s) * 32'h9E3779B1 ^ 32'h5A5A1234;
  endfunction

  function automatic bit valid_of(int s);
    int w, f;
    w = s % FRAME; f = s / FRAME;
    return (w >= 2) && (w < 2 + 3 + f % 5) && (w != FRAME - 1);
  endfunction

  initial begin hs_clk = 0; word_clk = 0; data = '0; ctrl = '0; seq = 0; n_adv = 0; n_ret = 0; n_coarse = 0; end
  always #(HALF_NS) hs_clk = ~hs_clk;

  always begin
    int per, w;
    logic [1:0] code;
    @(posedge hs_clk);
    if (run) begin
      w = seq % FRAME;
      code = (w == FRAME - 1) ? code_seq[(seq / FRAME) % 8] : 2'b00;
      per = (code == 2'b01) ? 63 : (code == 2'b10) ? 65 : (code == 2'b11) ? 56 : 64;
      if (code == 2'b01) n_adv++;
      if (code == 2'b10) n_ret++;
      if (code == 2'b11) n_coarse++;
      data     <= {32'(seq), check_of(seq)};
      ctrl     <= {w == FRAME - 1, valid_of(seq), code};
      word_clk <= 1'b1;
      repeat (per / 2) @(posedge hs_clk);
      word_clk <= 1'b0;
      repeat (per - per / 2 - 1) @(posedge hs_clk);
      seq++;
    end
  end
endmodule
