// tb_rds_full - one complete operation of the range delay simulator at its
// full size: 3 banks of 262,144 words, the 16-entry delay table, a nominal
// 221.184 MHz input clock and a VCXO at its highest setting (+250 Hz). The
// operator selects INITIAL DELAY CONTROL CODE 0 (280,000 words, 81.0 ms) in
// LOCAL mode and presses RESET; the run lasts until the read address counter
// has rolled over once, so the FIFO level display has been latched, plus a
// few hundred words (about 1.07 million words, 0.31 s of simulated time).
// Checks: reading starts exactly after 280,000 words, every serial word
// arrives complete and in order, the post-mod switch control follows the
// VALID WORD bursts, the latched level equals the write address minus the
// read address, and the last words of frames are truncated and stretched.
`include "tb_check.svh"
module tb_rds_full;
  import rds_pkg::*;
  int checks = 0, failures = 0;
  localparam int FR = 864;   // words per frame (250 us)

  logic in_hs_clk, in_word_clk, out_hs_clk;
  logic [63:0] in_data;
  logic [3:0]  gt_ctrl;
  int gt_seq, n_adv, n_ret, n_coarse;

  logic ser_data, postmod_ctrl, remote_ind, fifo_level_valid, in_word_mon, out_word_mon;
  logic read_active, ps_adj_err, ps_overrun, scb_locked, scb_error;
  logic local_reset = 0;
  logic [11:0] freq_code;
  bcd_t fifo_level;
  logic [19:0] wr_addr, rd_addr;
  logic [15:0] scb_err_count;

  gt_model #(.FRAME(FR)) gt (.run(1'b1), .hs_clk(in_hs_clk), .word_clk(in_word_clk), .data(in_data),
    .ctrl(gt_ctrl), .seq(gt_seq), .n_adv, .n_ret, .n_coarse);
  vcxo_model vcxo (.code(freq_code), .clk(out_hs_clk));

  rds_top dut (
    .in_hs_clk, .in_word_clk, .in_data, .in_ctrl(word_ctrl_t'(gt_ctrl)), .out_hs_clk,
    .ser_data, .postmod_ctrl, .remote(1'b0), .local_delay_code(4'd0), .local_freq_code(12'd4095),
    .local_reset, .ecm_delay_code(4'd0), .ecm_freq_code(12'd2048), .ecm_reset(1'b0),
    .remote_ind, .freq_code, .fifo_level, .fifo_level_valid,
    .in_word_mon, .out_word_mon, .read_active, .wr_addr, .rd_addr, .ps_adj_err, .ps_overrun,
    .scb_enable(1'b0), .scb_len(5'd15), .scb_pattern(16'h0), .scb_chan(7'd0), .scb_all_chan(1'b0),
    .scb_inject(1'b0), .scb_locked, .scb_err_count, .scb_error);

  logic chk_restart = 1;
  int words, serr, trunc, stretch, pm_r, pm_f;
  serial_checker #(.FRAME(FR)) chk (.clk(out_hs_clk), .restart(chk_restart),
    .word_start(dut.u_ps.word_start), .ser(ser_data), .pm(postmod_ctrl),
    .words, .errors(serr), .truncated(trunc), .stretched(stretch), .pm_rises(pm_r), .pm_falls(pm_f));

  function automatic int from_bcd(bcd_t b);
    int v = 0;
    for (int i = 5; i >= 0; i--) v = v * 10 + int'(b[4*i +: 4]);
    return v;
  endfunction

  bit started = 0, latched = 0;
  int read_start_words = -1, level_seen = -1, level_expected = -1;
  logic ra_q = 0;

  always @(posedge in_hs_clk) if (started) begin
    if (read_active && !ra_q) read_start_words = int'(wr_addr);
    if (dut.u_tc.rd_roll_w) begin
      fork begin
        @(posedge in_hs_clk); #0.1;
        level_seen = from_bcd(fifo_level);
        level_expected = int'(wr_addr) - int'(rd_addr);
        if (level_expected < 0) level_expected += 786432;
        latched = 1;
      end join_none
    end
    ra_q <= read_active;
  end

  initial begin
    #400ms; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (100) @(posedge in_hs_clk);
    started = 1;
    local_reset <= 1;
    repeat (8) @(posedge in_hs_clk);
    local_reset <= 0;
    repeat (40) @(posedge in_hs_clk);
    chk_restart = 0;
    wait (latched);
    begin int s0; s0 = gt_seq; wait (gt_seq >= s0 + 300); end
    `CHECK(read_start_words == 280000, $sformatf("reading began after %0d words", read_start_words))
    `CHECK(fifo_level_valid && level_expected - level_seen inside {0, 1},
           $sformatf("FIFO level %0d, addresses give %0d", level_seen, level_expected))
    `CHECK(level_seen >= 279990 && level_seen <= 280010, $sformatf("level %0d near 280000", level_seen))
    `CHECK(words > 780000 && serr == 0, $sformatf("%0d words checked, %0d errors", words, serr))
    `CHECK(trunc > 0 && stretch > 0, $sformatf("last words truncated %0d, stretched %0d", trunc, stretch))
    `CHECK(pm_r > 900 && pm_r == pm_f, $sformatf("post-mod switch rises %0d falls %0d", pm_r, pm_f))
    `CHECK(!ps_overrun, "no P/S overrun")
    $display("words %0d level %0d trunc %0d stretch %0d", words, level_seen, trunc, stretch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
