// tb_rds_geo_scbert - full-size run of the two workloads that need no
// reduction: the geosynchronous delay (INITIAL DELAY CONTROL CODE 9,
// 424,000 words, 122.7 ms) selected in REMOTE mode, and the built-in single
// channel BER tester on spare channel 68 with a 15-bit pattern and error
// injection on. Injection inverts one bit per 65,536 x 15 = 983,040 words;
// the first injected bit falls before the checker has locked, so exactly
// one error must be counted after about 1.41 million words. The data
// channels are untouched, so every serial word is checked as well.
`include "tb_check.svh"
module tb_rds_geo_scbert;
  import rds_pkg::*;
  int checks = 0, failures = 0;
  localparam int FR = 864;

  logic in_hs_clk, in_word_clk, out_hs_clk;
  logic [63:0] in_data;
  logic [3:0]  gt_ctrl;
  int gt_seq, n_adv, n_ret, n_coarse;

  logic ser_data, postmod_ctrl, remote_ind, fifo_level_valid, in_word_mon, out_word_mon;
  logic read_active, ps_adj_err, ps_overrun, scb_locked, scb_error;
  logic ecm_reset = 0;
  logic [11:0] freq_code;
  bcd_t fifo_level;
  logic [19:0] wr_addr, rd_addr;
  logic [15:0] scb_err_count;

  gt_model #(.FRAME(FR)) gt (.run(1'b1), .hs_clk(in_hs_clk), .word_clk(in_word_clk), .data(in_data),
    .ctrl(gt_ctrl), .seq(gt_seq), .n_adv, .n_ret, .n_coarse);
  vcxo_model vcxo (.code(freq_code), .clk(out_hs_clk));

  rds_top dut (
    .in_hs_clk, .in_word_clk, .in_data, .in_ctrl(word_ctrl_t'(gt_ctrl)), .out_hs_clk,
    .ser_data, .postmod_ctrl, .remote(1'b1), .local_delay_code(4'd0), .local_freq_code(12'd2048),
    .local_reset(1'b0), .ecm_delay_code(4'd9), .ecm_freq_code(12'd1024), .ecm_reset,
    .remote_ind, .freq_code, .fifo_level, .fifo_level_valid,
    .in_word_mon, .out_word_mon, .read_active, .wr_addr, .rd_addr, .ps_adj_err, .ps_overrun,
    .scb_enable(1'b1), .scb_len(5'd15), .scb_pattern(16'h3A6D), .scb_chan(7'd68), .scb_all_chan(1'b0),
    .scb_inject(1'b1), .scb_locked, .scb_err_count, .scb_error);

  logic chk_restart = 1;
  int words, serr, trunc, stretch, pm_r, pm_f;
  serial_checker #(.FRAME(FR)) chk (.clk(out_hs_clk), .restart(chk_restart),
    .word_start(dut.u_ps.word_start), .ser(ser_data), .pm(postmod_ctrl),
    .words, .errors(serr), .truncated(trunc), .stretched(stretch), .pm_rises(pm_r), .pm_falls(pm_f));

  bit started = 0;
  int read_start_words = -1, pulses = 0;
  logic ra_q = 0;

  always @(posedge in_hs_clk) if (started) begin
    if (read_active && !ra_q) read_start_words = int'(wr_addr);
    ra_q <= read_active;
  end
  always @(posedge out_hs_clk) if (started && scb_error) pulses++;

  initial begin
    #500ms; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (100) @(posedge in_hs_clk);
    started = 1;
    ecm_reset <= 1;
    repeat (8) @(posedge in_hs_clk);
    ecm_reset <= 0;
    repeat (40) @(posedge in_hs_clk);
    chk_restart = 0;
    wait (scb_locked);
    `CHECK(scb_err_count == 0, "SCBERT locked with no errors")
    begin int s0; s0 = gt_seq; wait (gt_seq >= s0 + 983040 + 2000); end
    `CHECK(read_start_words == 424000, $sformatf("reading began after %0d words", read_start_words))
    `CHECK(remote_ind && freq_code == 12'd1024, "REMOTE mode codes in use")
    `CHECK(scb_err_count == 1 && pulses == 1, $sformatf("SCBERT counted %0d errors, %0d pulses", scb_err_count, pulses))
    `CHECK(words > 980000 && serr == 0, $sformatf("%0d words checked, %0d errors", words, serr))
    `CHECK(!ps_overrun, "no P/S overrun")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
