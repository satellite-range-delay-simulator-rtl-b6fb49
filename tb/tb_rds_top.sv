// tb_rds_top - end-to-end test of the range delay simulator at a reduced
// memory size (3 banks of 64 words; initial delays of 70 to 120 words, the
// same one-to-two-bank span as the full design). A behavioural ground
// terminal sends numbered words in 16-word frames whose last word carries
// VCWCG codes 01, 10 and 11 in turn; a behavioural VCXO runs the output side
// at a rate set by the 12-bit frequency code (exaggerated so the delay
// drifts within the run). Three runs:
//   A  LOCAL mode, delay code 5, output clock slow: the FIFO level grows;
//   B  REMOTE mode, delay code 12, output clock fast: the level shrinks;
//   C  SCBERT on spare channel 68 with all channels exercised; one stored
//      bit is corrupted and must be counted as exactly one error.
// Each run checks the serial words (order and content), the start of
// reading after the initial delay, the FIFO level latched at each read
// rollover against the two address counters, and the post-mod switch
// control. Every mechanism is counted and must have occurred.
`include "tb_check.svh"
module tb_rds_top;
  import rds_pkg::*;
  int checks = 0, failures = 0;

  localparam int AP = 3, DEPTH = 3 * 64, FR = 16;
  localparam delay_table_t TBL = '{70, 74, 78, 82, 86, 90, 94, 96, 98, 100, 102, 104, 108, 112, 116, 120};

  logic in_hs_clk, in_word_clk, out_hs_clk;
  logic [63:0] in_data;
  logic [3:0]  gt_ctrl;
  int gt_seq, n_adv, n_ret, n_coarse;
  logic gt_run = 0;

  logic ser_data, postmod_ctrl, remote_ind, fifo_level_valid, in_word_mon, out_word_mon;
  logic read_active, ps_adj_err, ps_overrun, scb_locked, scb_error;
  logic remote = 0, local_reset = 0, ecm_reset = 0;
  logic [3:0] local_delay_code = 4'd5, ecm_delay_code = 4'd12;
  logic [11:0] local_freq_code = 12'd2048 - 12'd600, ecm_freq_code = 12'd2048 + 12'd600, freq_code;
  bcd_t fifo_level;
  logic [7:0] wr_addr, rd_addr;
  logic scb_enable = 0, scb_all_chan = 0, scb_inject = 0;
  logic [4:0] scb_len = 5'd15;
  logic [15:0] scb_pattern = 16'h4D2B, scb_err_count;
  logic [6:0] scb_chan = 7'd68;

  gt_model #(.FRAME(FR)) gt (.run(gt_run), .hs_clk(in_hs_clk), .word_clk(in_word_clk), .data(in_data),
    .ctrl(gt_ctrl), .seq(gt_seq), .n_adv, .n_ret, .n_coarse);
  vcxo_model #(.PPM_PER_LSB(3.0)) vcxo (.code(freq_code), .clk(out_hs_clk));

  rds_top #(.ADDR_PINS(AP), .DELAY_TABLE(TBL)) dut (
    .in_hs_clk, .in_word_clk, .in_data, .in_ctrl(word_ctrl_t'(gt_ctrl)), .out_hs_clk,
    .ser_data, .postmod_ctrl, .remote, .local_delay_code, .local_freq_code, .local_reset,
    .ecm_delay_code, .ecm_freq_code, .ecm_reset, .remote_ind, .freq_code, .fifo_level, .fifo_level_valid,
    .in_word_mon, .out_word_mon, .read_active, .wr_addr, .rd_addr, .ps_adj_err, .ps_overrun,
    .scb_enable, .scb_len, .scb_pattern, .scb_chan, .scb_all_chan, .scb_inject,
    .scb_locked, .scb_err_count, .scb_error);

  logic chk_restart = 1;
  int words, serr, trunc, stretch, pm_r, pm_f;
  serial_checker #(.FRAME(FR)) chk (.clk(out_hs_clk), .restart(chk_restart || scb_enable),
    .word_start(dut.u_ps.word_start), .ser(ser_data), .pm(postmod_ctrl),
    .words, .errors(serr), .truncated(trunc), .stretched(stretch), .pm_rises(pm_r), .pm_falls(pm_f));

  // ---- mechanism counters ----
  int wr_rolls = 0, rd_rolls = 0, latches = 0, p63 = 0, p65 = 0, p56 = 0, read_starts = 0, adj_errs = 0;
  int scb_errors = 0, mode_switches = 0, level_up = 0, level_down = 0;
  int last_level = -1;
  int ocyc = 0, last_strobe = -1;
  logic ra_q = 0, rm_q = 0;
  bit started = 0;  // counting starts at the first RESET

  function automatic int from_bcd(bcd_t b);
    int v = 0;
    for (int i = 5; i >= 0; i--) v = v * 10 + int'(b[4*i +: 4]);
    return v;
  endfunction

  always @(posedge out_hs_clk) if (started) begin
    ocyc++;
    if (dut.r_word_strobe && dut.r_read_en) begin
      if (last_strobe >= 0) begin
        if (ocyc - last_strobe == 63) p63++;
        if (ocyc - last_strobe == 65) p65++;
        if (ocyc - last_strobe == 56) p56++;
      end
      last_strobe = ocyc;
    end
    if (!dut.r_read_en) last_strobe = -1;
    if (scb_error) scb_errors++;
    if (ps_adj_err) adj_errs++;
  end

  always @(posedge in_hs_clk) if (started) begin
    if (dut.u_tc.wr_roll) wr_rolls++;
    if (dut.u_tc.rd_roll_w) begin
      rd_rolls++;
      fork begin
        @(posedge in_hs_clk); #0.1;
        latches++;
        `CHECK(fifo_level_valid && (int'(wr_addr) - int'(rd_addr) + DEPTH) % DEPTH - from_bcd(fifo_level) inside {0, 1},
               $sformatf("level %0d vs addresses %0d/%0d", from_bcd(fifo_level), wr_addr, rd_addr))
        if (last_level >= 0 && from_bcd(fifo_level) > last_level) level_up++;
        if (last_level >= 0 && from_bcd(fifo_level) < last_level) level_down++;
        last_level = from_bcd(fifo_level);
        `CHECK(last_level > 64 && last_level < 128, "delay stays between one and two banks")
      end join_none
    end
    if (read_active && !ra_q) begin
      read_starts++;
      `CHECK(int'(wr_addr) >= TBL[dut.delay_code] && int'(wr_addr) <= TBL[dut.delay_code] + 1,
             $sformatf("reading began with %0d words written, table %0d", wr_addr, TBL[dut.delay_code]))
    end
    if (remote_ind != rm_q) mode_switches++;
    ra_q <= read_active;
    rm_q <= remote_ind;
  end

  initial begin
    #30ms; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic do_reset(bit use_remote);
    chk_restart = 1;
    started = 1;
    repeat (3) @(posedge in_hs_clk);
    if (use_remote) ecm_reset <= 1; else local_reset <= 1;
    repeat (8) @(posedge in_hs_clk);
    ecm_reset <= 0; local_reset <= 0;
    repeat (40) @(posedge in_hs_clk);
    last_level = -1;
    chk_restart = 0;
  endtask

  task automatic run_words(int n);
    int s0;
    s0 = gt_seq;
    wait (gt_seq >= s0 + n);
  endtask

  initial begin
    int w0, rr0, lu0, ld0;
    gt_run = 1;
    // ---- run A: LOCAL, output clock slow ----
    repeat (100) @(posedge in_hs_clk);
    do_reset(0);
    run_words(1800);
    `CHECK(words > 1400 && serr == 0, $sformatf("run A: %0d words, %0d errors", words, serr))
    `CHECK(level_up > 0 && level_down == 0, $sformatf("run A: level rose %0d, fell %0d", level_up, level_down))
    w0 = words; lu0 = level_up; ld0 = level_down;
    // ---- run B: REMOTE, output clock fast ----
    remote <= 1;
    repeat (10) @(posedge in_hs_clk);
    do_reset(1);
    `CHECK(remote_ind && freq_code == ecm_freq_code, "REMOTE codes in use")
    run_words(1800);
    `CHECK(words - w0 > 1400 && serr == 0, $sformatf("run B: %0d words, %0d errors", words - w0, serr))
    `CHECK(level_down > ld0 && level_up == lu0, $sformatf("run B: level fell %0d, rose %0d", level_down - ld0, level_up - lu0))
    `CHECK(adj_errs == 0 && !ps_overrun, $sformatf("runs A/B: P/S adjustment errors %0d, overrun %0b", adj_errs, ps_overrun))
    // ---- run C: SCBERT (all 70 channels, control bits included, carry test data) ----
    scb_enable <= 1; scb_all_chan <= 1;
    do_reset(1);
    wait (scb_locked);
    `CHECK(scb_err_count == 0, "SCBERT locks without errors")
    // corrupt the selected channel of a word written but not yet read
    rr0 = (int'(rd_addr) + 20) % DEPTH;
    dut.u_mem.mem[rr0][68] = ~dut.u_mem.mem[rr0][68];
    run_words(400);
    `CHECK(scb_err_count == 1, $sformatf("SCBERT counted %0d errors for one corrupted bit", scb_err_count))
    // ---- mechanisms ----
    `CHECK(read_starts == 3, $sformatf("read start after initial delay: %0d", read_starts))
    `CHECK(wr_rolls > 0 && rd_rolls > 0 && latches > 0, $sformatf("rollovers %0d/%0d, latches %0d", wr_rolls, rd_rolls, latches))
    `CHECK(n_adv > 0 && n_ret > 0 && n_coarse > 0, "terminal used all codes")
    `CHECK(p63 > 0 && p65 > 0 && p56 > 0, $sformatf("output word periods 63/65/56: %0d/%0d/%0d", p63, p65, p56))
    `CHECK(trunc > 0 && stretch > 0, $sformatf("last words truncated %0d, stretched %0d", trunc, stretch))
    `CHECK(pm_r > 0 && pm_f > 0, $sformatf("post-mod switch rises %0d falls %0d", pm_r, pm_f))
    `CHECK(mode_switches > 0, "LOCAL/REMOTE switch")
    `CHECK(scb_errors == 1, "one ERROR pulse")
    $display("words %0d trunc %0d stretch %0d p63 %0d p65 %0d p56 %0d rolls %0d/%0d up %0d down %0d",
             words, trunc, stretch, p63, p65, p56, wr_rolls, rd_rolls, level_up, level_down);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
