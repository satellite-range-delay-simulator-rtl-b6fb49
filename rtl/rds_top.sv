// rds_top - satellite range delay simulator (RDS).
//
// The RDS sits between a TDMA ground terminal and its modulator and delays
// everything the terminal sends by a satellite's round-trip range delay, with
// the Doppler shift of a moving satellite. Parallel 64-bit words with their
// four control bits are written into a three-bank FIFO memory at the
// terminal's INPUT WORD CLOCK and read out, after an initial delay chosen
// with a 4-bit code, at an OUTPUT WORD CLOCK derived from a separately tuned
// oscillator. Because the two word rates differ slightly, the number of
// words in the FIFO, i.e. the delay, drifts as a moving satellite's would.
// The VCWCG code read with each word repeats the terminal's bit insertions
// and deletions at the output, the P/S converter turns the words into a
// serial stream at the output high speed clock, and the VALID WORD bit gives
// the post-modulator switch control.
//
// Clock domains: in_hs_clk (input high speed clock, 221.184 MHz from the
// terminal; the write side, the delay control counter and the panel logic)
// and out_hs_clk (output high speed clock from the RDS's own VCXO, whose
// frequency freq_code sets through a D/A converter outside this design; the
// read side, VCWCG, P/S converter, post-mod switch and SCBERT checker).
//
// Ports: terminal inputs in_word_clk, in_data, in_ctrl; serial output
// ser_data (clocked by out_hs_clk) and postmod_ctrl; word clock monitors;
// panel / computer controls and the FIFO LEVEL - WORDS display (BCD); the
// SCBERT switches and results. Parameters scale the memory (ADDR_PINS) and
// replace the delay table for short simulations.
//
// The write-side read enable, the running delay count and the P/S word start
// are kept as named wires for probing only, and the two spare channels are not
// read, so lint lists them as unused.
//
// The structure follows the source design's block diagram; the clocking of
// the whole design on the two high speed clocks is this design's own.
module rds_top
  import rds_pkg::*;
#(
  parameter int unsigned  BANKS       = 3,
  parameter int unsigned  ADDR_PINS   = 9,
  parameter delay_table_t DELAY_TABLE = INIT_DELAY_WORDS
) (
  // from the ground terminal
  input  logic              in_hs_clk,
  input  logic              in_word_clk,
  input  logic [DATA_W-1:0] in_data,
  input  word_ctrl_t        in_ctrl,
  // from the VCXO
  input  logic              out_hs_clk,
  // to the modulator
  output logic              ser_data,
  output logic              postmod_ctrl,
  // control panel and computer interface
  input  logic              remote,
  input  logic [3:0]        local_delay_code,
  input  logic [11:0]       local_freq_code,
  input  logic              local_reset,
  input  logic [3:0]        ecm_delay_code,
  input  logic [11:0]       ecm_freq_code,
  input  logic              ecm_reset,
  output logic              remote_ind,
  output logic [11:0]       freq_code,
  output bcd_t              fifo_level,
  output logic              fifo_level_valid,
  output logic              in_word_mon,
  output logic              out_word_mon,
  // status
  output logic              read_active,
  output logic [$clog2(BANKS)+2*ADDR_PINS-1:0] wr_addr,
  output logic [$clog2(BANKS)+2*ADDR_PINS-1:0] rd_addr,
  output logic              ps_adj_err,
  output logic              ps_overrun,
  // SCBERT
  input  logic              scb_enable,
  input  logic [4:0]        scb_len,
  input  logic [15:0]       scb_pattern,
  input  logic [6:0]        scb_chan,
  input  logic              scb_all_chan,
  input  logic              scb_inject,
  output logic              scb_locked,
  output logic [15:0]       scb_err_count,
  output logic              scb_error
);


  // ---------------- write domain ----------------
  logic        w_clr;
  logic [3:0]  delay_code;
  mem_word_t   in_word;
  logic        in_strobe;
  logic [MEM_W-1:0] w_word;
  logic        w_start;
  logic [BANKS-1:0]     w_ras;
  logic                 w_cas, w_we;
  logic [ADDR_PINS-1:0] w_addr;
  logic                 read_en;
  bcd_t                 delay_count;

  control_select u_ctl (
    .clk(in_hs_clk), .remote(remote),
    .local_delay_code(local_delay_code), .local_freq_code(local_freq_code), .local_reset(local_reset),
    .ecm_delay_code(ecm_delay_code), .ecm_freq_code(ecm_freq_code), .ecm_reset(ecm_reset),
    .delay_code(delay_code), .freq_code(freq_code), .reset(w_clr), .remote_ind(remote_ind));

  input_register u_inreg (
    .clk(in_hs_clk), .word_clk(in_word_clk), .data(in_data), .ctrl(in_ctrl),
    .q(in_word), .strobe(in_strobe));

  scbert_gen u_scb_gen (
    .clk(in_hs_clk), .clr(w_clr), .strobe(in_strobe), .enable(scb_enable),
    .len(scb_len), .pattern(scb_pattern), .chan(scb_chan), .all_chan(scb_all_chan),
    .inject(scb_inject), .d(in_word), .q(w_word), .q_strobe(w_start));

  assign in_word_mon = in_word_clk;

  // ---------------- read domain ----------------
  logic                 r_clr;
  logic                 r_word_strobe, r_capture, r_read_en;
  logic [BANKS-1:0]     r_ras;
  logic                 r_cas;
  logic [ADDR_PINS-1:0] r_addr;
  logic [MEM_W-1:0]     r_data;
  mem_word_t            rd_word;

  sync_2ff u_rrst (.clk(out_hs_clk), .d(w_clr), .q(r_clr));

  timing_control #(.BANKS(BANKS), .ADDR_PINS(ADDR_PINS), .DELAY_TABLE(DELAY_TABLE)) u_tc (
    .w_clk(in_hs_clk), .w_clr(w_clr), .w_start(w_start), .delay_code(delay_code),
    .w_ras(w_ras), .w_cas(w_cas), .w_we(w_we), .w_addr(w_addr), .wr_addr(wr_addr),
    .read_en(read_en), .level(fifo_level), .level_valid(fifo_level_valid), .delay_count(delay_count),
    .r_clk(out_hs_clk), .r_clr(r_clr), .r_word_strobe(r_word_strobe),
    .r_ras(r_ras), .r_cas(r_cas), .r_addr(r_addr), .r_capture(r_capture),
    .rd_addr(rd_addr), .r_read_en(r_read_en));

  fifo_memory #(.BANKS(BANKS), .ADDR_PINS(ADDR_PINS), .WIDTH(MEM_W)) u_mem (
    .w_clk(in_hs_clk), .w_ras(w_ras), .w_cas(w_cas), .w_we(w_we), .w_addr(w_addr), .w_data(w_word),
    .r_clk(out_hs_clk), .r_ras(r_ras), .r_cas(r_cas), .r_addr(r_addr), .r_data(r_data));

  assign rd_word = mem_word_t'(r_data);

  vcwcg u_vcwcg (
    .clk(out_hs_clk), .clr(r_clr), .code(rd_word.ctrl.code), .code_load(r_capture),
    .strobe(r_word_strobe), .word_clk(out_word_mon));

  logic       ps_cur_valid, ps_prev_valid, ps_next_valid, ps_word_start;
  logic [7:0] ps_bits_to_next;
  logic [5:0] ps_bit_pos;

  ps_converter u_ps (
    .clk(out_hs_clk), .clr(r_clr), .load(r_capture),
    .data(rd_word.data), .valid(rd_word.ctrl.valid), .last(rd_word.ctrl.last),
    .serial(ser_data), .cur_valid(ps_cur_valid), .prev_valid(ps_prev_valid),
    .next_valid(ps_next_valid), .bits_to_next(ps_bits_to_next), .bit_pos(ps_bit_pos),
    .word_start(ps_word_start), .adj_err(ps_adj_err), .overrun(ps_overrun));

  postmod_switch u_pm (
    .clk(out_hs_clk), .clr(r_clr), .cur_valid(ps_cur_valid), .prev_valid(ps_prev_valid),
    .next_valid(ps_next_valid), .bits_to_next(ps_bits_to_next), .bit_pos(ps_bit_pos),
    .ctrl(postmod_ctrl));

  scbert_chk u_scb_chk (
    .clk(out_hs_clk), .clr(r_clr), .strobe(r_capture && scb_enable), .d(r_data),
    .chan(scb_chan), .len(scb_len), .pattern(scb_pattern),
    .locked(scb_locked), .err_count(scb_err_count), .error(scb_error));

  assign read_active = r_read_en;

endmodule
