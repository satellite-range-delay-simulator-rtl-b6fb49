// timing_control - the RDS timing and control board.
//
// Two halves on two asynchronous clocks. The write half, on the input high
// speed clock, steps the write address counter and runs one memory WRITE
// cycle per input word strobe, and holds the decimal delay control counter
// that decides when reading may begin. The read half, on the output high
// speed clock, is inhibited after RESET until the read enable (brought over
// through a synchronizer) is set; then every OUTPUT WORD CLOCK strobe runs
// one memory READ cycle at the read address and steps the read address
// counter. A read address rollover is carried back to the write half as a
// pulse so the delay control counter can be latched as the FIFO level.
//
// Interface: w_* and r_* signals belong to the write and read clock
// domains. w_start/r_word_strobe are one-clock word strobes. Memory strobes
// (ras, cas, we, multiplexed address) go to fifo_memory; r_capture pulses
// when the read word is valid at fifo_memory's r_data.
// Timing: each strobe first steps its address counter; the memory cycle
// starts the clock after and uses the new address (so the first word after
// RESET is written at, and read from, address 1). The read data are valid
// T_DATA+2 clocks after r_word_strobe.
//
// From the source design: the counters, their clearing by RESET, the read
// inhibit until the initial delay has been written, row/column multiplexing
// and bank enables. Own choices: synchronizers between the domains, cycle
// timing (see dram_cycle_ctrl).
module timing_control
  import rds_pkg::*;
#(
  parameter int unsigned  BANKS       = 3,
  parameter int unsigned  ADDR_PINS   = 9,
  parameter delay_table_t DELAY_TABLE = INIT_DELAY_WORDS
) (
  // write domain
  input  logic                      w_clk,
  input  logic                      w_clr,
  input  logic                      w_start,
  input  logic [3:0]                delay_code,
  output logic [BANKS-1:0]          w_ras,
  output logic                      w_cas,
  output logic                      w_we,
  output logic [ADDR_PINS-1:0]      w_addr,
  output logic [$clog2(BANKS)+2*ADDR_PINS-1:0] wr_addr,
  output logic                      read_en,
  output bcd_t                      level,
  output logic                      level_valid,
  output bcd_t                      delay_count,
  // read domain
  input  logic                      r_clk,
  input  logic                      r_clr,
  input  logic                      r_word_strobe,
  output logic [BANKS-1:0]          r_ras,
  output logic                      r_cas,
  output logic [ADDR_PINS-1:0]      r_addr,
  output logic                      r_capture,
  output logic [$clog2(BANKS)+2*ADDR_PINS-1:0] rd_addr,
  output logic                      r_read_en
);

  localparam int unsigned CHIP_BITS = 2 * ADDR_PINS;

  // ---------------- write half ----------------
  logic [$clog2(BANKS)-1:0] wr_bank;
  logic [CHIP_BITS-1:0]     wr_chip;
  logic                     wr_roll, rd_roll_w;
  logic                     w_busy, w_capture_unused;
  logic                     w_go;

  // The word strobe steps the counter; the cycle then writes at the new address.
  logic w_cyc;
  assign w_go = w_start;
  always_ff @(posedge w_clk) w_cyc <= w_go && !w_clr;

  dram_cycle_ctrl #(.BANKS(BANKS), .ADDR_PINS(ADDR_PINS), .IS_WRITE(1'b1)) u_wcyc (
    .clk(w_clk), .clr(w_clr), .start(w_cyc), .bank(wr_bank), .chip_addr(wr_chip),
    .ras(w_ras), .cas(w_cas), .we(w_we), .mem_addr(w_addr),
    .capture(w_capture_unused), .busy(w_busy));

  addr_counter #(.BANKS(BANKS), .CHIP_BITS(CHIP_BITS)) u_wcnt (
    .clk(w_clk), .clr(w_clr), .inc(w_go),
    .addr(wr_addr), .bank(wr_bank), .chip_addr(wr_chip), .rollover(wr_roll));

  delay_control #(.DELAY_TABLE(DELAY_TABLE)) u_dly (
    .clk(w_clk), .clr(w_clr), .wr_strobe(w_go), .wr_rollover(wr_roll),
    .rd_rollover(rd_roll_w), .delay_code(delay_code),
    .read_en(read_en), .level(level), .level_valid(level_valid), .count(delay_count));

  // ---------------- read half ----------------
  logic [$clog2(BANKS)-1:0] rd_bank;
  logic [CHIP_BITS-1:0]     rd_chip;
  logic                     rd_roll, r_busy, r_we_unused, r_go;

  sync_2ff u_rden (.clk(r_clk), .d(read_en), .q(r_read_en));

  assign r_go = r_word_strobe && r_read_en && !r_clr;

  logic r_cyc;
  always_ff @(posedge r_clk) r_cyc <= r_go && !r_clr;

  dram_cycle_ctrl #(.BANKS(BANKS), .ADDR_PINS(ADDR_PINS), .IS_WRITE(1'b0)) u_rcyc (
    .clk(r_clk), .clr(r_clr), .start(r_cyc), .bank(rd_bank), .chip_addr(rd_chip),
    .ras(r_ras), .cas(r_cas), .we(r_we_unused), .mem_addr(r_addr),
    .capture(r_capture), .busy(r_busy));

  addr_counter #(.BANKS(BANKS), .CHIP_BITS(CHIP_BITS)) u_rcnt (
    .clk(r_clk), .clr(r_clr), .inc(r_go),
    .addr(rd_addr), .bank(rd_bank), .chip_addr(rd_chip), .rollover(rd_roll));

  pulse_sync u_roll (.src_clk(r_clk), .src_pulse(rd_roll), .dst_clk(w_clk), .dst_pulse(rd_roll_w));

endmodule
