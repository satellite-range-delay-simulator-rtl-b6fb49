// delay_control - decimal delay control counter, read enable and FIFO level.
//
// RESET clears the counter and the read enable and samples the 4-bit INITIAL
// DELAY CONTROL CODE. The counter then counts written words in decimal. When
// it reaches the word count that the code selects from DELAY_TABLE, the read
// enable is set and stays set until the next RESET; from then on the read
// address counter follows the write counter at that distance. Afterwards the
// counter is cleared whenever the write address counter rolls over and its
// value is latched whenever the read address counter rolls over: at that
// moment it equals the number of words between the write and the read
// address, the FIFO LEVEL - WORDS shown on the six-digit panel display.
//
// Interface (all in the write clock domain): clr (RESET), wr_strobe (one per
// written word), wr_rollover, rd_rollover (already brought into this domain),
// delay_code. Outputs: read_en, level (packed BCD, 6 digits), level_valid
// (set after the first latch), count (the running BCD count).
// Timing: read_en rises the clock after the count reaches the table value.
//
// From the source design: decimal counting, clear on write rollover, latch on
// read rollover, the 16-entry table of initial delays. Own choices: the code
// is sampled at RESET, the comparison is made in BCD.
module delay_control
  import rds_pkg::*;
#(
  parameter delay_table_t DELAY_TABLE = INIT_DELAY_WORDS
) (
  input  logic       clk,
  input  logic       clr,
  input  logic       wr_strobe,
  input  logic       wr_rollover,
  input  logic       rd_rollover,
  input  logic [3:0] delay_code,
  output logic       read_en,
  output bcd_t       level,
  output logic       level_valid,
  output bcd_t       count
);

  bcd_t target;

  always_ff @(posedge clk) begin
    if (clr) begin
      count       <= '0;
      read_en     <= 1'b0;
      level       <= '0;
      level_valid <= 1'b0;
      target      <= to_bcd(DELAY_TABLE[delay_code]);
    end else begin
      if (wr_rollover)    count <= '0;
      else if (wr_strobe) count <= bcd_inc(count);
      if (!read_en && count == target) read_en <= 1'b1;
      if (rd_rollover) begin
        level       <= count;
        level_valid <= 1'b1;
      end
    end
  end

endmodule
