// tb_timing_control - runs the timing and control board with a small FIFO
// memory (3 banks of 16 words) on two clocks of slightly different rate.
// Words 1, 2, 3, ... are written one per 64 write clocks; the test checks
// that reading starts only after the selected initial delay, that the words
// come back in order, that the FIFO level latched at each read rollover
// equals the write address minus the read address at that moment, and that
// the two sides never strobe the same bank.
`include "tb_check.svh"
module tb_timing_control;
  import rds_pkg::*;
  int checks = 0, failures = 0;
  localparam int AP = 2;
  localparam delay_table_t TBL = '{18, 19, 20, 21, 22, 23, 24, 25, 26, 27, 28, 29, 30, 31, 31, 31};
  logic w_clk = 0, r_clk = 0, w_clr = 1, r_clr = 1, w_start = 0, r_word_strobe = 0;
  logic [3:0] delay_code = 4'd6;
  logic [2:0] w_ras, r_ras;
  logic w_cas, w_we, r_cas, r_capture, read_en, level_valid, r_read_en;
  logic [AP-1:0] w_addr, r_addr;
  logic [5:0] wr_addr, rd_addr;
  bcd_t level, delay_count;
  logic [69:0] w_data, r_data;

  timing_control #(.ADDR_PINS(AP), .DELAY_TABLE(TBL)) dut (.*);
  fifo_memory #(.ADDR_PINS(AP)) mem (.w_clk, .w_ras, .w_cas, .w_we, .w_addr, .w_data,
                                     .r_clk, .r_ras, .r_cas, .r_addr, .r_data);

  always #5 w_clk = ~w_clk;
  always #5.02 r_clk = ~r_clk;

  int written = 0, wphase = 0, rphase = 0, reads = 0, latches = 0, first_read_written = -1;

  initial begin
    #3000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // write side: word k carries k in its low bits
  always @(posedge w_clk) begin
    w_start <= 1'b0;
    if (!w_clr) begin
      wphase <= (wphase + 1) % 64;
      if (wphase == 0) begin
        w_start <= 1'b1;
        written <= written + 1;
        w_data  <= 70'(written + 1);
      end
    end
  end

  // read side word strobes
  always @(posedge r_clk) begin
    r_word_strobe <= 1'b0;
    if (!r_clr) begin
      rphase <= (rphase + 1) % 64;
      r_word_strobe <= (rphase == 0);
    end
  end

  always @(posedge r_clk) begin
    if (r_capture) begin
      reads++;
      if (first_read_written < 0) first_read_written = written;
      `CHECK(r_data == 70'(reads), $sformatf("read %0d returned %0d", reads, r_data))
    end
    if ((r_ras & w_ras) != 0) `CHECK(0, "same bank strobed by both sides")
  end

  always @(posedge w_clk) begin
    if (dut.rd_roll_w) begin
      latches++;
      fork begin
        @(posedge w_clk); #1;
        `CHECK(level == to_bcd((int'(wr_addr) - int'(rd_addr) + 48) % 48),
               $sformatf("level %h, addresses %0d/%0d", level, wr_addr, rd_addr))
      end join_none
    end
  end

  initial begin
    repeat (4) @(posedge w_clk); w_clr <= 0;
    @(posedge r_clk); r_clr <= 0;
    wait (reads == 300);
    `CHECK(first_read_written >= 24 && first_read_written <= 25,
           $sformatf("first read after %0d words written, delay 24", first_read_written))
    `CHECK(latches >= 5, $sformatf("%0d level latches", latches))
    `CHECK(level_valid && r_read_en && read_en, "enabled and level valid")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
