// tb_delay_control - checks the delay control counter with the full
// 16-entry delay table: after RESET the read enable must rise once exactly
// the selected number of words has been written (codes 0, 9 and 15 run in
// full); the decimal count must match the binary word count; a write
// rollover clears it and a read rollover latches it as the FIFO level.
`include "tb_check.svh"
module tb_delay_control;
  import rds_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, clr = 1, wr_strobe = 0, wr_rollover = 0, rd_rollover = 0;
  logic [3:0] delay_code = 0;
  logic read_en, level_valid;
  bcd_t level, count;

  delay_control dut (.*);

  always #1 clk = ~clk;

  initial begin
    #20000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // reference: packed BCD of a number, worked digit by digit
  function automatic logic [23:0] ref_bcd(int v);
    logic [23:0] r;
    for (int i = 0; i < 6; i++) begin r[4*i +: 4] = 4'(v % 10); v /= 10; end
    return r;
  endfunction

  initial begin
    int codes [3] = '{0, 9, 15};
    int words [3] = '{280000, 424000, 520000};
    foreach (codes[k]) begin
      int n, en_at;
      delay_code <= 4'(codes[k]); clr <= 1;
      repeat (3) @(posedge clk); clr <= 0;
      @(posedge clk);
      `CHECK(count == 0 && !read_en && !level_valid, "RESET state")
      n = 0; en_at = -1;
      while (n < words[k] + 5) begin
        wr_strobe <= 1; @(posedge clk); wr_strobe <= 0; n++;
        @(posedge clk); #0.1;
        if (read_en && en_at < 0) en_at = n;
        if (n % 9973 == 0) `CHECK(count == ref_bcd(n), $sformatf("BCD count at %0d: %h", n, count))
      end
      `CHECK(en_at == words[k], $sformatf("code %0d: read enabled after %0d words, expected %0d", codes[k], en_at, words[k]))
      // read rollover latches, write rollover clears
      rd_rollover <= 1; @(posedge clk); rd_rollover <= 0; @(posedge clk);
      `CHECK(level_valid && level == ref_bcd(n), $sformatf("level latched %h", level))
      wr_rollover <= 1; @(posedge clk); wr_rollover <= 0; @(posedge clk);
      `CHECK(count == 0 && read_en, "write rollover clears the count, read stays enabled")
      repeat (1234) begin wr_strobe <= 1; @(posedge clk); wr_strobe <= 0; @(posedge clk); end
      rd_rollover <= 1; @(posedge clk); rd_rollover <= 0; @(posedge clk); #0.1;
      `CHECK(level == ref_bcd(1234), $sformatf("level after rollover %h", level))
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
