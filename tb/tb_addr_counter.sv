// tb_addr_counter - checks the FIFO address counter at a reduced chip size
// (3 banks of 16 words): the count sequence, the bank field, the wrap from
// the last word of bank 2 to zero with its rollover pulse, and RESET.
`include "tb_check.svh"
module tb_addr_counter;
  int checks = 0, failures = 0;
  logic clk = 0, clr = 1, inc = 0;
  logic [5:0] addr;
  logic [1:0] bank;
  logic [3:0] chip_addr;
  logic rollover;
  int rolls = 0;

  addr_counter #(.BANKS(3), .CHIP_BITS(4)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rollover && !clr) rolls++;

  initial begin
    #100000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int exp;
    repeat (2) @(posedge clk);
    clr <= 0;
    @(posedge clk);
    `CHECK(addr == 0, "address zero after RESET")
    exp = 0;
    for (int i = 0; i < 110; i++) begin
      inc <= 1; @(posedge clk); inc <= 0;
      exp = (exp + 1) % 48;
      #1;
      `CHECK(addr == 6'(exp), $sformatf("address %0d expected %0d", addr, exp))
      `CHECK(bank == 2'(exp / 16) && chip_addr == 4'(exp % 16), "bank/chip split")
      `CHECK(rollover == (exp == 0), "rollover pulse only on wrap")
      repeat (i % 3) @(posedge clk);
    end
    `CHECK(rolls == 2, $sformatf("two rollovers in 110 words, saw %0d", rolls))
    clr <= 1; @(posedge clk); clr <= 0; #1;
    `CHECK(addr == 0, "RESET clears")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
