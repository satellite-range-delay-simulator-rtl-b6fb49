// tb_input_register - drives a word clock of 64 high speed clocks (with an
// occasional 63, 65 and 56) and a new random word each period, and checks
// that every word is latched with its control bits, one strobe per word.
`include "tb_check.svh"
module tb_input_register;
  import rds_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, word_clk = 0, strobe;
  logic [63:0] data = 0;
  word_ctrl_t ctrl = '0;
  mem_word_t q;
  logic [67:0] sent [$];
  int strobes = 0;

  input_register dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    #1;
    if (strobe && sent.size() > 0) begin
      logic [67:0] e;
      strobes++;
      e = sent.pop_front();
      `CHECK({q.ctrl, q.data} == e && q.spare == 0, $sformatf("word %0d latched %h", strobes, {q.ctrl, q.data}))
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    for (int w = 0; w < 200; w++) begin
      int per;
      per = (w % 17 == 5) ? 63 : (w % 17 == 9) ? 65 : (w % 31 == 7) ? 56 : 64;
      @(posedge clk);
      word_clk <= 1; data <= {$urandom, $urandom}; ctrl <= word_ctrl_t'($urandom);
      #1 sent.push_back({ctrl, data});
      repeat (per / 2 - 1) @(posedge clk);
      word_clk <= 0;
      repeat (per - per / 2) @(posedge clk);
    end
    repeat (10) @(posedge clk);
    `CHECK(strobes == 200, $sformatf("%0d strobes for 200 words", strobes))
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
