// tb_vcwcg - feeds the word clock generator a VCWCG code at a fixed point in
// each word period and measures the distance between word strobes: 64 clocks
// for 00, 63 for 01, 65 for 10, 56 for 11, 64 when no code is loaded.
`include "tb_check.svh"
module tb_vcwcg;
  import rds_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, clr = 1, code_load = 0, strobe, word_clk;
  vc_code_e code = VC_NOMINAL;

  vcwcg dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  vc_code_e seq [$];
  int       cyc = 0, last = -1, n = 0, highs = 0;
  vc_code_e cur_code;
  logic     have_code;

  initial begin
    for (int i = 0; i < 40; i++) seq.push_back(vc_code_e'($urandom % 4));
    repeat (2) @(posedge clk); clr <= 0;
    forever begin
      @(posedge clk);
      cyc++;
    end
  end

  // At each strobe check the period that just ended, then load the next code 30 clocks in.
  initial begin
    @(negedge clr);
    forever begin
      @(posedge clk); #1;
      if (strobe) begin
        if (last >= 0) begin
          int exp;
          exp = have_code ? vc_divisor(cur_code) : 64;
          `CHECK(cyc - last == exp, $sformatf("period %0d, expected %0d", cyc - last, exp))
          `CHECK(highs == 32, $sformatf("word clock high for %0d clocks", highs))
        end
        last = cyc; highs = 0; n++;
        have_code = (n % 5 != 0) && seq.size() > 0;
        if (have_code) begin
          cur_code = seq.pop_front();
          fork begin
            repeat (29) @(posedge clk);
            code <= cur_code; code_load <= 1;
            @(posedge clk); code_load <= 0; code <= VC_NOMINAL;
          end join_none
        end
        if (n == 50) begin
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
      if (word_clk) highs++;
    end
  end
endmodule
