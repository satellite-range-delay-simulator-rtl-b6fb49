// tb_scbert_gen - checks the SCBERT generator: the selected channel carries
// the N-word pattern (N = 15 and 5), the other channels pass the input word
// through or, with all channels exercised, carry the pattern delayed by
// (channel mod 8) words; with injection on, exactly one bit per 65,536
// repetitions is inverted; with the tester off the word passes unchanged.
`include "tb_check.svh"
module tb_scbert_gen;
  int checks = 0, failures = 0;
  logic clk = 0, clr = 1, strobe = 0, enable = 0, all_chan = 0, inject = 0, q_strobe;
  logic [4:0] len = 15;
  logic [15:0] pattern = 16'hB4C7;
  logic [6:0] chan = 7'd37;
  logic [69:0] d = 0, q;

  scbert_gen dut (.*);

  always #1 clk = ~clk;

  initial begin
    #20000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic ref_bit(int k, int n);  // pattern bit of word k (k >= 0)
    return pattern[k % n];
  endfunction

  task automatic step(output logic [69:0] o);
    d <= {$urandom, $urandom, $urandom};
    strobe <= 1; @(posedge clk); #0.1;
    `CHECK(q_strobe, "q_strobe follows strobe")
    o = q;
    strobe <= 0; @(posedge clk);
  endtask

  initial begin
    logic [69:0] o;
    int errs;
    repeat (2) @(posedge clk); clr <= 0;
    // tester off: pass-through
    repeat (5) begin step(o); `CHECK(o == d, "pass-through when off") end
    // selected channel only, N = 15
    clr <= 1; enable <= 1; @(posedge clk); clr <= 0;
    for (int k = 0; k < 60; k++) begin
      logic [69:0] e;
      step(o);
      e = d; e[37] = ref_bit(k, 15);
      `CHECK(o == e, $sformatf("word %0d channel only", k))
    end
    // all channels, N = 5, channel 3
    clr <= 1; all_chan <= 1; len <= 5; chan <= 3; @(posedge clk); clr <= 0;
    for (int k = 0; k < 40; k++) begin
      logic [69:0] e;
      step(o);
      for (int c = 0; c < 70; c++) e[c] = (k - c % 8 >= 0) ? ref_bit(k - c % 8, 5) : 1'b0;
      e[3] = ref_bit(k, 5);
      `CHECK(o == e, $sformatf("word %0d all channels", k))
    end
    // injection: one error per 65,536 x N words, N = 2
    clr <= 1; all_chan <= 0; len <= 2; chan <= 0; inject <= 1; @(posedge clk); clr <= 0;
    errs = 0;
    for (int k = 0; k < 2 * 65536 * 2 + 4; k++) begin
      d <= '0; strobe <= 1; @(posedge clk); strobe <= 0; @(posedge clk); #0.1;
      if (q[0] != ref_bit(k, 2)) errs++;
    end
    `CHECK(errs == 3, $sformatf("%0d injected errors in 2 x 65536 repetitions plus 2 words", errs))
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
