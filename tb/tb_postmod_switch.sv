// tb_postmod_switch - drives the post-mod switch control from a P/S
// converter fed with frames that hold one valid burst of 3..6 words, and
// checks that the control rises exactly 32 bits before the first bit of
// each burst and falls exactly 32 bits after its last bit, and never pulses
// otherwise.
`include "tb_check.svh"
module tb_postmod_switch;
  int checks = 0, failures = 0;
  logic clk = 0, clr = 1, load = 0, valid = 0, last = 0;
  logic [63:0] data = 0;
  logic serial, cur_valid, prev_valid, next_valid, word_start, adj_err, overrun, ctrl;
  logic [7:0] bits_to_next;
  logic [5:0] bit_pos;

  ps_converter u_ps (.*);
  postmod_switch dut (.clk, .clr, .cur_valid, .prev_valid, .next_valid, .bits_to_next, .bit_pos, .ctrl);

  always #5 clk = ~clk;

  int cyc = 0, rises = 0, falls = 0;
  int burst_start [$], burst_end [$];
  logic ctrl_q = 0, cv_q = 0;

  initial begin
    #2000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk); clr <= 0;
    for (int f = 0; f < 8; f++) begin
      int b0, bl;
      b0 = 2 + (f % 3); bl = 3 + (f % 4);
      for (int w = 0; w < 12; w++) begin
        load <= 1; data <= {$urandom, $urandom};
        valid <= (w >= b0 && w < b0 + bl); last <= (w == 11);
        @(posedge clk); load <= 0;
        repeat (63) @(posedge clk);
      end
    end
    repeat (300) @(posedge clk);
    `CHECK(rises == 8 && falls == 8, $sformatf("%0d rises, %0d falls for 8 bursts", rises, falls))
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // burst edges seen on the serial side: cur_valid changes at word starts
  always @(posedge clk) begin
    #1;
    cyc++;
    if (cur_valid && !cv_q) burst_start.push_back(cyc);
    if (!cur_valid && cv_q) burst_end.push_back(cyc);
    if (ctrl && !ctrl_q) begin
      rises++;
      fork begin : wait_start
        int t0; t0 = cyc;
        wait (burst_start.size() > 0);
        `CHECK(burst_start[0] - t0 == 32, $sformatf("rise %0d clocks before burst", burst_start[0] - t0))
        void'(burst_start.pop_front());
      end join_none
    end
    if (!ctrl && ctrl_q) begin
      falls++;
      `CHECK(burst_end.size() > 0 && cyc - burst_end[0] == 32, $sformatf("fall %0d clocks after burst", cyc - (burst_end.size() > 0 ? burst_end[0] : 0)))
      if (burst_end.size() > 0) void'(burst_end.pop_front());
    end
    ctrl_q = ctrl; cv_q = cur_valid;
  end
endmodule
