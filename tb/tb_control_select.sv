// tb_control_select - checks LOCAL/REMOTE selection of both codes, the
// mode indicator, and that a RESET from the selected source (and only from
// it) produces a synchronous reset at least RESET_HOLD clocks long.
`include "tb_check.svh"
module tb_control_select;
  int checks = 0, failures = 0;
  logic clk = 0, remote = 0, local_reset = 0, ecm_reset = 0;
  logic [3:0] local_delay_code = 4'd3, ecm_delay_code = 4'd12, delay_code;
  logic [11:0] local_freq_code = 12'h123, ecm_freq_code = 12'hABC, freq_code;
  logic reset, remote_ind;

  control_select dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic pulse_and_measure(input bit use_remote, input bit from_remote, output int len);
    remote <= use_remote;
    repeat (25) @(posedge clk);
    if (from_remote) ecm_reset <= 1; else local_reset <= 1;
    @(posedge clk);
    ecm_reset <= 0; local_reset <= 0;
    len = 0;
    repeat (40) begin @(posedge clk); #1; if (reset) len++; end
  endtask

  initial begin
    int len;
    repeat (30) @(posedge clk); #1;
    `CHECK(delay_code == 3 && freq_code == 12'h123 && !remote_ind, "LOCAL codes")
    remote <= 1; repeat (2) @(posedge clk); #1;
    `CHECK(delay_code == 12 && freq_code == 12'hABC && remote_ind, "REMOTE codes")
    pulse_and_measure(1'b0, 1'b0, len);
    `CHECK(len >= 16 && len <= 18, $sformatf("LOCAL RESET gave %0d clocks", len))
    pulse_and_measure(1'b0, 1'b1, len);
    `CHECK(len == 0, "computer RESET ignored in LOCAL")
    pulse_and_measure(1'b1, 1'b1, len);
    `CHECK(len >= 16 && len <= 18, $sformatf("REMOTE RESET gave %0d clocks", len))
    pulse_and_measure(1'b1, 1'b0, len);
    `CHECK(len == 0, "panel RESET ignored in REMOTE")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
