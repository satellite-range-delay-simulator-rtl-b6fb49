// tb_scbert_chk - feeds the SCBERT checker the selected channel of words
// carrying the N-word pattern at an arbitrary phase (as after the FIFO
// delay), with random data in the other channels. Checks that it locks
// without counting errors, then counts each deliberately flipped bit once
// with one ERROR pulse, and that RESET clears the count.
`include "tb_check.svh"
module tb_scbert_chk;
  int checks = 0, failures = 0;
  logic clk = 0, clr = 1, strobe = 0, locked, error;
  logic [69:0] d = 0;
  logic [6:0] chan = 7'd66;
  logic [4:0] len = 15;
  logic [15:0] pattern = 16'h35A9, err_count;
  int pulses = 0;

  scbert_chk dut (.*);

  always #1 clk = ~clk;
  always @(posedge clk) if (error && !clr) pulses++;

  initial begin
    #400000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic send(int k, bit flip);
    logic [69:0] w;
    w = {$urandom, $urandom, $urandom};
    w[66] = pattern[k % 15] ^ flip;
    d <= w; strobe <= 1; @(posedge clk); strobe <= 0; @(posedge clk);
  endtask

  initial begin
    int phase, flips;
    repeat (2) @(posedge clk); clr <= 0;
    phase = 11;
    for (int k = 0; k < 400; k++) send(k + phase, 0);
    `CHECK(locked && err_count == 0, $sformatf("locked %0d with %0d errors", locked, err_count))
    flips = 0;
    for (int k = 400; k < 2000; k++) begin
      bit f; f = (k % 97 == 0);
      flips += f;
      send(k + phase, f);
    end
    @(posedge clk);
    `CHECK(err_count == 16'(flips), $sformatf("counted %0d of %0d errors", err_count, flips))
    `CHECK(pulses == flips, $sformatf("%0d ERROR pulses", pulses))
    clr <= 1; @(posedge clk); clr <= 0; @(posedge clk);
    `CHECK(err_count == 0 && !locked, "RESET clears")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
