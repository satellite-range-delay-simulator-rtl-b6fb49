// tb_dram_cycle_ctrl - checks one memory cycle's sequence at the default
// timing: the row half of the chip address on the address lines until T_COL,
// RAS of only the addressed bank from T_RAS to T_END, CAS (and WE on the write
// controller) from T_CAS, the capture pulse at T_DATA, and the end of busy.
`include "tb_check.svh"
module tb_dram_cycle_ctrl;
  int checks = 0, failures = 0;
  logic clk = 0, clr = 1, start = 0;
  logic [1:0] bank;
  logic [17:0] chip_addr;
  logic [2:0] ras, r_ras;
  logic cas, we, capture, busy, r_cas, r_we, r_capture, r_busy;
  logic [8:0] mem_addr, r_mem_addr;

  dram_cycle_ctrl #(.IS_WRITE(1'b1)) dut_w (.clk, .clr, .start, .bank, .chip_addr,
    .ras, .cas, .we, .mem_addr, .capture, .busy);
  dram_cycle_ctrl #(.IS_WRITE(1'b0)) dut_r (.clk, .clr, .start, .bank, .chip_addr,
    .ras(r_ras), .cas(r_cas), .we(r_we), .mem_addr(r_mem_addr), .capture(r_capture), .busy(r_busy));

  always #5 clk = ~clk;

  initial begin
    #200000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int caps;
    repeat (2) @(posedge clk); clr <= 0;
    for (int k = 0; k < 6; k++) begin
      logic [1:0] b; logic [17:0] a;
      b = 2'(k % 3); a = 18'($urandom);
      @(posedge clk); start <= 1; bank <= b; chip_addr <= a;
      @(posedge clk); start <= 0; bank <= 2'($urandom % 3); chip_addr <= 18'($urandom);
      caps = 0;
      for (int t = 0; t <= 45; t++) begin
        #1;
        `CHECK(ras == ((t >= 1 && t < 40) ? 3'(1 << b) : 3'b0), $sformatf("ras at t=%0d: %b", t, ras))
        `CHECK(r_ras == ras, "read controller RAS matches")
        `CHECK(cas == (t >= 4 && t < 40), $sformatf("cas at t=%0d", t))
        `CHECK(we == cas && r_we == 1'b0, "WE only on write side")
        if (t <= 40)
          `CHECK(mem_addr == (t < 3 ? a[17:9] : a[8:0]), $sformatf("address mux at t=%0d", t))
        `CHECK(busy == (t <= 40), $sformatf("busy at t=%0d", t))
        if (r_capture) begin
          caps++;
          `CHECK(t == 28, $sformatf("capture at t=%0d", t))
        end
        @(posedge clk);
      end
      `CHECK(caps == 1, "one capture per cycle")
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
