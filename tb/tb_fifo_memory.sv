// tb_fifo_memory - writes words through the multiplexed row/column port on
// one clock and reads them back through the other port on an unrelated
// clock, at a reduced chip size (3 banks of 64 words, 70 bits). Every word
// gets a different value, so a wrong bank, row or column shows up.
`include "tb_check.svh"
module tb_fifo_memory;
  int checks = 0, failures = 0;
  localparam int AP = 3, BK = 3, W = 70;
  logic w_clk = 0, r_clk = 0;
  logic [BK-1:0] w_ras = 0, r_ras = 0;
  logic w_cas = 0, w_we = 0, r_cas = 0;
  logic [AP-1:0] w_addr = 0, r_addr = 0;
  logic [W-1:0] w_data = 0, r_data;

  fifo_memory #(.BANKS(BK), .ADDR_PINS(AP), .WIDTH(W)) dut (.*);

  always #5 w_clk = ~w_clk;
  always #7 r_clk = ~r_clk;

  function automatic logic [W-1:0] pat(int b, int row, int col);
    return {6'(b), 32'(row * 7919 + 13), 32'(col * 104729 + b * 31 + 5)};
  endfunction

  task automatic wr(int b, int row, int col);
    @(posedge w_clk); w_addr <= AP'(row);
    @(posedge w_clk); w_ras[b] <= 1;
    @(posedge w_clk); w_addr <= AP'(col); w_data <= pat(b, row, col);
    @(posedge w_clk); w_cas <= 1; w_we <= 1;
    @(posedge w_clk); @(posedge w_clk); w_cas <= 0; w_we <= 0; w_ras <= 0;
  endtask

  task automatic rd(int b, int row, int col, output logic [W-1:0] q);
    @(posedge r_clk); r_addr <= AP'(row);
    @(posedge r_clk); r_ras[b] <= 1;
    @(posedge r_clk); r_addr <= AP'(col);
    @(posedge r_clk); r_cas <= 1;
    @(posedge r_clk); @(posedge r_clk); q = r_data; r_cas <= 0; r_ras <= 0;
  endtask

  initial begin
    #10000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [W-1:0] q;
    for (int b = 0; b < BK; b++)
      for (int row = 0; row < 8; row++)
        for (int col = 0; col < 8; col++)
          wr(b, row, col);
    for (int b = BK - 1; b >= 0; b--)
      for (int row = 0; row < 8; row++)
        for (int col = 7; col >= 0; col--) begin
          rd(b, row, col, q);
          `CHECK(q == pat(b, row, col), $sformatf("bank %0d row %0d col %0d read %h", b, row, col, q))
        end
    // a write without WE must not change the word
    @(posedge w_clk); w_addr <= 1;
    @(posedge w_clk); w_ras[1] <= 1;
    @(posedge w_clk); w_addr <= 2; w_data <= '1;
    @(posedge w_clk); w_cas <= 1;
    @(posedge w_clk); @(posedge w_clk); w_cas <= 0; w_ras <= 0;
    rd(1, 1, 2, q);
    `CHECK(q == pat(1, 1, 2), "CAS without WE leaves the word")
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
