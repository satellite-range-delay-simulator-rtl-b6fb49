// dram_cycle_ctrl - generates one memory WRITE or READ cycle per word clock.
//
// A word clock strobe starts a fixed sequence counted in high speed clock
// periods (4.52 ns at 221.184 MHz): the row half of the chip address is put on
// the nine multiplexed address lines, the RAS line of the addressed bank is
// raised, the address lines switch to the column half and CAS (and, on the
// write side, WE) is raised. A read's data are captured T_DATA clocks after
// the start, leaving the DRAM's 120 ns access time; all strobes drop at T_END
// so that the cycle fits inside the shortest word period (56 clocks).
//
// Interface: start (one-clock word strobe), bank and chip_addr (held by the
// address counter for the cycle). Outputs: ras[BANKS], cas, we, mem_addr;
// capture is a one-clock pulse at T_DATA (read data valid at the memory),
// busy is high through the cycle.
//
// From the source design: row-then-column address multiplexing, bank
// enables, one full cycle per word, 120 ns access. Own choices: the tick
// positions of every edge.
module dram_cycle_ctrl #(
  parameter int unsigned BANKS     = 3,
  parameter int unsigned ADDR_PINS = 9,
  parameter bit          IS_WRITE  = 1'b1,
  parameter int unsigned T_RAS     = 1,
  parameter int unsigned T_COL     = 3,
  parameter int unsigned T_CAS     = 4,
  parameter int unsigned T_DATA    = 28,
  parameter int unsigned T_END     = 40
) (
  input  logic                         clk,
  input  logic                         clr,
  input  logic                         start,
  input  logic [$clog2(BANKS)-1:0]     bank,
  input  logic [2*ADDR_PINS-1:0]       chip_addr,
  output logic [BANKS-1:0]             ras,
  output logic                         cas,
  output logic                         we,
  output logic [ADDR_PINS-1:0]         mem_addr,
  output logic                         capture,
  output logic                         busy
);

  localparam int unsigned TW = $clog2(T_END + 1);

  logic [TW-1:0]               t;
  logic [$clog2(BANKS)-1:0]    bank_q;
  logic [2*ADDR_PINS-1:0]      addr_q;

  always_ff @(posedge clk) begin
    if (clr) begin
      busy <= 1'b0;
      t    <= '0;
    end else if (start) begin
      busy   <= 1'b1;
      t      <= '0;
      bank_q <= bank;
      addr_q <= chip_addr;
    end else if (busy) begin
      if (t == TW'(T_END)) busy <= 1'b0;
      else                 t    <= t + TW'(1);
    end
  end

  always_comb begin
    ras      = '0;
    cas      = 1'b0;
    we       = 1'b0;
    capture  = 1'b0;
    mem_addr = addr_q[2*ADDR_PINS-1:ADDR_PINS];  // row half
    if (busy) begin
      if (t >= TW'(T_RAS) && t < TW'(T_END)) ras[bank_q] = 1'b1;
      if (t >= TW'(T_COL)) mem_addr = addr_q[ADDR_PINS-1:0];  // column half
      if (t >= TW'(T_CAS) && t < TW'(T_END)) begin
        cas = 1'b1;
        we  = IS_WRITE;
      end
      capture = (t == TW'(T_DATA));
    end
  end

  // A new word may only start once the previous cycle has ended.
  always_ff @(posedge clk)
    assert (clr || !(start && busy)) else $error("dram_cycle_ctrl: word clock faster than memory cycle");

endmodule
