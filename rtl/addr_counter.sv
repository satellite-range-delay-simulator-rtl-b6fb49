// addr_counter - FIFO write or read address counter.
//
// A 20-bit binary counter that steps once per word clock and wraps after the
// last location of the last bank (3 x 2^18 - 1 = 786,431 by default). The two
// high-order bits select the memory bank, the low-order 18 bits the chip
// address. A one-clock pulse marks each rollover to zero; the delay control
// counter uses the write side's and latches on the read side's.
//
// Interface: clk/clr (synchronous clear, the RDS RESET), inc (one-clock word
// strobe). addr, bank and chip_addr change on the clock after inc; rollover is
// high for that clock when the new address is zero.
//
// From the source design: 20 bits, bank in the two high bits, counting at the
// word clock, cleared by RESET. Own choice: the counter skips the unused
// fourth bank by wrapping at BANKS x 2^CHIP_BITS.
module addr_counter #(
  parameter int unsigned BANKS     = 3,
  parameter int unsigned CHIP_BITS = 18
) (
  input  logic                           clk,
  input  logic                           clr,
  input  logic                           inc,
  output logic [$clog2(BANKS)+CHIP_BITS-1:0] addr,
  output logic [$clog2(BANKS)-1:0]       bank,
  output logic [CHIP_BITS-1:0]           chip_addr,
  output logic                           rollover
);

  localparam int unsigned AW   = $clog2(BANKS) + CHIP_BITS;
  localparam logic [AW-1:0] LAST = AW'(BANKS * (1 << CHIP_BITS) - 1);

  always_ff @(posedge clk) begin
    rollover <= 1'b0;
    if (clr) begin
      addr <= '0;
    end else if (inc) begin
      if (addr == LAST) begin
        addr     <= '0;
        rollover <= 1'b1;
      end else begin
        addr <= addr + AW'(1);
      end
    end
  end

  assign bank      = addr[AW-1 -: $clog2(BANKS)];
  assign chip_addr = addr[CHIP_BITS-1:0];

endmodule
