// fifo_memory - the RDS FIFO memory board: BANKS banks of 2^(2*ADDR_PINS)
// words of WIDTH bits, addressed like multiplexed-address DRAM.
//
// The board is built from 262,144 x 1 DRAM chips with nine address pins, five
// chips per module, fourteen modules per bank (70 channels) and three banks,
// 786,432 x 70 in all. A chip address is applied in two steps: a row address
// strobed with the bank's RAS line, then a column address strobed with CAS.
// Here the whole board is one array; the row latched at the rising edge of a
// bank's RAS and the column present at the rising edge of CAS select the word.
//
// There are two independent ports because writes and reads run from two
// asynchronous word clocks. The FIFO never writes and reads the same bank at
// the same time (the delay is held between one and two banks), which is what
// lets each bank be driven by one side only; an assertion checks it.
//
// Interface (both ports active high, synchronous to their own clock):
//   w_ras[b]  write-side row strobe of bank b (at most one set)
//   w_cas     column strobe; with w_we set the word w_data is written
//   w_addr    multiplexed row/column address (ADDR_PINS bits)
//   r_ras/r_cas/r_addr  the same for reads; r_data is valid from the clock
//             after the rising edge of r_cas and holds until the next read.
// Timing: row and column latch on the clock edge that sees the strobe rise.
//
// From the source design: chip size, nine address pins, row-then-column
// addressing, 3 banks, 70 channels. Own choices: strobes active high and
// sampled by a clock, read data registered, no refresh (the design has none).
module fifo_memory #(
  parameter int unsigned BANKS     = 3,
  parameter int unsigned ADDR_PINS = 9,
  parameter int unsigned WIDTH     = 70
) (
  input  logic                 w_clk,
  input  logic [BANKS-1:0]     w_ras,
  input  logic                 w_cas,
  input  logic                 w_we,
  input  logic [ADDR_PINS-1:0] w_addr,
  input  logic [WIDTH-1:0]     w_data,

  input  logic                 r_clk,
  input  logic [BANKS-1:0]     r_ras,
  input  logic                 r_cas,
  input  logic [ADDR_PINS-1:0] r_addr,
  output logic [WIDTH-1:0]     r_data
);

  localparam int unsigned BANK_BITS  = (BANKS > 1) ? $clog2(BANKS) : 1;
  localparam int unsigned CHIP_WORDS = 1 << (2 * ADDR_PINS);
  localparam int unsigned DEPTH      = BANKS * CHIP_WORDS;
  localparam int unsigned IDX_W      = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  // Index of the word for a bank, row and column.
  function automatic logic [IDX_W-1:0] word_index(logic [BANK_BITS-1:0] b,
                                                   logic [ADDR_PINS-1:0] row,
                                                   logic [ADDR_PINS-1:0] col);
    return IDX_W'(b) * IDX_W'(CHIP_WORDS) + (IDX_W'(row) << ADDR_PINS) + IDX_W'(col);
  endfunction

  function automatic logic [BANK_BITS-1:0] bank_of(logic [BANKS-1:0] ras);
    logic [BANK_BITS-1:0] b = '0;
    for (int i = 0; i < BANKS; i++)
      if (ras[i]) b = BANK_BITS'(i);
    return b;
  endfunction

  // ---------------- write port ----------------
  logic                 w_ras_any_q, w_cas_q;
  logic [BANK_BITS-1:0] w_bank;
  logic [ADDR_PINS-1:0] w_row;

  always_ff @(posedge w_clk) begin
    w_ras_any_q <= |w_ras;
    w_cas_q     <= w_cas;
    if (|w_ras && !w_ras_any_q) begin
      w_bank <= bank_of(w_ras);
      w_row  <= w_addr;
    end
    if (w_cas && !w_cas_q && w_we && w_ras_any_q)
      mem[word_index(w_bank, w_row, w_addr)] <= w_data;
  end

  // ---------------- read port ----------------
  logic                 r_ras_any_q, r_cas_q;
  logic [BANK_BITS-1:0] r_bank;
  logic [ADDR_PINS-1:0] r_row;

  always_ff @(posedge r_clk) begin
    r_ras_any_q <= |r_ras;
    r_cas_q     <= r_cas;
    if (|r_ras && !r_ras_any_q) begin
      r_bank <= bank_of(r_ras);
      r_row  <= r_addr;
    end
    if (r_cas && !r_cas_q && r_ras_any_q)
      r_data <= mem[word_index(r_bank, r_row, r_addr)];
  end

  // Strobe rules: one bank per side, and never the same bank on both sides.
  always_ff @(posedge w_clk)
    assert ($onehot0(w_ras)) else $error("fifo_memory: several write banks strobed");
  always_ff @(posedge r_clk)
    assert ($onehot0(r_ras)) else $error("fifo_memory: several read banks strobed");
  always_ff @(posedge r_clk)
    assert ((r_ras & w_ras) == '0) else $error("fifo_memory: read and write in the same bank");

endmodule
