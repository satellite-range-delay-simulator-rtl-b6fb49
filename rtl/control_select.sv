// control_select - LOCAL/REMOTE selection of the RDS run controls.
//
// The RDS is run either from its control panel (LOCAL) or by the experiment
// control and monitor computer through its interface board (REMOTE), chosen
// with a toggle switch. This block takes the INITIAL DELAY CONTROL CODE
// (4 bits), the OUTPUT FREQUENCY CONTROL CODE (12 bits, to the VCXO's D/A
// converter) and the RESET request from the selected source. The codes are
// registered; the RESET request, a push button or a computer line with no
// timing relation to the clock, is passed through a two-flop synchronizer
// and held for RESET_HOLD clocks at least, so that the read side can see it
// too. The mode is reported back as the LOCAL/REMOTE indicator.
//
// Interface: clk (input high speed clock); remote (1 = REMOTE); local_* from
// the thumbwheel switches and RESET button; ecm_* from the computer interface.
// Outputs delay_code, freq_code, reset (synchronous, active high),
// remote_ind. Timing: codes follow one clock later, reset three clocks later.
//
// From the source design: the two modes, the code widths and the RESET
// sources. Own choices: registering, synchronizing and stretching RESET.
module control_select #(
  parameter int unsigned RESET_HOLD = 16
) (
  input  logic        clk,
  input  logic        remote,
  input  logic [3:0]  local_delay_code,
  input  logic [11:0] local_freq_code,
  input  logic        local_reset,
  input  logic [3:0]  ecm_delay_code,
  input  logic [11:0] ecm_freq_code,
  input  logic        ecm_reset,
  output logic [3:0]  delay_code,
  output logic [11:0] freq_code,
  output logic        reset,
  output logic        remote_ind
);

  logic rst_req, rst_s;
  logic [$clog2(RESET_HOLD+1)-1:0] hold;

  assign rst_req = remote ? ecm_reset : local_reset;

  sync_2ff u_rst (.clk(clk), .d(rst_req), .q(rst_s));

  always_ff @(posedge clk) begin
    remote_ind <= remote;
    delay_code <= remote ? ecm_delay_code : local_delay_code;
    freq_code  <= remote ? ecm_freq_code  : local_freq_code;
    if (rst_s)            hold <= ($bits(hold))'(RESET_HOLD);
    else if (hold != '0)  hold <= hold - 1'b1;
  end

  assign reset = rst_s || (hold != '0);

endmodule
