// scbert_chk - checker half of the single channel bit error rate tester.
//
// At each read word the checker takes the selected channel's bit from the
// word read out of the FIFO and compares it with its own copy of the N-word
// pattern. The FIFO delay is arbitrary, so the checker first finds the
// pattern's phase: while hunting, a mismatch holds its pattern position for
// one word (slipping it by one against the received bits) and a match moves
// on; LOCK_RUN matches in a row declare lock. Once locked every mismatch is
// a bit error: the count goes up (saturating) and ERROR pulses for one clock,
// for triggering an oscilloscope or logic analyser.
//
// Interface: clk (output high speed clock), clr, strobe (read word valid),
// d (70-bit word read), chan, len, pattern (same switches as the generator).
// Outputs locked, err_count, error. Timing: error and the count follow the
// strobe by one clock.
//
// From the source design: comparing the channel with the known pattern, the
// error count and the ERROR pulse. Own choices: the phase search, LOCK_RUN,
// a 16-bit binary count.
module scbert_chk
  import rds_pkg::*;
#(
  parameter int unsigned LOCK_RUN = 32
) (
  input  logic             clk,
  input  logic             clr,
  input  logic             strobe,
  input  logic [MEM_W-1:0] d,
  input  logic [6:0]       chan,
  input  logic [4:0]       len,
  input  logic [15:0]      pattern,
  output logic             locked,
  output logic [15:0]      err_count,
  output logic             error
);

  logic [3:0] idx;
  logic [5:0] run;
  logic       rx, match;

  assign rx    = (int'(chan) < MEM_W) ? d[chan] : 1'b0;
  assign match = (rx == pattern[idx]);

  function automatic logic [3:0] next_idx(logic [3:0] i, logic [4:0] n);
    return (32'(i) + 1 >= 32'(n)) ? 4'd0 : i + 4'd1;
  endfunction

  always_ff @(posedge clk) begin
    error <= 1'b0;
    if (clr) begin
      idx       <= '0;
      run       <= '0;
      locked    <= 1'b0;
      err_count <= '0;
    end else if (strobe) begin
      if (!locked) begin
        if (match) begin
          idx <= next_idx(idx, len);
          run <= run + 6'd1;
          if (32'(run) + 1 >= 32'(LOCK_RUN)) locked <= 1'b1;
        end else begin
          run <= '0;  // hold idx: slip one word
        end
      end else begin
        idx <= next_idx(idx, len);
        if (!match) begin
          error <= 1'b1;
          if (err_count != 16'hffff) err_count <= err_count + 16'd1;
        end
      end
    end
  end

endmodule
