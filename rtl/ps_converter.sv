// ps_converter - parallel to serial converter with frame resynchronization.
//
// Words read from the FIFO are shifted out MSB first, one bit per output high
// speed clock, as a continuous stream. Words arrive once per OUTPUT WORD
// CLOCK and wait in a two-entry queue; a new word starts when the previous
// one has sent its 64 bits. When the VCWCG has advanced or retarded the word
// clock during a frame, arrivals drift against this bit schedule. The drift is
// absorbed at the frame boundary: the first word after a LAST WORD always
// starts RESYNC_LEAD clocks after it arrived, so the last word of the previous
// frame (which carries no valid data) is cut short or stretched, the stretch
// filled with zeros, by the number of bits the word clock moved. The first
// word after RESET is treated the same way.
//
// Interface: clk (output high speed clock), clr; load pulses with
// data/valid/last of a word read from the FIFO. serial is the output bit.
// For the post-modulator switch control: cur_valid (word being sent),
// prev_valid (word sent before it), next_valid (next word waiting),
// bits_to_next (clocks before the next word starts), bit_pos (bits sent of
// the current word). word_start pulses when a word's first bit appears.
// adj_err pulses when a frame's last word is off by more than MAX_ADJ bits;
// overrun flags a word lost because the queue was full.
// Timing: a word's first bit appears RESYNC_LEAD clocks after the clock
// edge that takes its load pulse (exactly for a frame's first word, and in
// steady state for the rest).
//
// From the source design: continuous output at the high speed clock rate,
// resynchronization at the start of the following frame, truncation or
// stretching of the last word, the limit of 20 bits per frame. Own choices:
// the queue, RESYNC_LEAD = 1.5 words (room for the 20-bit limit either way),
// MSB-first order, zero fill.
module ps_converter
  import rds_pkg::*;
#(
  parameter int unsigned RESYNC_LEAD = 96,
  parameter int unsigned MAX_ADJ     = 20
) (
  input  logic              clk,
  input  logic              clr,
  input  logic              load,
  input  logic [DATA_W-1:0] data,
  input  logic              valid,
  input  logic              last,
  output logic              serial,
  output logic              cur_valid,
  output logic              prev_valid,
  output logic              next_valid,
  output logic [7:0]        bits_to_next,
  output logic [5:0]        bit_pos,
  output logic              word_start,
  output logic              adj_err,
  output logic              overrun
);

  typedef struct packed {
    logic [DATA_W-1:0] data;
    logic              valid;
    logic              last;
    logic              first;  // first word of a frame: starts on the resync count
  } entry_t;

  entry_t            q [2];
  logic [1:0]        q_cnt;
  logic [DATA_W-1:0] sh;
  logic [7:0]        rcnt;     // clocks until a waiting first word starts
  logic [7:0]        len;      // clocks the current word has lasted (saturating)
  logic              cur_last;
  logic              synced, prev_in_last;

  logic   start, pop, head_first;
  entry_t incoming;

  assign head_first = (q_cnt != 2'd0) && q[0].first;
  assign start      = (q_cnt != 2'd0) && (q[0].first ? (rcnt == 8'd0) : (bit_pos == 6'd63));
  assign pop        = start;

  always_comb begin
    incoming.data  = data;
    incoming.valid = valid;
    incoming.last  = last;
    incoming.first = prev_in_last || !synced;
  end

  always_ff @(posedge clk) begin
    word_start <= 1'b0;
    adj_err    <= 1'b0;
    if (clr) begin
      q_cnt        <= '0;
      sh           <= '0;
      rcnt         <= '0;
      len          <= '0;
      bit_pos      <= '0;
      cur_valid    <= 1'b0;
      prev_valid   <= 1'b0;
      cur_last     <= 1'b0;
      synced       <= 1'b0;
      prev_in_last <= 1'b0;
      overrun      <= 1'b0;
    end else begin
      // bit schedule
      if (start) begin
        sh         <= q[0].data;
        prev_valid <= cur_valid;
        cur_valid  <= q[0].valid;
        cur_last   <= q[0].last;
        bit_pos    <= '0;
        len        <= 8'd1;
        word_start <= 1'b1;
        if (cur_last && synced &&
            ((len > 8'(BIT_PER_WD + MAX_ADJ)) || (len < 8'(BIT_PER_WD - MAX_ADJ))))
          adj_err <= 1'b1;
      end else begin
        sh      <= {sh[DATA_W-2:0], 1'b0};
        bit_pos <= bit_pos + 6'd1;
        if (len != 8'hff) len <= len + 8'd1;
      end

      // resync countdown for a waiting first word
      if (load && incoming.first) rcnt <= 8'(RESYNC_LEAD - 1);
      else if (rcnt != 8'd0)      rcnt <= rcnt - 8'd1;

      // queue: pop the head and/or push the new word
      if (load) begin
        synced       <= 1'b1;
        prev_in_last <= last;
      end
      case ({load, pop})
        2'b01: begin
          q[0]  <= q[1];
          q_cnt <= q_cnt - 2'd1;
        end
        2'b10: begin
          if (q_cnt == 2'd2) overrun <= 1'b1;
          else begin
            q[q_cnt[0]] <= incoming;
            q_cnt       <= q_cnt + 2'd1;
          end
        end
        2'b11: begin
          if (q_cnt == 2'd2) begin
            q[0] <= q[1];
            q[1] <= incoming;
          end else begin
            q[0] <= incoming;
          end
        end
        default: ;
      endcase
    end
  end

  assign serial       = sh[DATA_W-1];
  assign next_valid   = (q_cnt != 2'd0) && q[0].valid;
  assign bits_to_next = (q_cnt == 2'd0) ? 8'hff :
                        head_first      ? rcnt : 8'(6'd63 - bit_pos);

endmodule
