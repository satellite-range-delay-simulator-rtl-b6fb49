// tb_ps_converter - loads frames of 8 words into the P/S converter at word
// intervals of 64 clocks, lengthened or shortened (63, 65, 56) on chosen
// words as the VCWCG would. Checks: every word is sent MSB first in order;
// every word but a frame's last lasts exactly 64 bits; a frame's last word
// lasts 64 plus the frame's total adjustment, zero-filled when stretched;
// the first word of every frame starts the same number of clocks after its
// load; adj_err flags the frame whose adjustment exceeds 20 bits.
`include "tb_check.svh"
module tb_ps_converter;
  int checks = 0, failures = 0;
  logic clk = 0, clr = 1, load = 0, valid = 0, last = 0;
  logic [63:0] data = 0;
  logic serial, cur_valid, prev_valid, next_valid, word_start, adj_err, overrun;
  logic [7:0] bits_to_next;
  logic [5:0] bit_pos;

  ps_converter dut (.*);

  always #5 clk = ~clk;

  localparam int FR = 8, NF = 12;
  // adjustment (clocks) of the interval after each word, per frame
  int adj [NF][FR] = '{
    '{0,0,0,0,0,0,0,0}, '{0,0,0,0,0,0,0,1}, '{0,0,0,0,0,0,0,-1}, '{0,1,0,0,0,1,0,0},
    '{0,0,0,-8,0,0,0,0}, '{1,1,1,1,1,1,1,1}, '{-8,0,-8,0,0,0,0,0}, '{-8,-8,-8,0,0,0,0,0},
    '{0,0,0,0,0,0,0,0}, '{1,0,1,0,1,0,1,-1}, '{0,0,0,0,0,0,0,0}, '{0,0,0,0,0,0,0,0}};

  logic [63:0] words [$];
  int  load_time [$];    // load times of first words of frames
  int  cyc = 0, started = 0, pos = 0, cur = -1, adj_errs = 0, adj_err_frame = -1;
  int  durations [NF*FR];
  int  first_lat = -1;
  logic [63:0] cur_word;

  initial begin
    #2000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) cyc++;

  // stimulus
  initial begin
    repeat (3) @(posedge clk); clr <= 0;
    repeat (5) @(posedge clk);
    for (int f = 0; f < NF; f++)
      for (int w = 0; w < FR; w++) begin
        logic [63:0] d;
        d = {$urandom, $urandom};
        words.push_back(d);
        if (w == 0) load_time.push_back(cyc);
        load <= 1; data <= d; last <= (w == FR - 1); valid <= (w != FR - 1);
        @(posedge clk); load <= 0;
        repeat (64 + adj[f][w] - 1) @(posedge clk);
      end
  end

  // monitor
  always @(posedge clk) begin
    #1;
    if (adj_err) begin adj_errs++; adj_err_frame = (cur - 1) / FR; end
    if (word_start) begin
      if (cur >= 0) durations[cur] = pos;
      cur++; pos = 0;
      cur_word = words[cur];
      if (cur % FR == 0) begin
        int lat;
        lat = cyc - load_time[cur / FR];
        if (first_lat < 0) first_lat = lat;
        `CHECK(lat == first_lat, $sformatf("frame %0d first word starts %0d after load, first frame %0d", cur / FR, lat, first_lat))
      end
    end
    if (cur >= 0) begin
      `CHECK(serial == (pos < 64 ? cur_word[63 - pos] : 1'b0),
             $sformatf("word %0d bit %0d", cur, pos))
      pos++;
    end
    if (cur == NF * FR - 1 && pos == 10) begin
      for (int k = 0; k < NF * FR - 1; k++) begin
        int exp;
        exp = 64;
        if (k % FR == FR - 1) begin
          exp = 64;
          for (int w = 0; w < FR; w++) exp += adj[k / FR][w];
        end
        `CHECK(durations[k] == exp, $sformatf("word %0d lasted %0d, expected %0d", k, durations[k], exp))
      end
      `CHECK(adj_errs == 1 && adj_err_frame == 7, $sformatf("adj_err %0d times, frame %0d", adj_errs, adj_err_frame))
      `CHECK(!overrun, "no queue overrun")
      `CHECK(first_lat == 98, $sformatf("frame start latency %0d", first_lat))
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
