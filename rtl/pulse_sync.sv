// pulse_sync - carries a one-clock pulse from src_clk's domain into dst_clk's.
// The source pulse flips a toggle flop; the toggle is synchronized by two
// flops and each change of it gives one dst_clk pulse, three to four dst_clk
// periods later. Source pulses must be several dst_clk periods apart (here
// they are a whole FIFO pass apart).
module pulse_sync (
  input  logic src_clk,
  input  logic src_pulse,
  input  logic dst_clk,
  output logic dst_pulse
);
  logic tog;
  logic s1, s2, s3;
  always_ff @(posedge src_clk)
    if (src_pulse) tog <= ~tog;
  always_ff @(posedge dst_clk) begin
    s1 <= tog;
    s2 <= s1;
    s3 <= s2;
  end
  assign dst_pulse = s2 ^ s3;
endmodule
