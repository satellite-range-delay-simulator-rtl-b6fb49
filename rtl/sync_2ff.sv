// sync_2ff - two-flip-flop synchronizer for a level crossing into clk's domain.
// Used for the RESET request and the read enable, which change rarely and
// stay put for many clocks. Output follows the input two clocks later.
module sync_2ff (
  input  logic clk,
  input  logic d,
  output logic q
);
  logic meta;
  always_ff @(posedge clk) begin
    meta <= d;
    q    <= meta;
  end
endmodule
