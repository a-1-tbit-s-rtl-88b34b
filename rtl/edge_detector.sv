`timescale 1ps/1ps
// edge_detector: ED logic of the data sampling alignment training. While the far end
// sends a repeating 1-0 pattern on every line, the rising edge of the sampling clock
// should see all 1s and the falling edge all 0s. The output is 1 ("stable region")
// when the rising-edge samples are all 1 or the falling-edge samples are all 0, as the
// published rule states, and 0 ("transition region") otherwise. Registered: the
// result of one pair appears one clock later.
module edge_detector #(
  int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] rise,
  input  logic [W-1:0] fall,
  output logic         ed
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ed <= 1'b0;
    else        ed <= (&rise) | ~(|fall);
endmodule
