`timescale 1ps/1ps
// npl_tx: near-pad logic, transmit side. It multiplexes two parallel bits per IO,
// delivered once per clock (500 Mbit/s each), into one double-data-rate stream
// (1 Gbit/s): the "even" bit is driven while clk is high and the "odd" bit while clk is
// low. Both bits are registered on the rising edge, so the odd bit is stable for the
// whole high phase before it reaches the pad. Latency: d_even reaches q at the first
// rising edge after it is presented, d_odd at the falling edge that follows.
module npl_tx #(
  int unsigned W = 34
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d_even,
  input  logic [W-1:0] d_odd,
  output logic [W-1:0] q
);
  logic [W-1:0] ev_q, od_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ev_q <= '0;
      od_q <= '0;
    end else begin
      ev_q <= d_even;
      od_q <= d_odd;
    end
  assign q = clk ? ev_q : od_q;
endmodule
