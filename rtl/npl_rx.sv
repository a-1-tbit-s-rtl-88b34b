`timescale 1ps/1ps
// npl_rx: near-pad logic, receive side. The low-swing receivers deliver, for each of
// W IOs, a bit resolved on the rising strobe edge (q_rise) and one on the falling edge
// (q_fall). npl_rx holds the rising-edge bit on the falling edge, then on the next
// rising edge forms the parallel pair {odd, even} for every IO (pair_* outputs, strobe
// domain, used by the edge detector). IO W-1 is the data-valid envelope: a pair whose
// valid bit was 1 on the rising edge is written into an async_fifo, which brings it to
// the core clock. The FIFO hand-over is this design's choice for the alignment the
// near-pad logic performs.
module npl_rx #(
  int unsigned W     = 33,
  int unsigned DEPTH = 8
) (
  input  logic              dqs,       // sampling strobe after the clock tree
  input  logic              rst_n,
  input  logic [W-1:0]      q_rise,
  input  logic [W-1:0]      q_fall,
  output logic [W-1:0]      pair_even,
  output logic [W-1:0]      pair_odd,
  input  logic              rclk,
  input  logic              rd_en,
  output logic [2*W-3:0]    rdata,     // {odd[W-2:0], even[W-2:0]}
  output logic              empty
);
  logic [W-1:0] ev_hold;
  always_ff @(negedge dqs or negedge rst_n)
    if (!rst_n) ev_hold <= '0;
    else        ev_hold <= q_rise;
  always_ff @(posedge dqs or negedge rst_n)
    if (!rst_n) begin
      pair_even <= '0;
      pair_odd  <= '0;
    end else begin
      pair_even <= ev_hold;
      pair_odd  <= q_fall;
    end

  logic full_unused;
  async_fifo #(.DW(2*W-2), .DEPTH(DEPTH)) u_fifo (
    .wclk(dqs), .wrst_n(rst_n), .wr_en(pair_even[W-1]),
    .wdata({pair_odd[W-2:0], pair_even[W-2:0]}), .full(full_unused),
    .rclk(rclk), .rrst_n(rst_n), .rd_en(rd_en), .rdata(rdata), .empty(empty));
endmodule
