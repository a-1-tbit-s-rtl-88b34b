`timescale 1ps/1ps
// async_fifo: dual-clock FIFO with Gray-coded pointers and two-flop pointer
// synchronisers. It carries received words from a strobe clock domain to the local
// core clock; the two clocks have the same frequency and an unknown phase. DEPTH must
// be a power of two. rdata shows the head entry whenever empty is low (show-ahead).
module async_fifo #(
  int unsigned DW    = 66,
  int unsigned DEPTH = 8
) (
  input  logic          wclk,
  input  logic          wrst_n,
  input  logic          wr_en,
  input  logic [DW-1:0] wdata,
  output logic          full,
  input  logic          rclk,
  input  logic          rrst_n,
  input  logic          rd_en,
  output logic [DW-1:0] rdata,
  output logic          empty
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [DW-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wq1, wq2, rq1, rq2;   // wq*: read ptr in write domain; rq*: write ptr in read domain


  assign full  = (wgray == {~wq2[AW:AW-1], wq2[AW-2:0]});
  assign empty = (rgray == rq2);

  always_ff @(posedge wclk or negedge wrst_n)
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; wq1 <= '0; wq2 <= '0;
    end else begin
      wq1 <= rgray; wq2 <= wq1;
      if (wr_en && !full) begin
        wbin  <= wbin + 1'b1;
        wgray <= (wbin + 1'b1) ^ ((wbin + 1'b1) >> 1);
      end
    end

  always_ff @(posedge wclk)
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wdata;

  always_ff @(posedge rclk or negedge rrst_n)
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; rq1 <= '0; rq2 <= '0;
    end else begin
      rq1 <= wgray; rq2 <= rq1;
      if (rd_en && !empty) begin
        rbin  <= rbin + 1'b1;
        rgray <= (rbin + 1'b1) ^ ((rbin + 1'b1) >> 1);
      end
    end

  assign rdata = mem[rbin[AW-1:0]];

  assert property (@(posedge wclk) disable iff (!wrst_n) !(wr_en && full))
    else $error("async_fifo: write while full");
endmodule
