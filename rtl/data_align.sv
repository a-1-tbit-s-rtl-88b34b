`timescale 1ps/1ps
// data_align: Data Alignment between the mini-slices and the core bus. Every
// mini-slice delivers valid words through its own FIFO, and mini-slices can differ
// in latency by whole cycles. data_align pops all FIFOs together only when every one
// holds a word, so the words of one transfer leave side by side: out_data is the
// concatenation (mini-slice 0 in the low bits) and out_vld marks it, one cycle after the
// pop. The pop-when-all-ready rule is this design's choice.
module data_align #(
  int unsigned NMINI = 8,
  int unsigned DW    = 64
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NMINI-1:0]    empty,
  input  logic [DW-1:0]       in_data [NMINI],
  output logic                pop,
  output logic [NMINI*DW-1:0] out_data,
  output logic                out_vld
);
  assign pop = ~|empty;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      out_vld  <= 1'b0;
      out_data <= '0;
    end else begin
      out_vld <= pop;
      if (pop)
        for (int m = 0; m < int'(NMINI); m++) out_data[m*DW +: DW] <= in_data[m];
    end
endmodule
