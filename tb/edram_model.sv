`timescale 1ps/1ps
// edram_model: behavioural stand-in for one eDRAM channel, for testbenches only.
// On P2L_CK it decodes P2L_CMD: 7'h01 = write (address queued until the write word
// arrives with P2L_DQ_VLD), 7'h02 = read (the word at P2L_ADR is returned on L2P_DQ
// with L2P_DQ_VLD RD_LAT clocks later). Any other value is a no-op. The command
// encoding and latency are the testbench's own.
module edram_model #(
  int unsigned DW     = 512,
  int unsigned DEPTH  = 16,
  int unsigned RD_LAT = 2
) (
  input  logic          ck,
  input  logic          rst_n,
  input  logic [6:0]    cmd,
  input  logic [14:0]   adr,
  input  logic [DW-1:0] wdq,
  input  logic          wvld,
  output logic [DW-1:0] rdq,
  output logic          rvld,
  output int            n_wr,
  output int            n_rd
);
  logic [DW-1:0] mem [DEPTH];
  logic [14:0] wq [$];
  logic [DW-1:0] rpipe [RD_LAT];
  logic [RD_LAT-1:0] vpipe;
  always @(posedge ck or negedge rst_n)
    if (!rst_n) begin
      vpipe <= '0; n_wr <= 0; n_rd <= 0; wq.delete();
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
    end else begin
      if (cmd == 7'h01) wq.push_back(adr);
      if (wvld && wq.size() > 0) begin
        mem[wq.pop_front() % DEPTH] <= wdq;
        n_wr <= n_wr + 1;
      end
      vpipe[0] <= (cmd == 7'h02);
      rpipe[0] <= mem[adr % DEPTH];
      for (int i = 1; i < int'(RD_LAT); i++) begin vpipe[i] <= vpipe[i-1]; rpipe[i] <= rpipe[i-1]; end
      if (cmd == 7'h02) n_rd <= n_rd + 1;
    end
  assign rdq  = rpipe[RD_LAT-1];
  assign rvld = vpipe[RD_LAT-1];
endmodule
