`timescale 1ps/1ps
// minislice_m: memory-side (PHYM) mini-slice, 32 DQ plus the two valid IOs. It has no
// PLL or DLL and only one delay line, set by hand (man_code).
// Write: WDQS from the SOC side passes the mini-slice clock tree and clocks the sense
// amplifiers on the pads; npl_rx pairs the samples and moves valid words to the local
// core clock (CK after its clock tree) through a FIFO; wdata/wempty/rd_en is its
// show-ahead read port. ed is the write-path edge detector (WDQS domain).
// Read: the core clock passes the manual delay line and the clock tree; the result
// clocks npl_tx and is sent out as RDQS, so read DQ and RDQS leave edge-aligned, as
// published. SII_RD_VLD is the 33rd line. pat sends the 1-0 training pattern.
module minislice_m import ehp_pkg::*; #(
  int unsigned DQW   = 32,
  int unsigned DEPTH = 8
) (
  input  logic             rst_n,
  input  logic             core_clk,
  input  dcdl_code_t       man_code,
  input  logic [2*DQW-1:0] rd_tx,
  input  logic             rvld,
  input  logic             pat,
  output logic [DQW-1:0]   dq_out,
  output logic             dq_oe,
  output logic             rvld_out,
  output logic             rdqs_out,
  input  logic [DQW-1:0]   dq_in,
  input  logic             wvld_in,
  input  logic             wdqs_in,
  input  logic             rd_en,
  output logic [2*DQW-1:0] wdata,
  output logic             wempty,
  output logic             ed
);
  // read transmit
  logic txck_d;
  logic [DQW+1:0] txck_t;
  dcdl   u_dcdl_man (.fin(core_clk), .code(man_code), .fout(txck_d));
  anacts u_cts_tx   (.ck_in(txck_d), .ck_out(txck_t));
  assign rdqs_out = txck_t[0];

  logic [DQW+1:0] tx_ev, tx_od, tx_q;
  always_comb begin
    if (pat) begin
      tx_ev = {1'b1, 1'b0, {DQW{1'b1}}};
      tx_od = {1'b1, 1'b0, {DQW{1'b0}}};
    end else begin
      tx_ev = {rvld, rvld, rd_tx[DQW-1:0]};
      tx_od = {rvld, rvld, rd_tx[2*DQW-1:DQW]};
    end
  end
  npl_tx #(.W(DQW+2)) u_npl_tx (.clk(txck_t[0]), .rst_n(rst_n), .d_even(tx_ev), .d_odd(tx_od), .q(tx_q));
  assign dq_out   = tx_q[DQW-1:0];
  assign rvld_out = tx_q[DQW];
  assign dq_oe    = tx_q[DQW+1];

  // write receive
  logic [DQW+1:0] sck_t;
  anacts u_cts_rx (.ck_in(wdqs_in), .ck_out(sck_t));
  logic [DQW:0] sa_r, sa_f, pr_e, pr_o;
  lsio_rx #(.W(DQW+1)) u_rx (.ck(sck_t[0]), .pad({wvld_in, dq_in}), .q_rise(sa_r), .q_fall(sa_f));
  npl_rx #(.W(DQW+1), .DEPTH(DEPTH)) u_npl_rx (.dqs(sck_t[0]), .rst_n(rst_n), .q_rise(sa_r),
    .q_fall(sa_f), .pair_even(pr_e), .pair_odd(pr_o), .rclk(core_clk), .rd_en(rd_en),
    .rdata(wdata), .empty(wempty));
  edge_detector #(.W(DQW)) u_ed (.clk(sck_t[0]), .rst_n(rst_n), .rise(pr_e[DQW-1:0]),
    .fall(pr_o[DQW-1:0]), .ed(ed));
endmodule
