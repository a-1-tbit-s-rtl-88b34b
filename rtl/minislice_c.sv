`timescale 1ps/1ps
// minislice_c: SOC-side (PHYC) mini-slice, 32 DQ plus the two valid IOs.
// Write: core words {odd[31:0], even[31:0]} and their valid bit are serialised at DDR
// by npl_tx, clocked by the 0-degree PLL phase through the write-DQ delay line and the
// mini-slice clock tree. WDQS is the 90-degree phase through the WDQS delay line and an
// identical clock tree, so DQ and WDQS leave centre-aligned; the WDQS delay line adds
// the WRITE-DLL code that cancels the memory-side clock tree. SII_WD_VLD is sent as the
// 33rd line with the same timing.
// Read: RDQS from the memory side passes the RDQS delay line (READ-DLL code: clock tree
// compensation plus 90 degrees) and the clock tree, and clocks the sense amplifiers on
// the pads (pin-align). npl_rx pairs the samples and moves valid words to the core
// clock through a FIFO; rdata/rempty/rd_en is its show-ahead read port.
// Each delay line has a 0/1 mode mux: 0 takes the DLL code (for the write-DQ line:
// code 0), 1 the training code. pat sends the 1-0 training pattern on every DQ. ed is
// the read-path edge detector output (RDQS domain).
module minislice_c import ehp_pkg::*; #(
  int unsigned DQW   = 32,
  int unsigned DEPTH = 8
) (
  input  logic             rst_n,
  input  logic             ck0,
  input  logic             ck90,
  input  logic [2*DQW-1:0] wdata,
  input  logic             wvld,
  input  logic             pat,
  input  dcdl_code_t       wdll_code,
  input  dcdl_code_t       rdll_code,
  input  logic             sel_wdqs,
  input  logic             sel_rdqs,
  input  logic             sel_dq,
  input  dcdl_code_t       wdqs_tcode,
  input  dcdl_code_t       rdqs_tcode,
  input  dcdl_code_t       dq_tcode,
  output logic [DQW-1:0]   dq_out,
  output logic             dq_oe,
  output logic             wvld_out,
  output logic             wdqs_out,
  input  logic [DQW-1:0]   dq_in,
  input  logic             rvld_in,
  input  logic             rdqs_in,
  input  logic             rclk,
  input  logic             rd_en,
  output logic [2*DQW-1:0] rdata,
  output logic             rempty,
  output logic             ed
);
  dcdl_code_t dq_code, wdqs_code, rdqs_code;
  assign dq_code   = sel_dq   ? dq_tcode   : '0;
  assign wdqs_code = sel_wdqs ? wdqs_tcode : wdll_code;
  assign rdqs_code = sel_rdqs ? rdqs_tcode : rdll_code;

  // write data path
  logic txck_d, wdqs_d;
  logic [DQW+1:0] txck_t, wdqs_t;
  dcdl   u_dcdl_dq   (.fin(ck0),  .code(dq_code),   .fout(txck_d));
  anacts u_cts_dq    (.ck_in(txck_d), .ck_out(txck_t));
  dcdl   u_dcdl_wdqs (.fin(ck90), .code(wdqs_code), .fout(wdqs_d));
  anacts u_cts_wdqs  (.ck_in(wdqs_d), .ck_out(wdqs_t));
  assign wdqs_out = wdqs_t[0];

  logic [DQW+1:0] tx_ev, tx_od, tx_q;
  always_comb begin
    if (pat) begin
      tx_ev = {1'b1, 1'b0, {DQW{1'b1}}};
      tx_od = {1'b1, 1'b0, {DQW{1'b0}}};
    end else begin
      tx_ev = {wvld, wvld, wdata[DQW-1:0]};
      tx_od = {wvld, wvld, wdata[2*DQW-1:DQW]};
    end
  end
  npl_tx #(.W(DQW+2)) u_npl_tx (.clk(txck_t[0]), .rst_n(rst_n), .d_even(tx_ev), .d_odd(tx_od), .q(tx_q));
  assign dq_out   = tx_q[DQW-1:0];
  assign wvld_out = tx_q[DQW];
  assign dq_oe    = tx_q[DQW+1];

  // read data path
  logic rdqs_d;
  logic [DQW+1:0] sck_t;
  dcdl   u_dcdl_rdqs (.fin(rdqs_in), .code(rdqs_code), .fout(rdqs_d));
  anacts u_cts_rdqs  (.ck_in(rdqs_d), .ck_out(sck_t));

  logic [DQW:0] sa_r, sa_f, pr_e, pr_o;
  lsio_rx #(.W(DQW+1)) u_rx (.ck(sck_t[0]), .pad({rvld_in, dq_in}), .q_rise(sa_r), .q_fall(sa_f));
  npl_rx #(.W(DQW+1), .DEPTH(DEPTH)) u_npl_rx (.dqs(sck_t[0]), .rst_n(rst_n), .q_rise(sa_r),
    .q_fall(sa_f), .pair_even(pr_e), .pair_odd(pr_o), .rclk(rclk), .rd_en(rd_en),
    .rdata(rdata), .empty(rempty));
  edge_detector #(.W(DQW)) u_ed (.clk(sck_t[0]), .rst_n(rst_n), .rise(pr_e[DQW-1:0]),
    .fall(pr_o[DQW-1:0]), .ed(ed));
endmodule
