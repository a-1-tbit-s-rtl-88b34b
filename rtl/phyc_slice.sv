`timescale 1ps/1ps
// phyc_slice: SOC-side PHY slice (PHYC), 256 DQ of one eDRAM channel.
// Contents: one PLL (quadrature phases, 0 degrees is the core clock P2C_CK), the
// WRITE-DLL and READ-DLL with the replica clock tree, the CMD/ADR/CK mini-slice, NM DQ
// mini-slices, the read-side data alignment and the training sequencer.
// Closed-loop compensation: CAL_NDW (0-degree phase through a delay line at code 0,
// matching the write-DQ line) returns unchanged as CAL_NDR and is the WRITE-DLL
// reference; CAL_ADW is the WRITE-DLL output, which returns through the memory-side
// replica clock tree as CAL_ADR. At lock the DLL code cancels the memory-side clock
// tree modulo one clock period, and every WDQS and CK delay line uses it. The READ-DLL
// aligns (0-degree phase + delay line + SOC-side replica tree) to the 90-degree phase,
// and every RDQS delay line uses its code.
// Core interface (P2C_CK domain): c2p_dq bits [64m+31:64m] are the first (rising-edge)
// UI of mini-slice m and [64m+63:64m+32] the second; a word is sent when c2p_dq_vld.
// Commands are sent once per clock on both UIs. p2c_dq/p2c_dq_vld return read words
// in the same layout. The bit layout is this design's choice.
module phyc_slice import ehp_pkg::*; #(
  int unsigned NM     = 8,
  int unsigned DQW    = 32,
  int unsigned SETTLE = 8,
  int unsigned DWELL  = 16
) (
  input  logic                rst_n,
  input  logic                pll_en,
  output logic                p2c_ck,
  input  logic [CMDW-1:0]     c2p_cmd,
  input  logic [ADRW-1:0]     c2p_adr,
  input  logic [2*NM*DQW-1:0] c2p_dq,
  input  logic                c2p_dq_vld,
  output logic [2*NM*DQW-1:0] p2c_dq,
  output logic                p2c_dq_vld,
  input  logic                train_start,
  output logic                train_done,
  output logic [3:0]          train_ok,
  output logic                wdll_lock,
  output logic                rdll_lock,
  // interposer side
  output logic                sii_ck,
  output logic [CAW-1:0]      sii_ca,
  output logic [NM*DQW-1:0]   dq_out,
  output logic [NM*DQW-1:0]   dq_oe,
  output logic [NM-1:0]       wvld_out,
  output logic [NM-1:0]       wdqs_out,
  input  logic [NM*DQW-1:0]   dq_in,
  input  logic [NM-1:0]       rvld_in,
  input  logic [NM-1:0]       rdqs_in,
  output logic                cal_ndw,
  output logic                cal_adw,
  input  logic                cal_ndr,
  input  logic                cal_adr,
  // training side band
  input  logic                m_ed_ca,
  input  logic [NM-1:0]       m_ed,
  output logic                pat_ca,
  output logic                pat_wr,
  output logic                pat_rd
);
  logic ck0, ck90, ck180, ck270, pll_lock;
  pll u_pll (.en(pll_en), .ck0(ck0), .ck90(ck90), .ck180(ck180), .ck270(ck270), .lock(pll_lock));
  assign p2c_ck = ck0;

  // ---- DLLs -------------------------------------------------------------------
  dcdl_code_t wdll_code, rdll_code;
  logic wdll_clock, rdll_clock, rdll_fout;
  logic [33:0] rrep_t;
  dcdl u_ndw (.fin(ck0), .code('0), .fout(cal_ndw));
  dll #(.SETTLE(7)) u_wdll (.rst_n(rst_n), .en(pll_lock), .fin(ck0), .fref(cal_ndr), .fbkin(cal_adr),
    .fout(cal_adw), .code(wdll_code), .coarse_lock(wdll_clock), .lock(wdll_lock));
  dll #(.SETTLE(7)) u_rdll (.rst_n(rst_n), .en(pll_lock), .fin(ck0), .fref(ck90), .fbkin(rrep_t[0]),
    .fout(rdll_fout), .code(rdll_code), .coarse_lock(rdll_clock), .lock(rdll_lock));
  anacts u_rep_cts (.ck_in(rdll_fout), .ck_out(rrep_t));

  // ---- training ---------------------------------------------------------------
  logic [NM-1:0] ed_c;
  logic ck_sel, wdqs_sel, rdqs_sel, dq_sel;
  logic [IDXW-1:0] ck_idx;
  logic [IDXW-1:0] wdqs_idx [NM], rdqs_idx [NM], dq_idx [NM];
  train_step_e step;
  train_seq #(.NM(NM), .SETTLE(SETTLE), .DWELL(DWELL)) u_train (.clk(ck0), .rst_n(rst_n),
    .start(train_start), .ed_ca(m_ed_ca), .ed_m(m_ed), .ed_c(ed_c), .step(step), .done(train_done),
    .pat_ca(pat_ca), .pat_wr(pat_wr), .pat_rd(pat_rd), .ck_sel(ck_sel), .ck_idx(ck_idx),
    .wdqs_sel(wdqs_sel), .wdqs_idx(wdqs_idx), .rdqs_sel(rdqs_sel), .rdqs_idx(rdqs_idx),
    .dq_sel(dq_sel), .dq_idx(dq_idx), .step_ok(train_ok));

  // ---- core-side registers ----------------------------------------------------
  logic [CMDW-1:0] cmd_q;
  logic [ADRW-1:0] adr_q;
  logic [2*NM*DQW-1:0] wd_q;
  logic wv_q;
  always_ff @(posedge ck0 or negedge rst_n)
    if (!rst_n) begin cmd_q <= '0; adr_q <= '0; wd_q <= '0; wv_q <= 1'b0; end
    else begin cmd_q <= c2p_cmd; adr_q <= c2p_adr; wd_q <= c2p_dq; wv_q <= c2p_dq_vld; end

  // ---- CMD/ADR/CK mini-slice ----------------------------------------------------
  logic cack_d, ck_d;
  logic [33:0] cack_t, ck_t;
  dcdl_code_t ck_code;
  assign ck_code = ck_sel ? idx2code(ck_idx) : wdll_code;
  dcdl   u_dcdl_ca  (.fin(ck0),  .code('0),      .fout(cack_d));
  anacts u_cts_ca   (.ck_in(cack_d), .ck_out(cack_t));
  dcdl   u_dcdl_ck  (.fin(ck90), .code(ck_code), .fout(ck_d));
  anacts u_cts_ck   (.ck_in(ck_d), .ck_out(ck_t));
  assign sii_ck = ck_t[0];
  logic [CAW-1:0] ca_ev, ca_od;
  assign ca_ev = pat_ca ? '1 : {cmd_q, adr_q};
  assign ca_od = pat_ca ? '0 : {cmd_q, adr_q};
  npl_tx #(.W(CAW)) u_npl_ca (.clk(cack_t[0]), .rst_n(rst_n), .d_even(ca_ev), .d_odd(ca_od), .q(sii_ca));

  // ---- DQ mini-slices -----------------------------------------------------------
  logic [NM-1:0] rempty;
  logic pop;
  logic [2*DQW-1:0] rdata [NM];
  for (genvar m = 0; m < NM; m++) begin : g_ms
    logic oe;
    minislice_c #(.DQW(DQW)) u_ms (.rst_n(rst_n), .ck0(ck0), .ck90(ck90),
      .wdata(wd_q[m*2*DQW +: 2*DQW]), .wvld(wv_q), .pat(pat_wr),
      .wdll_code(wdll_code), .rdll_code(rdll_code),
      .sel_wdqs(wdqs_sel), .sel_rdqs(rdqs_sel), .sel_dq(dq_sel),
      .wdqs_tcode(idx2code(wdqs_idx[m])), .rdqs_tcode(idx2code(rdqs_idx[m])),
      .dq_tcode(idx2code(dq_idx[m])),
      .dq_out(dq_out[m*DQW +: DQW]), .dq_oe(oe), .wvld_out(wvld_out[m]), .wdqs_out(wdqs_out[m]),
      .dq_in(dq_in[m*DQW +: DQW]), .rvld_in(rvld_in[m]), .rdqs_in(rdqs_in[m]),
      .rclk(ck0), .rd_en(pop), .rdata(rdata[m]), .rempty(rempty[m]), .ed(ed_c[m]));
    assign dq_oe[m*DQW +: DQW] = {DQW{oe}};
  end

  data_align #(.NMINI(NM), .DW(2*DQW)) u_align (.clk(ck0), .rst_n(rst_n), .empty(rempty),
    .in_data(rdata), .pop(pop), .out_data(p2c_dq), .out_vld(p2c_dq_vld));

  logic unused;
  assign unused = ^{ck180, ck270, wdll_clock, rdll_clock, step};
endmodule
