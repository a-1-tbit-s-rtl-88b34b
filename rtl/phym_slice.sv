`timescale 1ps/1ps
// phym_slice: memory-side PHY slice (PHYM) for one eDRAM channel, with no PLL or DLL.
// SII_CK passes the CA mini-slice clock tree and becomes the local core clock, sent to
// the eDRAM as P2L_CK. Its sense amplifiers capture CMD/ADR on the pads at the rising
// edge; the result drives P2L_CMD/P2L_ADR. The write words of the NM DQ mini-slices
// are aligned by data_align and leave as P2L_DQ/P2L_DQ_VLD; read words L2P_DQ with
// L2P_DQ_VLD are registered and sent back with RDQS. The calibration clocks close the
// loop of the SOC-side WRITE-DLL: CAL_NDW returns directly as CAL_NDR and CAL_ADW
// returns through a replica of the mini-slice clock tree as CAL_ADR. ed_ca and ed are
// the edge-detector outputs used by training.
module phym_slice import ehp_pkg::*; #(
  int unsigned NM  = 8,
  int unsigned DQW = 32
) (
  input  logic                rst_n,
  input  logic                sii_ck,
  input  logic [CAW-1:0]      sii_ca,
  input  logic [NM*DQW-1:0]   dq_in,
  input  logic [NM-1:0]       wvld_in,
  input  logic [NM-1:0]       wdqs_in,
  output logic [NM*DQW-1:0]   dq_out,
  output logic [NM*DQW-1:0]   dq_oe,
  output logic [NM-1:0]       rvld_out,
  output logic [NM-1:0]       rdqs_out,
  input  logic                cal_ndw,
  input  logic                cal_adw,
  output logic                cal_ndr,
  output logic                cal_adr,
  input  logic                pat_rd,
  input  dcdl_code_t          man_code,
  output logic                ed_ca,
  output logic [NM-1:0]       ed,
  output logic                p2l_ck,
  output logic [CMDW-1:0]     p2l_cmd,
  output logic [ADRW-1:0]     p2l_adr,
  output logic [2*NM*DQW-1:0] p2l_dq,
  output logic                p2l_dq_vld,
  input  logic [2*NM*DQW-1:0] l2p_dq,
  input  logic                l2p_dq_vld
);
  logic [33:0] ck_t, rep_t;
  anacts u_cts_ck  (.ck_in(sii_ck), .ck_out(ck_t));
  anacts u_rep_cts (.ck_in(cal_adw), .ck_out(rep_t));
  assign p2l_ck  = ck_t[0];
  assign cal_ndr = cal_ndw;
  assign cal_adr = rep_t[0];

  // CMD/ADR capture
  logic [CAW-1:0] ca_r, ca_f;
  lsio_rx #(.W(CAW)) u_rx_ca (.ck(p2l_ck), .pad(sii_ca), .q_rise(ca_r), .q_fall(ca_f));
  assign {p2l_cmd, p2l_adr} = ca_r;
  edge_detector #(.W(CAW)) u_ed_ca (.clk(p2l_ck), .rst_n(rst_n), .rise(ca_r), .fall(ca_f), .ed(ed_ca));

  // read words from the eDRAM
  logic [2*NM*DQW-1:0] rd_q;
  logic rv_q;
  always_ff @(posedge p2l_ck or negedge rst_n)
    if (!rst_n) begin rd_q <= '0; rv_q <= 1'b0; end
    else begin rd_q <= l2p_dq; rv_q <= l2p_dq_vld; end

  logic [NM-1:0] wempty;
  logic pop;
  logic [2*DQW-1:0] wdata [NM];
  for (genvar m = 0; m < NM; m++) begin : g_ms
    logic oe;
    minislice_m #(.DQW(DQW)) u_ms (.rst_n(rst_n), .core_clk(p2l_ck), .man_code(man_code),
      .rd_tx(rd_q[m*2*DQW +: 2*DQW]), .rvld(rv_q), .pat(pat_rd),
      .dq_out(dq_out[m*DQW +: DQW]), .dq_oe(oe), .rvld_out(rvld_out[m]), .rdqs_out(rdqs_out[m]),
      .dq_in(dq_in[m*DQW +: DQW]), .wvld_in(wvld_in[m]), .wdqs_in(wdqs_in[m]),
      .rd_en(pop), .wdata(wdata[m]), .wempty(wempty[m]), .ed(ed[m]));
    assign dq_oe[m*DQW +: DQW] = {DQW{oe}};
  end

  data_align #(.NMINI(NM), .DW(2*DQW)) u_align (.clk(p2l_ck), .rst_n(rst_n), .empty(wempty),
    .in_data(wdata), .pop(pop), .out_data(p2l_dq), .out_vld(p2l_dq_vld));
endmodule
