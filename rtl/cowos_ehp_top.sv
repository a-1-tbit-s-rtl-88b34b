`timescale 1ps/1ps
// cowos_ehp_top: the complete 2.5D link: NS slices, each a SOC-side PHY slice
// (phyc_slice) and a memory-side PHY slice (phym_slice) joined by silicon-interposer
// traces (sii_channel). With the defaults (4 slices x 8 mini-slices x 32 DQ) it carries
// a 1024-bit DDR data bus: 4 x 512 bits per 500 MHz clock, 1 Tbit/s in total.
// Per slice the interposer carries SII_CK, CMD/ADR[21:0], 256 bidirectional DQ,
// 8 WDQS, 8 RDQS, 8 WD_VLD, 8 RD_VLD and the four calibration clocks. Differential
// pairs are modelled by their true line. The training pattern requests and the
// memory-side edge-detector results are carried as plain side-band wires; the SOC and
// eDRAM interfaces of every slice are top-level ports (arrays indexed by slice).
module cowos_ehp_top import ehp_pkg::*; #(
  int unsigned NS     = NSLICE,
  int unsigned NM     = NMINI,
  int unsigned DQW    = MINI_DQ,
  int unsigned SETTLE = 8,
  int unsigned DWELL  = 16
) (
  input  logic                rst_n,
  input  logic                pll_en,
  input  dcdl_code_t          man_code,
  // SOC side
  output logic [NS-1:0]       p2c_ck,
  input  logic [CMDW-1:0]     c2p_cmd    [NS],
  input  logic [ADRW-1:0]     c2p_adr    [NS],
  input  logic [2*NM*DQW-1:0] c2p_dq     [NS],
  input  logic [NS-1:0]       c2p_dq_vld,
  output logic [2*NM*DQW-1:0] p2c_dq     [NS],
  output logic [NS-1:0]       p2c_dq_vld,
  input  logic [NS-1:0]       train_start,
  output logic [NS-1:0]       train_done,
  output logic [3:0]          train_ok   [NS],
  output logic [NS-1:0]       wdll_lock,
  output logic [NS-1:0]       rdll_lock,
  // eDRAM side
  output logic [NS-1:0]       p2l_ck,
  output logic [CMDW-1:0]     p2l_cmd    [NS],
  output logic [ADRW-1:0]     p2l_adr    [NS],
  output logic [2*NM*DQW-1:0] p2l_dq     [NS],
  output logic [NS-1:0]       p2l_dq_vld,
  input  logic [2*NM*DQW-1:0] l2p_dq     [NS],
  input  logic [NS-1:0]       l2p_dq_vld
);
  localparam int unsigned NDQ = NM * DQW;
  localparam int unsigned NFW = 1 + CAW + 2 * NM + 2;  // CK, CA, WVLD, WDQS, CAL_NDW, CAL_ADW
  localparam int unsigned NBW = 2 * NM + 2;            // RVLD, RDQS, CAL_NDR, CAL_ADR

  for (genvar s = 0; s < NS; s++) begin : g_slice
    logic sii_ck_c, cal_ndw, cal_adw, cal_ndr_m, cal_adr_m, cal_ndr_c, cal_adr_c;
    logic sii_ck_m;
    logic [CAW-1:0] ca_c, ca_m;
    logic [NDQ-1:0] dq_c_out, dq_c_oe, dq_m_out, dq_m_oe, dq_c_in, dq_m_in;
    logic [NM-1:0] wvld_c, wdqs_c, wvld_m, wdqs_m, rvld_m, rdqs_m, rvld_c, rdqs_c;
    logic ed_ca;
    logic [NM-1:0] ed_m;
    logic pat_ca, pat_wr, pat_rd;
    logic [NFW-1:0] fw_in, fw_out, fw_unused;
    logic [NBW-1:0] bw_in, bw_out, bw_unused;

    phyc_slice #(.NM(NM), .DQW(DQW), .SETTLE(SETTLE), .DWELL(DWELL)) u_phyc (
      .rst_n(rst_n), .pll_en(pll_en), .p2c_ck(p2c_ck[s]),
      .c2p_cmd(c2p_cmd[s]), .c2p_adr(c2p_adr[s]), .c2p_dq(c2p_dq[s]), .c2p_dq_vld(c2p_dq_vld[s]),
      .p2c_dq(p2c_dq[s]), .p2c_dq_vld(p2c_dq_vld[s]),
      .train_start(train_start[s]), .train_done(train_done[s]), .train_ok(train_ok[s]),
      .wdll_lock(wdll_lock[s]), .rdll_lock(rdll_lock[s]),
      .sii_ck(sii_ck_c), .sii_ca(ca_c), .dq_out(dq_c_out), .dq_oe(dq_c_oe),
      .wvld_out(wvld_c), .wdqs_out(wdqs_c), .dq_in(dq_c_in), .rvld_in(rvld_c), .rdqs_in(rdqs_c),
      .cal_ndw(cal_ndw), .cal_adw(cal_adw), .cal_ndr(cal_ndr_c), .cal_adr(cal_adr_c),
      .m_ed_ca(ed_ca), .m_ed(ed_m), .pat_ca(pat_ca), .pat_wr(pat_wr), .pat_rd(pat_rd));

    // bidirectional DQ traces
    sii_channel #(.W(NDQ)) u_sii_dq (.c_out(dq_c_out), .c_oe(dq_c_oe), .m_out(dq_m_out),
      .m_oe(dq_m_oe), .c_in(dq_c_in), .m_in(dq_m_in));
    // SOC -> memory traces
    assign fw_in = {sii_ck_c, ca_c, wvld_c, wdqs_c, cal_ndw, cal_adw};
    sii_channel #(.W(NFW)) u_sii_fw (.c_out(fw_in), .c_oe('1), .m_out('0), .m_oe('0),
      .c_in(fw_unused), .m_in(fw_out));
    logic cal_ndw_m, cal_adw_m;
    assign {sii_ck_m, ca_m, wvld_m, wdqs_m, cal_ndw_m, cal_adw_m} = fw_out;
    // memory -> SOC traces
    assign bw_in = {rvld_m, rdqs_m, cal_ndr_m, cal_adr_m};
    sii_channel #(.W(NBW)) u_sii_bw (.c_out('0), .c_oe('0), .m_out(bw_in), .m_oe('1),
      .c_in(bw_out), .m_in(bw_unused));
    assign {rvld_c, rdqs_c, cal_ndr_c, cal_adr_c} = bw_out;

    phym_slice #(.NM(NM), .DQW(DQW)) u_phym (
      .rst_n(rst_n), .sii_ck(sii_ck_m), .sii_ca(ca_m), .dq_in(dq_m_in), .wvld_in(wvld_m),
      .wdqs_in(wdqs_m), .dq_out(dq_m_out), .dq_oe(dq_m_oe), .rvld_out(rvld_m), .rdqs_out(rdqs_m),
      .cal_ndw(cal_ndw_m), .cal_adw(cal_adw_m), .cal_ndr(cal_ndr_m), .cal_adr(cal_adr_m),
      .pat_rd(pat_rd), .man_code(man_code), .ed_ca(ed_ca), .ed(ed_m),
      .p2l_ck(p2l_ck[s]), .p2l_cmd(p2l_cmd[s]), .p2l_adr(p2l_adr[s]), .p2l_dq(p2l_dq[s]),
      .p2l_dq_vld(p2l_dq_vld[s]), .l2p_dq(l2p_dq[s]), .l2p_dq_vld(l2p_dq_vld[s]));

    logic unused;
    assign unused = ^{fw_unused, bw_unused, pat_ca};
  end
endmodule
