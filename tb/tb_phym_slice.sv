`timescale 1ps/1ps
// tb_phym_slice: the memory-side slice: clock tree replica loop, command capture, write
// receive and read transmit, on longer traces and with a non-zero manual read delay.
// One SOC-side slice and one memory-side slice (2 mini-slices) are joined by
// interposer traces of 400..420 ps and a small eDRAM model. The test
//   1. waits for WRITE-DLL and READ-DLL lock;
//   2. writes 8 random words and reads them back (commands, write data, read data);
//   3. runs the four training steps, which must all succeed;
//   4. writes and reads again with the trained codes.
// The eDRAM side must see every command and address; the SOC side must get every word back.
module tb_phym_slice;
  import ehp_pkg::*;
  localparam int unsigned NM = 2, DQW = 32, DW = 2 * NM * DQW, NDQ = NM * DQW, NWORDS = 8;
  localparam int unsigned NFW = 1 + CAW + 2 * NM + 2, NBW = 2 * NM + 2;
  localparam int unsigned TCK = 2000;

  logic rst_n = 1'b1, pll_en = 1'b0, train_start = 1'b0;
  initial #1 rst_n = 1'b0;  // a falling edge puts every asynchronous-reset flop in reset
  dcdl_code_t man_code = '{coarse: 6'd3, fine: 4'd0};
  logic p2c_ck, p2c_dq_vld, train_done, wdll_lock, rdll_lock, c2p_dq_vld = 1'b0;
  logic [CMDW-1:0] c2p_cmd = '0, p2l_cmd;
  logic [ADRW-1:0] c2p_adr = '0, p2l_adr;
  logic [DW-1:0] c2p_dq = '0, p2c_dq, p2l_dq, l2p_dq;
  logic p2l_ck, p2l_dq_vld, l2p_dq_vld;
  logic [3:0] train_ok;
  int n_wr, n_rd, checks = 0, failures = 0;

  logic sii_ck_c, sii_ck_m, cal_ndw, cal_adw, cal_ndr_m, cal_adr_m, cal_ndr_c, cal_adr_c;
  logic [CAW-1:0] ca_c, ca_m;
  logic [NDQ-1:0] dq_c_out, dq_c_oe, dq_m_out, dq_m_oe, dq_c_in, dq_m_in;
  logic [NM-1:0] wvld_c, wdqs_c, wvld_m, wdqs_m, rvld_m, rdqs_m, rvld_c, rdqs_c, ed_m;
  logic ed_ca, pat_ca, pat_wr, pat_rd, cal_ndw_m, cal_adw_m;
  logic [NFW-1:0] fw_out, fw_unused;
  logic [NBW-1:0] bw_out, bw_unused;

  phyc_slice #(.NM(NM), .DQW(DQW)) u_phyc (
    .rst_n(rst_n), .pll_en(pll_en), .p2c_ck(p2c_ck), .c2p_cmd(c2p_cmd), .c2p_adr(c2p_adr),
    .c2p_dq(c2p_dq), .c2p_dq_vld(c2p_dq_vld), .p2c_dq(p2c_dq), .p2c_dq_vld(p2c_dq_vld),
    .train_start(train_start), .train_done(train_done), .train_ok(train_ok),
    .wdll_lock(wdll_lock), .rdll_lock(rdll_lock),
    .sii_ck(sii_ck_c), .sii_ca(ca_c), .dq_out(dq_c_out), .dq_oe(dq_c_oe),
    .wvld_out(wvld_c), .wdqs_out(wdqs_c), .dq_in(dq_c_in), .rvld_in(rvld_c), .rdqs_in(rdqs_c),
    .cal_ndw(cal_ndw), .cal_adw(cal_adw), .cal_ndr(cal_ndr_c), .cal_adr(cal_adr_c),
    .m_ed_ca(ed_ca), .m_ed(ed_m), .pat_ca(pat_ca), .pat_wr(pat_wr), .pat_rd(pat_rd));
  sii_channel #(.W(NDQ), .BASE_PS(400)) u_dq (.c_out(dq_c_out), .c_oe(dq_c_oe),
    .m_out(dq_m_out), .m_oe(dq_m_oe), .c_in(dq_c_in), .m_in(dq_m_in));
  sii_channel #(.W(NFW), .BASE_PS(400)) u_fw (.c_out({sii_ck_c, ca_c, wvld_c, wdqs_c, cal_ndw, cal_adw}),
    .c_oe('1), .m_out('0), .m_oe('0), .c_in(fw_unused), .m_in(fw_out));
  assign {sii_ck_m, ca_m, wvld_m, wdqs_m, cal_ndw_m, cal_adw_m} = fw_out;
  sii_channel #(.W(NBW), .BASE_PS(400)) u_bw (.c_out('0), .c_oe('0),
    .m_out({rvld_m, rdqs_m, cal_ndr_m, cal_adr_m}), .m_oe('1), .c_in(bw_out), .m_in(bw_unused));
  assign {rvld_c, rdqs_c, cal_ndr_c, cal_adr_c} = bw_out;
  phym_slice #(.NM(NM), .DQW(DQW)) u_phym (
    .rst_n(rst_n), .sii_ck(sii_ck_m), .sii_ca(ca_m), .dq_in(dq_m_in), .wvld_in(wvld_m),
    .wdqs_in(wdqs_m), .dq_out(dq_m_out), .dq_oe(dq_m_oe), .rvld_out(rvld_m), .rdqs_out(rdqs_m),
    .cal_ndw(cal_ndw_m), .cal_adw(cal_adw_m), .cal_ndr(cal_ndr_m), .cal_adr(cal_adr_m),
    .pat_rd(pat_rd), .man_code(man_code), .ed_ca(ed_ca), .ed(ed_m),
    .p2l_ck(p2l_ck), .p2l_cmd(p2l_cmd), .p2l_adr(p2l_adr), .p2l_dq(p2l_dq),
    .p2l_dq_vld(p2l_dq_vld), .l2p_dq(l2p_dq), .l2p_dq_vld(l2p_dq_vld));
  edram_model #(.DW(DW)) u_mem (.ck(p2l_ck), .rst_n(rst_n), .cmd(p2l_cmd), .adr(p2l_adr),
    .wdq(p2l_dq), .wvld(p2l_dq_vld), .rdq(l2p_dq), .rvld(l2p_dq_vld), .n_wr(n_wr), .n_rd(n_rd));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [DW-1:0] expq [$];
  logic [DW-1:0] ref_mem [16];
  logic [21:0] ca_exp [$];
  int n_ca = 0, n_read = 0;
  logic traffic = 1'b0;  // set while the test issues commands (not during training)

  // every command/address the SOC issues must reach the eDRAM side unchanged and in order
  always @(posedge p2l_ck) if (traffic && p2l_cmd != '0) begin
    n_ca++;
    if (ca_exp.size() == 0) check(0, "unexpected command at the eDRAM side");
    else check({p2l_cmd, p2l_adr} == ca_exp.pop_front(), "command/address changed in transit");
  end
  always @(posedge p2c_ck) if (p2c_dq_vld) begin
    n_read++;
    if (expq.size() == 0) check(0, "unexpected read word");
    else check(p2c_dq == expq.pop_front(), "read data mismatch");
  end

  task automatic burst(input int seed);
    traffic = 1'b1;
    for (int a = 0; a < int'(NWORDS); a++) begin
      @(posedge p2c_ck);
      c2p_cmd <= 7'h01; c2p_adr <= 15'(a + seed); c2p_dq <= {$urandom, $urandom, $urandom, $urandom};
      c2p_dq_vld <= 1'b1;
      #1;
      ref_mem[(a + seed) % 16] = c2p_dq;
      ca_exp.push_back({7'h01, 15'(a + seed)});
    end
    @(posedge p2c_ck); c2p_cmd <= '0; c2p_dq_vld <= 1'b0;
    repeat (20) @(posedge p2c_ck);
    for (int a = 0; a < int'(NWORDS); a++) begin
      @(posedge p2c_ck);
      c2p_cmd <= 7'h02; c2p_adr <= 15'(a + seed);
      expq.push_back(ref_mem[(a + seed) % 16]);
      ca_exp.push_back({7'h02, 15'(a + seed)});
    end
    @(posedge p2c_ck); c2p_cmd <= '0;
    repeat (40) @(posedge p2c_ck);
    check(expq.size() == 0, "read words missing");
    check(ca_exp.size() == 0, "commands missing at the eDRAM side");
    traffic = 1'b0;
  endtask

  initial begin
    #(200000 * TCK);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(5 * TCK); pll_en = 1'b1;
    #(3 * TCK); rst_n = 1'b1;
    wait (wdll_lock && rdll_lock);
    repeat (4) @(posedge p2c_ck);
    burst(0);
    check(n_wr == int'(NWORDS), "eDRAM write count");
    @(posedge p2c_ck) train_start <= 1'b1;
    @(posedge p2c_ck) train_start <= 1'b0;
    wait (train_done);
    check(train_ok == 4'hf, $sformatf("training result %b", train_ok));
    repeat (10) @(posedge p2c_ck);
    burst(5);
    check(n_wr == 2 * int'(NWORDS), "eDRAM write count after training");
    check(n_rd == 2 * int'(NWORDS), "eDRAM read count");
    check(n_ca == 4 * int'(NWORDS), "command count");
    check(n_read == 2 * int'(NWORDS), "read word count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
