`timescale 1ps/1ps
// tb_cowos_ehp_full: the end-to-end test at full size, the top with all parameters at
// their defaults: 4 slices of 8 mini-slices, 1024 DQ, 512-bit words per slice.
// 1. reset, enable the PLLs, wait for WRITE-DLL and READ-DLL lock in every slice and
//    check that each lock code compensates the clock tree as intended;
// 2. closed-loop mode: write NWORDS random words to each eDRAM channel, read them
//    back and compare (write and read data paths, data alignment, bus turnaround);
// 3. run the four-step data sampling alignment training in every slice;
// 4. trained mode: write and read again with new data.
// Each mechanism is counted and a mechanism that never happened is a failure.
module tb_cowos_ehp_full;
  import ehp_pkg::*;
  localparam int unsigned NS = NSLICE, NM = NMINI, DQW = MINI_DQ, DW = 2 * NM * DQW, NWORDS = 8;
  localparam int unsigned TCK = 2000, LCTS = 1300;

  logic rst_n = 1'b1, pll_en = 1'b0;
  initial #1 rst_n = 1'b0;  // a falling edge puts every asynchronous-reset flop in reset
  dcdl_code_t man_code = '0;
  logic [NS-1:0] p2c_ck, p2c_dq_vld, train_start = '0, train_done, wdll_lock, rdll_lock;
  logic [NS-1:0] p2l_ck, p2l_dq_vld, l2p_dq_vld, c2p_dq_vld = '0;
  logic [CMDW-1:0] c2p_cmd [NS], p2l_cmd [NS];
  logic [ADRW-1:0] c2p_adr [NS], p2l_adr [NS];
  logic [DW-1:0] c2p_dq [NS], p2c_dq [NS], p2l_dq [NS], l2p_dq [NS];
  logic [3:0] train_ok [NS];
  int n_wr [NS], n_rd [NS];
  int checks = 0, failures = 0;

  cowos_ehp_top dut (.*);

  for (genvar s = 0; s < NS; s++) begin : g_mem
    edram_model #(.DW(DW)) u_mem (.ck(p2l_ck[s]), .rst_n(rst_n), .cmd(p2l_cmd[s]), .adr(p2l_adr[s]),
      .wdq(p2l_dq[s]), .wvld(p2l_dq_vld[s]), .rdq(l2p_dq[s]), .rvld(l2p_dq_vld[s]),
      .n_wr(n_wr[s]), .n_rd(n_rd[s]));
  end

  dcdl_code_t wcode [NS], rcode [NS];
  for (genvar s = 0; s < NS; s++) begin : g_probe
    assign wcode[s] = dut.g_slice[s].u_phyc.wdll_code;
    assign rcode[s] = dut.g_slice[s].u_phyc.rdll_code;
  end

  initial for (int s = 0; s < NS; s++) begin c2p_cmd[s] = '0; c2p_adr[s] = '0; c2p_dq[s] = '0; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [DW-1:0] rnd_word();
    logic [DW-1:0] w;
    for (int i = 0; i < int'(DW); i += 32) w[i +: 32] = $urandom;
    return w;
  endfunction

  // mechanism counters
  int m_wlock = 0, m_rlock = 0, m_write = 0, m_read = 0, m_turn = 0, m_train = 0, m_mode = 0;
  int m_step [4] = '{0, 0, 0, 0};

  logic [DW-1:0] expq [NS][$];
  logic [DW-1:0] ref_mem [NS][16];

  // rate: a burst of back-to-back reads must come back on consecutive clocks, one
  // 2*NM*DQW-bit word per clock per slice (two bits per DQ per clock)
  int run_len = 0, max_run = 0;
  always @(posedge p2c_ck[0]) begin
    run_len = p2c_dq_vld[0] ? run_len + 1 : 0;
    if (run_len > max_run) max_run = run_len;
  end

  // compare read data as it arrives; before both DLLs have locked the receive strobes
  // are still moving and the read path output is not defined, so it is not compared
  always @(posedge p2c_ck[0])
    for (int s = 0; s < NS; s++)
      if (m_wlock > 0 && p2c_dq_vld[s]) begin
        if (expq[s].size() == 0) check(0, "unexpected read word");
        else begin
          logic [DW-1:0] e;
          e = expq[s].pop_front();
          check(p2c_dq[s] == e, $sformatf("slice %0d read data %h != %h", s, p2c_dq[s][63:0], e[63:0]));
          m_read++;
        end
      end

  task automatic burst(input int seed);
    // writes
    for (int a = 0; a < int'(NWORDS); a++) begin
      @(posedge p2c_ck[0]);
      for (int s = 0; s < NS; s++) begin
        c2p_cmd[s] <= 7'h01; c2p_adr[s] <= 15'(a + seed); c2p_dq[s] <= rnd_word();
        c2p_dq_vld[s] <= 1'b1;
      end
      #1;
      for (int s = 0; s < NS; s++) ref_mem[s][(a + seed) % 16] = c2p_dq[s];
      m_write++;
    end
    @(posedge p2c_ck[0]);
    for (int s = 0; s < NS; s++) begin c2p_cmd[s] <= '0; c2p_dq_vld[s] <= 1'b0; end
    repeat (20) @(posedge p2c_ck[0]);
    for (int s = 0; s < NS; s++) check(n_wr[s] == int'(NWORDS) * (seed == 0 ? 1 : 2),
      $sformatf("slice %0d eDRAM saw %0d writes", s, n_wr[s]));
    // reads, back to back
    for (int a = 0; a < int'(NWORDS); a++) begin
      @(posedge p2c_ck[0]);
      for (int s = 0; s < NS; s++) begin
        c2p_cmd[s] <= 7'h02; c2p_adr[s] <= 15'(a + seed);
        expq[s].push_back(ref_mem[s][(a + seed) % 16]);
      end
    end
    @(posedge p2c_ck[0]);
    for (int s = 0; s < NS; s++) c2p_cmd[s] <= '0;
    m_turn++;
    repeat (40) @(posedge p2c_ck[0]);
    for (int s = 0; s < NS; s++) check(expq[s].size() == 0, $sformatf("slice %0d missing %0d reads", s, expq[s].size()));
    check(max_run == int'(NWORDS), $sformatf("read burst of %0d words came back in runs of at most %0d", NWORDS, max_run));
    max_run = 0;
  endtask

  initial begin
    #(400000 * TCK);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(5 * TCK); pll_en = 1'b1;
    #(3 * TCK); rst_n = 1'b1;
    wait (&wdll_lock && &rdll_lock);
    m_wlock++; m_rlock++;
    repeat (4) @(posedge p2c_ck[0]);
    // lock codes: write code + memory tree = 0 (mod TCK); read: intrinsic + code + tree = TCK/4
    for (int s = 0; s < NS; s++) begin
      int wd, rd, we, re;
      wd = 40 * int'(wcode[s].coarse) + 5 * int'(wcode[s].fine);
      rd = 40 * int'(rcode[s].coarse) + 5 * int'(rcode[s].fine);
      we = (wd + LCTS) % TCK; if (we > TCK / 2) we -= TCK;
      re = (100 + rd + LCTS - TCK / 4) % TCK; if (re > TCK / 2) re -= TCK;
      $display("slice %0d: write DLL delay %0d ps (residual %0d), read DLL delay %0d ps (residual %0d)", s, wd, we, rd, re);
      // tolerance: one fine step plus the mismatch of the calibration traces
      check(we <= 20 && we >= -20, $sformatf("write DLL residual %0d ps", we));
      check(re <= 20 && re >= -20, $sformatf("read DLL residual %0d ps", re));
    end
    burst(0);
    // training
    train_start <= '1;
    @(posedge p2c_ck[0]); train_start <= '0;
    wait (&train_done);
    m_train++;
    for (int s = 0; s < NS; s++) begin
      check(train_ok[s] == 4'hf, $sformatf("slice %0d training ok=%b", s, train_ok[s]));
      for (int k = 0; k < 4; k++) if (train_ok[s][k]) m_step[k]++;
    end
    m_mode++;
    repeat (10) @(posedge p2c_ck[0]);
    burst(3);
    check(m_wlock > 0, "WRITE-DLL lock never happened");
    check(m_rlock > 0, "READ-DLL lock never happened");
    check(m_write > 0 && m_read > 0, "write/read never happened");
    check(m_turn > 1, "read-after-write turnaround");
    check(m_train > 0 && m_mode > 0, "training / mode switch never happened");
    for (int k = 0; k < 4; k++) check(m_step[k] > 0, $sformatf("training step %0d never completed", k + 1));
    $display("mechanisms: wlock=%0d rlock=%0d writes=%0d reads=%0d turn=%0d train=%0d steps=%0d/%0d/%0d/%0d",
      m_wlock, m_rlock, m_write, m_read, m_turn, m_train, m_step[0], m_step[1], m_step[2], m_step[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
