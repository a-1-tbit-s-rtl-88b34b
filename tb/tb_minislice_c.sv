`timescale 1ps/1ps
// tb_minislice_c: the SOC-side mini-slice with its transmitter looped back into its own
// receiver (WDQS -> RDQS, DQ -> DQ, write valid -> read valid). With the write clock
// code at 0, WDQS leaves a quarter cycle after the data; a read code of 600 ps makes the
// receive path a whole cycle long, so the receiver samples each bit in its centre.
//   1. random 64-bit words with random valid gaps must come out of the read FIFO in
//      order and unchanged, and the pad enable must follow the valid;
//   2. in pattern mode the edge detector must report 1 with the centred code and 0 with
//      the receive clock moved by half a cycle.
module tb_minislice_c;
  import ehp_pkg::*;
  localparam int DQW = 32;
  logic rst_n = 1'b1, ck0, ck90, ck180, ck270, lock, en = 1'b0;
  initial #1 rst_n = 1'b0;  // a falling edge puts every asynchronous-reset flop in reset
  logic [2*DQW-1:0] wdata = '0, rdata;
  logic wvld = 1'b0, pat = 1'b0, sel_rdqs = 1'b0;
  dcdl_code_t rdll_code = '{coarse: 6'd15, fine: 4'd0}, rdqs_tcode = '{coarse: 6'd40, fine: 4'd0};
  logic [DQW-1:0] dq;
  logic dq_oe, wv, wdqs, rempty, ed;
  int checks = 0, failures = 0, n_rx = 0, n_oe = 0;
  logic [2*DQW-1:0] exp_q [$];

  pll u_pll (.en(en), .ck0(ck0), .ck90(ck90), .ck180(ck180), .ck270(ck270), .lock(lock));
  minislice_c #(.DQW(DQW)) dut (.rst_n(rst_n), .ck0(ck0), .ck90(ck90), .wdata(wdata), .wvld(wvld),
    .pat(pat), .wdll_code('0), .rdll_code(rdll_code), .sel_wdqs(1'b0), .sel_rdqs(sel_rdqs),
    .sel_dq(1'b0), .wdqs_tcode('0), .rdqs_tcode(rdqs_tcode), .dq_tcode('0),
    .dq_out(dq), .dq_oe(dq_oe), .wvld_out(wv), .wdqs_out(wdqs),
    .dq_in(dq), .rvld_in(wv), .rdqs_in(wdqs), .rclk(ck0), .rd_en(!rempty),
    .rdata(rdata), .rempty(rempty), .ed(ed));

  initial begin #20000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge ck0) if (rst_n && !rempty) begin
    checks++; n_rx++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL: unexpected word %h", rdata); end
    else begin
      logic [2*DQW-1:0] e;
      e = exp_q.pop_front();
      if (rdata !== e) begin failures++; $display("FAIL: read %h expected %h", rdata, e); end
    end
  end
  always @(dq_oe) if (rst_n && !pat && dq_oe) n_oe++;

  initial begin
    #1000 en = 1'b1;           // the oscillator starts on a rising enable
    repeat (20) @(posedge ck0);
    rst_n <= 1'b1;
    repeat (10) @(posedge ck0);
    for (int i = 0; i < 400; i++) begin
      @(posedge ck0);
      wvld  <= ($urandom % 4) != 0;
      wdata <= {$urandom, $urandom};
      #1;
      if (wvld) exp_q.push_back(wdata);
    end
    @(posedge ck0); wvld <= 1'b0;
    repeat (20) @(posedge ck0);
    checks++; if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d words lost", exp_q.size()); end
    checks++; if (n_rx < 250) begin failures++; $display("FAIL: only %0d words received", n_rx); end
    checks++; if (n_oe == 0) begin failures++; $display("FAIL: pad enable never raised"); end
    // pattern mode, centred and moved by half a cycle
    pat <= 1'b1;
    repeat (20) @(posedge ck0);
    checks++; if (ed !== 1'b1) begin failures++; $display("FAIL: edge detector 0 with centred clock"); end
    sel_rdqs <= 1'b1;
    repeat (20) @(posedge ck0);
    checks++; if (ed !== 1'b0) begin failures++; $display("FAIL: edge detector 1 with shifted clock"); end
    $display("words received %0d", n_rx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
