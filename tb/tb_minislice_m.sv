`timescale 1ps/1ps
// tb_minislice_m: the memory-side mini-slice with its read transmitter looped back into
// its write receiver. The strobe leaves edge aligned with the data, so the loop delays it
// by 1200 ps; with the 1300 ps receive clock tree the sampling edge lands a quarter cycle
// into each bit.
//   1. random 64-bit words with random valid gaps must come out of the write FIFO in
//      order and unchanged;
//   2. in pattern mode the edge detector must report 1 with the centred strobe and 0
//      with the strobe moved by half a cycle.
module tb_minislice_m;
  import ehp_pkg::*;
  localparam int DQW = 32;
  logic rst_n = 1'b1, clk = 1'b0;
  initial #1 rst_n = 1'b0;  // a falling edge puts every asynchronous-reset flop in reset
  logic [2*DQW-1:0] rd_tx = '0, wdata;
  logic rvld = 1'b0, pat = 1'b0;
  logic [DQW-1:0] dq;
  logic dq_oe, rv, rdqs, rdqs_d = 1'b0, wempty, ed;
  int unsigned strobe_ps = 1200;
  int checks = 0, failures = 0, n_rx = 0;
  logic [2*DQW-1:0] exp_q [$];

  always #1000 clk = ~clk;
  always @(rdqs) begin
    automatic logic v = rdqs;
    automatic int unsigned t = strobe_ps;
    fork begin #(t); rdqs_d = v; end join_none
  end

  minislice_m #(.DQW(DQW)) dut (.rst_n(rst_n), .core_clk(clk), .man_code('0), .rd_tx(rd_tx),
    .rvld(rvld), .pat(pat), .dq_out(dq), .dq_oe(dq_oe), .rvld_out(rv), .rdqs_out(rdqs),
    .dq_in(dq), .wvld_in(rv), .wdqs_in(rdqs_d), .rd_en(!wempty), .wdata(wdata),
    .wempty(wempty), .ed(ed));

  initial begin #20000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) if (rst_n && !wempty) begin
    checks++; n_rx++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL: unexpected word %h", wdata); end
    else begin
      logic [2*DQW-1:0] e;
      e = exp_q.pop_front();
      if (wdata !== e) begin failures++; $display("FAIL: read %h expected %h", wdata, e); end
    end
  end

  initial begin
    repeat (20) @(posedge clk);
    rst_n <= 1'b1;
    repeat (10) @(posedge clk);
    for (int i = 0; i < 400; i++) begin
      @(posedge clk);
      rvld  <= ($urandom % 4) != 0;
      rd_tx <= {$urandom, $urandom};
      #1;
      if (rvld) exp_q.push_back(rd_tx);
    end
    @(posedge clk); rvld <= 1'b0;
    repeat (20) @(posedge clk);
    checks++; if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d words lost", exp_q.size()); end
    checks++; if (n_rx < 250) begin failures++; $display("FAIL: only %0d words received", n_rx); end
    pat <= 1'b1;
    repeat (20) @(posedge clk);
    checks++; if (ed !== 1'b1) begin failures++; $display("FAIL: edge detector 0 with centred strobe"); end
    strobe_ps = 200;
    repeat (20) @(posedge clk);
    checks++; if (ed !== 1'b0) begin failures++; $display("FAIL: edge detector 1 with shifted strobe"); end
    $display("words received %0d", n_rx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
