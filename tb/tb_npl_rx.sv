`timescale 1ps/1ps
// tb_npl_rx: plays the two sense-amplifier outputs of W lines (the top line is the
// valid envelope): a new rising-edge sample shortly after each strobe rising edge and a
// falling-edge sample after each falling edge. Checks that the pair registered at the
// next rising edge is {odd, even} of the same strobe cycle, and that exactly the valid
// pairs reach the core-clock side, in order.
module tb_npl_rx;
  localparam int W = 6, TCK = 2000;
  logic dqs = 1'b0, rclk = 1'b0, rst_n = 1'b1, rd_en = 1'b0, empty;
  initial #1 rst_n = 1'b0;  // a falling edge puts every asynchronous-reset flop in reset
  logic [W-1:0] qr = '0, qf = '0, pe, po;
  logic [2*W-3:0] rdata;
  logic [2*W-3:0] exp_q [$];
  int checks = 0, failures = 0, nread = 0, nsent = 0;
  npl_rx #(.W(W)) dut (.dqs(dqs), .rst_n(rst_n), .q_rise(qr), .q_fall(qf), .pair_even(pe),
    .pair_odd(po), .rclk(rclk), .rd_en(rd_en), .rdata(rdata), .empty(empty));
  always #(TCK / 2) dqs = ~dqs;
  initial begin #700; forever #(TCK / 2) rclk = ~rclk; end
  initial begin #(5000 * TCK); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  // read side: pop whenever a word is available
  always @(posedge rclk) begin
    if (rd_en && !empty) begin
      checks++; nread++;
      if (exp_q.size() == 0 || rdata !== exp_q[0]) begin failures++; $display("FAIL: fifo word %h", rdata); end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
    rd_en <= rst_n;
  end
  initial begin
    logic [W-1:0] e, o;
    #(3 * TCK + 100); rst_n = 1'b1;
    for (int n = 0; n <= 400; n++) begin
      @(posedge dqs); #10;
      if (n > 0) begin
        checks++;
        if (pe !== e || po !== o) begin failures++; $display("FAIL: pair %h/%h != %h/%h", pe, po, e, o); end
      end
      if (n == 400) break;
      e = W'($urandom); o = W'($urandom);
      #140 qr = e;
      @(negedge dqs); #150 qf = o;
      if (e[W-1]) begin exp_q.push_back({o[W-2:0], e[W-2:0]}); nsent++; end
    end
    qr = '0;
    repeat (20) @(posedge rclk);
    checks++; if (nread != nsent) begin failures++; $display("FAIL: %0d of %0d words read", nread, nsent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
