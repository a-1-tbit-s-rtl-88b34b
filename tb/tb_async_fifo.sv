`timescale 1ps/1ps
// tb_async_fifo: writes random words on a 2000 ps clock and reads on a 2300 ps clock
// with random enables, compares the read order with a reference queue, and checks that
// full rises after DEPTH writes with no reads and empty after draining.
module tb_async_fifo;
  localparam int DW = 16, DEPTH = 8;
  logic wclk = 1'b0, rclk = 1'b0, rst_n = 1'b1, want = 1'b0, wr_en, rd_en = 1'b0, full, empty;
  initial #1 rst_n = 1'b0;  // a falling edge puts every asynchronous-reset flop in reset
  logic [DW-1:0] wdata = '0, rdata;
  logic [DW-1:0] q [$];
  int checks = 0, failures = 0, nread = 0;
  bit phase2 = 0, fill = 0, drain = 0;
  int nwr = 0;
  async_fifo #(.DW(DW), .DEPTH(DEPTH)) dut (.*, .wrst_n(rst_n), .rrst_n(rst_n));
  assign wr_en = want && !full;  // the FIFO must never be written while full
  always #1000 wclk = ~wclk;
  always #1150 rclk = ~rclk;
  initial begin #(4000000); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  // writer
  always @(posedge wclk) if (rst_n) begin
    if (wr_en && !full) begin q.push_back(wdata); nwr++; end
    want <= fill ? (nwr + int'(wr_en) < DEPTH) : phase2 ? ($urandom % 3 != 0) : 1'b0;
    wdata <= DW'($urandom);
  end
  // reader
  always @(posedge rclk) if (rst_n) begin
    if (rd_en && !empty) begin
      checks++; nread++;
      if (q.size() == 0 || rdata !== q[0]) begin failures++; $display("FAIL: read %h", rdata); end
      if (q.size() != 0) void'(q.pop_front());
    end
    rd_en <= drain ? 1'b1 : phase2 ? ($urandom % 2 == 0) : 1'b0;
  end
  initial begin
    #10000; rst_n = 1'b1;
    checks++; if (!empty || full) begin failures++; $display("FAIL: after reset"); end
    // fill with no reads
    fill = 1;
    wait (nwr == DEPTH);
    fill = 0;
    repeat (2) @(posedge wclk);
    checks++; if (!full) begin failures++; $display("FAIL: not full after %0d writes", DEPTH); end
    repeat (6) @(posedge rclk);
    checks++; if (empty) begin failures++; $display("FAIL: empty while full"); end
    // drain
    drain = 1;
    wait (nread == DEPTH);
    drain = 0;
    checks++; if (q.size() != 0) begin failures++; $display("FAIL: words left"); end
    repeat (6) @(posedge wclk);
    checks++; if (full) begin failures++; $display("FAIL: still full after drain"); end
    nread = 0;
    phase2 = 1;
    wait (nread >= 500);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
