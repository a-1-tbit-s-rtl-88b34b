`timescale 1ps/1ps
// tb_edge_detector: directed cases (clean 1-0 pattern, one rising-edge sample wrong,
// one falling-edge sample wrong, both wrong, inverted pattern) and random vectors; the
// registered output must equal (all rising samples 1) OR (all falling samples 0) of the
// previous clock.
module tb_edge_detector;
  localparam int W = 32;
  logic clk = 1'b0, rst_n = 1'b1, ed;
  initial #1 rst_n = 1'b0;  // a falling edge puts every asynchronous-reset flop in reset
  logic [W-1:0] rise = '0, fall = '0;
  int checks = 0, failures = 0;
  edge_detector #(.W(W)) dut (.*);
  always #1000 clk = ~clk;
  initial begin #(5000 * 2000); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic apply(input logic [W-1:0] r, input logic [W-1:0] f, input bit exp);
    @(negedge clk); rise = r; fall = f;
    @(posedge clk); #1;
    checks++;
    if (ed !== exp) begin failures++; $display("FAIL: rise=%h fall=%h ed=%b", r, f, ed); end
  endtask
  initial begin
    #3000; rst_n = 1'b1;
    apply('1, '0, 1'b1);
    apply('1 ^ (W'(1) << 7), '0, 1'b1);          // falling edge still clean
    apply('1, W'(1) << 3, 1'b1);                  // rising edge still clean
    apply('1 ^ (W'(1) << 7), W'(1) << 3, 1'b0);  // both disturbed: transition region
    apply('0, '1, 1'b0);                          // sampling the opposite phase
    apply(W'(32'h0000_ffff), W'(32'hffff_0000), 1'b0);
    repeat (300) begin
      logic [W-1:0] r, f;
      r = ($urandom % 3 == 0) ? '1 : W'($urandom) | W'($urandom);
      f = ($urandom % 3 == 0) ? '0 : W'($urandom) & W'($urandom);
      apply(r, f, (&r) | ~(|f));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
