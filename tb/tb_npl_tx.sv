`timescale 1ps/1ps
// tb_npl_tx: random even/odd words are presented before each rising edge; the DDR
// output must show the even word during the following high phase and the odd word
// during the low phase after it (one clock of latency at the 2:1 multiplexer).
module tb_npl_tx;
  localparam int W = 8, TCK = 2000;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a falling edge puts every asynchronous-reset flop in reset
  logic [W-1:0] de, dodd, q;
  int checks = 0, failures = 0;
  npl_tx #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .d_even(de), .d_odd(dodd), .q(q));
  always #(TCK / 2) clk = ~clk;
  initial begin #(1000 * TCK); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic [W-1:0] e, o;
    de = '0; dodd = '0;
    #(3 * TCK + 100); rst_n = 1'b1;
    checks++; if (q !== '0) begin failures++; $display("FAIL: reset value"); end
    repeat (200) begin
      e = W'($urandom); o = W'($urandom);
      @(negedge clk); de = e; dodd = o;
      @(posedge clk); #300;
      checks++; if (q !== e) begin failures++; $display("FAIL: even %h != %h", q, e); end
      @(negedge clk); #300;
      checks++; if (q !== o) begin failures++; $display("FAIL: odd %h != %h", q, o); end
      de = ~e;  // changes in the low phase must not disturb the odd bit
      #300;
      checks++; if (q !== o) begin failures++; $display("FAIL: odd disturbed"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
