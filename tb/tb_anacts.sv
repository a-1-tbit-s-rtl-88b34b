`timescale 1ps/1ps
// tb_anacts: a 500 MHz clock through the clock tree; every one of the 34 leaves must
// follow the input exactly LATENCY_PS later, with no skew between leaves.
module tb_anacts;
  localparam int LAT = 1300;
  logic ck = 1'b0;
  logic [33:0] leaves;
  logic hist [longint];
  int checks = 0, failures = 0;
  anacts dut (.ck_in(ck), .ck_out(leaves));
  always #1000 ck = ~ck;
  always @(ck) hist[longint'($time)] = ck;
  initial begin #10000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    #5000;
    repeat (500) begin
      longint t;
      #137;
      t = longint'($time) - LAT;
      // value of the input at time t: the last recorded edge at or before t
      begin
        logic v = 1'b0;
        foreach (hist[k]) if (k <= t) v = hist[k];
        checks++;
        if (leaves !== {34{v}}) begin failures++; $display("FAIL: at %0d leaves=%h expected %b", $time, leaves, v); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
