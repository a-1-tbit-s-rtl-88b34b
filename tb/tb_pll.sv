`timescale 1ps/1ps
// tb_pll: the four phases must have the 2000 ps period and 50 % duty cycle, ck90 must
// rise 500 ps after ck0, ck180 1000 ps and ck270 1500 ps after it, lock must rise after
// 16 cycles of ck0 and fall when the PLL is disabled.
module tb_pll;
  logic en = 1'b0, ck0, ck90, ck180, ck270, lock;
  longint r0 = -1, r0p = -1, f0 = -1, r90 = -1, r180 = -1, r270 = -1;
  int checks = 0, failures = 0, n0 = 0;
  pll dut (.*);
  initial begin #10000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(posedge ck0) begin r0p = r0; r0 = longint'($time); n0++; end
  always @(negedge ck0) f0 = longint'($time);
  always @(posedge ck90) r90 = longint'($time);
  always @(posedge ck180) r180 = longint'($time);
  always @(posedge ck270) r270 = longint'($time);
  task automatic chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    #3000;
    chk(!lock, "lock while disabled");
    en = 1'b1;
    wait (n0 == 10);
    chk(!lock, "lock too early");
    wait (n0 == 20); #1;
    chk(lock, "no lock after 20 cycles");
    repeat (20) begin
      @(posedge ck270); #1;
      chk(r0 - r0p == 2000, $sformatf("period %0d", r0 - r0p));
      chk(f0 - r0 == 1000, "duty cycle");
      chk(r90 - r0 == 500, $sformatf("ck90 offset %0d", r90 - r0));
      chk(r180 - r0 == 1000, $sformatf("ck180 offset %0d", r180 - r0));
      chk(r270 - r0 == 1500, $sformatf("ck270 offset %0d", r270 - r0));
    end
    en = 1'b0; #10;
    chk(!lock, "lock after disable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
