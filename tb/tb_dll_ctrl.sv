`timescale 1ps/1ps
// tb_dll_ctrl: the controller against an abstract loop. The loop delay is
// 100 + 40*coarse + 5*fine + EXT ps; its phase e (mod 2000 ps) gives up = 1 when the
// feedback edge is early (e in the upper half period), as a bang-bang detector would,
// two clocks after the code changes. Checks: coarse lock comes first, with the fine
// code at 4'b1000; lock follows; the locked delay is within one fine step of a whole
// period; after an external drift of +60 ps the loop tracks again (fine overflow
// moves the coarse code); disabling the controller returns it to code 0.
module tb_dll_ctrl;
  import ehp_pkg::*;
  localparam int TCK = 2000;
  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0, up = 1'b0, up1 = 1'b0, clock, lock;
  initial #1 rst_n = 1'b0;  // a falling edge puts every asynchronous-reset flop in reset
  dcdl_code_t code;
  int ext = 1300;
  int checks = 0, failures = 0;
  dll_ctrl dut (.*, .coarse_lock(clock));
  always #(TCK / 2) clk = ~clk;
  function automatic int phase_err();
    int e;
    e = (100 + 40 * int'(code.coarse) + 5 * int'(code.fine) + ext) % TCK;
    return e;
  endfunction
  always @(posedge clk) begin up1 <= (phase_err() > TCK / 2); up <= up1; end
  initial begin #(100000 * TCK); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  function automatic int resid();
    int e = phase_err();
    return (e > TCK / 2) ? e - TCK : e;
  endfunction
  int exts [4] = '{1300, 450, 1960, 3100};
  initial begin
    #(3 * TCK); rst_n = 1'b1;
    foreach (exts[i]) begin
      ext = exts[i];
      en = 1'b0; repeat (3) @(posedge clk); #1;
      chk(code == '0 && !clock && !lock, "disabled state");
      en = 1'b1;
      while (!clock) begin @(posedge clk); #1; chk(!lock, "lock before coarse lock"); end
      chk(code.fine == 4'b1000, "fine code does not start at 1000");
      wait (lock); repeat (40) @(posedge clk); #1;
      chk(resid() <= 5 && resid() >= -5, $sformatf("ext %0d residual %0d", ext, resid()));
    end
    // drift: the loop must follow beyond the fine range
    ext = ext + 60;
    repeat (400) @(posedge clk); #1;
    chk(resid() <= 5 && resid() >= -5, $sformatf("after drift residual %0d", resid()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
