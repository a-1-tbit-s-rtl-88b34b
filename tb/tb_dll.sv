`timescale 1ps/1ps
// tb_dll: DLL (phase detector + controller + delay line) against an external delay.
// FIN and FREF are the same 500 MHz clock; FOUT returns as FBKIN after EXT_PS. For a
// set of external delays the test waits for lock and checks that the total loop delay
// (intrinsic 100 ps + code delay + EXT_PS) is a whole number of periods within 10 ps,
// that the coarse loop locked before the fine loop, and the calibration time.
module tb_dll;
  import ehp_pkg::*;
  localparam int TCK = 2000;
  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0, fout, fbk, clock, lock;
  initial #1 rst_n = 1'b0;  // a falling edge puts every asynchronous-reset flop in reset
  dcdl_code_t code;
  int ext_ps = 1300;
  int checks = 0, failures = 0;
  always #(TCK / 2) clk = ~clk;
  initial fbk = 1'b0;
  always @(fout) begin
    automatic logic v = fout;
    automatic int t = ext_ps;
    fork begin #(t); fbk <= v; end join_none
  end
  dll dut (.rst_n(rst_n), .en(en), .fin(clk), .fref(clk), .fbkin(fbk), .fout(fout),
    .code(code), .coarse_lock(clock), .lock(lock));
  int tests [5] = '{1300, 450, 1960, 700, 3100};
  initial begin
    #(200000 * TCK);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    #(3 * TCK); rst_n = 1'b1;
    foreach (tests[t]) begin
      int tot, res, cyc;
      ext_ps = tests[t];
      en = 1'b0; repeat (3) @(posedge clk); en = 1'b1;
      cyc = 0;
      while (!lock) begin
        @(posedge clk); cyc++;
        if (!clock) begin checks++; if (lock) begin failures++; $display("FAIL: fine lock before coarse"); end end
      end
      repeat (40) @(posedge clk);
      tot = 100 + 40 * int'(code.coarse) + 5 * int'(code.fine) + ext_ps;
      res = tot % TCK; if (res > TCK / 2) res -= TCK;
      checks++;
      if (res > 10 || res < -10) begin
        failures++; $display("FAIL: ext=%0d code=%0d/%0d residual %0d ps", ext_ps, code.coarse, code.fine, res);
      end else $display("ext=%0d code=%0d/%0d residual %0d ps, lock after %0d cycles", ext_ps, code.coarse, code.fine, res, cyc);
      // a lock takes at most (64 coarse + 16 fine + toggles) decisions of 8 cycles
      checks++;
      if (cyc > 8 * (64 + 16 + 8)) begin failures++; $display("FAIL: lock took %0d cycles", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
