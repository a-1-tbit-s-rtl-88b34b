`timescale 1ps/1ps
// tb_train_sweep: three lanes with ED functions of the sweep index. Lane 0 starts in a
// stable region (which must be ignored), has a transition region at 6..19, is stable at
// 20..50 and in transition again from 51. Lane 1 is stable at 33..60. Lane 2 never
// leaves its stable region and must end without a result. In transition regions ED
// is random. Centre mode must return 35 and 46, edge mode 20 and 33; the sweep must
// end at the last index (lane 2 unresolved) and pulse done once.
module tb_train_sweep;
  import ehp_pkg::*;
  localparam int L = 3, MAXI = 100;
  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0, mode_edge = 1'b0, busy, done;
  initial #1 rst_n = 1'b0;  // a falling edge puts every asynchronous-reset flop in reset
  logic [L-1:0] ed;
  logic [IDXW-1:0] idx;
  logic [IDXW-1:0] result [L];
  logic [L-1:0] ok;
  int checks = 0, failures = 0, ndone = 0;
  train_sweep #(.LANES(L), .SETTLE(2), .DWELL(8), .MAXIDX(MAXI)) dut (.*);
  always #1000 clk = ~clk;
  initial begin #(200000 * 2000); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  function automatic bit noisy(); return ($urandom % 10) < 3; endfunction
  always @(posedge clk) begin
    int i;
    i = int'(idx);
    ed[0] <= (i <= 5) ? 1'b1 : (i >= 20 && i <= 50) ? 1'b1 : noisy();
    ed[1] <= (i >= 33 && i <= 60) ? 1'b1 : noisy();
    ed[2] <= 1'b1;
    if (done) ndone++;
  end
  task automatic run(input bit em, input int e0, input int e1);
    @(negedge clk); mode_edge = em; start = 1'b1;
    @(negedge clk); start = 1'b0; mode_edge = 1'b0;
    checks++; if (!busy) begin failures++; $display("FAIL: not busy"); end
    ndone = 0;
    wait (done); @(negedge clk);
    checks++; if (int'(result[0]) != e0) begin failures++; $display("FAIL: lane0 %0d != %0d", result[0], e0); end
    checks++; if (int'(result[1]) != e1) begin failures++; $display("FAIL: lane1 %0d != %0d", result[1], e1); end
    checks++; if (ok !== 3'b011) begin failures++; $display("FAIL: ok=%b", ok); end
    checks++; if (int'(idx) != MAXI) begin failures++; $display("FAIL: ended at %0d", idx); end
    repeat (5) @(negedge clk);
    checks++; if (ndone != 1 || busy) begin failures++; $display("FAIL: done pulses %0d", ndone); end
  endtask
  initial begin
    #5000; rst_n = 1'b1;
    run(1'b0, 35, 46);
    run(1'b1, 20, 33);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
