`timescale 1ps/1ps
// tb_train_seq: the sequencer with two mini-slices and ED models that depend on the
// delay index each step drives: CA ED is stable for CK index 12..40, write ED for
// WDQS index 8+m..30+m (step 2) and for DQ index 15+3m..45+3m (step 4), read ED for
// RDQS index 5+m..25+m. Checks the step order, the pattern and mode-select outputs in
// every step, and the final codes: CK 26 (centre), WDQS 8+m (edge), RDQS 15+m (centre),
// DQ 30+3m (centre).
module tb_train_seq;
  import ehp_pkg::*;
  localparam int NM = 2;
  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0, ed_ca, done, pat_ca, pat_wr, pat_rd;
  initial #1 rst_n = 1'b0;  // a falling edge puts every asynchronous-reset flop in reset
  logic [NM-1:0] ed_m, ed_c;
  train_step_e step;
  logic ck_sel, wdqs_sel, rdqs_sel, dq_sel;
  logic [IDXW-1:0] ck_idx;
  logic [IDXW-1:0] wdqs_idx [NM], rdqs_idx [NM], dq_idx [NM];
  logic [3:0] step_ok;
  int checks = 0, failures = 0;
  train_seq #(.NM(NM), .SETTLE(2), .DWELL(8)) dut (.*);
  always #1000 clk = ~clk;
  initial begin #(400000 * 2000); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  function automatic bit win(input logic [IDXW-1:0] i, input int lo, input int hi);
    return (int'(i) >= lo && int'(i) <= hi) ? 1'b1 : (($urandom % 10) < 3);
  endfunction
  always @(posedge clk) begin
    ed_ca <= win(ck_idx, 12, 40);
    for (int m = 0; m < NM; m++) begin
      ed_m[m] <= (step == TS_DQ_WDQS) ? win(dq_idx[m], 15 + 3 * m, 45 + 3 * m)
                                      : win(wdqs_idx[m], 8 + m, 30 + m);
      ed_c[m] <= win(rdqs_idx[m], 5 + m, 25 + m);
    end
  end
  task automatic chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  // per-step output checks, and the order of steps
  train_step_e last = TS_IDLE;
  always @(negedge clk) if (rst_n) begin
    unique case (step)
      TS_IDLE:    chk(!ck_sel && !wdqs_sel && !rdqs_sel && !dq_sel && !pat_ca && !pat_wr && !pat_rd, "idle outputs");
      TS_CK_CA:   chk(ck_sel && !wdqs_sel && pat_ca && !pat_wr && !pat_rd, "step 1 outputs");
      TS_WDQS_CK: chk(ck_sel && wdqs_sel && !rdqs_sel && pat_wr && !pat_ca, "step 2 outputs");
      TS_RDQS_DQ: chk(rdqs_sel && !dq_sel && pat_rd && !pat_wr, "step 3 outputs");
      TS_DQ_WDQS: chk(dq_sel && pat_wr && !pat_rd, "step 4 outputs");
      TS_DONE:    chk(ck_sel && wdqs_sel && rdqs_sel && dq_sel && !pat_ca && !pat_wr && !pat_rd && done, "done outputs");
      default:    chk(0, "bad step");
    endcase
    if (step != last) begin
      chk(int'(step) == int'(last) + 1, $sformatf("step %0d after %0d", step, last));
      last = step;
    end
  end
  initial begin
    #5000; rst_n = 1'b1;
    repeat (3) @(negedge clk);
    start = 1'b1; @(negedge clk); start = 1'b0;
    wait (done); repeat (3) @(negedge clk);
    chk(step_ok == 4'hf, $sformatf("step_ok %b", step_ok));
    chk(int'(ck_idx) == 26, $sformatf("CK %0d", ck_idx));
    for (int m = 0; m < NM; m++) begin
      chk(int'(wdqs_idx[m]) == 8 + m, $sformatf("WDQS[%0d] %0d", m, wdqs_idx[m]));
      chk(int'(rdqs_idx[m]) == 15 + m, $sformatf("RDQS[%0d] %0d", m, rdqs_idx[m]));
      chk(int'(dq_idx[m]) == 30 + 3 * m, $sformatf("DQ[%0d] %0d", m, dq_idx[m]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
