`timescale 1ps/1ps
// tb_phase_detector: a feedback clock offset from the reference by -900..+900 ps.
// When the feedback edge leads the reference (offset < 0) the output must ask for more
// delay (up = 1) two reference edges later; when it lags, up = 0.
module tb_phase_detector;
  localparam int TCK = 2000;
  logic fref = 1'b0, fbk = 1'b0, rst_n = 1'b1, up;
  initial #1 rst_n = 1'b0;  // a falling edge puts every asynchronous-reset flop in reset
  int off = 0;
  int checks = 0, failures = 0;
  phase_detector dut (.fref(fref), .fbkin(fbk), .rst_n(rst_n), .up(up));
  always #(TCK / 2) fref = ~fref;
  always @(fref) begin
    automatic logic v = fref;
    automatic int t = off + TCK;
    fork begin #(t); fbk = v; end join_none
  end
  initial begin #(1000 * TCK); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  int offs [8] = '{-900, -500, -100, -20, 20, 100, 500, 900};
  initial begin
    #(3 * TCK); rst_n = 1'b1;
    foreach (offs[i]) begin
      off = offs[i];
      repeat (4) @(posedge fref);
      #1;
      checks++;
      if (up !== (off < 0)) begin failures++; $display("FAIL: offset %0d up=%b", off, up); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
