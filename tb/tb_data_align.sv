`timescale 1ps/1ps
// tb_data_align: three mini-slice FIFOs are modelled as queues whose words arrive with
// different, random latencies. Word k of every queue carries the tag k. The aligned
// output must hold word k of every mini-slice side by side, every transfer must come
// out once, and no pop may happen while a queue is empty.
module tb_data_align;
  localparam int NM = 3, DW = 8, NWORD = 60;
  logic clk = 1'b0, rst_n = 1'b1, pop, out_vld;
  initial #1 rst_n = 1'b0;  // a falling edge puts every asynchronous-reset flop in reset
  logic [NM-1:0] empty;
  logic [DW-1:0] in_data [NM];
  logic [NM*DW-1:0] out_data;
  logic [DW-1:0] q [NM][$];
  int sent [NM] = '{0, 0, 0};
  int checks = 0, failures = 0, nout = 0;
  data_align #(.NMINI(NM), .DW(DW)) dut (.*);
  always #1000 clk = ~clk;
  initial begin #(2000 * 2000); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always_comb for (int m = 0; m < NM; m++) begin
    empty[m]   = (q[m].size() == 0);
    in_data[m] = empty[m] ? '0 : q[m][0];
  end
  always @(posedge clk) if (rst_n) begin
    if (pop) begin
      checks++;
      if (|empty) begin failures++; $display("FAIL: pop with an empty FIFO"); end
      for (int m = 0; m < NM; m++) if (q[m].size() != 0) void'(q[m].pop_front());
    end
    // arrivals: mini-slice m lags by m cycles plus random gaps
    for (int m = 0; m < NM; m++)
      if (sent[m] < NWORD && ($urandom % (m + 2)) == 0) begin q[m].push_back(DW'(sent[m])); sent[m]++; end
    if (out_vld) begin
      checks++;
      for (int m = 0; m < NM; m++)
        if (out_data[m*DW +: DW] !== DW'(nout)) begin
          failures++; $display("FAIL: transfer %0d lane %0d has %0d", nout, m, out_data[m*DW +: DW]);
        end
      nout++;
    end
  end
  initial begin
    #5000; rst_n = 1'b1;
    wait (nout == NWORD);
    repeat (10) @(posedge clk);
    checks++; if (nout != NWORD) begin failures++; $display("FAIL: %0d transfers", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
