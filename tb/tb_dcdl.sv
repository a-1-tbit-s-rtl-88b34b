`timescale 1ps/1ps
// tb_dcdl: for random codes, measures the time from each input edge to the matching
// output edge; it must be 100 + 40*coarse + 5*fine ps, also when the delay exceeds the
// spacing of input edges (several edges in flight).
module tb_dcdl;
  import ehp_pkg::*;
  logic fin = 1'b0, fout;
  dcdl_code_t code = '0;
  int checks = 0, failures = 0, exp_d = 100;
  longint t_in [$];
  dcdl dut (.*);
  initial begin #100000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(fin) if ($time > 0) t_in.push_back(longint'($time));
  always @(fout) if ($time > 0 && t_in.size() != 0) begin
    longint d;
    d = longint'($time) - t_in.pop_front();
    checks++;
    if (d != longint'(exp_d)) begin failures++; $display("FAIL: code %0d/%0d delay %0d != %0d", code.coarse, code.fine, d, exp_d); end
  end
  initial begin
    #5000;
    repeat (100) begin
      code = dcdl_code_t'($urandom);
      exp_d = 100 + 40 * int'(code.coarse) + 5 * int'(code.fine);
      #3000;
      repeat (6) begin fin = ~fin; #700; end
      #(exp_d + 1000);
    end
    checks++; if (t_in.size() != 0) begin failures++; $display("FAIL: edges lost"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
