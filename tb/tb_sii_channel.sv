`timescale 1ps/1ps
// tb_sii_channel: four traces. Each must deliver a transition from the driving side to
// both ends after BASE_PS + (i*7 mod (SKEW_PS+1)) ps; the C side wins when both drive;
// an undriven trace reads 0.
module tb_sii_channel;
  localparam int W = 4, BASE = 60, SKEW = 20;
  logic [W-1:0] c_out = '0, c_oe = '0, m_out = '0, m_oe = '0, c_in, m_in;
  int checks = 0, failures = 0;
  sii_channel #(.W(W), .BASE_PS(BASE), .SKEW_PS(SKEW)) dut (.*);
  initial begin #10000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    #1000;
    for (int i = 0; i < W; i++) begin
      automatic int d = BASE + (i * 7) % (SKEW + 1);
      // C drives a 1
      c_oe[i] = 1'b1; c_out[i] = 1'b1;
      #(d - 1); chk(m_in[i] == 1'b0, $sformatf("trace %0d early", i));
      #2;       chk(m_in[i] == 1'b1 && c_in[i] == 1'b1, $sformatf("trace %0d C->M delay", i));
      // M also drives 0: C keeps priority
      m_oe[i] = 1'b1; m_out[i] = 1'b0; #200;
      chk(m_in[i] == 1'b1, $sformatf("trace %0d priority", i));
      // C releases: M's 0 arrives after the delay
      c_oe[i] = 1'b0; #(d + 1);
      chk(c_in[i] == 1'b0, $sformatf("trace %0d M drive", i));
      m_out[i] = 1'b1; #(d - 1);
      chk(c_in[i] == 1'b0, $sformatf("trace %0d M->C early", i));
      #2; chk(c_in[i] == 1'b1, $sformatf("trace %0d M->C delay", i));
      m_oe[i] = 1'b0; #(d + 1);
      chk(c_in[i] == 1'b0, $sformatf("trace %0d undriven", i));
      c_out[i] = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
