`timescale 1ps/1ps
// tb_lsio_rx: DDR data on 8 pads, each bit centred on the clock edge that samples it.
// The rising-edge sense amplifiers must capture the even bits and hold them for a whole
// clock; the falling-edge ones the odd bits. Rising edges are at 1000 + 2000k ps and
// falling edges at 2000k ps; the stimulus is timed by delays from time 0.
module tb_lsio_rx;
  localparam int W = 8;
  logic ck = 1'b0;
  logic [W-1:0] pad = '0, qr, qf;
  int checks = 0, failures = 0;
  lsio_rx #(.W(W)) dut (.ck(ck), .pad(pad), .q_rise(qr), .q_fall(qf));
  always #1000 ck = ~ck;
  initial begin #10000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic [W-1:0] e, o;
    #500;
    repeat (300) begin
      e = W'($urandom); o = W'($urandom);
      pad = e;                      // even bit, 500 ps before the rising edge
      #600;
      checks++; if (qr !== e) begin failures++; $display("FAIL: rise %h != %h at %0t", qr, e, $time); end
      #400 pad = o;                 // odd bit, 500 ps before the falling edge
      #600;
      checks++; if (qf !== o) begin failures++; $display("FAIL: fall %h != %h", qf, o); end
      checks++; if (qr !== e) begin failures++; $display("FAIL: rise value not held"); end
      #400;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
