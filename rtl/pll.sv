`timescale 1ps/1ps
// pll: behavioural model of the PHYC PLL. It produces four quadrature clock phases
// (0, 90, 180, 270 degrees) of period PERIOD_PS and a lock flag after LOCK_CYCLES
// output cycles. The default period of 2000 ps gives the 500 MHz clock whose two edges
// carry 1 Gbit/s per DQ. Reference input, loop filter and jitter are not modelled.
// The oscillator is a delay loop around the 2-bit phase counter; it starts on a change
// of the enable, so the enable must rise after time 0.
// Tool notes: synthesis front ends warn that the event control is read as @* and then
// report a logic loop through the phase counter: with delays dropped the oscillator is
// a loop by nature. The model is for simulation; a real PLL is an analog macro.
module pll #(
  int unsigned PERIOD_PS   = 2000,
  int unsigned LOCK_CYCLES = 16
) (
  input  logic en,
  output logic ck0,
  output logic ck90,
  output logic ck180,
  output logic ck270,
  output logic lock
);
  logic [1:0] ph = 2'd0;
  int unsigned ncyc = 0;
  int unsigned q_ps = PERIOD_PS / 4;
  // Ring oscillator: a quarter period after every change of the phase counter (or of
  // the enable) the counter advances; a non-blocking update re-triggers the block.
  // A synthesis tool that drops delays sees a combinational loop, which is what an
  // oscillator is.
  always @(ph or en) begin
    #(q_ps);
    ph <= en ? ph + 2'd1 : 2'd0;
  end
  assign ck0   = ~ph[1];
  assign ck90  = ph[1] ^ ph[0];
  assign ck180 = ph[1];
  assign ck270 = ~(ph[1] ^ ph[0]);
  always @(posedge ck0 or negedge en)
    if (!en) ncyc <= 0;
    else if (ncyc < LOCK_CYCLES) ncyc <= ncyc + 1;
  assign lock = en && (ncyc >= LOCK_CYCLES);
endmodule
