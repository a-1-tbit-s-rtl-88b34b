`timescale 1ps/1ps
// lsio_rx: behavioural model of the low-swing IO receivers of W pads.
// Each pad has two clocked sense amplifiers with S-R latches working as a 1:2
// de-multiplexer: one resolves on the rising edge of the sampling clock (CK) and one
// on its falling edge (CKB). Between evaluations the latch holds the last decision.
// The comparison against VREF is abstracted to the pad's logic value.
module lsio_rx #(
  int unsigned W = 33
) (
  input  logic         ck,
  input  logic [W-1:0] pad,
  output logic [W-1:0] q_rise,
  output logic [W-1:0] q_fall
);
  always @(posedge ck) q_rise <= pad;
  always @(negedge ck) q_fall <= pad;
endmodule
