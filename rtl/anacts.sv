`timescale 1ps/1ps
// anacts: behavioural model of the analog clock tree (AnaCTS) of a mini-slice.
// It fans one clock out to FANOUT leaves (32 DQ + 2 valid IOs) with a fixed, matched
// insertion latency. The latency value is this design's assumption; it is chosen
// longer than one unit interval, the case the DLL range is sized for. The delay is
// built from two blocking-delay stages; a synthesis tool that drops delays sees wires.
// Tool notes: synthesis front ends warn that the level-sensitive event controls are
// read as @*; with delays dropped that is the intended wire.
module anacts #(
  int unsigned FANOUT     = 34,
  int unsigned LATENCY_PS = 1300
) (
  input  logic              ck_in,
  output logic [FANOUT-1:0] ck_out
);
  // Two equal stages, each copying its input half the latency after it changes: two
  // edges can be in flight and each stage (650 ps) is shorter than a half period.
  int unsigned t0 = LATENCY_PS - LATENCY_PS / 2, t1 = LATENCY_PS / 2;
  logic ck_m = 1'b0, ck_d = 1'b0;
  always @(ck_in) begin
    #(t0);
    ck_m = ck_in;
  end
  always @(ck_m) begin
    #(t1);
    ck_d = ck_m;
  end
  assign ck_out = {FANOUT{ck_d}};
endmodule
