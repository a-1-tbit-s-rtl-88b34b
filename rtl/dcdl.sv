`timescale 1ps/1ps
// dcdl: behavioural model of the digitally controlled delay line (analog cell).
// The real cell is a 64-stage buffer chain picked by a 64:1 MUX (coarse, 40 ps per
// step) followed by a 16-step capacitive-load fine stage (5 ps per step). This model
// reproduces the resulting delay: INTRINSIC_PS + 40*coarse + 5*fine, as a chain of four
// short delay stages, so that delays longer than a clock period keep every edge.
// Pulses shorter than one stage (a quarter of the delay) are not carried; no clock
// in this design has one. Synthesis tools that drop delays see a wire. The intrinsic delay of
// the cell at code 0 is this design's assumption.
// Tool notes: synthesis front ends warn that the level-sensitive event control is read
// as @*; with delays dropped that is the intended wire.
module dcdl import ehp_pkg::*; #(
  int unsigned INTRINSIC_PS = 100,
  int unsigned COARSE_PS    = 40,
  int unsigned FINE_PS      = 5
) (
  input  logic       fin,
  input  dcdl_code_t code,
  output logic       fout
);
  localparam int unsigned NSTG = 4;
  int unsigned dly_ps;
  always_comb dly_ps = INTRINSIC_PS + COARSE_PS * int'(code.coarse) + FINE_PS * int'(code.fine);
  // The delay is split over NSTG equal stages (the first takes the remainder). Each
  // stage waits its share after an input change and then copies its input, so up to
  // NSTG edges can be in flight; a stage is shorter than any pulse it carries
  // (at most 674 ps against 1000 ps half periods).
  logic [NSTG:0] s;
  assign s[0] = fin;
  for (genvar k = 0; k < NSTG; k++) begin : g_stg
    int unsigned t;
    logic q = 1'b0;
    always_comb t = (k == 0) ? dly_ps - (NSTG - 1) * (dly_ps / NSTG) : dly_ps / NSTG;
    always @(s[k]) begin
      #(t);
      q = s[k];
    end
    assign s[k+1] = q;
  end
  assign fout = s[NSTG];
endmodule
