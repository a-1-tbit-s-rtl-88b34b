`timescale 1ps/1ps
// phase_detector: bang-bang phase detector of the DLL. On each rising edge of the
// reference clock FREF it samples the feedback clock FBKIN. A 1 means the feedback
// rising edge came before the reference edge (within half a period), so the delay line
// must grow; a 0 means it must shrink. A second flop resolves metastability. The
// sampling-flop structure is this design's choice; the block is only named.
module phase_detector (
  input  logic fref,
  input  logic fbkin,
  input  logic rst_n,
  output logic up
);
  logic s1;
  always_ff @(posedge fref or negedge rst_n)
    if (!rst_n) begin
      s1 <= 1'b0;
      up <= 1'b0;
    end else begin
      s1 <= fbkin;
      up <= s1;
    end
endmodule
