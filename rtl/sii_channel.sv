`timescale 1ps/1ps
// sii_channel: behavioural model of W silicon-interposer traces between the SOC-side
// PHY (C side) and the memory-side PHY (M side). Each trace is bidirectional: the side
// whose output enable is set drives it (C has priority), and when neither drives it
// it reads 0 (a two-state stand-in for an idle, discharged trace). Both ends see the trace
// value after the trace delay BASE_PS + ((i * 7) % (SKEW_PS + 1)), a fixed per-trace mismatch. The delay and skew
// values are this design's assumption for a 1 mm trace.
// Tool notes: synthesis front ends warn that the level-sensitive event control is read
// as @*; with delays dropped that is the intended wire.
module sii_channel #(
  int unsigned W       = 1,
  int unsigned BASE_PS = 60,
  int unsigned SKEW_PS = 20
) (
  input  logic [W-1:0] c_out,
  input  logic [W-1:0] c_oe,
  input  logic [W-1:0] m_out,
  input  logic [W-1:0] m_oe,
  output logic [W-1:0] c_in,
  output logic [W-1:0] m_in
);
  logic [W-1:0] bus;
  for (genvar i = 0; i < W; i++) begin : g_trace
    localparam int unsigned D = BASE_PS + ((i * 7) % (SKEW_PS + 1));
    logic drv, dly = 1'b0;
    int unsigned d_ps = D;
    always_comb drv = c_oe[i] ? c_out[i] : (m_oe[i] & m_out[i]);
    // the trace delay is far shorter than any pulse, so one blocking-delay stage
    // carries every edge; a synthesis tool that drops delays sees a wire
    always @(drv) begin
      #(d_ps);
      dly = drv;
    end
    assign bus[i] = dly;
  end
  assign c_in = bus;
  assign m_in = bus;
endmodule
