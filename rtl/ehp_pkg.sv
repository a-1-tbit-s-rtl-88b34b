`timescale 1ps/1ps
// ehp_pkg: types and constants shared by the eDRAM PHY.
// The bus geometry (4 slices x 8 mini-slices x 32 DQ, 7-bit CMD, 15-bit ADR) and the
// delay-line format (6-bit coarse, 4-bit fine) follow the published architecture. The
// training sweep index and its mapping onto a delay-line code are this design's choice:
// the index counts 5 ps fine steps, so coarse = index/8 and fine = index%8, which keeps
// the delay a monotonic function of the index over the whole coarse range.
package ehp_pkg;
  localparam int unsigned NSLICE  = 4;    // slices (one per eDRAM channel)
  localparam int unsigned NMINI   = 8;    // DQ mini-slices per slice
  localparam int unsigned MINI_DQ     = 32;   // DQ per mini-slice
  localparam int unsigned CMDW    = 7;    // SII_CMD width
  localparam int unsigned ADRW    = 15;   // SII_ADR width
  localparam int unsigned CAW     = CMDW + ADRW; // CMD/ADR[21:0]
  localparam int unsigned CW      = 6;    // coarse code bits (64 stages, 40 ps)
  localparam int unsigned FW      = 4;    // fine code bits (16 stages, 5 ps)
  localparam int unsigned IDXW    = 9;    // training sweep index width (5 ps units)

  typedef struct packed {
    logic [CW-1:0] coarse;
    logic [FW-1:0] fine;
  } dcdl_code_t;

  // Steps of the data sampling alignment training, in the order they run.
  typedef enum logic [2:0] {
    TS_IDLE      = 3'd0,
    TS_CK_CA     = 3'd1,  // CK vs CMD/ADR, centre
    TS_WDQS_CK   = 3'd2,  // WDQS vs CK, edge
    TS_RDQS_DQ   = 3'd3,  // RDQS vs read DQ, centre
    TS_DQ_WDQS   = 3'd4,  // write DQ vs WDQS, centre
    TS_DONE      = 3'd5
  } train_step_e;

  function automatic dcdl_code_t idx2code(input logic [IDXW-1:0] idx);
    dcdl_code_t c;
    c.coarse = idx[IDXW-1:3];
    c.fine   = {1'b0, idx[2:0]};
    return c;
  endfunction
endpackage
