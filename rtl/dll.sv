`timescale 1ps/1ps
// dll: one WRITE-DLL or READ-DLL of a PHYC slice. FIN passes through the DLL's own
// embedded delay line (identical to every DQ/DQS delay line) to FOUT; FOUT travels an
// external path (for the WRITE-DLL: the interposer and the memory-side replica clock
// tree; for the READ-DLL: the SOC-side replica clock tree) and returns as FBKIN. The
// phase detector compares FBKIN with FREF and the controller moves the code until the
// two are aligned. The code is also sent to the mini-slices' delay lines. The
// controller runs on FREF.
module dll import ehp_pkg::*; #(
  int unsigned SETTLE = 7
) (
  input  logic       rst_n,
  input  logic       en,
  input  logic       fin,
  input  logic       fref,
  input  logic       fbkin,
  output logic       fout,
  output dcdl_code_t code,
  output logic       coarse_lock,
  output logic       lock
);
  logic up;
  phase_detector u_pd (.fref(fref), .fbkin(fbkin), .rst_n(rst_n), .up(up));
  dll_ctrl #(.SETTLE(SETTLE)) u_ctrl (.clk(fref), .rst_n(rst_n), .en(en), .up(up),
    .code(code), .coarse_lock(coarse_lock), .lock(lock));
  dcdl u_dcdl (.fin(fin), .code(code), .fout(fout));
endmodule
