`timescale 1ps/1ps
// train_seq: sequencer of the data sampling alignment training of one slice. After
// start it runs four sweeps in the published order and then reports done:
//   1. CK vs CMD/ADR   centre  - sweeps the CK delay line, ED of the CA mini-slice
//   2. WDQS vs CK      edge    - sweeps each WDQS delay line, write-path ED (memory side)
//   3. RDQS vs DQ      centre  - sweeps each RDQS delay line, read-path ED (SOC side)
//   4. DQ vs WDQS      centre  - sweeps each write-DQ delay line, write-path ED
// The CMD/ADR delay is never swept (it is the fixed "golden" reference). While a step
// runs, the swept delay lines take the sweep index; once it ends they keep its result.
// Each *_sel output switches the corresponding delay lines from the DLL code (0) to
// the training code (1), the mode switch of the mini-slice. pat_* tell the
// transmitters to send the 1-0 clock pattern. In step 2 the memory side has no CK
// sampler, so this design measures WDQS against the write DQ pattern launched on the
// CK phase; see the README.
module train_seq import ehp_pkg::*; #(
  int unsigned NM     = 8,
  int unsigned SETTLE = 8,
  int unsigned DWELL  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              ed_ca,
  input  logic [NM-1:0]     ed_m,      // write path, per mini-slice
  input  logic [NM-1:0]     ed_c,      // read path, per mini-slice
  output train_step_e       step,
  output logic              done,
  output logic              pat_ca,
  output logic              pat_wr,
  output logic              pat_rd,
  output logic              ck_sel,
  output logic [IDXW-1:0]   ck_idx,
  output logic              wdqs_sel,
  output logic [IDXW-1:0]   wdqs_idx [NM],
  output logic              rdqs_sel,
  output logic [IDXW-1:0]   rdqs_idx [NM],
  output logic              dq_sel,
  output logic [IDXW-1:0]   dq_idx [NM],
  output logic [3:0]        step_ok     // step n found every boundary (bit n-1)
);
  logic sw_start, sw_busy, sw_done;
  logic [NM-1:0] sw_ed, sw_ok;
  logic [IDXW-1:0] sw_idx;
  logic [IDXW-1:0] sw_res [NM];
  logic [IDXW-1:0] ck_res;
  logic [IDXW-1:0] wdqs_res [NM], rdqs_res [NM], dq_res [NM];
  logic launched;

  always_comb begin
    unique case (step)
      TS_CK_CA:   sw_ed = {NM{ed_ca}};
      TS_RDQS_DQ: sw_ed = ed_c;
      default:    sw_ed = ed_m;
    endcase
  end

  train_sweep #(.LANES(NM), .SETTLE(SETTLE), .DWELL(DWELL)) u_sweep (
    .clk(clk), .rst_n(rst_n), .start(sw_start), .mode_edge(step == TS_WDQS_CK),
    .ed(sw_ed), .busy(sw_busy), .done(sw_done), .idx(sw_idx), .result(sw_res), .ok(sw_ok));

  assign sw_start = !launched && (step inside {TS_CK_CA, TS_WDQS_CK, TS_RDQS_DQ, TS_DQ_WDQS});
  assign done     = (step == TS_DONE);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      step <= TS_IDLE; launched <= 1'b0; step_ok <= '0; ck_res <= '0;
      for (int m = 0; m < int'(NM); m++) begin
        wdqs_res[m] <= '0; rdqs_res[m] <= '0; dq_res[m] <= '0;
      end
    end else begin
      if (sw_start) launched <= 1'b1;
      if (step == TS_IDLE || step == TS_DONE) begin
        if (start) begin step <= TS_CK_CA; launched <= 1'b0; step_ok <= '0; end
      end else if (sw_done) begin
        launched <= 1'b0;
        unique case (step)
          TS_CK_CA:   begin ck_res <= sw_res[0]; step_ok[0] <= sw_ok[0]; step <= TS_WDQS_CK; end
          TS_WDQS_CK: begin wdqs_res <= sw_res; step_ok[1] <= &sw_ok; step <= TS_RDQS_DQ; end
          TS_RDQS_DQ: begin rdqs_res <= sw_res; step_ok[2] <= &sw_ok; step <= TS_DQ_WDQS; end
          TS_DQ_WDQS: begin dq_res   <= sw_res; step_ok[3] <= &sw_ok; step <= TS_DONE;    end
          default: ;
        endcase
      end
    end

  // Delay-line codes: swept value during its step, result afterwards.
  logic [2:0] sn;
  assign sn = step;
  assign ck_sel   = (sn >= 3'(TS_CK_CA))   && (sn != 3'(TS_IDLE));
  assign wdqs_sel = (sn >= 3'(TS_WDQS_CK));
  assign rdqs_sel = (sn >= 3'(TS_RDQS_DQ));
  assign dq_sel   = (sn >= 3'(TS_DQ_WDQS));
  assign ck_idx   = (step == TS_CK_CA) ? sw_idx : ck_res;
  always_comb
    for (int m = 0; m < int'(NM); m++) begin
      wdqs_idx[m] = (step == TS_WDQS_CK) ? sw_idx : wdqs_res[m];
      rdqs_idx[m] = (step == TS_RDQS_DQ) ? sw_idx : rdqs_res[m];
      dq_idx[m]   = (step == TS_DQ_WDQS) ? sw_idx : dq_res[m];
    end
  assign pat_ca = (step == TS_CK_CA);
  assign pat_wr = (step == TS_WDQS_CK) || (step == TS_DQ_WDQS);
  assign pat_rd = (step == TS_RDQS_DQ);
endmodule
