`timescale 1ps/1ps
// train_sweep: search engine of the data sampling alignment training, run for LANES
// mini-slices at once. After start it steps a common delay index idx from 0 upward.
// At each index it waits SETTLE clocks, then watches each lane's ED (edge detector)
// bit for DWELL clocks: the index is "stable" for a lane if ED was 1 throughout.
// Per lane it looks for a transition region, then a stable region (first stable index
// a), then the next transition region (last stable index b). The result is the middle
// (a+b)/2 in centre mode and the boundary a in edge mode. The sweep ends when every lane
// has its result or idx reaches MAXIDX; ok[l] tells whether lane l found both
// boundaries (otherwise its result is the last index). ED bits are synchronised here.
// The index-to-code mapping is ehp_pkg::idx2code. SETTLE, DWELL and the edge-mode rule
// are this design's choices.
module train_sweep import ehp_pkg::*; #(
  int unsigned LANES  = 8,
  int unsigned SETTLE = 8,
  int unsigned DWELL  = 16,
  int unsigned MAXIDX = (1 << IDXW) - 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                mode_edge,
  input  logic [LANES-1:0]    ed,
  output logic                busy,
  output logic                done,      // one-clock pulse
  output logic [IDXW-1:0]     idx,
  output logic [IDXW-1:0]     result [LANES],
  output logic [LANES-1:0]    ok
);
  typedef enum logic [1:0] {L_FIND_T1, L_FIND_ST, L_IN_ST, L_FOUND} lane_e;
  lane_e lst [LANES];
  logic [IDXW-1:0] a [LANES];
  logic [LANES-1:0] ed_s1, ed_s2, all_ok;
  logic [7:0] cnt;
  logic dwell;
  logic medge;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin ed_s1 <= '0; ed_s2 <= '0; end
    else begin ed_s1 <= ed; ed_s2 <= ed_s1; end

  logic all_found;
  always_comb begin
    all_found = 1'b1;
    for (int l = 0; l < int'(LANES); l++) if (lst[l] != L_FOUND) all_found = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; idx <= '0; cnt <= '0; dwell <= 1'b0;
      all_ok <= '0; ok <= '0; medge <= 1'b0;
      for (int l = 0; l < int'(LANES); l++) begin
        lst[l] <= L_FIND_T1; a[l] <= '0; result[l] <= '0;
      end
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1; idx <= '0; cnt <= 8'(SETTLE); dwell <= 1'b0;
        all_ok <= '1; ok <= '0; medge <= mode_edge;
        for (int l = 0; l < int'(LANES); l++) lst[l] <= L_FIND_T1;
      end else if (busy) begin
        if (dwell) all_ok <= all_ok & ed_s2;
        if (cnt != '0) cnt <= cnt - 1'b1;
        else if (!dwell) begin
          dwell <= 1'b1; cnt <= 8'(DWELL - 1); all_ok <= '1;
        end else begin
          // end of dwell: judge this index for every lane (include this clock's ED)
          for (int l = 0; l < int'(LANES); l++) begin
            unique case (lst[l])
              L_FIND_T1: if (!(all_ok[l] & ed_s2[l])) lst[l] <= L_FIND_ST;
              L_FIND_ST: if (all_ok[l] & ed_s2[l]) begin lst[l] <= L_IN_ST; a[l] <= idx; end
              L_IN_ST:   if (!(all_ok[l] & ed_s2[l])) begin
                           lst[l] <= L_FOUND; ok[l] <= 1'b1;
                           result[l] <= medge ? a[l]
                                      : IDXW'(({1'b0, a[l]} + {1'b0, idx - 1'b1}) >> 1);
                         end
              default: ;
            endcase
          end
          dwell <= 1'b0; cnt <= 8'(SETTLE);
          if (all_found || idx == IDXW'(MAXIDX)) begin
            busy <= 1'b0; done <= 1'b1;
            for (int l = 0; l < int'(LANES); l++) if (lst[l] != L_FOUND) result[l] <= idx;
          end else idx <= idx + 1'b1;
        end
      end
    end
endmodule
