`timescale 1ps/1ps
// dll_ctrl: DLL controller. Calibration runs the coarse loop first and the fine loop
// once the coarse loop has locked, as published; the fine loop starts from the middle
// of its range, code 4'b1000.
// Coarse loop: with fine = 0 the coarse code is raised one step per decision. It first
// waits for the phase detector to ask for more delay (up = 1) and then for the request
// to flip (up = 0): the 40 ps step just crossed the reference edge. The coarse code is
// then stepped back by one and the fine code set to 8, i.e. the same delay again, from
// which the fine loop can move by -40/+35 ps (the fine range is twice a coarse step).
// Fine loop: one 5 ps step up or down per decision; lock is declared after
// LOCK_TOGGLES direction changes, and the loop keeps tracking afterwards. Should the
// fine code run out of range (drift), it moves one coarse step and re-centres.
// A decision is taken every SETTLE+1 clocks so the delay line, feedback path and the
// phase detector's two flops have settled. These counts are this design's choice.
module dll_ctrl import ehp_pkg::*; #(
  int unsigned SETTLE       = 7,
  int unsigned LOCK_TOGGLES = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       up,
  output dcdl_code_t code,
  output logic       coarse_lock,
  output logic       lock
);
  typedef enum logic [1:0] {S_SEEK_HI, S_SEEK_LO, S_FINE} st_e;
  st_e st;
  logic [$clog2(SETTLE+1):0] wait_cnt;
  logic [3:0] toggles;
  logic       last_up;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= S_SEEK_HI;
      code <= '0;
      wait_cnt <= ($clog2(SETTLE+1)+1)'(SETTLE);
      toggles <= '0;
      last_up <= 1'b0;
      coarse_lock <= 1'b0;
      lock <= 1'b0;
    end else if (!en) begin
      st <= S_SEEK_HI;
      code <= '0;
      wait_cnt <= ($clog2(SETTLE+1)+1)'(SETTLE);
      toggles <= '0;
      coarse_lock <= 1'b0;
      lock <= 1'b0;
    end else if (wait_cnt != '0) begin
      wait_cnt <= wait_cnt - 1'b1;
    end else begin
      wait_cnt <= ($clog2(SETTLE+1)+1)'(SETTLE);
      unique case (st)
        S_SEEK_HI:
          if (up) st <= S_SEEK_LO;
          else if (code.coarse != '1) code.coarse <= code.coarse + 1'b1;
        S_SEEK_LO:
          if (!up || code.coarse == '1) begin
            if (code.coarse != '0) code.coarse <= code.coarse - 1'b1;
            code.fine   <= 4'b1000;
            coarse_lock <= 1'b1;
            st          <= S_FINE;
            last_up     <= 1'b0;
            toggles     <= '0;
          end else code.coarse <= code.coarse + 1'b1;
        S_FINE: begin
          if (up && code.fine != '1)       code.fine <= code.fine + 1'b1;
          else if (!up && code.fine != '0) code.fine <= code.fine - 1'b1;
          // fine range exhausted: move one coarse step, same total delay
          else if (up && code.coarse != '1) begin
            code.coarse <= code.coarse + 1'b1; code.fine <= 4'd8;
          end else if (!up && code.coarse != '0) begin
            code.coarse <= code.coarse - 1'b1; code.fine <= 4'd8;
          end
          last_up <= up;
          if (up != last_up && toggles != 4'hf) toggles <= toggles + 1'b1;
          if (toggles >= 4'(LOCK_TOGGLES)) lock <= 1'b1;
        end
        default: st <= S_SEEK_HI;
      endcase
    end
endmodule
