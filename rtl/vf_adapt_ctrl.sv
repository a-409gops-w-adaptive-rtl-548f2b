`timescale 1ps/1ps
// vf_adapt_ctrl: V/F adaptation controller driven by the timing margin
// detectors (TMD) and the error rate tracker.
//
// Two margin windows are probed: TMDa uses the MDW2 delay setting (the largest
// read-delay change expected while the loop responds, e.g. with temperature)
// and TMDb uses the MDW1+MDW2 setting (MDW1 being the largest change within
// one cycle). Decision table:
//   TMDa TMDb ERTe | action
//    0    0    0   | increase F or lower V  (more margin than MDW1+MDW2)
//    0    1    0   | maintain V/F           (data arrives inside MDW1)
//    1    1    0   | lower F or increase V  (data arrives inside MDW2)
//    -    -    1   | lower F or increase V  (too many timing errors)
// TMDa=1 with TMDb=0 cannot happen with nested windows; it is treated as the
// unsafe case (lower F / increase V).
//
// Sequencing: the sub-arrays share one error compaction output, which reports
// either the TED or the TMD outputs. While `en` is high the controller runs
// RUN_CYCLES cycles in TED mode, then WIN_CYCLES with TMD and setting
// `mdw_a_sel` (TMDa), then WIN_CYCLES with `mdw_b_sel` (TMDb), then decides.
// The compaction flag of a read lags the MDW setting by two cycles, so the
// first two cycles of each window are ignored. `adjust_v` chooses the knob:
// 0 = frequency (f_up/f_down), 1 = voltage (v_down/v_up). Command outputs are
// one-cycle pulses; `vf_cmd` shows the decision.
// The table follows the source design; the time-multiplexed probing, window
// lengths and pulse outputs are this implementation's choices.
module vf_adapt_ctrl
  import rf_pkg::*;
#(
  parameter int unsigned RUN_CYCLES = 256,
  parameter int unsigned WIN_CYCLES = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       adjust_v,
  input  logic [1:0] mdw_a_sel,
  input  logic [1:0] mdw_b_sel,
  input  logic       ec_flag,     // error compaction flop output
  input  logic       erte,
  output ec_mode_e   ec_mode,
  output logic [1:0] mdw_sel,
  output logic       tmda,
  output logic       tmdb,
  output vf_cmd_e    vf_cmd,
  output logic       f_up,
  output logic       f_down,
  output logic       v_up,
  output logic       v_down
);

  typedef enum logic [1:0] {S_RUN, S_WIN_A, S_WIN_B, S_DECIDE} state_e;

  localparam int unsigned CW = $clog2((RUN_CYCLES > WIN_CYCLES ? RUN_CYCLES : WIN_CYCLES) + 1);

  state_e        state;
  logic [CW-1:0] cnt;
  logic          acc_a, acc_b;
  logic          counting;

  assign counting = (32'(cnt) >= 2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_RUN;
      cnt   <= '0;
      acc_a <= 1'b0;
      acc_b <= 1'b0;
      tmda  <= 1'b0;
      tmdb  <= 1'b0;
    end else begin
      unique case (state)
        S_RUN: begin
          if (!en) begin
            cnt <= '0;
          end else if (32'(cnt) == RUN_CYCLES - 1) begin
            cnt   <= '0;
            acc_a <= 1'b0;
            state <= S_WIN_A;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_WIN_A: begin
          if (counting && ec_flag) acc_a <= 1'b1;
          if (32'(cnt) == WIN_CYCLES - 1) begin
            cnt   <= '0;
            acc_b <= 1'b0;
            state <= S_WIN_B;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_WIN_B: begin
          if (counting && ec_flag) acc_b <= 1'b1;
          if (32'(cnt) == WIN_CYCLES - 1) begin
            cnt   <= '0;
            state <= S_DECIDE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_DECIDE: begin
          tmda  <= acc_a;
          tmdb  <= acc_b;
          state <= S_RUN;
        end
        default: state <= S_RUN;
      endcase
    end
  end

  assign ec_mode = (state == S_WIN_A || state == S_WIN_B) ? EC_TMD : EC_TED;
  assign mdw_sel = (state == S_WIN_B) ? mdw_b_sel : mdw_a_sel;

  always_comb begin
    vf_cmd = VF_HOLD;
    if (state == S_DECIDE) begin
      unique case ({acc_a, acc_b})
        2'b00:   vf_cmd = VF_SPEED_UP;
        2'b01:   vf_cmd = VF_HOLD;
        default: vf_cmd = VF_SLOW_DOWN;
      endcase
    end
    if (erte) vf_cmd = VF_SLOW_DOWN;
  end

  assign f_up   = (vf_cmd == VF_SPEED_UP)  && !adjust_v;
  assign v_down = (vf_cmd == VF_SPEED_UP)  &&  adjust_v;
  assign f_down = (vf_cmd == VF_SLOW_DOWN) && !adjust_v;
  assign v_up   = (vf_cmd == VF_SLOW_DOWN) &&  adjust_v;

endmodule
