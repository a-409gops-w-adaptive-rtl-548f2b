`timescale 1ps/1ps
// error_rate_tracker (ERT): counts detected read timing errors over a fixed
// sampling period and reports an excessive error rate.
//
// Every cycle with `err_event` high adds one to a saturating error counter.
// After SAMPLE_CYCLES cycles the count is compared with `threshold`; if it is
// larger, `erte` is high for one cycle, telling the V/F adaptation controller
// to lower F or raise V. Both counters then restart. `err_count` shows the
// running count of the current period.
// The function (error count over a sampling period against a threshold)
// follows the source design; the period length, counter width and the
// one-cycle pulse are this implementation's choices.
module error_rate_tracker #(
  parameter int unsigned SAMPLE_CYCLES = 1024,
  parameter int unsigned CNT_W         = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             err_event,
  input  logic [CNT_W-1:0] threshold,
  output logic [CNT_W-1:0] err_count,
  output logic             erte
);

  localparam int unsigned PW = (SAMPLE_CYCLES > 1) ? $clog2(SAMPLE_CYCLES) : 1;

  logic [PW-1:0] period_cnt;
  logic          period_end;
  logic [CNT_W-1:0] count_now;

  assign period_end = (32'(period_cnt) == SAMPLE_CYCLES - 1);
  // include an error seen in the last cycle of the period
  assign count_now  = (err_event && !(&err_count)) ? err_count + 1'b1 : err_count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      period_cnt <= '0;
      err_count  <= '0;
      erte       <= 1'b0;
    end else begin
      erte <= 1'b0;
      if (period_end) begin
        period_cnt <= '0;
        err_count  <= '0;
        erte       <= (count_now > threshold);
      end else begin
        period_cnt <= period_cnt + 1'b1;
        err_count  <= count_now;
      end
    end
  end

endmodule
