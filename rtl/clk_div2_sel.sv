`timescale 1ps/1ps
// clk_div2_sel: clock selection between F and F/2 for replay.
//
// A toggle flop divides the incoming clock `clk_f` by two. `slow` asks for the
// divided clock (used to repeat a failed read at half frequency). The select
// flop changes only on a falling edge of `clk_f` while the divided clock is
// low, so both candidate clocks are low at the switch and both rise together
// at the next rising edge: the output never glitches. A change of `slow` is
// applied within two `clk_f` cycles. `slow_active` shows the select.
// The F/2 divider and 2:1 clock multiplexer follow the source design's
// adaptation diagram; the glitch-free switching rule is this implementation's.
module clk_div2_sel (
  input  logic clk_f,
  input  logic rst_n,
  input  logic slow,
  output logic clk_out,
  output logic slow_active
);

  logic div2;

  always_ff @(posedge clk_f or negedge rst_n) begin
    if (!rst_n) div2 <= 1'b0;
    else        div2 <= ~div2;
  end

  always_ff @(negedge clk_f or negedge rst_n) begin
    if (!rst_n)     slow_active <= 1'b0;
    else if (!div2) slow_active <= slow;
  end

  assign clk_out = slow_active ? div2 : clk_f;

endmodule
