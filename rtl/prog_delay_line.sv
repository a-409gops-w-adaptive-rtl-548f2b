`timescale 1ps/1ps
// prog_delay_line -- behavioural model (not synthesizable as a delay).
//
// A buffer chain with a tap multiplexer, as used for the programmable bitline
// precharge delay, the margin-detection-window (MDW) delay and the delayed
// clock that resets the set-dominant latch. The real part is a string of
// inverters whose delay depends on supply and temperature; here every edge of
// `din` reappears on `dout` after BASE_PS + sel*STEP_PS picoseconds. Pulses
// much shorter than the delay may be swallowed, as in a real buffer chain; the
// register file only sends clock-phase-long levels through it.
//
// The 2-bit setting follows the published circuit; the picosecond values are
// this model's own and are meant for simulation with a 1 ps time precision.
module prog_delay_line #(
  parameter int unsigned SEL_W   = 2,
  parameter int unsigned BASE_PS = 50,
  parameter int unsigned STEP_PS = 50
) (
  input  logic             din,
  input  logic [SEL_W-1:0] sel,
  output logic             dout
);

  int unsigned delay_ps;
  assign delay_ps = BASE_PS + STEP_PS * int'(sel);

  initial dout = 1'b0;

  always @(din) dout <= #(delay_ps) din;

endmodule
