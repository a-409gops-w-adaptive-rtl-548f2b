`timescale 1ps/1ps
// bl_precharge_sel: conditional delayed bitline precharge select.
//
// Drives the equalizer (EQ1 for a local bitline pair, EQ2 for the global
// bitline pair) that ends a read evaluation and starts restoring the bitlines.
// If the bitline's output has already evaluated to 1 (`bl_out`: NAOUT for the
// LBLs, SDLOUT for the GBLs), or conventional mode is forced (`mode`), the
// on-time precharge clock is used: charge sharing starts early and speeds up
// the precharge. Otherwise a possibly slow evaluation is still under way, and
// the programmably delayed precharge clock is used, which gives the read more
// time to reach the set-dominant latch.
// All signals are active high (1 = precharge/equalize on); the transistor
// gates are the complements. Combinational.
// The OR-controlled 2:1 selection follows the source design's conditional
// precharge circuit; the active-high naming is this implementation's.
module bl_precharge_sel (
  input  logic pch_on,   // on-time precharge clock (high phase of the clock)
  input  logic pch_del,  // delayed precharge clock (late rise, on-time fall)
  input  logic mode,     // 1: always precharge on time (conventional)
  input  logic bl_out,   // NAOUT or SDLOUT
  output logic eq_en
);

  assign eq_en = (mode | bl_out) ? pch_on : pch_del;

endmodule
