`timescale 1ps/1ps
// set_dominant_latch (SDL): read-data capture of one bit column.
//
// Two global bitlines (GBLs) meet here. When either GBL is pulled low
// (`gbl_dis` bit high) the latch is set and SDLOUT goes to 1; it then holds
// until the reset `rst` (the delayed inverted clock, DEL CLKB) is high while
// neither GBL is discharged. Set dominates reset, so a read that evaluates
// while the reset is still active still wins. A level-sensitive latch.
// The set-dominant structure and two GBL inputs follow the source design.
// In the sub-array SDLOUT feeds back to the GBL precharge select, so lint
// tools may report a loop through this latch; it is the intended keeper
// behaviour of the circuit and is broken by the clock phases.
module set_dominant_latch #(
  parameter int unsigned NGBL = 2
) (
  input  logic [NGBL-1:0] gbl_dis,
  input  logic            rst,
  output logic            sdlout
);

  logic set;
  assign set = |gbl_dis;

  // Transparent while set or reset is active; the set value wins.
  always_latch begin
    if (set || rst) sdlout = set;
  end

endmodule
