`timescale 1ps/1ps
// rf_bitcell_array: storage of one sub-array, 8T 1R1W cells with domino read.
//
// ENTRIES words of WIDTH bits. Write: the static differential write port stores
// `wdata` into the entry whose write word line (one-hot `wwl`) is high, at the
// rising clock edge. Read: each local bitline (LBL) serves CELLS_PER_LBL
// consecutive entries. An LBL is precharged high and is pulled low through the
// read stack of the one cell whose read word line is high, if that cell holds
// a 1. `lbl_n` gives the resulting (zero-delay) LBL level, one per LBL and bit
// column: 0 = discharged. LBL l holds entries l*CELLS_PER_LBL .. +CELLS_PER_LBL-1.
// The timing of the discharge is added outside, by the bitline timing model.
//
// Cell organisation (8T 1R1W, 16 cells per LBL) follows the source design.
// That a stored 1 discharges the bitline, and that writes happen at the
// rising edge, are this implementation's choices.
module rf_bitcell_array #(
  parameter  int unsigned ENTRIES       = 128,
  parameter  int unsigned WIDTH         = 32,
  parameter  int unsigned CELLS_PER_LBL = 16,
  localparam int unsigned NLBL          = ENTRIES / CELLS_PER_LBL
) (
  input  logic                       clk,
  input  logic [ENTRIES-1:0]         wwl,
  input  logic [WIDTH-1:0]           wdata,
  input  logic [ENTRIES-1:0]         rwl,
  output logic [NLBL-1:0][WIDTH-1:0] lbl_n
);

  logic [WIDTH-1:0] cells [ENTRIES];

  // Static write: every entry with its write word line high takes the data.
  always_ff @(posedge clk) begin
    for (int e = 0; e < int'(ENTRIES); e++) begin
      if (wwl[e]) cells[e] <= wdata;
    end
  end

  // Domino read: wired pull-down of all cells on an LBL.
  logic [NLBL-1:0][WIDTH-1:0] lbl_dis;
  always_comb begin
    lbl_dis = '0;
    for (int e = 0; e < int'(ENTRIES); e++) begin
      if (rwl[e]) lbl_dis[e / int'(CELLS_PER_LBL)] = lbl_dis[e / int'(CELLS_PER_LBL)] | cells[e];
    end
  end
  assign lbl_n = ~lbl_dis;

endmodule
