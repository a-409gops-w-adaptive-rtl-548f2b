`timescale 1ps/1ps
// error_compaction (EC): folds the 32 per-bit detector outputs of a sub-array
// into one flag.
//
// Per bit a 2:1 mux picks the timing error detector output (mode EC_TED) or
// the timing margin detector output (mode EC_TMD). The picked bits are split
// into groups of BITS_PER_BL; each group drives one wide domino NOR error
// bitline (ERR BL, high = no error in the group). A NAND of the error bitlines
// gives ERROR COMPACT, which is captured by the ERROR COMPACT flip-flop at the
// rising clock edge. The result is 1 if any selected detector fired.
//
// Timing: detector outputs of a read are valid in the cycle before the edge
// that captures them; `error_compact_ff` shows them for the following cycle.
// Structure (mux, 2 x 16-bit domino NOR, NAND, flop) follows the source
// design; the domino precharge of the error bitlines is folded into static
// logic here.
module error_compaction
  import rf_pkg::*;
#(
  parameter  int unsigned WIDTH       = RF_WIDTH,
  parameter  int unsigned BITS_PER_BL = RF_EC_BITS_PER_BL,
  localparam int unsigned NBL         = WIDTH / BITS_PER_BL
) (
  input  logic             clk,
  input  logic             rst_n,
  input  ec_mode_e         mode,
  input  logic [WIDTH-1:0] ted_out,
  input  logic [WIDTH-1:0] tmd_out,
  output logic [NBL-1:0]   err_bl,
  output logic             error_compact,
  output logic             error_compact_ff
);

  logic [WIDTH-1:0] sel_err;
  assign sel_err = (mode == EC_TMD) ? tmd_out : ted_out;

  always_comb begin
    for (int i = 0; i < int'(NBL); i++) begin
      err_bl[i] = ~|sel_err[i*int'(BITS_PER_BL) +: BITS_PER_BL];
    end
  end

  assign error_compact = ~&err_bl;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) error_compact_ff <= 1'b0;
    else        error_compact_ff <= error_compact;
  end

endmodule
