`timescale 1ps/1ps
// rf_pkg: sizes and shared types of the resilient domino register file.
//
// The organisation numbers (28 sub-arrays of 128 entries x 32 bits, 16 cells
// per local bitline, 2 local bitlines per NAND merge, 2 global bitlines per
// set-dominant latch, 16 detector outputs per error bitline, 2-bit delay
// settings) follow the published design. The command and mode encodings are
// this implementation's own.
package rf_pkg;

  localparam int unsigned RF_NUM_SUBARRAYS   = 28;
  localparam int unsigned RF_ENTRIES         = 128;
  localparam int unsigned RF_WIDTH           = 32;
  localparam int unsigned RF_CELLS_PER_LBL   = 16;
  localparam int unsigned RF_LBLS_PER_NAND   = 2;
  localparam int unsigned RF_GBLS_PER_SDL    = 2;
  localparam int unsigned RF_EC_BITS_PER_BL  = 16;
  localparam int unsigned RF_DLY_SEL_W       = 2;

  // Error compaction source select (MODE input of the compaction mux).
  typedef enum logic {
    EC_TED = 1'b0,   // compact the timing-error detector outputs
    EC_TMD = 1'b1    // compact the timing-margin detector outputs
  } ec_mode_e;

  // Decision of the V/F adaptation controller.
  typedef enum logic [1:0] {
    VF_HOLD      = 2'd0,  // maintain V/F
    VF_SPEED_UP  = 2'd1,  // increase F or lower V
    VF_SLOW_DOWN = 2'd2   // lower F or increase V
  } vf_cmd_e;

endpackage
