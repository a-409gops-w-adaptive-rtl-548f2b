`timescale 1ps/1ps
// rf_subarray: one 128-entry x 32-bit sub-array of the resilient domino
// register file, with its in-situ timing margin and error detection.
//
// Read path per bit column (all ENTRIES cells):
//   16 cells -> local bitline (LBL); 2 LBLs -> NAND (NAOUT); the NAOUTs of
//   ENTRIES/2 cells pull down one global bitline (GBL); 2 GBLs -> set-dominant
//   latch (SDLOUT). SDLOUT feeds a timing error detector (TED, double sampling)
//   and a timing margin detector (TMD, sampling an MDW-delayed copy). The 32
//   TED or TMD outputs are compacted into one flag (EC).
// Precharge: the LBLs and GBLs precharge while the clock is high. The
// precharge transistors use a programmably delayed clock (late rise, on-time
// fall); the equalizers use the on-time clock once the bitline has evaluated,
// else the delayed one, so a slow evaluation gets extra time to reach the SDL
// (conditional delayed precharge). `pch_mode` = 1 forces on-time equalizing.
//
// Cycle timing (one read per cycle):
//   edge 0 (rise): rd_en/rd_addr registered; bitlines precharge (high phase)
//   low phase    : read word line high, bitlines evaluate, SDLOUT sets
//   edge 1 (rise): DOUT and DEL_DOUT sampled -> `dout` valid after edge 1
//   edge 1 (fall): DOUT_LAT closes; SDL reset (DEL CLKB) starts
//   edge 2 (rise): ERROR COMPACT flop -> `error_compact` valid after edge 2
//   Writes are taken at the rising edge (wr_en/wr_addr/wr_data).
// A read that reaches SDLOUT after edge 1 but before the delayed precharge is
// captured in SDLOUT and flagged by TED; one arriving later is lost.
//
// `eval_delay_ps` only feeds the behavioural bitline timing model and stands
// for the silicon's read-evaluate delay (supply, temperature, ageing); it has
// no hardware counterpart. The organisation, the detectors, the conditional
// precharge and the compaction follow the source design; the clock-phase
// assignment, the register stage on the address and the delay values are this
// implementation's.
module rf_subarray
  import rf_pkg::*;
#(
  parameter  int unsigned ENTRIES        = RF_ENTRIES,
  parameter  int unsigned WIDTH          = RF_WIDTH,
  parameter  int unsigned CELLS_PER_LBL  = RF_CELLS_PER_LBL,
  parameter  int unsigned EC_BITS_PER_BL = RF_EC_BITS_PER_BL,
  parameter  int unsigned PCH_BASE_PS    = 50,
  parameter  int unsigned PCH_STEP_PS    = 50,
  parameter  int unsigned MDW_BASE_PS    = 50,
  parameter  int unsigned MDW_STEP_PS    = 50,
  parameter  int unsigned SDL_RST_DLY_PS = 30,
  localparam int unsigned AW             = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  // write port
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  // read port
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] dout,
  // detection configuration
  input  logic             pch_mode,
  input  logic [1:0]       pch_dly_sel,
  input  logic [1:0]       mdw_sel,
  input  ec_mode_e         ec_mode,
  // detection results
  output logic [WIDTH-1:0] sdlout,
  output logic [WIDTH-1:0] ted_out,
  output logic [WIDTH-1:0] tmd_out,
  output logic             error_compact,
  // behavioural read-evaluate delay (simulation only)
  input  int unsigned      eval_delay_ps
);

  localparam int unsigned NLBL       = ENTRIES / CELLS_PER_LBL;
  localparam int unsigned NGRP       = NLBL / RF_LBLS_PER_NAND;
  localparam int unsigned GRP_PER_GBL = NGRP / RF_GBLS_PER_SDL;

  // ---------------------------------------------------------------- address
  logic          rd_en_q;
  logic [AW-1:0] rd_addr_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_en_q   <= 1'b0;
      rd_addr_q <= '0;
    end else begin
      rd_en_q   <= rd_en;
      rd_addr_q <= rd_addr;
    end
  end

  logic [ENTRIES-1:0] rwl_dec, rwl, wwl;
  rwl_decoder #(.ENTRIES(ENTRIES)) u_rdec (.en(rd_en_q), .addr(rd_addr_q), .wl(rwl_dec));
  rwl_decoder #(.ENTRIES(ENTRIES)) u_wdec (.en(wr_en),   .addr(wr_addr),   .wl(wwl));
  // Read word lines are raised in the evaluate (low) phase only.
  assign rwl = rwl_dec & {ENTRIES{~clk}};

  // ------------------------------------------------------------- bit cells
  logic [NLBL-1:0][WIDTH-1:0] lbl_n;
  rf_bitcell_array #(.ENTRIES(ENTRIES), .WIDTH(WIDTH), .CELLS_PER_LBL(CELLS_PER_LBL)) u_cells (
    .clk   (clk),
    .wwl   (wwl),
    .wdata (wr_data),
    .rwl   (rwl),
    .lbl_n (lbl_n)
  );

  // -------------------------------------------------------- precharge clocks
  logic clk_dly, pch_del, clkb, del_clkb, sdl_rst;
  prog_delay_line #(.SEL_W(2), .BASE_PS(PCH_BASE_PS), .STEP_PS(PCH_STEP_PS)) u_pch_dly (
    .din (clk), .sel (pch_dly_sel), .dout (clk_dly)
  );
  assign pch_del = clk & clk_dly;          // late rise, on-time fall

  assign clkb = ~clk;
  prog_delay_line #(.SEL_W(1), .BASE_PS(SDL_RST_DLY_PS), .STEP_PS(0)) u_sdl_dly (
    .din (clkb), .sel (1'b0), .dout (del_clkb)
  );
  assign sdl_rst = clkb & del_clkb;         // from shortly after the fall to the rise

  // ------------------------------------------------- LBL pairs, GBLs, SDLs
  logic [NGRP-1:0][WIDTH-1:0] naout, lbl_eq;
  logic [WIDTH-1:0]           gbl_eq;
  logic [RF_GBLS_PER_SDL-1:0][WIDTH-1:0] gbl_dis;

  for (genvar b = 0; b < int'(WIDTH); b++) begin : g_bit
    for (genvar g = 0; g < int'(NGRP); g++) begin : g_grp
      logic hit;
      // 2-input NAND of the (active-low) LBL pair
      assign hit = ~(lbl_n[2*g][b] & lbl_n[2*g+1][b]);

      bl_precharge_sel u_lbl_pch (
        .pch_on (clk), .pch_del (pch_del), .mode (pch_mode),
        .bl_out (naout[g][b]), .eq_en (lbl_eq[g][b])
      );

      lbl_eval_model u_eval (
        .lbl_hit       (hit),
        .eq_en         (lbl_eq[g][b]),
        .pch_en        (pch_del),
        .eval_delay_ps (eval_delay_ps),
        .naout         (naout[g][b])
      );
    end

    bl_precharge_sel u_gbl_pch (
      .pch_on (clk), .pch_del (pch_del), .mode (pch_mode),
      .bl_out (sdlout[b]), .eq_en (gbl_eq[b])
    );

    // Each GBL is pulled low by the NAOUTs of its half of the entries.
    for (genvar j = 0; j < int'(RF_GBLS_PER_SDL); j++) begin : g_gbl
      logic any_naout;
      always_comb begin
        any_naout = 1'b0;
        for (int g = 0; g < int'(GRP_PER_GBL); g++) begin
          any_naout = any_naout | naout[j*int'(GRP_PER_GBL) + g][b];
        end
      end
      assign gbl_dis[j][b] = any_naout & ~gbl_eq[b];
    end

    logic [RF_GBLS_PER_SDL-1:0] sdl_set;
    for (genvar j = 0; j < int'(RF_GBLS_PER_SDL); j++) begin : g_set
      assign sdl_set[j] = gbl_dis[j][b];
    end

    set_dominant_latch #(.NGBL(RF_GBLS_PER_SDL)) u_sdl (
      .gbl_dis (sdl_set), .rst (sdl_rst), .sdlout (sdlout[b])
    );

    // ----------------------------------------------------- detectors
    logic dout_lat, del_dout;
    ted u_ted (
      .clk (clk), .rst_n (rst_n), .sdlout (sdlout[b]),
      .dout (dout[b]), .dout_lat (dout_lat), .ted_out (ted_out[b])
    );

    tmd #(.MDW_BASE_PS(MDW_BASE_PS), .MDW_STEP_PS(MDW_STEP_PS)) u_tmd (
      .clk (clk), .rst_n (rst_n), .sdlout (sdlout[b]), .mdw_sel (mdw_sel),
      .dout (dout[b]), .del_dout (del_dout), .tmd_out (tmd_out[b])
    );
  end

  // -------------------------------------------------------- compaction
  logic [WIDTH/EC_BITS_PER_BL-1:0] err_bl;
  logic                            ec_comb;
  error_compaction #(.WIDTH(WIDTH), .BITS_PER_BL(EC_BITS_PER_BL)) u_ec (
    .clk              (clk),
    .rst_n            (rst_n),
    .mode             (ec_mode),
    .ted_out          (ted_out),
    .tmd_out          (tmd_out),
    .err_bl           (err_bl),
    .error_compact    (ec_comb),
    .error_compact_ff (error_compact)
  );

endmodule
