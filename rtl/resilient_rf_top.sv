`timescale 1ps/1ps
// resilient_rf_top: 14 KB adaptive and resilient domino register file.
//
// NUM_SUBARRAYS sub-arrays of ENTRIES x WIDTH bits (28 x 128 x 32 = 14 KB),
// each with in-situ timing error detection (TED), timing margin detection
// (TMD) and error compaction, closed into two control loops:
//  * Resilience: the error response controller issues reads and, when the
//    compacted TED flag reports a read timing error (e.g. from a fast supply
//    droop), repeats the read at F/2 or with the supply raised. Detected
//    errors are counted by the error rate tracker; too many in a sampling
//    period (ERTe) ask for lower F / higher V.
//  * Adaptation: the V/F adaptation controller periodically switches the
//    compaction to the TMD outputs with two window settings (TMDa, TMDb) and
//    asks the clock generator / regulator for more or less speed.
// The clock generator and the voltage regulator are outside: the top takes
// the clock F (`clk_f`) and gives out their up/down requests; it makes the
// F/2 replay clock itself.
//
// Interface: read requests `req_valid/req_addr/req_ready`, responses
// `rsp_valid/rsp_addr/rsp_data` (in order, 4 array cycles after issue when no
// error). Address = {sub-array index, entry}. Writes (`wr_*`) take one array
// cycle. All logic runs on the selected array clock, which is `clk_f` except
// during an F/2 replay.
// `sim_eval_delay_ps` drives only the behavioural bitline timing model: it
// stands for the read-evaluate delay that the silicon has at the present
// supply, temperature and age, and lets a testbench create droops.
// The organisation and the loops follow the source design; the request/
// response interface, address layout and probing schedule are this
// implementation's.
module resilient_rf_top
  import rf_pkg::*;
#(
  parameter  int unsigned NUM_SUBARRAYS = RF_NUM_SUBARRAYS,
  parameter  int unsigned ENTRIES       = RF_ENTRIES,
  parameter  int unsigned WIDTH         = RF_WIDTH,
  parameter  int unsigned SETTLE_CYCLES = 4,
  parameter  int unsigned RUN_CYCLES    = 256,
  parameter  int unsigned WIN_CYCLES    = 32,
  parameter  int unsigned SAMPLE_CYCLES = 1024,
  localparam int unsigned EW            = $clog2(ENTRIES),
  localparam int unsigned SW            = (NUM_SUBARRAYS > 1) ? $clog2(NUM_SUBARRAYS) : 1,
  localparam int unsigned AW            = SW + EW
) (
  input  logic             clk_f,
  input  logic             rst_n,
  // reads
  input  logic             req_valid,
  input  logic [AW-1:0]    req_addr,
  output logic             req_ready,
  output logic             rsp_valid,
  output logic [AW-1:0]    rsp_addr,
  output logic [WIDTH-1:0] rsp_data,
  // writes
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  // configuration
  input  logic             adapt_en,
  input  logic             adjust_v,
  input  logic             replay_use_v,
  input  logic             pch_mode,
  input  logic [1:0]       pch_dly_sel,
  input  logic [1:0]       mdw_a_sel,
  input  logic [1:0]       mdw_b_sel,
  input  logic [15:0]      ert_threshold,
  // to clock generator and voltage regulator
  output logic             f_up,
  output logic             f_down,
  output logic             v_up,
  output logic             v_down,
  output logic             v_boost,
  // status
  output logic             clk_arr,
  output logic             slow_active,
  output logic             replaying,
  output logic             ted_err_event,
  output logic             erte,
  output logic             tmda,
  output logic             tmdb,
  output logic             error_compact,
  output logic [15:0]      err_count,
  // behavioural read-evaluate delay (simulation only)
  input  int unsigned      sim_eval_delay_ps
);

  // ------------------------------------------------------------ clocking
  logic slow_clk;
  clk_div2_sel u_clk (
    .clk_f (clk_f), .rst_n (rst_n), .slow (slow_clk),
    .clk_out (clk_arr), .slow_active (slow_active)
  );

  // ------------------------------------------------------ error response
  logic             rd_en;
  logic [AW-1:0]    rd_addr;
  logic [WIDTH-1:0] rd_dout;
  logic             err_ted;

  error_resp_ctrl #(.AW(AW), .WIDTH(WIDTH), .SETTLE_CYCLES(SETTLE_CYCLES)) u_erc (
    .clk (clk_arr), .rst_n (rst_n),
    .req_valid (req_valid), .req_addr (req_addr), .req_ready (req_ready),
    .rd_en (rd_en), .rd_addr (rd_addr), .rd_dout (rd_dout), .err_flag (err_ted),
    .replay_use_v (replay_use_v), .slow_clk (slow_clk), .v_boost (v_boost),
    .replaying (replaying), .err_event (ted_err_event),
    .rsp_valid (rsp_valid), .rsp_addr (rsp_addr), .rsp_data (rsp_data)
  );

  // ------------------------------------------------------ V/F adaptation
  ec_mode_e   ec_mode, ec_mode_q;
  logic [1:0] mdw_sel;
  logic       err_tmd;
  vf_cmd_e    vf_cmd;

  vf_adapt_ctrl #(.RUN_CYCLES(RUN_CYCLES), .WIN_CYCLES(WIN_CYCLES)) u_vf (
    .clk (clk_arr), .rst_n (rst_n), .en (adapt_en), .adjust_v (adjust_v),
    .mdw_a_sel (mdw_a_sel), .mdw_b_sel (mdw_b_sel),
    .ec_flag (err_tmd), .erte (erte),
    .ec_mode (ec_mode), .mdw_sel (mdw_sel), .tmda (tmda), .tmdb (tmdb),
    .vf_cmd (vf_cmd), .f_up (f_up), .f_down (f_down), .v_up (v_up), .v_down (v_down)
  );

  error_rate_tracker #(.SAMPLE_CYCLES(SAMPLE_CYCLES), .CNT_W(16)) u_ert (
    .clk (clk_arr), .rst_n (rst_n), .err_event (ted_err_event),
    .threshold (ert_threshold), .err_count (err_count), .erte (erte)
  );

  // ------------------------------------------------------------ sub-arrays
  logic [SW-1:0] rd_sub, wr_sub, rd_sub_q1, rd_sub_q2;
  assign rd_sub = rd_addr[AW-1:EW];
  assign wr_sub = wr_addr[AW-1:EW];

  logic [NUM_SUBARRAYS-1:0][WIDTH-1:0] sa_dout;
  logic [NUM_SUBARRAYS-1:0]            sa_err;

  for (genvar i = 0; i < int'(NUM_SUBARRAYS); i++) begin : g_sa
    logic [WIDTH-1:0] sdlout, ted_out, tmd_out;
    rf_subarray #(.ENTRIES(ENTRIES), .WIDTH(WIDTH)) u_sa (
      .clk (clk_arr), .rst_n (rst_n),
      .wr_en (wr_en && (32'(wr_sub) == i)), .wr_addr (wr_addr[EW-1:0]), .wr_data (wr_data),
      .rd_en (rd_en && (32'(rd_sub) == i)), .rd_addr (rd_addr[EW-1:0]), .dout (sa_dout[i]),
      .pch_mode (pch_mode), .pch_dly_sel (pch_dly_sel), .mdw_sel (mdw_sel), .ec_mode (ec_mode),
      .sdlout (sdlout), .ted_out (ted_out), .tmd_out (tmd_out),
      .error_compact (sa_err[i]),
      .eval_delay_ps (sim_eval_delay_ps)
    );
  end

  // Read data of the read issued two cycles ago; compaction flags tagged with
  // the mode that was selected when they were captured.
  always_ff @(posedge clk_arr or negedge rst_n) begin
    if (!rst_n) begin
      rd_sub_q1 <= '0;
      rd_sub_q2 <= '0;
      ec_mode_q <= EC_TED;
    end else begin
      rd_sub_q1 <= rd_sub;
      rd_sub_q2 <= rd_sub_q1;
      ec_mode_q <= ec_mode;
    end
  end

  always_comb begin
    rd_dout = '0;
    for (int i = 0; i < int'(NUM_SUBARRAYS); i++) begin
      if (32'(rd_sub_q2) == i) rd_dout = sa_dout[i];
    end
  end

  assign error_compact = |sa_err;
  assign err_ted = error_compact && (ec_mode_q == EC_TED);
  assign err_tmd = error_compact && (ec_mode_q == EC_TMD);

endmodule
