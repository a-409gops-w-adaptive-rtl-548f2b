`timescale 1ps/1ps
// tb_resilient_rf_top: end-to-end test of the resilient register file with
// two sub-arrays and short adaptation windows.
//  1. writes random words, reads them back at a nominal evaluate delay;
//  2. a droop (evaluate delay pushed into the high phase) must be detected
//     by TED and recovered by replay at F/2, returning correct data;
//  3. the same with replay at raised supply (v_boost);
//  4. margin probing: a fast read asks for speed-up, a read inside the
//     narrow window asks for slow-down, one inside only the wide window holds;
//  5. repeated errors must raise ERTe.
// Each mechanism is counted and must happen at least once.
module tb_resilient_rf_top;
  int checks = 0, failures = 0;
  localparam int NSA = 2;
  logic clk_f = 0, rst_n = 0;
  logic req_valid = 0, req_ready, rsp_valid; logic [7:0] req_addr = 0, rsp_addr; logic [31:0] rsp_data;
  logic wr_en = 0; logic [7:0] wr_addr = 0; logic [31:0] wr_data = 0;
  logic adapt_en = 0, adjust_v = 0, replay_use_v = 0, pch_mode = 0;
  logic [1:0] pch_dly_sel = 2'd2, mdw_a_sel = 2'd1, mdw_b_sel = 2'd3;
  logic [15:0] thr = 16'd2, err_count;
  logic f_up, f_down, v_up, v_down, v_boost, clk_arr, slow_active, replaying, ted_ev, erte, tmda, tmdb, ec;
  int unsigned eval_ps = 300;

  resilient_rf_top #(.NUM_SUBARRAYS(NSA), .RUN_CYCLES(16), .WIN_CYCLES(16), .SAMPLE_CYCLES(64)) dut (
    .clk_f(clk_f), .rst_n(rst_n), .req_valid(req_valid), .req_addr(req_addr), .req_ready(req_ready),
    .rsp_valid(rsp_valid), .rsp_addr(rsp_addr), .rsp_data(rsp_data),
    .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .adapt_en(adapt_en), .adjust_v(adjust_v), .replay_use_v(replay_use_v), .pch_mode(pch_mode),
    .pch_dly_sel(pch_dly_sel), .mdw_a_sel(mdw_a_sel), .mdw_b_sel(mdw_b_sel), .ert_threshold(thr),
    .f_up(f_up), .f_down(f_down), .v_up(v_up), .v_down(v_down), .v_boost(v_boost),
    .clk_arr(clk_arr), .slow_active(slow_active), .replaying(replaying), .ted_err_event(ted_ev),
    .erte(erte), .tmda(tmda), .tmdb(tmdb), .error_compact(ec), .err_count(err_count),
    .sim_eval_delay_ps(eval_ps));

  always #500 clk_f = ~clk_f;

  logic [31:0] model [256];
  int n_rsp = 0, n_ted = 0, n_slow = 0, n_vboost = 0, n_fup = 0, n_fdown = 0, n_hold = 0, n_erte = 0;
  always @(posedge clk_arr) begin
    if (rsp_valid) begin
      n_rsp++; checks++;
      if (rsp_data !== model[rsp_addr]) failures++;
    end
    if (ted_ev) n_ted++;
    if (erte) n_erte++;
    if (f_up) n_fup++;
    if (f_down) n_fdown++;
    if (dut.u_vf.state == 2'd3 && !f_up && !f_down) n_hold++;
  end
  always @(posedge slow_active) n_slow++;
  always @(posedge v_boost) n_vboost++;

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk_arr); wr_en = 1; wr_addr = 8'(a); wr_data = d; model[a] = d;
    @(negedge clk_arr); wr_en = 0;
  endtask
  task automatic rd(input int a);
    @(negedge clk_arr); req_valid = 1; req_addr = 8'(a);
    do @(posedge clk_arr); while (!req_ready);
    #1 req_valid = 0;
  endtask
  task automatic drain; repeat (30) @(negedge clk_arr); endtask

  int addrs[$];
  initial begin
    for (int i = 0; i < 256; i++) model[i] = 0;
    #3200 rst_n = 1;
    // 1. fill (including unused entries so reads are defined)
    for (int a = 0; a < 256; a++) wr(a, (a % 5 == 0) ? 32'hFFFF_FFFF : $urandom);
    for (int k = 0; k < 40; k++) rd($urandom_range(0, 255));
    drain();
    checks++; if (n_rsp != 40) failures++;
    checks++; if (n_ted != 0) failures++;
    // 2. droop: evaluation arrives 60 ps after the edge, inside the delayed precharge
    eval_ps = 560;
    rd(5); drain();
    eval_ps = 300; drain();
    checks++; if (n_rsp != 41) failures++;
    // 3. replay at raised supply: the testbench plays the regulator
    replay_use_v = 1; eval_ps = 560;
    fork
      begin rd(10); end
      begin @(posedge v_boost); eval_ps = 300; end
    join
    drain(); replay_use_v = 0;
    checks++; if (n_rsp != 42) failures++;
    // 4. margin probing with continuous reads of all-ones words
    adapt_en = 1;
    foreach (eval_ps_list[i]) begin
      eval_ps = eval_ps_list[i];
      for (int k = 0; k < 120; k++) rd(5 * $urandom_range(0, 50));
    end
    adapt_en = 0; eval_ps = 300; drain();
    // 5. error burst for the error rate tracker (threshold 0: any error)
    thr = 16'd0;
    eval_ps = 560;
    for (int k = 0; k < 4; k++) rd(0);
    eval_ps = 300; drain(); repeat (80) @(negedge clk_arr);
    checks++; if (n_ted < 2) failures++;
    checks++; if (n_slow < 1) failures++;
    checks++; if (n_vboost < 1) failures++;
    checks++; if (n_fup < 1) failures++;
    checks++; if (n_fdown < 1) failures++;
    checks++; if (n_hold < 1) failures++;
    checks++; if (n_erte < 1) failures++;
    $display("mechanisms: ted=%0d slow=%0d vboost=%0d fup=%0d fdown=%0d hold=%0d erte=%0d rsp=%0d",
             n_ted, n_slow, n_vboost, n_fup, n_fdown, n_hold, n_erte, n_rsp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int unsigned eval_ps_list[3] = '{237, 349, 461};
  initial begin #300000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
