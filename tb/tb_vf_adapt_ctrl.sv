`timescale 1ps/1ps
// tb_vf_adapt_ctrl: drives margin flags in the TMDa/TMDb windows and checks
// the decision table (speed up / hold / slow down) and the ERTe override.
module tb_vf_adapt_ctrl;
  import rf_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, adj = 0, flag = 0, erte = 0;
  ec_mode_e mode; logic [1:0] msel; logic ta, tb_, fu, fd, vu, vd; vf_cmd_e cmd;
  vf_adapt_ctrl #(.RUN_CYCLES(8), .WIN_CYCLES(8)) dut (.clk(clk), .rst_n(rst_n), .en(en), .adjust_v(adj),
     .mdw_a_sel(2'd1), .mdw_b_sel(2'd3), .ec_flag(flag), .erte(erte), .ec_mode(mode), .mdw_sel(msel),
     .tmda(ta), .tmdb(tb_), .vf_cmd(cmd), .f_up(fu), .f_down(fd), .v_up(vu), .v_down(vd));
  always #500 clk = ~clk;
  logic fa, fb;
  // flag source: in window A report fa, in window B report fb
  always_ff @(posedge clk) flag <= (mode == EC_TMD) && ((msel == 2'd1) ? fa : fb);
  task automatic round(input logic a, input logic b, input vf_cmd_e exp_cmd);
    fa = a; fb = b;
    do @(negedge clk); while (cmd == VF_HOLD && !(dut.state == 2'd3));
    checks++; if (cmd !== exp_cmd) failures++;
    checks++; if (fu !== (exp_cmd == VF_SPEED_UP && !adj) || fd !== (exp_cmd == VF_SLOW_DOWN && !adj)) failures++;
    checks++; if (vd !== (exp_cmd == VF_SPEED_UP && adj) || vu !== (exp_cmd == VF_SLOW_DOWN && adj)) failures++;
    @(negedge clk);
  endtask
  initial begin
    fa = 0; fb = 0;
    #1200 rst_n = 1; en = 1;
    for (int k = 0; k < 2; k++) begin
      adj = k[0];
      round(0, 0, VF_SPEED_UP);
      round(0, 1, VF_HOLD);
      round(1, 1, VF_SLOW_DOWN);
    end
    en = 0; @(negedge clk); erte = 1; #1;
    checks++; if (cmd !== VF_SLOW_DOWN) failures++;
    @(negedge clk); erte = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
