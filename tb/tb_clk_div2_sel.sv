`timescale 1ps/1ps
// tb_clk_div2_sel: measures the output period in F and F/2 mode and checks
// that no high pulse shorter than half an input period appears at a switch.
module tb_clk_div2_sel;
  int checks = 0, failures = 0;
  logic clk_f = 0, rst_n = 0, slow = 0, clk_out, act;
  clk_div2_sel dut (.clk_f(clk_f), .rst_n(rst_n), .slow(slow), .clk_out(clk_out), .slow_active(act));
  always #500 clk_f = ~clk_f;
  time t_rise, t_prev, hi_start;
  int n_short = 0;
  always @(posedge clk_out) hi_start = $time;
  always @(negedge clk_out) if (rst_n && ($time - hi_start) < 500) n_short++;
  task automatic measure(input time expect_p);
    @(posedge clk_out); t_prev = $time;
    @(posedge clk_out); t_rise = $time;
    checks++; if (t_rise - t_prev != expect_p) failures++;
  endtask
  initial begin
    #1200 rst_n = 1;
    repeat (3) measure(1000);
    for (int k = 0; k < 6; k++) begin
      slow = 1; repeat (4) @(posedge clk_f);
      checks++; if (!act) failures++;
      repeat (2) measure(2000);
      slow = 0; repeat (4) @(posedge clk_f);
      checks++; if (act) failures++;
      repeat (2) measure(1000);
    end
    checks++; if (n_short != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
