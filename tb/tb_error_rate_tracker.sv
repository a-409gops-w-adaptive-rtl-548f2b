`timescale 1ps/1ps
// tb_error_rate_tracker: sampling periods with error counts below, at and
// above the threshold; ERTe must pulse only when the count exceeds it.
module tb_error_rate_tracker;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, ev = 0; logic [15:0] thr = 16'd5, cnt; logic erte;
  error_rate_tracker #(.SAMPLE_CYCLES(32), .CNT_W(16)) dut (.clk(clk), .rst_n(rst_n), .err_event(ev),
      .threshold(thr), .err_count(cnt), .erte(erte));
  always #500 clk = ~clk;
  int nerr, seen;
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int p = 0; p < 8; p++) begin
      nerr = (p % 4) + 4;   // 4,5,6,7 errors per period
      seen = 0;
      for (int c = 0; c < 32; c++) begin
        ev = (c < nerr);
        @(negedge clk);
        if (erte) seen++;
      end
      ev = 0;
      // erte is registered at the end of the period, visible now
      checks++;
      if ((erte == 1'b1) != (nerr > 5)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
