`timescale 1ps/1ps
// tb_error_compaction: random TED/TMD vectors; the flop output must equal the
// OR of the vector picked by the mode, one clock later.
module tb_error_compaction;
  import rf_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0; ec_mode_e mode; logic [31:0] ted_v, tmd_v; logic [1:0] err_bl; logic ec, ecff;
  error_compaction dut (.clk(clk), .rst_n(rst_n), .mode(mode), .ted_out(ted_v), .tmd_out(tmd_v),
                        .err_bl(err_bl), .error_compact(ec), .error_compact_ff(ecff));
  always #500 clk = ~clk;
  logic exp_v;
  initial begin
    mode = EC_TED; ted_v = 0; tmd_v = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      mode  = ec_mode_e'($urandom_range(0, 1));
      ted_v = ($urandom_range(0, 2) == 0) ? 32'(1) << $urandom_range(0, 31) : 32'h0;
      tmd_v = ($urandom_range(0, 2) == 0) ? 32'(1) << $urandom_range(0, 31) : 32'h0;
      exp_v = (mode == EC_TMD) ? |tmd_v : |ted_v;
      @(negedge clk);
      checks++; if (ecff !== exp_v) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
