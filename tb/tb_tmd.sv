`timescale 1ps/1ps
// tb_tmd: data arriving with less margin than the window is flagged, data
// with more margin is not, for each window setting (50 + 50*sel ps).
module tb_tmd;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, sdl = 0, dout = 0, ddout, tout; logic [1:0] sel;
  tmd dut (.clk(clk), .rst_n(rst_n), .sdlout(sdl), .mdw_sel(sel), .dout(dout), .del_dout(ddout), .tmd_out(tout));
  always #500 clk = ~clk;
  always_ff @(posedge clk) dout <= sdl;
  task automatic one(input int margin, input logic exp_flag);
    @(negedge clk); sdl = 0;
    #(500 - margin) sdl = 1;
    @(posedge clk); #10;
    checks++; if (tout !== exp_flag) failures++;
  endtask
  initial begin
    sel = 0; #700 rst_n = 1;
    for (int s = 0; s < 4; s++) begin
      sel = 2'(s);
      one(50 + 50*s - 13, 1'b1);
      one(50 + 50*s + 13, 1'b0);
      one(20, 1'b1);
      one(400, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
