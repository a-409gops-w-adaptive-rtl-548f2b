`timescale 1ps/1ps
// tb_ted: SDLOUT rising before the clock edge (no error), during the high
// phase (error flagged) and during the low phase (no error).
module tb_ted;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, sdl = 0, dout, dlat, tout;
  ted dut (.clk(clk), .rst_n(rst_n), .sdlout(sdl), .dout(dout), .dout_lat(dlat), .ted_out(tout));
  always #500 clk = ~clk;   // rising edges at 500, 1500, ...
  task automatic one(input int arrive_after_fall, input logic exp_err);
    @(negedge clk); sdl = 0;
    #(arrive_after_fall) sdl = 1;
    if (arrive_after_fall < 500) @(posedge clk);
    @(negedge clk); #10;
    checks++; if (tout !== exp_err) failures++;
    checks++; if (dlat !== 1'b1) failures++;
  endtask
  initial begin
    #700 rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      one(100 + 17*i, 1'b0);     // arrives in the low phase before the edge
      one(520 + 20*i, 1'b1);     // arrives in the high phase after the edge
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
