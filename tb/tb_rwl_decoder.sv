`timescale 1ps/1ps
// tb_rwl_decoder: checks the one-hot decode for every address, with the
// enable low, and that exactly one line is raised.
module tb_rwl_decoder;
  int checks = 0, failures = 0;
  logic en; logic [6:0] addr; logic [127:0] wl;
  rwl_decoder #(.ENTRIES(128)) dut (.en(en), .addr(addr), .wl(wl));
  initial begin
    for (int a = 0; a < 128; a++) begin
      en = 1; addr = 7'(a); #1;
      checks++; if (wl != (128'(1) << a)) failures++;
      en = 0; #1;
      checks++; if (wl != '0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
