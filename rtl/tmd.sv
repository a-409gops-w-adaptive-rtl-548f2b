`timescale 1ps/1ps
// tmd: in-situ timing margin detector for one read-data bit.
//
// SDLOUT is delayed by the margin-detection-window (MDW) delay line, selected
// by the 2-bit `mdw_sel`, and sampled at the rising clock edge (DEL_DOUT). It
// is compared with DOUT, the undelayed sample taken by the timing error
// detector at the same edge. If the read data reached SDLOUT less than one MDW
// before the edge, the two samples differ and TMD_OUT = DOUT ^ DEL_DOUT is 1:
// the read met timing, but with less margin than the window. The window can
// be long (up to the delay line's range); nothing limits it to a short
// sampling pulse.
//
// Timing: TMD_OUT is valid for the cycle after the rising edge that samples
// the read. The MDW delay line is the behavioural prog_delay_line (MDW_BASE_PS
// + mdw_sel * MDW_STEP_PS); the picosecond values are this implementation's,
// the structure follows the source design.
module tmd #(
  parameter int unsigned MDW_BASE_PS = 50,
  parameter int unsigned MDW_STEP_PS = 50
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sdlout,
  input  logic [1:0] mdw_sel,
  input  logic       dout,
  output logic       del_dout,
  output logic       tmd_out
);

  logic del_sdlout;

  prog_delay_line #(.SEL_W(2), .BASE_PS(MDW_BASE_PS), .STEP_PS(MDW_STEP_PS)) u_mdw (
    .din  (sdlout),
    .sel  (mdw_sel),
    .dout (del_sdlout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) del_dout <= 1'b0;
    else        del_dout <= del_sdlout;
  end

  assign tmd_out = dout ^ del_dout;

endmodule
