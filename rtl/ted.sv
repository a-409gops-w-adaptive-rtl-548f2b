`timescale 1ps/1ps
// ted: in-situ timing error detector for one read-data bit.
//
// SDLOUT is sampled twice: by a flip-flop at the rising clock edge (DOUT, the
// read data handed on) and by a latch that is transparent while the clock is
// high and closes at the falling edge (DOUT_LAT). A read whose evaluation only
// reaches SDLOUT during the high phase makes DOUT and DOUT_LAT differ, so
// TED_OUT = DOUT ^ DOUT_LAT flags it. The detection window is therefore half a
// clock cycle. SDLOUT itself still ends up correct, so a replay can recover.
//
// Timing: DOUT changes at the rising edge; TED_OUT is valid from the falling
// edge to the next rising edge, where the error compaction flop takes it.
// The latch is modelled by the value it holds once closed (sampled at the
// falling edge); its transparent-phase output is not used by anything. The
// reset only clears the state for simulation; the detector itself follows the
// source design's flip-flop + latch + XOR.
module ted (
  input  logic clk,
  input  logic rst_n,
  input  logic sdlout,
  output logic dout,
  output logic dout_lat,
  output logic ted_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dout <= 1'b0;
    else        dout <= sdlout;
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) dout_lat <= 1'b0;
    else        dout_lat <= sdlout;
  end

  assign ted_out = dout ^ dout_lat;

endmodule
