`timescale 1ps/1ps
// rwl_decoder: address decoder and word-line generator of one sub-array.
//
// Turns a binary entry address into a one-hot word-line vector. With `en` low,
// or an address beyond the last entry, no word line is raised. The same decoder
// type drives the read word lines (RWL) and the write word lines (WWL).
// Purely combinational; the caller decides in which clock phase the lines are
// allowed to rise. The decoder circuit itself is not described in the source
// design, which only names the address decoder and word-line generator blocks;
// this is the plain one-hot decode.
module rwl_decoder #(
  parameter  int unsigned ENTRIES = 128,
  localparam int unsigned AW      = $clog2(ENTRIES)
) (
  input  logic               en,
  input  logic [AW-1:0]      addr,
  output logic [ENTRIES-1:0] wl
);

  always_comb begin
    wl = '0;
    if (en && (32'(addr) < ENTRIES)) wl[addr] = 1'b1;
  end

endmodule
