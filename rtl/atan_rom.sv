// atan_rom: the Line FSM's internal ROM, an arctangent table.
//
// Entry i holds atan(i / 256) in degrees as an IEEE single-precision number,
// for i = 0 .. 256, so it covers ratios 0 to 1 (angles 0 to 45 degrees) in
// steps of 1/256; the Line FSM folds every other direction onto this range.
// The document only says that the Line FSM has an internal ROM; what it holds
// and its size are this design's own choices. The table file is
// rtl/atan_rom.hex, one 8-digit hex word per line, entry i on line i+1,
// value float32(atan(i/256) * 180 / pi).
//
// Timing: synchronous read, data one clock after the address.
module atan_rom
  import smartkit_pkg::*;
(
  input  logic       clk,
  input  logic [8:0] addr,   // 0 .. 256
  output fp_t        data
);

  fp_t rom [0:256];

  initial $readmemh("rtl/atan_rom.hex", rom);

  always_ff @(posedge clk) data <= rom[(addr > 9'd256) ? 9'd256 : addr];

endmodule
