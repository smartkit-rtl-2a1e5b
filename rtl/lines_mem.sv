// lines_mem: SRAM 2 of the AI module and its interface, holding the length
// and the angle of every stroke of the current drawing (one line_t word per
// stroke, the word address being the stroke number).
//
// Written by the Line FSM, read by the Line Pair FSM. One write port and one
// synchronous read port (data one clock after rd_addr). The one-word-per-
// stroke layout is this design's own choice.
module lines_mem
  import smartkit_pkg::*;
#(
  parameter int unsigned DEPTH = MAX_LINES
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  line_t                    wr_data,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output line_t                    rd_data
);

  line_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule
