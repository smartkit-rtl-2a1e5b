// coord_mem: SRAM 1 of the AI module and its interface, the store of stroke
// end points of the current drawing.
//
// The input stage delivers one point per in_valid pulse; the interface
// writes it at the next free address, so stroke k has its start point at
// address 2k and its end point at 2k+1 (the user always draws a shape in the
// same stroke order and direction). n_points counts the stored points and
// clear empties the store for the next drawing. Points beyond MAX_POINTS are
// dropped. The accumulate-and-clear protocol is this design's own; the
// document only says the memory "accumulates the data coming from the input
// stage".
//
// Timing: writes take effect at the clock edge; reads are synchronous, data
// one clock after rd_addr.
module coord_mem
  import smartkit_pkg::*;
#(
  parameter int unsigned DEPTH = MAX_POINTS
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  point_t                   in_pt,
  input  logic                     clear,
  output logic [$clog2(DEPTH):0]   n_points,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output point_t                   rd_data
);

  point_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      n_points <= '0;
    end else if (in_valid && n_points < DEPTH) begin
      mem[n_points[$clog2(DEPTH)-1:0]] <= in_pt;
      n_points <= n_points + 1'b1;
    end
  end

  always_ff @(posedge clk) rd_data <= mem[rd_addr];

endmodule
