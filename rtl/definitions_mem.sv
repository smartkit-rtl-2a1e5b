// definitions_mem: one copy of SRAM 4 of the AI module and its interface,
// holding one shape definition: the mean and the standard deviation of each
// of the four values of every stroke pair. The AI module keeps N_DEFS copies.
//
// The interface maps (pair, property) to the word address pair * 4 +
// property (own layout); each word is a def_t {mean, std}. It also keeps a
// valid flag, set by the first write after clear, so the recogniser skips
// definitions that were never trained (own addition).
//
// Timing: writes at the clock edge; synchronous read, data one clock after
// the read index.
module definitions_mem
  import smartkit_pkg::*;
#(
  parameter int unsigned PAIRS = MAX_PAIRS
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     we,
  input  logic [$clog2(PAIRS)-1:0] wr_pair,
  input  logic [1:0]               wr_prop,
  input  def_t                     wr_data,
  input  logic [$clog2(PAIRS)-1:0] rd_pair,
  input  logic [1:0]               rd_prop,
  output def_t                     rd_data,
  output logic                     valid
);

  localparam int unsigned WORDS = PAIRS * N_PROPS;
  localparam int unsigned AW    = $clog2(WORDS);

  def_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[AW'(wr_pair * N_PROPS + wr_prop)] <= wr_data;
    rd_data <= mem[AW'(rd_pair * N_PROPS + rd_prop)];
  end

  always_ff @(posedge clk) begin
    if (rst)     valid <= 1'b0;
    else if (we) valid <= 1'b1;
  end

endmodule
