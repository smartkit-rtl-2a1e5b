// linepairs_mem: SRAM 3 of the AI module and its interface, holding the four
// values of every stroke pair of every drawing in the training set.
//
// The interface turns (example, pair, property) into a word address,
//     addr = (example * MAX_PAIRS + pair) * 4 + property,
// so the Line Pair FSM can write one example at a time while the Definition
// FSM reads the same property of the same pair from every example, and the
// Score Calculator reads one drawing's values; the document describes these
// two access orders, the address formula is this design's own. EXAMPLES
// slots are provided: the N_EXAMPLES training examples, of which the next
// free one also takes a drawing under recognition.
//
// Timing: writes at the clock edge; synchronous read, data one clock after
// the read index.
module linepairs_mem
  import smartkit_pkg::*;
#(
  parameter int unsigned EXAMPLES = N_EXAMPLES,
  parameter int unsigned PAIRS    = MAX_PAIRS
) (
  input  logic                        clk,
  input  logic                        we,
  input  logic [$clog2(EXAMPLES)-1:0] wr_ex,
  input  logic [$clog2(PAIRS)-1:0]    wr_pair,
  input  logic [1:0]                  wr_prop,
  input  fp_t                         wr_data,
  input  logic [$clog2(EXAMPLES)-1:0] rd_ex,
  input  logic [$clog2(PAIRS)-1:0]    rd_pair,
  input  logic [1:0]                  rd_prop,
  output fp_t                         rd_data
);

  localparam int unsigned WORDS = EXAMPLES * PAIRS * N_PROPS;
  localparam int unsigned AW    = $clog2(WORDS);

  fp_t mem [WORDS];

  function automatic logic [AW-1:0] addr_of(int unsigned ex, int unsigned pair, int unsigned prop);
    return AW'((ex * PAIRS + pair) * N_PROPS + prop);
  endfunction

  always_ff @(posedge clk) begin
    if (we) mem[addr_of(wr_ex, wr_pair, wr_prop)] <= wr_data;
    rd_data <= mem[addr_of(rd_ex, rd_pair, rd_prop)];
  end

endmodule
