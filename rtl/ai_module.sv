// ai_module: the processing stage of the near-miss learner. It learns
// shapes from example drawings and recognises new drawings.
//
// A drawing arrives as a sequence of stroke end points (start, end, start,
// end, ...). The Major FSM runs the worker FSMs over the memories like a
// production line:
//   coordinates (SRAM 1) --Line--> stroke lengths and angles (SRAM 2)
//   --Line Pair--> "four values" of every stroke pair (SRAM 3)
//   --Definition--> mean and standard deviation per value (SRAM 4, x4)
// and for recognition the Score Calculator compares SRAM 3 with each copy
// of SRAM 4; the lowest error gives the selector sent to the display.
// All workers share one floating point ALU; only one of them issues
// requests at a time, so their requests are merged by the one that pulses
// go, and the answer is broadcast. The memories' read ports are steered by
// the Major FSM's phase. The structure (nine FSMs, four SRAM kinds, one ROM,
// one ALU) is the document's; the signal-level protocol is this design's.
//
// Interface: coord_valid pulses with one end point in coord; rising edges
// of train / recognize start a training example / a recognition of the
// points collected so far. selector and enable stay valid from the end of
// a recognition until the next one starts.
module ai_module
  import smartkit_pkg::*;
#(
  parameter int unsigned DIV_QBITS  = 23,
  parameter int unsigned SQRT_ITERS = 32
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          train,
  input  logic                          recognize,
  input  logic                          coord_valid,
  input  point_t                        coord,
  output logic [1:0]                    selector,
  output logic                          enable,
  output fp_t                           best_score,
  output phase_e                        phase,
  output logic [N_DEFS-1:0]             def_valid,
  output logic [$clog2(N_EXAMPLES)-1:0] examples_held
);

  // ---- Major FSM ----
  logic [$clog2(MAX_POINTS):0]     n_points;
  logic [$clog2(MAX_LINES):0]      n_lines;
  logic [$clog2(MAX_PAIRS+1)-1:0]  n_pairs;
  logic [$clog2(N_EXAMPLES)-1:0]   ex_slot;
  logic [$clog2(N_DEFS)-1:0]       def_idx;
  logic line_start, line_done, pair_start, pair_done, def_start, def_done;
  logic score_start, score_done, coord_clear;
  fp_t  score;

  major_fsm u_major (
    .clk, .rst, .train, .recognize, .n_points, .phase, .n_lines, .n_pairs,
    .ex_slot, .def_idx, .def_valid, .line_start, .line_done, .pair_start,
    .pair_done, .def_start, .def_done, .score_start, .score_done, .score,
    .coord_clear, .selector, .enable, .best_score, .examples_held
  );

  // ---- shared floating point ALU ----
  alu_req_t req_line, req_pair, req_def, req_score, req;
  alu_rsp_t rsp;

  always_comb begin
    if (req_line.go)       req = req_line;
    else if (req_pair.go)  req = req_pair;
    else if (req_def.go)   req = req_def;
    else                   req = req_score;
  end

  float_alu #(.DIV_QBITS(DIV_QBITS), .SQRT_ITERS(SQRT_ITERS)) u_alu (
    .clk, .rst, .go(req.go), .alufn(req.fn), .a(req.a), .b(req.b),
    .o(rsp.o), .done(rsp.done)
  );

  a_one_requester: assert property (@(posedge clk) disable iff (rst)
      $onehot0({req_line.go, req_pair.go, req_def.go, req_score.go}))
    else $error("ai_module: two workers use the ALU at once");

  // ---- SRAM 1: coordinates ----
  logic [$clog2(MAX_POINTS)-1:0] c_addr;
  point_t                        c_data;
  coord_mem u_coord (
    .clk, .rst, .in_valid(coord_valid), .in_pt(coord), .clear(coord_clear),
    .n_points, .rd_addr(c_addr), .rd_data(c_data)
  );

  // ---- SRAM 2: lines ----
  logic                         l_we;
  logic [$clog2(MAX_LINES)-1:0] l_waddr, l_raddr;
  line_t                        l_wdata, l_rdata;
  lines_mem u_lines (
    .clk, .we(l_we), .wr_addr(l_waddr), .wr_data(l_wdata),
    .rd_addr(l_raddr), .rd_data(l_rdata)
  );

  // ---- SRAM 3: line pairs ----
  logic                          lp_we;
  logic [$clog2(MAX_PAIRS)-1:0]  lp_wpair, def_rpair, sc_rpair;
  logic [1:0]                    lp_wprop, def_rprop, sc_rprop;
  fp_t                           lp_wdata, lp_rdata;
  logic [$clog2(N_EXAMPLES)-1:0] def_rex;
  linepairs_mem u_pairs (
    .clk, .we(lp_we), .wr_ex(ex_slot), .wr_pair(lp_wpair), .wr_prop(lp_wprop),
    .wr_data(lp_wdata),
    .rd_ex  (phase == PH_DEF ? def_rex   : ex_slot),
    .rd_pair(phase == PH_DEF ? def_rpair : sc_rpair),
    .rd_prop(phase == PH_DEF ? def_rprop : sc_rprop),
    .rd_data(lp_rdata)
  );

  // ---- SRAM 4: definitions, one copy per stored shape ----
  logic                         d_we;
  logic [$clog2(MAX_PAIRS)-1:0] d_wpair;
  logic [1:0]                   d_wprop;
  def_t                         d_wdata;
  def_t                         d_rdata [N_DEFS];

  for (genvar g = 0; g < N_DEFS; g++) begin : g_def
    definitions_mem u_def (
      .clk, .rst, .we(d_we && def_idx == g), .wr_pair(d_wpair), .wr_prop(d_wprop),
      .wr_data(d_wdata), .rd_pair(sc_rpair), .rd_prop(sc_rprop),
      .rd_data(d_rdata[g]), .valid(def_valid[g])
    );
  end

  // ---- workers ----
  logic                         seg_req, seg_done;
  logic [$clog2(MAX_LINES)-1:0] seg_i, seg_j;
  fp_t                          seg_len, seg_ang;

  line_fsm u_line (
    .clk, .rst, .start(line_start), .n_lines, .done(line_done),
    .seg_req, .seg_i, .seg_j, .seg_done, .seg_len, .seg_ang,
    .c_addr, .c_data, .l_we, .l_addr(l_waddr), .l_data(l_wdata),
    .alu_req(req_line), .alu_rsp(rsp)
  );

  linepair_fsm u_pair (
    .clk, .rst, .start(pair_start), .n_lines, .done(pair_done),
    .l_addr(l_raddr), .l_data(l_rdata),
    .seg_req, .seg_i, .seg_j, .seg_done, .seg_len, .seg_ang,
    .lp_we, .lp_pair(lp_wpair), .lp_prop(lp_wprop), .lp_data(lp_wdata),
    .alu_req(req_pair), .alu_rsp(rsp)
  );

  definition_fsm u_defn (
    .clk, .rst, .start(def_start), .n_pairs, .done(def_done),
    .r_ex(def_rex), .r_pair(def_rpair), .r_prop(def_rprop), .r_data(lp_rdata),
    .d_we, .d_pair(d_wpair), .d_prop(d_wprop), .d_data(d_wdata),
    .alu_req(req_def), .alu_rsp(rsp)
  );

  score_calculator u_score (
    .clk, .rst, .start(score_start), .n_pairs, .done(score_done), .score,
    .r_pair(sc_rpair), .r_prop(sc_rprop), .lp_data(lp_rdata),
    .def_data(d_rdata[def_idx]), .alu_req(req_score), .alu_rsp(rsp)
  );

endmodule
