// major_fsm: the Major FSM at the top of the AI module; it sets the order of
// operation of the worker FSMs.
//
// Training (rising edge of the train switch): the Line FSM and then the
// Line Pair FSM run on the drawing in the coordinate memory, whose four
// values go to example slot ex_cnt of the Line Pairs memory. After the
// N_EXAMPLES-th example the Definition FSM turns the set into a definition
// in the next Definitions copy (round robin over the N_DEFS copies), and
// the example count restarts.
// Recognition (rising edge of the recognize switch): Line and Line Pair run
// once, into the next free example slot so a training set in progress is
// kept; the Score Calculator then compares the drawing with every trained
// definition in turn, and the lowest score selects the shape. selector and
// enable go to the display; enable falls when a new recognition starts.
// After each drawing the coordinate memory is cleared for the next one.
// The sequence is the document's; the switch edges, the slot and copy
// bookkeeping and the clearing are this design's own.
//
// Timing: a training example or a recognition takes a few thousand cycles
// per stroke pair, set by the workers.
module major_fsm
  import smartkit_pkg::*;
(
  input  logic                            clk,
  input  logic                            rst,
  input  logic                            train,        // switch level
  input  logic                            recognize,    // switch level
  input  logic [$clog2(MAX_POINTS):0]     n_points,
  output phase_e                          phase,
  output logic [$clog2(MAX_LINES):0]      n_lines,
  output logic [$clog2(MAX_PAIRS+1)-1:0]  n_pairs,
  output logic [$clog2(N_EXAMPLES)-1:0]   ex_slot,
  output logic [$clog2(N_DEFS)-1:0]       def_idx,
  input  logic [N_DEFS-1:0]               def_valid,
  output logic                            line_start,
  input  logic                            line_done,
  output logic                            pair_start,
  input  logic                            pair_done,
  output logic                            def_start,
  input  logic                            def_done,
  output logic                            score_start,
  input  logic                            score_done,
  input  fp_t                             score,
  output logic                            coord_clear,
  output logic [1:0]                      selector,
  output logic                            enable,
  output fp_t                             best_score,
  output logic [$clog2(N_EXAMPLES)-1:0]   examples_held
);

  typedef enum logic [3:0] {
    S_IDLE, S_LINE, S_PAIR, S_DEF, S_SCORE_NEXT, S_SCORE, S_RESULT, S_CLEAR
  } state_e;

  state_e state;
  logic   train_q, recog_q, mode_train;
  logic [$clog2(N_EXAMPLES)-1:0] ex_cnt;
  logic [$clog2(N_DEFS)-1:0]     def_next, d;
  logic                          best_valid;
  logic [$clog2(N_DEFS)-1:0]     best_sel;

  assign ex_slot       = ex_cnt;
  assign examples_held = ex_cnt;
  assign def_idx       = (state == S_DEF) ? def_next : d;

  always_comb begin
    unique case (state)
      S_LINE:  phase = PH_LINE;
      S_PAIR:  phase = PH_PAIR;
      S_DEF:   phase = PH_DEF;
      S_SCORE_NEXT, S_SCORE, S_RESULT: phase = PH_SCORE;
      default: phase = PH_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      train_q <= 1'b0; recog_q <= 1'b0; mode_train <= 1'b0;
      ex_cnt <= '0; def_next <= '0; d <= '0;
      n_lines <= '0; n_pairs <= '0;
      line_start <= 1'b0; pair_start <= 1'b0; def_start <= 1'b0; score_start <= 1'b0;
      coord_clear <= 1'b0;
      selector <= '0; enable <= 1'b0; best_score <= FP_ZERO;
      best_valid <= 1'b0; best_sel <= '0;
    end else begin
      train_q <= train;
      recog_q <= recognize;
      line_start <= 1'b0; pair_start <= 1'b0; def_start <= 1'b0; score_start <= 1'b0;
      coord_clear <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if ((train && !train_q) || (recognize && !recog_q)) begin
            automatic logic [$clog2(MAX_LINES):0] nl = n_points[$clog2(MAX_POINTS):1];
            mode_train <= train && !train_q;
            n_lines    <= nl;
            n_pairs    <= ($clog2(MAX_PAIRS+1))'((32'(nl) * (32'(nl) - 1)) / 2);
            line_start <= 1'b1;
            if (!(train && !train_q)) enable <= 1'b0;
            state      <= S_LINE;
          end
        end
        S_LINE: if (line_done) begin
          pair_start <= 1'b1;
          state      <= S_PAIR;
        end
        S_PAIR: if (pair_done) begin
          if (mode_train) begin
            if (32'(ex_cnt) == N_EXAMPLES - 1) begin
              def_start <= 1'b1;
              state     <= S_DEF;
            end else begin
              ex_cnt <= ex_cnt + 1'b1;
              state  <= S_CLEAR;
            end
          end else begin
            d          <= '0;
            best_valid <= 1'b0;
            state      <= S_SCORE_NEXT;
          end
        end
        S_DEF: if (def_done) begin
          def_next <= def_next + 1'b1;
          ex_cnt   <= '0;
          state    <= S_CLEAR;
        end
        S_SCORE_NEXT: begin
          if (def_valid[d]) begin
            score_start <= 1'b1;
            state       <= S_SCORE;
          end else if (32'(d) == N_DEFS - 1) begin
            state <= S_RESULT;
          end else begin
            d <= d + 1'b1;
          end
        end
        S_SCORE: if (score_done) begin
          if (!best_valid || fp_lt(score, best_score)) begin
            best_valid <= 1'b1;
            best_score <= score;
            best_sel   <= d;
          end
          if (32'(d) == N_DEFS - 1) state <= S_RESULT;
          else begin
            d     <= d + 1'b1;
            state <= S_SCORE_NEXT;
          end
        end
        S_RESULT: begin
          selector <= 2'(best_sel);
          enable   <= best_valid;
          state    <= S_CLEAR;
        end
        S_CLEAR: begin
          coord_clear <= 1'b1;
          state       <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
