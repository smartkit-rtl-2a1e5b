// score_calculator: the "Score Calculator" worker FSM of the AI module.
//
// It compares the four values of the drawing under recognition (Line Pairs
// memory, slot chosen by the Major FSM) with one definition (one copy of
// the Definitions memory). For every pair p and value q:
//     d = |v - mean|
//     if d > std:  error = error + d * d      (else the error is unchanged)
// The rule is the document's. The error starts at zero and is reported as
// an IEEE single-precision number on score when done pulses. All
// arithmetic uses the shared floating point ALU.
//
// Interface: start pulses with n_pairs valid. The Line Pairs and
// Definitions read ports are addressed with the same (pair, value) index
// and both deliver data one clock after it. n_pairs = 0 gives score 0 at
// once.
module score_calculator
  import smartkit_pkg::*;
(
  input  logic                            clk,
  input  logic                            rst,
  input  logic                            start,
  input  logic [$clog2(MAX_PAIRS+1)-1:0]  n_pairs,
  output logic                            done,
  output fp_t                             score,
  // read index for the Line Pairs memory and the Definitions memory
  output logic [$clog2(MAX_PAIRS)-1:0]    r_pair,
  output logic [1:0]                      r_prop,
  input  fp_t                             lp_data,
  input  def_t                            def_data,
  // shared ALU
  output alu_req_t                        alu_req,
  input  alu_rsp_t                        alu_rsp
);

  typedef enum logic [2:0] {S_IDLE, S_RD, S_RDV, S_GO, S_WAIT, S_NEXT} state_e;
  typedef enum logic [1:0] {K_DIFF, K_SQ, K_ACC} step_e;

  state_e state;
  step_e  step;
  logic [$clog2(MAX_PAIRS+1)-1:0] n_q;
  logic [$clog2(MAX_PAIRS)-1:0]   p;
  logic [1:0] q;
  fp_t    dstd;
  alufn_e op_fn;
  fp_t    op_a, op_b;

  assign alu_req = '{go: state == S_GO, fn: op_fn, a: op_a, b: op_b};
  assign r_pair  = p;
  assign r_prop  = q;

  task automatic issue(step_e s, alufn_e f, fp_t x, fp_t y);
    step  <= s;
    op_fn <= f;
    op_a  <= x;
    op_b  <= y;
    state <= S_GO;
  endtask

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      step  <= K_DIFF;
      done  <= 1'b0;
      score <= FP_ZERO;
      n_q <= '0; p <= '0; q <= '0; dstd <= '0;
      op_fn <= FN_ADD; op_a <= '0; op_b <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          p     <= '0;
          q     <= '0;
          n_q   <= n_pairs;
          score <= FP_ZERO;
          if (n_pairs == 0) done <= 1'b1;
          else              state <= S_RD;
        end
        S_RD: state <= S_RDV;
        S_RDV: begin
          dstd <= def_data.std;
          issue(K_DIFF, FN_SUB, lp_data, def_data.mean);
        end
        S_GO: state <= S_WAIT;
        S_WAIT: if (alu_rsp.done) begin
          unique case (step)
            K_DIFF:
              if (fp_lt(dstd, fp_abs(alu_rsp.o)))
                issue(K_SQ, FN_MUL, alu_rsp.o, alu_rsp.o);
              else
                state <= S_NEXT;
            K_SQ: issue(K_ACC, FN_ADD, score, alu_rsp.o);
            default: begin
              score <= alu_rsp.o;
              state <= S_NEXT;
            end
          endcase
        end
        S_NEXT: begin
          q <= q + 2'd1;
          if (q == 2'd3) begin
            if (32'(p) == 32'(n_q) - 1) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              p     <= p + 1'b1;
              state <= S_RD;
            end
          end else begin
            state <= S_RD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
