// definition_fsm: the "Definition" worker FSM of the AI module.
//
// Once the Line Pairs memory holds the four values of all N_EXAMPLES
// drawings of a training set, it turns them into a definition: for every
// pair p and value q it reads value q of pair p from each example (the
// memory's across-examples order), and computes
//     mean = (v_0 + v_1 + v_2 + v_3) / 4
//     std  = sqrt(((v_0 - mean)^2 + ... + (v_3 - mean)^2) / 4)
// with the shared floating point ALU, then writes {mean, std} to the
// selected copy of the Definitions memory. Mean and standard deviation are
// the document's; using the population form (divide by N, not N-1) is this
// design's choice.
//
// Interface: start pulses with n_pairs valid; done pulses after the last
// entry is written. Each entry takes about 1.5k cycles, mostly the root.
module definition_fsm
  import smartkit_pkg::*;
(
  input  logic                            clk,
  input  logic                            rst,
  input  logic                            start,
  input  logic [$clog2(MAX_PAIRS+1)-1:0]  n_pairs,
  output logic                            done,
  // Line Pairs memory read port
  output logic [$clog2(N_EXAMPLES)-1:0]   r_ex,
  output logic [$clog2(MAX_PAIRS)-1:0]    r_pair,
  output logic [1:0]                      r_prop,
  input  fp_t                             r_data,
  // Definitions memory write port (copy chosen by the Major FSM)
  output logic                            d_we,
  output logic [$clog2(MAX_PAIRS)-1:0]    d_pair,
  output logic [1:0]                      d_prop,
  output def_t                            d_data,
  // shared ALU
  output alu_req_t                        alu_req,
  input  alu_rsp_t                        alu_rsp
);

  localparam fp_t FP_NEX = 32'h4080_0000;   // 4.0 = N_EXAMPLES

  typedef enum logic [2:0] {S_IDLE, S_RD, S_RDW, S_RDV, S_GO, S_WAIT, S_WR} state_e;
  typedef enum logic [2:0] {K_SUM, K_MEAN, K_DIFF, K_SQ, K_ACC, K_VAR, K_STD} step_e;

  state_e state;
  step_e  step;
  logic [$clog2(N_EXAMPLES)-1:0]  e;
  logic [$clog2(N_EXAMPLES):0]    k;     // value index inside the arithmetic
  logic [$clog2(MAX_PAIRS+1)-1:0] n_q;
  logic [$clog2(MAX_PAIRS)-1:0]   p;
  logic [1:0] q;
  fp_t    v [N_EXAMPLES];
  fp_t    acc, mean;
  alufn_e op_fn;
  fp_t    op_a, op_b;

  assign alu_req = '{go: state == S_GO, fn: op_fn, a: op_a, b: op_b};
  assign r_ex    = e;
  assign r_pair  = p;
  assign r_prop  = q;
  assign d_pair  = p;
  assign d_prop  = q;

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
      step  <= K_SUM;
      done  <= 1'b0;
      d_we  <= 1'b0;
      d_data <= '0;
      e <= '0; k <= '0; n_q <= '0; p <= '0; q <= '0; acc <= '0; mean <= '0;
      op_fn <= FN_ADD; op_a <= '0; op_b <= '0;
      for (int x = 0; x < N_EXAMPLES; x++) v[x] <= '0;
    end else begin
      done <= 1'b0;
      d_we <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          p   <= '0;
          q   <= '0;
          e   <= '0;
          n_q <= n_pairs;
          if (n_pairs == 0) done <= 1'b1;
          else              state <= S_RD;
        end
        // gather value q of pair p from every example
        S_RD:  state <= S_RDW;
        S_RDW: state <= S_RDV;
        S_RDV: begin
          v[e] <= r_data;
          if (32'(e) == N_EXAMPLES - 1) begin
            e <= '0;
            k <= 2;
            issue(K_SUM, FN_ADD, v[0], v[1]);
          end else begin
            e     <= e + 1'b1;
            state <= S_RD;
          end
        end
        S_GO: state <= S_WAIT;
        S_WAIT: if (alu_rsp.done) begin
          unique case (step)
            K_SUM:
              if (32'(k) == N_EXAMPLES) begin
                issue(K_MEAN, FN_DIV, alu_rsp.o, FP_NEX);
              end else begin
                k <= k + 1'b1;
                issue(K_SUM, FN_ADD, alu_rsp.o, v[k[$clog2(N_EXAMPLES)-1:0]]);
              end
            K_MEAN: begin
              mean <= alu_rsp.o;
              k    <= '0;
              acc  <= FP_ZERO;
              issue(K_DIFF, FN_SUB, v[0], alu_rsp.o);
            end
            K_DIFF: issue(K_SQ, FN_MUL, alu_rsp.o, alu_rsp.o);
            K_SQ:   issue(K_ACC, FN_ADD, acc, alu_rsp.o);
            K_ACC: begin
              acc <= alu_rsp.o;
              if (32'(k) == N_EXAMPLES - 1) begin
                issue(K_VAR, FN_DIV, alu_rsp.o, FP_NEX);
              end else begin
                k <= k + 1'b1;
                issue(K_DIFF, FN_SUB, v[k[$clog2(N_EXAMPLES)-1:0] + 1'b1], mean);
              end
            end
            K_VAR: issue(K_STD, FN_SQRT, alu_rsp.o, FP_ZERO);
            K_STD: begin
              d_data <= '{mean: mean, std: alu_rsp.o};
              d_we   <= 1'b1;
              state  <= S_WR;
            end
            default: state <= S_IDLE;
          endcase
        end
        S_WR: begin
          e <= '0;
          if (q == 2'd3) begin
            q <= '0;
            if (32'(p) == 32'(n_q) - 1) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              p     <= p + 1'b1;
              state <= S_RD;
            end
          end else begin
            q     <= q + 1'b1;
            state <= S_RD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
