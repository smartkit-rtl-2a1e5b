// linepair_fsm: the "Line Pair" worker FSM of the AI module.
//
// For every pair of strokes (i, j), i < j, taken in the order
// (0,1), (0,2) .. (0,n-1), (1,2) .. it computes the "four values" that fix
// the position of stroke j relative to stroke i, and writes them to the
// Line Pairs memory in slot ex:
//     value 0: len_j / len_i                   (length ratio of the strokes)
//     value 1: ang_j - ang_i                   (angle between the strokes)
//     value 2: len_k / len_i                   (length ratio of stroke i to the
//                                               imaginary line k from the start
//                                               of i to the start of j)
//     value 3: ang_k - ang_i                   (angle between i and k)
// Angle differences are brought into (-150, 210] by adding or subtracting
// 360. The range is not centred on 0 on purpose: strokes of sketched
// shapes are often parallel (difference 0) or antiparallel (180), and a
// range edge there would make jittered drawings of the same shape give
// values at both ends of the range (e.g. +179 and -179), wrecking the mean
// and deviation. Edges at -150 / 210 are far from the differences of
// triangles, squares and rectangles (0, +-45, +-60, +-90, +-120, +-135,
// 180). The four values and the imaginary line are the document's; which
// length is the numerator, the angle wrap and the pair order are this
// design's choices. Stroke records come from the Lines memory; the length
// and angle of the imaginary line are requested from the Line FSM, and all
// arithmetic uses the shared floating point ALU.
//
// Interface: start pulses with n_lines valid; done pulses after the
// last pair. n_lines < 2 finishes at once.
module linepair_fsm
  import smartkit_pkg::*;
(
  input  logic                           clk,
  input  logic                           rst,
  input  logic                           start,
  input  logic [$clog2(MAX_LINES):0]     n_lines,
  output logic                           done,
  // Lines memory read port
  output logic [$clog2(MAX_LINES)-1:0]   l_addr,
  input  line_t                          l_data,
  // imaginary line from the Line FSM
  output logic                           seg_req,
  output logic [$clog2(MAX_LINES)-1:0]   seg_i,
  output logic [$clog2(MAX_LINES)-1:0]   seg_j,
  input  logic                           seg_done,
  input  fp_t                            seg_len,
  input  fp_t                            seg_ang,
  // Line Pairs memory write port (example slot chosen by the Major FSM)
  output logic                           lp_we,
  output logic [$clog2(MAX_PAIRS)-1:0]   lp_pair,
  output logic [1:0]                     lp_prop,
  output fp_t                            lp_data,
  // shared ALU
  output alu_req_t                       alu_req,
  input  alu_rsp_t                       alu_rsp
);

  typedef enum logic [3:0] {
    S_IDLE, S_RDI, S_RDI2, S_RDJ, S_RDJ2, S_SEG, S_SEGW, S_VAL, S_GO, S_WAIT, S_NEXT
  } state_e;

  state_e state;
  logic [$clog2(MAX_LINES)-1:0] i, j;
  logic [$clog2(MAX_LINES):0]   n_q;
  logic [$clog2(MAX_PAIRS)-1:0] p;
  logic [1:0] prop;
  logic       wrapping;      // the result in flight is a wrap correction
  line_t  li, lj;
  fp_t    klen, kang;
  alufn_e op_fn;
  fp_t    op_a, op_b;

  assign alu_req = '{go: state == S_GO, fn: op_fn, a: op_a, b: op_b};
  assign l_addr  = (state == S_RDI) ? i : j;
  assign seg_req = state == S_SEG;
  assign seg_i   = i;
  assign seg_j   = j;
  assign lp_pair = p;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      done  <= 1'b0;
      lp_we <= 1'b0;
      lp_prop <= '0; lp_data <= '0;
      i <= '0; j <= '0; n_q <= '0; p <= '0; prop <= '0; wrapping <= 1'b0;
      li <= '0; lj <= '0; klen <= '0; kang <= '0;
      op_fn <= FN_ADD; op_a <= '0; op_b <= '0;
    end else begin
      done  <= 1'b0;
      lp_we <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          i   <= '0;
          j   <= 1;
          p   <= '0;
          n_q <= n_lines;
          if (n_lines < 2) done <= 1'b1;
          else             state <= S_RDI;
        end
        S_RDI:  state <= S_RDI2;
        S_RDI2: begin li <= l_data; state <= S_RDJ; end   // read of i is valid
        S_RDJ:  state <= S_RDJ2;
        S_RDJ2: begin lj <= l_data; state <= S_SEG; end
        S_SEG:  state <= S_SEGW;
        S_SEGW: if (seg_done) begin
          klen  <= seg_len;
          kang  <= seg_ang;
          prop  <= 2'd0;
          state <= S_VAL;
        end
        S_VAL: begin
          wrapping <= 1'b0;
          unique case (prop)
            2'd0: begin op_fn <= FN_DIV; op_a <= lj.len; op_b <= li.len; end
            2'd1: begin op_fn <= FN_SUB; op_a <= lj.ang; op_b <= li.ang; end
            2'd2: begin op_fn <= FN_DIV; op_a <= klen;   op_b <= li.len; end
            default: begin op_fn <= FN_SUB; op_a <= kang; op_b <= li.ang; end
          endcase
          state <= S_GO;
        end
        S_GO: state <= S_WAIT;
        S_WAIT: if (alu_rsp.done) begin
          if (prop[0] && !wrapping && fp_lt(FP_WRAP_HI, alu_rsp.o)) begin
            wrapping <= 1'b1;
            op_fn <= FN_SUB; op_a <= alu_rsp.o; op_b <= FP_360;
            state <= S_GO;
          end else if (prop[0] && !wrapping && !fp_lt(FP_WRAP_LO, alu_rsp.o)) begin
            wrapping <= 1'b1;
            op_fn <= FN_ADD; op_a <= alu_rsp.o; op_b <= FP_360;
            state <= S_GO;
          end else begin
            lp_we   <= 1'b1;
            lp_prop <= prop;
            lp_data <= alu_rsp.o;
            prop    <= prop + 2'd1;
            state   <= (prop == 2'd3) ? S_NEXT : S_VAL;
          end
        end
        S_NEXT: begin
          if (32'(i) == 32'(n_q) - 2) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            p <= p + 1'b1;
            if (32'(j) == 32'(n_q) - 1) begin
              i <= i + 1'b1;
              j <= i + 2'd2;
            end else begin
              j <= j + 1'b1;
            end
            state <= S_RDI;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
