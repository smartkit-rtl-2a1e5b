// float_sqrt: IEEE-754 single-precision square root, the fifth operation of
// the floating point ALU.
//
// As in the document, the root is not computed by a unit of its own but by
// Newton's method on x^2 - A = 0 with the other operations:
//     x1 = (x0 * x0 + A) / (x0 + x0)
// starting from x0 = A and repeated ITERS (32) times. Each iteration issues
// four requests on the op_* port, which the ALU routes to its multiplier,
// adder and divider: x0*x0, +A, x0+x0 and the division. A zero operand gives
// zero and a negative one NaN (own choice).
//
// Interface: pulse go with a valid; done pulses when the last iteration has
// finished and o holds the root until the next go. The latency is ITERS
// times the sum of one multiply, two adds and one divide plus the request
// overhead, about 1.3k cycles at the defaults.
module float_sqrt
  import smartkit_pkg::*;
#(
  parameter int unsigned ITERS = 32
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     go,
  input  fp_t      a,
  output fp_t      o,
  output logic     done,
  // requests to the shared add / multiply / divide units
  output alu_req_t op_req,
  input  alu_rsp_t op_rsp
);

  typedef enum logic [3:0] {
    S_IDLE, S_SQ, S_SQ_W, S_ADD, S_ADD_W, S_TWO, S_TWO_W, S_DIV, S_DIV_W
  } state_e;
  state_e state;

  fp_t        ra, x, sq, num, den;
  logic [5:0] iter;

  always_comb begin
    op_req = '{go: 1'b0, fn: FN_ADD, a: FP_ZERO, b: FP_ZERO};
    unique case (state)
      S_SQ:  op_req = '{go: 1'b1, fn: FN_MUL, a: x,   b: x};
      S_ADD: op_req = '{go: 1'b1, fn: FN_ADD, a: sq,  b: ra};
      S_TWO: op_req = '{go: 1'b1, fn: FN_ADD, a: x,   b: x};
      S_DIV: op_req = '{go: 1'b1, fn: FN_DIV, a: num, b: den};
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      done  <= 1'b0;
      o     <= FP_ZERO;
      ra <= '0; x <= '0; sq <= '0; num <= '0; den <= '0; iter <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (go) begin
          if (fp_is_zero(a)) begin
            o    <= FP_ZERO;
            done <= 1'b1;
          end else if (a[31]) begin
            o    <= FP_NAN;
            done <= 1'b1;
          end else begin
            ra    <= a;
            x     <= a;
            iter  <= '0;
            state <= S_SQ;
          end
        end
        S_SQ:    state <= S_SQ_W;
        S_SQ_W:  if (op_rsp.done) begin sq  <= op_rsp.o; state <= S_ADD; end
        S_ADD:   state <= S_ADD_W;
        S_ADD_W: if (op_rsp.done) begin num <= op_rsp.o; state <= S_TWO; end
        S_TWO:   state <= S_TWO_W;
        S_TWO_W: if (op_rsp.done) begin den <= op_rsp.o; state <= S_DIV; end
        S_DIV:   state <= S_DIV_W;
        S_DIV_W: if (op_rsp.done) begin
          x    <= op_rsp.o;
          iter <= iter + 6'd1;
          if (iter == 6'(ITERS - 1)) begin
            o     <= op_rsp.o;
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            state <= S_SQ;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
