// float_mul: IEEE-754 single-precision multiplier, one of the floating point
// ALU's operation FSMs.
//
// The 24-bit significands are multiplied with the integer multiply operator,
// the exponents are added and rebiased, and the 48-bit product is normalised
// by at most one place. The result is truncated. Zero or denormal operands
// give zero, exponent overflow gives infinity and underflow gives zero; an
// infinite or NaN operand yields NaN unless the other operand is zero
// (own simplifications).
//
// Interface: pulse go with a and b valid; done pulses three cycles later
// (go, MUL, NORM, then done) and o holds the product until the next go.
module float_mul
  import smartkit_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic go,
  input  fp_t  a,
  input  fp_t  b,
  output fp_t  o,
  output logic done
);

  typedef enum logic [1:0] {S_IDLE, S_MUL, S_NORM} state_e;
  state_e state;

  fp_t               ra, rb;
  logic [47:0]       prod;
  logic signed [10:0] e_sum;
  logic              s_res, zero, special;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      done  <= 1'b0;
      o     <= FP_ZERO;
      ra <= '0; rb <= '0; prod <= '0; e_sum <= '0;
      s_res <= 1'b0; zero <= 1'b0; special <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (go) begin
          ra    <= a;
          rb    <= b;
          state <= S_MUL;
        end
        S_MUL: begin
          prod    <= {24'd0, 1'b1, ra[22:0]} * {24'd0, 1'b1, rb[22:0]};
          e_sum   <= 11'(ra[30:23]) + 11'(rb[30:23]) - 11'sd127;
          s_res   <= ra[31] ^ rb[31];
          zero    <= fp_is_zero(ra) || fp_is_zero(rb);
          special <= ra[30:23] == 8'hFF || rb[30:23] == 8'hFF;
          state   <= S_NORM;
        end
        S_NORM: begin
          automatic logic signed [10:0] e = prod[47] ? e_sum + 11'sd1 : e_sum;
          state <= S_IDLE;
          done  <= 1'b1;
          if (zero)             o <= {s_res, 31'd0};
          else if (special)     o <= FP_NAN;
          else if (e >= 11'sd255) o <= {s_res, FP_INF[30:0]};
          else if (e <= 11'sd0) o <= {s_res, 31'd0};
          else if (prod[47])    o <= {s_res, e[7:0], prod[46:24]};
          else                  o <= {s_res, e[7:0], prod[45:23]};
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
