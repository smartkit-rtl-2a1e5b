// float_add: IEEE-754 single-precision adder, one of the floating point
// ALU's operation FSMs.
//
// It works in the three steps the design calls for: the exponents are
// compared and the smaller operand's significand is shifted right by their
// difference (ALIGN), the significands are added or subtracted (ADD), and the
// sum is normalised (NORM). Three guard bits are carried through the
// alignment; the result is truncated. Denormal inputs count as zero and
// results below the normal range flush to zero (own choices). An infinite or
// NaN operand is passed to the output unchanged.
//
// Interface: pulse go for one cycle with a and b valid; done pulses for one
// cycle four cycles later (go, ALIGN, ADD, NORM, then done) and o holds the
// sum until the next go.
module float_add
  import smartkit_pkg::*;
(
  input  logic clk,
  input  logic rst,     // synchronous, active high
  input  logic go,
  input  fp_t  a,
  input  fp_t  b,
  output fp_t  o,
  output logic done
);

  typedef enum logic [2:0] {S_IDLE, S_ALIGN, S_ADD, S_NORM} state_e;
  state_e state;

  fp_t         ra, rb;
  logic        s_big, s_small;
  logic [7:0]  e_res;
  logic [26:0] m_big, m_small;   // 1.23 significand plus 3 guard bits
  logic [27:0] sum;
  logic        s_res;

  // operand with the larger magnitude goes first
  logic        a_big;
  logic [7:0]  ediff;
  assign a_big = ra[30:0] >= rb[30:0];
  assign ediff = a_big ? ra[30:23] - rb[30:23] : rb[30:23] - ra[30:23];

  function automatic logic [26:0] sig(fp_t v);
    return fp_is_zero(v) ? 27'd0 : {1'b1, v[22:0], 3'b000};
  endfunction

  // leading-zero count of the 28-bit sum
  function automatic int lzc(logic [27:0] v);
    for (int i = 27; i >= 0; i--) if (v[i]) return 27 - i;
    return 28;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      done  <= 1'b0;
      o     <= FP_ZERO;
      ra <= '0; rb <= '0; m_big <= '0; m_small <= '0; sum <= '0;
      e_res <= '0; s_res <= 1'b0; s_big <= 1'b0; s_small <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (go) begin
          ra    <= a;
          rb    <= b;
          state <= S_ALIGN;
        end
        S_ALIGN: begin
          if (ra[30:23] == 8'hFF || rb[30:23] == 8'hFF) begin
            o     <= (ra[30:23] == 8'hFF) ? ra : rb;
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            s_big   <= a_big ? ra[31] : rb[31];
            s_small <= a_big ? rb[31] : ra[31];
            e_res   <= a_big ? ra[30:23] : rb[30:23];
            m_big   <= a_big ? sig(ra) : sig(rb);
            m_small <= (ediff > 8'd26) ? 27'd0 : ((a_big ? sig(rb) : sig(ra)) >> ediff);
            state   <= S_ADD;
          end
        end
        S_ADD: begin
          sum   <= (s_big == s_small) ? {1'b0, m_big} + {1'b0, m_small}
                                      : {1'b0, m_big} - {1'b0, m_small};
          s_res <= s_big;
          state <= S_NORM;
        end
        S_NORM: begin
          state <= S_IDLE;
          done  <= 1'b1;
          if (sum == 28'd0) begin
            o <= FP_ZERO;
          end else if (sum[27]) begin
            o <= (e_res == 8'hFE) ? {s_res, FP_INF[30:0]} : {s_res, e_res + 8'd1, sum[26:4]};
          end else begin
            automatic int          lz = lzc(sum) - 1;   // shift to put the leading 1 at bit 26
            automatic logic [27:0] sh = sum << lz;
            if (int'(e_res) <= lz) o <= FP_ZERO;
            else                   o <= {s_res, e_res - 8'(lz), sh[25:3]};
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
