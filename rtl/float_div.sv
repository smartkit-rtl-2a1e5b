// float_div: IEEE-754 single-precision divider, one of the floating point
// ALU's operation FSMs.
//
// The quotient significand is found by restoring long division, one quotient
// bit per clock: each cycle the divisor significand is compared with the
// running remainder, subtracted if it fits, and the remainder is shifted one
// place against the divisor. The document gives this bit-serial scheme and
// a fixed 23 clock cycles, one per mantissa bit, which is the default of
// QBITS. With QBITS = 23 the quotient carries 22 or 23 significant bits; the
// missing low bits are zero (truncation). The exponent is ea - eb + 127,
// lowered by one when the quotient is below 1.
//
// Special cases follow the document: a zero dividend gives zero and a zero
// divisor gives +infinity. Exponent overflow gives infinity, underflow zero.
//
// Interface: pulse go with a and b valid; done pulses QBITS + 3 cycles after
// go (one setup cycle, QBITS division cycles, one normalise cycle) and o
// holds the quotient until the next go.
module float_div
  import smartkit_pkg::*;
#(
  parameter int unsigned QBITS = 23   // quotient bits, one per clock
) (
  input  logic clk,
  input  logic rst,
  input  logic go,
  input  fp_t  a,
  input  fp_t  b,
  output fp_t  o,
  output logic done
);

  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_DIVIDE, S_NORM} state_e;
  state_e state;

  fp_t               ra, rb;
  logic [24:0]       rem;
  logic [23:0]       dvs;
  logic [QBITS-1:0]  q;
  logic [5:0]        cnt;
  logic signed [10:0] e_q;

  // quotient bits below the leading one, left-aligned into 24 bits
  logic [47:0] q_wide;
  assign q_wide = {q, {(48 - QBITS){1'b0}}};

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      done  <= 1'b0;
      o     <= FP_ZERO;
      ra <= '0; rb <= '0; rem <= '0; dvs <= '0; q <= '0; cnt <= '0; e_q <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (go) begin
          ra    <= a;
          rb    <= b;
          state <= S_SETUP;
        end
        S_SETUP: begin
          rem   <= {1'b0, 1'b1, ra[22:0]};
          dvs   <= {1'b1, rb[22:0]};
          q     <= '0;
          cnt   <= '0;
          e_q   <= 11'(ra[30:23]) - 11'(rb[30:23]) + 11'sd127;
          state <= S_DIVIDE;
        end
        S_DIVIDE: begin
          if (rem >= {1'b0, dvs}) begin
            q   <= {q[QBITS-2:0], 1'b1};
            rem <= (rem - {1'b0, dvs}) << 1;
          end else begin
            q   <= {q[QBITS-2:0], 1'b0};
            rem <= rem << 1;
          end
          cnt <= cnt + 6'd1;
          if (cnt == 6'(QBITS - 1)) state <= S_NORM;
        end
        S_NORM: begin
          automatic logic signed [10:0] e = q[QBITS-1] ? e_q : e_q - 11'sd1;
          state <= S_IDLE;
          done  <= 1'b1;
          if (fp_is_zero(ra))      o <= FP_ZERO;
          else if (fp_is_zero(rb)) o <= FP_INF;
          else if (e >= 11'sd255)  o <= {ra[31] ^ rb[31], FP_INF[30:0]};
          else if (e <= 11'sd0)    o <= {ra[31] ^ rb[31], 31'd0};
          else if (q[QBITS-1])     o <= {ra[31] ^ rb[31], e[7:0], q_wide[46:24]};
          else                     o <= {ra[31] ^ rb[31], e[7:0], q_wide[45:23]};
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
