// float_sub: IEEE-754 single-precision subtractor, one of the floating point
// ALU's operation FSMs.
//
// a - b is formed as a + (-b): the sign of b is inverted when the operands
// are latched and the rest of the work is the adder's (own choice; the
// design only names a separate subtract unit). Handshake and timing are
// those of float_add: go for one cycle, done four cycles later, o held.
module float_sub
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

  fp_t b_neg;
  assign b_neg = fp_neg(b);

  float_add u_add (
    .clk, .rst, .go, .a, .b(b_neg), .o, .done
  );

endmodule
