// float_alu: the floating point ALU at the core of the AI module.
//
// It holds one FSM per operation (add, subtract, multiply, divide, square
// root) and starts the one selected by alufn. The square root unit has no
// arithmetic of its own: while it runs, its requests are routed to the
// shared adder, multiplier and divider, and their answers back to it. This
// sharing follows the document's block diagram; the request/answer bundles
// are this design's own.
//
// Interface: pulse go for one cycle with alufn, a and b valid (b is unused by
// the square root). done pulses for one cycle when the result is ready and o
// holds it until the next result. Latencies: add/sub 5 cycles from go to
// done, multiply 4, divide QBITS + 4, square root about 1.3k cycles. A new go
// must wait for done.
module float_alu
  import smartkit_pkg::*;
#(
  parameter int unsigned DIV_QBITS  = 23,
  parameter int unsigned SQRT_ITERS = 32
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   go,
  input  alufn_e alufn,
  input  fp_t    a,
  input  fp_t    b,
  output fp_t    o,
  output logic   done
);

  alu_req_t sq_req;
  alu_rsp_t sq_rsp;
  alufn_e   fn_q;            // operation in flight

  logic go_add, go_sub, go_mul, go_div, go_sqrt;
  fp_t  op_a, op_b;
  fp_t  o_add, o_sub, o_mul, o_div, o_sqrt;
  logic d_add, d_sub, d_mul, d_div, d_sqrt;

  // operands come from the ALU port or, during a square root, from its FSM
  assign op_a    = sq_req.go ? sq_req.a : a;
  assign op_b    = sq_req.go ? sq_req.b : b;
  assign go_add  = (go && alufn == FN_ADD) || (sq_req.go && sq_req.fn == FN_ADD);
  assign go_sub  = (go && alufn == FN_SUB) || (sq_req.go && sq_req.fn == FN_SUB);
  assign go_mul  = (go && alufn == FN_MUL) || (sq_req.go && sq_req.fn == FN_MUL);
  assign go_div  = (go && alufn == FN_DIV) || (sq_req.go && sq_req.fn == FN_DIV);
  assign go_sqrt = go && alufn == FN_SQRT;

  float_add u_add (.clk, .rst, .go(go_add), .a(op_a), .b(op_b), .o(o_add), .done(d_add));
  float_sub u_sub (.clk, .rst, .go(go_sub), .a(op_a), .b(op_b), .o(o_sub), .done(d_sub));
  float_mul u_mul (.clk, .rst, .go(go_mul), .a(op_a), .b(op_b), .o(o_mul), .done(d_mul));
  float_div #(.QBITS(DIV_QBITS)) u_div (
    .clk, .rst, .go(go_div), .a(op_a), .b(op_b), .o(o_div), .done(d_div)
  );
  float_sqrt #(.ITERS(SQRT_ITERS)) u_sqrt (
    .clk, .rst, .go(go_sqrt), .a, .o(o_sqrt), .done(d_sqrt),
    .op_req(sq_req), .op_rsp(sq_rsp)
  );

  // answers of the shared units go back to the square root FSM
  always_comb begin
    sq_rsp.done = 1'b0;
    sq_rsp.o    = o_add;
    if (fn_q == FN_SQRT) begin
      sq_rsp.done = d_add | d_sub | d_mul | d_div;
      sq_rsp.o    = d_mul ? o_mul : d_div ? o_div : d_sub ? o_sub : o_add;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      fn_q <= FN_ADD;
      o    <= FP_ZERO;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (go) fn_q <= alufn;
      unique case (fn_q)
        FN_ADD:  if (d_add)  begin o <= o_add;  done <= 1'b1; end
        FN_SUB:  if (d_sub)  begin o <= o_sub;  done <= 1'b1; end
        FN_MUL:  if (d_mul)  begin o <= o_mul;  done <= 1'b1; end
        FN_DIV:  if (d_div)  begin o <= o_div;  done <= 1'b1; end
        FN_SQRT: if (d_sqrt) begin o <= o_sqrt; done <= 1'b1; end
        default: ;
      endcase
    end
  end

  // a new operation may only start when none is in flight
  logic busy;
  always_ff @(posedge clk) begin
    if (rst)       busy <= 1'b0;
    else if (go)   busy <= 1'b1;
    else if (done) busy <= 1'b0;
  end
  a_no_overlap: assert property (@(posedge clk) disable iff (rst) go |-> !busy || done)
    else $error("float_alu: go while an operation is in flight");

endmodule
