// tb_float_sqrt: self-checking test of the Newton square-root FSM. The add,
// multiply and divide requests it issues are answered by a behavioural
// model in this testbench (real arithmetic, fixed answer delay), so the
// test exercises only the iteration sequence. Checks: the root against
// sqrt(), the number of requests (4 per iteration, 32 iterations) and the
// special cases zero and negative.
module tb_float_sqrt;
  import tb_fp_pkg::*;
  import smartkit_pkg::*;
  logic clk = 0, rst = 1, go = 0, done;
  fp_t a, o;
  alu_req_t req;
  alu_rsp_t rsp;
  int checks = 0, failures = 0, nreq = 0;
  always #5 clk = ~clk;

  float_sqrt dut (.clk, .rst, .go, .a, .o, .done, .op_req(req), .op_rsp(rsp));

  // behavioural arithmetic unit: answers three cycles after a request
  always @(posedge clk) begin
    rsp.done <= 1'b0;
    if (req.go) begin
      automatic real x = f2r(req.a), y = f2r(req.b), r;
      nreq++;
      case (req.fn)
        FN_ADD: r = x + y;
        FN_SUB: r = x - y;
        FN_MUL: r = x * y;
        FN_DIV: r = x / y;
        default: r = 0.0;
      endcase
      repeat (2) @(posedge clk);
      rsp.o    <= r2f(r);
      rsp.done <= 1'b1;
    end
  end

  task automatic run(real x);
    a = r2f(x);
    nreq = 0;
    @(negedge clk) go = 1;
    @(negedge clk) go = 0;
    while (!done) @(negedge clk);
    checks++;
    if (x > 0.0) begin
      if (!close(f2r(o), $sqrt(f2r(a)), 1e-6)) begin
        failures++; $display("FAIL sqrt(%g) = %g", f2r(a), f2r(o));
      end
      checks++;
      if (nreq != 128) begin failures++; $display("FAIL %0d requests", nreq); end
    end else if (x == 0.0) begin
      if (o != 0) begin failures++; $display("FAIL sqrt(0) = %h", o); end
    end else begin
      if (o[30:23] != 8'hFF || o[22:0] == 0) begin failures++; $display("FAIL sqrt(neg) = %h", o); end
    end
  endtask

  initial begin
    rsp = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    run(2.0); run(144.0); run(0.25); run(0.0); run(-4.0); run(12345.678); run(3.0e-3);
    for (int i = 0; i < 20; i++) run(real'($urandom % 1000000) / 100.0 + 0.01);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
