// tb_float_mul: self-checking test of the single-precision multiplier. Random
// operands of mixed sign and magnitude, exact cancellation and zero operands
// are compared with real arithmetic; the go-to-done latency is checked to be
// the documented 3 cycles.
module tb_float_mul;
  import tb_fp_pkg::*;
  logic clk = 0, rst = 1, go = 0, done;
  logic [31:0] a, b, o;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  float_mul dut (.clk, .rst, .go, .a, .b, .o, .done);

  function automatic real scale(int unsigned k);
    real r = 1.0 / 1024.0;
    repeat (k) r = r * 2.0;
    return r;
  endfunction

  task automatic run(real x, real y);
    int cyc = 0;
    real want;
    a = r2f(x); b = r2f(y);
    want = f2r(a) * f2r(b);
    @(negedge clk) go = 1;
    @(negedge clk) go = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (!close(f2r(o), want, 2e-7, 1e-30) && !(rabs(want) < 1e-6 * (rabs(f2r(a)) + rabs(f2r(b))) && rabs(f2r(o)) < 1e-5 * (rabs(f2r(a)) + rabs(f2r(b))))) begin
      failures++; $display("FAIL %g * %g = %g want %g", f2r(a), f2r(b), f2r(o), want);
    end
    checks++;
    if (cyc != 3) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    run(1.5, 2.25); run(10.0, -10.0); run(0.0, 3.0); run(-7.0, 0.0);
    run(1.0e6, 1.0e-3); run(-3.75, 1.25); run(123.456, -0.001);
    for (int i = 0; i < 300; i++) begin
      real x, y;
      x = (real'($urandom % 200000) - 100000.0) / 37.0 * scale($urandom % 21);
      y = (real'($urandom % 200000) - 100000.0) / 41.0 * scale($urandom % 21);
      run(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
