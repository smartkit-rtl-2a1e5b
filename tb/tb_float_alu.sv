// tb_float_alu: self-checking test of the floating point ALU: every alufn
// value on random operands, compared with real arithmetic, with the go to
// done latency checked for the single-cycle-issue operations (add/sub 5,
// multiply 4, divide 27 cycles) and the square root routed through the
// shared units.
module tb_float_alu;
  import tb_fp_pkg::*;
  import smartkit_pkg::*;
  logic clk = 0, rst = 1, go = 0, done;
  fp_t a, b, o;
  alufn_e fn;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  float_alu dut (.clk, .rst, .go, .alufn(fn), .a, .b, .o, .done);

  task automatic run(alufn_e f, real x, real y);
    real want;
    int  cyc, lat;
    fn = f; a = r2f(x); b = r2f(y);
    case (f)
      FN_ADD:  begin want = f2r(a) + f2r(b); lat = 5;  end
      FN_SUB:  begin want = f2r(a) - f2r(b); lat = 5;  end
      FN_MUL:  begin want = f2r(a) * f2r(b); lat = 4;  end
      FN_DIV:  begin want = f2r(a) / f2r(b); lat = 27; end
      default: begin want = $sqrt(rabs(f2r(a))); lat = 0; a[31] = 1'b0; end
    endcase
    @(negedge clk) go = 1;
    @(negedge clk) go = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (!close(f2r(o), want, 1e-6, 1e-3)) begin
      failures++; $display("FAIL fn=%0d %g %g -> %g want %g", f, f2r(a), f2r(b), f2r(o), want);
    end
    if (lat != 0) begin
      checks++;
      if (cyc != lat) begin failures++; $display("FAIL fn=%0d latency %0d", f, cyc); end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 200; i++) begin
      real x, y;
      x = (real'($urandom % 20000) - 10000.0) / 13.0;
      y = (real'($urandom % 20000) - 10000.5) / 17.0;
      run(alufn_e'(i % 5), x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
