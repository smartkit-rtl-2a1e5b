// tb_ai_module: self-checking test of the whole AI module with default
// parameters. Four definitions are trained, each from 4 noisy, scaled and
// shifted drawings of one shape (isosceles right triangle, square,
// equilateral triangle, rectangle), fed as stroke end points followed by a
// train switch edge. Then new noisy drawings of every shape are recognised.
// For each recognition: selector must name the shape's definition, enable
// must be 1. Where the reference is not ambiguous (no angle value near the
// edges of the wrap range) selector must match the double-precision reference of
// tb_ai_model_pkg, and best_score its score against the chosen definition
// (5 % relative or 3.0 absolute: the hardware's 1/256 angle table and
// truncating arithmetic can move a value across a std boundary).
// The test also checks examples_held after each example, def_valid after
// each set, and that a partly trained set survives a recognition.
module tb_ai_module;
  import smartkit_pkg::*;
  import tb_fp_pkg::*;
  import tb_ai_model_pkg::*;
  logic clk = 0, rst = 1, train = 0, recognize = 0, coord_valid = 0, enable;
  point_t coord = '0;
  logic [1:0] selector;
  fp_t best_score;
  phase_e phase;
  logic [N_DEFS-1:0] def_valid;
  logic [$clog2(N_EXAMPLES)-1:0] examples_held;
  int checks = 0, failures = 0, n_recognised = 0, n_compared = 0;
  tb_ai_model_pkg::def_t defs [4];
  always #5 clk = ~clk;

  ai_module dut (.clk, .rst, .train, .recognize, .coord_valid, .coord, .selector, .enable,
                 .best_score, .phase, .def_valid, .examples_held);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", msg); end
  endtask

  task automatic feed(drawing_t d);
    for (int i = 0; i < d.n; i++) begin
      coord.x = 10'(d.x[i]); coord.y = 8'(d.y[i]); coord_valid = 1;
      @(posedge clk); #1 coord_valid = 0;
      repeat ($urandom % 4) @(posedge clk);
      #1;
    end
  endtask

  task automatic run(bit is_train);
    int t = 0;
    if (is_train) train = 1; else recognize = 1;
    while (phase == PH_IDLE && t < 100) begin @(posedge clk); #1; t++; end
    check(phase != PH_IDLE, "run did not start");
    if (phase == PH_IDLE) begin train = 0; recognize = 0; return; end
    t = 0;
    while (phase != PH_IDLE && t < 400000) begin @(posedge clk); #1; t++; end
    check(phase == PH_IDLE, "run did not finish");
    repeat (5) @(posedge clk);
    #1 train = 0; recognize = 0;
    repeat (3) @(posedge clk);
    #1;
  endtask

  function automatic drawing_t example(int shape);
    return draw_shape(shape, 0.8 + real'($urandom % 50) / 100.0, 100 + $urandom % 200, 10 + $urandom % 40, 2);
  endfunction

  task automatic recognise(int shape);
    automatic drawing_t d = example(shape);
    automatic values_t v = values(d);
    automatic real best = -1.0;
    automatic int best_i = -1;
    automatic bit amb;
    feed(d);
    run(0);
    for (int k = 0; k < 4; k++) if (def_valid[k]) begin
      automatic real s = score(v, defs[k]);
      if (best_i < 0 || s < best) begin best = s; best_i = k; end
    end
    check(enable, "enable after recognition");
    check(int'(selector) == shape, $sformatf("shape %0d recognised as %0d", shape, selector));
    amb = v.amb;
    for (int k = 0; k < 4; k++) if (def_valid[k] && defs[k].amb) amb = 1;
    if (!amb) check(int'(selector) == best_i, $sformatf("selector %0d, reference picks %0d", selector, best_i));
    if (!v.amb && !defs[selector].amb) begin
      automatic real want = score(v, defs[selector]);
      n_compared++;
      check(rabs(f2r(best_score) - want) <= 0.05 * want || rabs(f2r(best_score) - want) <= 3.0,
            $sformatf("best score %f, reference %f", f2r(best_score), want));
    end
    if (int'(selector) == shape) n_recognised++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (3) @(posedge clk);
    #1;
    for (int s = 0; s < 4; s++) begin
      values_t ex [4];
      for (int e = 0; e < N_EXAMPLES; e++) begin
        automatic drawing_t d = example(s);
        ex[e] = values(d);
        feed(d);
        run(1);
        check(int'(examples_held) == (e + 1) % N_EXAMPLES, $sformatf("examples held %0d", examples_held));
        if (s == 2 && e == 1) recognise(1);      // recognition in the middle of a set
      end
      defs[s] = make_def(ex);
      check(def_valid == 4'((1 << (s + 1)) - 1), $sformatf("def_valid %b", def_valid));
    end
    for (int r = 0; r < 8; r++) recognise(r % 4);
    check(n_recognised >= 9, "recognitions");
    check(n_compared >= 2, $sformatf("%0d recognitions compared with the reference", n_compared));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #40ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
