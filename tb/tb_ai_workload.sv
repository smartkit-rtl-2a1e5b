// tb_ai_workload: the learner's own demonstration, run on the AI module with
// default parameters. A definition is trained from 4 noisy, scaled and
// shifted drawings of a right-angled isosceles triangle. Then a new drawing
// of a right-angled isosceles triangle and a drawing of a triangle that is not
// right-angled (equilateral) are recognised. Checks: the definition becomes
// valid, both recognitions select definition 0 (it is the only one), each
// error value matches the double-precision reference of tb_ai_model_pkg
// (5 % relative or 3.0 absolute), and the non-right triangle gets a clearly
// larger error than the right-angled one (the near miss is told apart).
// Stimulus is applied 1 time unit after the rising clock edge.
module tb_ai_workload;
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
  int checks = 0, failures = 0;
  real err_hit, err_miss;
  tb_ai_model_pkg::def_t df;
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

  task automatic recognise(int shape, output real err);
    automatic drawing_t d = draw_shape(shape, 0.9 + real'($urandom % 30) / 100.0,
                                       150 + $urandom % 100, 20 + $urandom % 20, 1);
    automatic values_t v = values(d);
    automatic real want = score(v, df);
    feed(d);
    run(0);
    err = f2r(best_score);
    check(enable, "enable after recognition");
    check(selector == 2'd0, $sformatf("selector %0d", selector));
    if (!v.amb && !df.amb)
      check(rabs(err - want) <= 0.05 * want || rabs(err - want) <= 3.0,
            $sformatf("shape %0d error %f, reference %f", shape, err, want));
  endtask

  initial begin
    values_t ex [4];
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (3) @(posedge clk);
    #1;
    for (int e = 0; e < N_EXAMPLES; e++) begin
      automatic drawing_t d = draw_shape(0, 0.8 + real'($urandom % 50) / 100.0,
                                         100 + $urandom % 200, 10 + $urandom % 40, 2);
      ex[e] = values(d);
      feed(d);
      run(1);
    end
    df = make_def(ex);
    check(def_valid == 4'b0001, $sformatf("def_valid %b", def_valid));
    recognise(0, err_hit);
    recognise(2, err_miss);
    $display("error right-angled %f, not right-angled %f", err_hit, err_miss);
    check(err_miss > 10.0 * err_hit + 100.0, "near miss not told apart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
