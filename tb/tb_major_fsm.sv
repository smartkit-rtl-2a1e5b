// tb_major_fsm: self-checking test of the Major FSM. The worker FSMs are
// modelled in the test: each start is answered with a done after a random
// delay, and the Score Calculator answers with a score taken from a table
// per definition. The test trains 6 sets of 4 examples (so the round-robin
// definition copies wrap) and runs recognitions between them, checking for
// every drawing: a switch edge starts exactly one run (holding the switch
// does not restart), n_lines = points / 2 and n_pairs = n (n - 1) / 2, the
// order Line -> Line Pair -> (Definition | Score per trained definition in
// index order), the example slot of each run, the definition copy written,
// the phase output, coord_clear once at the end, and after a recognition
// selector = index of the lowest score, enable = 1 and best_score = that
// score. enable must fall at the start of the next recognition.
module tb_major_fsm;
  import smartkit_pkg::*;
  import tb_fp_pkg::*;
  logic clk = 0, rst = 1, train = 0, recognize = 0;
  logic [$clog2(MAX_POINTS):0] n_points = 0;
  phase_e phase;
  logic [$clog2(MAX_LINES):0] n_lines;
  logic [$clog2(MAX_PAIRS+1)-1:0] n_pairs;
  logic [$clog2(N_EXAMPLES)-1:0] ex_slot, examples_held;
  logic [$clog2(N_DEFS)-1:0] def_idx;
  logic [N_DEFS-1:0] def_valid = 0;
  logic line_start, line_done = 0, pair_start, pair_done = 0, def_start, def_done = 0;
  logic score_start, score_done = 0, coord_clear, enable;
  fp_t score = 0, best_score;
  logic [1:0] selector;
  int checks = 0, failures = 0;
  int n_clear = 0, n_line_start = 0;
  real score_tab [N_DEFS];
  always #5 clk = ~clk;

  major_fsm dut (.clk, .rst, .train, .recognize, .n_points, .phase, .n_lines, .n_pairs, .ex_slot,
                 .def_idx, .def_valid, .line_start, .line_done, .pair_start, .pair_done, .def_start,
                 .def_done, .score_start, .score_done, .score, .coord_clear, .selector, .enable,
                 .best_score, .examples_held);

  always @(posedge clk) if (!rst) begin
    if (coord_clear) n_clear++;
    if (line_start) n_line_start++;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", msg); end
  endtask

  // wait for a one-clock pulse on sig (sampled after the clock edge)
  task automatic wait_pulse(ref logic sig, input string what);
    int t = 0;
    while (!sig && t < 1000) begin @(posedge clk); #1; t++; end
    check(sig, {what, " never came"});
  endtask

  task automatic answer(ref logic sig);
    repeat (1 + $urandom % 20) @(posedge clk);
    #1 sig = 1;
    @(posedge clk); #1 sig = 0;
  endtask

  int ex_expect = 0, def_expect = 0;

  task automatic drawing(bit is_train, int pts);
    automatic int nl = pts / 2;
    n_points = 5'(pts);
    n_clear = 0; n_line_start = 0;
    if (is_train) train = 1; else recognize = 1;
    @(posedge clk); #1;
    wait_pulse(line_start, "line_start");
    check(phase == PH_LINE, "phase line");
    check(int'(n_lines) == nl && int'(n_pairs) == nl * (nl - 1) / 2,
          $sformatf("n_lines %0d n_pairs %0d for %0d points", n_lines, n_pairs, pts));
    if (!is_train) check(!enable, "enable cleared at recognition start");
    answer(line_done);
    wait_pulse(pair_start, "pair_start");
    check(phase == PH_PAIR, "phase pair");
    check(int'(ex_slot) == ex_expect, $sformatf("example slot %0d expected %0d", ex_slot, ex_expect));
    answer(pair_done);
    if (is_train) begin
      if (ex_expect == N_EXAMPLES - 1) begin
        wait_pulse(def_start, "def_start");
        check(phase == PH_DEF, "phase def");
        check(int'(def_idx) == def_expect, $sformatf("definition copy %0d expected %0d", def_idx, def_expect));
        repeat (3) @(posedge clk);
        #1;
        check(int'(def_idx) == def_expect, "definition copy held");
        def_valid[def_idx] = 1;
        answer(def_done);
        def_expect = (def_expect + 1) % N_DEFS;
        ex_expect = 0;
      end else ex_expect++;
    end else begin
      automatic int best = -1;
      for (int d = 0; d < N_DEFS; d++) if (def_valid[d]) begin
        wait_pulse(score_start, "score_start");
        check(phase == PH_SCORE, "phase score");
        check(int'(def_idx) == d, $sformatf("scored definition %0d expected %0d", def_idx, d));
        score = r2f(score_tab[d]);
        if (best < 0 || score_tab[d] < score_tab[best]) best = d;
        answer(score_done);
      end
      repeat (10) @(posedge clk);
      #1;
      check(enable == (best >= 0), "enable after recognition");
      if (best >= 0) begin
        check(int'(selector) == best, $sformatf("selector %0d expected %0d", selector, best));
        check(best_score == r2f(score_tab[best]), "best score");
      end
    end
    repeat (50) @(posedge clk);
    #1;
    check(n_clear == 1, $sformatf("coord_clear %0d times", n_clear));
    check(n_line_start == 1, $sformatf("%0d runs for one switch edge", n_line_start));
    check(phase == PH_IDLE, "idle after drawing");
    check(int'(examples_held) == ex_expect, "examples held");
    train = 0; recognize = 0;
    repeat (5) @(posedge clk);
    #1;
  endtask

  int n_recog_enabled = 0;
  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (3) @(posedge clk);
    #1;
    drawing(0, 6);                         // recognition with no definition
    check(!enable, "nothing to show without definitions");
    for (int set = 0; set < 6; set++) begin
      for (int e = 0; e < N_EXAMPLES; e++) begin
        drawing(1, 2 * (1 + $urandom % MAX_LINES));
        if (e == 1) begin
          for (int d = 0; d < N_DEFS; d++) score_tab[d] = real'($urandom % 1000) + real'(d) / 8.0;
          drawing(0, 2 * (2 + $urandom % (MAX_LINES - 1)));   // between examples of a set
          if (enable) n_recog_enabled++;
        end
      end
      drawing(0, 16);
      if (enable) n_recog_enabled++;
    end
    check(n_recog_enabled >= 10, "recognitions with a result");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
