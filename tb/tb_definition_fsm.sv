// tb_definition_fsm: self-checking test of the Definition FSM with the real
// floating point ALU and a model of the Line Pairs memory (synchronous
// read) holding four example drawings of random values. For several values
// of n_pairs (0, 1, random, 28) every (pair, value) entry must be written
// exactly once, with mean and population standard deviation of the four
// examples matching a double-precision reference (relative 1e-4, absolute
// 1e-4 below magnitude 1); done must pulse once. Entries whose four
// examples are equal (deviation 0) are included.
module tb_definition_fsm;
  import smartkit_pkg::*;
  import tb_fp_pkg::*;
  logic clk = 0, rst = 1, start = 0, done;
  logic [$clog2(MAX_PAIRS+1)-1:0] n_pairs = 0;
  logic [$clog2(N_EXAMPLES)-1:0] r_ex;
  logic [$clog2(MAX_PAIRS)-1:0] r_pair, d_pair;
  logic [1:0] r_prop, d_prop;
  fp_t r_data = 0;
  logic d_we;
  def_t d_data;
  alu_req_t alu_req;
  alu_rsp_t alu_rsp;
  int checks = 0, failures = 0, n_done = 0, n_zero_std = 0;
  fp_t lp [N_EXAMPLES][MAX_PAIRS][4];
  int written [MAX_PAIRS][4];
  def_t got [MAX_PAIRS][4];
  always #5 clk = ~clk;

  definition_fsm dut (.clk, .rst, .start, .n_pairs, .done, .r_ex, .r_pair, .r_prop, .r_data,
                      .d_we, .d_pair, .d_prop, .d_data, .alu_req, .alu_rsp);
  float_alu alu (.clk, .rst, .go(alu_req.go), .alufn(alu_req.fn), .a(alu_req.a), .b(alu_req.b),
                 .o(alu_rsp.o), .done(alu_rsp.done));

  always @(posedge clk) r_data <= lp[r_ex][r_pair][r_prop];

  always @(posedge clk) if (!rst) begin
    if (done) n_done++;
    if (d_we) begin written[d_pair][d_prop]++; got[d_pair][d_prop] = d_data; end
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int run = 0; run < 5; run++) begin
      automatic int np = (run == 0) ? 0 : (run == 1) ? 1 : (run == 2) ? MAX_PAIRS : 1 + $urandom % MAX_PAIRS;
      for (int p = 0; p < MAX_PAIRS; p++)
        for (int q = 0; q < 4; q++) begin
          automatic real base = (real'($urandom % 4000) - 2000.0) / 10.0;
          automatic bit same = ($urandom % 8) == 0;
          written[p][q] = 0;
          for (int e = 0; e < N_EXAMPLES; e++)
            lp[e][p][q] = r2f(same ? base : base + (real'($urandom % 2000) - 1000.0) / 100.0);
        end
      n_done = 0;
      n_pairs = 5'(np);
      start = 1;
      @(posedge clk); #1 start = 0;
      fork
        @(posedge clk iff done);
        repeat (4000 * 4 * MAX_PAIRS) @(posedge clk);
      join_any
      disable fork;
      repeat (3) @(posedge clk);
      #1;
      check(n_done == 1, $sformatf("done pulsed %0d times", n_done));
      for (int p = 0; p < MAX_PAIRS; p++)
        for (int q = 0; q < 4; q++) begin
          if (p < np) begin
            automatic real m = 0.0, v = 0.0;
            for (int e = 0; e < N_EXAMPLES; e++) m += f2r(lp[e][p][q]);
            m /= real'(N_EXAMPLES);
            for (int e = 0; e < N_EXAMPLES; e++) v += (f2r(lp[e][p][q]) - m) * (f2r(lp[e][p][q]) - m);
            v = $sqrt(v / real'(N_EXAMPLES));
            if (v == 0.0) n_zero_std++;
            check(written[p][q] == 1, $sformatf("entry %0d.%0d written %0d times", p, q, written[p][q]));
            check(close(f2r(got[p][q].mean), m, 1e-4, 1.0),
                  $sformatf("mean %0d.%0d got %f want %f", p, q, f2r(got[p][q].mean), m));
            check(close(f2r(got[p][q].std), v, 1e-4, 1.0),
                  $sformatf("std %0d.%0d got %f want %f", p, q, f2r(got[p][q].std), v));
          end else begin
            check(written[p][q] == 0, $sformatf("entry %0d.%0d beyond n_pairs written", p, q));
          end
        end
    end
    check(n_zero_std > 0, "no entry with equal examples");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
