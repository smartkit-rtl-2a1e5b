// tb_score_calculator: self-checking test of the Score Calculator with the
// real floating point ALU and models of the Line Pairs and Definitions
// memories (synchronous read, same index). For several drawings and
// definitions of random values (some values inside mean +- std, some
// outside, some on the boundary) the reported score must equal the sum of
// (v - mean)^2 over the values with |v - mean| > std, to 1e-4 relative.
// n_pairs = 0 must give 0. Both the "inside" and "outside" cases must occur.
module tb_score_calculator;
  import smartkit_pkg::*;
  import tb_fp_pkg::*;
  logic clk = 0, rst = 1, start = 0, done;
  logic [$clog2(MAX_PAIRS+1)-1:0] n_pairs = 0;
  fp_t score;
  logic [$clog2(MAX_PAIRS)-1:0] r_pair;
  logic [1:0] r_prop;
  fp_t lp_data = 0;
  def_t def_data = '0;
  alu_req_t alu_req;
  alu_rsp_t alu_rsp;
  int checks = 0, failures = 0, n_in = 0, n_out = 0;
  fp_t lp [MAX_PAIRS][4];
  def_t df [MAX_PAIRS][4];
  always #5 clk = ~clk;

  score_calculator dut (.clk, .rst, .start, .n_pairs, .done, .score, .r_pair, .r_prop, .lp_data,
                        .def_data, .alu_req, .alu_rsp);
  float_alu alu (.clk, .rst, .go(alu_req.go), .alufn(alu_req.fn), .a(alu_req.a), .b(alu_req.b),
                 .o(alu_rsp.o), .done(alu_rsp.done));

  always @(posedge clk) begin
    lp_data  <= lp[r_pair][r_prop];
    def_data <= df[r_pair][r_prop];
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int run = 0; run < 12; run++) begin
      automatic int np = (run == 0) ? 0 : (run < 3) ? MAX_PAIRS : 1 + $urandom % MAX_PAIRS;
      automatic real want = 0.0;
      for (int p = 0; p < MAX_PAIRS; p++)
        for (int q = 0; q < 4; q++) begin
          automatic real m = (real'($urandom % 2000) - 1000.0) / 10.0;
          automatic real s = real'($urandom % 500) / 100.0;
          automatic int kind = $urandom % 3;
          automatic real v = (kind == 0) ? m + (real'($urandom % 100) / 100.0) * s * ((($urandom % 2) == 0) ? 1.0 : -1.0)
                           : (kind == 1) ? m + s + 0.5 + real'($urandom % 1000) / 50.0
                           : m - s - 0.5 - real'($urandom % 1000) / 50.0;
          lp[p][q] = r2f(v);
          df[p][q].mean = r2f(m);
          df[p][q].std = r2f(s);
          if (p < np) begin
            automatic real d = f2r(lp[p][q]) - f2r(df[p][q].mean);
            if (rabs(d) > f2r(df[p][q].std)) begin want += d * d; n_out++; end
            else n_in++;
          end
        end
      n_pairs = 5'(np);
      start = 1;
      @(posedge clk); #1 start = 0;
      fork
        @(posedge clk iff done);
        repeat (200 * 4 * MAX_PAIRS) @(posedge clk);
      join_any
      disable fork;
      check(done, "done");
      check(close(f2r(score), want, 1e-4, 1e-3), $sformatf("score %f want %f (n_pairs %0d)", f2r(score), want, np));
      #1;
    end
    check(n_in > 0 && n_out > 0, "inside and outside cases");
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
