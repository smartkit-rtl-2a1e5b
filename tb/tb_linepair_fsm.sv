// tb_linepair_fsm: self-checking test of the Line Pair FSM with the real
// floating point ALU, a model of the Lines memory (synchronous read) and a
// model of the Line FSM's imaginary-line service (answers after a random
// delay from a table of random lengths and angles). For drawings of 0 to 8
// strokes the written values must come pair by pair in the order
// (0,1), (0,2) .. (1,2) .., properties 0..3, with
//   len_j/len_i, ang_j-ang_i, len_k/len_i, ang_k-ang_i
// (angles wrapped into (-150, 210]) to 1e-5; the number of writes must be
// 4 n (n-1) / 2 and done must pulse once. Wraps in both directions must
// occur.
module tb_linepair_fsm;
  import smartkit_pkg::*;
  import tb_fp_pkg::*;
  logic clk = 0, rst = 1, start = 0, done;
  logic [$clog2(MAX_LINES):0] n_lines = 0;
  logic [$clog2(MAX_LINES)-1:0] l_addr, seg_i, seg_j;
  line_t l_data = '0;
  logic seg_req, seg_done = 0;
  fp_t seg_len = 0, seg_ang = 0;
  logic lp_we;
  logic [$clog2(MAX_PAIRS)-1:0] lp_pair;
  logic [1:0] lp_prop;
  fp_t lp_data;
  alu_req_t alu_req;
  alu_rsp_t alu_rsp;
  int checks = 0, failures = 0, n_writes = 0, n_done = 0, wrap_pos = 0, wrap_neg = 0;
  int exp_i, exp_j, exp_p, exp_q;
  line_t lines [MAX_LINES];
  real klen [MAX_LINES][MAX_LINES], kang [MAX_LINES][MAX_LINES];
  always #5 clk = ~clk;

  linepair_fsm dut (.clk, .rst, .start, .n_lines, .done, .l_addr, .l_data, .seg_req, .seg_i, .seg_j,
                    .seg_done, .seg_len, .seg_ang, .lp_we, .lp_pair, .lp_prop, .lp_data,
                    .alu_req, .alu_rsp);
  float_alu alu (.clk, .rst, .go(alu_req.go), .alufn(alu_req.fn), .a(alu_req.a), .b(alu_req.b),
                 .o(alu_rsp.o), .done(alu_rsp.done));

  always @(posedge clk) l_data <= lines[l_addr];

  // imaginary-line service
  always @(posedge clk) if (!rst && seg_req) begin
    automatic int i = seg_i, j = seg_j;
    repeat (1 + $urandom % 40) @(posedge clk);
    #1;
    seg_len = r2f(klen[i][j]); seg_ang = r2f(kang[i][j]); seg_done = 1;
    @(posedge clk); #1 seg_done = 0;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", msg); end
  endtask

  function automatic real wrap(real d, bit count);
    if (d > 210.0) begin if (count) wrap_pos++; return d - 360.0; end
    if (d <= -150.0) begin if (count) wrap_neg++; return d + 360.0; end
    return d;
  endfunction

  always @(posedge clk) if (!rst) begin
    if (done) n_done++;
    if (lp_we) begin
      automatic real li = f2r(lines[exp_i].len), ai = f2r(lines[exp_i].ang);
      automatic real want;
      case (exp_q)
        0: want = f2r(lines[exp_j].len) / li;
        1: want = wrap(f2r(lines[exp_j].ang) - ai, 1);
        2: want = f2r(r2f(klen[exp_i][exp_j])) / li;
        default: want = wrap(f2r(r2f(kang[exp_i][exp_j])) - ai, 1);
      endcase
      n_writes++;
      check(int'(lp_pair) == exp_p && int'(lp_prop) == exp_q,
            $sformatf("write pair %0d prop %0d, expected %0d %0d", lp_pair, lp_prop, exp_p, exp_q));
      check(close(f2r(lp_data), want, 1e-5, 1e-4),
            $sformatf("pair (%0d,%0d) prop %0d got %f want %f", exp_i, exp_j, exp_q, f2r(lp_data), want));
      exp_q++;
      if (exp_q == 4) begin
        exp_q = 0; exp_p++;
        exp_j++;
        if (exp_j == n_lines) begin exp_i++; exp_j = exp_i + 1; end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int run = 0; run < 12; run++) begin
      automatic int nl = (run < 3) ? MAX_LINES : run % (MAX_LINES + 1);
      for (int k = 0; k < MAX_LINES; k++) begin
        lines[k].len = r2f(1.0 + real'($urandom % 30000) / 100.0);
        lines[k].ang = r2f(real'($urandom % 36000) / 100.0);
        for (int m = 0; m < MAX_LINES; m++) begin
          klen[k][m] = real'($urandom % 30000) / 100.0;
          kang[k][m] = real'($urandom % 36000) / 100.0;
        end
      end
      exp_i = 0; exp_j = 1; exp_p = 0; exp_q = 0; n_writes = 0; n_done = 0;
      n_lines = 4'(nl);
      start = 1;
      @(posedge clk); #1 start = 0;
      fork
        @(posedge clk iff done);
        repeat (3000 * MAX_PAIRS) @(posedge clk);
      join_any
      disable fork;
      repeat (3) @(posedge clk);
      #1;
      check(n_writes == 4 * nl * (nl - 1) / 2, $sformatf("%0d writes for %0d lines", n_writes, nl));
      check(n_done == 1, $sformatf("done pulsed %0d times", n_done));
    end
    check(wrap_pos > 0 && wrap_neg > 0, $sformatf("wraps %0d / %0d", wrap_pos, wrap_neg));
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
