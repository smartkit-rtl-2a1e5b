// tb_line_fsm: self-checking test of the Line FSM with the real floating
// point ALU and a model of the coordinate memory (synchronous read).
// Several drawings of 1 to 8 strokes are processed; besides random strokes
// they contain horizontal, vertical, zero-length, steep and shallow strokes
// in all four quadrants. Each written length must match sqrt(dx^2 + dy^2) to
// 1e-5 (relative) and each angle atan2(dy, dx) in [0, 360) to 0.15 degree
// (the table has 1/256 steps in the ratio). Then random imaginary-line
// requests (start of stroke i to start of stroke j) are checked the same
// way. Every stroke must be written exactly once, in order, and done must
// follow the last write. Steep strokes and every quadrant must occur.
module tb_line_fsm;
  import smartkit_pkg::*;
  import tb_fp_pkg::*;
  logic clk = 0, rst = 1, start = 0, done;
  logic [$clog2(MAX_LINES):0] n_lines = 0;
  logic seg_req = 0, seg_done;
  logic [$clog2(MAX_LINES)-1:0] seg_i = 0, seg_j = 0;
  fp_t seg_len, seg_ang;
  logic [$clog2(MAX_POINTS)-1:0] c_addr;
  point_t c_data = '0;
  logic l_we;
  logic [$clog2(MAX_LINES)-1:0] l_addr;
  line_t l_data;
  alu_req_t alu_req;
  alu_rsp_t alu_rsp;
  int checks = 0, failures = 0;
  int n_steep = 0, n_quad[4], n_writes = 0, next_line = 0;
  point_t pts [MAX_POINTS];
  always #5 clk = ~clk;

  line_fsm dut (.clk, .rst, .start, .n_lines, .done, .seg_req, .seg_i, .seg_j, .seg_done,
                .seg_len, .seg_ang, .c_addr, .c_data, .l_we, .l_addr, .l_data, .alu_req, .alu_rsp);
  float_alu alu (.clk, .rst, .go(alu_req.go), .alufn(alu_req.fn), .a(alu_req.a), .b(alu_req.b),
                 .o(alu_rsp.o), .done(alu_rsp.done));

  always @(posedge clk) c_data <= pts[c_addr];

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", msg); end
  endtask

  task automatic check_line(point_t a, point_t b, fp_t len, fp_t ang, string what);
    automatic real dx = real'(int'(b.x) - int'(a.x));
    automatic real dy = real'(int'(b.y) - int'(a.y));
    automatic real wl = $sqrt(dx * dx + dy * dy);
    automatic real wa = (dx == 0 && dy == 0) ? 0.0 : $atan2(dy, dx) * 180.0 / 3.14159265358979;
    automatic real ga = f2r(ang);
    automatic real diff;
    if (wa < 0) wa += 360.0;
    diff = rabs(ga - wa);
    if (diff > 180.0) diff = 360.0 - diff;   // 359.95 and 0.0 are neighbours
    check(close(f2r(len), wl, 1e-5, 1e-6), $sformatf("%s length %f want %f", what, f2r(len), wl));
    check(diff <= 0.15 && ga >= 0.0 && ga < 360.0, $sformatf("%s angle %f want %f (d %0f,%0f)", what, ga, wa, dx, dy));
    if (rabs(dy) > rabs(dx)) n_steep++;
    if (dx != 0 || dy != 0) n_quad[(dy < 0) ? ((dx >= 0) ? 3 : 2) : ((dx >= 0) ? 0 : 1)]++;
  endtask

  always @(posedge clk) if (!rst && l_we) begin
    n_writes++;
    check(int'(l_addr) == next_line, $sformatf("line written at %0d, expected %0d", l_addr, next_line));
    check_line(pts[2 * l_addr], pts[2 * l_addr + 1], l_data.len, l_data.ang, $sformatf("stroke %0d", l_addr));
    next_line++;
  end

  function automatic point_t rnd_pt();
    point_t p;
    p.x = 10'($urandom % 640);
    p.y = 8'($urandom % 240);
    return p;
  endfunction

  // special strokes: vectors (dx, dy) with a fixed start
  int sp_dx[16] = '{ 50, -50,   0,   0,  0, 100,  -3, -100,  7, -90,  90,  1, -1, 200,  -7, 100};
  int sp_dy[16] = '{  0,   0,  40, -40,  0,   3, 100,  -40, -90, 7, -5, -99, 1, -1, -100, -100};

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int run = 0; run < 8; run++) begin
      automatic int nl = (run < 2) ? 8 : 1 + $urandom % MAX_LINES;
      for (int k = 0; k < MAX_LINES; k++) begin
        if (run < 2) begin
          automatic int s = run * 8 + k;
          pts[2*k].x = 10'(300); pts[2*k].y = 8'(120);
          pts[2*k+1].x = 10'(300 + sp_dx[s]); pts[2*k+1].y = 8'(120 + sp_dy[s]);
        end else begin
          pts[2*k] = rnd_pt(); pts[2*k+1] = rnd_pt();
        end
      end
      n_writes = 0; next_line = 0;
      n_lines = 4'(nl);
      start = 1;
      @(posedge clk); #1 start = 0;
      fork
        begin : wait_done
          @(posedge clk iff done);
        end
        begin
          repeat (20000 * MAX_LINES) @(posedge clk);
        end
      join_any
      disable fork;
      #1;
      check(n_writes == nl, $sformatf("%0d lines written for %0d", n_writes, nl));
      repeat (5) @(posedge clk);
      #1;
    end
    // imaginary lines
    for (int r = 0; r < 30; r++) begin
      automatic int i = $urandom % MAX_LINES, j = $urandom % MAX_LINES;
      seg_i = 3'(i); seg_j = 3'(j); seg_req = 1;
      @(posedge clk); #1 seg_req = 0;
      fork
        @(posedge clk iff seg_done);
        repeat (20000) @(posedge clk);
      join_any
      disable fork;
      check(seg_done, "seg_done");
      check_line(pts[2*i], pts[2*j], seg_len, seg_ang, $sformatf("imaginary %0d-%0d", i, j));
      #1;
    end
    check(n_steep > 5, $sformatf("%0d steep strokes", n_steep));
    for (int q = 0; q < 4; q++) check(n_quad[q] > 0, $sformatf("quadrant %0d never used", q));
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
