// tb_shape_rom: self-checking test of the four shape ROMs. For each shape it
// checks the colour at every polygon vertex and at the midpoint of every
// edge, black at the image centre (inside the outline) and in the far
// corner, and the one-clock read latency.
module tb_shape_rom;
  logic clk = 0;
  logic [13:0] addr = 0;
  logic [23:0] d0, d1, d2, d3;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  shape_rom #(.SHAPE(0)) r0 (.clk, .addr, .data(d0));
  shape_rom #(.SHAPE(1)) r1 (.clk, .addr, .data(d1));
  shape_rom #(.SHAPE(2)) r2 (.clk, .addr, .data(d2));
  shape_rom #(.SHAPE(3)) r3 (.clk, .addr, .data(d3));

  // expected drawings
  int vxs[4][4] = '{'{16, 16, 112, 0}, '{24, 104, 104, 24}, '{64, 14, 114, 0}, '{8, 120, 120, 8}};
  int vys[4][4] = '{'{16, 112, 112, 0}, '{24, 24, 104, 104}, '{18, 105, 105, 0}, '{36, 36, 92, 92}};
  int nv[4] = '{3, 4, 3, 4};
  logic [23:0] col[4] = '{24'hFF0000, 24'h00FF00, 24'h4080FF, 24'hFFFF00};

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic logic [23:0] pick(int s);
    case (s) 0: return d0; 1: return d1; 2: return d2; default: return d3; endcase
  endfunction

  task automatic probe(int s, int x, int y, logic [23:0] want);
    @(negedge clk) addr = 14'(y * 128 + x);
    @(posedge clk); #1;
    check(pick(s) == want, $sformatf("shape %0d at (%0d,%0d) = %h want %h", s, x, y, pick(s), want));
  endtask

  initial begin
    for (int s = 0; s < 4; s++) begin
      for (int k = 0; k < nv[s]; k++) begin
        automatic int x0 = vxs[s][k], y0 = vys[s][k];
        automatic int x1 = vxs[s][(k + 1) % nv[s]], y1 = vys[s][(k + 1) % nv[s]];
        probe(s, x0, y0, col[s]);
        // midpoint of axis-parallel edges is exact; slanted edges checked at a vertex only
        if (x0 == x1 || y0 == y1) probe(s, (x0 + x1) / 2, (y0 + y1) / 2, col[s]);
      end
      probe(s, 64, 70, 24'h0);
      probe(s, 127, 0, 24'h0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
