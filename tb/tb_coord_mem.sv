// tb_coord_mem: self-checking test of the stroke end point store. Random
// points are written with in_valid pulses (with idle gaps); n_points must
// count them, each must be read back at its arrival index one clock after
// rd_addr, points beyond DEPTH must be dropped, and clear must empty the
// store. Several fill / clear rounds are run.
module tb_coord_mem;
  import smartkit_pkg::*;
  localparam int DEPTH = MAX_POINTS;
  logic clk = 0, rst = 1, in_valid = 0, clear = 0;
  point_t in_pt = '0, rd_data;
  logic [$clog2(DEPTH):0] n_points;
  logic [$clog2(DEPTH)-1:0] rd_addr = 0;
  int checks = 0, failures = 0;
  point_t ref_mem [DEPTH];
  always #5 clk = ~clk;

  coord_mem dut (.clk, .rst, .in_valid, .in_pt, .clear, .n_points, .rd_addr, .rd_data);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int round = 0; round < 6; round++) begin
      automatic int count = (round == 2) ? DEPTH + 5 : 1 + $urandom % DEPTH;
      check(n_points == 0, "empty after clear");
      for (int i = 0; i < count; i++) begin
        in_pt.x = 10'($urandom); in_pt.y = 8'($urandom);
        if (i < DEPTH) ref_mem[i] = in_pt;
        in_valid = 1;
        @(posedge clk); #1 in_valid = 0;
        repeat ($urandom % 3) @(posedge clk);
        #1;
      end
      check(n_points == ((count > DEPTH) ? DEPTH : count), $sformatf("n_points %0d for %0d", n_points, count));
      for (int i = 0; i < ((count > DEPTH) ? DEPTH : count); i++) begin
        rd_addr = ($clog2(DEPTH))'(i);
        @(posedge clk); #1;
        check(rd_data == ref_mem[i], $sformatf("point %0d", i));
      end
      clear = 1;
      @(posedge clk); #1 clear = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
