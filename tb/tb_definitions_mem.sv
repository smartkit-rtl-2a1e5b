// tb_definitions_mem: self-checking test of one definition store (pair x
// property of mean and standard deviation). valid must be 0 after reset and
// become 1 with the first write; every location is written and read back
// one clock after the address, then random writes and reads are mixed.
module tb_definitions_mem;
  import smartkit_pkg::*;
  localparam int PAIRS = MAX_PAIRS;
  logic clk = 0, rst = 1, we = 0, valid;
  logic [$clog2(PAIRS)-1:0] wr_pair = 0, rd_pair = 0;
  logic [1:0] wr_prop = 0, rd_prop = 0;
  def_t wr_data = '0, rd_data;
  def_t ref_mem [PAIRS][4];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  definitions_mem dut (.clk, .rst, .we, .wr_pair, .wr_prop, .wr_data, .rd_pair, .rd_prop, .rd_data, .valid);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (3) @(posedge clk);
    #1 check(!valid, "valid after reset");
    for (int p = 0; p < PAIRS; p++)
      for (int q = 0; q < 4; q++) begin
        we = 1; wr_pair = 5'(p); wr_prop = 2'(q);
        wr_data = {$urandom, $urandom}; ref_mem[p][q] = wr_data;
        @(posedge clk); #1;
        check(valid, "valid after write");
      end
    we = 0;
    for (int i = 0; i < 2000; i++) begin
      automatic int p = $urandom % PAIRS, q = $urandom % 4;
      automatic def_t want = ref_mem[p][q];
      rd_pair = 5'(p); rd_prop = 2'(q);
      we = (i > 500) && ($urandom % 2);
      wr_pair = 5'($urandom % PAIRS); wr_prop = 2'($urandom);
      wr_data = {$urandom, $urandom};
      @(posedge clk);
      if (we) ref_mem[wr_pair][wr_prop] = wr_data;
      #1 check(rd_data == want, $sformatf("pair %0d prop %0d", p, q));
    end
    rst = 1;
    @(posedge clk); #1 rst = 0;
    check(!valid, "valid cleared by reset");
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
