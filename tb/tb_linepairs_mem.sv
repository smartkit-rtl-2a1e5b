// tb_linepairs_mem: self-checking test of the line-pair property store
// (example x pair x property). Every location is written with a distinct
// value, then read back in random order one clock after the address; then
// random writes and reads are mixed. Reads of a location written in the
// same clock return the old value (read before write).
module tb_linepairs_mem;
  import smartkit_pkg::*;
  localparam int EX = N_EXAMPLES, PAIRS = MAX_PAIRS;
  logic clk = 0, we = 0;
  logic [$clog2(EX)-1:0] wr_ex = 0, rd_ex = 0;
  logic [$clog2(PAIRS)-1:0] wr_pair = 0, rd_pair = 0;
  logic [1:0] wr_prop = 0, rd_prop = 0;
  fp_t wr_data = 0, rd_data;
  fp_t ref_mem [EX][PAIRS][4];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  linepairs_mem dut (.clk, .we, .wr_ex, .wr_pair, .wr_prop, .wr_data, .rd_ex, .rd_pair, .rd_prop, .rd_data);

  initial begin
    #1;
    for (int e = 0; e < EX; e++)
      for (int p = 0; p < PAIRS; p++)
        for (int q = 0; q < 4; q++) begin
          we = 1; wr_ex = 2'(e); wr_pair = 5'(p); wr_prop = 2'(q);
          wr_data = $urandom; ref_mem[e][p][q] = wr_data;
          @(posedge clk); #1;
        end
    we = 0;
    for (int i = 0; i < 3000; i++) begin
      automatic int e = $urandom % EX, p = $urandom % PAIRS, q = $urandom % 4;
      automatic fp_t want = ref_mem[e][p][q];
      rd_ex = 2'(e); rd_pair = 5'(p); rd_prop = 2'(q);
      we = (i > 1000) && ($urandom % 2);
      wr_ex = 2'($urandom % EX); wr_pair = 5'($urandom % PAIRS); wr_prop = 2'($urandom);
      wr_data = $urandom;
      @(posedge clk);
      if (we) ref_mem[wr_ex][wr_pair][wr_prop] = wr_data;
      #1;
      checks++;
      if (rd_data != want) begin
        failures++;
        if (failures < 10) $display("FAIL ex %0d pair %0d prop %0d got %h want %h", e, p, q, rd_data, want);
      end
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
