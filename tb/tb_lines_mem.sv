// tb_lines_mem: self-checking test of the line (length, angle) store.
// Random writes and reads against a reference array; every read is checked
// one clock after its address (addresses read are ones already written).
module tb_lines_mem;
  import smartkit_pkg::*;
  localparam int DEPTH = MAX_LINES;
  logic clk = 0, we = 0;
  logic [$clog2(DEPTH)-1:0] wr_addr = 0, rd_addr = 0;
  line_t wr_data = '0, rd_data;
  line_t ref_mem [DEPTH];
  bit written [DEPTH];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  lines_mem dut (.clk, .we, .wr_addr, .wr_data, .rd_addr, .rd_data);

  initial begin
    for (int i = 0; i < 2000; i++) begin
      automatic int ra = $urandom % DEPTH;
      automatic bit check_now = written[ra];
      automatic line_t want = ref_mem[ra];
      we = $urandom % 2;
      wr_addr = ($clog2(DEPTH))'($urandom);
      wr_data = {$urandom, $urandom};
      rd_addr = ($clog2(DEPTH))'(ra);
      @(posedge clk);
      if (we) begin ref_mem[wr_addr] = wr_data; written[wr_addr] = 1; end
      #1;
      if (check_now) begin
        checks++;
        if (rd_data != want) begin
          failures++;
          if (failures < 10) $display("FAIL addr %0d got %h want %h", ra, rd_data, want);
        end
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
