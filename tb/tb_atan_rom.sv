// tb_atan_rom: self-checking test of the arctangent table. Every entry i is
// read (data one clock after the address) and compared with
// atan(i / 256) in degrees, computed here in double precision, to within
// one part in a million.
module tb_atan_rom;
  import smartkit_pkg::*;
  import tb_fp_pkg::*;
  logic clk = 0;
  logic [8:0] addr = 0;
  fp_t data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  atan_rom dut (.clk, .addr, .data);

  initial begin
    #1;
    for (int i = 0; i <= 256; i++) begin
      automatic real want = $atan(real'(i) / 256.0) * 180.0 / 3.14159265358979;
      addr = 9'(i);
      @(posedge clk); #1;
      addr = 9'(($urandom % 257));   // a new address must not disturb the registered data
      #1;
      checks++;
      if (!close(f2r(data), want, 1e-6, 1e-6)) begin
        failures++;
        if (failures < 10) $display("FAIL entry %0d got %f want %f", i, f2r(data), want);
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
