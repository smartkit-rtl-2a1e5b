// tb_user_image_ram: self-checking test of the dual-clock image RAM (27 MHz
// write, 25 MHz read). Checks the wipe after reset (all read zero), random
// writes read back on the other clock with one clock of latency, and that
// clear_all wipes them again.
module tb_user_image_ram;
  logic wclk = 0, rclk = 0, rst = 1, we = 0, wd = 0, clr = 0, clearing, rd;
  logic [17:0] wa = 0, ra = 0;
  int checks = 0, failures = 0;
  always #18.5 wclk = ~wclk;
  always #20 rclk = ~rclk;

  user_image_ram dut (.wr_clk(wclk), .wr_rst(rst), .we, .wr_addr(wa), .wr_data(wd),
                      .clear_all(clr), .clearing, .rd_clk(rclk), .rd_addr(ra), .rd_data(rd));

  bit model [int];
  int addrs[64];

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic read_check(int a, bit want);
    @(negedge rclk) ra = 18'(a);
    @(posedge rclk); #1;
    check(rd == want, $sformatf("addr %h reads %0d want %0d", a, rd, want));
  endtask

  initial begin
    repeat (3) @(posedge wclk);
    #1 rst = 0;
    wait (!clearing);
    for (int i = 0; i < 20; i++) read_check($urandom % (1 << 18), 0);
    for (int i = 0; i < 64; i++) begin
      addrs[i] = $urandom % (1 << 18);
      @(negedge wclk) begin we = 1; wa = 18'(addrs[i]); wd = 1; end
    end
    @(negedge wclk) we = 0;
    foreach (addrs[i]) read_check(addrs[i], 1);
    read_check((addrs[0] + 1) % (1 << 18), 0);
    @(negedge wclk) clr = 1;
    @(negedge wclk) clr = 0;
    check(clearing, "clear_all starts a wipe");
    wait (!clearing);
    foreach (addrs[i]) read_check(addrs[i], 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (700000) @(posedge wclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
