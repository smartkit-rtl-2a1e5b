// tb_display: self-checking test of the whole display stage with a model
// of the user image RAM (synchronous read, pattern bit = ((x ^ y) % 7 == 0)
// at address {y, x}). Reference counters run beside the DUT. Frame 1, with
// enable low: every active pixel outside the 128 x 128 corner must be white
// exactly when the RAM bit of {line/2, pixel} is set, and the corner must be
// black. Then enable is raised with def_sel = 1: the corner must show only
// black and the square's green, with green present. blank_b is checked on
// every pixel, all in step with the RGB (3 clocks after the counters).
module tb_display;
  logic clk = 0, rst = 1, locked = 0, enable = 0;
  logic [1:0] def_sel = 0;
  logic [17:0] ram_addr;
  logic ram_data = 0;
  logic sync_b, blank_b, pclk_out, hs, vs;
  logic [7:0] r, g, b;
  int checks = 0, failures = 0;
  int n_white = 0, n_green = 0, frame = 0;
  always #20 clk = ~clk;

  display dut (.pixel_clock(clk), .reset(rst), .locked, .enable, .def_sel, .ram_addr, .ram_data,
               .vga_out_sync_b(sync_b), .vga_out_blank_b(blank_b), .vga_out_pixel_clock(pclk_out),
               .vga_out_hsync(hs), .vga_out_vsync(vs), .vga_out_red(r), .vga_out_green(g),
               .vga_out_blue(b));

  function automatic logic pattern(logic [17:0] a);
    return ((int'(a[17:10]) ^ int'(a[9:0])) % 7) == 0;
  endfunction
  always @(posedge clk) ram_data <= pattern(ram_addr);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  int pc = 0, lc = 0, n = 0;
  int ph[4], lh[4];
  always @(posedge clk) if (!rst) begin
    n++;
    for (int i = 3; i > 0; i--) begin ph[i] = ph[i-1]; lh[i] = lh[i-1]; end
    ph[0] = pc; lh[0] = lc;
    if (n > 4) begin
      automatic int p = ph[3], l = lh[3];
      automatic bit active = p < 640 && l < 480;
      check(blank_b == active, "blank_b");
      if (active && l < 128 && p < 128) begin
        if (frame == 0) check({r, g, b} == 24'h0, $sformatf("corner not black at %0d,%0d", p, l));
        else begin
          check({r, g, b} == 24'h0 || {r, g, b} == 24'h00FF00, $sformatf("corner colour %h", {r, g, b}));
          if ({r, g, b} == 24'h00FF00) n_green++;
        end
      end else if (active) begin
        automatic logic want = pattern({8'(l >> 1), 10'(p)});
        check({r, g, b} == (want ? 24'hFFFFFF : 24'h0), $sformatf("user pixel %0d,%0d", p, l));
        if (want) n_white++;
      end
    end
    pc = (pc == 799) ? 0 : pc + 1;
    if (pc == 0) lc = (lc == 523) ? 0 : lc + 1;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0; locked = 1;
    repeat (800 * 524 - 100) @(posedge clk);
    #1 enable = 1; def_sel = 1;
    repeat (10) @(posedge clk);
    // from here the corner belongs to the recognised shape
    frame = 1;
    repeat (800 * 524) @(posedge clk);
    check(pclk_out === clk, "pixel clock passed to the DAC");
    check(n_white > 1000, $sformatf("%0d white user pixels", n_white));
    check(n_green > 100, $sformatf("%0d green corner pixels", n_green));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (800 * 524 * 3) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
