// tb_disp_vga: self-checking test of the VGA control and addressing block
// over one full frame. A reference model of the 800 x 524 counters runs
// beside it; the test checks the memory address and def_region of every
// pixel (one clock after the counters: line*128+pixel in the 128 x 128
// corner, {line[8:1], pixel[9:0]} elsewhere), vga_out_blank_b and
// vga_out_sync_b three clocks after the counters, and the active-low
// hsync (pixels 656..751) and vsync (lines 491..492) two clocks after those.
module tb_disp_vga;
  logic clk = 0, rst = 1;
  logic [17:0] addr;
  logic region, sync_b, blank_b, hs, vs;
  int checks = 0, failures = 0;
  int n_corner = 0, n_hs = 0;
  always #20 clk = ~clk;

  disp_vga dut (.pixel_clock(clk), .reset(rst), .disp_address(addr), .def_region(region),
                .vga_out_sync_b(sync_b), .vga_out_blank_b(blank_b), .vga_out_hsync(hs), .vga_out_vsync(vs));

  int pc = 0, lc = 0;
  int ph[6], lh[6];
  int n = 0;

  function automatic bit h_at(int p); return p >= 656 && p < 752; endfunction
  function automatic bit v_at(int l); return l >= 491 && l < 493; endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  always @(posedge clk) if (!rst) begin
    n++;
    for (int i = 5; i > 0; i--) begin ph[i] = ph[i-1]; lh[i] = lh[i-1]; end
    ph[0] = pc; lh[0] = lc;
    if (n > 6) begin
      if (lh[1] < 128 && ph[1] < 128) begin
        n_corner++;
        check(region && addr == 18'(lh[1] * 128 + ph[1]), $sformatf("corner address %h at %0d,%0d", addr, ph[1], lh[1]));
      end else begin
        check(!region && addr == {8'(lh[1] >> 1), 10'(ph[1])}, $sformatf("image address %h at %0d,%0d", addr, ph[1], lh[1]));
      end
      check(blank_b == !(ph[3] >= 640 || lh[3] >= 480), "blank_b");
      check(sync_b == !(h_at(ph[3]) ^ v_at(lh[3])), "sync_b");
      check(hs == !h_at(ph[5]), $sformatf("hsync at pixel %0d", ph[5]));
      check(vs == !v_at(lh[5]), $sformatf("vsync at line %0d", lh[5]));
      if (!hs) n_hs++;
    end
    pc = (pc == 799) ? 0 : pc + 1;
    if (pc == 0) lc = (lc == 523) ? 0 : lc + 1;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (800 * 524 + 20) @(posedge clk);
    check(n_corner >= 128 * 128, $sformatf("%0d corner pixels", n_corner));
    check(n_hs >= 96 * 523, $sformatf("%0d hsync pixels", n_hs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (800 * 524 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
