// tb_sync_gen: self-checking test of the VGA timing generator at the
// 640 x 480 defaults. Over two frames it checks, against the counters: the
// line length (800) and frame length (524 lines), the blank window, the
// composite sync (h XOR v), and h_sync / v_sync appearing exactly 2 clocks
// after their counter positions (h on pixels 656..751, v on lines 491..492).
module tb_sync_gen;
  logic clk = 0, rst = 1;
  logic [10:0] pc, lc;
  logic blank, csync, hs, vs;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  sync_gen dut (.pixel_clock(clk), .reset(rst), .pixel_count(pc), .line_count(lc),
                .blank, .comp_sync(csync), .h_sync(hs), .v_sync(vs));

  int pc_hist[3], lc_hist[3];
  int h_pulses = 0, line_wraps = 0, frame_wraps = 0, max_pc = 0, max_lc = 0;

  function automatic bit h_at(int p); return p >= 656 && p < 752; endfunction
  function automatic bit v_at(int l); return l >= 491 && l < 493; endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  int cyc = 0;
  always @(posedge clk) if (!rst) begin
    cyc++;
    // outputs now describe the counter values 1 (blank, csync) and 3 (h, v) clocks ago
    if (cyc > 4) begin
      check(blank == (pc_hist[0] >= 640 || lc_hist[0] >= 480), "blank");
      check(csync == (h_at(pc_hist[0]) ^ v_at(lc_hist[0])), "comp_sync");
      check(hs == h_at(pc_hist[2]), $sformatf("h_sync at pixel %0d", pc_hist[2]));
      check(vs == v_at(lc_hist[2]), $sformatf("v_sync at line %0d", lc_hist[2]));
    end
    if (int'(pc) > max_pc) max_pc = pc;
    if (int'(lc) > max_lc) max_lc = lc;
    if (pc == 0 && pc_hist[0] == 799) line_wraps++;
    if (lc == 0 && lc_hist[0] == 523) frame_wraps++;
    pc_hist[2] = pc_hist[1]; pc_hist[1] = pc_hist[0]; pc_hist[0] = pc;
    lc_hist[2] = lc_hist[1]; lc_hist[1] = lc_hist[0]; lc_hist[0] = lc;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (2 * 800 * 524 + 10) @(posedge clk);
    check(max_pc == 799, $sformatf("max pixel %0d", max_pc));
    check(max_lc == 523, $sformatf("max line %0d", max_lc));
    check(line_wraps == 2 * 524, $sformatf("%0d lines in 2 frames", line_wraps));
    check(frame_wraps == 2, $sformatf("%0d frames", frame_wraps));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * 800 * 524 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
