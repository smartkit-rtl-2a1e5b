// tb_video_decoder: self-checking test of the TRS decoder on a synthetic
// BT.656 stream (tb_video_src). Over two frames it checks: one eav and one
// sav per line, exactly one sof and one sef per frame, sof/sef on the first
// active line of their field, the number of luminance samples per active
// line, the black/white decision (luma > 8'h50) of every sample against the
// picture, and that a corrupted status word (bad protection bits) is
// ignored.
module tb_video_decoder;
  localparam int AP = 32, AL = 12, VB = 3;
  logic clk = 0, rst = 1, en = 1;
  logic [7:0] data, din;
  logic eav, sav, sof, sef, vbi, y_valid, pix;
  int fields;
  int checks = 0, failures = 0;
  logic corrupt = 0;
  always #5 clk = ~clk;

  tb_video_src #(.ACTIVE_PIX(AP), .ACTIVE_LINES(AL), .VBI_LINES(VB)) src (
    .clk, .spot_x(5), .spot_y(3), .pattern(1'b1), .data, .fields
  );
  // optional corruption of one status word
  assign din = (corrupt && data[7] && data != 8'hFF && data != 8'h80) ? data ^ 8'h01 : data;

  video_decoder dut (.clk, .rst, .en, .data_in(din), .eav, .sav, .sof, .sef, .vbi, .y_valid, .pix);

  int n_eav = 0, n_sav = 0, n_sof = 0, n_sef = 0, n_y = 0, line_y = 0, x = 0, y = -1;
  bit field_odd;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  always @(posedge clk) if (!rst && !corrupt) begin
    if (eav) begin
      n_eav++;
      if (line_y != 0) check(line_y == AP, $sformatf("%0d samples on a line", line_y));
      line_y = 0;
    end
    if (sav) begin
      n_sav++;
      if (!vbi || 1) x = 0;
    end
    if (sof) begin n_sof++; y = 0; field_odd = 1; end
    else if (sef) begin n_sef++; y = 0; field_odd = 0; end
    else if (sav && !$past(vbi, 1) && y >= 0) ;
    if (y_valid) begin
      automatic bit want;
      n_y++;
      line_y++;
      want = (x == 5 && y == 3) || (x == 2 * y);
      check(pix == want, $sformatf("pix at x=%0d y=%0d is %0d", x, y, pix));
      x++;
    end
    if (eav && line_y == 0 && x == AP) begin y++; x = 0; end
  end

  initial begin
    repeat (4) @(posedge clk);
    rst = 0;
    wait (fields == 4);   // first frame may start mid-stream
    @(posedge clk);
    check(n_sof >= 1 && n_sof <= 2, $sformatf("%0d sof", n_sof));
    check(n_sef >= 1 && n_sef <= 2, $sformatf("%0d sef", n_sef));
    check(n_eav >= 2 * 2 * (AL + VB) - 1, $sformatf("%0d eav", n_eav));
    check(n_sav == n_eav || n_sav == n_eav - 1 || n_sav == n_eav + 1, $sformatf("%0d sav vs %0d eav", n_sav, n_eav));
    check(n_y >= 2 * AL * AP, $sformatf("%0d luma samples", n_y));
    // corrupted status words must not be accepted
    corrupt = 1;
    n_eav = 0; n_sav = 0;
    begin
      int e0 = 0, s0 = 0;
      repeat (2000) begin @(posedge clk); e0 += eav; s0 += sav; end
      check(e0 == 0 && s0 == 0, $sformatf("corrupt codes accepted: %0d eav %0d sav", e0, s0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
