// tb_decoder_write_to_ram: self-checking test of the image RAM writer. A
// synthetic BT.656 stream (tb_video_src) goes through video_decoder (as a
// helper) into two writers: one with the default 640-pixel line length,
// whose lines end on eav, and one with ACTIVE_PIXELS equal to the stream's
// line, whose lines end on the pixel count. For each frame it checks that
// exactly the white pixels of the odd field are written, at address
// {y, x}, and nothing from the even field.
module tb_decoder_write_to_ram;
  localparam int AP = 32, AL = 12, VB = 3;
  logic clk = 0, rst = 1;
  logic [7:0] data;
  int fields;
  logic eav, sav, sof, sef, vbi, y_valid, pix;
  logic we_a, we_b, wd_a, wd_b;
  logic [17:0] ad_a, ad_b;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  tb_video_src #(.ACTIVE_PIX(AP), .ACTIVE_LINES(AL), .VBI_LINES(VB)) src (
    .clk, .spot_x(7), .spot_y(9), .pattern(1'b1), .data, .fields
  );
  video_decoder dec (.clk, .rst, .en(1'b1), .data_in(data), .eav, .sav, .sof, .sef, .vbi, .y_valid, .pix);

  decoder_write_to_ram dut_a (.clk, .rst, .sof, .sef, .sav, .eav, .vbi, .y_valid, .pix,
                              .we(we_a), .addr(ad_a), .wdata(wd_a));
  decoder_write_to_ram #(.ACTIVE_PIXELS(AP)) dut_b (.clk, .rst, .sof, .sef, .sav, .eav, .vbi, .y_valid, .pix,
                              .we(we_b), .addr(ad_b), .wdata(wd_b));

  bit expected [int];
  int got_a [int], got_b [int];
  int frames = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic close_frame();
    foreach (expected[k]) begin
      check(got_a.exists(k) && got_a[k] == 1, $sformatf("A: address %h written %0d times", k, got_a.exists(k) ? got_a[k] : 0));
      check(got_b.exists(k) && got_b[k] == 1, $sformatf("B: address %h written %0d times", k, got_b.exists(k) ? got_b[k] : 0));
    end
    check(got_a.num() == expected.num(), $sformatf("A: %0d addresses written", got_a.num()));
    check(got_b.num() == expected.num(), $sformatf("B: %0d addresses written", got_b.num()));
    got_a.delete();
    got_b.delete();
  endtask

  always @(posedge clk) if (!rst) begin
    if (we_a) begin got_a[int'(ad_a)] = got_a.exists(int'(ad_a)) ? got_a[int'(ad_a)] + 1 : 1; check(wd_a, "A wdata"); end
    if (we_b) begin got_b[int'(ad_b)] = got_b.exists(int'(ad_b)) ? got_b[int'(ad_b)] + 1 : 1; check(wd_b, "B wdata"); end
  end

  initial begin
    for (int y = 0; y < AL; y++)
      for (int x = 0; x < AP; x++)
        if ((x == 7 && y == 9) || x == 2 * y) expected[(y << 10) | x] = 1;
    repeat (4) @(posedge clk);
    rst = 0;
    // skip the partial first frame, then check three whole frames
    @(posedge sof); @(posedge clk);
    got_a.delete(); got_b.delete();
    repeat (3) begin
      @(posedge sof); @(posedge clk);
      close_frame();
      frames++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
