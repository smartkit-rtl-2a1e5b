// tb_extract_coordinates: self-checking test of the end-point extractor. A
// synthetic stream (tb_video_src) with a bright spot and dimmer white
// pixels goes through video_decoder (helper). For several spot positions
// it presses the button and checks that exactly one coord_valid pulse
// comes, with the spot's {x, y}, within two frames; and that no pulse
// comes without a press.
module tb_extract_coordinates;
  localparam int AP = 32, AL = 12, VB = 3;
  logic clk = 0, rst = 1, button = 0;
  logic [7:0] data;
  int fields, sx = 3, sy = 2;
  logic eav, sav, sof, sef, vbi, y_valid, pix;
  logic cv;
  logic [9:0] cx;
  logic [7:0] cy;
  int checks = 0, failures = 0, pulses = 0;
  always #5 clk = ~clk;

  tb_video_src #(.ACTIVE_PIX(AP), .ACTIVE_LINES(AL), .VBI_LINES(VB)) src (
    .clk, .spot_x(sx), .spot_y(sy), .pattern(1'b1), .data, .fields
  );
  video_decoder dec (.clk, .rst, .en(1'b1), .data_in(data), .eav, .sav, .sof, .sef, .vbi, .y_valid, .pix);

  extract_coordinates dut (.clk, .rst, .button, .sof, .sef, .eav, .vbi, .y_valid, .luma(data),
                           .coord_valid(cv), .coord_x(cx), .coord_y(cy));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  always @(posedge clk) if (cv && !rst) pulses++;

  initial begin
    repeat (4) @(posedge clk);
    rst = 0;
    // no press, no point
    repeat (2) @(posedge sof);
    check(pulses == 0, "point without a button press");
    for (int t = 0; t < 6; t++) begin
      int f0;
      sx = (t * 7 + 3) % AP;
      sy = (t * 5 + 1) % AL;
      @(posedge clk) button = 1;
      repeat (20) @(posedge clk);
      button = 0;
      pulses = 0;
      f0 = fields;
      while (!cv && fields < f0 + 4) @(posedge clk);
      check(cv, $sformatf("no point for spot %0d,%0d", sx, sy));
      check(cx == 10'(sx) && cy == 8'(sy), $sformatf("point %0d,%0d for spot %0d,%0d", cx, cy, sx, sy));
      repeat (3) @(posedge sof);
      check(pulses == 1, $sformatf("%0d points for one press", pulses));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
