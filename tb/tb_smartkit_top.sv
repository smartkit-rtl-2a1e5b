// tb_smartkit_top: end-to-end test of the whole chip design with default
// parameters (full size: 640-pixel, 240-line fields, 640 x 480 VGA).
//
// A behavioural camera + video decoder model (tb_video_src) streams
// BT.656-style fields showing a bright laser spot, whose position the test
// moves, over a dark background with a faint diagonal (x == 2y) drawn in.
// The test plays the user: for each stroke end point it puts the spot there
// and presses coord_button; after each drawing it flips train or recognize.
// It trains definition 0 with four isosceles right triangles and
// definition 1 with four squares (drawings from tb_ai_model_pkg, jittered
// and scaled), then recognises a new triangle and a new square, and finally
// wipes the image.
//
// Checked: every captured coordinate equals the spot position; the
// example count and def_valid after every drawing; selector and
// shape_valid after each recognition; on the VGA output, every white pixel
// outside the 128 x 128 corner belongs to the drawing (diagonal or a spot
// position), the corner is black before a recognition and shows the
// definition shape's colour (red triangle / green square) after it; the
// image wipe. Each mechanism must have happened at least once:
// coordinate capture, image RAM write shown on screen, training example,
// definition, recognition of each shape, shape shown, image wipe.
module tb_smartkit_top;
  import smartkit_pkg::*;
  import tb_ai_model_pkg::*;
  localparam int AP = 640, AL = 240;
  logic clk = 0, pclk = 0, reset = 1, decode_en = 1, coord_button = 0, train = 0, recognize = 0;
  logic image_clear = 0, locked = 0;
  logic [7:0] video_data;
  logic sync_b, blank_b, vga_pclk, hs, vs;
  logic [7:0] r, g, b;
  logic coord_valid, shape_valid, image_clearing;
  point_t coord;
  logic [1:0] selector;
  fp_t best_score;
  phase_e ai_phase;
  logic [N_DEFS-1:0] def_valid;
  logic [$clog2(N_EXAMPLES)-1:0] examples_held;
  int checks = 0, failures = 0;
  int spot_x = 700, spot_y = 300, fields;
  bit drawn [AL][AP];
  int n_coord = 0, n_examples = 0, n_defs = 0, n_recog[2], n_user_white = 0, n_wipes = 0;
  int n_red = 0, n_green = 0, n_corner_other = 0;
  bit corner_may_show = 0;

  always #18.5 clk = ~clk;      // 27 MHz
  always #20 pclk = ~pclk;      // 25 MHz

  tb_video_src #(.ACTIVE_PIX(AP), .ACTIVE_LINES(AL), .VBI_LINES(3), .H_BLANK(8)) src (
    .clk, .spot_x, .spot_y, .pattern(1'b1), .data(video_data), .fields);

  smartkit_top dut (.clk, .reset, .decode_en, .video_data, .coord_button, .train, .recognize,
                    .image_clear, .pixel_clock(pclk), .locked, .vga_out_sync_b(sync_b),
                    .vga_out_blank_b(blank_b), .vga_out_pixel_clock(vga_pclk), .vga_out_hsync(hs),
                    .vga_out_vsync(vs), .vga_out_red(r), .vga_out_green(g), .vga_out_blue(b),
                    .coord_valid, .coord, .selector, .shape_valid, .best_score, .ai_phase,
                    .def_valid, .examples_held, .image_clearing);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  // ---- VGA monitor: rebuild pixel positions from blank and vsync ----
  int px = 0, ln = -100000;                     // unknown until the first vsync
  logic prev_blank = 0, prev_vs = 1;
  always @(posedge pclk) if (!reset) begin
    if (prev_vs && !vs) ln = -1;                 // vsync start: next active line is line 0
    if (blank_b) begin
      if (!prev_blank) begin ln++; px = 0; end
      if (ln >= 0 && ln < 480) begin
        if (ln < 128 && px < 128) begin
          if ({r, g, b} == 24'hFF0000) n_red++;
          else if ({r, g, b} == 24'h00FF00) n_green++;
          else if ({r, g, b} != 24'h0) n_corner_other++;
          if (!corner_may_show) check({r, g, b} == 24'h0, "corner not black before recognition");
        end else if ({r, g, b} == 24'hFFFFFF) begin
          automatic int y = ln / 2, x = px;
          check(x < AP && (x == 2 * y || drawn[y][x]), $sformatf("white pixel at screen %0d,%0d", px, ln));
          n_user_white++;
        end else begin
          check({r, g, b} == 24'h0, $sformatf("colour %h at screen %0d,%0d", {r, g, b}, px, ln));
        end
      end
      px++;
    end
    prev_blank = blank_b;
    prev_vs = vs;
  end

  always @(posedge clk) if (!reset && coord_valid) n_coord++;

  task automatic wait_fields(int n);
    automatic int f0 = fields;
    while (fields < f0 + n) @(posedge clk);
    #1;
  endtask

  task automatic capture(int x, int y);
    automatic int t = 0;
    spot_x = x; spot_y = y;
    drawn[y][x] = 1;
    @(posedge clk); #1 coord_button = 1;
    while (!coord_valid && t < 3 * 2 * (AL + 3) * (AP * 2 + 16)) begin @(posedge clk); t++; end
    check(coord_valid, "no coordinate captured");
    check(int'(coord.x) == x && int'(coord.y) == y, $sformatf("coordinate %0d,%0d for spot %0d,%0d", coord.x, coord.y, x, y));
    #1 coord_button = 0;
    repeat (5) @(posedge clk);
    #1;
  endtask

  task automatic run(bit is_train);
    automatic int t = 0;
    if (is_train) train = 1; else recognize = 1;
    while (ai_phase == PH_IDLE && t < 100) begin @(posedge clk); #1; t++; end
    check(ai_phase != PH_IDLE, "AI run did not start");
    t = 0;
    while (ai_phase != PH_IDLE && t < 400000) begin @(posedge clk); #1; t++; end
    check(ai_phase == PH_IDLE, "AI run did not finish");
    repeat (5) @(posedge clk);
    #1 train = 0; recognize = 0;
    repeat (5) @(posedge clk);
    #1;
  endtask

  task automatic draw(int shape);
    automatic drawing_t d = draw_shape(shape, 0.9 + real'($urandom % 30) / 100.0,
                                       150 + $urandom % 300, 20 + $urandom % 20, 2);
    for (int i = 0; i < d.n; i++) capture(d.x[i], d.y[i]);
  endtask

  initial begin
    repeat (4) @(posedge clk);
    #1 reset = 0;
    repeat (20) @(posedge pclk);
    #1 locked = 1;
    wait_fields(4);                             // image RAM wipe after reset, first frames
    for (int s = 0; s < 2; s++) begin
      for (int e = 0; e < N_EXAMPLES; e++) begin
        draw(s);
        run(1);
        n_examples++;
        check(int'(examples_held) == (e + 1) % N_EXAMPLES, $sformatf("examples held %0d", examples_held));
      end
      check(def_valid == 4'((1 << (s + 1)) - 1), $sformatf("def_valid %b", def_valid));
      if (def_valid[s]) n_defs++;
    end
    check(n_red == 0 && n_green == 0, "shape shown before recognition");
    for (int s = 0; s < 2; s++) begin
      automatic int red0 = n_red, green0 = n_green;
      draw(s);
      corner_may_show = 1;
      run(0);
      check(shape_valid, "shape_valid after recognition");
      check(int'(selector) == s, $sformatf("shape %0d recognised as %0d", s, selector));
      if (shape_valid && int'(selector) == s) n_recog[s]++;
      wait_fields(2);
      if (s == 0) check(n_red > red0, "triangle not shown");
      else        check(n_green > green0, "square not shown");
    end
    check(n_corner_other == 0, "unexpected colour in the corner");
    // wipe the drawing; the spot goes off screen
    spot_x = 700; spot_y = 300;
    @(posedge clk); #1 image_clear = 1;
    @(posedge clk); #1 image_clear = 0;
    @(posedge clk); #1;
    check(image_clearing, "image wipe started");
    while (image_clearing) @(posedge clk);
    #1;
    for (int y = 0; y < AL; y++) for (int x = 0; x < AP; x++) drawn[y][x] = 0;
    n_wipes++;
    wait_fields(4);                             // screen now shows only the diagonal
    check(n_coord == 4 * 6 + 4 * 8 + 6 + 8, $sformatf("%0d coordinates", n_coord));
    check(n_user_white > 1000, $sformatf("%0d white image pixels on screen", n_user_white));
    check(n_examples == 8 && n_defs == 2 && n_recog[0] == 1 && n_recog[1] == 1 && n_wipes == 1,
          "mechanism counts");
    $display("coords %0d examples %0d definitions %0d recognitions %0d/%0d white %0d red %0d green %0d wipes %0d",
             n_coord, n_examples, n_defs, n_recog[0], n_recog[1], n_user_white, n_red, n_green, n_wipes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #4s;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
