// smartkit_top: SmartKit, a digital near-miss learner for sketched shapes.
//
// The user draws straight strokes with a laser pointer on a dark
// background in front of a camera. Three stages cooperate:
//   input   video_decoder finds lines, fields and active video in the
//           decoded camera stream and thresholds luminance to black/white;
//           decoder_write_to_ram stores the white pixels of the odd field
//           in the image RAM; extract_coordinates reports the brightest
//           pixel of a snapshot field as a stroke end point whenever the
//           user presses coord_button.
//   AI      ai_module collects the end points of a drawing; on train it
//           adds the drawing to the training set and, after four, makes a
//           definition (mean and spread of the relative stroke geometry);
//           on recognize it scores the drawing against every definition
//           and selects the closest.
//   display display shows the stored drawing and, once recognised, the
//           selected definition shape, on a 640 x 480 VGA monitor.
// Parts outside the chip design are not included: the camera and its video
// decoder chip (their byte stream enters on video_data), the clock manager
// that makes the 25 MHz pixel clock (pixel_clock and locked are inputs),
// and the video DAC and monitor (the vga_out_* signals go to them).
//
// Clocks: clk is the 27 MHz video byte clock and also runs the AI module;
// pixel_clock runs the display. The image RAM is the only memory that
// crosses between them; enable/def_sel are synchronised in the display.
module smartkit_top
  import smartkit_pkg::*;
(
  input  logic        clk,            // 27 MHz
  input  logic        reset,          // synchronous, both domains
  input  logic        decode_en,
  input  logic [7:0]  video_data,     // from the video decoder chip
  input  logic        coord_button,   // capture one stroke end point
  input  logic        train,          // switch
  input  logic        recognize,      // switch
  input  logic        image_clear,    // wipe the stored drawing
  input  logic        pixel_clock,    // 25 MHz
  input  logic        locked,         // pixel clock is stable
  output logic        vga_out_sync_b,
  output logic        vga_out_blank_b,
  output logic        vga_out_pixel_clock,
  output logic        vga_out_hsync,
  output logic        vga_out_vsync,
  output logic [7:0]  vga_out_red,
  output logic [7:0]  vga_out_green,
  output logic [7:0]  vga_out_blue,
  // status
  output logic        coord_valid,
  output point_t      coord,
  output logic [1:0]  selector,
  output logic        shape_valid,
  output fp_t         best_score,
  output phase_e      ai_phase,
  output logic [N_DEFS-1:0] def_valid,
  output logic [$clog2(N_EXAMPLES)-1:0] examples_held,
  output logic        image_clearing
);

  // ---------------- input stage ----------------
  logic eav, sav, sof, sef, vbi, y_valid, pix;
  logic        ram_we, ram_wdata;
  logic [17:0] ram_waddr, ram_raddr;
  logic        ram_rdata;

  video_decoder u_dec (
    .clk, .rst(reset), .en(decode_en), .data_in(video_data),
    .eav, .sav, .sof, .sef, .vbi, .y_valid, .pix
  );

  decoder_write_to_ram u_wr (
    .clk, .rst(reset), .sof, .sef, .sav, .eav, .vbi, .y_valid, .pix,
    .we(ram_we), .addr(ram_waddr), .wdata(ram_wdata)
  );

  extract_coordinates u_xy (
    .clk, .rst(reset), .button(coord_button), .sof, .sef, .eav, .vbi, .y_valid,
    .luma(video_data), .coord_valid, .coord_x(coord.x), .coord_y(coord.y)
  );

  user_image_ram u_ram (
    .wr_clk(clk), .wr_rst(reset), .we(ram_we), .wr_addr(ram_waddr), .wr_data(ram_wdata),
    .clear_all(image_clear), .clearing(image_clearing),
    .rd_clk(pixel_clock), .rd_addr(ram_raddr), .rd_data(ram_rdata)
  );

  // ---------------- AI module ----------------
  ai_module u_ai (
    .clk, .rst(reset), .train, .recognize, .coord_valid, .coord,
    .selector, .enable(shape_valid), .best_score, .phase(ai_phase),
    .def_valid, .examples_held
  );

  // ---------------- display stage ----------------
  display u_disp (
    .pixel_clock, .reset, .locked, .enable(shape_valid), .def_sel(selector),
    .ram_addr(ram_raddr), .ram_data(ram_rdata),
    .vga_out_sync_b, .vga_out_blank_b, .vga_out_pixel_clock,
    .vga_out_hsync, .vga_out_vsync, .vga_out_red, .vga_out_green, .vga_out_blue
  );

endmodule
