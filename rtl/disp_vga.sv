// disp_vga: VGA control and memory addressing of the display stage.
//
// It runs the sync_gen timing generator and, from its pixel and line
// counters, builds one address that goes to every image memory:
//   upper-left 128 x 128 corner (definition shape):
//       disp_address = line * 128 + pixel   (0 .. 16383), def_region = 1
//   rest of the screen (user drawing):
//       disp_address = {line[8:1], pixel[9:0]}, def_region = 0
// The corner layout and the 0..16383 range are the document's. The user
// image is stored by the input stage at {y, x} with y one field line, so
// each stored line is shown on two screen lines; this mapping is this
// design's reading of how the 18-bit image is shown.
// The VGA control outputs are registered and delayed to match the pixel
// pipeline (address register, memory read, RGB register in shape_disp =
// 3 clocks after the counters): vga_out_blank_b and vga_out_sync_b (active
// low, to the DAC) leave together with the RGB value of their pixel;
// vga_out_hsync and vga_out_vsync (active low, 640 x 480 polarity, to the
// monitor) leave 2 clocks later, matching the DAC's pipeline delay.
module disp_vga (
  input  logic        pixel_clock,
  input  logic        reset,
  output logic [17:0] disp_address,
  output logic        def_region,
  output logic        vga_out_sync_b,
  output logic        vga_out_blank_b,
  output logic        vga_out_hsync,
  output logic        vga_out_vsync
);

  logic [10:0] pixel_count, line_count;
  logic        blank, comp_sync, h_sync, v_sync;

  sync_gen u_sync (
    .pixel_clock, .reset, .pixel_count, .line_count,
    .blank, .comp_sync, .h_sync, .v_sync
  );

  // blank / comp_sync trail the counters by one clock, h_sync / v_sync by
  // three (one plus the DAC delay built into sync_gen)
  logic blank_d, csync_d, h_d, v_d;

  always_ff @(posedge pixel_clock) begin
    if (reset) begin
      disp_address <= '0;
      def_region   <= 1'b0;
      blank_d <= 1'b1; csync_d <= 1'b0; h_d <= 1'b0; v_d <= 1'b0;
      vga_out_sync_b  <= 1'b1;
      vga_out_blank_b <= 1'b0;
      vga_out_hsync   <= 1'b1;
      vga_out_vsync   <= 1'b1;
    end else begin
      if (line_count < 11'd128 && pixel_count < 11'd128) begin
        disp_address <= 18'({line_count[6:0], pixel_count[6:0]});
        def_region   <= 1'b1;
      end else begin
        disp_address <= {line_count[8:1], pixel_count[9:0]};
        def_region   <= 1'b0;
      end
      blank_d <= blank;
      csync_d <= comp_sync;
      h_d     <= h_sync;
      v_d     <= v_sync;
      vga_out_blank_b <= ~blank_d;
      vga_out_sync_b  <= ~csync_d;
      vga_out_hsync   <= ~h_d;
      vga_out_vsync   <= ~v_d;
    end
  end

endmodule
