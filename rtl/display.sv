// display: the display stage. It draws the user's drawing and, once the AI
// module has recognised it, the chosen definition shape on a 640 x 480 VGA
// monitor through a triple 8-bit video DAC.
//
// disp_vga generates the VGA timing and the memory address of every pixel;
// shape_disp reads the four shape ROMs and the user image RAM (outside this
// module, shared with the input stage) and picks the RGB value. The
// structure is the document's. enable and def_sel come from the AI module's
// clock domain: enable is brought into the pixel clock domain through two
// flip-flops, and def_sel, which is stable whenever enable is high, is
// sampled alongside (own choice). A fall of enable (a new recognition has
// started) is the shape_reset that returns shape_disp to IDLE.
// The pixel clock itself (25 MHz, made from 27 MHz by a clock manager) comes
// in as an input and is passed to the DAC on vga_out_pixel_clock.
//
// Timing: RGB, blank and composite sync leave together, 3 pixel clocks after
// the timing counters; hsync and vsync 2 clocks later (DAC pipeline).
module display (
  input  logic        pixel_clock,
  input  logic        reset,
  input  logic        locked,
  input  logic        enable,
  input  logic [1:0]  def_sel,
  output logic [17:0] ram_addr,
  input  logic        ram_data,
  output logic        vga_out_sync_b,
  output logic        vga_out_blank_b,
  output logic        vga_out_pixel_clock,
  output logic        vga_out_hsync,
  output logic        vga_out_vsync,
  output logic [7:0]  vga_out_red,
  output logic [7:0]  vga_out_green,
  output logic [7:0]  vga_out_blue
);

  logic [1:0] en_sync;
  logic [1:0] sel_q;
  logic       def_region;

  always_ff @(posedge pixel_clock) begin
    if (reset) begin
      en_sync <= '0;
      sel_q   <= '0;
    end else begin
      en_sync <= {en_sync[0], enable};
      sel_q   <= def_sel;
    end
  end

  disp_vga u_vga (
    .pixel_clock, .reset, .disp_address(ram_addr), .def_region,
    .vga_out_sync_b, .vga_out_blank_b, .vga_out_hsync, .vga_out_vsync
  );

  shape_disp u_shape (
    .pixel_clock, .reset, .locked, .shape_reset(!en_sync[1]), .enable(en_sync[1]),
    .def_sel(sel_q), .rom_addr(ram_addr[13:0]), .def_region, .user_pix(ram_data),
    .vga_out_red, .vga_out_green, .vga_out_blue
  );

  assign vga_out_pixel_clock = pixel_clock;

endmodule
