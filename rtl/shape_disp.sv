// shape_disp: chooses what the display shows at each pixel.
//
// The user's drawing (one bit per pixel from the image RAM) is always shown,
// white on black. The definition shape is shown in the upper-left 128 x 128
// corner only after the AI module has recognised a drawing. An FSM, with the
// states and transitions of the document's state diagram, decides which:
//   INIT   -> IDLE         once the pixel clock is locked
//   IDLE   -> ENABLE       when enable is 1
//   ENABLE -> DISP_TRI / DISP_SQUARE / DISP_EQ_TRI / DISP_RECT
//                          for def_sel = 0 / 1 / 2 / 3
//   DISP_* -> IDLE         on shape_reset (from the document's code)
// In a DISP_* state the corner shows that shape's ROM; otherwise it is
// black. The document's text calls shape 3 a square, its diagram and code a
// rectangle; this design follows the diagram. The four ROMs are instances
// of shape_rom.
//
// Timing: rom_addr and def_region come from disp_vga one clock after its
// counters, user_pix one clock after that (RAM read); the RGB outputs are
// registered, one clock after the memory data, in step with disp_vga's
// blank and sync outputs.
module shape_disp (
  input  logic        pixel_clock,
  input  logic        reset,
  input  logic        locked,
  input  logic        shape_reset,
  input  logic        enable,
  input  logic [1:0]  def_sel,
  input  logic [13:0] rom_addr,
  input  logic        def_region,
  input  logic        user_pix,
  output logic [7:0]  vga_out_red,
  output logic [7:0]  vga_out_green,
  output logic [7:0]  vga_out_blue
);

  typedef enum logic [2:0] {
    INIT, IDLE, ENABLE, DISP_SQUARE, DISP_TRI, DISP_RECT, DISP_EQ_TRI
  } state_e;
  state_e state;

  logic [23:0] tri_out, square_out, eq_tri_out, rect_out;
  shape_rom #(.SHAPE(0)) u_tri    (.clk(pixel_clock), .addr(rom_addr), .data(tri_out));
  shape_rom #(.SHAPE(1)) u_square (.clk(pixel_clock), .addr(rom_addr), .data(square_out));
  shape_rom #(.SHAPE(2)) u_eq_tri (.clk(pixel_clock), .addr(rom_addr), .data(eq_tri_out));
  shape_rom #(.SHAPE(3)) u_rect   (.clk(pixel_clock), .addr(rom_addr), .data(rect_out));

  always_ff @(posedge pixel_clock) begin
    if (reset) state <= INIT;
    else begin
      unique case (state)
        INIT:   if (locked) state <= IDLE;
        IDLE:   if (enable) state <= ENABLE;
        ENABLE:
          unique case (def_sel)
            2'd0: state <= DISP_TRI;
            2'd1: state <= DISP_SQUARE;
            2'd2: state <= DISP_EQ_TRI;
            default: state <= DISP_RECT;
          endcase
        default: if (shape_reset) state <= IDLE;
      endcase
    end
  end

  logic        region_q;
  logic [23:0] shape_rgb, rgb;

  always_comb begin
    unique case (state)
      DISP_TRI:    shape_rgb = tri_out;
      DISP_SQUARE: shape_rgb = square_out;
      DISP_EQ_TRI: shape_rgb = eq_tri_out;
      DISP_RECT:   shape_rgb = rect_out;
      default:     shape_rgb = 24'h0;
    endcase
    rgb = region_q ? shape_rgb : (user_pix ? 24'hFF_FF_FF : 24'h0);
  end

  always_ff @(posedge pixel_clock) begin
    if (reset) begin
      region_q <= 1'b0;
      {vga_out_red, vga_out_green, vga_out_blue} <= '0;
    end else begin
      region_q <= def_region;
      {vga_out_red, vga_out_green, vga_out_blue} <= rgb;
    end
  end

endmodule
