// shape_rom: 128 x 128 image ROM of one definition shape, 24-bit RGB per
// pixel (red in bits 23:16, green 15:8, blue 7:0), addressed line * 128 +
// pixel.
//
// The display holds one such ROM per stored definition. The document loads
// them with drawings that it does not give; here the contents are computed
// at elaboration: the outline of a polygon, 2 pixels wide, in the shape's
// colour on black. SHAPE selects the polygon and colour (own drawings):
//   0 isosceles right triangle (red)      vertices (16,16) (16,112) (112,112)
//   1 square (green)                       (24,24) (104,24) (104,104) (24,104)
//   2 equilateral triangle (blue)          (64,18) (14,105) (114,105)
//   3 rectangle (yellow)                   (8,36) (120,36) (120,92) (8,92)
// (coordinates are (pixel, line)).
//
// Timing: synchronous read, data one clock after the address.
module shape_rom #(
  parameter int unsigned SHAPE = 0
) (
  input  logic        clk,
  input  logic [13:0] addr,
  output logic [23:0] data
);

  logic [23:0] rom [16384];

  function automatic logic [23:0] colour(int unsigned s);
    case (s)
      0:       return 24'hFF_00_00;
      1:       return 24'h00_FF_00;
      2:       return 24'h40_80_FF;
      default: return 24'hFF_FF_00;
    endcase
  endfunction

  // vertex k of polygon s, k wraps; {x, y}
  function automatic int vx(int unsigned s, int k);
    int tri_x[3] = '{16, 16, 112};
    int sq_x[4]  = '{24, 104, 104, 24};
    int eq_x[3]  = '{64, 14, 114};
    int re_x[4]  = '{8, 120, 120, 8};
    case (s)
      0:       return tri_x[k % 3];
      1:       return sq_x[k % 4];
      2:       return eq_x[k % 3];
      default: return re_x[k % 4];
    endcase
  endfunction

  function automatic int vy(int unsigned s, int k);
    int tri_y[3] = '{16, 112, 112};
    int sq_y[4]  = '{24, 24, 104, 104};
    int eq_y[3]  = '{18, 105, 105};
    int re_y[4]  = '{36, 36, 92, 92};
    case (s)
      0:       return tri_y[k % 3];
      1:       return sq_y[k % 4];
      2:       return eq_y[k % 3];
      default: return re_y[k % 4];
    endcase
  endfunction

  initial begin
    automatic int nv = (SHAPE == 0 || SHAPE == 2) ? 3 : 4;
    for (int i = 0; i < 16384; i++) rom[i] = 24'h0;
    // draw each edge by stepping along its longer axis
    for (int k = 0; k < nv; k++) begin
      automatic int x0 = vx(SHAPE, k), y0 = vy(SHAPE, k);
      automatic int x1 = vx(SHAPE, k + 1), y1 = vy(SHAPE, k + 1);
      automatic int dx = x1 - x0, dy = y1 - y0;
      automatic int n = (dx < 0 ? -dx : dx) > (dy < 0 ? -dy : dy) ? (dx < 0 ? -dx : dx)
                                                                   : (dy < 0 ? -dy : dy);
      for (int t = 0; t <= n; t++) begin
        automatic int px = x0 + (dx * t) / n;
        automatic int py = y0 + (dy * t) / n;
        for (int oy = 0; oy < 2; oy++)
          for (int ox = 0; ox < 2; ox++)
            if (px + ox < 128 && py + oy < 128)
              rom[(py + oy) * 128 + px + ox] = colour(SHAPE);
      end
    end
  end

  always_ff @(posedge clk) data <= rom[addr];

endmodule
