// tb_video_src: behavioural model of the camera and its video decoder chip,
// for testbenches. It streams an ITU-R BT.656 style byte sequence, one
// byte per clock: per line EAV (FF 00 00 XY), H_BLANK blanking bytes
// (80 10 ...), SAV (FF 00 00 XY) and ACTIVE_PIX pixels as Cb Y Cr Y groups
// (two pixels per group). Each field has VBI_LINES blanking lines (V = 1)
// followed by ACTIVE_LINES active lines; the odd field (F = 0) comes first.
// The picture: background luma 8'h20, the laser spot at (spot_x, spot_y)
// with luma 8'hF0 in both fields, and, if pattern is set, white (8'h90)
// pixels where x == 2 * y.
// field_count counts completed frames' fields for the testbench.
module tb_video_src #(
  parameter int ACTIVE_PIX   = 32,
  parameter int ACTIVE_LINES = 12,
  parameter int VBI_LINES    = 3,
  parameter int H_BLANK      = 8
) (
  input  logic       clk,
  input  int         spot_x,
  input  int         spot_y,
  input  logic       pattern,
  output logic [7:0] data,
  output int         fields
);

  function automatic logic [7:0] xy(bit f, bit v, bit h);
    return {1'b1, f, v, h, v ^ h, f ^ h, f ^ v, f ^ v ^ h};
  endfunction

  function automatic logic [7:0] luma(int x, int y);
    if (x == spot_x && y == spot_y) return 8'hF0;
    if (pattern && x == 2 * y) return 8'h90;
    return 8'h20;
  endfunction

  task automatic put(logic [7:0] b);
    data = b;
    @(posedge clk);
    #1;
  endtask

  initial begin
    data   = 8'h80;
    fields = 0;
    #1;
    forever begin
      for (int f = 0; f < 2; f++) begin
        for (int l = 0; l < VBI_LINES + ACTIVE_LINES; l++) begin
          automatic bit v = l < VBI_LINES;
          put(8'hFF); put(8'h00); put(8'h00); put(xy(f[0], v, 1'b1));
          for (int i = 0; i < H_BLANK / 2; i++) begin put(8'h80); put(8'h10); end
          put(8'hFF); put(8'h00); put(8'h00); put(xy(f[0], v, 1'b0));
          for (int p = 0; p < ACTIVE_PIX; p += 2) begin
            put(8'h80);
            put(v ? 8'h10 : luma(p, l - VBI_LINES));
            put(8'h80);
            put(v ? 8'h10 : luma(p + 1, l - VBI_LINES));
          end
        end
        fields++;
      end
    end
  end

endmodule
