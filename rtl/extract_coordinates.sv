// extract_coordinates: finds one stroke end point for the AI module.
//
// When the user presses the button, the next complete odd field is taken as
// a snapshot: while it streams past, the module keeps the largest luminance
// value seen and the {y, x} position where it occurred, counting x and y as
// the RAM writer does (x per luminance sample, y per line). At the start of
// the following even field (sef) the position of the brightest pixel, the
// laser spot, is delivered with a one-cycle coord_valid pulse. Pressing the
// button at the start and at the end of each stroke gives the two end
// points. The document gives this behaviour; the odd-field snapshot, the
// first-maximum tie rule and the handshake are this design's own.
//
// Interface: button is a level (synchronised elsewhere); a rising edge arms
// the capture. Video strobes come from video_decoder, luma is its data byte.
module extract_coordinates (
  input  logic       clk,
  input  logic       rst,
  input  logic       button,
  input  logic       sof,
  input  logic       sef,
  input  logic       eav,
  input  logic       vbi,
  input  logic       y_valid,
  input  logic [7:0] luma,
  output logic       coord_valid,
  output logic [9:0] coord_x,
  output logic [7:0] coord_y
);

  typedef enum logic [1:0] {S_IDLE, S_ARMED, S_CAPTURE} state_e;
  state_e state;

  logic       button_q;
  logic [9:0] x_count, best_x;
  logic [7:0] y_count, best_y;
  logic [7:0] best_luma;
  logic       line_live;   // current line belongs to the active field

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      button_q <= 1'b0;
      x_count <= '0; y_count <= '0; best_x <= '0; best_y <= '0; best_luma <= '0;
      line_live <= 1'b0;
      coord_valid <= 1'b0; coord_x <= '0; coord_y <= '0;
    end else begin
      button_q    <= button;
      coord_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (button && !button_q) state <= S_ARMED;
        S_ARMED: if (sof) begin
          x_count   <= '0;
          y_count   <= '0;
          best_luma <= '0;
          best_x    <= '0;
          best_y    <= '0;
          line_live <= 1'b1;
          state     <= S_CAPTURE;
        end
        S_CAPTURE: begin
          if (sef) begin
            coord_valid <= 1'b1;
            coord_x     <= best_x;
            coord_y     <= best_y;
            state       <= S_IDLE;
          end else if (eav) begin
            if (line_live) y_count <= y_count + 8'd1;
            x_count   <= '0;
            line_live <= 1'b0;
          end else if (y_valid && !vbi) begin
            line_live <= 1'b1;
            x_count   <= x_count + 10'd1;
            if (luma > best_luma) begin
              best_luma <= luma;
              best_x    <= x_count;
              best_y    <= y_count;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
