// decoder_write_to_ram: stores the drawing seen by the camera in the image
// RAM, one bit per pixel (1 = white, the laser spot).
//
// Two counters give the position of the current pixel: x counts luminance
// samples (one pixel per two bytes) along the line and y counts lines of the
// field; the RAM address is the concatenation {y[7:0], x[9:0]}, 18 bits, as in
// the document. Only white pixels are written. The state names follow the
// document's state diagram:
//   INITIAL -> FIND_SOF_SAV          always
//   FIND_SOF_SAV -> INCREMENT        on sof (x = y = 0)
//   INCREMENT -> FIND_EAV            when x reaches ACTIVE_PIXELS (640)
//   FIND_EAV -> FIND_SEF_SAV         on eav (y + 1, x = 0)
//   FIND_SEF_SAV -> INCREMENT2       on sef
//   INCREMENT2 -> FIND_EAV2          when x reaches ACTIVE_PIXELS
//   FIND_EAV2 -> INITIAL             on eav
// The diagram has no path back from FIND_SEF_SAV to INCREMENT; this design
// adds one, taken on the sav of the next active line of the odd field, so
// that every odd-field line is stored (the text says y advances at every
// eav). An eav that arrives before x reaches ACTIVE_PIXELS ends the line the
// same way. The even field (INCREMENT2) is counted but not written, and lines
// from ACTIVE_LINES (240) on are not written: own choices that keep one field
// in the 2^18-bit RAM.
//
// Timing: we/addr/wdata are registered, one clock after the luminance byte.
module decoder_write_to_ram #(
  parameter int unsigned ACTIVE_PIXELS = 640,
  parameter int unsigned ACTIVE_LINES  = 240
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        sof,
  input  logic        sef,
  input  logic        sav,
  input  logic        eav,
  input  logic        vbi,
  input  logic        y_valid,
  input  logic        pix,
  output logic        we,
  output logic [17:0] addr,
  output logic        wdata
);

  typedef enum logic [2:0] {
    INITIAL, FIND_SOF_SAV, INCREMENT, FIND_EAV, FIND_SEF_SAV, INCREMENT2, FIND_EAV2
  } state_e;
  state_e state;

  logic [9:0] x_count;
  logic [7:0] y_count;
  logic       y_full;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= INITIAL;
      x_count <= '0; y_count <= '0; y_full <= 1'b0;
      we <= 1'b0; addr <= '0; wdata <= 1'b0;
    end else begin
      we <= 1'b0;
      unique case (state)
        INITIAL: state <= FIND_SOF_SAV;
        FIND_SOF_SAV: if (sof) begin
          x_count <= '0;
          y_count <= '0;
          y_full  <= 1'b0;
          state   <= INCREMENT;
        end
        INCREMENT: begin
          if (eav) begin
            x_count <= '0;
            {y_full, y_count} <= (32'(y_count) == ACTIVE_LINES - 1) ? {1'b1, y_count}
                                                                     : {y_full, y_count + 8'd1};
            state   <= FIND_SEF_SAV;
          end else if (y_valid) begin
            if (pix && !y_full) begin
              we    <= 1'b1;
              addr  <= {y_count, x_count};
              wdata <= 1'b1;
            end
            x_count <= x_count + 10'd1;
            if (32'(x_count) == ACTIVE_PIXELS - 1) state <= FIND_EAV;
          end
        end
        FIND_EAV: if (eav) begin
          x_count <= '0;
          {y_full, y_count} <= (32'(y_count) == ACTIVE_LINES - 1) ? {1'b1, y_count}
                                                                   : {y_full, y_count + 8'd1};
          state   <= FIND_SEF_SAV;
        end
        FIND_SEF_SAV: begin
          if (sef) begin
            x_count <= '0;
            state   <= INCREMENT2;
          end else if (sav && !vbi) begin
            state <= INCREMENT;
          end
        end
        INCREMENT2: begin
          if (eav) begin
            state <= INITIAL;
          end else if (y_valid) begin
            x_count <= x_count + 10'd1;
            if (32'(x_count) == ACTIVE_PIXELS - 1) state <= FIND_EAV2;
          end
        end
        FIND_EAV2: if (eav) state <= INITIAL;
        default: state <= INITIAL;
      endcase
    end
  end

endmodule
