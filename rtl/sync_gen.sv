// sync_gen: VGA timing generator for 640 x 480 at a 25 MHz pixel clock.
//
// Two counters walk the frame: pixel_count 0..799 along the line and
// line_count 0..523 down the frame; each wraps at its maximum. A line has
// 640 active pixels, 16 front-porch pixels, 96 sync pixels and 48 back-porch
// pixels; a frame has 480 active lines, 11 front-porch lines, 2 sync lines
// and 31 back-porch lines (all from the document). From the counters it
// decodes, for the pixel the counters point at:
//   blank      outside the 640 x 480 active area
//   comp_sync  composite sync for the video DAC, h_sync XOR v_sync as the
//              document's code does
// and the separate h_sync / v_sync for the monitor, which go straight to the
// connector and so are delayed by DAC_DELAY (2) clocks to line up with the
// DAC's two-stage pipeline. All sync outputs are active high here.
//
// Timing: counters advance every clock; blank and comp_sync are registered
// one clock after the counter value they describe, h_sync / v_sync
// DAC_DELAY clocks after that.
module sync_gen #(
  parameter int unsigned H_ACTIVE  = 640,
  parameter int unsigned H_FP      = 16,
  parameter int unsigned H_SYNC    = 96,
  parameter int unsigned H_BP      = 48,
  parameter int unsigned V_ACTIVE  = 480,
  parameter int unsigned V_FP      = 11,
  parameter int unsigned V_SYNC    = 2,
  parameter int unsigned V_BP      = 31,
  parameter int unsigned DAC_DELAY = 2
) (
  input  logic        pixel_clock,
  input  logic        reset,
  output logic [10:0] pixel_count,
  output logic [10:0] line_count,
  output logic        blank,
  output logic        comp_sync,
  output logic        h_sync,
  output logic        v_sync
);

  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  logic h_now, v_now;
  logic [DAC_DELAY:0] h_pipe, v_pipe;

  assign h_now = 32'(pixel_count) >= H_ACTIVE + H_FP && 32'(pixel_count) < H_ACTIVE + H_FP + H_SYNC;
  assign v_now = 32'(line_count) >= V_ACTIVE + V_FP && 32'(line_count) < V_ACTIVE + V_FP + V_SYNC;

  always_ff @(posedge pixel_clock) begin
    if (reset) begin
      pixel_count <= '0;
      line_count  <= '0;
      blank       <= 1'b1;
      comp_sync   <= 1'b0;
      h_pipe      <= '0;
      v_pipe      <= '0;
    end else begin
      if (32'(pixel_count) == H_TOTAL - 1) begin
        pixel_count <= '0;
        line_count  <= (32'(line_count) == V_TOTAL - 1) ? 11'd0 : line_count + 11'd1;
      end else begin
        pixel_count <= pixel_count + 11'd1;
      end
      blank     <= 32'(pixel_count) >= H_ACTIVE || 32'(line_count) >= V_ACTIVE;
      comp_sync <= h_now ^ v_now;
      h_pipe    <= {h_pipe[DAC_DELAY-1:0], h_now};
      v_pipe    <= {v_pipe[DAC_DELAY-1:0], v_now};
    end
  end

  assign h_sync = h_pipe[DAC_DELAY];
  assign v_sync = v_pipe[DAC_DELAY];

endmodule
