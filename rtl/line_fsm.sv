// line_fsm: the "Line" worker FSM of the AI module.
//
// For every stroke k of the drawing it reads the two end points (addresses
// 2k and 2k+1 of the coordinate memory), computes the stroke's length and
// the angle it makes with the horizontal, and writes both to the Lines
// memory. On request of the Line Pair FSM (seg_req) it does the same for the
// imaginary line from the start point of stroke seg_i to the start point of
// stroke seg_j and returns the result on seg_len / seg_ang instead.
//
// All arithmetic goes through the shared floating point ALU:
//     len   = sqrt(dx*dx + dy*dy)
//     ratio = min(|dx|,|dy|) / max(|dx|,|dy|)
//     a     = atan(ratio) from the internal ROM (1/256 steps),
//     a     = 90 - a                      if |dy| > |dx|
//     angle = a, 180 - a, 180 + a, 360 - a  by the quadrant of (dx, dy)
// The document gives the outputs (length and angle of each stroke) and the
// internal ROM; this way of getting the angle from an arctangent table is
// this design's own. Angles are in degrees in [0, 360), measured in the
// camera's coordinate system (y grows downwards). A zero-length segment gets
// length 0 and angle 0.
//
// Interface: start pulses with n_lines valid; done pulses after the last
// stroke is written. seg_req pulses with seg_i, seg_j valid; seg_done pulses
// with seg_len, seg_ang. A stroke takes roughly 1.4k cycles, most of it the
// square root.
module line_fsm
  import smartkit_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          start,
  input  logic [$clog2(MAX_LINES):0]    n_lines,
  output logic                          done,
  // imaginary-line service for the Line Pair FSM
  input  logic                          seg_req,
  input  logic [$clog2(MAX_LINES)-1:0]  seg_i,
  input  logic [$clog2(MAX_LINES)-1:0]  seg_j,
  output logic                          seg_done,
  output fp_t                           seg_len,
  output fp_t                           seg_ang,
  // coordinate memory read port
  output logic [$clog2(MAX_POINTS)-1:0] c_addr,
  input  point_t                        c_data,
  // Lines memory write port
  output logic                          l_we,
  output logic [$clog2(MAX_LINES)-1:0]  l_addr,
  output line_t                         l_data,
  // shared ALU
  output alu_req_t                      alu_req,
  input  alu_rsp_t                      alu_rsp
);

  typedef enum logic [3:0] {
    S_IDLE, S_RD0, S_RD1, S_RD2, S_PREP, S_GO, S_WAIT, S_ROMW, S_ROM, S_ROM2, S_FIN
  } state_e;
  typedef enum logic [2:0] {
    K_DXX, K_DYY, K_SUM, K_SQRT, K_RATIO, K_STEEP, K_QUAD
  } step_e;

  state_e state;
  step_e  step;
  logic   seg_mode;
  logic [$clog2(MAX_LINES)-1:0] k;
  logic [$clog2(MAX_LINES):0]   n_q;
  logic [$clog2(MAX_LINES)-1:0] si, sj;
  point_t p1, p2;

  logic signed [X_BITS:0] dx;
  logic signed [Y_BITS:0] dy;
  logic                   steep;
  fp_t    fdy, fmin, fmax, t1, len, ang;
  alufn_e op_fn;
  fp_t    op_a, op_b;

  logic [8:0] rom_addr;
  fp_t        rom_data;
  atan_rom u_rom (.clk, .addr(rom_addr), .data(rom_data));

  assign alu_req  = '{go: state == S_GO, fn: op_fn, a: op_a, b: op_b};
  assign c_addr   = (state == S_RD0) ? (seg_mode ? {si, 1'b0} : {k, 1'b0})
                                     : (seg_mode ? {sj, 1'b0} : {k, 1'b1});
  assign l_we     = state == S_FIN && !seg_mode;
  assign l_addr   = k;
  assign l_data   = '{len: len, ang: ang};
  assign seg_len  = len;
  assign seg_ang  = ang;

  // next ALU operation of a step
  task automatic issue(step_e s, alufn_e f, fp_t x, fp_t y);
    step  <= s;
    op_fn <= f;
    op_a  <= x;
    op_b  <= y;
    state <= S_GO;
  endtask

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      step  <= K_DXX;
      done  <= 1'b0;
      seg_done <= 1'b0;
      seg_mode <= 1'b0;
      k <= '0; n_q <= '0; si <= '0; sj <= '0;
      p1 <= '0; p2 <= '0; dx <= '0; dy <= '0; steep <= 1'b0;
      fdy <= '0; fmin <= '0; fmax <= '0; t1 <= '0; len <= '0; ang <= '0;
      op_fn <= FN_ADD; op_a <= '0; op_b <= '0; rom_addr <= '0;
    end else begin
      done     <= 1'b0;
      seg_done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            seg_mode <= 1'b0;
            k        <= '0;
            n_q      <= n_lines;
            if (n_lines == 0) done <= 1'b1;
            else              state <= S_RD0;
          end else if (seg_req) begin
            seg_mode <= 1'b1;
            si       <= seg_i;
            sj       <= seg_j;
            state    <= S_RD0;
          end
        end
        S_RD0: state <= S_RD1;
        S_RD1: begin p1 <= c_data; state <= S_RD2; end
        S_RD2: begin p2 <= c_data; state <= S_PREP; end
        S_PREP: begin
          automatic logic signed [X_BITS:0] ddx = $signed({1'b0, p2.x}) - $signed({1'b0, p1.x});
          automatic logic signed [Y_BITS:0] ddy = $signed({1'b0, p2.y}) - $signed({1'b0, p1.y});
          automatic logic [X_BITS:0] ax = ddx[X_BITS] ? -ddx : ddx;
          automatic logic [X_BITS:0] ay = ddy[Y_BITS] ? -(X_BITS+1)'(ddy) : (X_BITS+1)'(ddy);
          dx    <= ddx;
          dy    <= ddy;
          steep <= ay > ax;
          fdy   <= fp_from_int(32'(ddy));
          fmin  <= fp_from_int(32'((ay > ax) ? ax : ay));
          fmax  <= fp_from_int(32'((ay > ax) ? ay : ax));
          issue(K_DXX, FN_MUL, fp_from_int(32'(ddx)), fp_from_int(32'(ddx)));
        end
        S_GO: state <= S_WAIT;
        S_WAIT: if (alu_rsp.done) begin
          unique case (step)
            K_DXX:  begin t1 <= alu_rsp.o; issue(K_DYY, FN_MUL, fdy, fdy); end
            K_DYY:  issue(K_SUM, FN_ADD, t1, alu_rsp.o);
            K_SUM:  issue(K_SQRT, FN_SQRT, alu_rsp.o, FP_ZERO);
            K_SQRT: begin
              len <= alu_rsp.o;
              if (fp_is_zero(fmax)) begin
                ang   <= FP_ZERO;
                state <= S_FIN;
              end else begin
                issue(K_RATIO, FN_DIV, fmin, fmax);
              end
            end
            K_RATIO: begin
              rom_addr <= fp_to_index(alu_rsp.o, 8);
              state    <= S_ROMW;
            end
            K_STEEP: begin
              ang   <= alu_rsp.o;
              state <= S_ROM2;
            end
            K_QUAD: begin
              ang   <= alu_rsp.o;
              state <= S_FIN;
            end
            default: state <= S_IDLE;
          endcase
        end
        S_ROMW: state <= S_ROM;
        S_ROM: begin
          // table value is valid now
          ang <= rom_data;
          if (steep) issue(K_STEEP, FN_SUB, FP_90, rom_data);
          else       state <= S_ROM2;
        end
        S_ROM2: begin
          // fold the first-quadrant angle into the right quadrant
          // (a direction just below the horizontal whose table angle is 0
          // stays at 0 rather than becoming 360)
          if (!dx[X_BITS] && !dy[Y_BITS])     state <= S_FIN;
          else if (!dx[X_BITS] && fp_is_zero(ang)) state <= S_FIN;
          else if (dx[X_BITS] && !dy[Y_BITS]) issue(K_QUAD, FN_SUB, FP_180, ang);
          else if (dx[X_BITS])                issue(K_QUAD, FN_ADD, FP_180, ang);
          else                                issue(K_QUAD, FN_SUB, FP_360, ang);
        end
        S_FIN: begin
          if (seg_mode) begin
            seg_done <= 1'b1;
            state    <= S_IDLE;
          end else if (32'(k) == 32'(n_q) - 1) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            k     <= k + 1'b1;
            state <= S_RD0;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
