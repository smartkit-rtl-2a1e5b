// video_decoder: front end of the input stage. It follows the digital video
// byte stream of the camera's video decoder chip (ITU-R BT.656 style: Cb Y
// Cr Y ... at 27 MHz, one byte per clock) and marks where lines, fields and
// active video begin and end.
//
// Timing reference codes (TRS) are the bytes FF 00 00 followed by a status
// word XY = {1, F, V, H, P3, P2, P1, P0}. A byte-serial FSM alternately looks
// for an end-of-active-video code (EAV0..EAV3) and a start-of-active-video
// code (SAV0..SAV3, then SKIP), as in the document's state diagram. A code
// counts only if bit 7 is set, H has the expected value and the protection
// bits match (P3 = V^H, P2 = F^H, P1 = F^V, P0 = F^V^H).
//   eav      pulses on the status word of a valid EAV (start of a line)
//   sav      pulses on the status word of a valid SAV (start of active video)
//   sof/sef  pulse with sav on the first active line (V = 0) of the odd
//            (F = 0) or even (F = 1) field
//   vbi      V bit of the line being received (1 in vertical blanking)
// After an SAV a 2-bit phase counter tags the bytes Cb, Y, Cr, Y; y_valid is
// high in the cycle a luminance byte of an active line (V = 0) is on
// data_in, and pix is that byte's black/white decision (1 if above THRESH).
// Active data ends at the FF that opens the next EAV.
//
// The TRS format, the state sequence, the phase counter and the threshold
// 8'h50 (80) are the document's. Deriving sof/sef from a change of F or the
// end of vertical blanking, the vbi output and the en input gating every
// output are this design's own reading.
module video_decoder #(
  parameter logic [7:0] THRESH = 8'h50
) (
  input  logic       clk,       // 27 MHz byte clock
  input  logic       rst,
  input  logic       en,        // decoder enable
  input  logic [7:0] data_in,
  output logic       eav,
  output logic       sav,
  output logic       sof,
  output logic       sef,
  output logic       vbi,
  output logic       y_valid,
  output logic       pix
);

  typedef enum logic [3:0] {
    EAV0, EAV1, EAV2, EAV3, SAV0, SAV1, SAV2, SAV3, SKIP
  } state_e;
  state_e state;

  logic f_bit, v_bit, h_bit, prot_ok, xy_ok;
  assign f_bit   = data_in[6];
  assign v_bit   = data_in[5];
  assign h_bit   = data_in[4];
  assign prot_ok = data_in[3] == (v_bit ^ h_bit) && data_in[2] == (f_bit ^ h_bit) &&
                   data_in[1] == (f_bit ^ v_bit) && data_in[0] == (f_bit ^ v_bit ^ h_bit);
  assign xy_ok   = data_in[7] && prot_ok;

  logic [1:0] phase;        // 0 Cb, 1 Y, 2 Cr, 3 Y
  logic       in_active;    // between SAV and the next TRS
  logic       last_f, last_v;
  logic       sav_hit;

  assign sav_hit = en && state == SAV3 && xy_ok && !h_bit;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= EAV0;
      eav <= 1'b0; sav <= 1'b0; sof <= 1'b0; sef <= 1'b0;
      phase <= '0; in_active <= 1'b0;
      last_f <= 1'b1; last_v <= 1'b1; vbi <= 1'b1;
    end else begin
      eav <= 1'b0;
      sav <= 1'b0;
      sof <= 1'b0;
      sef <= 1'b0;
      phase <= phase + 2'd1;
      if (data_in == 8'hFF) in_active <= 1'b0;
      unique case (state)
        EAV0: state <= (data_in == 8'hFF) ? EAV1 : EAV0;
        EAV1: state <= (data_in == 8'h00) ? EAV2 : EAV0;
        EAV2: state <= (data_in == 8'h00) ? EAV3 : EAV0;
        EAV3: if (en && xy_ok && h_bit) begin
                eav   <= 1'b1;
                state <= SAV0;
              end else begin
                state <= EAV0;
              end
        SAV0: state <= (data_in == 8'hFF) ? SAV1 : SAV0;
        SAV1: state <= (data_in == 8'h00) ? SAV2 : SAV0;
        SAV2: state <= (data_in == 8'h00) ? SAV3 : SAV0;
        SAV3: if (sav_hit) begin
                sav       <= 1'b1;
                phase     <= 2'd0;
                in_active <= 1'b1;
                vbi       <= v_bit;
                last_f    <= f_bit;
                last_v    <= v_bit;
                // first active line of a field: F changed or blanking just ended
                if (!v_bit && (last_v || last_f != f_bit)) begin
                  sof <= !f_bit;
                  sef <= f_bit;
                end
                state <= SKIP;
              end else begin
                state <= SAV0;
              end
        SKIP: state <= EAV0;
        default: state <= EAV0;
      endcase
    end
  end

  assign y_valid = en && in_active && !vbi && phase[0] && data_in != 8'hFF;
  assign pix     = data_in > THRESH;

endmodule
