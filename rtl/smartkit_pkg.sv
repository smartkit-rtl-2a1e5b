// smartkit_pkg: types, sizes and IEEE-754 single-precision helper functions
// shared by the SmartKit near-miss learner.
//
// The learner works on IEEE single-precision numbers (1 sign bit, 8 exponent
// bits, 23 mantissa bits). The multi-cycle arithmetic lives in the float_*
// units; the helpers here are the small combinational pieces around them
// (integer to float conversion, sign-magnitude comparison, table index
// extraction). Denormal numbers are flushed to zero throughout, and results
// are truncated rather than rounded: both are choices of this design.
//
// Capacity follows the document: shapes of up to 8 strokes, 4 examples in a
// training set and up to 4 stored definitions.
package smartkit_pkg;

  // ---- capacity of the learner ------------------------------------------
  localparam int unsigned MAX_LINES  = 8;                        // strokes per drawing
  localparam int unsigned MAX_POINTS = 2 * MAX_LINES;            // two end points per stroke
  localparam int unsigned MAX_PAIRS  = MAX_LINES * (MAX_LINES - 1) / 2;
  localparam int unsigned N_EXAMPLES = 4;                        // drawings per training set
  localparam int unsigned N_DEFS     = 4;                        // stored definitions
  localparam int unsigned N_PROPS    = 4;                        // the "four values"

  // ---- coordinates delivered by the input stage ---------------------------
  localparam int unsigned X_BITS = 10;   // 640 pixels per line
  localparam int unsigned Y_BITS = 8;    // 240 lines per field

  typedef struct packed {
    logic [X_BITS-1:0] x;
    logic [Y_BITS-1:0] y;
  } point_t;

  // ---- floating point -----------------------------------------------------
  typedef logic [31:0] fp_t;

  localparam fp_t FP_ZERO = 32'h0000_0000;
  localparam fp_t FP_ONE  = 32'h3F80_0000;
  localparam fp_t FP_90   = 32'h42B4_0000;
  localparam fp_t FP_180  = 32'h4334_0000;
  // range (-150, 210] that angle differences are brought into (see linepair_fsm)
  localparam fp_t FP_WRAP_LO = 32'hC316_0000;   // -150.0
  localparam fp_t FP_WRAP_HI = 32'h4352_0000;   //  210.0
  localparam fp_t FP_360  = 32'h43B4_0000;
  localparam fp_t FP_INF  = 32'h7F80_0000;
  localparam fp_t FP_NAN  = 32'h7FC0_0000;

  // Operation selector of the floating point ALU ("alufn").
  typedef enum logic [2:0] {
    FN_ADD  = 3'd0,
    FN_SUB  = 3'd1,
    FN_MUL  = 3'd2,
    FN_DIV  = 3'd3,
    FN_SQRT = 3'd4
  } alufn_e;

  // One request to the shared ALU, and its answer.
  typedef struct packed {
    logic   go;     // one-cycle start pulse
    alufn_e fn;
    fp_t    a;
    fp_t    b;
  } alu_req_t;

  typedef struct packed {
    logic done;     // one-cycle pulse, o valid from then on until the next go
    fp_t  o;
  } alu_rsp_t;

  // Stroke record kept in the Lines memory.
  typedef struct packed {
    fp_t len;
    fp_t ang;       // degrees, [0,360)
  } line_t;

  // Definition entry: mean and standard deviation of one value of one pair.
  typedef struct packed {
    fp_t mean;
    fp_t std;
  } def_t;

  // Which worker of the AI module currently owns the shared resources.
  typedef enum logic [2:0] {
    PH_IDLE  = 3'd0,
    PH_LINE  = 3'd1,   // Line FSM (and, nested, Line Pair's requests to it)
    PH_PAIR  = 3'd2,   // Line Pair FSM
    PH_DEF   = 3'd3,   // Definition FSM
    PH_SCORE = 3'd4    // Score Calculator
  } phase_e;

  function automatic logic fp_is_zero(fp_t v);
    return v[30:23] == 8'd0;
  endfunction

  function automatic fp_t fp_abs(fp_t v);
    return {1'b0, v[30:0]};
  endfunction

  function automatic fp_t fp_neg(fp_t v);
    return {~v[31], v[30:0]};
  endfunction

  // a < b for ordinary (non-NaN) numbers; +0 and -0 compare equal.
  function automatic logic fp_lt(fp_t a, fp_t b);
    if (fp_is_zero(a) && fp_is_zero(b)) return 1'b0;
    if (fp_is_zero(a)) return ~b[31];
    if (fp_is_zero(b)) return a[31];
    if (a[31] != b[31]) return a[31];
    if (!a[31]) return a[30:0] < b[30:0];
    return a[30:0] > b[30:0];
  endfunction

  // Signed integer to float, truncating bits below the 24-bit significand.
  function automatic fp_t fp_from_int(logic signed [31:0] v);
    logic [31:0] mag;
    int          msb;
    logic [31:0] sig;
    mag = v[31] ? 32'(-v) : 32'(v);
    if (mag == 0) return FP_ZERO;
    msb = 0;
    for (int i = 0; i < 32; i++) if (mag[i]) msb = i;
    if (msb >= 23) sig = mag >> (msb - 23);
    else           sig = mag << (23 - msb);
    return {v[31], 8'(127 + msb), sig[22:0]};
  endfunction

  // round(r * 2^FRAC) for 0 <= r <= 1, used to index the arctangent table.
  function automatic logic [8:0] fp_to_index(fp_t r, int unsigned frac);
    logic [24:0] m;
    int          sh;
    logic [24:0] q;
    if (r[31] || fp_is_zero(r)) return 9'd0;
    m  = {2'b01, r[22:0]};
    sh = 150 - int'(r[30:23]) - int'(frac);   // value*2^frac = m >> sh
    if (sh <= 0) return 9'(1 << frac);        // r >= 1
    if (sh > 24) return 9'd0;
    q = (m + (25'd1 << (sh - 1))) >> sh;
    if (q > (25'd1 << frac)) q = 25'd1 << frac;
    return q[8:0];
  endfunction

endpackage
