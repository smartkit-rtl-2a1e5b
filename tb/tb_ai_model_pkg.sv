// tb_ai_model_pkg: double-precision reference of the learner's arithmetic
// and a generator of test drawings, shared by the AI-level testbenches.
//
// draw_shape() returns the stroke end points (start, end per stroke) of one
// of four shapes, scaled, shifted and with up to +-noise pixels of jitter:
//   0 isosceles right triangle, 1 square, 2 equilateral triangle,
//   3 rectangle (2.5 : 1)
// always drawn in the same stroke order and direction. values() computes
// the four values of every stroke pair the way the hardware defines them
// (length ratios, angle differences wrapped into (-150, 210], imaginary
// line between start points); make_def() gives mean and population
// standard deviation over a set of examples and score() the error of a
// drawing against a definition (sum of d^2 over |d| > std). The amb flags
// mark drawings with an angle difference near the range edges, where a
// difference of a fraction of a degree (the hardware's 1/256 angle table)
// can move a value from one end of the range to the other; results that
// depend on such values cannot be compared with this reference. Entries a
// definition does not hold count as mean 0, std 0, as in the hardware's
// zero-initialised memory.
package tb_ai_model_pkg;
  localparam int MAXL = 8, MAXP = 28;
  localparam real PI = 3.14159265358979;

  typedef struct {
    int n;                  // number of points
    int x[16], y[16];
  } drawing_t;

  typedef struct {
    int n_pairs;
    real v[MAXP][4];
    bit amb;                // an angle value lies within 2 degrees of a range edge
  } values_t;

  typedef struct {
    real mean[MAXP][4], std[MAXP][4];
    bit amb;                // built from an example with amb set
  } def_t;

  function automatic drawing_t draw_shape(int shape, real scale, int ox, int oy, int noise);
    drawing_t d;
    real vx[4], vy[4];
    int nv;
    case (shape)
      0: begin nv = 3; vx = '{0, 0, 100, 0}; vy = '{0, 100, 100, 0}; end
      1: begin nv = 4; vx = '{0, 0, 100, 100}; vy = '{0, 100, 100, 0}; end
      2: begin nv = 3; vx = '{50, 0, 100, 0}; vy = '{0, 87, 87, 0}; end
      default: begin nv = 4; vx = '{0, 0, 125, 125}; vy = '{0, 50, 50, 0}; end
    endcase
    d.n = 2 * nv;
    for (int k = 0; k < nv; k++) begin
      for (int e = 0; e < 2; e++) begin
        automatic int v = (k + e) % nv;
        automatic int jx = (noise > 0) ? int'($urandom % (2 * noise + 1)) - noise : 0;
        automatic int jy = (noise > 0) ? int'($urandom % (2 * noise + 1)) - noise : 0;
        d.x[2*k+e] = ox + int'(vx[v] * scale) + jx;
        d.y[2*k+e] = oy + int'(vy[v] * scale) + jy;
      end
    end
    return d;
  endfunction

  function automatic real wrap(real a);
    if (a > 210.0) return a - 360.0;
    if (a <= -150.0) return a + 360.0;
    return a;
  endfunction

  function automatic void seg(drawing_t d, int a, int b, output real len, output real ang);
    real dx = real'(d.x[b] - d.x[a]), dy = real'(d.y[b] - d.y[a]);
    len = $sqrt(dx * dx + dy * dy);
    ang = (dx == 0 && dy == 0) ? 0.0 : $atan2(dy, dx) * 180.0 / PI;
    if (ang < 0) ang += 360.0;
  endfunction

  function automatic values_t values(drawing_t d);
    values_t r;
    int nl = d.n / 2, p = 0;
    real len[MAXL], ang[MAXL];
    r.amb = 0;
    for (int k = 0; k < nl; k++) seg(d, 2*k, 2*k+1, len[k], ang[k]);
    for (int i = 0; i < nl; i++)
      for (int j = i + 1; j < nl; j++) begin
        real kl, ka;
        seg(d, 2*i, 2*j, kl, ka);
        r.v[p][0] = len[j] / len[i];
        r.v[p][1] = wrap(ang[j] - ang[i]);
        r.v[p][2] = kl / len[i];
        r.v[p][3] = wrap(ka - ang[i]);
        if (r.v[p][1] > 208.0 || r.v[p][1] < -148.0 || r.v[p][3] > 208.0 || r.v[p][3] < -148.0)
          r.amb = 1;
        p++;
      end
    r.n_pairs = p;
    return r;
  endfunction

  function automatic def_t make_def(values_t ex[4]);
    def_t df;
    df.amb = ex[0].amb || ex[1].amb || ex[2].amb || ex[3].amb;
    for (int p = 0; p < MAXP; p++)
      for (int q = 0; q < 4; q++) begin
        real m = 0, s = 0;
        if (p < ex[0].n_pairs) begin
          for (int e = 0; e < 4; e++) m += ex[e].v[p][q];
          m /= 4.0;
          for (int e = 0; e < 4; e++) s += (ex[e].v[p][q] - m) * (ex[e].v[p][q] - m);
          s = $sqrt(s / 4.0);
        end
        df.mean[p][q] = m; df.std[p][q] = s;
      end
    return df;
  endfunction

  function automatic real score(values_t v, def_t df);
    real err = 0;
    for (int p = 0; p < v.n_pairs; p++)
      for (int q = 0; q < 4; q++) begin
        real d = v.v[p][q] - df.mean[p][q];
        if (d < 0) d = -d;
        if (d > df.std[p][q]) err += d * d;
      end
    return err;
  endfunction
endpackage
