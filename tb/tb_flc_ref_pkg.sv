// tb_flc_ref_pkg: behavioural reference model of the fuzzy traction
// controller, used by the testbenches to work out expected values.
//
// It is written independently of the RTL package: membership functions are
// described by their corner points (left foot, peak start, peak end, right
// foot) on a 0..1 universe scaled by 240, taken straight from the MF
// tables (0, 0.167, 0.333, 0.5, 0.667, 0.833, 1.0), and evaluated by
// linear interpolation rather than by slope arithmetic. The rule table is
// restated as integer indices. Degrees use full scale 200.
package tb_flc_ref_pkg;

  localparam int U  = 240;   // universe full scale
  localparam int G  = 200;   // degree full scale

  // Corner points of a trapezoid in universe units; a triangle has b == c.
  typedef struct { int a; int b; int c; int d; } trap_t;

  // Points at k/6 of the universe
  function automatic int p6(int k); return k * U / 6; endfunction

  // Corner / speed: very smooth|slow .. very sharp|fast
  function automatic trap_t five_mf(int k);
    trap_t t;
    case (k)
      0: t = '{a: -1000,  b: -1000, c: p6(1), d: p6(2)};
      1: t = '{a: p6(1),  b: p6(2), c: p6(2), d: p6(3)};
      2: t = '{a: p6(2),  b: p6(3), c: p6(3), d: p6(4)};
      3: t = '{a: p6(3),  b: p6(4), c: p6(4), d: p6(5)};
      default: t = '{a: p6(4), b: p6(5), c: 1000, d: 1000};
    endcase
    return t;
  endfunction

  // Load: not heavy (shoulder 0..0.167..0.333), heavy (0.167..0.333..0.5)
  function automatic trap_t load_mf(int k);
    if (k == 0) return '{a: -1000, b: -1000, c: p6(1), d: p6(2)};
    else        return '{a: p6(1), b: p6(2), c: p6(2), d: p6(3)};
  endfunction

  // Spring rate: triangles centred at k+1 sixths
  function automatic trap_t rate_mf(int k);
    return '{a: p6(k), b: p6(k+1), c: p6(k+1), d: p6(k+2)};
  endfunction

  // Degree of x in trapezoid t, 0..G, rounded down
  function automatic int degree(trap_t t, int x);
    if (x <= t.a || x >= t.d) begin
      if (x >= t.b && x <= t.c) return G;  // shoulders reaching past the ends
      return 0;
    end
    if (x < t.b) return (G * (x - t.a)) / (t.b - t.a);
    if (x <= t.c) return G;
    return (G * (t.d - x)) / (t.d - t.c);
  endfunction

  // Table of if-then rules: corner, load, speed, front, rear
  // corner 0 very smooth .. 4 very sharp; load 0 not heavy, 1 heavy;
  // speed 0 very slow .. 4 very fast; rate 0 very soft .. 4 very stiff
  localparam int RULE_TAB [20][5] = '{
    '{0,0,4, 4,0}, '{0,1,2, 4,0}, '{0,1,3, 4,0}, '{0,1,4, 4,0},
    '{1,0,4, 3,1}, '{1,1,2, 3,1}, '{1,1,3, 3,1}, '{1,1,4, 3,1},
    '{2,0,4, 2,2}, '{2,1,2, 2,2}, '{2,1,3, 2,2}, '{2,1,4, 2,2},
    '{3,0,4, 1,3}, '{3,1,2, 1,3}, '{3,1,3, 1,3}, '{3,1,4, 1,3},
    '{4,0,4, 0,4}, '{4,1,2, 0,4}, '{4,1,3, 0,4}, '{4,1,4, 0,4}
  };

  function automatic int imax(int x, int y); return x > y ? x : y; endfunction
  function automatic int imin(int x, int y); return x < y ? x : y; endfunction

  // Rule strength; use_and selects min, otherwise max
  function automatic int rule_strength(int r, bit use_and,
                                       int dc[5], int dl[2], int ds[5]);
    int c = dc[RULE_TAB[r][0]];
    int l = dl[RULE_TAB[r][1]];
    int s = ds[RULE_TAB[r][2]];
    return use_and ? imin(imin(c, l), s) : imax(imax(c, l), s);
  endfunction

  // Clip level of each output set (max over rules naming it)
  // out: 0 front, 1 rear
  function automatic void clips(bit use_and, int dc[5], int dl[2], int ds[5],
                                int out, output int clip[5]);
    for (int k = 0; k < 5; k++) clip[k] = 0;
    for (int r = 0; r < 20; r++) begin
      int k = RULE_TAB[r][3 + out];
      clip[k] = imax(clip[k], rule_strength(r, use_and, dc, dl, ds));
    end
  endfunction

  // Centroid over integer sample points 0..U step `step`, rounded to
  // nearest; returns -1 when nothing fires
  function automatic int centroid(int clip[5], int step);
    longint num = 0, den = 0;
    for (int y = 0; y <= U; y += step) begin
      int m = 0;
      for (int k = 0; k < 5; k++)
        m = imax(m, imin(clip[k], degree(rate_mf(k), y)));
      num += longint'(y) * m;
      den += m;
    end
    if (den == 0) return -1;
    return int'((num + den / 2) / den);
  endfunction

  // Physical reading onto 0..U, rounded, saturated
  function automatic int scale_in(int phys, int range);
    if (phys >= range) return U;
    return int'($floor(real'(phys) * U / range + 0.5));
  endfunction

  // Normalised output onto 0.1 % units, rounded
  function automatic int scale_out(int y);
    return int'($floor(real'(y) * 1000.0 / U + 0.5));
  endfunction

endpackage
