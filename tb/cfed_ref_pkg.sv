// Reference model of the C-FED decision, written with plain integers and
// independent of the RTL, for the testbenches.
//
// For a 5x5 window w[row][col] (center w[2][2]) with thresholds lo/hi and
// membership shape s/t it returns the class of the center and, for an edge
// class, which pixel the competition marks. It does not use the background
// shortcut, so comparing it with the RTL also shows that the shortcut never
// changes a decision.
package cfed_ref_pkg;

  typedef int win5_t [5][5];

  typedef struct {
    int cls;      // 0 BGND, 1..4 edge along direction cls-1, 5 speckle
    bit mark;     // competition marks a pixel
    int dy, dx;   // offset of the marked pixel from the center
  } ref_dec_t;

  // Outer-pixel offsets of directions 0..3: horizontal, vertical,
  // main diagonal, anti-diagonal.
  function automatic void dir_off(input int d, output int dy, output int dx);
    int tdy [4] = '{0, -1, -1, -1};
    int tdx [4] = '{-1, 0, -1, 1};
    dy = tdy[d];
    dx = tdx[d];
  endfunction

  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction

  // Gradient along direction d of the pixel at (2+py, 2+px).
  function automatic int grad_at(input win5_t w, input int py, input int px, input int d);
    int dy, dx, c;
    dir_off(d, dy, dx);
    c = w[2+py][2+px];
    return iabs(c - w[2+py+dy][2+px+dx]) + iabs(c - w[2+py-dy][2+px-dx]);
  endfunction

  function automatic int membership(input int g[4], input int cls, input int lo,
                                    input int hi, input int s, input int t);
    int sad = 0;
    for (int d = 0; d < 4; d++) begin
      int cv;
      if (cls == 0)      cv = lo;
      else if (cls == 5) cv = hi;
      else               cv = (d == cls - 1) ? lo : hi;
      sad += iabs(g[d] - cv);
    end
    sad = sad * (1 << s);
    return (t - sad > 0) ? t - sad : 0;
  endfunction

  function automatic ref_dec_t decide(input win5_t w, input int lo, input int hi,
                                      input int s, input int t);
    ref_dec_t r;
    int g[4];
    int best, bestu, a, ady, adx, gc, ga, gb;
    for (int d = 0; d < 4; d++) g[d] = grad_at(w, 0, 0, d);
    best = 0;
    bestu = membership(g, 0, lo, hi, s, t);
    for (int c = 1; c < 6; c++) begin
      int u = membership(g, c, lo, hi, s, t);
      if (u > bestu) begin
        bestu = u;
        best  = c;
      end
    end
    r.cls = best;
    r.mark = 0;
    r.dy = 0;
    r.dx = 0;
    if (best >= 1 && best <= 4) begin
      // compete across the edge: horizontal<->vertical, diag<->anti-diag
      case (best - 1)
        0: a = 1;
        1: a = 0;
        2: a = 3;
        default: a = 2;
      endcase
      dir_off(a, ady, adx);
      gc = grad_at(w, 0, 0, a);
      ga = grad_at(w, ady, adx, a);
      gb = grad_at(w, -ady, -adx, a);
      r.mark = 1;
      if (gc >= ga && gc >= gb) begin
        r.dy = 0; r.dx = 0;
      end else if (ga >= gb) begin
        r.dy = ady; r.dx = adx;
      end else begin
        r.dy = -ady; r.dx = -adx;
      end
    end
    return r;
  endfunction

  // A random window with some structure: flat, a step edge in a random
  // orientation, a line, or noise, all with a little noise on top.
  function automatic win5_t rand_window();
    win5_t w;
    int kind = $urandom_range(0, 4);
    int a = $urandom_range(0, 255);
    int b = $urandom_range(0, 255);
    int ori = $urandom_range(0, 3);
    int amp = $urandom_range(0, 12);
    for (int y = 0; y < 5; y++)
      for (int x = 0; x < 5; x++) begin
        int v, side;
        case (ori)
          0: side = y - 2;
          1: side = x - 2;
          2: side = (x - 2) - (y - 2);
          default: side = (x - 2) + (y - 2);
        endcase
        case (kind)
          0: v = a;
          1: v = (side >= 0) ? a : b;
          2: v = (side >= 1) ? a : b;
          3: v = (side == 0) ? b : a;
          default: v = $urandom_range(0, 255);
        endcase
        v = v + $urandom_range(0, 2*amp) - amp;
        w[y][x] = (v < 0) ? 0 : (v > 255) ? 255 : v;
      end
    return w;
  endfunction

endpackage
