// wu_ref_pkg: reference model of the Wu line core for the testbenches.
//
// Computes, with plain integer arithmetic and no state, the pixel pair that
// the core must emit at a given index: index 0 and 1 are the two endpoints
// (xend = round(x), yend = y + gradient*(xend - x), intensities weighted by
// the end gap), index k >= 2 the interior step xend1 + (k-1) with
//   intery = yend1 + (k-1) * gradient, gradient = trunc(|dy| * 2^F / dx) * sign(dy).
// Endpoints are given either as whole pixels (pair, npairs, normalise) or in
// units of 2^-SUB_W (the _fx versions).
// Also gives the Bresenham path of a line, used by the splitter tests.
package wu_ref_pkg;
  import wu_pkg::*;

  localparam int SP = SUB_W + 1;            // reference works in units of 2^-SP

  typedef struct {
    longint x0, y0, x1, y1;  // normalised, units 2^-SP: major axis is x, x0 <= x1
    bit  steep;
    longint g;               // signed gradient, units 2^-FRAC_W
    int  xe1, xe2;           // round(x0), round(x1)
    int  dx;                 // xe2 - xe1: pixel span of the major axis
  } norm_t;

  function automatic longint round_px(longint xu);   // floor(x + 0.5), x in 2^-SP units
    return (xu + (longint'(1) << (SP - 1))) >>> SP;
  endfunction

  // endpoints in units of 2^-SUB_W (fxcoord_t)
  function automatic norm_t normalise_fx(longint x0, longint y0, longint x1, longint y1);
    norm_t n;
    longint t, adx, ady, ddx;
    x0 *= 2; y0 *= 2; x1 *= 2; y1 *= 2;
    adx = (x1 > x0) ? x1 - x0 : x0 - x1;
    ady = (y1 > y0) ? y1 - y0 : y0 - y1;
    n.steep = ady > adx;
    if (n.steep) begin
      t = x0; x0 = y0; y0 = t;
      t = x1; x1 = y1; y1 = t;
    end
    if (x0 > x1) begin
      t = x0; x0 = x1; x1 = t;
      t = y0; y0 = y1; y1 = t;
    end
    n.x0 = x0; n.y0 = y0; n.x1 = x1; n.y1 = y1;
    ddx = x1 - x0;
    if (ddx == 0) n.g = 0;
    else begin
      n.g = (((y1 > y0) ? y1 - y0 : y0 - y1) * (longint'(1) << FRAC_W)) / ddx;
      if (y1 < y0) n.g = -n.g;
    end
    n.xe1 = int'(round_px(x0));
    n.xe2 = int'(round_px(x1));
    n.dx  = n.xe2 - n.xe1;
    return n;
  endfunction

  function automatic norm_t normalise(int x0, int y0, int x1, int y1);
    return normalise_fx(longint'(x0) <<< SUB_W, longint'(y0) <<< SUB_W,
                        longint'(x1) <<< SUB_W, longint'(y1) <<< SUB_W);
  endfunction

  function automatic int npairs_fx(longint x0, longint y0, longint x1, longint y1);
    norm_t n = normalise_fx(x0, y0, x1, y1);
    return (n.dx <= 1) ? 2 : n.dx + 1;
  endfunction

  function automatic int npairs(int x0, int y0, int x1, int y1);
    norm_t n = normalise(x0, y0, x1, y1);
    return (n.dx <= 1) ? 2 : n.dx + 1;
  endfunction

  function automatic pixel_t pix(bit steep, longint mx, longint my, longint i);
    pixel_t p;
    p.x = steep ? coord_t'(my) : coord_t'(mx);
    p.y = steep ? coord_t'(mx) : coord_t'(my);
    p.i = inten_t'(i);
    return p;
  endfunction

  // one endpoint pair: xu, yu in 2^-SP units, first selects the gap rule
  function automatic pixel_pair_t end_pair(bit steep, longint xu, longint yu, longint g, bit first);
    pixel_pair_t r;
    longint xe, fr, d, yend, xgap, fy;
    xe   = round_px(xu);
    fr   = (xu + (longint'(1) << (SP - 1))) & ((longint'(1) << SP) - 1);
    d    = (xe <<< SP) - xu;                      // xend - x
    yend = (yu <<< (FRAC_W - SP)) + ((g * d) >>> SP);
    xgap = first ? (longint'(1) << SP) - fr : fr;
    fy   = (yend & ((longint'(1) << FRAC_W) - 1)) >> (FRAC_W - INT_W);
    r.a = pix(steep, xe, yend >>> FRAC_W,       ((INT_MAX - fy) * xgap) >> SP);
    r.b = pix(steep, xe, (yend >>> FRAC_W) + 1, (fy * xgap) >> SP);
    return r;
  endfunction

  function automatic longint yend_of(longint xu, longint yu, longint g);
    longint d = (round_px(xu) <<< SP) - xu;
    return (yu <<< (FRAC_W - SP)) + ((g * d) >>> SP);
  endfunction

  function automatic pixel_pair_t pair_fx(longint x0, longint y0, longint x1, longint y1, int k);
    norm_t n = normalise_fx(x0, y0, x1, y1);
    pixel_pair_t r;
    longint iy, fp;
    if (k == 0)      r = end_pair(n.steep, n.x0, n.y0, n.g, 1'b1);
    else if (k == 1) r = end_pair(n.steep, n.x1, n.y1, n.g, 1'b0);
    else begin
      iy = yend_of(n.x0, n.y0, n.g) + longint'(k - 1) * n.g;
      fp = (iy & ((longint'(1) << FRAC_W) - 1)) >> (FRAC_W - INT_W);
      r.a = pix(n.steep, n.xe1 + k - 1, iy >>> FRAC_W,       INT_MAX - fp);
      r.b = pix(n.steep, n.xe1 + k - 1, (iy >>> FRAC_W) + 1, fp);
    end
    return r;
  endfunction

  // integer pixel endpoints
  function automatic pixel_pair_t pair(int x0, int y0, int x1, int y1, int k);
    return pair_fx(longint'(x0) <<< SUB_W, longint'(y0) <<< SUB_W,
                   longint'(x1) <<< SUB_W, longint'(y1) <<< SUB_W, k);
  endfunction

  // i-th point of the Bresenham path from (x0,y0) to (x1,y1), found by
  // replaying the all-octant error-term iteration i times from the start.
  function automatic point_t bres_point(int x0, int y0, int x1, int y1, int i);
    int dx, dy, sx, sy, err, e2, x, y;
    point_t p;
    dx = (x1 > x0) ? x1 - x0 : x0 - x1;
    dy = -((y1 > y0) ? y1 - y0 : y0 - y1);
    sx = (x0 < x1) ? 1 : -1;
    sy = (y0 < y1) ? 1 : -1;
    err = dx + dy;
    x = x0; y = y0;
    for (int s = 0; s < i; s++) begin
      e2 = 2 * err;
      if (e2 >= dy) begin err += dy; x += sx; end
      if (e2 <= dx) begin err += dx; y += sy; end
    end
    p.x = coord_t'(x);
    p.y = coord_t'(y);
    return p;
  endfunction

  function automatic int bres_len(int x0, int y0, int x1, int y1);
    int adx, ady;
    adx = (x1 > x0) ? x1 - x0 : x0 - x1;
    ady = (y1 > y0) ? y1 - y0 : y0 - y1;
    return (adx > ady) ? adx : ady;
  endfunction

endpackage
