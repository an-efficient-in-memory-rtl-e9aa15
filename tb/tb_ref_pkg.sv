// tb_ref_pkg -- reference models shared by the testbenches.
//
// Everything here is computed independently of the RTL tables: the cell
// conductance comes straight from the device equation, the quantizer is a
// nearest-level search and the random generator is re-derived from the
// xorshift definition.
package tb_ref_pkg;

  // Conductance code (0.1 uS units) of a cell at level l of 16:
  // p = round(21*l/15) pulse steps, R = Rmax - F*(1 - exp(a*(p-21))).
  function automatic int g_of_level(int l);
    real a, f, r;
    int  p;
    a = 1.5 * 0.25;
    p = $rtoi(21.0 * real'(l) / 15.0 + 0.5);
    f = (2800.0 - 157.0) / (1.0 - $exp(-a * 21.0));
    r = 2800.0 - f * (1.0 - $exp(a * real'(p - 21)));
    return $rtoi(1.0e7 / r + 0.5);
  endfunction

  // Nearest of the 16 levels 17*l to an 8-bit intensity.
  function automatic int quant(int pix);
    int best, l;
    best = 0;
    for (l = 1; l < 16; l++)
      if ((pix - 17 * l) * (pix - 17 * l) < (pix - 17 * best) * (pix - 17 * best)) best = l;
    return best;
  endfunction

  // White reference level nearest to a mean conductance (tie -> lower level).
  function automatic int level_of_g(longint avg);
    int best, l;
    longint d, db, g;
    best = 0;
    g  = longint'(g_of_level(0));
    db = (avg > g) ? avg - g : g - avg;
    for (l = 1; l < 16; l++) begin
      g = longint'(g_of_level(l));
      d = (avg > g) ? avg - g : g - avg;
      if (d < db) begin best = l; db = d; end
    end
    return best;
  endfunction

  // out = min(255, pix * 15 / max(w, 1))
  function automatic int resample(int pix, int w);
    int o;
    o = pix * 15 / ((w == 0) ? 1 : w);
    return (o > 255) ? 255 : o;
  endfunction

  function automatic logic [31:0] xorshift(logic [31:0] x);
    x = x ^ (x << 13);
    x = x ^ (x >> 17);
    x = x ^ (x << 5);
    return x;
  endfunction

endpackage
