// ptm_ref_pkg: reference models for the testbenches, written from the
// algorithm descriptions (not from the RTL): random lattice values from
// the XOR-table constants, the smoothing function evaluated in floating
// point, 3-D interpolation, the four-octave fractal sum, the per-texture
// color rules, and the whole quad rasterisation (incremental scan-line walk
// plus perspective division) in 64-bit integers.
package ptm_ref_pkg;

  localparam logic [63:0] R1 = 64'h8F_C7_E3_F1_F8_7C_3E_1F;
  localparam logic [63:0] R2 = 64'h1D_BB_30_25_18_CA_4D_A5;
  localparam logic [63:0] R3 = 64'h71_19_CB_1F_72_3F_1E_D9;

  function automatic logic [7:0] xt(logic [63:0] m, logic [7:0] x);
    logic [7:0] y;
    for (int i = 0; i < 8; i++) y[i] = ^(x & m[8*i +: 8]);
    return y;
  endfunction

  function automatic int rnd(int a, int b, int c);
    logic [7:0] r;
    r = xt(R3, 8'(xt(R2, 8'(xt(R1, 8'(a)) + 8'(b))) + 8'(c)));
    return int'(signed'(r));
  endfunction

  function automatic int sm(int f);       // f in 0..63, result 0..63
    real x;
    int e;
    x = real'(f) / 64.0;
    e = int'($floor(64.0 * (3.0*x*x - 2.0*x*x*x) + 0.5));
    return e > 63 ? 63 : e;
  endfunction

  function automatic int lerp(int a, int b, int c);
    return a + int'($floor(real'(c * (b - a)) / 64.0));
  endfunction

  // Perlin noise of 16-bit coordinates with 6 fraction bits
  function automatic int perlin(int u, int v, int w);
    int iu, iv, iw, su, sv, sw, cr [8], l1 [4], l2 [2];
    iu = (u >> 6) & 255; iv = (v >> 6) & 255; iw = (w >> 6) & 255;
    su = sm(u & 63); sv = sm(v & 63); sw = sm(w & 63);
    for (int k = 0; k < 8; k++)
      cr[k] = rnd(iu + ((k >> 2) & 1), iv + ((k >> 1) & 1), iw + (k & 1));
    for (int k = 0; k < 4; k++) l1[k] = lerp(cr[2*k], cr[2*k+1], sw);
    for (int k = 0; k < 2; k++) l2[k] = lerp(l1[2*k], l1[2*k+1], sv);
    return lerp(l2[0], l2[1], su);
  endfunction

  // 8 * sum_{i=0..3} 2^-i P(2^i u, ...), coordinates wrap at 16 bits
  function automatic int fractal(int u, int v, int w, bit use_abs);
    int acc, p;
    acc = 0;
    for (int i = 0; i < 4; i++) begin
      p = perlin((u << i) & 16'hFFFF, (v << i) & 16'hFFFF, (w << i) & 16'hFFFF);
      if (use_abs && p < 0) p = -p;
      acc += p * (8 >> i);
    end
    return acc;
  endfunction

  function automatic int isqrt(int x);
    int r;
    r = 0;
    while ((r + 1) * (r + 1) <= x) r++;
    return r;
  endfunction

  function automatic int exp_entry(int k);
    return int'($floor(511.0 * $exp(-real'(k) / 64.0) + 0.5));
  endfunction

  // default palettes: 0 marble, 1 wood, 2 brick (256 entries), 3 fire
  function automatic logic [23:0] palette(int p, int i);
    int t, r, g, b;
    t = (i % 128) < 64 ? (i % 128) : 127 - (i % 128);
    case (p)
      0: begin r = 255 - 2*t; g = 255 - 2*t; b = 255 - t; end
      1: begin r = 150 + t; g = 90 + t/2; b = 40; end
      2: if (i < 128) begin r = 150 + i/4; g = r; b = r; end
         else begin r = 130 + (i-128)/2; g = 40 + (i-128)/4; b = 30; end
      default: begin r = i < 64 ? 4*i : 255; g = i < 64 ? 0 : 4*(i-64); b = 0; end
    endcase
    return {8'(r), 8'(g), 8'(b)};
  endfunction

  // full texture generator: texture t (0 marble .. 5 fire) at (u, v, w)
  function automatic logic [23:0] texture(int t, int u, int v, int w);
    int ug, vg, f, ui, vi, wi, c, a, row, un, ur, vr, idx;
    ug = (t == 4) ? (u << 1) & 16'hFFFF : u;
    vg = (t == 5) ? exp_entry((v >> 6) & 511) << 3 : v;
    f  = fractal(ug, vg, w, t <= 2);
    ui = u >> 6; vi = v >> 6; wi = w >> 6;
    case (t)
      0: return palette(0, (vi + (f >>> 4)) & 127);
      1: return palette(1, (ui*ui + vi*vi + wi + (f >>> 4)) & 127);
      2: begin
        row = vi / 7;
        un  = (row % 2 == 1) ? ui : ui + 7;
        ur  = un % 14; vr = vi % 7;
        idx = ((vr > 1 && vr < 6 && ur > 1 && ur < 13) ? 128 : 0) + ((f >>> 4) & 127);
        return palette(2, idx);
      end
      3: begin a = f < 0 ? -f : f; a = a / 8 > 255 ? 255 : a / 8; return {8'(a), 8'(a), 8'(a)}; end
      4: begin c = f > 0 ? isqrt(32 * f) : 0; c = c > 64 ? c : 0; return {8'(c), 8'(c), 8'd255}; end
      default: return palette(3, (f >>> 4) & 127);
    endcase
  endfunction

  // Pixels of one quad, in the order the hardware produces them. q holds the
  // 21 parameter values (25-bit two's complement) in the parameter order.
  typedef struct {
    int x, y, u, v, w;
  } ref_pix_t;

  function automatic longint sx25(int q);
    int t;
    t = q << 7;
    return longint'(t >>> 7);
  endfunction

  function automatic void quad_pixels(input int q [21], ref ref_pix_t out [$]);
    longint xsl, xsr, ys [4], yp [4], a0 [4], a1 [4], d;
    int yi, yf, xl, xr;
    ref_pix_t p;
    yi = int'(sx25(q[0])); yf = int'(sx25(q[1]));
    xsl = sx25(q[2]); xsr = sx25(q[4]);
    for (int k = 0; k < 4; k++) begin
      ys[k] = sx25(q[6 + k]);
      a0[k] = sx25(q[10 + 2*k]);
      a1[k] = sx25(q[11 + 2*k]);
    end
    for (int y = yi; y <= yf; y++) begin
      xl = int'(xsl >>> 12); xr = int'(xsr >>> 12);
      yp = ys;
      for (int x = xl; x == xl || x <= xr; x++) begin
        p.x = x & 511; p.y = y & 511;
        p.u = int'(sx25(q[18]) + yp[0] * 64 / yp[3]) & 16'hffff;
        p.v = int'(sx25(q[19]) + yp[1] * 64 / yp[3]) & 16'hffff;
        p.w = int'(sx25(q[20]) + yp[2] * 64 / yp[3]) & 16'hffff;
        out.push_back(p);
        for (int k = 0; k < 4; k++) yp[k] += a0[k];
      end
      d = ((xsl + sx25(q[3])) >>> 12) - (xsl >>> 12);
      xsl += sx25(q[3]);
      xsr += sx25(q[5]);
      for (int k = 0; k < 4; k++) ys[k] += a0[k] * d + a1[k];
    end
  endfunction

  // A random quad whose divisor stays positive and whose quotients fit:
  // up to 16 lines, edges with slopes of up to 1.5 pixels per line.
  function automatic void rand_quad(output int q [21], input int ymax, input int xmax);
    int y0, xl, y3;
    for (int i = 0; i < 21; i++) q[i] = 0;
    y0 = $urandom_range(ymax - 16);
    xl = 24 + $urandom_range(xmax / 2 - 24);
    q[0] = y0; q[1] = y0 + $urandom_range(15);
    q[2] = (xl << 12) + $urandom_range(4095);
    q[4] = q[2] + ($urandom_range(xmax / 4) << 12);
    q[3] = $urandom_range(3 << 12) - (3 << 11);
    q[5] = $urandom_range(3 << 12) - (3 << 11);
    y3 = $urandom_range(1 << 18, 1 << 16);
    q[9] = y3;
    q[16] = $urandom_range(200) - 100; q[17] = $urandom_range(200) - 100;
    for (int k = 0; k < 3; k++) begin
      q[6 + k] = (y3 / 64) * ($urandom_range(400) - 200);
      q[10 + 2*k] = $urandom_range(8000) - 4000;
      q[11 + 2*k] = $urandom_range(8000) - 4000;
      q[18 + k] = $urandom_range((1 << 16) - 1);
    end
    for (int i = 0; i < 21; i++) q[i] &= 32'h1ff_ffff;
  endfunction

endpackage
