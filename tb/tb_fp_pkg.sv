// tb_fp_pkg: reference arithmetic for the forward-projector testbenches.
//
// Everything here uses double-precision reals and is written independently
// of the RTL: IEEE-754 single <-> real conversion through the double format,
// the modified Shepp-Logan head phantom, and a straight real-valued model of
// the ray-driven projection of one ray (source/detector geometry, vertical /
// horizontal classification, per-step pixel and weight selection).
package tb_fp_pkg;

  localparam real PI = 3.14159265358979323846;

  // real -> single precision bits, round to nearest even (normal range only)
  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    logic [23:0] m;
    logic        g, s;
    int          e;
    if (r == 0.0) return 32'h0;
    d = $realtobits(r);
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b1, d[51:29]};
    g = d[28];
    s = |d[27:0];
    if (g && (s || m[0])) begin
      m = m + 1'b1;
      if (m == 24'h0) begin
        m = 24'h800000;
        e = e + 1;
      end
    end
    if (e <= 0) return {d[63], 31'h0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  // single precision bits -> real (zero and subnormals give 0)
  function automatic real f2r(input logic [31:0] f);
    logic [10:0] e;
    if (f[30:23] == 8'h0) return 0.0;
    e = 11'(int'(f[30:23]) - 127 + 1023);
    return $bitstoreal({f[31], e, f[22:0], 29'h0});
  endfunction

  // Q16.32 fixed point <-> real (to fixed: rounded to nearest)
  function automatic real fix2r(input logic signed [47:0] x);
    return real'(x) / 4294967296.0;
  endfunction
  function automatic logic signed [47:0] r2fix(input real r);
    return 48'(longint'(r * 4294967296.0));
  endfunction

  // Modified Shepp-Logan head phantom: ten ellipses (value, semi-axes,
  // centre, tilt in degrees) in coordinates normalised to [-1, 1].
  function automatic real shepp_logan(input real xn, input real yn);
    real a[10] = '{ 1.0, -0.8, -0.2, -0.2, 0.1, 0.1, 0.1, 0.1, 0.1, 0.1};
    real ea[10] = '{0.69, 0.6624, 0.11, 0.16, 0.21, 0.046, 0.046, 0.046, 0.023, 0.023};
    real eb[10] = '{0.92, 0.874, 0.31, 0.41, 0.25, 0.046, 0.046, 0.023, 0.023, 0.046};
    real x0[10] = '{0.0, 0.0, 0.22, -0.22, 0.0, 0.0, 0.0, -0.08, 0.0, 0.06};
    real y0[10] = '{0.0, -0.0184, 0.0, 0.0, 0.35, 0.1, -0.1, -0.605, -0.606, -0.605};
    real ph[10] = '{0.0, 0.0, -18.0, 18.0, 0.0, 0.0, 0.0, 0.0, 0.0, 0.0};
    real v, xr, yr, cp, sp;
    v = 0.0;
    for (int k = 0; k < 10; k++) begin
      cp = $cos(ph[k] * PI / 180.0);
      sp = $sin(ph[k] * PI / 180.0);
      xr = (xn - x0[k]) * cp + (yn - y0[k]) * sp;
      yr = -(xn - x0[k]) * sp + (yn - y0[k]) * cp;
      if ((xr * xr) / (ea[k] * ea[k]) + (yr * yr) / (eb[k] * eb[k]) <= 1.0)
        v = v + a[k];
    end
    return v;
  endfunction

  // Phantom sample of pixel (row, col) of an n x n FOV, rounded to single
  // precision. Row 0 is the top row (largest y), column 0 the leftmost.
  function automatic logic [31:0] phantom_word(input int n, input int row, input int col);
    real x, y;
    x = (real'(col) - (real'(n) - 1.0) / 2.0) / (real'(n) / 2.0);
    y = ((real'(n) - 1.0) / 2.0 - real'(row)) / (real'(n) / 2.0);
    return r2f(shepp_logan(x, y));
  endfunction

  // Statistics of the reference traversal, to see which cases occurred.
  typedef struct {
    int vertical, horizontal, left, right, centre, outside, edge_drop;
  } ref_stats_t;

  // Reference ray sum for view k, detector pixel i.
  function automatic real ref_ray(ref real ph[], input int n, input int n_det,
                                  input int n_views, input real ds, input real dd,
                                  input int k, input int i, ref ref_stats_t st);
    real th, sn, cs, sx, sy, d0, dx, dy, dix, diy, rx, ry, r, c0, cc, len;
    real s_lo, t_hi, o, w, ax, ay, acc;
    int  m, idx, idx2;
    logic vert;
    th  = real'(k) * PI / real'(n_views);
    sn  = $sin(th);
    cs  = $cos(th);
    sx  = ds * sn;
    sy  = -ds * cs;
    d0  = -real'(n_det) / 2.0;
    dx  = d0 * cs - dd * sn;
    dy  = d0 * sn + dd * cs;
    dix = dx + (real'(i) + 0.5) * cs;
    diy = dy + (real'(i) + 0.5) * sn;
    rx  = sx - dix;
    ry  = sy - diy;
    ax  = -(real'(n) - 1.0) / 2.0;
    ay  = (real'(n) - 1.0) / 2.0;
    vert = ((ry < 0 ? -ry : ry) > (rx < 0 ? -rx : rx));
    if (vert) begin
      st.vertical++;
      r   = rx / ry;
      c0  = dix + (ay - diy) * r - ax;
      len = $sqrt(rx * rx + ry * ry) / (ry < 0 ? -ry : ry);
    end else begin
      st.horizontal++;
      r   = ry / rx;
      c0  = -(diy + (ax - dix) * r - ay);
      len = $sqrt(rx * rx + ry * ry) / (rx < 0 ? -rx : rx);
    end
    s_lo = (1.0 - (r < 0 ? -r : r)) / 2.0;
    t_hi = (1.0 + (r < 0 ? -r : r)) / 2.0;
    acc = 0.0;
    for (int step = 0; step < n; step++) begin
      cc = c0 - real'(step) * r;
      m  = $rtoi($floor(cc + 0.5));
      o  = cc - real'(m);
      if (m < 0 || m >= n) begin
        st.outside++;
        continue;
      end
      idx = vert ? step * n + m : m * n + step;
      if (o < -s_lo) begin
        st.left++;
        w = (o + t_hi) / (t_hi - s_lo) * len;
        acc += w * ph[idx];
        idx2 = vert ? step * n + m - 1 : (m - 1) * n + step;
        if (m > 0) acc += (len - w) * ph[idx2];
        else st.edge_drop++;
      end else if (o > s_lo) begin
        st.right++;
        w = (o - s_lo) / (t_hi - s_lo) * len;
        acc += (len - w) * ph[idx];
        idx2 = vert ? step * n + m + 1 : (m + 1) * n + step;
        if (m < n - 1) acc += w * ph[idx2];
        else st.edge_drop++;
      end else begin
        st.centre++;
        acc += len * ph[idx];
      end
    end
    return acc;
  endfunction

endpackage
