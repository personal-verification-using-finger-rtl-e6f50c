// vein_ref_pkg: reference models for the testbenches of the finger-vein
// preprocessing core.
//
// Plain behavioural versions of each filter, written from the algorithm
// descriptions rather than from the RTL structure: multiplications instead of
// shift-and-add trees, a sort instead of a comparator network, an arctangent
// instead of sign/magnitude comparisons. Windows are passed as int queues in
// row-major order.
package vein_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  // Derivative-of-Gaussian over 7 samples, weights scaled by 10000, then
  // divided by 10000 as x*13421/2^27 rounded toward zero.
  function automatic int dog_ref(int p[7]);
    longint s, q;
    s = -133 * p[0] - 1080 * p[1] - 2420 * p[2] + 2420 * p[4] + 1080 * p[5] + 133 * p[6];
    q = ((s < 0 ? -s : s) * 13421) / (64'd1 << 27);
    return int'((s < 0) ? -q : q);
  endfunction

  function automatic int mag_ref(int dx, int dy);
    int a, b, e;
    a = (iabs(dx) > iabs(dy)) ? iabs(dx) : iabs(dy);
    b = (iabs(dx) > iabs(dy)) ? iabs(dy) : iabs(dx);
    e = a - a / 8 + b / 2;
    return (e > a) ? e : a;
  endfunction

  // Discrete angle - 1, from the angle in degrees.
  function automatic int dir_ref(int dx, int dy);
    real th;
    if (dx == 0 && dy == 0) return 0;
    th = $atan2(real'(dy), real'(dx)) * 180.0 / PI;
    if (th < 0.0) th = th + 360.0;
    th = th + 1.0e-9;                   // lower bounds are inclusive
    if (th >= 360.0) th = th - 360.0;
    if (th >= 180.0) th = th - 180.0;
    if (th < 45.0)  return 0;
    if (th < 90.0)  return 1;
    if (th < 135.0) return 2;
    return 3;
  endfunction

  // Canny centre pixel of a 9x9 window.
  function automatic int canny_ref(int w[81], int th, int tl);
    int g[3][3];
    int dxc, dyc, d, n1, n2;
    int hr[7], vc[7];
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        for (int t = 0; t < 7; t++) begin
          hr[t] = w[(r + 3) * 9 + c + t];
          vc[t] = w[(r + t) * 9 + c + 3];
        end
        g[r][c] = mag_ref(dog_ref(hr), dog_ref(vc));
        if (r == 1 && c == 1) begin
          dxc = dog_ref(hr);
          dyc = dog_ref(vc);
        end
      end
    d = dir_ref(dxc, dyc);
    case (d)
      0: begin n1 = g[1][0]; n2 = g[1][2]; end
      1: begin n1 = g[2][2]; n2 = g[0][0]; end
      2: begin n1 = g[0][1]; n2 = g[2][1]; end
      default: begin n1 = g[2][0]; n2 = g[0][2]; end
    endcase
    if (g[1][1] < n1 || g[1][1] < n2) return 0;
    if (g[1][1] >= th) return 255;
    if (g[1][1] >= tl) return 128;
    return 0;
  endfunction

  function automatic int median_ref(int v[$]);
    v.sort();
    return v[v.size() / 2];
  endfunction

  function automatic int gauss_ref(int w[25]);
    int k[25] = '{1, 4, 7, 4, 1, 4, 16, 26, 16, 4, 7, 26, 41, 26, 7,
                  4, 16, 26, 16, 4, 1, 4, 7, 4, 1};
    int s = 0;
    for (int i = 0; i < 25; i++) s += k[i] * w[i];
    return s / 273;
  endfunction

  function automatic int thresh_ref(int w[$]);
    int s = 0;
    int n = w.size();
    for (int i = 0; i < n; i++) s += w[i];
    if (w[n / 2] == 0) return 0;
    return (real'(w[n / 2]) < real'(s) / real'(n)) ? 255 : 0;
  endfunction

  function automatic int bmed_ref(int w[$]);
    int z = 0;
    foreach (w[i]) if (w[i] == 0) z++;
    return (z > (w.size() - 1) / 2) ? 0 : 255;
  endfunction

  function automatic int dilate_ref(int w[9]);
    int m = 0;
    foreach (w[i]) if (w[i] > m) m = w[i];
    return m;
  endfunction

  function automatic int track_ref(int w[9], bit fin);
    bit s = 0;
    for (int i = 0; i < 9; i++) if (i != 4 && w[i] == 255) s = 1;
    if (w[4] != 128) return w[4];
    if (fin) return 0;
    return s ? 255 : 128;
  endfunction

  // Zhang-Suen sub-iteration; returns 0 or 255.
  function automatic int thin_ref(int w[9], bit sub);
    bit p2, p3, p4, p5, p6, p7, p8, p9;
    int b, a;
    bit seq[9];
    if (w[4] == 0) return 0;
    p2 = w[1] != 0; p3 = w[2] != 0; p4 = w[5] != 0; p5 = w[8] != 0;
    p6 = w[7] != 0; p7 = w[6] != 0; p8 = w[3] != 0; p9 = w[0] != 0;
    b = p2 + p3 + p4 + p5 + p6 + p7 + p8 + p9;
    seq = '{p2, p3, p4, p5, p6, p7, p8, p9, p2};
    a = 0;
    for (int i = 0; i < 8; i++) if (!seq[i] && seq[i+1]) a++;
    if (b < 2 || b > 6 || a != 1) return 255;
    if (!sub && (p2 && p4 && p6 || p4 && p6 && p8)) return 255;
    if (sub && (p2 && p4 && p8 || p2 && p6 && p8)) return 255;
    return 0;
  endfunction

endpackage
