// orb_ref_pkg: behavioural reference model of the ORB pipeline, for the
// testbenches only.
//
// It recomputes, with plain integer loops over whole images, what the hardware
// computes in a stream: grey conversion, 5x5 binomial smoothing with unfiltered
// two-pixel borders, the FAST-12 test, the disc moments, the orientation bin
// (from a real-valued atan2) and the steered BRIEF descriptor. The BRIEF test
// pattern and the Q2.14 sine constants are design constants and are taken from
// orb_pkg; everything else is independent of the RTL.
package orb_ref_pkg;
  import orb_pkg::*;

  int R, C;            // image size
  int gin[];           // grey input, index r*C + c
  int sm[];            // smoothed image

  function automatic int gray_of(int rr, int gg, int bb);
    return (77 * rr + 150 * gg + 29 * bb + 128) >> 8;
  endfunction

  function automatic void set_size(int rows, int cols);
    R = rows;
    C = cols;
    gin = new[rows * cols];
    sm  = new[rows * cols];
  endfunction

  function automatic void smooth();
    int w[5] = '{1, 4, 6, 4, 1};
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        if (r < 2 || r >= R - 2 || c < 2 || c >= C - 2) sm[r*C+c] = gin[r*C+c];
        else begin
          int acc = 0;
          for (int i = 0; i < 5; i++)
            for (int j = 0; j < 5; j++)
              acc += w[i] * w[j] * gin[(r+i-2)*C + (c+j-2)];
          sm[r*C+c] = (acc + 128) >> 8;
        end
      end
  endfunction

  // the 16 circle offsets, position 1 straight up, clockwise
  function automatic void circle(int k, output int dx, output int dy);
    int xs[16] = '{0, 1, 2, 3, 3, 3, 2, 1, 0, -1, -2, -3, -3, -3, -2, -1};
    int ys[16] = '{-3, -3, -2, -1, 0, 1, 2, 3, 3, 3, 2, 1, 0, -1, -2, -3};
    dx = xs[k];
    dy = ys[k];
  endfunction

  // longest circular run of ones in a 16-bit vector
  function automatic int longest_run(logic [15:0] v);
    int best = 0;
    for (int s = 0; s < 16; s++) begin
      int n = 0;
      while (n < 16 && v[(s + n) % 16]) n++;
      if (n > best) best = n;
    end
    return best;
  endfunction

  function automatic bit fast_on(int p, int ring[16], int t, int n);
    logic [15:0] b, d;
    for (int k = 0; k < 16; k++) begin
      b[k] = ring[k] >= p + t;
      d[k] = ring[k] <= p - t;
    end
    return longest_run(b) >= n || longest_run(d) >= n;
  endfunction

  function automatic bit fast_at(int r, int c, int t);
    int ring[16];
    int dx, dy;
    for (int k = 0; k < 16; k++) begin
      circle(k, dx, dy);
      ring[k] = sm[(r+dy)*C + c + dx];
    end
    return fast_on(sm[r*C+c], ring, t, 12);
  endfunction

  function automatic bit is_keypoint(int r, int c, int t);
    if (r < 15 || r >= R - 15 || c < 15 || c >= C - 15) return 0;
    return fast_at(r, c, t);
  endfunction

  // moments over the radius-15 disc of a patch given as patch[v][u], centre 15,15
  function automatic void moments(int patch[31][31], output longint m10, output longint m01);
    m10 = 0;
    m01 = 0;
    for (int v = 0; v < 31; v++)
      for (int u = 0; u < 31; u++)
        if ((v-15)*(v-15) + (u-15)*(u-15) <= 225) begin
          m10 += (u - 15) * patch[v][u];
          m01 += (v - 15) * patch[v][u];
        end
  endfunction

  // orientation bin of atan2(m01, m10); amb = within 0.02 degrees of a bin edge
  function automatic int angle_bin(longint m10, longint m01, output bit amb);
    real a, f;
    amb = 0;
    if (m10 == 0 && m01 == 0) return 0;
    a = $atan2(real'(m01), real'(m10)) * 180.0 / 3.14159265358979;
    if (a < 0) a += 360.0;
    f = (a + 6.0) / 12.0;
    if (f - $floor(f) < 0.002 || $ceil(f) - f < 0.002) amb = 1;
    return int'($floor(f)) % 30;
  endfunction

  function automatic logic [255:0] brief(int patch[31][31], int bin);
    logic [DESC_BITS*20-1:0] pat;
    logic [255:0] d;
    longint cs, sn;
    pat = brief_pattern();
    cs = longint'(cos6(2 * bin));
    sn = longint'(sin6(2 * bin));
    for (int i = 0; i < 256; i++) begin
      int px[2], py[2], val[2];
      logic [19:0] e;
      e = pat[20*i +: 20];
      px[0] = int'($signed(e[19:15])); py[0] = int'($signed(e[14:10]));
      px[1] = int'($signed(e[9:5]));   py[1] = int'($signed(e[4:0]));
      for (int k = 0; k < 2; k++) begin
        longint xr, yr;
        xr = (longint'(px[k]) * cs - longint'(py[k]) * sn + 8192) >>> 14;
        yr = (longint'(px[k]) * sn + longint'(py[k]) * cs + 8192) >>> 14;
        val[k] = patch[yr + 15][xr + 15];
      end
      d[i] = val[0] < val[1];
    end
    return d;
  endfunction

  function automatic void patch_at(int r, int c, output int patch[31][31]);
    for (int v = 0; v < 31; v++)
      for (int u = 0; u < 31; u++)
        patch[v][u] = sm[(r+v-15)*C + c+u-15];
  endfunction
endpackage
