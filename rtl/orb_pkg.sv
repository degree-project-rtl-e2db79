// orb_pkg: types, constants and constant functions shared by the ORB feature
// extraction pipeline.
//
// - pix_t      one 8-bit grey intensity.
// - tag_t      signed (row, column) position that travels with a pixel through the
//              pipeline, so every stage knows which image position it holds; a
//              negative row marks a position before the first pixel of the frame.
// - patch_t    31x31 pixel patch, patch[row][col] with the keypoint at [15][15].
// - kp_rec_t   keypoint record: position, orientation bin and 256-bit descriptor.
// - sin6/cos6  sine and cosine of multiples of 6 degrees in Q2.14 fixed point.
//              Entries are round(16384 * sin(6 deg * j)); only the first quadrant
//              is tabulated, the other three follow by symmetry.
// - brief_pattern  the 256 test-point pairs of the steered BRIEF descriptor. The
//              pairs are a fixed pseudo-random set drawn by an integer hash: for test
//              i and point k the hash h = mix(4*i + 2*k + seed) picks x uniformly in
//              [-13, 13] and y uniformly in [-umax, umax] with umax = floor(sqrt(169 -
//              x^2)), so every point lies within radius 13 and stays inside the 31x31
//              patch at any rotation. This set is this design's own choice; the
//              learned set of the original ORB method can be substituted by editing
//              brief_point().
package orb_pkg;

  localparam int PIX_W     = 8;
  localparam int CRD_W     = 13;          // signed coordinate width
  localparam int DIM_W     = 12;          // rows / cols register width
  localparam int PATCH     = 31;          // patch edge, pixels
  localparam int HALF      = 15;          // patch half size
  localparam int DESC_BITS = 256;         // rBRIEF descriptor length
  localparam int N_BINS    = 30;          // 12-degree orientation bins
  localparam int BIN_W     = 5;
  localparam int BRIEF_R   = 13;          // radius of the test-point disc
  localparam int MOM_W     = 24;          // moment accumulator width (signed)

  typedef logic [PIX_W-1:0] pix_t;

  typedef struct packed {
    logic signed [CRD_W-1:0] r;
    logic signed [CRD_W-1:0] c;
  } tag_t;

  typedef pix_t [PATCH-1:0][PATCH-1:0] patch_t;

  typedef struct packed {
    logic [DIM_W-1:0]     x;      // column of the keypoint
    logic [DIM_W-1:0]     y;      // row of the keypoint
    logic [BIN_W-1:0]     bin;    // orientation = 12 degrees * bin
    logic [DESC_BITS-1:0] desc;   // bit i-1 is test i
  } kp_rec_t;

  // sin(6 deg * j) in Q2.14 for j = 0..15 (first quadrant)
  function automatic logic signed [15:0] sin6_q1(input int unsigned j);
    case (j)
      0:  return 16'sd0;
      1:  return 16'sd1713;
      2:  return 16'sd3406;
      3:  return 16'sd5063;
      4:  return 16'sd6664;
      5:  return 16'sd8192;
      6:  return 16'sd9630;
      7:  return 16'sd10963;
      8:  return 16'sd12176;
      9:  return 16'sd13255;
      10: return 16'sd14189;
      11: return 16'sd14968;
      12: return 16'sd15582;
      13: return 16'sd16026;
      14: return 16'sd16294;
      default: return 16'sd16384;
    endcase
  endfunction

  // sin(6 deg * j) for any j (taken modulo 60)
  function automatic logic signed [15:0] sin6(input int unsigned j);
    int unsigned m;
    m = j % 60;
    if (m <= 15)      return sin6_q1(m);
    else if (m <= 30) return sin6_q1(30 - m);
    else if (m <= 45) return -sin6_q1(m - 30);
    else              return -sin6_q1(60 - m);
  endfunction

  function automatic logic signed [15:0] cos6(input int unsigned j);
    return sin6(j + 15);
  endfunction

  // floor(sqrt(r*r - y*y)): half width of a disc row
  function automatic int disc_halfwidth(input int y, input int r);
    int w;
    w = 0;
    while ((w + 1) * (w + 1) + y * y <= r * r) w++;
    return w;
  endfunction

  // 32-bit integer mixer (xorshift-multiply)
  function automatic int unsigned mix32(input int unsigned v);
    int unsigned h;
    h = v;
    h = h ^ (h >> 16);
    h = h * 32'h7feb352d;
    h = h ^ (h >> 15);
    h = h * 32'h846ca68b;
    h = h ^ (h >> 16);
    return h;
  endfunction

  // point k (0 or 1) of test i, packed as {x[4:0], y[4:0]} two's complement
  function automatic logic [9:0] brief_point(input int i, input int k);
    int unsigned h;
    int x, y, w;
    h = mix32(4 * i + 2 * k + 32'h2545F491);
    x = int'(h % 27) - BRIEF_R;
    w = disc_halfwidth(x, BRIEF_R);
    y = int'((h >> 8) % (2 * w + 1)) - w;
    return {5'(x), 5'(y)};
  endfunction

  // whole pattern, test i in bits [20*i +: 20] = {x1, y1, x2, y2}
  function automatic logic [DESC_BITS*20-1:0] brief_pattern();
    logic [DESC_BITS*20-1:0] p;
    logic [9:0] a, b;
    p = '0;
    for (int i = 0; i < DESC_BITS; i++) begin
      a = brief_point(i, 0);
      b = brief_point(i, 1);
      if (a == b) b = {a[9:5], (a[4:0] == 5'd0) ? 5'd1 : 5'(-int'($signed(a[4:0])))};
      p[20*i +: 20] = {a, b};
    end
    return p;
  endfunction

endpackage
