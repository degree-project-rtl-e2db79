// fast_detect: FAST-12 segment test on the 16-pixel Bresenham circle of radius 3.
//
// A candidate pixel p is a corner when at least N_SEG contiguous pixels of the
// circle are all brighter (I_x >= I_p + t) or all darker (I_x <= I_p - t). Two
// arrays of 16 comparators, the bright test and the dark test, produce two
// 16-bit vectors; each vector is checked for a circular run of N_SEG ones by
// AND-ing every window of N_SEG bits, and the two results are OR-ed. All 16
// windows are checked in parallel, so the quick rejection on the four cardinal
// pixels used in software is not needed: it cannot change the answer.
//
// The circle numbering follows the usual FAST convention: position 1 straight above
// p, counting clockwise, with offsets (dx, dy), y pointing down:
//   1 (0,-3)  2 (1,-3)  3 (2,-2)  4 (3,-1)  5 (3,0)  6 (3,1)  7 (2,2)  8 (1,3)
//   9 (0,3)  10 (-1,3) 11 (-2,2) 12 (-3,1) 13 (-3,0) 14 (-3,-1) 15 (-2,-2) 16 (-1,-3)
// Bit k-1 of bright/dark is circle position k. n = 12, r = 3 and the test
// inequalities follow the FAST description; the bright/dark comparator-array
// structure follows a published FAST hardware design.
//
// Interface: win7[row][col] is the 7x7 neighbourhood with p at [3][3]; threshold
// is t. Purely combinational.
module fast_detect
  import orb_pkg::*;
#(
  parameter int N_SEG = 12
) (
  input  pix_t [6:0][6:0] win7,
  input  logic [7:0]      threshold,
  output logic [15:0]     bright,
  output logic [15:0]     dark,
  output logic            is_corner
);
  localparam int DX [16] = '{0, 1, 2, 3, 3, 3, 2, 1, 0, -1, -2, -3, -3, -3, -2, -1};
  localparam int DY [16] = '{-3, -3, -2, -1, 0, 1, 2, 3, 3, 3, 2, 1, 0, -1, -2, -3};

  logic [9:0]  ip, ix;
  logic [31:0] b2, d2;
  logic        run_b, run_d;

  always_comb begin
    ip = 10'(win7[3][3]);
    for (int k = 0; k < 16; k++) begin
      ix = 10'(win7[3 + DY[k]][3 + DX[k]]);
      bright[k] = (ix >= ip + 10'(threshold));
      dark[k]   = (ix + 10'(threshold) <= ip);
    end
    b2 = {bright, bright};
    d2 = {dark, dark};
    run_b = 1'b0;
    run_d = 1'b0;
    for (int s = 0; s < 16; s++) begin
      run_b = run_b | (&b2[s +: N_SEG]);
      run_d = run_d | (&d2[s +: N_SEG]);
    end
    is_corner = run_b | run_d;
  end
endmodule
