// rbrief: steered BRIEF descriptor of a 31x31 patch.
//
// The descriptor has 256 binary tests. Test i compares the intensities at two
// points of a fixed pattern after both points have been turned by the keypoint
// orientation theta = 12 degrees * bin:
//   x' = round(x cos - y sin),  y' = round(x sin + y cos)
// and bit i-1 of the descriptor is 1 when I(point 1) < I(point 2). Turning the
// pattern with the keypoint makes the descriptor follow a rotation of the image.
// The test, the bit order and the 256-bit length follow the rBRIEF definition;
// the pattern itself is generated by orb_pkg::brief_pattern(). Sine and cosine
// are Q2.14 constants and rounding is (v + 8192) >>> 14, i.e. half rounds up.
//
// Timing: `start` (one cycle) begins on `patch` and `bin`, which must stay
// stable until `done`. BITS_PER_CYCLE tests are evaluated per cycle, so a
// descriptor takes 256 / BITS_PER_CYCLE cycles; `done` pulses once with `desc`
// valid, and desc holds until the next start.
module rbrief
  import orb_pkg::*;
#(
  parameter int BITS_PER_CYCLE = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  patch_t               patch,
  input  logic [BIN_W-1:0]     bin,
  output logic                 busy,
  output logic                 done,
  output logic [DESC_BITS-1:0] desc
);
  localparam int N_STEPS = DESC_BITS / BITS_PER_CYCLE;
  localparam int SW      = $clog2(N_STEPS + 1);
  localparam logic [DESC_BITS*20-1:0] PATTERN = brief_pattern();

  logic                      running;
  logic [SW-1:0]             step;
  logic signed [15:0]        cs, sn;
  logic [BITS_PER_CYCLE-1:0] bits;

  // turn one pattern point and return its patch pixel
  function automatic pix_t sample(input patch_t p, input logic [9:0] pt,
                                  input logic signed [15:0] c, input logic signed [15:0] s);
    logic signed [4:0]  px, py;
    logic signed [23:0] xr, yr;
    int                 xi, yi;
    px = pt[9:5];
    py = pt[4:0];
    xr = (24'(px) * 24'(c) - 24'(py) * 24'(s) + 24'sd8192) >>> 14;
    yr = (24'(px) * 24'(s) + 24'(py) * 24'(c) + 24'sd8192) >>> 14;
    xi = int'(xr) + HALF;
    yi = int'(yr) + HALF;
    return p[yi[4:0]][xi[4:0]];
  endfunction

  always_comb begin
    cs = cos6(2 * 32'(bin));
    sn = sin6(2 * 32'(bin));
    for (int l = 0; l < BITS_PER_CYCLE; l++) begin
      logic [19:0] pr;
      pr = PATTERN[20 * (32'(step) * BITS_PER_CYCLE + l) +: 20];
      bits[l] = sample(patch, pr[19:10], cs, sn) < sample(patch, pr[9:0], cs, sn);
    end
  end

  assign busy = running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      step    <= '0;
      done    <= 1'b0;
      desc    <= '0;
    end else begin
      done <= 1'b0;
      if (!running) begin
        if (start) begin
          running <= 1'b1;
          step    <= '0;
        end
      end else begin
        desc[32'(step) * BITS_PER_CYCLE +: BITS_PER_CYCLE] <= bits;
        step <= step + 1'b1;
        if (step == SW'(N_STEPS - 1)) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
      end
    end
  end
endmodule
