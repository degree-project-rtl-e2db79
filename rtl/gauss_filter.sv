// gauss_filter: 5x5 Gaussian smoothing of a raster pixel stream.
//
// ORB compares single pixels, so the image is smoothed first. The 2-D Gaussian
// is separable and is applied as two 1-D passes of the binomial kernel
// [1 4 6 4 1]: a vertical pass over the five-pixel column formed by four line
// buffers and the incoming pixel, then a horizontal pass over a five-entry shift
// register of column sums. The result is divided by 256 with rounding. The kernel
// size 5x5 and the separable structure follow the ORB flow this core implements;
// the binomial weights (sigma about 1) are this design's choice.
//
// Interface: one pixel enters per cycle in which `adv` is high, together with its
// (row, col) tag. The outputs are combinational from internal registers and give
// the smoothed pixel of the window centre, which lags the input by two rows and
// two columns, and that centre's tag. Centres within two pixels of an image edge
// pass through unfiltered (this design's choice). The line buffers are addressed
// by the input column, so the column tag must run 0..cols-1 in raster order.
module gauss_filter
  import orb_pkg::*;
#(
  parameter int MAX_COLS = 1920
) (
  input  logic              clk,
  input  logic              adv,
  input  logic [DIM_W-1:0]  rows,
  input  logic [DIM_W-1:0]  cols,
  input  pix_t              in_pix,
  input  tag_t              in_tag,
  output pix_t              out_pix,
  output tag_t              out_tag
);
  localparam int AW = $clog2(MAX_COLS);

  logic [3:0][PIX_W-1:0] lb [MAX_COLS];   // [0] = one row up, [3] = four rows up
  logic [3:0][PIX_W-1:0] lb_rd;
  logic [AW-1:0]         addr;
  logic [11:0]           vsum;
  logic [4:0][11:0]      hs;              // column sums, [0] newest column
  logic [4:0][PIX_W-1:0] cp;              // centre-row pixel of each column
  tag_t                  tag_q;           // tag of the newest column
  logic [15:0]           hsum;
  logic signed [CRD_W-1:0] cr, cc, cc_raw;
  tag_t                    out_tag_c;
  logic                    wrap;


  assign addr  = AW'(in_tag.c);
  assign lb_rd = lb[addr];

  always_comb
    vsum = 12'(in_pix) + 12'(lb_rd[3]) + 12'd4 * (12'(lb_rd[0]) + 12'(lb_rd[2]))
         + 12'd6 * 12'(lb_rd[1]);

  assign out_tag = out_tag_c;

  always_ff @(posedge clk) begin
    if (adv) begin
      lb[addr] <= {lb_rd[2:0], in_pix};
      hs       <= {hs[3:0], vsum};
      cp       <= {cp[3:0], lb_rd[1]};
      tag_q    <= in_tag;
    end
  end

  // centre position: two columns back, wrapping into the previous row
  assign cc_raw    = tag_q.c - CRD_W'(2);
  assign wrap      = cc_raw[CRD_W-1];
  assign cc        = wrap ? cc_raw + $signed({1'b0, cols}) : cc_raw;
  assign cr        = tag_q.r - CRD_W'(2) - (wrap ? CRD_W'(1) : CRD_W'(0));
  assign out_tag_c = '{r: cr, c: cc};

  always_comb begin
    hsum = 16'(hs[0]) + 16'(hs[4]) + 16'd4 * (16'(hs[1]) + 16'(hs[3])) + 16'd6 * 16'(hs[2])
         + 16'd128;
    if (cr < 2 || cr >= $signed({1'b0, rows}) - 2 || cc < 2 || cc >= $signed({1'b0, cols}) - 2)
      out_pix = cp[2];
    else
      out_pix = hsum[15:8];
  end
endmodule
