// patch_window: line buffers and a 31x31 register window over the smoothed
// pixel stream.
//
// FAST needs the 7x7 neighbourhood of a candidate, and the orientation and
// descriptor stages need the 31x31 patch around a keypoint. Both are read from
// one window. Thirty line buffers, held in one memory of MAX_COLS words of 30
// pixels, supply the older rows: reading a word at the input column gives the
// column above the new pixel, and writing it back shifted by one pixel drops the
// oldest row. Each advance shifts the window one column left and loads the new
// 31-pixel column on the right.
//
// Interface: one pixel enters per cycle with `adv` high, with its (row, col)
// tag; the column tag addresses the line buffer and must run 0..cols-1 in raster
// order. win[i][j] is row i (0 = top) and column j (0 = left); the centre
// win[15][15] lags the input by 15 rows and 15 columns, and ctr_tag gives its
// position. Window columns wrap across line ends, so only centres at least 15
// pixels from each edge hold a proper patch. The line buffer and window
// structure follow the streaming design this core implements; the single wide
// memory is this design's choice.
module patch_window
  import orb_pkg::*;
#(
  parameter int MAX_COLS = 1920
) (
  input  logic             clk,
  input  logic             adv,
  input  logic [DIM_W-1:0] cols,
  input  pix_t             in_pix,
  input  tag_t             in_tag,
  output patch_t           win,
  output tag_t             ctr_tag
);
  localparam int AW = $clog2(MAX_COLS);
  localparam int NL = PATCH - 1;

  logic [NL-1:0][PIX_W-1:0] lb [MAX_COLS];  // [0] = one row up
  logic [NL-1:0][PIX_W-1:0] lb_rd;
  logic [AW-1:0]            addr;
  tag_t                     tag_q;
  logic signed [CRD_W-1:0]  cr, cc, cc_raw;
  logic                     wrap;
  tag_t                     out_tag_c;

  assign addr  = AW'(in_tag.c);
  assign lb_rd = lb[addr];

  assign ctr_tag = out_tag_c;

  always_ff @(posedge clk) begin
    if (adv) begin
      lb[addr] <= {lb_rd[NL-2:0], in_pix};
      tag_q    <= in_tag;
      for (int i = 0; i < PATCH; i++) begin
        for (int j = 0; j < PATCH - 1; j++) win[i][j] <= win[i][j+1];
        // row i of the window is (PATCH-1-i) rows above the new pixel
        win[i][PATCH-1] <= (i == PATCH - 1) ? in_pix : lb_rd[PATCH-2-i];
      end
    end
  end

  // centre position: 15 columns back, wrapping into the previous row
  assign cc_raw    = tag_q.c - CRD_W'(HALF);
  assign wrap      = cc_raw[CRD_W-1];
  assign cc        = wrap ? cc_raw + $signed({1'b0, cols}) : cc_raw;
  assign cr        = tag_q.r - CRD_W'(HALF) - (wrap ? CRD_W'(1) : CRD_W'(0));
  assign out_tag_c = '{r: cr, c: cc};

endmodule
