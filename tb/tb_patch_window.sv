// tb_patch_window: streams a random image into the 31x31 window with random
// gaps in `adv` and, whenever the window centre is at least 15 pixels from
// every edge, compares all 961 window pixels with the image. Also checks the
// centre tag, which must lag the input by 15 rows and 15 columns.
module tb_patch_window;
  import orb_pkg::*;
  localparam int MAXC = 64;
  localparam int NR = 40, NC = 48;
  logic clk = 0, adv = 0;
  logic [DIM_W-1:0] cols;
  pix_t in_pix;
  tag_t in_tag, ctr_tag;
  patch_t win;
  int img[NR][NC];
  int checks = 0, failures = 0, full = 0;

  patch_window #(.MAX_COLS(MAXC)) dut (.clk, .adv, .cols, .in_pix, .in_tag, .win, .ctr_tag);

  always #5 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cols = DIM_W'(NC);
    for (int r = 0; r < NR; r++) for (int c = 0; c < NC; c++) img[r][c] = $urandom_range(0, 255);
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NC; c++) begin
        while ($urandom_range(0, 4) == 0) begin adv = 0; @(negedge clk); end
        adv = 1;
        in_pix = 8'(img[r][c]);
        in_tag = '{r: CRD_W'(r), c: CRD_W'(c)};
        @(negedge clk);
        adv = 0;
        if (r * NC + c >= 15 * NC + 15) begin
          int cr, cc;
          cr = (r * NC + c - 15 * NC - 15) / NC;
          cc = (r * NC + c - 15 * NC - 15) % NC;
          checks++;
          if (ctr_tag.r != CRD_W'(cr) || ctr_tag.c != CRD_W'(cc)) begin
            failures++; $display("FAIL tag %0d,%0d exp %0d,%0d", ctr_tag.r, ctr_tag.c, cr, cc);
          end
          if (cr >= 15 && cc >= 15 && cc < NC - 15) begin
            int bad = 0;
            for (int i = 0; i < 31; i++)
              for (int j = 0; j < 31; j++)
                if (int'(win[i][j]) != img[cr - 15 + i][cc - 15 + j]) bad++;
            checks++;
            full++;
            if (bad != 0) begin failures++; $display("FAIL window at %0d,%0d: %0d wrong", cr, cc, bad); end
          end
        end
      end
    checks++;
    if (full < 100) begin failures++; $display("FAIL only %0d windows checked", full); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
