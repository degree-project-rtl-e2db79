// tb_gauss_filter: streams random images (two frames, different sizes) through
// the 5x5 smoothing stage with random gaps in `adv`, followed by padding rows,
// and compares every smoothed pixel that appears at the output with a direct
// 5x5 convolution by the binomial kernel, including the unfiltered two-pixel
// border. Also checks that the output lags the input by two rows and two
// columns.
module tb_gauss_filter;
  import orb_pkg::*;
  localparam int MAXC = 64;
  logic clk = 0, adv = 0;
  logic [DIM_W-1:0] rows, cols;
  pix_t in_pix, out_pix;
  tag_t in_tag, out_tag;
  int checks = 0, failures = 0;
  int img [16][64];
  int ref_sm [16][64];
  int nr, nc, seen, er, ec, lin;
  int kw [5] = '{1, 4, 6, 4, 1};

  gauss_filter #(.MAX_COLS(MAXC)) dut (.clk, .adv, .rows, .cols, .in_pix, .in_tag, .out_pix, .out_tag);

  always #5 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 2; f++) begin
      nr = (f == 0) ? 12 : 9;
      nc = (f == 0) ? 20 : 64;
      for (int r = 0; r < nr; r++)
        for (int c = 0; c < nc; c++) img[r][c] = ((r * nc + c) % 7 == 0) ? 255 : $urandom_range(0, 255);
      for (int r = 0; r < nr; r++)
        for (int c = 0; c < nc; c++) begin
          if (r < 2 || r >= nr - 2 || c < 2 || c >= nc - 2) ref_sm[r][c] = img[r][c];
          else begin
            int acc;
            acc = 0;
            for (int i = 0; i < 5; i++)
              for (int j = 0; j < 5; j++) acc += kw[i] * kw[j] * img[r+i-2][c+j-2];
            ref_sm[r][c] = (acc + 128) >> 8;
          end
        end
      rows = DIM_W'(nr);
      cols = DIM_W'(nc);
      seen = 0;
      @(negedge clk);
      for (int r = 0; r < nr + 3; r++)
        for (int c = 0; c < nc; c++) begin
          while ($urandom_range(0, 3) == 0) begin adv = 0; @(negedge clk); end
          adv = 1;
          in_pix = (r < nr) ? 8'(img[r][c]) : 8'd0;
          in_tag = '{r: CRD_W'(r), c: CRD_W'(c)};
          @(negedge clk);
          adv = 0;
          lin = r * nc + c - 2 * nc - 2;
          if (lin >= 0) begin
            er = lin / nc;
            ec = lin % nc;
            checks++;
            if (int'(out_tag.r) != er || int'(out_tag.c) != ec) begin
              failures++;
              $display("FAIL tag %0d,%0d exp %0d,%0d", int'(out_tag.r), int'(out_tag.c), er, ec);
            end else if (er < nr) begin
              checks++;
              seen++;
              if (int'(out_pix) != ref_sm[er][ec]) begin
                failures++;
                $display("FAIL pix (%0d,%0d) %0d exp %0d", er, ec, out_pix, ref_sm[er][ec]);
              end
            end
          end
        end
      checks++;
      if (seen != nr * nc) begin failures++; $display("FAIL saw %0d of %0d pixels", seen, nr * nc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
