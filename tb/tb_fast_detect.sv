// tb_fast_detect: FAST-12 segment test against a loop-based reference.
// Windows are random, random with a planted run of 11, 12 or 13 brighter or
// darker pixels at a random start, and flat; both comparator vectors and the
// corner flag are checked.
module tb_fast_detect;
  import orb_pkg::*;
  import orb_ref_pkg::*;
  pix_t [6:0][6:0] win7;
  logic [7:0]  threshold;
  logic [15:0] bright, dark;
  logic        is_corner;
  int checks = 0, failures = 0, n_corner = 0;

  fast_detect #(.N_SEG(12)) dut (.win7, .threshold, .bright, .dark, .is_corner);

  task automatic run_one();
    int ring[16], dx, dy, p, t;
    logic [15:0] eb, ed;
    bit exp;
    #1;
    p = int'(win7[3][3]);
    t = int'(threshold);
    for (int k = 0; k < 16; k++) begin
      circle(k, dx, dy);
      ring[k] = int'(win7[3+dy][3+dx]);
      eb[k] = ring[k] >= p + t;
      ed[k] = ring[k] <= p - t;
    end
    exp = fast_on(p, ring, t, 12);
    checks += 3;
    if (bright !== eb) begin failures++; $display("FAIL bright %h exp %h", bright, eb); end
    if (dark !== ed)   begin failures++; $display("FAIL dark %h exp %h", dark, ed); end
    if (is_corner !== exp) begin failures++; $display("FAIL corner %b exp %b", is_corner, exp); end
    if (exp) n_corner++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 3000; it++) begin
      int mode, len, s, dx, dy, p;
      mode = it % 3;
      threshold = 8'($urandom_range(1, 40));
      p = $urandom_range(60, 190);
      for (int i = 0; i < 7; i++)
        for (int j = 0; j < 7; j++)
          win7[i][j] = (mode == 2) ? 8'(p + $urandom_range(0, 6) - 3) : 8'($urandom);
      if (mode == 1) begin
        win7[3][3] = 8'(p);
        len = $urandom_range(11, 13);
        s = $urandom_range(0, 15);
        for (int n = 0; n < 16; n++) begin
          circle((s + n) % 16, dx, dy);
          if (n < len) win7[3+dy][3+dx] = (it % 2) ? 8'(p + threshold + $urandom_range(0, 20))
                                                    : 8'(p - threshold - $urandom_range(0, 20));
          else win7[3+dy][3+dx] = 8'(p);
        end
      end
      run_one();
    end
    if (n_corner < 100) begin failures++; $display("FAIL too few corners exercised: %0d", n_corner); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
