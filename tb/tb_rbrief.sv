// tb_rbrief: steered BRIEF against the reference on random and smooth
// patches at every one of the 30 orientation bins. Checks the 256-bit
// descriptor and that it is ready 256/8 = 32 test cycles plus one start cycle
// after start.
module tb_rbrief;
  import orb_pkg::*;
  import orb_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  patch_t patch;
  logic [BIN_W-1:0] bin;
  logic busy, done;
  logic [DESC_BITS-1:0] desc;
  int checks = 0, failures = 0;

  rbrief #(.BITS_PER_CYCLE(8)) dut (.clk, .rst_n, .start, .patch, .bin, .busy, .done, .desc);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p[31][31];
    logic [255:0] exp;
    int cyc;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 90; it++) begin
      for (int v = 0; v < 31; v++) for (int u = 0; u < 31; u++)
        p[v][u] = (it % 2) ? $urandom_range(0, 255) : (u * 8 + v * 3 + $urandom_range(0, 3)) % 256;
      for (int v = 0; v < 31; v++) for (int u = 0; u < 31; u++) patch[v][u] = 8'(p[v][u]);
      bin = BIN_W'(it % 30);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done && cyc < 100) begin @(negedge clk); cyc++; end
      exp = brief(p, it % 30);
      checks += 2;
      if (desc !== exp) begin
        failures++;
        $display("FAIL bin %0d desc %h exp %h", bin, desc, exp);
      end
      if (cyc != 33) begin failures++; $display("FAIL latency %0d", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
