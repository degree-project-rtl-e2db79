// tb_ic_angle: orientation unit against the reference moments and a
// real-valued atan2. Patches are random, flat, zero, and ramps in 90 directions
// so that every orientation bin is hit. Checks m10 and m01 exactly, the bin
// unless the true angle lies within 0.02 degrees of a bin edge, and that the
// result takes no more than 31 + 30 + 2 cycles.
module tb_ic_angle;
  import orb_pkg::*;
  import orb_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  patch_t patch;
  logic busy, done;
  logic signed [MOM_W-1:0] m10, m01;
  logic [BIN_W-1:0] bin;
  int checks = 0, failures = 0;
  bit seen_bin [30];
  bit dbg = 0;

  ic_angle dut (.clk, .rst_n, .start, .patch, .busy, .done, .m10, .m01, .bin);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int p[31][31]);
    longint e10, e01;
    int eb, cyc;
    bit amb;
    for (int v = 0; v < 31; v++) for (int u = 0; u < 31; u++) patch[v][u] = 8'(p[v][u]);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done && cyc < 200) begin @(negedge clk); cyc++; end
    moments(p, e10, e01);
    eb = angle_bin(e10, e01, amb);
    checks += 3;
    if (longint'(m10) != e10 || longint'(m01) != e01) begin
      failures++; $display("FAIL moments %0d %0d exp %0d %0d", m10, m01, e10, e01);
    end
    if (!amb && int'(bin) != eb) begin failures++; $display("FAIL bin %0d exp %0d (m %0d %0d)", bin, eb, e10, e01); end
    if (cyc > 63) begin failures++; $display("FAIL latency %0d", cyc); end
    seen_bin[bin] = 1;
    if (dbg) $display("m10=%0d m01=%0d bin=%0d", m10, m01, bin);
  endtask

  initial begin
    int p[31][31];
    real th;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ramps in 90 directions
    for (int a = 0; a < 90; a++) begin
      th = (a * 4.0 + 1.0) * 3.14159265358979 / 180.0;
      for (int v = 0; v < 31; v++) for (int u = 0; u < 31; u++)
        p[v][u] = 128 + int'(8.0 * ((u - 15) * $cos(th) + (v - 15) * $sin(th)));
      run(p);
    end
    // random patches
    for (int it = 0; it < 60; it++) begin
      for (int v = 0; v < 31; v++) for (int u = 0; u < 31; u++) p[v][u] = $urandom_range(0, 255);
      run(p);
    end
    // flat and zero patches
    for (int v = 0; v < 31; v++) for (int u = 0; u < 31; u++) p[v][u] = 0;
    run(p);
    checks++; if (bin != 0) failures++;
    for (int v = 0; v < 31; v++) for (int u = 0; u < 31; u++) p[v][u] = 255;
    run(p);
    // bright corner pixel at the disc edge: largest moments
    for (int v = 0; v < 31; v++) for (int u = 0; u < 31; u++) p[v][u] = (u >= 15 && v >= 15) ? 255 : 0;
    run(p);
    for (int b = 0; b < 30; b++) begin
      checks++;
      if (!seen_bin[b]) begin failures++; $display("FAIL bin %0d never produced", b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
