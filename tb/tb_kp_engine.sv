// tb_kp_engine: keypoint engine end to end on single patches. Captures a
// window, checks that busy rises, that the record (position, bin, descriptor)
// matches the reference, that the record is held while kp_ready is low, and
// that busy falls once it has been taken.
module tb_kp_engine;
  import orb_pkg::*;
  import orb_ref_pkg::*;
  logic clk = 0, rst_n = 0, capture = 0, kp_ready = 0;
  patch_t win;
  logic [DIM_W-1:0] x, y;
  logic busy, kp_valid;
  kp_rec_t kp;
  int checks = 0, failures = 0, held = 0;

  kp_engine #(.BITS_PER_CYCLE(8)) dut (.clk, .rst_n, .capture, .win, .x, .y, .busy,
                                      .kp_valid, .kp_ready, .kp);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p[31][31];
    longint e10, e01;
    int eb, cyc, wait_n;
    bit amb;
    real th;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 40; it++) begin
      th = $urandom_range(0, 359) * 3.14159265358979 / 180.0;
      for (int v = 0; v < 31; v++) for (int u = 0; u < 31; u++) begin
        p[v][u] = (it % 2) ? $urandom_range(0, 255)
                           : 128 + int'(6.0 * ((u - 15) * $cos(th) + (v - 15) * $sin(th)));
        win[v][u] = 8'(p[v][u]);
      end
      x = DIM_W'($urandom_range(15, 1900));
      y = DIM_W'($urandom_range(15, 1060));
      @(negedge clk) capture = 1;
      @(negedge clk) capture = 0;
      // the engine works on its own copy: scramble the window
      for (int v = 0; v < 31; v++) for (int u = 0; u < 31; u++) win[v][u] = 8'($urandom);
      checks++;
      if (!busy) begin failures++; $display("FAIL not busy after capture"); end
      cyc = 1;
      while (!kp_valid && cyc < 300) begin @(negedge clk); cyc++; end
      wait_n = $urandom_range(0, 5);
      repeat (wait_n) begin
        @(negedge clk);
        checks++;
        if (!kp_valid || !busy) begin failures++; $display("FAIL record dropped while not ready"); end
        held++;
      end
      moments(p, e10, e01);
      eb = angle_bin(e10, e01, amb);
      checks += 4;
      if (kp.x != x || kp.y != y) begin failures++; $display("FAIL position"); end
      if (!amb && int'(kp.bin) != eb) begin failures++; $display("FAIL bin %0d exp %0d", kp.bin, eb); end
      if (kp.desc !== brief(p, int'(kp.bin))) begin failures++; $display("FAIL desc"); end
      if (cyc > 31 + 30 + 32 + 6) begin failures++; $display("FAIL latency %0d", cyc); end
      kp_ready = 1;
      @(negedge clk) kp_ready = 0;
      checks++;
      if (busy || kp_valid) begin failures++; $display("FAIL still busy after handoff"); end
    end
    checks++;
    if (held == 0) begin failures++; $display("FAIL backpressure never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
