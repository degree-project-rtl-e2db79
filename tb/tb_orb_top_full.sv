// tb_orb_top_full: end-to-end test of the ORB core at its full frame size,
// 1920x1080, with the frame store at its default size (no parameter changed).
// A 1920x1080 frame and then a 640x480 frame, each faint texture with 200
// bright 3x3 dots, are sent through the video input while the control bus
// programs and starts the core, as in tb_orb_top. Every output pixel and every keypoint record is compared with
// the reference model (smoothed image, FAST, orientation bin, steered BRIEF),
// keypoints within 0.002 bin of a bin edge having their bin and descriptor
// left unchecked. It also counts each handshake mechanism (keypoint stall,
// output and keypoint backpressure, input starvation, dropped beats before
// the start of frame, flush, interrupt, ap_ready) and fails if one never
// happened. It also checks that a frame takes exactly
// rows x cols + 17 x cols + 20 pipeline advances (the frame plus the flush), no more than the 2111641
// cycles of the modelled accelerator. About 2.9 million clock cycles.
module tb_orb_top_full;
  localparam int MAXR = 1080, MAXC = 1920, MAXKP = 8192;
  localparam int NFRAMES = 2, NR0 = 1080, NC0 = 1920, NR1 = 480, NC1 = 640;
  localparam int NDOTS = 200, JUNK = 5, IVALID_PCT = 95, OREADY_PCT = 90;
  localparam int MAX_LATENCY = 2111641;   // cycles per 1920x1080 frame of the modelled accelerator
  localparam longint WATCHDOG_NS = 64'd200_000_000;
  import orb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [5:0] awaddr = 0, araddr = 0;
  logic awvalid = 0, awready, wvalid = 0, wready, bvalid, bready = 0, arvalid = 0, arready;
  logic rvalid, rready = 0;
  logic [31:0] wdata = 0, rdata;
  logic [1:0] bresp, rresp;
  logic [23:0] i_tdata = 0, o_tdata;
  logic i_tuser = 0, i_tlast = 0, i_tvalid = 0, i_tready;
  logic [2:0] o_tkeep, o_tstrb;
  logic o_tuser, o_tlast, o_tid, o_tdest, o_tvalid, o_tready = 0;
  logic kp_valid, kp_ready = 0, interrupt;
  kp_rec_t kp;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_stall = 0, n_oback = 0, n_starve = 0, n_drop = 0, n_flush = 0, n_irq = 0, n_ready = 0;
  int n_kp = 0, n_kpback = 0, n_amb = 0;
  int n_adv = 0;   // pipeline advances in the current frame

  // reference model of the current frame
  int nr, nc, thr;
  int gin [MAXR][MAXC];
  int sm  [MAXR][MAXC];
  bit iskp [MAXR][MAXC];
  int kp_r [MAXKP], kp_c [MAXKP], kp_bin [MAXKP];
  bit kp_amb [MAXKP];
  logic [255:0] kp_desc [MAXKP];
  int nkp_ref, beat, kidx;
  int patch [31][31];
  bit frame_on = 0;

  always #5 clk = ~clk;

  initial begin
    #(WATCHDOG_NS);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int gray_of(int rr, int gg, int bb);
    return (77 * rr + 150 * gg + 29 * bb + 128) >> 8;
  endfunction

  // synthetic scene: low-contrast noise plus bright 3x3 dots, some in
  // clusters so that keypoints arrive faster than the engine handles them
  function automatic int scene(int f, int r, int c);
    int v, dr, dc;
    v = 40 + ((r * 7 + c * 13 + f * 5) % 9);
    for (int k = 0; k < NDOTS; k++) begin
      dr = 17 + (k * 7 + f * 3) % (nr - 34);
      dc = 17 + (k * 11 + f * 5) % (nc - 34);
      if (r >= dr - 1 && r <= dr + 1 && c >= dc - 1 && c <= dc + 1) v = 230 + ((k * 7) % 20);
    end
    return v;
  endfunction

  function automatic bit fast_ref(int r, int c);
    int xs[16] = '{0, 1, 2, 3, 3, 3, 2, 1, 0, -1, -2, -3, -3, -3, -2, -1};
    int ys[16] = '{-3, -3, -2, -1, 0, 1, 2, 3, 3, 3, 2, 1, 0, -1, -2, -3};
    logic [31:0] b, d;
    int p, rb, rd;
    p = sm[r][c];
    for (int k = 0; k < 16; k++) begin
      b[k] = sm[r+ys[k]][c+xs[k]] >= p + thr;
      d[k] = sm[r+ys[k]][c+xs[k]] <= p - thr;
    end
    b[31:16] = b[15:0];
    d[31:16] = d[15:0];
    for (int s = 0; s < 16; s++) begin
      rb = 1; rd = 1;
      for (int j = 0; j < 12; j++) begin
        rb = rb & b[s+j];
        rd = rd & d[s+j];
      end
      if (rb || rd) return 1;
    end
    return 0;
  endfunction

  function automatic void build_ref(int f);
    int kw [5] = '{1, 4, 6, 4, 1};
    for (int r = 0; r < nr; r++)
      for (int c = 0; c < nc; c++) gin[r][c] = scene(f, r, c);
    for (int r = 0; r < nr; r++)
      for (int c = 0; c < nc; c++)
        if (r < 2 || r >= nr - 2 || c < 2 || c >= nc - 2) sm[r][c] = gin[r][c];
        else begin
          int acc;
          acc = 128;
          for (int i = 0; i < 5; i++)
            for (int j = 0; j < 5; j++) acc += kw[i] * kw[j] * gin[r+i-2][c+j-2];
          sm[r][c] = acc >> 8;
        end
    nkp_ref = 0;
    for (int r = 0; r < nr; r++)
      for (int c = 0; c < nc; c++) begin
        iskp[r][c] = (r >= 15 && r < nr - 15 && c >= 15 && c < nc - 15) && fast_ref(r, c);
        if (iskp[r][c] && nkp_ref < MAXKP) begin
          longint m10, m01;
          real a, fr;
          for (int v = 0; v < 31; v++)
            for (int u = 0; u < 31; u++) patch[v][u] = sm[r+v-15][c+u-15];
          m10 = 0; m01 = 0;
          for (int v = 0; v < 31; v++)
            for (int u = 0; u < 31; u++)
              if ((v-15)*(v-15) + (u-15)*(u-15) <= 225) begin
                m10 += (u - 15) * patch[v][u];
                m01 += (v - 15) * patch[v][u];
              end
          kp_amb[nkp_ref] = 0;
          if (m10 == 0 && m01 == 0) kp_bin[nkp_ref] = 0;
          else begin
            a = $atan2(real'(m01), real'(m10)) * 180.0 / 3.14159265358979;
            if (a < 0) a += 360.0;
            fr = (a + 6.0) / 12.0;
            if (fr - $floor(fr) < 0.002 || $ceil(fr) - fr < 0.002) kp_amb[nkp_ref] = 1;
            kp_bin[nkp_ref] = int'($floor(fr)) % 30;
          end
          kp_desc[nkp_ref] = brief_ref(kp_bin[nkp_ref]);
          kp_r[nkp_ref] = r;
          kp_c[nkp_ref] = c;
          nkp_ref++;
        end
      end
  endfunction

  function automatic logic [255:0] brief_ref(int bin);
    logic [DESC_BITS*20-1:0] pat;
    logic [255:0] d;
    longint cs, sn, xr, yr;
    logic [19:0] e;
    int px0, py0, px1, py1, v0, v1;
    pat = brief_pattern();
    cs = longint'(cos6(2 * bin));
    sn = longint'(sin6(2 * bin));
    for (int i = 0; i < 256; i++) begin
      e = pat[20*i +: 20];
      px0 = int'($signed(e[19:15])); py0 = int'($signed(e[14:10]));
      px1 = int'($signed(e[9:5]));   py1 = int'($signed(e[4:0]));
      xr = (longint'(px0) * cs - longint'(py0) * sn + 8192) >>> 14;
      yr = (longint'(px0) * sn + longint'(py0) * cs + 8192) >>> 14;
      v0 = patch[yr + 15][xr + 15];
      xr = (longint'(px1) * cs - longint'(py1) * sn + 8192) >>> 14;
      yr = (longint'(px1) * sn + longint'(py1) * cs + 8192) >>> 14;
      v1 = patch[yr + 15][xr + 15];
      d[i] = v0 < v1;
    end
    return d;
  endfunction

  task automatic axi_write(input logic [5:0] a, input logic [31:0] d);
    @(negedge clk);
    awaddr = a; wdata = d; awvalid = 1; wvalid = 1;
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk);
    awvalid = 0; wvalid = 0; bready = 1;
    do @(posedge clk); while (!bvalid);
    @(negedge clk) bready = 0;
  endtask

  task automatic axi_read(input logic [5:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1;
    do @(posedge clk); while (!arready);
    @(negedge clk);
    arvalid = 0; rready = 1;
    do @(posedge clk); while (!rvalid);
    d = rdata;
    @(negedge clk) rready = 0;
  endtask

  // mechanism monitors
  always @(posedge clk) if (rst_n) begin
    if (dut.u_core.kp_block) n_stall++;
    if (o_tvalid && !o_tready) n_oback++;
    if (i_tready && !i_tvalid) n_starve++;
    if (dut.u_core.drop_pulse && i_tvalid && i_tready) n_drop++;
    if (dut.u_core.adv && !dut.u_core.src_real) n_flush++;
    if (dut.u_core.adv) n_adv++;
    if (dut.u_core.ap_ready) n_ready++;
    if (kp_valid && !kp_ready) n_kpback++;
  end

  // output image checker
  always @(posedge clk) if (rst_n && o_tvalid && o_tready) begin
    int r, c;
    logic [23:0] exp;
    r = beat / nc;
    c = beat % nc;
    checks++;
    if (!frame_on || r >= nr) begin
      failures++; $display("FAIL output beat %0d outside a frame", beat);
    end else begin
      exp = iskp[r][c] ? 24'hFF0000 : {3{8'(sm[r][c])}};
      if (o_tdata != exp || o_tuser != (beat == 0) || o_tlast != (c == nc - 1)) begin
        failures++;
        if (failures < 20) $display("FAIL out (%0d,%0d) data %h exp %h user %b last %b", r, c, o_tdata, exp, o_tuser, o_tlast);
      end
    end
    beat++;
  end

  // keypoint record checker
  always @(posedge clk) if (rst_n && kp_valid && kp_ready) begin
    checks++;
    n_kp++;
    if (kidx >= nkp_ref) begin
      failures++; $display("FAIL extra keypoint (%0d,%0d)", kp.y, kp.x);
    end else begin
      if (int'(kp.x) != kp_c[kidx] || int'(kp.y) != kp_r[kidx]) begin
        failures++; $display("FAIL keypoint %0d at (%0d,%0d) exp (%0d,%0d)", kidx, kp.y, kp.x, kp_r[kidx], kp_c[kidx]);
      end else if (kp_amb[kidx]) n_amb++;
      else if (int'(kp.bin) != kp_bin[kidx] || kp.desc != kp_desc[kidx]) begin
        failures++; $display("FAIL keypoint %0d bin %0d exp %0d or descriptor", kidx, kp.bin, kp_bin[kidx]);
      end
    end
    kidx++;
  end

  always @(negedge clk) begin
    o_tready = ($urandom_range(0, 99) < OREADY_PCT);
    kp_ready = ($urandom_range(0, 3) != 0);
  end

  // stream source: junk beats first (dropped until the core is started and
  // sees a start of frame), then the frame with random gaps
  task automatic send_frame(int f);
    int i, n;
    n = nr * nc;
    i = -JUNK;
    while (i < n) begin
      int r, c, rr, gg, bb, g;
      i_tvalid = ($urandom_range(0, 99) < IVALID_PCT);
      if (i < 0) begin
        i_tdata = 24'h123456; i_tuser = 0; i_tlast = 0;
      end else begin
        r = i / nc; c = i % nc;
        g = gin[r][c];
        // a colour whose grey value is g
        rr = g; gg = g; bb = g;
        if (g > 20 && g < 235) begin
          rr = g + 20 - int'($urandom_range(0, 1)) * 40;
          bb = g;
          gg = g;
          while (gray_of(rr, gg, bb) > g) gg--;
          while (gray_of(rr, gg, bb) < g) gg++;
          if (gray_of(rr, gg, bb) != g) begin rr = g; gg = g; bb = g; end
        end
        i_tdata = {8'(rr), 8'(gg), 8'(bb)};
        i_tuser = (i == 0);
        i_tlast = (c == nc - 1);
      end
      @(posedge clk);
      if (i_tvalid && i_tready) i++;
      @(negedge clk);
    end
    i_tvalid = 0;
  endtask

  int src_frame = 0;
  bit src_go = 0;
  always @(negedge clk) if (src_go) begin
    send_frame(src_frame);
    src_go = 0;
  end

  initial begin
    logic [31:0] rd;
    repeat (4) @(negedge clk);
    rst_n = 1;
    axi_write(6'h04, 1);
    axi_write(6'h08, 1);
    for (int f = 0; f < NFRAMES; f++) begin
      nr = (f == 0) ? NR0 : NR1;
      nc = (f == 0) ? NC0 : NC1;
      thr = (f == 0) ? 20 : 30;
      build_ref(f);
      beat = 0;
      kidx = 0;
      n_adv = 0;
      frame_on = 1;
      axi_write(6'h10, nr);
      axi_write(6'h18, nc);
      axi_write(6'h20, thr);
      src_frame = f;
      src_go = 1;
      repeat (JUNK * 4 + 10) @(negedge clk);
      axi_write(6'h00, 1);
      while (!interrupt) @(negedge clk);
      n_irq++;
      axi_read(6'h00, rd);
      checks += 3;
      if (!rd[1]) begin failures++; $display("FAIL ap_done not seen"); end
      if (beat != nr * nc) begin failures++; $display("FAIL frame %0d: %0d output beats, expected %0d", f, beat, nr * nc); end
      if (kidx != nkp_ref) begin failures++; $display("FAIL frame %0d: %0d keypoints, expected %0d", f, kidx, nkp_ref); end
      // one pixel per advance: the frame plus the flush of 17 rows, 17 columns and 3 stages
      checks += 2;
      if (n_adv != nr * nc + 17 * nc + 20) begin failures++; $display("FAIL frame %0d: %0d advances, expected %0d", f, n_adv, nr * nc + 17 * nc + 20); end
      if (n_adv > MAX_LATENCY) begin failures++; $display("FAIL frame %0d: %0d advances exceed %0d", f, n_adv, MAX_LATENCY); end
      $display("frame %0d: %0dx%0d, %0d keypoints", f, nr, nc, nkp_ref);
      axi_write(6'h0C, 1);
      frame_on = 0;
      while (src_go) @(negedge clk);
    end
    // every mechanism must have happened at least once
    checks += 10;
    if (n_stall == 0)  begin failures++; $display("FAIL no keypoint stall"); end
    if (n_oback == 0)  begin failures++; $display("FAIL no output backpressure"); end
    if (n_starve == 0) begin failures++; $display("FAIL no input starvation"); end
    if (n_drop == 0)   begin failures++; $display("FAIL no beat dropped before start of frame"); end
    if (n_flush == 0)  begin failures++; $display("FAIL no flush"); end
    if (n_irq == 0)    begin failures++; $display("FAIL no interrupt"); end
    if (n_ready == 0)  begin failures++; $display("FAIL no ap_ready"); end
    if (n_kp == 0)     begin failures++; $display("FAIL no keypoint record"); end
    if (n_kpback == 0) begin failures++; $display("FAIL no keypoint backpressure"); end
    if (n_kp <= n_amb) begin failures++; $display("FAIL no keypoint fully compared"); end
    $display("stalls %0d, output backpressure %0d, starvation %0d, drops %0d, flush %0d, irq %0d, ready %0d, keypoints %0d (%0d near a bin edge), kp backpressure %0d",
             n_stall, n_oback, n_starve, n_drop, n_flush, n_irq, n_ready, n_kp, n_amb, n_kpback);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  orb_top dut (
    .ap_clk(clk), .ap_rst_n(rst_n),
    .s_axi_control_awaddr(awaddr), .s_axi_control_awvalid(awvalid), .s_axi_control_awready(awready),
    .s_axi_control_wdata(wdata), .s_axi_control_wstrb(4'hF), .s_axi_control_wvalid(wvalid),
    .s_axi_control_wready(wready), .s_axi_control_bresp(bresp), .s_axi_control_bvalid(bvalid),
    .s_axi_control_bready(bready), .s_axi_control_araddr(araddr), .s_axi_control_arvalid(arvalid),
    .s_axi_control_arready(arready), .s_axi_control_rdata(rdata), .s_axi_control_rresp(rresp),
    .s_axi_control_rvalid(rvalid), .s_axi_control_rready(rready),
    .input_stream_tdata(i_tdata), .input_stream_tkeep(3'b111), .input_stream_tstrb(3'b111),
    .input_stream_tuser(i_tuser), .input_stream_tlast(i_tlast), .input_stream_tid(1'b0),
    .input_stream_tdest(1'b0), .input_stream_tvalid(i_tvalid), .input_stream_tready(i_tready),
    .output_stream_tdata(o_tdata), .output_stream_tkeep(o_tkeep), .output_stream_tstrb(o_tstrb),
    .output_stream_tuser(o_tuser), .output_stream_tlast(o_tlast), .output_stream_tid(o_tid),
    .output_stream_tdest(o_tdest), .output_stream_tvalid(o_tvalid), .output_stream_tready(o_tready),
    .kp_valid, .kp_ready, .kp, .interrupt
  );
endmodule
