// tb_axis_video_out: loads a 40x6 frame of pixels (some flagged as keypoints)
// into the output register while the receiver applies random backpressure.
// Checks each beat's data (grey in all bytes or the paint colour), tuser on
// the first pixel only, tlast on each line end, the constant side-band
// signals, and that a stalled beat is held.
module tb_axis_video_out;
  import orb_pkg::*;
  localparam int NC = 40, NR = 6;
  logic clk = 0, rst_n = 0, load = 0, is_kp = 0, in_ready;
  logic [DIM_W-1:0] cols = DIM_W'(NC), x, y;
  pix_t pix;
  logic [23:0] tdata;
  logic [2:0] tkeep, tstrb;
  logic tuser, tlast, tid, tdest, tvalid, tready = 0;
  int checks = 0, failures = 0, nbeat = 0, stalls = 0;
  int epix [NR*NC];
  bit ekp [NR*NC];

  axis_video_out #(.PAINT_COLOR(24'hFF0000)) dut (
    .clk, .rst_n, .cols, .load, .pix, .is_kp, .x, .y, .in_ready,
    .m_axis_tdata(tdata), .m_axis_tkeep(tkeep), .m_axis_tstrb(tstrb), .m_axis_tuser(tuser),
    .m_axis_tlast(tlast), .m_axis_tid(tid), .m_axis_tdest(tdest), .m_axis_tvalid(tvalid),
    .m_axis_tready(tready)
  );

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && tvalid) begin
    if (!tready) stalls++;
    else begin
      int xx, yy;
      xx = nbeat % NC;
      yy = nbeat / NC;
      checks += 4;
      if (tdata != (ekp[nbeat] ? 24'hFF0000 : {3{8'(epix[nbeat])}})) begin
        failures++; $display("FAIL beat %0d data %h", nbeat, tdata);
      end
      if (tuser != (nbeat == 0)) begin failures++; $display("FAIL tuser at %0d", nbeat); end
      if (tlast != (xx == NC - 1)) begin failures++; $display("FAIL tlast at %0d,%0d", yy, xx); end
      if (tkeep != 3'b111 || tstrb != 3'b111 || tid || tdest) begin failures++; $display("FAIL sideband"); end
      nbeat++;
    end
  end

  always @(negedge clk) tready = ($urandom_range(0, 2) != 0);

  initial begin
    int n;
    logic [23:0] held;
    for (int i = 0; i < NR * NC; i++) begin epix[i] = $urandom_range(0, 255); ekp[i] = ($urandom_range(0, 9) == 0); end
    repeat (3) @(negedge clk);
    rst_n = 1;
    n = 0;
    while (n < NR * NC) begin
      @(negedge clk);
      #1;
      load = 0;
      if (in_ready && $urandom_range(0, 5) != 0) begin
        load = 1;
        pix = 8'(epix[n]);
        is_kp = ekp[n];
        x = DIM_W'(n % NC);
        y = DIM_W'(n / NC);
        n++;
      end
    end
    @(negedge clk) load = 0;
    repeat (20) @(negedge clk);
    checks += 2;
    if (nbeat != NR * NC) begin failures++; $display("FAIL %0d beats", nbeat); end
    if (stalls == 0) begin failures++; $display("FAIL backpressure never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
