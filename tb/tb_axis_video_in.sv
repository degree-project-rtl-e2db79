// tb_axis_video_in: sends junk beats, then a frame that starts with tuser, to
// the stream input with random valid and ready gaps. Checks that tready is low
// while idle, that beats before the start of frame are dropped, that the
// frame's pixels come out in order with nothing lost or repeated, and that the
// block returns to idle on `last`.
module tb_axis_video_in;
  logic clk = 0, rst_n = 0, arm = 0, last = 0;
  logic [23:0] tdata;
  logic tuser = 0, tlast = 0, tvalid = 0, tready;
  logic [23:0] pix_data;
  logic pix_valid, pix_ready = 0, drop_pulse;
  int checks = 0, failures = 0, drops = 0, got = 0;
  localparam int N = 200, JUNK = 7;

  axis_video_in dut (
    .clk, .rst_n, .arm, .last, .s_axis_tdata(tdata), .s_axis_tkeep(3'b111), .s_axis_tstrb(3'b111),
    .s_axis_tuser(tuser), .s_axis_tlast(tlast), .s_axis_tid(1'b0), .s_axis_tdest(1'b0),
    .s_axis_tvalid(tvalid), .s_axis_tready(tready), .pix_data, .pix_valid, .pix_ready, .drop_pulse
  );

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consumer: random ready, checks order, raises `last` with the final pixel
  always @(posedge clk) begin
    if (rst_n) begin
      if (drop_pulse && tready) drops++;
      if (pix_valid && pix_ready) begin
        checks++;
        if (pix_data != 24'(32'h100000 + got)) begin
          failures++; $display("FAIL pixel %0d = %h", got, pix_data);
        end
        got++;
      end
    end
  end
  always @(negedge clk) begin
    pix_ready = ($urandom_range(0, 3) != 0);
    last = pix_valid && pix_ready && (got == N - 1);
  end

  initial begin
    int i;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // idle: the input must not be taken
    tvalid = 1; tdata = 24'hBAD000;
    repeat (4) begin @(negedge clk); #1; checks++; if (tready) begin failures++; $display("FAIL tready while idle"); end end
    @(negedge clk) arm = 1;
    @(negedge clk) arm = 0;
    // junk beats, then the frame
    i = 0;
    while (i < JUNK + N) begin
      tvalid = ($urandom_range(0, 4) != 0);
      tuser  = (i == JUNK);
      tdata  = (i < JUNK) ? 24'hBAD000 + 24'(i) : 24'(32'h100000 + i - JUNK);
      @(posedge clk);
      if (tvalid && tready) i++;
      @(negedge clk);
    end
    tvalid = 0;
    repeat (5) @(negedge clk);
    checks += 3;
    if (got != N) begin failures++; $display("FAIL got %0d of %0d pixels", got, N); end
    if (drops != JUNK) begin failures++; $display("FAIL dropped %0d, expected %0d", drops, JUNK); end
    tvalid = 1;
    #1;
    if (tready) begin failures++; $display("FAIL not idle after last"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
