// orb_core: one-pass ORB feature extraction over a streamed video frame.
//
// The frame enters as AXI4-Stream video, one pixel per clock, and flows through
// a single pipeline: grey conversion, 5x5 Gaussian smoothing, a 31x31 window
// over the smoothed image, and the FAST-12 corner test on the window centre.
// The smoothed image with keypoints painted in leaves as AXI4-Stream video.
// When the centre is a keypoint, the keypoint engine copies the window and
// computes the orientation (intensity centroid) and the 256-bit steered BRIEF
// descriptor, which leave as records on the kp_* port.
//
// Control follows the HLS block-level handshake (ap_ctrl_hs): ap_start starts a
// frame when the core is idle; rows, cols and threshold are sampled then and
// must stay stable (ap_stable); ap_ready pulses when the last input pixel has
// been taken; ap_done pulses when the last output pixel and the last keypoint
// record have left; ap_idle is high between frames.
//
// Every stage moves only when the whole pipeline advances (`adv`). The pipeline
// advances when the input has a pixel (or the frame has been read and padding
// is fed), the output register can take the pixel leaving the window centre,
// and the centre is not a keypoint arriving while the engine is still busy.
// This last case is the stall that lets a one-keypoint-at-a-time engine keep up
// with a dense cluster of corners. Each pixel carries its (row, col) tag, so
// the centre's position is known without counting latency by hand. The window
// centre trails the input by 17 rows and 17 columns plus three register
// stages, so after the last input pixel the pipeline runs on zero padding until
// the last centre has left (the flush).
//
// Keypoints are only taken at least 15 pixels from every edge, where the full
// 31x31 patch lies inside the image. The pipeline is one pixel per clock, as in
// the latency numbers of the accelerator this core models; the stalling engine,
// the padding flush and the edge rule are this design's choices.
module orb_core
  import orb_pkg::*;
#(
  parameter int          MAX_COLS       = 1920,
  parameter int          MAX_ROWS       = 1080,
  parameter int          BITS_PER_CYCLE = 8,
  parameter logic [23:0] PAINT_COLOR    = 24'hFF0000
) (
  input  logic             ap_clk,
  input  logic             ap_rst_n,
  input  logic             ap_start,
  output logic             ap_done,
  output logic             ap_idle,
  output logic             ap_ready,
  input  logic [DIM_W-1:0] rows,
  input  logic [DIM_W-1:0] cols,
  input  logic [7:0]       threshold,
  // INPUT_STREAM
  input  logic [23:0]      input_stream_tdata,
  input  logic [2:0]       input_stream_tkeep,
  input  logic [2:0]       input_stream_tstrb,
  input  logic             input_stream_tuser,
  input  logic             input_stream_tlast,
  input  logic             input_stream_tid,
  input  logic             input_stream_tdest,
  input  logic             input_stream_tvalid,
  output logic             input_stream_tready,
  // OUTPUT_STREAM
  output logic [23:0]      output_stream_tdata,
  output logic [2:0]       output_stream_tkeep,
  output logic [2:0]       output_stream_tstrb,
  output logic             output_stream_tuser,
  output logic             output_stream_tlast,
  output logic             output_stream_tid,
  output logic             output_stream_tdest,
  output logic             output_stream_tvalid,
  input  logic             output_stream_tready,
  // keypoint records
  output logic             kp_valid,
  input  logic             kp_ready,
  output kp_rec_t          kp
);
  localparam logic signed [CRD_W-1:0] EDGE = CRD_W'(HALF);  // keypoint margin
  localparam int PIPE_DEPTH = 3;   // advances before the window centre tag is current

  typedef enum logic [1:0] {C_IDLE, C_RUN, C_DRAIN} cstate_t;
  cstate_t state;

  logic [DIM_W-1:0] rows_q, cols_q;
  logic [7:0]       thr_q;
  logic [DIM_W:0]   src_r;          // one bit more: padding rows run past rows_q
  logic [DIM_W-1:0] src_c;
  logic [1:0]       fill;
  logic             src_real, primed;

  logic [23:0] pix_data;
  logic        pix_valid, pix_ready, arm, last_in, drop_pulse;
  pix_t        gray_c, g1;
  tag_t        t1, g_tag, ctr;
  pix_t        g_pix;
  patch_t      win;
  pix_t [6:0][6:0] win7;
  logic [15:0] bright, dark;
  logic        corner, emit, inner, kp_here, kp_block, go, adv;
  logic        vout_ready, eng_busy, last_out;

  // ---------------------------------------------------------------- input
  axis_video_in u_vin (
    .clk(ap_clk), .rst_n(ap_rst_n), .arm, .last(last_in),
    .s_axis_tdata(input_stream_tdata), .s_axis_tkeep(input_stream_tkeep),
    .s_axis_tstrb(input_stream_tstrb), .s_axis_tuser(input_stream_tuser),
    .s_axis_tlast(input_stream_tlast), .s_axis_tid(input_stream_tid),
    .s_axis_tdest(input_stream_tdest), .s_axis_tvalid(input_stream_tvalid),
    .s_axis_tready(input_stream_tready),
    .pix_data, .pix_valid, .pix_ready, .drop_pulse
  );

  rgb2gray u_gray (.rgb(pix_data), .gray(gray_c));

  // ---------------------------------------------------------------- pipeline
  gauss_filter #(.MAX_COLS(MAX_COLS)) u_gauss (
    .clk(ap_clk), .adv, .rows(rows_q), .cols(cols_q),
    .in_pix(g1), .in_tag(t1), .out_pix(g_pix), .out_tag(g_tag)
  );

  patch_window #(.MAX_COLS(MAX_COLS)) u_win (
    .clk(ap_clk), .adv, .cols(cols_q), .in_pix(g_pix), .in_tag(g_tag),
    .win, .ctr_tag(ctr)
  );

  always_comb
    for (int i = 0; i < 7; i++)
      for (int j = 0; j < 7; j++)
        win7[i][j] = win[HALF - 3 + i][HALF - 3 + j];

  fast_detect #(.N_SEG(12)) u_fast (
    .win7, .threshold(thr_q), .bright, .dark, .is_corner(corner)
  );

  // ---------------------------------------------------------------- control
  assign src_real = (src_r < {1'b0, rows_q});
  assign primed   = (fill == 2'(PIPE_DEPTH));
  assign emit     = primed && ctr.r >= 0 && ctr.r < $signed({1'b0, rows_q});
  assign inner    = ctr.r >= EDGE && ctr.r < $signed({1'b0, rows_q}) - EDGE
                 && ctr.c >= EDGE && ctr.c < $signed({1'b0, cols_q}) - EDGE;
  assign kp_here  = emit && inner && corner;
  assign kp_block = kp_here && eng_busy;
  assign go       = (state == C_RUN) && (!emit || vout_ready) && !kp_block;
  assign adv      = go && (src_real ? pix_valid : 1'b1);
  assign pix_ready = go && src_real;
  assign last_in  = adv && src_real && src_r == {1'b0, rows_q} - 1'b1 && src_c == cols_q - 1'b1;
  assign last_out = adv && emit && ctr.r == $signed({1'b0, rows_q}) - 1
                             && ctr.c == $signed({1'b0, cols_q}) - 1;
  assign arm      = (state == C_IDLE) && ap_start;
  assign ap_idle  = (state == C_IDLE);
  assign ap_ready = last_in;

  always_ff @(posedge ap_clk) begin
    if (adv) begin
      g1 <= src_real ? gray_c : '0;
      t1 <= '{r: CRD_W'(src_r), c: CRD_W'(src_c)};
    end
  end

  always_ff @(posedge ap_clk or negedge ap_rst_n) begin
    if (!ap_rst_n) begin
      state   <= C_IDLE;
      rows_q  <= DIM_W'(MAX_ROWS);
      cols_q  <= DIM_W'(MAX_COLS);
      thr_q   <= 8'd10;
      src_r   <= '0;
      src_c   <= '0;
      fill    <= '0;
      ap_done <= 1'b0;
    end else begin
      ap_done <= 1'b0;
      case (state)
        C_IDLE: if (ap_start) begin
          state  <= C_RUN;
          rows_q <= rows;
          cols_q <= cols;
          thr_q  <= threshold;
          src_r  <= '0;
          src_c  <= '0;
          fill   <= '0;
        end
        C_RUN: begin
          if (adv) begin
            if (!primed) fill <= fill + 1'b1;
            if (src_c == cols_q - 1'b1) begin
              src_c <= '0;
              src_r <= src_r + 1'b1;
            end else begin
              src_c <= src_c + 1'b1;
            end
          end
          if (last_out) state <= C_DRAIN;
        end
        C_DRAIN: if (!eng_busy && !output_stream_tvalid) begin
          state   <= C_IDLE;
          ap_done <= 1'b1;
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------- outputs
  axis_video_out #(.PAINT_COLOR(PAINT_COLOR)) u_vout (
    .clk(ap_clk), .rst_n(ap_rst_n), .cols(cols_q), .load(adv && emit),
    .pix(win[HALF][HALF]), .is_kp(kp_here), .x(DIM_W'(ctr.c)), .y(DIM_W'(ctr.r)),
    .in_ready(vout_ready),
    .m_axis_tdata(output_stream_tdata), .m_axis_tkeep(output_stream_tkeep),
    .m_axis_tstrb(output_stream_tstrb), .m_axis_tuser(output_stream_tuser),
    .m_axis_tlast(output_stream_tlast), .m_axis_tid(output_stream_tid),
    .m_axis_tdest(output_stream_tdest), .m_axis_tvalid(output_stream_tvalid),
    .m_axis_tready(output_stream_tready)
  );

  kp_engine #(.BITS_PER_CYCLE(BITS_PER_CYCLE)) u_eng (
    .clk(ap_clk), .rst_n(ap_rst_n), .capture(adv && kp_here), .win,
    .x(DIM_W'(ctr.c)), .y(DIM_W'(ctr.r)), .busy(eng_busy),
    .kp_valid, .kp_ready, .kp
  );

  // rows and cols must fit the line buffers and hold a full patch
  assert property (@(posedge ap_clk) disable iff (!ap_rst_n)
                   (state == C_IDLE && ap_start) |->
                   (cols <= DIM_W'(MAX_COLS) && rows <= DIM_W'(MAX_ROWS) && cols >= 12'd32 && rows >= 12'd32));
endmodule
