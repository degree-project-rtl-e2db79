// orb_top: ORB feature-extraction accelerator with its bus interfaces.
//
// This is the accelerator as a system component: a processor configures it
// over an AXI4-Lite control bus (s_axi_control_*), a video DMA streams frames in
// on INPUT_STREAM and takes the annotated frames back from OUTPUT_STREAM, and
// `interrupt` signals the end of a frame. Inside, axil_ctrl holds the control
// and argument registers and orb_core does the work: grey conversion, Gaussian
// smoothing, FAST-12 corners, intensity-centroid orientation and 256-bit
// steered BRIEF descriptors. Each keypoint leaves as a record (column, row,
// orientation bin of 12 degrees, descriptor) on the kp_* valid/ready port; the
// video output carries the smoothed grey image with keypoints painted red.
//
// The port names of the control bus, the two streams, the clock, reset and
// interrupt follow the accelerator's block-diagram ports (aclk/aresetn are
// named ap_clk/ap_rst_n here); the keypoint record port is this design's
// addition, since the descriptors need a way out of the block.
//
// Parameters: MAX_COLS x MAX_ROWS is the largest frame the line buffers hold;
// the frame size actually processed is set in the rows and cols registers.
module orb_top
  import orb_pkg::*;
#(
  parameter int MAX_COLS       = 1920,
  parameter int MAX_ROWS       = 1080,
  parameter int BITS_PER_CYCLE = 8
) (
  input  logic             ap_clk,
  input  logic             ap_rst_n,
  // S_AXI_CONTROL_BUS
  input  logic [5:0]       s_axi_control_awaddr,
  input  logic             s_axi_control_awvalid,
  output logic             s_axi_control_awready,
  input  logic [31:0]      s_axi_control_wdata,
  input  logic [3:0]       s_axi_control_wstrb,
  input  logic             s_axi_control_wvalid,
  output logic             s_axi_control_wready,
  output logic [1:0]       s_axi_control_bresp,
  output logic             s_axi_control_bvalid,
  input  logic             s_axi_control_bready,
  input  logic [5:0]       s_axi_control_araddr,
  input  logic             s_axi_control_arvalid,
  output logic             s_axi_control_arready,
  output logic [31:0]      s_axi_control_rdata,
  output logic [1:0]       s_axi_control_rresp,
  output logic             s_axi_control_rvalid,
  input  logic             s_axi_control_rready,
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
  output kp_rec_t          kp,
  output logic             interrupt
);
  logic             ap_start, ap_done, ap_idle, ap_ready;
  logic [DIM_W-1:0] rows, cols;
  logic [7:0]       threshold;

  axil_ctrl #(
    .ADDR_W(6), .ROWS_RESET(DIM_W'(MAX_ROWS)), .COLS_RESET(DIM_W'(MAX_COLS)), .THRESH_RESET(8'd10)
  ) u_ctrl (
    .clk(ap_clk), .rst_n(ap_rst_n),
    .s_axi_awaddr(s_axi_control_awaddr), .s_axi_awvalid(s_axi_control_awvalid),
    .s_axi_awready(s_axi_control_awready), .s_axi_wdata(s_axi_control_wdata),
    .s_axi_wstrb(s_axi_control_wstrb), .s_axi_wvalid(s_axi_control_wvalid),
    .s_axi_wready(s_axi_control_wready), .s_axi_bresp(s_axi_control_bresp),
    .s_axi_bvalid(s_axi_control_bvalid), .s_axi_bready(s_axi_control_bready),
    .s_axi_araddr(s_axi_control_araddr), .s_axi_arvalid(s_axi_control_arvalid),
    .s_axi_arready(s_axi_control_arready), .s_axi_rdata(s_axi_control_rdata),
    .s_axi_rresp(s_axi_control_rresp), .s_axi_rvalid(s_axi_control_rvalid),
    .s_axi_rready(s_axi_control_rready),
    .ap_start, .ap_done, .ap_idle, .ap_ready, .rows, .cols, .threshold, .interrupt
  );

  orb_core #(
    .MAX_COLS(MAX_COLS), .MAX_ROWS(MAX_ROWS), .BITS_PER_CYCLE(BITS_PER_CYCLE)
  ) u_core (
    .ap_clk, .ap_rst_n, .ap_start, .ap_done, .ap_idle, .ap_ready, .rows, .cols, .threshold,
    .input_stream_tdata, .input_stream_tkeep, .input_stream_tstrb, .input_stream_tuser,
    .input_stream_tlast, .input_stream_tid, .input_stream_tdest, .input_stream_tvalid,
    .input_stream_tready,
    .output_stream_tdata, .output_stream_tkeep, .output_stream_tstrb, .output_stream_tuser,
    .output_stream_tlast, .output_stream_tid, .output_stream_tdest, .output_stream_tvalid,
    .output_stream_tready,
    .kp_valid, .kp_ready, .kp
  );
endmodule
