// axis_video_out: paints keypoints into the image and sends it as AXI4-Stream
// video.
//
// Each loaded pixel is the smoothed grey value of one image position with a
// flag telling whether FAST found a keypoint there. A keypoint pixel is replaced
// by PAINT_COLOR; any other pixel carries its grey value in all three bytes. The
// beat at (0, 0) carries tuser (start of frame) and the last column of each line
// carries tlast; tkeep and tstrb are all ones, tid and tdest zero. Painting the
// keypoint mask and converting back to a video stream follow the ORB flow; the
// colour and the grey-to-RGB expansion are this design's choice.
//
// Timing: a one-entry output register. in_ready is high when the register is
// empty or being read in the same cycle; `load` must only be raised when
// in_ready is high, and the beat appears on the bus the next cycle.
module axis_video_out
  import orb_pkg::*;
#(
  parameter logic [23:0] PAINT_COLOR = 24'hFF0000
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DIM_W-1:0] cols,
  input  logic             load,
  input  pix_t             pix,
  input  logic             is_kp,
  input  logic [DIM_W-1:0] x,
  input  logic [DIM_W-1:0] y,
  output logic             in_ready,
  output logic [23:0]      m_axis_tdata,
  output logic [2:0]       m_axis_tkeep,
  output logic [2:0]       m_axis_tstrb,
  output logic             m_axis_tuser,
  output logic             m_axis_tlast,
  output logic             m_axis_tid,
  output logic             m_axis_tdest,
  output logic             m_axis_tvalid,
  input  logic             m_axis_tready
);
  assign in_ready     = ~m_axis_tvalid | m_axis_tready;
  assign m_axis_tkeep = 3'b111;
  assign m_axis_tstrb = 3'b111;
  assign m_axis_tid   = 1'b0;
  assign m_axis_tdest = 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_axis_tvalid <= 1'b0;
      m_axis_tdata  <= '0;
      m_axis_tuser  <= 1'b0;
      m_axis_tlast  <= 1'b0;
    end else begin
      if (load) begin
        m_axis_tvalid <= 1'b1;
        m_axis_tdata  <= is_kp ? PAINT_COLOR : {pix, pix, pix};
        m_axis_tuser  <= (x == '0) && (y == '0);
        m_axis_tlast  <= (x == cols - 1'b1);
      end else if (m_axis_tready) begin
        m_axis_tvalid <= 1'b0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) load |-> in_ready);
  // AXI4-Stream: a beat that is not taken must stay unchanged
  assert property (@(posedge clk) disable iff (!rst_n)
                   m_axis_tvalid && !m_axis_tready |=> m_axis_tvalid && $stable(m_axis_tdata));
endmodule
