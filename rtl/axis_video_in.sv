// axis_video_in: AXI4-Stream video to pixel stream.
//
// A video frame arrives as ROWS * COLS beats, the first marked by tuser (start
// of frame) and the last of each line by tlast. After `arm` the block waits for
// a start of frame: beats before it are accepted and dropped, so a frame is
// always taken from its first pixel. From the start-of-frame beat on, beats are
// passed to the pixel side with the same valid/ready handshake, until `last`
// (the consumer's signal that it has taken the frame's last pixel) returns the
// block to idle, where tready is low. The consumer counts pixels itself; tlast,
// tkeep, tstrb, tid and tdest are accepted but not used. Dropping beats before
// the start of frame mirrors the usual video-stream-to-matrix conversion; the
// arm/last control is this design's choice.
//
// Timing: combinational pass-through, no added latency. drop_pulse flags a
// dropped beat (for monitoring).
module axis_video_in (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        arm,
  input  logic        last,
  input  logic [23:0] s_axis_tdata,
  input  logic [2:0]  s_axis_tkeep,
  input  logic [2:0]  s_axis_tstrb,
  input  logic        s_axis_tuser,
  input  logic        s_axis_tlast,
  input  logic        s_axis_tid,
  input  logic        s_axis_tdest,
  input  logic        s_axis_tvalid,
  output logic        s_axis_tready,
  output logic [23:0] pix_data,
  output logic        pix_valid,
  input  logic        pix_ready,
  output logic        drop_pulse
);
  typedef enum logic [1:0] {V_IDLE, V_WAIT_SOF, V_STREAM} vstate_t;
  vstate_t state;

  logic unused;
  assign unused = ^{s_axis_tkeep, s_axis_tstrb, s_axis_tlast, s_axis_tid, s_axis_tdest};

  assign pix_data = s_axis_tdata;

  always_comb begin
    pix_valid     = 1'b0;
    s_axis_tready = 1'b0;
    drop_pulse    = 1'b0;
    case (state)
      V_WAIT_SOF: begin
        pix_valid     = s_axis_tvalid & s_axis_tuser;
        s_axis_tready = s_axis_tuser ? pix_ready : 1'b1;
        drop_pulse    = s_axis_tvalid & ~s_axis_tuser;
      end
      V_STREAM: begin
        pix_valid     = s_axis_tvalid;
        s_axis_tready = pix_ready;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= V_IDLE;
    else if (last) state <= V_IDLE;
    else begin
      case (state)
        V_IDLE:     if (arm) state <= V_WAIT_SOF;
        V_WAIT_SOF: if (s_axis_tvalid && s_axis_tuser && pix_ready) state <= V_STREAM;
        default: ;
      endcase
    end
  end
endmodule
