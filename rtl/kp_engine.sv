// kp_engine: describes one keypoint at a time.
//
// When the streaming pipeline finds a keypoint it raises `capture` for one
// cycle; the engine copies the 31x31 window and the keypoint position, runs the
// intensity-centroid orientation (ic_angle) and then the steered BRIEF
// descriptor (rbrief) on the copy, and offers the finished record on a
// valid/ready output. While it is busy it cannot take another keypoint; the
// pipeline must hold its window until `busy` falls (it stalls). The chain FAST
// -> orientation -> descriptor -> output follows the ORB flow; the one-at-a-time
// schedule with stalling is this design's choice.
//
// Timing: capture is accepted only when busy is low. A record is ready
// 31 + (1..30) + 256/BITS_PER_CYCLE + about 3 cycles after capture and is held
// until kp_ready. busy stays high until the record has been taken.
module kp_engine
  import orb_pkg::*;
#(
  parameter int BITS_PER_CYCLE = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             capture,
  input  patch_t           win,
  input  logic [DIM_W-1:0] x,
  input  logic [DIM_W-1:0] y,
  output logic             busy,
  output logic             kp_valid,
  input  logic             kp_ready,
  output kp_rec_t          kp
);
  typedef enum logic [1:0] {E_IDLE, E_ANGLE, E_BRIEF, E_OUT} estate_t;
  estate_t state;

  patch_t                  patch_q;
  logic [DIM_W-1:0]        x_q, y_q;
  logic                    ang_start, ang_done, ang_busy;
  logic                    brf_start, brf_done, brf_busy;
  logic signed [MOM_W-1:0] m10, m01;
  logic [BIN_W-1:0]        bin;
  logic [DESC_BITS-1:0]    desc;

  ic_angle u_angle (
    .clk, .rst_n, .start(ang_start), .patch(patch_q), .busy(ang_busy), .done(ang_done),
    .m10, .m01, .bin
  );

  rbrief #(.BITS_PER_CYCLE(BITS_PER_CYCLE)) u_brief (
    .clk, .rst_n, .start(brf_start), .patch(patch_q), .bin, .busy(brf_busy), .done(brf_done),
    .desc
  );

  assign busy     = (state != E_IDLE);
  assign kp_valid = (state == E_OUT);
  assign kp       = '{x: x_q, y: y_q, bin: bin, desc: desc};

  always_ff @(posedge clk) begin
    if (capture && !busy) begin
      patch_q <= win;
      x_q     <= x;
      y_q     <= y;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= E_IDLE;
      ang_start <= 1'b0;
      brf_start <= 1'b0;
    end else begin
      ang_start <= 1'b0;
      brf_start <= 1'b0;
      case (state)
        E_IDLE:  if (capture) begin
          state     <= E_ANGLE;
          ang_start <= 1'b1;
        end
        E_ANGLE: if (ang_done) begin
          state     <= E_BRIEF;
          brf_start <= 1'b1;
        end
        E_BRIEF: if (brf_done) state <= E_OUT;
        E_OUT:   if (kp_ready) state <= E_IDLE;
        default: state <= E_IDLE;
      endcase
    end
  end

  // a new keypoint must never arrive while one is being described
  assert property (@(posedge clk) disable iff (!rst_n) capture |-> !busy);
endmodule
