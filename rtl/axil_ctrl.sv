// axil_ctrl: AXI4-Lite control slave of the ORB core.
//
// The processor starts the core and sets the frame size and FAST threshold
// through this register block, which follows the layout HLS tools generate for
// a block-level handshake with scalar arguments:
//   0x00 control  bit 0 ap_start (write 1 to start, clears when the core takes
//                 the frame unless auto-restart), bit 1 ap_done (sticky, cleared
//                 by reading), bit 2 ap_idle, bit 3 ap_ready, bit 7 auto_restart
//   0x04 global interrupt enable (bit 0)
//   0x08 interrupt enable: bit 0 ap_done, bit 1 ap_ready
//   0x0C interrupt status: same bits, set by the event, write 1 to toggle
//   0x10 rows  (12 bits)    0x18 cols (12 bits)    0x20 threshold (8 bits)
// interrupt = global enable AND any status bit. Keeping rows, cols and the
// threshold on the control bus follows the accelerator this core models; the
// exact addresses and reset values (1080, 1920, 10) are this design's choice.
//
// Timing: a write is taken in the cycle both AW and W are valid and answered
// with BRESP OKAY the next cycle; a read returns one cycle after AR. Byte
// strobes are ignored (whole-word writes).
module axil_ctrl
  import orb_pkg::*;
#(
  parameter int               ADDR_W       = 6,
  parameter logic [DIM_W-1:0] ROWS_RESET   = 12'd1080,
  parameter logic [DIM_W-1:0] COLS_RESET   = 12'd1920,
  parameter logic [7:0]       THRESH_RESET = 8'd10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] s_axi_awaddr,
  input  logic              s_axi_awvalid,
  output logic              s_axi_awready,
  input  logic [31:0]       s_axi_wdata,
  input  logic [3:0]        s_axi_wstrb,
  input  logic              s_axi_wvalid,
  output logic              s_axi_wready,
  output logic [1:0]        s_axi_bresp,
  output logic              s_axi_bvalid,
  input  logic              s_axi_bready,
  input  logic [ADDR_W-1:0] s_axi_araddr,
  input  logic              s_axi_arvalid,
  output logic              s_axi_arready,
  output logic [31:0]       s_axi_rdata,
  output logic [1:0]        s_axi_rresp,
  output logic              s_axi_rvalid,
  input  logic              s_axi_rready,
  output logic              ap_start,
  input  logic              ap_done,
  input  logic              ap_idle,
  input  logic              ap_ready,
  output logic [DIM_W-1:0]  rows,
  output logic [DIM_W-1:0]  cols,
  output logic [7:0]        threshold,
  output logic              interrupt
);
  localparam logic [ADDR_W-1:0] A_CTRL = 'h00, A_GIE = 'h04, A_IER = 'h08, A_ISR = 'h0C,
                                A_ROWS = 'h10, A_COLS = 'h18, A_THR = 'h20;

  logic       auto_restart, done_sticky, gie;
  logic [1:0] ier, isr;
  logic       wr, rd;
  logic [3:0] unused_strb;

  assign unused_strb   = s_axi_wstrb;
  assign wr            = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid;
  assign s_axi_awready = wr;
  assign s_axi_wready  = wr;
  assign s_axi_bresp   = 2'b00;
  assign rd            = s_axi_arvalid && !s_axi_rvalid;
  assign s_axi_arready = !s_axi_rvalid;
  assign s_axi_rresp   = 2'b00;
  assign interrupt     = gie && (|isr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ap_start     <= 1'b0;
      auto_restart <= 1'b0;
      done_sticky  <= 1'b0;
      gie          <= 1'b0;
      ier          <= '0;
      isr          <= '0;
      rows         <= ROWS_RESET;
      cols         <= COLS_RESET;
      threshold    <= THRESH_RESET;
      s_axi_bvalid <= 1'b0;
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
    end else begin
      // handshake bookkeeping from the core
      if (ap_ready && !auto_restart) ap_start <= 1'b0;
      if (ap_done) done_sticky <= 1'b1;
      if (ap_done && ier[0])  isr[0] <= 1'b1;
      if (ap_ready && ier[1]) isr[1] <= 1'b1;

      // write channel
      if (s_axi_bvalid && s_axi_bready) s_axi_bvalid <= 1'b0;
      if (wr) begin
        s_axi_bvalid <= 1'b1;
        case (s_axi_awaddr)
          A_CTRL: begin
            if (s_axi_wdata[0]) ap_start <= 1'b1;
            auto_restart <= s_axi_wdata[7];
          end
          A_GIE:  gie       <= s_axi_wdata[0];
          A_IER:  ier       <= s_axi_wdata[1:0];
          A_ISR:  isr       <= isr ^ s_axi_wdata[1:0];
          A_ROWS: rows      <= s_axi_wdata[DIM_W-1:0];
          A_COLS: cols      <= s_axi_wdata[DIM_W-1:0];
          A_THR:  threshold <= s_axi_wdata[7:0];
          default: ;
        endcase
      end

      // read channel
      if (s_axi_rvalid && s_axi_rready) s_axi_rvalid <= 1'b0;
      if (rd) begin
        s_axi_rvalid <= 1'b1;
        case (s_axi_araddr)
          A_CTRL: begin
            s_axi_rdata <= {24'd0, auto_restart, 3'd0, ap_ready, ap_idle, done_sticky, ap_start};
            done_sticky <= ap_done;
          end
          A_GIE:  s_axi_rdata <= {31'd0, gie};
          A_IER:  s_axi_rdata <= {30'd0, ier};
          A_ISR:  s_axi_rdata <= {30'd0, isr};
          A_ROWS: s_axi_rdata <= {20'd0, rows};
          A_COLS: s_axi_rdata <= {20'd0, cols};
          A_THR:  s_axi_rdata <= {24'd0, threshold};
          default: s_axi_rdata <= '0;
        endcase
      end
    end
  end

  // AXI: a response must be held until it is accepted
  assert property (@(posedge clk) disable iff (!rst_n) s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid);
  assert property (@(posedge clk) disable iff (!rst_n) s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid);
endmodule
