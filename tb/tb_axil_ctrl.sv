// tb_axil_ctrl: drives the AXI4-Lite control slave as a processor would, with
// random response backpressure, and plays the core side (ap_done, ap_idle,
// ap_ready) from the testbench. Checks register reset values, write/read-back
// of rows, cols and threshold, the ap_start set/clear rule with and without
// auto-restart, the sticky clear-on-read ap_done bit, and the interrupt path
// (enable, status set by events, toggle-on-write clear).
module tb_axil_ctrl;
  logic clk = 0, rst_n = 0;
  logic [5:0] awaddr = 0, araddr = 0;
  logic awvalid = 0, awready, wvalid = 0, wready, bvalid, bready = 0, arvalid = 0, arready;
  logic rvalid, rready = 0;
  logic [31:0] wdata = 0, rdata;
  logic [1:0] bresp, rresp;
  logic ap_start, ap_done = 0, ap_idle = 1, ap_ready = 0, interrupt;
  logic [11:0] rows, cols;
  logic [7:0] threshold;
  int checks = 0, failures = 0;
  logic [31:0] rd;

  axil_ctrl dut (
    .clk, .rst_n, .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(4'hF), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .ap_start, .ap_done, .ap_idle, .ap_ready, .rows, .cols, .threshold, .interrupt
  );

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic axi_write(input logic [5:0] a, input logic [31:0] d);
    @(negedge clk);
    awaddr = a; wdata = d; awvalid = 1; wvalid = 1;
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk);
    awvalid = 0; wvalid = 0;
    repeat ($urandom_range(0, 2)) @(negedge clk);
    bready = 1;
    do @(posedge clk); while (!bvalid);
    checks++;
    if (bresp != 2'b00) begin failures++; $display("FAIL bresp"); end
    @(negedge clk) bready = 0;
  endtask

  task automatic axi_read(input logic [5:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1;
    do @(posedge clk); while (!arready);
    @(negedge clk);
    arvalid = 0;
    repeat ($urandom_range(0, 2)) @(negedge clk);
    rready = 1;
    do @(posedge clk); while (!rvalid);
    d = rdata;
    checks++;
    if (rresp != 2'b00) begin failures++; $display("FAIL rresp"); end
    @(negedge clk) rready = 0;
  endtask

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic pulse_ready();
    @(negedge clk) ap_ready = 1;
    @(negedge clk) ap_ready = 0;
  endtask

  task automatic pulse_done();
    @(negedge clk) ap_done = 1;
    @(negedge clk) ap_done = 0;
  endtask

  initial begin
    logic [11:0] v;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // reset values
    axi_read(6'h10, rd); expect_eq("rows reset", rd, 1080);
    axi_read(6'h18, rd); expect_eq("cols reset", rd, 1920);
    axi_read(6'h20, rd); expect_eq("threshold reset", rd, 10);
    axi_read(6'h00, rd); expect_eq("ctrl reset", rd, 32'h4);
    expect_eq("interrupt reset", interrupt, 0);
    // scalar registers
    for (int i = 0; i < 20; i++) begin
      v = 12'($urandom);
      axi_write(6'h10, {20'hFFFFF, v}); axi_read(6'h10, rd); expect_eq("rows", rd, v); expect_eq("rows port", rows, v);
      v = 12'($urandom);
      axi_write(6'h18, 32'(v)); axi_read(6'h18, rd); expect_eq("cols", rd, v); expect_eq("cols port", cols, v);
      v = 12'($urandom_range(0, 255));
      axi_write(6'h20, 32'(v)); axi_read(6'h20, rd); expect_eq("threshold", rd, v); expect_eq("thr port", threshold, v);
    end
    axi_read(6'h3C, rd); expect_eq("unmapped", rd, 0);
    // start, then the core takes the frame
    axi_write(6'h00, 32'h1);
    expect_eq("ap_start set", ap_start, 1);
    axi_read(6'h00, rd); expect_eq("ctrl start", rd[0], 1);
    ap_idle = 0;
    pulse_ready();
    @(negedge clk);
    expect_eq("ap_start cleared", ap_start, 0);
    // done is sticky until read, then clears
    pulse_done();
    ap_idle = 1;
    repeat (3) @(negedge clk);
    axi_read(6'h00, rd); expect_eq("done seen", rd[1], 1); expect_eq("idle seen", rd[2], 1);
    axi_read(6'h00, rd); expect_eq("done cleared by read", rd[1], 0);
    // auto restart keeps ap_start high
    axi_write(6'h00, 32'h81);
    pulse_ready();
    @(negedge clk);
    expect_eq("auto restart keeps start", ap_start, 1);
    axi_read(6'h00, rd); expect_eq("auto restart bit", rd[7], 1);
    axi_write(6'h00, 32'h0);
    pulse_ready();
    @(negedge clk);
    expect_eq("start clears without auto restart", ap_start, 0);
    // interrupts
    axi_write(6'h08, 32'h3); axi_read(6'h08, rd); expect_eq("ier", rd, 3);
    pulse_done();
    @(negedge clk);
    expect_eq("no irq without gie", interrupt, 0);
    axi_write(6'h04, 32'h1); axi_read(6'h04, rd); expect_eq("gie", rd, 1);
    expect_eq("irq on done", interrupt, 1);
    axi_read(6'h0C, rd); expect_eq("isr done", rd, 1);
    axi_write(6'h0C, 32'h1);
    expect_eq("irq cleared", interrupt, 0);
    pulse_ready();
    @(negedge clk);
    expect_eq("irq on ready", interrupt, 1);
    axi_read(6'h0C, rd); expect_eq("isr ready", rd, 2);
    axi_write(6'h0C, 32'h2);
    axi_write(6'h08, 32'h0);
    pulse_done();
    @(negedge clk);
    expect_eq("masked done", interrupt, 0);
    axi_read(6'h0C, rd); expect_eq("isr masked", rd, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
