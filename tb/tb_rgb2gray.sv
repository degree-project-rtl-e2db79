// tb_rgb2gray: checks the grey conversion against the BT.601 fixed-point
// formula on the eight corner colours and 2000 random pixels.
module tb_rgb2gray;
  import orb_ref_pkg::*;
  logic [23:0] rgb;
  logic [7:0]  gray;
  int checks = 0, failures = 0;

  rgb2gray dut (.rgb, .gray);

  task automatic check(logic [23:0] v);
    int exp;
    rgb = v;
    #1;
    exp = gray_of(int'(v[23:16]), int'(v[15:8]), int'(v[7:0]));
    checks++;
    if (int'(gray) != exp) begin
      failures++;
      $display("FAIL rgb=%06h gray=%0d exp=%0d", v, gray, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) check({{8{i[2]}}, {8{i[1]}}, {8{i[0]}}});
    for (int i = 0; i < 2000; i++) check(24'($urandom));
    // white must stay white
    rgb = 24'hFFFFFF; #1; checks++; if (gray != 8'd255) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
