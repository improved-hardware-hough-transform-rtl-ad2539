// tb_cam_capture: self-checking test of the acquisition block.
//
// A sensor model sends two frames: vsync for 3 lines, 10 blank lines, then
// 482 lines of 640 pixels with 144 blank clocks each (line 7 has 650
// pixels). Every output cycle is compared with the expected coordinate
// (0 in sync/blanking, posX clipped at 640, posY clipped at 480) and with a
// grey value computed here in real arithmetic.
module tb_cam_capture;
  import hough_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic cam_vsync = 1'b0;
  logic cam_href = 1'b0;
  rgb565_t cam_rgb = '0;
  posx_t posX;
  posy_t posY;
  rgb565_t rgb;
  logic [7:0] gray;

  int checks = 0;
  int failures = 0;
  bit have_exp = 1'b0;
  int ex, ey;
  rgb565_t exp_rgb;
  int exp_gray;

  always #5 clk = ~clk;

  cam_capture dut (.*);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_gray(rgb565_t p);
    int r8, g8, b8;
    r8 = (int'(p.r) << 3) | (int'(p.r) >> 2);
    g8 = (int'(p.g) << 2) | (int'(p.g) >> 4);
    b8 = (int'(p.b) << 3) | (int'(p.b) >> 2);
    return int'($floor(real'(77 * r8 + 150 * g8 + 29 * b8) / 256.0));
  endfunction

  task automatic drive(bit vs, bit hr, int x, int y);
    @(negedge clk);
    if (have_exp) begin
      checks++;
      if (int'(posX) != ex || int'(posY) != ey || rgb != exp_rgb || int'(gray) != exp_gray) begin
        failures++;
        if (failures < 10)
          $display("FAIL: pos (%0d,%0d) exp (%0d,%0d) gray %0d exp %0d",
                   posX, posY, ex, ey, gray, exp_gray);
      end
    end
    cam_vsync = vs;
    cam_href = hr;
    cam_rgb = rgb565_t'($urandom);
    have_exp = 1'b1;
    ex = x;
    ey = y;
    exp_rgb = cam_rgb;
    exp_gray = ref_gray(cam_rgb);
  endtask

  initial begin
    int n;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 2; f++) begin
      for (int i = 0; i < 3 * 784; i++) drive(1'b1, 1'b0, 0, 0);
      for (int i = 0; i < 10 * 784; i++) drive(1'b0, 1'b0, 0, 0);
      for (int l = 1; l <= 482; l++) begin
        n = (l == 7) ? 650 : 640;
        for (int i = 1; i <= n; i++)
          drive(1'b0, 1'b1, (l <= 480 && i <= 640) ? i : 0, l <= 480 ? l : 480);
        for (int i = 0; i < 144; i++) drive(1'b0, 1'b0, 0, l <= 480 ? l : 480);
      end
    end
    drive(1'b1, 1'b0, 0, 0);
    drive(1'b1, 1'b0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
