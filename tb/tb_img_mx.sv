// tb_img_mx: self-checking test of the line overlay.
//
// Random pixels, coordinates (some in sync) and sparse random line bits
// over 8 angles; each output, one clock later, must carry the same
// coordinates and either the input colour or the line colour.
module tb_img_mx;
  import hough_pkg::*;

  localparam int N = 8;
  localparam rgb565_t COLOR = 16'hF800;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  posx_t posX = '0;
  posy_t posY = '0;
  rgb565_t rgb = '0;
  logic [N-1:0] line_px = '0;
  posx_t posX_o;
  posy_t posY_o;
  rgb565_t rgb_o;

  int checks = 0;
  int failures = 0;
  int n_paint = 0;
  int ex, ey;
  rgb565_t ergb;

  always #5 clk = ~clk;

  img_mx #(.N_LINES(N), .LINE_COLOR(COLOR)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      posX = ($urandom_range(0, 9) == 0) ? '0 : posx_t'($urandom_range(1, 640));
      posY = ($urandom_range(0, 9) == 0) ? '0 : posy_t'($urandom_range(1, 480));
      rgb = rgb565_t'($urandom);
      for (int k = 0; k < N; k++) line_px[k] = ($urandom_range(0, 19) == 0);
      ex = int'(posX);
      ey = int'(posY);
      ergb = (line_px != '0 && ex != 0 && ey != 0) ? COLOR : rgb;
      if (ergb == COLOR && rgb != COLOR) n_paint++;
      @(negedge clk);
      checks++;
      if (int'(posX_o) != ex || int'(posY_o) != ey || rgb_o != ergb) begin
        failures++;
        if (failures < 10) $display("FAIL: rgb %h exp %h", rgb_o, ergb);
      end
    end
    checks++;
    if (n_paint == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
