// tb_edge_extract: self-checking test of the Prewitt edge extraction.
//
// Two 640 x 480 frames of a noisy checkerboard are streamed in raster order
// with short blanking. The testbench stores each frame and computes the
// Prewitt magnitude |Gx| + |Gy| of the 3 x 3 window centred on (x-1, y-1)
// itself; every output pixel, two clocks after its input, must carry the
// same coordinates and the expected edge bit (0 on the border and in sync).
module tb_edge_extract;
  import hough_pkg::*;

  localparam int TH = 120;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  posx_t posX = '0;
  posy_t posY = '0;
  logic [7:0] gray = '0;
  posx_t posX_o;
  posy_t posY_o;
  logic edge_bin;

  int checks = 0;
  int failures = 0;
  int img[481][641];
  int n_edge = 0;
  int n_flat = 0;
  // expected outputs, two-deep delay line
  int qx[2], qy[2];
  bit qe[2];

  always #5 clk = ~clk;

  edge_extract #(.EDGE_THRESHOLD(TH)) dut (.*);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit ref_edge(int x, int y);
    int gx, gy;
    if (x < 3 || y < 3) return 1'b0;
    gx = 0;
    gy = 0;
    for (int d = -1; d <= 1; d++) begin
      gx += img[y - 1 + d][x] - img[y - 1 + d][x - 2];
      gy += img[y][x - 1 + d] - img[y - 2][x - 1 + d];
    end
    return ((gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy)) >= TH;
  endfunction

  task automatic drive(int x, int y);
    bit e;
    @(negedge clk);
    // output now belongs to the pixel driven two cycles ago
    checks++;
    if (int'(posX_o) != qx[1] || int'(posY_o) != qy[1] || edge_bin != qe[1]) begin
      failures++;
      if (failures < 10)
        $display("FAIL: out (%0d,%0d,%0d) exp (%0d,%0d,%0d)",
                 posX_o, posY_o, edge_bin, qx[1], qy[1], qe[1]);
    end
    if (qe[1]) n_edge++; else if (qx[1] != 0 && qy[1] != 0) n_flat++;
    posX = posx_t'(x);
    posY = posy_t'(y);
    if (x != 0 && y != 0) begin
      img[y][x] = ((((x / 37) + (y / 23)) % 2) != 0 ? 170 : 60) + int'($urandom_range(0, 30));
      gray = 8'(img[y][x]);
      e = ref_edge(x, y);
    end else begin
      gray = 8'($urandom);
      e = 1'b0;
    end
    qx[1] = qx[0]; qy[1] = qy[0]; qe[1] = qe[0];
    qx[0] = x;     qy[0] = y;     qe[0] = e;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 2; f++) begin
      for (int i = 0; i < 50; i++) drive(i % 641, 0);
      for (int y = 1; y <= 480; y++) begin
        for (int x = 1; x <= 640; x++) drive(x, y);
        for (int i = 0; i < 5; i++) drive(0, y);
      end
    end
    drive(0, 0);
    drive(0, 0);
    checks++;
    if (n_edge == 0 || n_flat == 0) failures++;
    $display("edge pixels %0d, non-edge pixels %0d", n_edge, n_flat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
