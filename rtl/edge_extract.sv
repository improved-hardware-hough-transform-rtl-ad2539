// edge_extract: Prewitt edge extraction (EE) producing the binary image.
//
// The grey pixel stream (one pixel per clock, posX/posY coordinates with 0
// marking sync) is held in two line buffers of 640 bytes, giving a 3 x 3
// window of the two previous lines and the current one. The Prewitt
// gradients are
//   Gx = (right column sum) - (left column sum),
//   Gy = (bottom row sum)   - (top row sum),
// and a pixel is an edge when |Gx| + |Gy| >= EDGE_THRESHOLD.
//
// Timing: the output stream is the input stream delayed by two clocks. The
// window that ends at input pixel (x, y) is centred on (x-1, y-1); its
// result is reported at coordinates (x, y), so the binary image is shifted
// by one pixel right and down. Pixels whose window leaves the image
// (x < 3 or y < 3) and all sync positions give edge_bin = 0. The Prewitt
// operator is the one named for this block; the threshold, the |Gx|+|Gy|
// magnitude, the one-pixel shift and the border handling are this design's
// choices.
module edge_extract
  import hough_pkg::*;
#(
  parameter int EDGE_THRESHOLD = 120
) (
  input  logic       clk,
  input  logic       rst_n,
  input  posx_t      posX,
  input  posy_t      posY,
  input  logic [7:0] gray,
  output posx_t      posX_o,
  output posy_t      posY_o,
  output logic       edge_bin
);

  logic [7:0] lb1 [IMG_W];   // line y-1
  logic [7:0] lb2 [IMG_W];   // line y-2
  logic [7:0] win [3][3];    // [row: top, mid, bottom][column: x-2, x-1, x]

  logic active;
  logic [9:0] col;
  assign active = (posX != '0) && (posY != '0);
  assign col    = 10'(posX - 1'b1);

  posx_t s1_posX;
  posy_t s1_posY;
  logic  s1_valid;

  // gradient of the window held in cycle 1
  logic signed [11:0] gx, gy;
  logic [10:0] mag;
  always_comb begin
    gx = 12'(win[0][2]) + 12'(win[1][2]) + 12'(win[2][2])
       - 12'(win[0][0]) - 12'(win[1][0]) - 12'(win[2][0]);
    gy = 12'(win[2][0]) + 12'(win[2][1]) + 12'(win[2][2])
       - 12'(win[0][0]) - 12'(win[0][1]) - 12'(win[0][2]);
    mag = 11'(gx < 0 ? -gx : gx) + 11'(gy < 0 ? -gy : gy);
  end

  always_ff @(posedge clk) begin
    if (active) begin
      lb2[col] <= lb1[col];
      lb1[col] <= gray;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) win[r][c] <= '0;
      s1_posX  <= '0;
      s1_posY  <= '0;
      s1_valid <= 1'b0;
      posX_o   <= '0;
      posY_o   <= '0;
      edge_bin <= 1'b0;
    end else begin
      if (active) begin
        for (int r = 0; r < 3; r++) begin
          win[r][0] <= win[r][1];
          win[r][1] <= win[r][2];
        end
        win[0][2] <= lb2[col];
        win[1][2] <= lb1[col];
        win[2][2] <= gray;
      end
      s1_posX  <= posX;
      s1_posY  <= posY;
      s1_valid <= active && (posX >= posx_t'(3)) && (posY >= posy_t'(3));
      posX_o   <= s1_posX;
      posY_o   <= s1_posY;
      edge_bin <= s1_valid && (mag >= 11'(EDGE_THRESHOLD));
    end
  end

endmodule
