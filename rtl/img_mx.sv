// img_mx: overlay of the detected lines on the colour image (ImgMX).
//
// Each clock takes one colour pixel with its coordinates and the line
// pixels of all N_LINES line-drawing blocks for the same position; when any
// of them is set the pixel is replaced by LINE_COLOR, otherwise the camera
// colour passes unchanged. Sync positions (posX or posY = 0) are never
// painted. Output registered, one clock of latency. Green lines and the
// OR of all angles are this design's choices.
module img_mx
  import hough_pkg::*;
#(
  parameter int      N_LINES    = 90,
  parameter rgb565_t LINE_COLOR = 16'h07E0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  posx_t        posX,
  input  posy_t        posY,
  input  rgb565_t      rgb,
  input  logic [N_LINES-1:0] line_px,
  output posx_t        posX_o,
  output posy_t        posY_o,
  output rgb565_t      rgb_o
);

  logic paint;
  assign paint = (|line_px) && (posX != '0) && (posY != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      posX_o <= '0;
      posY_o <= '0;
      rgb_o  <= '0;
    end else begin
      posX_o <= posX;
      posY_o <= posY;
      rgb_o  <= paint ? LINE_COLOR : rgb;
    end
  end

endmodule
