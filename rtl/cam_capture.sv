// cam_capture: image acquisition (CAM) - turns the camera's sync signals
// and pixel stream into the coordinate stream used by the whole pipeline.
//
// Input, one pixel per clock: cam_vsync (frame sync), cam_href (high while
// the pixels of a line are valid) and the RGB565 pixel cam_rgb. Output,
// registered one cycle later: posX/posY and the pixel in colour and grey.
//   posY = 0 from vsync until the first line of the frame (vertical sync /
//            blanking), then 1..480, incremented at the start of each line
//            and held through the line's horizontal blanking;
//   posX = 1..640 while href is high, 0 in horizontal blanking (and for any
//            pixel beyond the 640th of a line or line beyond the 480th).
// The coordinate convention is the one the processing blocks rely on; the
// exact sensor signals (one pixel per clock with href/vsync, RGB565) and the
// grey conversion gray = (77 R + 150 G + 29 B) / 256 on 8-bit expanded
// channels are this design's choices.
module cam_capture
  import hough_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    cam_vsync,
  input  logic    cam_href,
  input  rgb565_t cam_rgb,
  output posx_t   posX,
  output posy_t   posY,
  output rgb565_t rgb,
  output logic [7:0] gray
);

  logic href_d;
  logic line_ok;        // current line number is within the image

  function automatic logic [7:0] luma(input rgb565_t p);
    logic [7:0] r8, g8, b8;
    logic [15:0] s;
    r8 = {p.r, p.r[4:2]};
    g8 = {p.g, p.g[5:4]};
    b8 = {p.b, p.b[4:2]};
    s  = 16'(r8) * 16'd77 + 16'(g8) * 16'd150 + 16'(b8) * 16'd29;
    return s[15:8];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      href_d  <= 1'b0;
      line_ok <= 1'b0;
      posX    <= '0;
      posY    <= '0;
      rgb     <= '0;
      gray    <= '0;
    end else begin
      href_d <= cam_href && !cam_vsync;
      rgb    <= cam_rgb;
      gray   <= luma(cam_rgb);
      if (cam_vsync) begin
        posX    <= '0;
        posY    <= '0;
        line_ok <= 1'b0;
      end else if (cam_href) begin
        if (!href_d) begin
          // first pixel of a new line
          if (posY < posy_t'(IMG_H)) begin
            posY    <= posY + 1'b1;
            line_ok <= 1'b1;
            posX    <= posx_t'(1);
          end else begin
            line_ok <= 1'b0;
            posX    <= '0;
          end
        end else if (posX != '0 && posX != posx_t'(IMG_W) && line_ok) begin
          posX <= posX + 1'b1;
        end else begin
          posX <= '0;
        end
      end else begin
        posX <= '0;
      end
    end
  end

endmodule
