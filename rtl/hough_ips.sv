// hough_ips: real-time straight-line detector for a 640 x 480 video stream.
//
// Processing path, all on the camera pixel clock, one pixel per clock:
//   cam_capture       sensor sync + pixels -> posX/posY, colour and grey
//   edge_extract      Prewitt edge detection -> binary image (edgeBin)
//   hough_transform   N_ANGLES single-angle voting blocks; each votes for
//                     its angle during the frame and streams out/clears its
//                     Hough row during the vertical blanking
//   draw_line x N     per angle: strongest rho of the read-out, drawn over
//                     the following frame
//   img_mx            paints the drawn lines over the colour image
// No frame is stored: votes build up while the frame streams in, the
// results are read out in the next vertical blanking (which must last at
// least 1027 clocks) and the lines appear on the frame after that.
//
// Outputs are the three streams a video output stage would show: the
// camera image (cam_*), the binary edge image (ee_*, two clocks behind the
// camera stream) and the overlay (mx_*, three clocks behind), plus the
// detected line of each angle (line_on/line_rho/line_votes, updated at the
// end of each read-out). The display side (its own clock, encoding) is not
// part of this design.
module hough_ips
  import hough_pkg::*;
#(
  parameter int      N_ANGLES       = 90,
  parameter int      EDGE_THRESHOLD = 120,
  parameter int      MIN_VOTES      = 120,
  parameter rgb565_t LINE_COLOR     = 16'h07E0
) (
  input  logic    clk,
  input  logic    rst_n,
  // camera side
  input  logic    cam_vsync,
  input  logic    cam_href,
  input  rgb565_t cam_rgb,
  // camera image stream
  output posx_t   cam_posX,
  output posy_t   cam_posY,
  output rgb565_t cam_pix,
  // binary edge image stream
  output posx_t   ee_posX,
  output posy_t   ee_posY,
  output logic    ee_edge,
  // image with detected lines
  output posx_t   mx_posX,
  output posy_t   mx_posY,
  output rgb565_t mx_rgb,
  // detected line per angle
  output logic    line_on    [N_ANGLES],
  output rho_t    line_rho   [N_ANGLES],
  output cnt_t    line_votes [N_ANGLES]
);

  logic [7:0] cam_gray;

  cam_capture u_cam (
    .clk      (clk),
    .rst_n    (rst_n),
    .cam_vsync(cam_vsync),
    .cam_href (cam_href),
    .cam_rgb  (cam_rgb),
    .posX     (cam_posX),
    .posY     (cam_posY),
    .rgb      (cam_pix),
    .gray     (cam_gray)
  );

  edge_extract #(.EDGE_THRESHOLD(EDGE_THRESHOLD)) u_ee (
    .clk     (clk),
    .rst_n   (rst_n),
    .posX    (cam_posX),
    .posY    (cam_posY),
    .gray    (cam_gray),
    .posX_o  (ee_posX),
    .posY_o  (ee_posY),
    .edge_bin(ee_edge)
  );

  vote_t votes      [N_ANGLES];
  logic  vote_valid [N_ANGLES];

  hough_transform #(.N_ANGLES(N_ANGLES)) u_ht (
    .clk       (clk),
    .rst_n     (rst_n),
    .posX      (ee_posX),
    .posY      (ee_posY),
    .edge_bin  (ee_edge),
    .votes     (votes),
    .vote_valid(vote_valid)
  );

  logic [N_ANGLES-1:0] line_px;

  for (genvar k = 0; k < N_ANGLES; k++) begin : g_dl
    draw_line #(.MIN_VOTES(MIN_VOTES)) u_dl (
      .clk       (clk),
      .rst_n     (rst_n),
      .vote      (votes[k]),
      .vote_valid(vote_valid[k]),
      .posX      (cam_posX),
      .posY      (cam_posY),
      .line_px   (line_px[k]),
      .line_on   (line_on[k]),
      .line_rho  (line_rho[k]),
      .line_votes(line_votes[k])
    );
  end

  // delay the colour stream by the two clocks of the drawing pipeline
  posx_t   d_posX [2];
  posy_t   d_posY [2];
  rgb565_t d_rgb  [2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 2; i++) begin
        d_posX[i] <= '0;
        d_posY[i] <= '0;
        d_rgb[i]  <= '0;
      end
    end else begin
      d_posX[0] <= cam_posX;
      d_posY[0] <= cam_posY;
      d_rgb[0]  <= cam_pix;
      d_posX[1] <= d_posX[0];
      d_posY[1] <= d_posY[0];
      d_rgb[1]  <= d_rgb[0];
    end
  end

  img_mx #(.N_LINES(N_ANGLES), .LINE_COLOR(LINE_COLOR)) u_mx (
    .clk    (clk),
    .rst_n  (rst_n),
    .posX   (d_posX[1]),
    .posY   (d_posY[1]),
    .rgb    (d_rgb[1]),
    .line_px(line_px),
    .posX_o (mx_posX),
    .posY_o (mx_posY),
    .rgb_o  (mx_rgb)
  );

endmodule
