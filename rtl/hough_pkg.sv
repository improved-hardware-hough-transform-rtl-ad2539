// hough_pkg: constants and types shared by the Hough-transform line detector.
//
// Image geometry: a 640 x 480 picture is scanned as posX = 1..640,
// posY = 1..480; posX = 0 marks horizontal sync/blanking and posY = 0 marks
// vertical sync/blanking. Coordinates are taken relative to the image centre
// (320, 240) so that rho = sin(a)*y + cos(a)*x stays within about +/-400.
//
// The trigonometric look-up is done at elaboration time: trig_q7() returns
// floor(sin(a)*128) or floor(cos(a)*128) for the k-th of n angles spread
// evenly over 0..180 degrees, which fits the signed 9-bit operands of the
// voting datapath. A tiny bias (1e-9) is added before flooring so that exact
// values such as sin(30 deg)*128 = 64 are not pushed down to 63 by floating-
// point rounding. The vote record (sin, cos, rho address, count) is 38 bits,
// the width of the vote output of one single-angle block.
package hough_pkg;

  localparam int IMG_W = 640;
  localparam int IMG_H = 480;
  localparam int CENTER_X = 320;
  localparam int CENTER_Y = 240;

  localparam int POSX_W = 10;        // posX in 0..640
  localparam int POSY_W = 9;         // posY in 0..480
  localparam int TRIG_W = 9;         // signed sin/cos scaled by 128
  localparam int TRIG_FRAC = 7;      // 128 = 2**7
  localparam int RHO_W = 10;         // integer part of rho, two's complement
  localparam int CNT_W = 10;         // vote counter width
  localparam int PROD_W = 19;        // signed sin*y + cos*x

  typedef logic [POSX_W-1:0] posx_t;
  typedef logic [POSY_W-1:0] posy_t;
  typedef logic signed [TRIG_W-1:0] trig_t;
  typedef logic [RHO_W-1:0] rho_t;
  typedef logic [CNT_W-1:0] cnt_t;

  // One Hough-space cell as reported during read-out.
  typedef struct packed {
    trig_t sin_q;
    trig_t cos_q;
    rho_t  rho;
    cnt_t  count;
  } vote_t;

  // RGB565 colour pixel.
  typedef struct packed {
    logic [4:0] r;
    logic [5:0] g;
    logic [4:0] b;
  } rgb565_t;

  // floor(sin(a)*128) (is_sin = 1) or floor(cos(a)*128) with a = k*180/n deg.
  function automatic int trig_q7(input int k, input int n, input bit is_sin);
    real a;
    real v;
    a = 3.14159265358979323846 * real'(k) / real'(n);
    v = is_sin ? $sin(a) : $cos(a);
    return int'($floor(v * 128.0 + 1.0e-9));
  endfunction

  // Integer part of rho for a pixel, two's complement in RHO_W bits:
  // floor((sin_q*(y-240) + cos_q*(x-320)) / 128).
  function automatic rho_t rho_of(input trig_t sin_q, input trig_t cos_q,
                                  input posx_t x, input posy_t y);
    logic signed [POSX_W:0] cx;
    logic signed [POSX_W:0] cy;
    logic signed [PROD_W:0] p;
    cx = $signed({1'b0, x}) - (POSX_W+1)'(CENTER_X);
    cy = $signed({2'b0, y}) - (POSX_W+1)'(CENTER_Y);
    p = sin_q * cy + cos_q * cx;
    return p[TRIG_FRAC +: RHO_W];
  endfunction

endpackage
