// hough_transform: the Hough-space voting array (HT).
//
// N_ANGLES single-angle voting blocks work side by side on the same binary
// pixel stream, one per sampled angle a_k = k*180/N_ANGLES degrees
// (k = 0..N_ANGLES-1); since rho is signed each block also covers a_k+180.
// Block k gets the constants floor(sin(a_k)*128) and floor(cos(a_k)*128),
// fixed at elaboration, so no trigonometry is evaluated in hardware. The
// Hough space is thus split into N_ANGLES independent 1024-word memories and
// every edge pixel casts all its votes in the same clock, without memory
// contention. The default of 90 blocks gives 2 degree angle resolution; 180,
// 36 and 12 give 1, 5 and 15 degrees.
//
// Interface: one pixel per clock on posX/posY/edge_bin (posX = 0 and
// posY = 0 are sync positions). During each vertical blanking (posY = 0)
// every block streams its 1024 vote words on votes[k] with vote_valid[k],
// all blocks in lock step, word r three cycles after read-out starts plus r,
// clearing its memory as it goes. The throughput is one pixel per clock,
// whatever the number of angles.
module hough_transform
  import hough_pkg::*;
#(
  parameter int N_ANGLES = 90
) (
  input  logic  clk,
  input  logic  rst_n,
  input  posx_t posX,
  input  posy_t posY,
  input  logic  edge_bin,
  output vote_t votes      [N_ANGLES],
  output logic  vote_valid [N_ANGLES]
);

  for (genvar k = 0; k < N_ANGLES; k++) begin : g_sah
    localparam trig_t SIN_Q = trig_t'(trig_q7(k, N_ANGLES, 1'b1));
    localparam trig_t COS_Q = trig_t'(trig_q7(k, N_ANGLES, 1'b0));

    single_angle_hough u_sah (
      .clk       (clk),
      .rst_n     (rst_n),
      .posX      (posX),
      .posY      (posY),
      .edge_bin  (edge_bin),
      .sin_q     (SIN_Q),
      .cos_q     (COS_Q),
      .vote      (votes[k]),
      .vote_valid(vote_valid[k])
    );
  end

endmodule
