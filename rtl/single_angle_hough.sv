// single_angle_hough: voting for one angle of the Hough transform.
//
// Each instance owns one row of the Hough space: the vote counters of every
// line whose normal has angle a (sin_q/cos_q = floor(sin a*128),
// floor(cos a*128)). Because rho is signed, the same row also covers a+180
// degrees. Pixels arrive one per clock as (posX, posY, edge_bin); posX = 0
// and posY = 0 are the sync/blanking positions of the video stream.
//
// Two modes, chosen by posY:
//  * voting (posY != 0): for an edge pixel with posX != 0 the block computes
//    rho = floor((sin_q*(posY-240) + cos_q*(posX-320)) / 128) and increments
//    the counter at address rho (two's complement, 10 bits, so negative rho
//    lands in the upper half of the memory);
//  * read-out (posY == 0): an address counter sweeps 0..1023, each word is
//    read, presented on `vote` with `vote_valid` high, and written back as 0,
//    so the memory is empty again for the next frame.
//
// Pipeline (one pixel per clock, no stalls):
//   cycle 0  pixel on the inputs
//   cycle 1  rho register (product of the 9-bit trig constants), RAM read
//   cycle 2  RAM word available, incremented (or zeroed) and written back
//   cycle 3  vote / vote_valid registered outputs (read-out mode)
// In read-out mode the word at address k is on `vote` 3+k cycles after the
// first posY = 0 pixel, so the vertical blanking must last at least 1027
// pixel clocks. Consecutive pixels often hit the same rho: the word written at
// one edge is forwarded to the next read-modify-write of the same address,
// so no vote is lost (the forwarding and the 1-cycle RAM are this design's
// choice; the published pipeline is deeper). Counters saturate at 1023
// instead of wrapping, also this design's choice.
module single_angle_hough
  import hough_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  posx_t posX,
  input  posy_t posY,
  input  logic  edge_bin,
  input  trig_t sin_q,
  input  trig_t cos_q,
  output vote_t vote,
  output logic  vote_valid
);

  localparam int DEPTH = 1 << RHO_W;

  // ---- mode decode (cycle 0)
  logic clr_mode;
  logic vote_en;
  assign clr_mode = (posY == '0);
  assign vote_en  = edge_bin && (posX != '0) && !clr_mode;

  // ---- cycle 1: rho / clear address
  logic [RHO_W:0] clr_cnt;     // MSB set once all DEPTH words are swept
  rho_t s1_addr;
  logic s1_vote, s1_clr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clr_cnt <= '0;
      s1_addr <= '0;
      s1_vote <= 1'b0;
      s1_clr  <= 1'b0;
    end else begin
      s1_vote <= vote_en;
      s1_clr  <= clr_mode && !clr_cnt[RHO_W];
      if (clr_mode) begin
        s1_addr <= clr_cnt[RHO_W-1:0];
        if (!clr_cnt[RHO_W]) clr_cnt <= clr_cnt + 1'b1;
      end else begin
        s1_addr <= rho_of(sin_q, cos_q, posX, posY);
        clr_cnt <= '0;
      end
    end
  end

  // ---- cycle 2: read-modify-write
  rho_t s2_addr;
  logic s2_vote, s2_clr;
  cnt_t q;
  cnt_t cur;
  logic fwd_valid;
  rho_t fwd_addr;
  cnt_t fwd_data;
  logic fwd_hit;   // the word just written is needed again
  logic sat_hit;   // a vote arrived at a full counter
  logic we;
  cnt_t wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_addr <= '0;
      s2_vote <= 1'b0;
      s2_clr  <= 1'b0;
    end else begin
      // a pipeline slot carries either a vote or a read-out word, never both
      assert (!(s1_vote && s1_clr)) else $error("vote during read-out");
      s2_addr <= s1_addr;
      s2_vote <= s1_vote;
      s2_clr  <= s1_clr;
    end
  end

  always_comb begin
    fwd_hit = fwd_valid && (fwd_addr == s2_addr);
    cur     = fwd_hit ? fwd_data : q;
    sat_hit = s2_vote && (cur == '1);
    we      = s2_vote || s2_clr;
    if (s2_clr)       wdata = '0;
    else if (sat_hit) wdata = cur;
    else              wdata = cur + 1'b1;
  end

  vote_ram #(.DEPTH(DEPTH), .WIDTH(CNT_W)) u_ram (
    .clk  (clk),
    .we   (we),
    .waddr(s2_addr),
    .wdata(wdata),
    .raddr(s1_addr),
    .q    (q)
  );

  // ---- forwarding register and cycle 3 outputs
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fwd_valid  <= 1'b0;
      fwd_addr   <= '0;
      fwd_data   <= '0;
      vote       <= '0;
      vote_valid <= 1'b0;
    end else begin
      fwd_valid  <= we;
      fwd_addr   <= s2_addr;
      fwd_data   <= wdata;
      vote_valid <= s2_clr;
      if (s2_clr) vote <= '{sin_q: sin_q, cos_q: cos_q, rho: s2_addr, count: cur};
    end
  end

endmodule
