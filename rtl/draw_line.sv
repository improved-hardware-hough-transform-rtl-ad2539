// draw_line: line drawing (DL) for one angle of the Hough transform.
//
// Listens to the vote stream of one single-angle block. While a read-out is
// in progress (vote_valid high) it keeps the cell with the most votes (the
// first one on ties). When the read-out ends it latches that cell's rho and
// the sin/cos constants carried in the vote record; if the count reached
// MIN_VOTES the line is shown, otherwise nothing is drawn for this angle.
//
// Drawing runs on the frame that follows: for every image pixel (posX,
// posY != 0) it evaluates rho = floor((sin*(y-240) + cos*(x-320)) / 128)
// exactly as the voting block does and sets line_px when it equals the
// latched rho, i.e. it marks the pixels that would have voted for the
// detected line. Latency: line_px belongs to the pixel presented two clocks
// earlier. The peak search, the vote threshold and the one-line-per-angle
// rule are this design's choices; only the block's role (draw lines from the
// transform's results) is given.
module draw_line
  import hough_pkg::*;
#(
  parameter int MIN_VOTES = 120
) (
  input  logic  clk,
  input  logic  rst_n,
  input  vote_t vote,
  input  logic  vote_valid,
  input  posx_t posX,
  input  posy_t posY,
  output logic  line_px,
  output logic  line_on,     // a line is being drawn this frame
  output rho_t  line_rho,
  output cnt_t  line_votes
);

  logic  valid_d;
  cnt_t  best_cnt;
  rho_t  best_rho;
  trig_t sin_l, cos_l;
  logic  first;
  rho_t  s1_rho;
  logic  s1_act;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_d    <= 1'b0;
      first      <= 1'b1;
      best_cnt   <= '0;
      best_rho   <= '0;
      sin_l      <= '0;
      cos_l      <= '0;
      line_on    <= 1'b0;
      line_rho   <= '0;
      line_votes <= '0;
      s1_rho     <= '0;
      s1_act     <= 1'b0;
      line_px    <= 1'b0;
    end else begin
      valid_d <= vote_valid;
      // peak search during read-out
      if (vote_valid) begin
        first <= 1'b0;
        if (first || vote.count > best_cnt) begin
          best_cnt <= vote.count;
          best_rho <= vote.rho;
        end
        sin_l <= vote.sin_q;
        cos_l <= vote.cos_q;
      end
      // end of read-out: publish the result for the next frame
      if (valid_d && !vote_valid) begin
        line_on    <= (int'(best_cnt) >= MIN_VOTES);
        line_rho   <= best_rho;
        line_votes <= best_cnt;
        first      <= 1'b1;
      end
      // drawing pipeline
      s1_rho  <= rho_of(sin_l, cos_l, posX, posY);
      s1_act  <= (posX != '0) && (posY != '0);
      line_px <= s1_act && line_on && (s1_rho == line_rho);
    end
  end

endmodule
