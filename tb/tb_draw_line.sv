// tb_draw_line: self-checking test of the per-angle line drawing.
//
// Feeds read-out streams of 1024 vote words (random counts with a planted
// peak, ties, or no cell above the threshold), then scans a full frame and
// checks the published peak (rho, votes, on/off) and every line pixel two
// clocks after its coordinates, against rho computed here in real
// arithmetic.
module tb_draw_line;
  import hough_pkg::*;

  localparam int MINV = 120;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  vote_t vote = '0;
  logic vote_valid = 1'b0;
  posx_t posX = '0;
  posy_t posY = '0;
  logic line_px;
  logic line_on;
  rho_t line_rho;
  cnt_t line_votes;

  int checks = 0;
  int failures = 0;
  int n_px = 0;
  bit q_px[2];

  always #5 clk = ~clk;

  draw_line #(.MIN_VOTES(MINV)) dut (.*);

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // one read-out: counts random below `noise`, peak at rho pk with pv votes
  // (pk2 gets the same count later in the sweep when tie is set)
  task automatic readout(int s, int c, int noise, int pk, int pv, bit tie, int pk2);
    for (int r = 0; r < 1024; r++) begin
      @(negedge clk);
      vote_valid = 1'b1;
      vote.sin_q = trig_t'(s);
      vote.cos_q = trig_t'(c);
      vote.rho = rho_t'(r);
      vote.count = cnt_t'($urandom_range(0, noise));
      if (r == pk || (tie && r == pk2)) vote.count = cnt_t'(pv);
    end
    @(negedge clk);
    vote_valid = 1'b0;
    vote = '0;
    @(negedge clk);
  endtask

  task automatic frame(int s, int c, bit on, int pk);
    int r;
    for (int y = 1; y <= 480; y++) begin
      for (int x = 0; x <= 640; x++) begin
        @(negedge clk);
        check(line_px == q_px[1], $sformatf("pixel before (%0d,%0d)", x, y));
        if (line_px) n_px++;
        posX = posx_t'(x);
        posY = posy_t'(y);
        r = int'($floor(real'(s * (y - 240) + c * (x - 320)) / 128.0)) & 1023;
        q_px[1] = q_px[0];
        q_px[0] = on && x != 0 && r == pk;
      end
    end
    @(negedge clk);
    posX = '0;
    posY = '0;
    q_px[1] = q_px[0];
    q_px[0] = 1'b0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // 30 degrees, peak 300 votes at rho 45
    readout(64, 110, 100, 45, 300, 1'b0, 0);
    check(line_on && line_rho == 10'd45 && line_votes == 10'd300, "peak 30 deg");
    frame(64, 110, 1'b1, 45);
    // 120 degrees, negative rho -100 (= 924), tie with 500: first wins
    readout(110, -64, 110, 924, 250, 1'b1, 1000);
    check(line_on && line_rho == 10'd924 && line_votes == 10'd250, "peak with tie");
    frame(110, -64, 1'b1, 924);
    // nothing reaches the threshold: no line
    readout(128, 0, MINV - 1, 5, MINV - 1, 1'b0, 0);
    check(!line_on, "below threshold");
    frame(128, 0, 1'b0, 5);
    // exactly the threshold: drawn (horizontal line, rho 10 -> y = 250)
    readout(128, 0, 20, 10, MINV, 1'b0, 0);
    check(line_on && line_rho == 10'd10, "at threshold");
    frame(128, 0, 1'b1, 10);
    check(n_px > 0, "pixels drawn");
    $display("line pixels %0d", n_px);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
