// tb_hough_transform: self-checking test of the voting array at the four
// angle resolutions 1, 2, 5 and 15 degrees (180, 90, 36 and 12 angles),
// all fed the same full 640 x 480 frame in raster order.
//
// The binary image holds a few straight lines plus sparse random noise. The
// testbench keeps its own Hough table for each size, with the trig
// constants computed here from $sin/$cos, and after the frame checks every
// word read out by every angle block: value, address, trig fields, lock-step
// timing (word r of all blocks exactly 3+r cycles after the vertical
// blanking starts) and the frame time of one pixel per clock.
module tb_hough_transform;
  import hough_pkg::*;

  localparam int NS = 4;
  localparam int SIZES [NS] = '{180, 90, 36, 12};
  localparam int NMAX = 180;
  localparam int VBLANK = 1100;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  posx_t posX = '0;
  posy_t posY = 9'd1;
  logic edge_bin = 1'b0;

  int checks = 0;
  int failures = 0;
  int ref_cnt[NS][NMAX][1024];
  int sq[NS][NMAX], cq[NS][NMAX];
  int n_edges = 0;
  int blank_i = 0;        // clock index inside the current blanking
  bit checking = 1'b0;
  int got[NS];

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  for (genvar s = 0; s < NS; s++) begin : g_size
    localparam int N = SIZES[s];
    vote_t votes [N];
    logic vote_valid [N];

    hough_transform #(.N_ANGLES(N)) dut (
      .clk(clk), .rst_n(rst_n), .posX(posX), .posY(posY), .edge_bin(edge_bin),
      .votes(votes), .vote_valid(vote_valid));

    always @(negedge clk) begin
      if (checking) begin
        for (int k = 0; k < N; k++)
          check(vote_valid[k] == vote_valid[0], $sformatf("size %0d lock step", N));
        if (vote_valid[0]) begin
          check(blank_i == 3 + got[s], $sformatf("size %0d word %0d at cycle %0d", N, got[s], blank_i));
          for (int k = 0; k < N; k++) begin
            check(votes[k].rho == rho_t'(got[s]), "rho field");
            check(int'(votes[k].sin_q) == sq[s][k] && int'(votes[k].cos_q) == cq[s][k], "trig");
            check(int'(votes[k].count) == ref_cnt[s][k][got[s]],
                  $sformatf("size %0d angle %0d rho %0d: %0d exp %0d", N, k, got[s],
                            votes[k].count, ref_cnt[s][k][got[s]]));
          end
          got[s]++;
        end
      end
    end
  end

  function automatic bit image(int x, int y);
    if (y == 2 * x - 100) return 1'b1;                 // steep line
    if (x + y == 600) return 1'b1;                     // 45 degree normal
    if (y == 300 && x > 50 && x < 600) return 1'b1;    // horizontal
    if (x == 200) return 1'b1;                         // vertical
    return ($urandom_range(0, 99) == 0);
  endfunction

  // one vertical blanking; the checkers run on the negedges inside it
  task automatic blanking(bit do_check);
    foreach (got[s]) got[s] = 0;
    checking = do_check;
    for (int i = 0; i < VBLANK; i++) begin
      @(negedge clk);
      blank_i = i;
      posX = posx_t'(i % 8);
      posY = '0;
      edge_bin = 1'b0;
    end
    @(negedge clk);
    checking = 1'b0;
    posY = 9'd1;
    posX = '0;
    if (do_check) foreach (got[s]) check(got[s] == 1024, "1024 words per angle");
  endtask

  initial begin
    longint t0, t1;
    real a;
    bit e;
    int r;
    for (int s = 0; s < NS; s++)
      for (int k = 0; k < SIZES[s]; k++) begin
        a = 3.14159265358979 * real'(k) / real'(SIZES[s]);
        sq[s][k] = int'($floor($sin(a) * 128.0 + 1.0e-6));
        cq[s][k] = int'($floor($cos(a) * 128.0 + 1.0e-6));
      end
    // spot values (15 degree grid): 0, 30, 90 degrees
    check(sq[3][0] == 0 && cq[3][0] == 128, "trig 0 deg");
    check(sq[3][2] == 64 && cq[3][2] == 110, "trig 30 deg");
    check(sq[3][6] == 128 && cq[3][6] == 0, "trig 90 deg");
    check(sq[1][60] == 110 && cq[1][60] == -64, "trig 120 deg");

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    blanking(1'b0);                       // clear the memories
    t0 = $time;
    for (int y = 1; y <= 480; y++) begin
      for (int x = 0; x <= 640; x++) begin
        e = (x != 0) && image(x, y);
        @(negedge clk);
        posX = posx_t'(x);
        posY = posy_t'(y);
        edge_bin = e;
        if (e) begin
          n_edges++;
          for (int s = 0; s < NS; s++)
            for (int k = 0; k < SIZES[s]; k++) begin
              r = int'($floor(real'(sq[s][k] * (y - 240) + cq[s][k] * (x - 320)) / 128.0)) & 1023;
              if (ref_cnt[s][k][r] < 1023) ref_cnt[s][k][r]++;
            end
        end
      end
    end
    t1 = $time;
    check((t1 - t0) / 10 == 480 * 641, "one pixel per clock");
    blanking(1'b1);
    // the strongest cell at 90 degrees (15 degree grid) is the horizontal line
    begin
      automatic int best = 0;
      automatic int br = 0;
      for (int q = 0; q < 1024; q++)
        if (ref_cnt[3][6][q] > best) begin best = ref_cnt[3][6][q]; br = q; end
      check(br == 60, $sformatf("horizontal line at rho %0d", br));
    end
    blanking(1'b0);
    $display("edge pixels %0d", n_edges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
