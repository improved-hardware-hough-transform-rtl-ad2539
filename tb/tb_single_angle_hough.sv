// tb_single_angle_hough: self-checking test of one voting block.
//
// Drives pixels straight into the block (not necessarily in raster order),
// keeps its own vote table computed with real-valued arithmetic, then runs a
// read-out period (posY = 0) and checks every one of the 1024 words: address,
// count, trig fields, that word k appears exactly 3+k cycles after read-out
// starts, and that the memory reads back all zero afterwards. Runs cover
// random pixels, runs of consecutive pixels with the same rho (forwarding)
// and more than 1023 votes into one cell (saturation).
module tb_single_angle_hough;
  import hough_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  posx_t posX = '0;
  posy_t posY = '0;
  logic edge_bin = 1'b0;
  trig_t sin_q, cos_q;
  vote_t vote;
  logic vote_valid;

  int checks = 0;
  int failures = 0;
  int ref_cnt[1024];

  int n_fwd = 0;
  int n_sat = 0;

  always #5 clk = ~clk;

  // how often forwarding and saturation were exercised
  always @(negedge clk) begin
    if (dut.fwd_hit && dut.s2_vote) n_fwd++;
    if (dut.sat_hit) n_sat++;
  end

  single_angle_hough dut (.*);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_rho(int s, int c, int x, int y);
    real r;
    r = $floor(real'(s * (y - 240) + c * (x - 320)) / 128.0);
    return int'(r) & 1023;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic pix(int x, int y, bit e);
    @(negedge clk);
    posX = posx_t'(x);
    posY = posy_t'(y);
    edge_bin = e;
    if (e && x != 0 && y != 0) begin
      int a = ref_rho(int'(sin_q), int'(cos_q), x, y);
      if (ref_cnt[a] < 1023) ref_cnt[a]++;
    end
  endtask

  // Read-out period of n cycles; compares against ref_cnt when do_check.
  task automatic readout(bit do_check, int n);
    int got = 0;
    pix(0, 1, 1'b0);                 // leave the previous blanking period
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      posX = posx_t'(i % 641);
      posY = '0;
      edge_bin = 1'($urandom);
      if (vote_valid && do_check) begin
        check(i == 3 + got, $sformatf("word %0d at cycle %0d", got, i));
        check(vote.rho == rho_t'(got), $sformatf("rho %0d exp %0d", vote.rho, got));
        check(int'(vote.count) == ref_cnt[got],
              $sformatf("count[%0d]=%0d exp %0d", got, vote.count, ref_cnt[got]));
        check(vote.sin_q == sin_q && vote.cos_q == cos_q, "trig fields");
      end
      if (vote_valid) got++;
    end
    if (do_check) check(got == 1024, $sformatf("%0d words read out", got));
    foreach (ref_cnt[k]) ref_cnt[k] = 0;
  endtask

  initial begin
    // alpha = 30 deg: floor(sin*128) = 64, floor(cos*128) = 110
    sin_q = 9'sd64;
    cos_q = 9'sd110;
    posY = 9'd5;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    readout(1'b0, 1100);            // clears whatever the RAM held
    readout(1'b1, 1100);            // now all zero
    // random pixels
    for (int i = 0; i < 3000; i++)
      pix(int'($urandom_range(0, 640)), int'($urandom_range(1, 480)), 1'($urandom));
    // long runs of consecutive edge pixels on two rows (neighbours share rho)
    for (int x = 1; x <= 640; x++) pix(x, 17, 1'b1);
    for (int x = 1; x <= 640; x++) pix(x, 400, (x % 3) != 0);
    pix(0, 400, 1'b0);
    readout(1'b1, 1100);
    readout(1'b1, 1100);            // cleared: all zero

    // alpha = 90 deg: a whole row has one rho; 1300 votes saturate the cell
    sin_q = 9'sd128;
    cos_q = 9'sd0;
    for (int i = 0; i < 1300; i++) pix(1 + i % 640, 100, 1'b1);
    for (int i = 0; i < 500; i++)
      pix(int'($urandom_range(1, 640)), int'($urandom_range(1, 480)), 1'b1);
    pix(0, 1, 1'b0);
    readout(1'b1, 1100);
    check(ref_cnt[0] == 0, "reference cleared");
    check(n_fwd > 0, "forwarding exercised");
    check(n_sat > 0, "saturation exercised");
    $display("forwarded votes %0d, saturated votes %0d", n_fwd, n_sat);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
