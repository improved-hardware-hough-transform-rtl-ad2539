// tb_hough_ips: end-to-end test of the line detector at its default size
// (90 angles, 640 x 480, 2 degree resolution).
//
// A sensor model streams three frames with VGA-like timing (784 clocks per
// line, 510 lines: 3 lines vsync, 17 blank, 480 active, 10 blank) showing a
// bright polygon on a dark, slightly noisy background; the second frame
// shows a different polygon. The testbench builds its own reference from the
// pixels it sends: grey level, Prewitt edges (reported one pixel right and
// down), the full Hough table of every angle, the strongest cell per angle
// and the overlay. It checks:
//  * after each read-out, line_on / line_rho / line_votes of all 90 angles;
//  * during the following frame, every overlay pixel (line colour or the
//    camera colour) and that the overlay runs exactly 3 clocks behind the
//    camera stream, one pixel per clock;
//  * that forwarding of same-address votes, read-out, detected and
//    rejected angles and painted pixels all occurred.
module tb_hough_ips;
  import hough_pkg::*;

  localparam int N = 90;
  localparam int MINV = 120;
  localparam rgb565_t COLOR = 16'h07E0;
  localparam int H_TOTAL = 784;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic cam_vsync = 1'b0;
  logic cam_href = 1'b0;
  rgb565_t cam_rgb = '0;
  posx_t cam_posX, ee_posX, mx_posX;
  posy_t cam_posY, ee_posY, mx_posY;
  rgb565_t cam_pix, mx_rgb;
  logic ee_edge;
  logic line_on [N];
  rho_t line_rho [N];
  cnt_t line_votes [N];

  hough_ips dut (.*);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int sq[N], cq[N];
  rgb565_t pix[481][641];
  int gry[481][641];
  int ref_cnt[N][1024];
  bit exp_on[N];
  int exp_rho[N], exp_votes[N];
  bit draw_on[N];
  int draw_rho[N];
  bit checking_mx = 1'b0;
  int n_fwd = 0, n_readout = 0, n_on = 0, n_off = 0, n_paint = 0, n_edges = 0;
  longint cyc = 0;
  int hx[4], hy[4];

  initial begin
    repeat (1500000) @(posedge clk);
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

  // forwarding events over all voting blocks
  for (genvar k = 0; k < N; k++) begin : g_mon
    always @(negedge clk)
      if (dut.u_ht.g_sah[k].u_sah.fwd_hit && dut.u_ht.g_sah[k].u_sah.s2_vote) n_fwd++;
  end

  // overlay checker: mx stream is the camera stream 3 clocks later
  always @(negedge clk) begin
    cyc++;
    if (checking_mx) begin
      check(int'(mx_posX) == hx[2] && int'(mx_posY) == hy[2], "overlay delay");
      if (mx_posX != '0 && mx_posY != '0) begin
        automatic bit paint = 1'b0;
        for (int k = 0; k < N; k++)
          if (draw_on[k] &&
              (((sq[k] * (int'(mx_posY) - 240) + cq[k] * (int'(mx_posX) - 320)) >>> 7) & 1023)
                == draw_rho[k])
            paint = 1'b1;
        if (paint) n_paint++;
        check(mx_rgb == (paint ? COLOR : pix[mx_posY][mx_posX]),
              $sformatf("overlay pixel (%0d,%0d)", mx_posX, mx_posY));
      end
    end
    hx[3] = hx[2]; hx[2] = hx[1]; hx[1] = hx[0]; hx[0] = int'(cam_posX);
    hy[3] = hy[2]; hy[2] = hy[1]; hy[1] = hy[0]; hy[0] = int'(cam_posY);
  end

  function automatic bit in_shape(int shape, int x, int y);
    if (shape == 0) return (y > 100 + x / 4) && (x + y < 800) && (x > 150) && (y < 420);
    return (x > 2 * y - 300) && (y > 60) && (x < 560) && (3 * x + 2 * y > 900);
  endfunction

  function automatic int luma(rgb565_t p);
    int r8, g8, b8;
    r8 = (int'(p.r) << 3) | (int'(p.r) >> 2);
    g8 = (int'(p.g) << 2) | (int'(p.g) >> 4);
    b8 = (int'(p.b) << 3) | (int'(p.b) >> 2);
    return (77 * r8 + 150 * g8 + 29 * b8) / 256;
  endfunction

  task automatic send_line(bit vs, bit active, int y, int shape);
    for (int i = 0; i < H_TOTAL; i++) begin
      @(negedge clk);
      cam_vsync = vs;
      cam_href = active && i < 640;
      if (cam_href) begin
        cam_rgb = in_shape(shape, i + 1, y) ? rgb565_t'(16'hE71C | 16'($urandom_range(0, 3)))
                                          : rgb565_t'(16'h2104 | 16'($urandom_range(0, 3)));
        pix[y][i + 1] = cam_rgb;
        gry[y][i + 1] = luma(cam_rgb);
      end else begin
        cam_rgb = rgb565_t'($urandom);
      end
    end
  endtask

  // reference edges and votes of the frame just sent
  task automatic reference();
    int gx, gy;
    foreach (ref_cnt[k, r]) ref_cnt[k][r] = 0;
    for (int y = 3; y <= 480; y++)
      for (int x = 3; x <= 640; x++) begin
        gx = 0;
        gy = 0;
        for (int d = -1; d <= 1; d++) begin
          gx += gry[y - 1 + d][x] - gry[y - 1 + d][x - 2];
          gy += gry[y][x - 1 + d] - gry[y - 2][x - 1 + d];
        end
        if ((gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy) >= 120) begin
          n_edges++;
          for (int k = 0; k < N; k++)
            ref_cnt[k][((sq[k] * (y - 240) + cq[k] * (x - 320)) >>> 7) & 1023]++;
        end
      end
    for (int k = 0; k < N; k++) begin
      exp_votes[k] = ref_cnt[k][0];
      exp_rho[k] = 0;
      for (int r = 1; r < 1024; r++)
        if (ref_cnt[k][r] > exp_votes[k]) begin
          exp_votes[k] = ref_cnt[k][r];
          exp_rho[k] = r;
        end
      exp_on[k] = exp_votes[k] >= MINV;
    end
  endtask

  task automatic frame(int shape, bit check_lines);
    for (int l = 0; l < 3; l++) send_line(1'b1, 1'b0, 0, shape);
    for (int l = 0; l < 17; l++) begin
      send_line(1'b0, 1'b0, 0, shape);
      if (l == 5) checking_mx = 1'b0;
    end
    // read-out is over: compare the detected lines
    if (check_lines) begin
      n_readout++;
      for (int k = 0; k < N; k++) begin
        check(line_on[k] == exp_on[k], $sformatf("angle %0d on %0d exp %0d", k, line_on[k], exp_on[k]));
        if (exp_on[k]) begin
          n_on++;
          check(int'(line_rho[k]) == exp_rho[k] && int'(line_votes[k]) == exp_votes[k],
                $sformatf("angle %0d rho %0d/%0d votes %0d/%0d", k, line_rho[k], exp_rho[k],
                          line_votes[k], exp_votes[k]));
        end else n_off++;
      end
    end
    for (int k = 0; k < N; k++) begin
      draw_on[k] = line_on[k];
      draw_rho[k] = int'(line_rho[k]);
    end
    checking_mx = check_lines;
    for (int y = 1; y <= 480; y++) send_line(1'b0, 1'b1, y, shape);
    for (int l = 0; l < 10; l++) send_line(1'b0, 1'b0, 480, shape);
  endtask

  initial begin
    longint c0;
    for (int k = 0; k < N; k++) begin
      sq[k] = int'($floor($sin(3.14159265358979 * real'(k) / real'(N)) * 128.0 + 1.0e-6));
      cq[k] = int'($floor($cos(3.14159265358979 * real'(k) / real'(N)) * 128.0 + 1.0e-6));
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    c0 = cyc;
    frame(0, 1'b0);                 // first blanking clears; votes shape 0
    check(cyc - c0 == 510 * H_TOTAL, "one pixel per clock");
    reference();
    frame(1, 1'b1);                 // lines of shape 0; votes shape 1
    reference();
    frame(1, 1'b1);                 // lines of shape 1
    check(n_fwd > 0, "same-address forwarding happened");
    check(n_readout == 2, "read-outs checked");
    check(n_on > 0, "lines detected");
    check(n_off > 0, "angles without a line");
    check(n_paint > 0, "lines painted");
    $display("forwarded votes %0d, read-outs %0d, lines %0d, no-line angles %0d, painted %0d, edges %0d",
             n_fwd, n_readout, n_on, n_off, n_paint, n_edges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
