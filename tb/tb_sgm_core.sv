// tb_sgm_core: self-checking test of the SGM matching core.
//
// A small configuration (16x8 image, 5x5 census window, 6 disparities, small
// penalties and a 7-bit bound on the summed cost) is driven with random
// images and with a right image that is the left one shifted by 3 pixels.
// Every disparity is compared with a reference model written directly from
// the SGM equations (census, Hamming cost, 4-path recursion with maximum-cost
// neighbours outside the image, bounded sum, first minimum).  The cycle count
// of a frame is checked against D+4 cycles per pixel plus 2*D+1 per row, and
// the bound on the summed cost must have taken effect at least once.
module tb_sgm_core;
  localparam int W = 16, H = 8, WIN = 5, D = 6, P1 = 3, P2 = 12, SUM_W = 7;
  localparam int R = WIN / 2, LAG = R * W + R, NPIX = W * H;
  localparam int DISP_W = $clog2(D);

  logic clk = 0, rst_n = 1, frame_start = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1, out_clamp;
  logic [7:0] in_left = 0, in_right = 0;
  logic [DISP_W-1:0] out_disp;
  int checks = 0, failures = 0, clamps = 0;

  sgm_core #(.WIDTH(W), .WIN(WIN), .D(D), .SUM_W(SUM_W), .P1(P1), .P2(P2)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pl [NPIX], pr [NPIX];
  int expd [NPIX];
  int expclamp [NPIX];

  function automatic int px(const ref int p [NPIX], input int k);
    return (k < 0 || k >= NPIX) ? 0 : p[k];
  endfunction

  function automatic logic [WIN*WIN-1:0] census(const ref int p [NPIX], input int m);
    logic [WIN*WIN-1:0] v;
    for (int i = 0; i < WIN; i++)
      for (int j = 0; j < WIN; j++)
        v[i*WIN+j] = px(p, m + (i - R) * W + (j - R)) > px(p, m);
    return v;
  endfunction

  task automatic reference();
    int lr [H][W][4][D];
    int c [D];
    logic [WIN*WIN-1:0] cl, cr;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int m = y * W + x;
        int best, bestd, sum;
        cl = census(pl, m);
        for (int d = 0; d < D; d++) begin
          cr = (m - d < 0) ? '0 : census(pr, m - d);
          c[d] = $countones(cl ^ cr);
        end
        for (int r = 0; r < 4; r++) begin
          int py, pxx;
          bit ok;
          case (r)
            0: begin py = y - 1; pxx = x - 1; end
            1: begin py = y - 1; pxx = x;     end
            2: begin py = y - 1; pxx = x + 1; end
            default: begin py = y; pxx = x - 1; end
          endcase
          ok = py >= 0 && pxx >= 0 && pxx < W;
          for (int d = 0; d < D; d++) begin
            if (!ok) lr[y][x][r][d] = c[d];
            else begin
              int mn = 1 << 30, bst;
              for (int i = 0; i < D; i++) if (lr[py][pxx][r][i] < mn) mn = lr[py][pxx][r][i];
              bst = lr[py][pxx][r][d];
              if (d > 0 && lr[py][pxx][r][d-1] + P1 < bst) bst = lr[py][pxx][r][d-1] + P1;
              if (d < D-1 && lr[py][pxx][r][d+1] + P1 < bst) bst = lr[py][pxx][r][d+1] + P1;
              if (mn + P2 < bst) bst = mn + P2;
              lr[y][x][r][d] = c[d] + bst - mn;
            end
          end
        end
        best = 1 << 30; bestd = 0; expclamp[m] = 0;
        for (int d = 0; d < D; d++) begin
          sum = lr[y][x][0][d] + lr[y][x][1][d] + lr[y][x][2][d] + lr[y][x][3][d];
          if (sum > 2**SUM_W - 1) begin sum = 2**SUM_W - 1; expclamp[m] = 1; end
          if (sum < best) begin best = sum; bestd = d; end
        end
        expd[m] = bestd;
      end
  endtask

  int got [NPIX];
  int nout;

  always @(posedge clk) if (out_valid && out_ready) begin
    if (nout < NPIX) begin
      got[nout] = out_disp;
      if (out_clamp) clamps++;
      checks++;
      if (out_disp != DISP_W'(expd[nout]) || out_clamp != expclamp[nout][0]) begin
        failures++;
        if (failures < 10) $display("pixel %0d: disparity %0d expected %0d (clamp %0d/%0d)",
                                    nout, out_disp, expd[nout], out_clamp, expclamp[nout]);
      end
    end
    nout++;
  end

  task automatic run_frame(output int cycles);
    int t0;
    nout = 0;
    @(negedge clk) frame_start = 1;
    @(negedge clk) frame_start = 0;
    t0 = $time / 10;
    for (int k = 0; k < NPIX + LAG; k++) begin
      in_valid = 1;
      in_left  = (k < NPIX) ? 8'(pl[k]) : 8'd0;
      in_right = (k < NPIX) ? 8'(pr[k]) : 8'd0;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
    end
    in_valid = 0;
    while (nout < NPIX) @(posedge clk);
    cycles = $time / 10 - t0;
  endtask

  initial begin
    int cyc, good;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // frame 1: random images
    for (int k = 0; k < NPIX; k++) begin pl[k] = $urandom_range(0, 255); pr[k] = $urandom_range(0, 255); end
    reference();
    run_frame(cyc);
    checks++;
    if (cyc != LAG + NPIX * (D + 4) + H * (2 * D + 1)) begin
      failures++;
      $display("frame cycles %0d expected %0d", cyc, LAG + NPIX * (D + 4) + H * (2 * D + 1));
    end
    // frame 2: right image = left image shifted left by 3 pixels
    for (int k = 0; k < NPIX; k++) pl[k] = $urandom_range(0, 255);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) pr[y*W+x] = (x + 3 < W) ? pl[y*W+x+3] : $urandom_range(0, 255);
    reference();
    run_frame(cyc);
    good = 0;
    for (int y = R; y < H - R; y++)
      for (int x = D; x < W - R; x++) if (got[y*W+x] == 3) good++;
    checks++;
    if (good * 10 < (H - 2*R) * (W - D - R) * 8) begin
      failures++;
      $display("shifted image: only %0d pixels at disparity 3", good);
    end
    // frame 3: out_ready back-pressure
    fork
      forever begin @(negedge clk); out_ready = $urandom_range(0, 1); end
    join_none
    for (int k = 0; k < NPIX; k++) begin pl[k] = $urandom_range(0, 255); pr[k] = $urandom_range(0, 255); end
    reference();
    run_frame(cyc);
    checks++;
    if (clamps == 0) begin failures++; $display("summed-cost bound never took effect"); end
    $display("clamped pixels: %0d", clamps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
