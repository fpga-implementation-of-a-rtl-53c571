// tb_stereo_system_top: whole stereo pipeline, end to end, at a reduced size.
//
// 32x16 frames, 5x5 census window, 6 disparities, 6-bit bound on the summed
// SGM cost.  The test plays the processor through the seven register files:
//   1. both cameras stream frames; the capture blocks run with auto restart,
//      so a first (junk) frame is overwritten by the scene frame;
//   2. the two remap blocks rectify the captured frames with maps that shift
//      by fractions of a pixel and reach outside the frame;
//   3. the two SGM blocks process the upper and lower half at the same time,
//      each with WIN/2 rows of overlap;
//   4. the VGA block shows the disparity image.
// Every stored byte of the rectified frames and of the disparity image is
// compared with models computed here from the camera data (bilinear
// interpolation; the SGM reference on each section), and every visible VGA
// pixel of one frame with the stored disparity.  Mechanisms that must occur:
// arbiter contention, memory back-pressure, auto restart, remap reads outside
// the frame, discarded overlap rows, the bound on the summed cost, and VGA
// line fetches (with no underflow).
module tb_stereo_system_top;
  import stereo_pkg::*;
  localparam int W = 32, H = 16, WIN = 5, D = 6, SUMW = 6, R = WIN / 2, S = 32;
  localparam int RAW_L = 'h0000, RAW_R = 'h0400, MAP_L = 'h1000, MAP_R = 'h2000;
  localparam int RECT_L = 'h3000, RECT_R = 'h3400, DISP = 'h4000;

  logic clk = 0, rst_n = 1;
  axil_req_t [6:0] s_axil_req;
  axil_rsp_t [6:0] s_axil_rsp;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid;
  mem_req_t mem_req;
  logic [7:0] mem_rsp_rdata;
  logic [1:0] cam_pclk = 0, cam_vsync = 2'b11, cam_href = 0;
  logic [1:0][7:0] cam_data = 0;
  logic vga_hs, vga_vs, vga_underflow;
  logic [3:0] vga_r, vga_g, vga_b;
  logic [1:0] cam_overflow, sgm_clamp;
  logic [1:0][31:0] cam_pixels;
  int checks = 0, failures = 0;

  stereo_system_top #(.WIDTH(W), .HEIGHT(H), .WIN(WIN), .D(D), .SUM_W(SUMW)) dut (.*);
  ddr_model #(.AW(16), .LAT(5), .STALL(1)) ddr (.clk, .req_valid(mem_req_valid),
    .req_ready(mem_req_ready), .req(mem_req), .rsp_valid(mem_rsp_valid), .rsp_rdata(mem_rsp_rdata));

  for (genvar i = 0; i < 7; i++) begin : g_bfm
    axil_bfm u (.clk, .req(s_axil_req[i]), .rsp(s_axil_rsp[i]));
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- register access
  task automatic wr(int p, logic [11:0] a, logic [31:0] d);
    logic [1:0] r;
    case (p)
      0: g_bfm[0].u.write(a, d, r);
      1: g_bfm[1].u.write(a, d, r);
      2: g_bfm[2].u.write(a, d, r);
      3: g_bfm[3].u.write(a, d, r);
      4: g_bfm[4].u.write(a, d, r);
      5: g_bfm[5].u.write(a, d, r);
      default: g_bfm[6].u.write(a, d, r);
    endcase
  endtask

  task automatic rd(int p, logic [11:0] a, output logic [31:0] d);
    logic [1:0] r;
    case (p)
      0: g_bfm[0].u.read(a, d, r);
      1: g_bfm[1].u.read(a, d, r);
      2: g_bfm[2].u.read(a, d, r);
      3: g_bfm[3].u.read(a, d, r);
      4: g_bfm[4].u.read(a, d, r);
      5: g_bfm[5].u.read(a, d, r);
      default: g_bfm[6].u.read(a, d, r);
    endcase
  endtask

  task automatic wait_done(int p);
    logic [31:0] d;
    do begin
      repeat (50) @(posedge clk);
      rd(p, REG_CTRL, d);
    end while (!d[1]);
  endtask

  // ---------------------------------------------------------------- mechanism counters
  int contention = 0, backpressure = 0, cap_dones [2], remap_outside = 0, overlap_dropped = 0;
  int ref_clamps = 0, clamps = 0, vga_fetches = 0;
  always @(posedge clk) begin
    if ($countones(dut.m_req_valid) > 1) contention++;
    if (mem_req_valid && !mem_req_ready) backpressure++;
    for (int c = 0; c < 2; c++) if (dut.done[c]) cap_dones[c]++;
    if (dut.g_remap[0].u_remap.state == 3'd3 && !dut.g_remap[0].u_remap.in_frame) remap_outside++;
    if (dut.g_remap[1].u_remap.state == 3'd3 && !dut.g_remap[1].u_remap.in_frame) remap_outside++;
    if (dut.g_sgm[1].u_sgm.busy && dut.g_sgm[1].u_sgm.core_out_valid &&
        dut.g_sgm[1].u_sgm.core_out_ready && !dut.g_sgm[1].u_sgm.out_in_window) overlap_dropped++;
    if (sgm_clamp[0]) clamps++;
    if (sgm_clamp[1]) clamps++;
    if (dut.u_vga.pix_en && dut.u_vga.h == '0 && !dut.u_vga.f_active) vga_fetches++;
  end

  // ---------------------------------------------------------------- camera model
  task automatic cam_cycle(int c, logic v, logic hr, logic [7:0] d);
    cam_vsync[c] = v; cam_href[c] = hr; cam_data[c] = d;
    repeat (4) @(posedge clk);
    cam_pclk[c] = 1;
    repeat (4) @(posedge clk);
    cam_pclk[c] = 0;
  endtask

  task automatic cam_frame(int c, const ref byte unsigned y[]);
    for (int i = 0; i < 6; i++) cam_cycle(c, 1, 0, 8'($urandom));
    for (int i = 0; i < 4; i++) cam_cycle(c, 0, 0, 8'($urandom));
    for (int l = 0; l < H; l++) begin
      for (int i = 0; i < 2 * W; i++) cam_cycle(c, 0, 1, (i % 2) ? y[l*W + i/2] : 8'($urandom));
      for (int i = 0; i < 5; i++) cam_cycle(c, 0, 0, 8'($urandom));
    end
    for (int i = 0; i < 6; i++) cam_cycle(c, 1, 0, 8'($urandom));
  endtask

  // ---------------------------------------------------------------- models
  byte unsigned scene_l[], scene_r[], junk[], rect_l[], rect_r[], sec_l[], sec_r[];
  int mxl[], myl[], mxr[], myr[], disp[], clamp[];

  function automatic int rawpx(const ref byte unsigned f[], int x, int y);
    return (x < 0 || x >= W || y < 0 || y >= H) ? 0 : int'(f[y*W + x]);
  endfunction

  function automatic void remap_model(const ref byte unsigned f[], const ref int mx[],
                                      const ref int my[], ref byte unsigned o[]);
    o = new[W * H];
    for (int n = 0; n < W * H; n++) begin
      automatic int sx = mx[n] >>> 5, sy = my[n] >>> 5, fx = mx[n] & 31, fy = my[n] & 31;
      automatic int sx1 = sx + 1, sy1 = sy + 1;
      automatic int p00 = rawpx(f, sx, sy), p01 = rawpx(f, sx1, sy), p10 = rawpx(f, sx, sy1), p11 = rawpx(f, sx1, sy1);
      o[n] = 8'((p00 * (S - fx) * (S - fy) + p01 * fx * (S - fy) + p10 * (S - fx) * fy + p11 * fx * fy
               + S * S / 2) / (S * S));
    end
  endfunction

  task automatic put_map(int base, const ref int mx[], const ref int my[]);
    for (int n = 0; n < W * H; n++) begin
      ddr.mem[base + 4*n + 0] = 8'(mx[n]);
      ddr.mem[base + 4*n + 1] = 8'(mx[n] >> 8);
      ddr.mem[base + 4*n + 2] = 8'(my[n]);
      ddr.mem[base + 4*n + 3] = 8'(my[n] >> 8);
    end
  endtask

  task automatic cmp(string what, int addr, int exp);
    checks++;
    if (ddr.mem[addr] != 8'(exp)) begin
      failures++;
      if (failures < 15) $display("%s at %h: %0d expected %0d", what, addr, ddr.mem[addr], exp);
    end
  endtask

  task automatic sgm_section(int p, int row0, int rows, int skip, int nout);
    wr(p, REG_SRC0, RECT_L); wr(p, REG_SRC1, RECT_R); wr(p, REG_DST, DISP);
    wr(p, REG_ARG0, row0); wr(p, REG_ARG1, rows); wr(p, REG_ARG2, skip); wr(p, REG_ARG3, nout);
  endtask

  initial begin
    logic [31:0] d;
    scene_l = new[W*H]; scene_r = new[W*H]; junk = new[W*H];
    mxl = new[W*H]; myl = new[W*H]; mxr = new[W*H]; myr = new[W*H];
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        // a textured background at disparity 2 and a square at disparity 5
        scene_l[y*W+x] = 8'($urandom);
        junk[y*W+x] = 8'($urandom);
      end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        automatic int dd = (x >= 12 && x < 24 && y >= 4 && y < 12) ? 5 : 2;
        scene_r[y*W+x] = (x + dd < W) ? scene_l[y*W+x+dd] : 8'($urandom);
      end
    for (int n = 0; n < W*H; n++) begin
      automatic int x = n % W, y = n / W;
      mxl[n] = x * S + (y % 4) * 3;  myl[n] = y * S + (x % 3) * 2;
      mxr[n] = x * S - 8;            myr[n] = y * S + 4;
    end
    put_map(MAP_L, mxl, myl);
    put_map(MAP_R, mxr, myr);

    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. capture with auto restart: a junk frame, then the scene
    wr(0, REG_SRC0, RAW_L); wr(1, REG_SRC0, RAW_R);
    wr(0, REG_CTRL, 32'h81); wr(1, REG_CTRL, 32'h81);
    fork
      begin cam_frame(0, junk); cam_frame(0, scene_l); end
      begin cam_frame(1, junk); cam_frame(1, scene_r); end
    join
    wr(0, REG_CTRL, 32'h0); wr(1, REG_CTRL, 32'h0);
    for (int n = 0; n < W*H; n++) begin
      cmp("captured left", RAW_L + n, scene_l[n]);
      cmp("captured right", RAW_R + n, scene_r[n]);
    end

    // 2. rectification, both cameras at once
    wr(2, REG_SRC0, RAW_L); wr(2, REG_SRC1, MAP_L); wr(2, REG_DST, RECT_L);
    wr(3, REG_SRC0, RAW_R); wr(3, REG_SRC1, MAP_R); wr(3, REG_DST, RECT_R);
    wr(2, REG_CTRL, 1); wr(3, REG_CTRL, 1);
    wait_done(2); wait_done(3);
    remap_model(scene_l, mxl, myl, rect_l);
    remap_model(scene_r, mxr, myr, rect_r);
    for (int n = 0; n < W*H; n++) begin
      cmp("rectified left", RECT_L + n, rect_l[n]);
      cmp("rectified right", RECT_R + n, rect_r[n]);
    end

    // 3. stereo matching, two sections at once
    sgm_section(4, 0, H/2 + R, 0, H/2);
    sgm_section(5, H/2 - R, H/2 + R, R, H/2);
    wr(4, REG_CTRL, 1); wr(5, REG_CTRL, 1);
    wait_done(4); wait_done(5);
    for (int s = 0; s < 2; s++) begin
      automatic int row0 = s ? H/2 - R : 0, skip = s ? R : 0, rows = H/2 + R;
      sec_l = new[rows * W]; sec_r = new[rows * W];
      for (int i = 0; i < rows * W; i++) begin sec_l[i] = rect_l[row0*W + i]; sec_r[i] = rect_r[row0*W + i]; end
      sgm_ref_pkg::sgm(W, rows, WIN, D, SGM_P1, SGM_P2, SUMW, sec_l, sec_r, disp, clamp);
      for (int y = skip; y < skip + H/2; y++)
        for (int x = 0; x < W; x++) ref_clamps += clamp[y*W + x];
      for (int y = skip; y < skip + H/2; y++)
        for (int x = 0; x < W; x++) cmp("disparity", DISP + (row0 + y) * W + x, disp[y*W + x]);
    end

    // 4. display: one full frame of visible pixels
    wr(6, REG_SRC0, DISP);
    wr(6, REG_CTRL, 1);
    begin
      automatic int frames = 0, seen = 0;
      while (frames < 2) begin
        @(posedge clk);
        if (dut.u_vga.pix_en) begin
          automatic int h = dut.u_vga.h, v = dut.u_vga.v;
          if (h == 0 && v == 0) frames++;
          #1;
          if (frames == 1 && h < W && v < H) begin
            automatic logic [7:0] e = ddr.mem[DISP + v*W + h] << 1;
            seen++;
            checks++;
            if (vga_r != e[7:4] || vga_g != e[7:4] || vga_b != e[7:4]) begin
              failures++;
              if (failures < 15) $display("vga (%0d,%0d): %h expected %h", h, v, vga_r, e[7:4]);
            end
          end
        end
      end
      checks++;
      if (seen != W * H) begin failures++; $display("vga showed %0d pixels", seen); end
    end

    // mechanisms
    $display("contention %0d, back-pressure %0d, capture frames %0d/%0d, remap outside %0d",
             contention, backpressure, cap_dones[0], cap_dones[1], remap_outside);
    $display("overlap outputs dropped %0d, clamped pixels %0d (model %0d), vga line fetches %0d",
             overlap_dropped, clamps, ref_clamps, vga_fetches);
    checks++; if (contention == 0)    begin failures++; $display("no arbiter contention"); end
    checks++; if (backpressure == 0)  begin failures++; $display("no memory back-pressure"); end
    checks++; if (cap_dones[0] < 2 || cap_dones[1] < 2) begin failures++; $display("no auto restart"); end
    checks++; if (remap_outside == 0) begin failures++; $display("no remap read outside the frame"); end
    checks++; if (overlap_dropped != R * W) begin failures++; $display("overlap rows dropped: %0d", overlap_dropped); end
    checks++; if (clamps == 0)        begin failures++; $display("summed-cost bound never used"); end
    checks++; if (vga_fetches == 0 || vga_underflow) begin failures++; $display("vga fetch problem"); end
    checks++; if (cam_overflow != 0)  begin failures++; $display("camera FIFO overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
