// tb_stereo_system_full: the whole system at its default, full size.
//
// 640x480 frames, 11x11 census window, 80 disparities, two SGM sections.  The
// test acts as the processor in the USB-camera set-up: raw left and right
// frames and the two rectification maps are placed in memory directly, then
// the registers start both remap blocks, both SGM blocks (upper and lower
// half, WIN/2 rows of overlap) and the display.  Every rectified byte, every
// disparity byte and every visible pixel of one displayed frame are compared
// with models computed here.  The cycle counts of the remap and SGM stages are
// reported as a frame rate at 100 MHz, and the SGM stage is checked against
// the core's own rate (D+4 cycles per pixel plus 2D+1 per row) with 5 %
// allowance for memory traffic.
module tb_stereo_system_full;
  import stereo_pkg::*;
  localparam int W = IMG_W, H = IMG_H, WIN = SGM_WIN, D = SGM_D, R = WIN / 2, S = 32;
  localparam int RAW_L = 'h000000, RAW_R = 'h050000, MAP_L = 'h100000, MAP_R = 'h240000;
  localparam int RECT_L = 'h380000, RECT_R = 'h400000, DISP = 'h480000;

  logic clk = 0, rst_n = 1;
  axil_req_t [6:0] s_axil_req;
  axil_rsp_t [6:0] s_axil_rsp;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid;
  mem_req_t mem_req;
  logic [7:0] mem_rsp_rdata;
  logic [1:0] cam_pclk = 0, cam_vsync = 0, cam_href = 0;
  logic [1:0][7:0] cam_data = 0;
  logic vga_hs, vga_vs, vga_underflow;
  logic [3:0] vga_r, vga_g, vga_b;
  logic [1:0] cam_overflow, sgm_clamp;
  logic [1:0][31:0] cam_pixels;
  int checks = 0, failures = 0;

  stereo_system_top dut (.*);
  ddr_model #(.AW(23), .LAT(5), .STALL(0)) ddr (.clk, .req_valid(mem_req_valid),
    .req_ready(mem_req_ready), .req(mem_req), .rsp_valid(mem_rsp_valid), .rsp_rdata(mem_rsp_rdata));

  for (genvar i = 0; i < 7; i++) begin : g_bfm
    axil_bfm u (.clk, .req(s_axil_req[i]), .rsp(s_axil_rsp[i]));
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (60000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
      repeat (1000) @(posedge clk);
      rd(p, REG_CTRL, d);
    end while (!d[1]);
  endtask

  byte unsigned raw_l[], raw_r[], rect_l[], rect_r[], sec_l[], sec_r[];
  int mxl[], myl[], mxr[], myr[], disp[], clamp[];

  function automatic int rawpx(const ref byte unsigned f[], int x, int y);
    return (x < 0 || x >= W || y < 0 || y >= H) ? 0 : int'(f[y*W + x]);
  endfunction

  function automatic void remap_model(const ref byte unsigned f[], const ref int mx[],
                                      const ref int my[], ref byte unsigned o[]);
    o = new[W * H];
    for (int n = 0; n < W * H; n++) begin
      int sx = mx[n] >>> 5, sy = my[n] >>> 5, fx = mx[n] & 31, fy = my[n] & 31;
      int sx1 = sx + 1, sy1 = sy + 1;
      int p00 = rawpx(f, sx, sy), p01 = rawpx(f, sx1, sy), p10 = rawpx(f, sx, sy1), p11 = rawpx(f, sx1, sy1);
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

  initial begin
    logic [31:0] d;
    longint t0, t_remap, t_sgm;
    raw_l = new[W*H]; raw_r = new[W*H];
    mxl = new[W*H]; myl = new[W*H]; mxr = new[W*H]; myr = new[W*H];
    // scene: smooth gradient plus noise texture; background at disparity 6,
    // a rectangle at disparity 30, the right camera shifted half a row
    for (int n = 0; n < W*H; n++) raw_l[n] = 8'((n % W) / 4 + (n / W) / 4 + ($urandom % 64));
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        automatic int dd = (x >= 200 && x < 440 && y >= 120 && y < 360) ? 30 : 6;
        raw_r[y*W+x] = (x + dd < W) ? raw_l[y*W+x+dd] : 8'($urandom);
      end
    for (int n = 0; n < W*H; n++) begin
      automatic int x = n % W, y = n / W;
      // left: slight barrel-like warp; right: half-pixel vertical correction
      mxl[n] = x * S + ((x - W/2) * (y - H/2)) / 4096;
      myl[n] = y * S + ((y - H/2) * (x - W/2)) / 8192;
      mxr[n] = x * S + 3;
      myr[n] = y * S - 16;
    end
    for (int n = 0; n < W*H; n++) begin ddr.mem[RAW_L + n] = raw_l[n]; ddr.mem[RAW_R + n] = raw_r[n]; end
    put_map(MAP_L, mxl, myl);
    put_map(MAP_R, mxr, myr);

    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // rectification, both cameras at once
    wr(2, REG_SRC0, RAW_L); wr(2, REG_SRC1, MAP_L); wr(2, REG_DST, RECT_L);
    wr(3, REG_SRC0, RAW_R); wr(3, REG_SRC1, MAP_R); wr(3, REG_DST, RECT_R);
    t0 = $time;
    wr(2, REG_CTRL, 1); wr(3, REG_CTRL, 1);
    wait_done(2); wait_done(3);
    t_remap = ($time - t0) / 10;
    remap_model(raw_l, mxl, myl, rect_l);
    remap_model(raw_r, mxr, myr, rect_r);
    for (int n = 0; n < W*H; n++) begin
      cmp("rectified left", RECT_L + n, rect_l[n]);
      cmp("rectified right", RECT_R + n, rect_r[n]);
    end

    // stereo matching, two sections at once
    for (int s = 0; s < 2; s++) begin
      wr(4 + s, REG_SRC0, RECT_L); wr(4 + s, REG_SRC1, RECT_R); wr(4 + s, REG_DST, DISP);
      wr(4 + s, REG_ARG0, s ? H/2 - R : 0); wr(4 + s, REG_ARG1, H/2 + R);
      wr(4 + s, REG_ARG2, s ? R : 0);       wr(4 + s, REG_ARG3, H/2);
    end
    t0 = $time;
    wr(4, REG_CTRL, 1); wr(5, REG_CTRL, 1);
    wait_done(4); wait_done(5);
    t_sgm = ($time - t0) / 10;
    for (int s = 0; s < 2; s++) begin
      automatic int row0 = s ? H/2 - R : 0, skip = s ? R : 0, rows = H/2 + R;
      sec_l = new[rows * W]; sec_r = new[rows * W];
      for (int i = 0; i < rows * W; i++) begin sec_l[i] = rect_l[row0*W + i]; sec_r[i] = rect_r[row0*W + i]; end
      sgm_ref_pkg::sgm(W, rows, WIN, D, SGM_P1, SGM_P2, SUM_W, sec_l, sec_r, disp, clamp);
      for (int y = skip; y < skip + H/2; y++)
        for (int x = 0; x < W; x++) cmp("disparity", DISP + (row0 + y) * W + x, disp[y*W + x]);
    end
    begin
      automatic longint ideal = longint'(H/2 + R) * (W * (D + 4) + 2 * D + 1) + R * W + R;
      $display("remap %0d cycles, sgm %0d cycles (core rate %0d): %0.2f frames/s at 100 MHz",
               t_remap, t_sgm, ideal, 100.0e6 / real'(t_remap + t_sgm));
      checks++;
      if (real'(t_sgm) > 1.05 * real'(ideal)) begin failures++; $display("sgm stage too slow"); end
    end

    // display: one full frame of visible pixels
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
      if (seen != W * H || vga_underflow) begin failures++; $display("vga showed %0d pixels", seen); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
