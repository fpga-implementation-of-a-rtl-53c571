// tb_remap_peripheral: rectification of a small frame through a coordinate map.
//
// A 12x8 raw frame and a map are placed in the memory model (random stalls).
// The map mixes whole-pixel shifts, random fractional positions, and
// positions outside the frame.  Each output pixel is compared with bilinear
// interpolation computed here in integer arithmetic, and the peripheral must
// report done exactly once.
module tb_remap_peripheral;
  import stereo_pkg::*;
  localparam int W = 12, H = 8, FRAC = 5, S = 1 << FRAC;
  localparam int ARAW = 'h0000, AMAP = 'h1000, AOUT = 'h2000;

  logic clk = 0, rst_n = 1, start = 0, busy, done;
  logic [ADDR_W-1:0] addr_raw = ARAW, addr_map = AMAP, addr_out = AOUT;
  logic req_valid, req_ready, rsp_valid;
  mem_req_t req;
  logic [7:0] rsp_rdata;
  int checks = 0, failures = 0, dones = 0, outside = 0;

  remap_peripheral #(.WIDTH(W), .HEIGHT(H), .FRAC(FRAC)) dut (.*);
  ddr_model #(.AW(16), .LAT(2), .STALL(1)) ddr (.clk, .req_valid, .req_ready, .req,
                                                .rsp_valid, .rsp_rdata);

  always #5 clk = ~clk;
  always @(posedge clk) if (done) dones++;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int raw [H][W];
  int mxs [H*W], mys [H*W];

  function automatic int rp(int x, int y);
    return (x < 0 || x >= W || y < 0 || y >= H) ? 0 : raw[y][x];
  endfunction

  initial begin
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        raw[y][x] = $urandom_range(0, 255);
        ddr.mem[ARAW + y*W + x] = 8'(raw[y][x]);
      end
    for (int n = 0; n < W*H; n++) begin
      automatic int x = n % W, y = n / W;
      case (n % 4)
        0: begin mxs[n] = (x + 1) * S; mys[n] = y * S; end
        1, 2: begin mxs[n] = $urandom_range(0, W*S) - S/2; mys[n] = $urandom_range(0, H*S) - S/2; end
        default: begin mxs[n] = -3 * S + $urandom_range(0, S-1); mys[n] = (y + H/2) * S + 7; end
      endcase
      ddr.mem[AMAP + 4*n + 0] = 8'(mxs[n]);
      ddr.mem[AMAP + 4*n + 1] = 8'(mxs[n] >> 8);
      ddr.mem[AMAP + 4*n + 2] = 8'(mys[n]);
      ddr.mem[AMAP + 4*n + 3] = 8'(mys[n] >> 8);
    end
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (done);
    repeat (2) @(negedge clk);
    for (int n = 0; n < W*H; n++) begin
      automatic int sx = mxs[n] >>> FRAC, sy = mys[n] >>> FRAC;
      automatic int fx = mxs[n] & (S - 1), fy = mys[n] & (S - 1);
      automatic int e = (rp(sx, sy) * (S - fx) * (S - fy) + rp(sx + 1, sy) * fx * (S - fy)
             + rp(sx, sy + 1) * (S - fx) * fy + rp(sx + 1, sy + 1) * fx * fy + S * S / 2) / (S * S);
      if (sx < 0 || sy + 1 >= H) outside++;
      checks++;
      if (ddr.mem[AOUT + n] != 8'(e)) begin
        failures++;
        if (failures < 10) $display("pixel %0d: %0d expected %0d (map %0d,%0d)", n, ddr.mem[AOUT + n], e, mxs[n], mys[n]);
      end
    end
    checks++;
    if (dones != 1 || busy) begin failures++; $display("done count %0d", dones); end
    checks++;
    if (outside == 0) begin failures++; $display("no map entry outside the frame"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
