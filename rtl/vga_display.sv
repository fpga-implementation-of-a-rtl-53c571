// vga_display: shows a frame held in memory on a VGA monitor.
//
// Once started, the peripheral generates VGA timing continuously and shows the
// 8-bit frame at `addr_frame` (one byte per pixel, raster order) in grey.  It
// is used to display the disparity image in real time.  Pixel data are read
// from memory a line ahead: two line buffers alternate, one being shown while
// the next line is fetched into the other; the fetch of line 0 happens during
// the last blanking line.  Reads are issued back to back on the byte-wide
// memory port (valid/ready, in-order responses).  If a line is still being
// fetched when it must be shown, the sticky `underflow` flag is raised.
//
// The design names this peripheral and its purpose only.  Own choices: the
// standard 640x480 at 60 Hz timing (800x525 pixel periods, negative syncs) with
// a pixel every CLK_DIV system clocks (25 MHz from 100 MHz), 4-bit colour
// outputs as on the target board, and a left shift of the pixel value by
// SHIFT bits (disparities 0..79 become grey levels 0..158).
module vga_display
  import stereo_pkg::*;
#(
  parameter int unsigned H_VIS   = IMG_W,
  parameter int unsigned H_FP    = 16,
  parameter int unsigned H_SYNC  = 96,
  parameter int unsigned H_BP    = 48,
  parameter int unsigned V_VIS   = IMG_H,
  parameter int unsigned V_FP    = 10,
  parameter int unsigned V_SYNC  = 2,
  parameter int unsigned V_BP    = 33,
  parameter int unsigned CLK_DIV = 4,
  parameter int unsigned SHIFT   = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  input  logic [ADDR_W-1:0] addr_frame,
  output logic              req_valid,
  input  logic              req_ready,
  output mem_req_t          req,
  input  logic              rsp_valid,
  input  logic [7:0]        rsp_rdata,
  output logic              vga_hs,
  output logic              vga_vs,
  output logic [3:0]        vga_r,
  output logic [3:0]        vga_g,
  output logic [3:0]        vga_b,
  output logic              underflow
);

  localparam int unsigned H_TOT = H_VIS + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOT = V_VIS + V_FP + V_SYNC + V_BP;
  localparam int unsigned HW = $clog2(H_TOT);
  localparam int unsigned VW = $clog2(V_TOT);
  localparam int unsigned XW = $clog2(H_VIS + 1);
  localparam int unsigned DW = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;

  logic [ADDR_W-1:0] base;
  logic [DW-1:0]     div;
  logic              pix_en;
  logic [HW-1:0]     h;
  logic [VW-1:0]     v;
  logic [7:0]        lbuf [2][H_VIS];

  // fetcher state
  logic              f_active;
  logic              f_sel;
  logic [VW-1:0]     f_line;
  logic [XW-1:0]     f_issued, f_got;

  assign pix_en = busy && (div == DW'(CLK_DIV - 1));

  // ---------------------------------------------------------------- fetch
  assign req_valid = f_active && (f_issued != XW'(H_VIS));
  always_comb begin
    req       = '0;
    req.addr  = base + ADDR_W'(f_line) * H_VIS + ADDR_W'(f_issued);
  end

  always_ff @(posedge clk) begin
    if (rsp_valid && f_active) lbuf[f_sel][f_got] <= rsp_rdata;
  end

  // ---------------------------------------------------------------- timing and output
  logic       visible;
  logic [7:0] shown;
  assign visible = (32'(h) < H_VIS) && (32'(v) < V_VIS);
  assign shown   = lbuf[v[0]][h[XW-1:0]] << SHIFT;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      base      <= '0;
      div       <= '0;
      h         <= '0;
      v         <= VW'(V_TOT - 1);
      f_active  <= 1'b0;
      f_sel     <= 1'b0;
      f_line    <= '0;
      f_issued  <= '0;
      f_got     <= '0;
      vga_hs    <= 1'b1;
      vga_vs    <= 1'b1;
      vga_r     <= '0;
      vga_g     <= '0;
      vga_b     <= '0;
      underflow <= 1'b0;
    end else begin
      if (start && !busy) begin
        busy <= 1'b1;
        base <= addr_frame;
        div  <= '0;
        h    <= '0;
        v    <= VW'(V_TOT - 1);    // begin in the last blanking line
      end
      if (busy) div <= (div == DW'(CLK_DIV - 1)) ? '0 : div + 1'b1;

      // memory side
      if (req_valid && req_ready) f_issued <= f_issued + 1'b1;
      if (rsp_valid && f_active) begin
        f_got <= f_got + 1'b1;
        if (f_got == XW'(H_VIS - 1)) f_active <= 1'b0;
      end

      if (pix_en) begin
        // start fetching the next line at the start of each line
        if (h == '0 && (32'(v) + 1 < V_VIS || 32'(v) == V_TOT - 1)) begin
          f_active <= 1'b1;
          f_line   <= (32'(v) == V_TOT - 1) ? '0 : v + 1'b1;
          f_sel    <= (32'(v) == V_TOT - 1) ? 1'b0 : ~v[0];
          f_issued <= '0;
          f_got    <= '0;
          if (f_active) underflow <= 1'b1;
        end
        if (visible && f_active && f_line == v) underflow <= 1'b1;

        vga_hs <= !((32'(h) >= H_VIS + H_FP) && (32'(h) < H_VIS + H_FP + H_SYNC));
        vga_vs <= !((32'(v) >= V_VIS + V_FP) && (32'(v) < V_VIS + V_FP + V_SYNC));
        vga_r  <= visible ? shown[7:4] : '0;
        vga_g  <= visible ? shown[7:4] : '0;
        vga_b  <= visible ? shown[7:4] : '0;

        if (h == HW'(H_TOT - 1)) begin
          h <= '0;
          v <= (v == VW'(V_TOT - 1)) ? '0 : v + 1'b1;
        end else begin
          h <= h + 1'b1;
        end
      end
    end
  end

endmodule
