// stereo_system_top: programmable-logic part of the real-time stereo system.
//
// Frames travel through the shared DDR memory from one peripheral to the
// next, each started by the processor through its AXI4-Lite register file:
//   camera capture (x2)  OV7670 luminance -> raw left/right frames
//   remap (x2)           raw frame + per-pixel map -> rectified frame
//   SGM (x2)             rectified left/right -> disparity image; the two
//                        peripherals work on the upper and lower half of the
//                        frame at the same time (sections with WIN/2 rows of
//                        overlap, set up through their registers)
//   VGA display          disparity image -> VGA monitor
// All seven memory masters share the DDR port through mem_arbiter.  The
// division into peripherals, the memory-to-memory flow, the two remap and two
// SGM blocks and the VGA output follow the design; camera frames may equally
// be written into memory by the processor (USB cameras), the capture blocks
// then simply stay idle.
//
// Ports: `s_axil_req/rsp[i]` is the register file of peripheral i, in the
// order of the localparams P_* below (the processor's general-purpose AXI
// port and interconnect are outside this module); `mem_*` is the byte-wide
// DDR port (valid/ready requests, in-order read data); camera and VGA pins;
// status flags and counts.  Register use per peripheral (offsets in stereo_pkg):
//   capture: SRC0 frame address
//   remap:   SRC0 raw frame, SRC1 map, DST rectified frame
//   SGM:     SRC0 left, SRC1 right, DST disparity, ARG0 first input row,
//            ARG1 input rows, ARG2 output rows skipped, ARG3 output rows
//   VGA:     SRC0 frame address
module stereo_system_top
  import stereo_pkg::*;
#(
  parameter int unsigned WIDTH  = IMG_W,
  parameter int unsigned HEIGHT = IMG_H,
  parameter int unsigned WIN    = SGM_WIN,
  parameter int unsigned D      = SGM_D,
  parameter int unsigned SUM_W  = stereo_pkg::SUM_W,
  parameter int unsigned P1     = SGM_P1,
  parameter int unsigned P2     = SGM_P2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // register files
  input  axil_req_t [6:0]      s_axil_req,
  output axil_rsp_t [6:0]      s_axil_rsp,
  // DDR port
  output logic                 mem_req_valid,
  input  logic                 mem_req_ready,
  output mem_req_t             mem_req,
  input  logic                 mem_rsp_valid,
  input  logic [7:0]           mem_rsp_rdata,
  // cameras: index 0 left, 1 right
  input  logic [1:0]           cam_pclk,
  input  logic [1:0]           cam_vsync,
  input  logic [1:0]           cam_href,
  input  logic [1:0][7:0]      cam_data,
  // VGA
  output logic                 vga_hs,
  output logic                 vga_vs,
  output logic [3:0]           vga_r,
  output logic [3:0]           vga_g,
  output logic [3:0]           vga_b,
  // status
  output logic                 vga_underflow,
  output logic [1:0]           cam_overflow,
  output logic [1:0]           sgm_clamp,
  output logic [1:0][31:0]     cam_pixels
);

  localparam int unsigned P_CAP_L = 0, P_CAP_R = 1, P_REMAP_L = 2, P_REMAP_R = 3,
                          P_SGM_0 = 4, P_SGM_1 = 5, P_VGA = 6, NP = 7;

  logic [NP-1:0]            start, busy, done;
  logic [NP-1:0][7:0][31:0] cfg;

  for (genvar i = 0; i < NP; i++) begin : g_regs
    axil_regs #(.NREG(8)) u_regs (
      .clk, .rst_n, .axi_req(s_axil_req[i]), .axi_rsp(s_axil_rsp[i]),
      .start(start[i]), .busy(busy[i]), .done(done[i]), .cfg(cfg[i]));
  end

  logic [NP-1:0]     m_req_valid, m_req_ready, m_rsp_valid;
  mem_req_t [NP-1:0] m_req;
  logic [7:0]        rsp_rdata;

  mem_arbiter #(.N(NP), .DEPTH(8)) u_arb (
    .clk, .rst_n, .m_req_valid, .m_req_ready, .m_req, .m_rsp_valid, .rsp_rdata,
    .s_req_valid(mem_req_valid), .s_req_ready(mem_req_ready), .s_req(mem_req),
    .s_rsp_valid(mem_rsp_valid), .s_rsp_rdata(mem_rsp_rdata));

  // ---------------------------------------------------------------- cameras
  for (genvar c = 0; c < 2; c++) begin : g_cam
    ov7670_capture u_cap (
      .clk, .rst_n, .start(start[P_CAP_L+c]), .busy(busy[P_CAP_L+c]), .done(done[P_CAP_L+c]),
      .addr_frame(cfg[P_CAP_L+c][1]),
      .cam_pclk(cam_pclk[c]), .cam_vsync(cam_vsync[c]), .cam_href(cam_href[c]),
      .cam_data(cam_data[c]),
      .req_valid(m_req_valid[P_CAP_L+c]), .req_ready(m_req_ready[P_CAP_L+c]),
      .req(m_req[P_CAP_L+c]), .overflow(cam_overflow[c]), .pixels(cam_pixels[c]));
  end

  // ---------------------------------------------------------------- rectification
  for (genvar c = 0; c < 2; c++) begin : g_remap
    remap_peripheral #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_remap (
      .clk, .rst_n, .start(start[P_REMAP_L+c]), .busy(busy[P_REMAP_L+c]),
      .done(done[P_REMAP_L+c]),
      .addr_raw(cfg[P_REMAP_L+c][1]), .addr_map(cfg[P_REMAP_L+c][2]),
      .addr_out(cfg[P_REMAP_L+c][3]),
      .req_valid(m_req_valid[P_REMAP_L+c]), .req_ready(m_req_ready[P_REMAP_L+c]),
      .req(m_req[P_REMAP_L+c]), .rsp_valid(m_rsp_valid[P_REMAP_L+c]), .rsp_rdata(rsp_rdata));
  end

  // ---------------------------------------------------------------- stereo matching
  for (genvar s = 0; s < 2; s++) begin : g_sgm
    sgm_peripheral #(.WIDTH(WIDTH), .WIN(WIN), .D(D), .SUM_W(SUM_W), .P1(P1), .P2(P2)) u_sgm (
      .clk, .rst_n, .start(start[P_SGM_0+s]), .busy(busy[P_SGM_0+s]), .done(done[P_SGM_0+s]),
      .addr_left(cfg[P_SGM_0+s][1]), .addr_right(cfg[P_SGM_0+s][2]),
      .addr_disp(cfg[P_SGM_0+s][3]),
      .in_row0(cfg[P_SGM_0+s][4][15:0]), .in_rows(cfg[P_SGM_0+s][5][15:0]),
      .out_skip(cfg[P_SGM_0+s][6][15:0]), .out_rows(cfg[P_SGM_0+s][7][15:0]),
      .req_valid(m_req_valid[P_SGM_0+s]), .req_ready(m_req_ready[P_SGM_0+s]),
      .req(m_req[P_SGM_0+s]), .rsp_valid(m_rsp_valid[P_SGM_0+s]), .rsp_rdata(rsp_rdata),
      .clamp_event(sgm_clamp[s]));
  end

  // ---------------------------------------------------------------- display
  vga_display #(.H_VIS(WIDTH), .V_VIS(HEIGHT)) u_vga (
    .clk, .rst_n, .start(start[P_VGA]), .busy(busy[P_VGA]), .addr_frame(cfg[P_VGA][1]),
    .req_valid(m_req_valid[P_VGA]), .req_ready(m_req_ready[P_VGA]), .req(m_req[P_VGA]),
    .rsp_valid(m_rsp_valid[P_VGA]), .rsp_rdata(rsp_rdata),
    .vga_hs, .vga_vs, .vga_r, .vga_g, .vga_b, .underflow(vga_underflow));
  assign done[P_VGA] = 1'b0;   // the display runs until reset

endmodule
