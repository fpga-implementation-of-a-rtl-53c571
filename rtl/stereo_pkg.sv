// stereo_pkg: sizes and types shared by the stereo vision peripherals.
//
// Frame size, pixel width, census window, disparity search range and the
// memory-bus types live here so that every block agrees on them.  The frame
// size (640x480, 8-bit pixels), the 11x11 census window and the 80-disparity
// search range of the SGM matcher follow the design; the SGM penalties, the
// cost widths and the byte-wide memory bus are this implementation's choices.
package stereo_pkg;

  // Frame geometry
  localparam int unsigned IMG_W = 640;
  localparam int unsigned IMG_H = 480;
  localparam int unsigned PIX_W = 8;

  // SGM matcher
  localparam int unsigned SGM_WIN  = 11;    // census window edge
  localparam int unsigned SGM_D    = 80;    // search range (disparities)
  localparam int unsigned COST_W   = 10;    // stored aggregated path cost
  localparam int unsigned SUM_W    = 10;    // bounded sum over the 4 paths
  localparam int unsigned SGM_P1   = 10;    // small-step penalty
  localparam int unsigned SGM_P2   = 100;   // large-step penalty
  localparam int unsigned SGM_SECTIONS = 2; // SGM peripherals sharing a frame

  // Memory bus: 32-bit byte addresses, one byte per request
  localparam int unsigned ADDR_W = 32;

  typedef struct packed {
    logic              we;
    logic [ADDR_W-1:0] addr;
    logic [7:0]        wdata;
  } mem_req_t;

  // AXI4-Lite (32-bit data) channel bundles
  typedef struct packed {
    logic        awvalid;
    logic [11:0] awaddr;
    logic        wvalid;
    logic [31:0] wdata;
    logic [3:0]  wstrb;
    logic        bready;
    logic        arvalid;
    logic [11:0] araddr;
    logic        rready;
  } axil_req_t;

  typedef struct packed {
    logic        awready;
    logic        wready;
    logic        bvalid;
    logic [1:0]  bresp;
    logic        arready;
    logic        rvalid;
    logic [31:0] rdata;
    logic [1:0]  rresp;
  } axil_rsp_t;

  // Register map shared by every peripheral's register file
  localparam logic [11:0] REG_CTRL = 12'h000; // [0] start, [1] done, [2] idle, [7] auto restart
  localparam logic [11:0] REG_SRC0 = 12'h004; // left image / raw frame / frame base address
  localparam logic [11:0] REG_SRC1 = 12'h008; // right image / remap map base address
  localparam logic [11:0] REG_DST  = 12'h00C; // disparity / rectified frame base address
  localparam logic [11:0] REG_ARG0 = 12'h010; // first input row of a section
  localparam logic [11:0] REG_ARG1 = 12'h014; // input rows of a section
  localparam logic [11:0] REG_ARG2 = 12'h018; // output rows skipped at the top
  localparam logic [11:0] REG_ARG3 = 12'h01C; // output rows written

endpackage
