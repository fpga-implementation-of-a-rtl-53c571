// ov7670_capture: stores the luminance of an OV7670 camera frame in memory.
//
// The camera streams YCbCr 4:2:2 bytes on its pixel clock: Cb, Y1, Cr, Y2 for
// every two pixels, valid while HREF is high, and a falling VSYNC marks the
// start of a frame.  Stereo matching needs only intensity, so every second
// byte of a line (the Y bytes) is kept and written to memory, one byte per
// pixel, at addr_frame + pixel index.  This follows the design's camera
// interface.  Own choices: the camera signals are brought into the system
// clock domain by two-flop synchronisers and a rising PCLK is detected there
// (PCLK must be below a quarter of the system clock), and the bytes pass a
// FIFO of FIFO_DEPTH entries before the memory port; if it overflows the
// sticky `overflow` flag is set and the byte is dropped.
//
// Control: `start` arms the block; capture begins at the next frame start
// and ends at the following VSYNC rise, when `done` pulses with `busy` low.
// Memory port: byte writes with valid/ready handshake.
module ov7670_capture
  import stereo_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  input  logic [ADDR_W-1:0] addr_frame,
  // camera
  input  logic              cam_pclk,
  input  logic              cam_vsync,
  input  logic              cam_href,
  input  logic [7:0]        cam_data,
  // memory master (writes only)
  output logic              req_valid,
  input  logic              req_ready,
  output mem_req_t          req,
  output logic              overflow,
  output logic [31:0]       pixels
);

  localparam int unsigned PW = $clog2(FIFO_DEPTH);

  typedef enum logic [1:0] {C_IDLE, C_ARMED, C_FRAME} cstate_t;
  cstate_t cs;

  // synchronisers
  logic [2:0] pclk_s, vs_s;
  logic [1:0] href_s;
  logic [7:0] data_s [2];
  logic       pclk_rise, vs_fall, vs_rise;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pclk_s <= '0;
      vs_s   <= '0;
      href_s <= '0;
      data_s[0] <= '0;
      data_s[1] <= '0;
    end else begin
      pclk_s    <= {pclk_s[1:0], cam_pclk};
      vs_s      <= {vs_s[1:0], cam_vsync};
      href_s    <= {href_s[0], cam_href};
      data_s[0] <= cam_data;
      data_s[1] <= data_s[0];
    end
  end
  assign pclk_rise = pclk_s[1] && !pclk_s[2];
  assign vs_fall   = !vs_s[1] && vs_s[2];
  assign vs_rise   = vs_s[1] && !vs_s[2];

  // byte FIFO
  logic [7:0]    fifo [FIFO_DEPTH];
  logic [PW-1:0] wp, rp;
  logic [PW:0]   cnt;
  logic          push, pop, odd;
  logic [ADDR_W-1:0] base, waddr;

  assign push      = (cs == C_FRAME) && pclk_rise && href_s[1] && odd;
  assign pop       = req_valid && req_ready;
  assign req_valid = (cnt != '0);
  always_comb begin
    req       = '0;
    req.we    = 1'b1;
    req.addr  = waddr;
    req.wdata = fifo[rp];
  end

  always_ff @(posedge clk) begin
    if (push && cnt != (PW+1)'(FIFO_DEPTH)) fifo[wp] <= data_s[1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs       <= C_IDLE;
      busy     <= 1'b0;
      done     <= 1'b0;
      base     <= '0;
      waddr    <= '0;
      wp       <= '0;
      rp       <= '0;
      cnt      <= '0;
      odd      <= 1'b0;
      overflow <= 1'b0;
      pixels   <= '0;
    end else begin
      done <= 1'b0;
      unique case (cs)
        C_IDLE: if (start) begin
          cs   <= C_ARMED;
          busy <= 1'b1;
          base <= addr_frame;
        end
        C_ARMED: if (vs_fall) begin
          cs     <= C_FRAME;
          pixels <= '0;
        end
        C_FRAME: if (vs_rise) begin
          cs   <= C_IDLE;
          busy <= 1'b0;
          done <= 1'b1;
        end
        default: cs <= C_IDLE;
      endcase
      // byte phase within a line: Cb/Cr even, Y odd
      if (!href_s[1]) odd <= 1'b0;
      else if (pclk_rise) odd <= !odd;

      if (push) begin
        if (cnt == (PW+1)'(FIFO_DEPTH)) overflow <= 1'b1;
        else wp <= (wp == PW'(FIFO_DEPTH - 1)) ? '0 : wp + 1'b1;
      end
      if (pop) begin
        rp    <= (rp == PW'(FIFO_DEPTH - 1)) ? '0 : rp + 1'b1;
        waddr <= waddr + 1'b1;
      end
      if (cs == C_ARMED && vs_fall) waddr <= base;
      if (push && cnt != (PW+1)'(FIFO_DEPTH)) pixels <= pixels + 1'b1;
      cnt <= cnt + (PW+1)'(push && cnt != (PW+1)'(FIFO_DEPTH)) - (PW+1)'(pop);
    end
  end

endmodule
