// sgm_peripheral: memory-to-memory SGM stereo matcher for one image section.
//
// Started through its register file, the peripheral reads a horizontal
// section of the rectified left and right images from memory, pixel pair by
// pixel pair, feeds them to sgm_core and writes the disparities back.  Several
// peripherals can split one frame into sections of rows, as the design does
// with two SGM blocks: each section is read with WIN/2 extra rows above and
// below its own rows, and only the section's own rows are written, so the
// section borders carry no garbage rows.
//
// Configuration (sampled at `start`):
//   addr_left/addr_right  base address of the full left/right image
//   addr_disp             base address of the full disparity image
//   in_row0, in_rows      first image row read and number of rows read
//   out_skip, out_rows    output rows skipped at the top of the section and
//                         number of rows written; disparity of image row
//                         in_row0+y goes to addr_disp+(in_row0+y)*WIDTH
// After the section's last pixel the peripheral feeds WIN/2*WIDTH+WIN/2 zero
// pixels so that the core delivers the last rows.  `done` pulses when the last
// disparity is written; `busy` is high in between.
//
// Memory port: one-byte requests with a valid/ready handshake and in-order
// read responses (`rsp_valid`, `rsp_rdata`); writes have no response.  Writes
// of disparities go ahead of reads not yet presented; at most one read is
// outstanding.  The byte-wide port is this implementation's choice (the
// design uses 64-bit AXI4 high-performance ports, whose bandwidth is far above
// what the matcher consumes).  Disparities are written as 8-bit values 0..D-1.
module sgm_peripheral
  import stereo_pkg::*;
#(
  parameter int unsigned WIDTH = IMG_W,
  parameter int unsigned WIN   = SGM_WIN,
  parameter int unsigned D     = SGM_D,
  parameter int unsigned SUM_W = stereo_pkg::SUM_W,
  parameter int unsigned P1    = SGM_P1,
  parameter int unsigned P2    = SGM_P2
) (
  input  logic              clk,
  input  logic              rst_n,
  // control
  input  logic              start,
  output logic              busy,
  output logic              done,
  input  logic [ADDR_W-1:0] addr_left,
  input  logic [ADDR_W-1:0] addr_right,
  input  logic [ADDR_W-1:0] addr_disp,
  input  logic [15:0]       in_row0,
  input  logic [15:0]       in_rows,
  input  logic [15:0]       out_skip,
  input  logic [15:0]       out_rows,
  // memory master
  output logic              req_valid,
  input  logic              req_ready,
  output mem_req_t          req,
  input  logic              rsp_valid,
  input  logic [7:0]        rsp_rdata,
  // status
  output logic              clamp_event
);

  localparam int unsigned R      = WIN / 2;
  localparam int unsigned LAG    = R * WIDTH + R;
  localparam int unsigned DISP_W = $clog2(D);
  localparam int unsigned X_W    = $clog2(WIDTH);

  typedef enum logic [2:0] {R_IDLE, R_REQ_L, R_WAIT_L, R_NEXT_R, R_REQ_R, R_WAIT_R, R_PUSH} rd_state_t;
  rd_state_t rs;

  logic [ADDR_W-1:0] a_left, a_right, a_disp, sec_off;
  logic [31:0]       n_pix, n_in, k, m;
  logic [15:0]       skip, rows_out, oy;
  logic [X_W-1:0]    ox;
  logic [7:0]        pix_l, pix_r;

  logic              frame_start;
  logic              core_in_valid, core_in_ready;
  logic              core_out_valid, core_out_ready, core_clamp;
  logic [DISP_W-1:0] core_disp;

  sgm_core #(.WIDTH(WIDTH), .WIN(WIN), .D(D), .SUM_W(SUM_W), .P1(P1), .P2(P2)) u_core (
    .clk, .rst_n, .frame_start,
    .in_valid(core_in_valid), .in_ready(core_in_ready),
    .in_left(pix_l), .in_right(pix_r),
    .out_valid(core_out_valid), .out_ready(core_out_ready),
    .out_disp(core_disp), .out_clamp(core_clamp));

  // ---------------------------------------------------------------- output side
  // A request, once presented, is held until accepted: a read enters its
  // request state only while no write is waiting, and a write is presented
  // only while no read is.
  logic out_in_window, wr_want, wr_req, rd_req;
  assign out_in_window  = (oy >= skip) && (oy < skip + rows_out);
  assign wr_want        = busy && core_out_valid && out_in_window;
  assign rd_req         = (rs == R_REQ_L) || (rs == R_REQ_R);
  assign wr_req         = wr_want && !rd_req;
  assign core_out_ready = busy && (out_in_window ? (wr_req && req_ready) : 1'b1);
  assign clamp_event    = core_out_valid && core_out_ready && core_clamp;

  always_comb begin
    req_valid = wr_req || rd_req;
    req       = '0;
    if (wr_req) begin
      req.we    = 1'b1;
      req.addr  = a_disp + sec_off + m;
      req.wdata = 8'(core_disp);
    end else if (rs == R_REQ_L) begin
      req.addr  = a_left + sec_off + k;
    end else begin
      req.addr  = a_right + sec_off + k;
    end
  end

  assign core_in_valid = (rs == R_PUSH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs          <= R_IDLE;
      busy        <= 1'b0;
      done        <= 1'b0;
      frame_start <= 1'b0;
      a_left      <= '0;
      a_right     <= '0;
      a_disp      <= '0;
      sec_off     <= '0;
      n_pix       <= '0;
      n_in        <= '0;
      k           <= '0;
      m           <= '0;
      skip        <= '0;
      rows_out    <= '0;
      oy          <= '0;
      ox          <= '0;
      pix_l       <= '0;
      pix_r       <= '0;
    end else begin
      done        <= 1'b0;
      frame_start <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy        <= 1'b1;
          frame_start <= 1'b1;
          a_left      <= addr_left;
          a_right     <= addr_right;
          a_disp      <= addr_disp;
          sec_off     <= ADDR_W'(32'(in_row0) * WIDTH);
          n_pix       <= 32'(in_rows) * WIDTH;
          n_in        <= 32'(in_rows) * WIDTH + LAG;
          skip        <= out_skip;
          rows_out    <= out_rows;
          k           <= '0;
          m           <= '0;
          oy          <= '0;
          ox          <= '0;
          rs          <= R_IDLE;
        end
      end else begin
        // input side: fetch a pixel pair, or a padding pair, and push it
        unique case (rs)
          R_IDLE: if (!frame_start && k < n_in) begin
            if (k < n_pix) begin
              if (!wr_want) rs <= R_REQ_L;
            end
            else begin
              pix_l <= '0;
              pix_r <= '0;
              rs    <= R_PUSH;
            end
          end
          R_REQ_L:  if (req_ready) rs <= R_WAIT_L;
          R_WAIT_L: if (rsp_valid) begin pix_l <= rsp_rdata; rs <= R_NEXT_R; end
          R_NEXT_R: if (!wr_want) rs <= R_REQ_R;
          R_REQ_R:  if (req_ready) rs <= R_WAIT_R;
          R_WAIT_R: if (rsp_valid) begin pix_r <= rsp_rdata; rs <= R_PUSH; end
          R_PUSH:   if (core_in_ready) begin k <= k + 1'b1; rs <= R_IDLE; end
          default:  rs <= R_IDLE;
        endcase
        // output side
        if (core_out_valid && core_out_ready) begin
          m <= m + 1'b1;
          if (ox == X_W'(WIDTH - 1)) begin ox <= '0; oy <= oy + 1'b1; end
          else ox <= ox + 1'b1;
          if (m + 1 == n_pix) begin
            busy <= 1'b0;
            done <= 1'b1;
            rs   <= R_IDLE;
          end
        end
      end
    end
  end

endmodule
