// remap_peripheral: image rectification by a per-pixel coordinate map.
//
// For every output pixel (x,y) of a WIDTH x HEIGHT frame the peripheral reads
// the map entry, which gives the source position (mx,my) in the raw frame,
// and writes the raw frame interpolated at that position.  The maps are made
// offline from the camera calibration and stored in memory beside the frames;
// one peripheral serves the left and one the right camera.  That division of
// work follows the design; the design does not give the insides of the block,
// so the following are this implementation's choices:
//   * map entry: 4 bytes per pixel at addr_map + 4*(y*WIDTH+x), little-endian
//     signed 16-bit mx then my, each in fixed point with FRAC fraction bits
//     (the design's maps hold pairs of floats);
//   * bilinear interpolation with FRAC-bit weights, rounded to nearest:
//       out = (p00*(S-fx)*(S-fy) + p01*fx*(S-fy) + p10*(S-fx)*fy
//              + p11*fx*fy + S*S/2) / (S*S),   S = 2**FRAC
//     where p01 is the pixel to the right and p10 the pixel below;
//   * source pixels outside the frame count as 0 and are not read.
// Requests go out one at a time on the byte-wide memory port (valid/ready,
// in-order read responses): 4 map reads, up to 4 pixel reads and one write
// per output pixel.  Started by `start` (addresses sampled then); `busy` is
// high until `done` pulses after the last pixel is written.
module remap_peripheral
  import stereo_pkg::*;
#(
  parameter int unsigned WIDTH  = IMG_W,
  parameter int unsigned HEIGHT = IMG_H,
  parameter int unsigned FRAC   = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  input  logic [ADDR_W-1:0] addr_raw,
  input  logic [ADDR_W-1:0] addr_map,
  input  logic [ADDR_W-1:0] addr_out,
  output logic              req_valid,
  input  logic              req_ready,
  output mem_req_t          req,
  input  logic              rsp_valid,
  input  logic [7:0]        rsp_rdata
);

  localparam int unsigned S     = 2 ** FRAC;
  localparam int unsigned NPIX  = WIDTH * HEIGHT;
  localparam int unsigned ACC_W = PIX_W + 2 * FRAC + 2;

  typedef enum logic [2:0] {S_IDLE, S_MREQ, S_MWAIT, S_PREQ, S_PWAIT, S_CALC, S_WR} state_t;
  state_t state;

  logic [ADDR_W-1:0] a_raw, a_map, a_out;
  logic [31:0]       n;            // output pixel index
  logic [1:0]        idx;          // map byte / neighbour index
  logic [7:0]        mbytes [4];
  logic [7:0]        nb [4];       // p00, p01, p10, p11
  logic [7:0]        result;

  // source position of the current pixel
  logic signed [15:0] mx, my;
  logic signed [16:0] sx, sy;      // integer parts
  logic [FRAC-1:0]    fx, fy;
  logic signed [17:0] nx, ny;      // neighbour idx coordinates
  logic               in_frame;
  logic [ADDR_W-1:0]  nb_addr;

  always_comb begin
    mx = $signed({mbytes[1], mbytes[0]});
    my = $signed({mbytes[3], mbytes[2]});
    sx = 17'(mx >>> FRAC);
    sy = 17'(my >>> FRAC);
    fx = mx[FRAC-1:0];
    fy = my[FRAC-1:0];
    nx = 18'(sx) + $signed({17'b0, idx[0]});
    ny = 18'(sy) + $signed({17'b0, idx[1]});
    in_frame  = (nx >= 0) && (nx < $signed(18'(WIDTH))) && (ny >= 0) && (ny < $signed(18'(HEIGHT)));
    nb_addr = a_raw + ADDR_W'(ny) * WIDTH + ADDR_W'(nx);
  end

  logic [ACC_W-1:0] acc;
  always_comb begin
    acc = ACC_W'(nb[0]) * ACC_W'(S - fx) * ACC_W'(S - fy)
        + ACC_W'(nb[1]) * ACC_W'(fx)     * ACC_W'(S - fy)
        + ACC_W'(nb[2]) * ACC_W'(S - fx) * ACC_W'(fy)
        + ACC_W'(nb[3]) * ACC_W'(fx)     * ACC_W'(fy)
        + ACC_W'(S * S / 2);
  end

  always_comb begin
    req_valid = (state == S_MREQ) || (state == S_PREQ && in_frame) || (state == S_WR);
    req       = '0;
    unique case (state)
      S_MREQ:  req.addr = a_map + (n << 2) + ADDR_W'(idx);
      S_PREQ:  req.addr = nb_addr;
      S_WR:    begin req.we = 1'b1; req.addr = a_out + n; req.wdata = result; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      busy   <= 1'b0;
      done   <= 1'b0;
      a_raw  <= '0;
      a_map  <= '0;
      a_out  <= '0;
      n      <= '0;
      idx    <= '0;
      result <= '0;
      for (int i = 0; i < 4; i++) begin mbytes[i] <= '0; nb[i] <= '0; end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          a_raw <= addr_raw;
          a_map <= addr_map;
          a_out <= addr_out;
          n     <= '0;
          idx   <= '0;
          busy  <= 1'b1;
          state <= S_MREQ;
        end
        S_MREQ:  if (req_ready) state <= S_MWAIT;
        S_MWAIT: if (rsp_valid) begin
          mbytes[idx] <= rsp_rdata;
          idx         <= idx + 1'b1;
          state       <= (idx == 2'd3) ? S_PREQ : S_MREQ;
        end
        S_PREQ: begin
          // neighbours outside the frame are zero and are not fetched
          if (!in_frame) begin
            nb[idx] <= '0;
            idx     <= idx + 1'b1;
            if (idx == 2'd3) state <= S_CALC;
          end else if (req_ready) begin
            state <= S_PWAIT;
          end
        end
        S_PWAIT: if (rsp_valid) begin
          nb[idx] <= rsp_rdata;
          idx     <= idx + 1'b1;
          state   <= (idx == 2'd3) ? S_CALC : S_PREQ;
        end
        S_CALC: begin
          result <= acc[2*FRAC +: 8];
          state  <= S_WR;
        end
        S_WR: if (req_ready) begin
          if (n == NPIX - 1) begin
            busy  <= 1'b0;
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            n     <= n + 1'b1;
            state <= S_MREQ;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
