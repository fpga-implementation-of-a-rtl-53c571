// sgm_core: census-based semi-global matching over a raster pixel stream.
//
// For every pixel of the left (reference) image the core finds the disparity
// d in 0..D-1 that minimises the SGM cost, in three steps:
//   1. Matching cost C(p,d): Hamming distance between the census vector of the
//      left pixel and that of the right pixel d positions to its left.  The
//      left and right census vectors come from two line_window +
//      census_transform pairs; the last D right vectors are kept in a shift
//      register (`rhist`).
//   2. Aggregation along four paths: top-left (0), top (1), top-right (2) and
//      left (3), each with the recursion of sgm_path_cost.  The previous row's
//      aggregated costs of paths 0..2 live in `cost_row` (a WIDTH*D-entry
//      RAM, one 3-path word per column and disparity); the previous pixel's
//      four paths live in `cost_left`.  While pixel x is processed, column x-1
//      of `cost_row` is overwritten with `cost_left` (that row-above entry is
//      no longer needed) and `cost_left` receives the new costs; the left path
//      is never written to `cost_row`.  Neighbours outside the image (top row,
//      first and last column) count as maximum cost, so their paths drop out.
//   3. The four path costs are added, the sum is bounded to 2**SUM_W-1, and
//      the index of the smallest bounded sum (lowest d on ties) is the output.
// This follows the design's algorithm and data layout.  Own choices: the RAM is
// read through three column register copies (columns x-1, x, x+1, plus
// column x+2 being prefetched), and the minimum of each column's costs is
// computed while the column is loaded instead of being stored separately.
//
// Timing: like the design's matcher, one disparity is evaluated per clock, so
// a pixel takes D+4 cycles, and each image row adds 2*D+1 cycles to preload
// the first two columns of `cost_row`.
//
// Stream conventions: pixels (left/right pairs) arrive in raster order with a
// valid/ready handshake after a `frame_start` pulse.  The image is a linear
// sequence that is zero before its first pixel; windows wrap across row ends.
// Output n (valid/ready) is the disparity of pixel n; it becomes available
// once the pixel WIN/2 rows and WIN/2 columns further on has been accepted,
// so the source must append WIN/2*WIDTH+WIN/2 padding pixels (zero) after
// the last image pixel to obtain the last outputs.  `out_clamp` flags a pixel
// for which the bound on the summed cost took effect.
module sgm_core #(
  parameter int unsigned WIDTH  = stereo_pkg::IMG_W,
  parameter int unsigned WIN    = stereo_pkg::SGM_WIN,
  parameter int unsigned D      = stereo_pkg::SGM_D,
  parameter int unsigned PIX_W  = stereo_pkg::PIX_W,
  parameter int unsigned COST_W = stereo_pkg::COST_W,
  parameter int unsigned SUM_W  = stereo_pkg::SUM_W,
  parameter int unsigned P1     = stereo_pkg::SGM_P1,
  parameter int unsigned P2     = stereo_pkg::SGM_P2,
  parameter int unsigned DISP_W = $clog2(D)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              frame_start,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [PIX_W-1:0]  in_left,
  input  logic [PIX_W-1:0]  in_right,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [DISP_W-1:0] out_disp,
  output logic              out_clamp
);

  localparam int unsigned N      = WIN * WIN;
  localparam int unsigned C_W    = $clog2(N + 1);
  localparam int unsigned R      = WIN / 2;
  localparam int unsigned LAG    = R * WIDTH + R;
  localparam int unsigned LAG_W  = $clog2(LAG + 1);
  localparam int unsigned X_W    = $clog2(WIDTH);
  localparam int unsigned D_W    = $clog2(D);
  localparam int unsigned PRE_W  = $clog2(2 * D + 1);
  localparam int unsigned RAM_AW = $clog2(WIDTH * D);
  localparam int unsigned TOT_W  = COST_W + 2;
  localparam logic [COST_W-1:0] CMAX = '1;
  localparam logic [TOT_W-1:0]  SMAX = TOT_W'(2 ** SUM_W - 1);

  typedef logic [2:0][COST_W-1:0] row3_t;   // paths 0..2 of one disparity
  typedef logic [3:0][COST_W-1:0] left4_t;  // paths 0..3 of one disparity

  typedef enum logic [2:0] {S_ACCEPT, S_CENSUS, S_PRE, S_PIX, S_DRAIN, S_FIN} state_t;
  state_t state;

  // ---------------------------------------------------------------- census
  logic [PIX_W-1:0] win_l [WIN][WIN];
  logic [PIX_W-1:0] win_r [WIN][WIN];
  logic [N-1:0]     cen_l, cen_r;
  logic             accept;

  assign in_ready = (state == S_ACCEPT);
  assign accept   = in_valid && in_ready;

  line_window #(.WIDTH(WIDTH), .WIN(WIN), .PIX_W(PIX_W)) u_win_l (
    .clk, .rst_n, .clear(frame_start), .in_valid(accept), .in_pix(in_left), .win(win_l));
  line_window #(.WIDTH(WIDTH), .WIN(WIN), .PIX_W(PIX_W)) u_win_r (
    .clk, .rst_n, .clear(frame_start), .in_valid(accept), .in_pix(in_right), .win(win_r));

  census_transform #(.WIN(WIN), .PIX_W(PIX_W)) u_cen_l (.win(win_l), .vec(cen_l));
  census_transform #(.WIN(WIN), .PIX_W(PIX_W)) u_cen_r (.win(win_r), .vec(cen_r));

  logic [N-1:0] cl;            // census of the current left pixel
  logic [N-1:0] rhist [D];     // rhist[d]: census of the right pixel d to the left

  // ---------------------------------------------------------------- state
  logic [LAG_W-1:0] in_cnt;    // accepted pixels, saturating at LAG
  logic [X_W-1:0]   x;
  logic             first_row;
  logic [D_W-1:0]   d;
  logic [PRE_W-1:0] pre_cnt;

  // Column registers of cost_row and cost_left
  row3_t  c_tl [D], c_t [D], c_tr [D], c_nx [D];
  row3_t  m_tl, m_t, m_tr, m_nx;               // per-path minima of the columns
  left4_t cl_old [D], cl_new [D];
  logic [COST_W-1:0] ml_old, ml_new;           // minima of the left path

  logic [TOT_W-1:0]  best;
  logic [DISP_W-1:0] best_d;
  logic              clamp_seen;

  // ---------------------------------------------------------------- cost_row RAM
  row3_t              ram [WIDTH*D];
  row3_t              ram_q;
  logic               ram_re, ram_we;
  logic [RAM_AW-1:0]  ram_ra, ram_wa;
  row3_t              ram_wd;

  always_ff @(posedge clk) begin
    if (ram_we) ram[ram_wa] <= ram_wd;
    if (ram_re) ram_q <= ram[ram_ra];
  end

  // Where the word read this cycle goes next cycle
  typedef enum logic [1:0] {CAP_T, CAP_TR, CAP_NX} cap_t;
  logic           cap_en;
  cap_t           cap_sel;
  logic [D_W-1:0] cap_idx;

  // ---------------------------------------------------------------- per-disparity datapath
  logic [C_W-1:0]    cost;
  logic [COST_W-1:0] p0 [4], pm [4], pp [4], pmin [4];
  logic [COST_W-1:0] lnew [4];
  logic [TOT_W-1:0]  sum, sum_b;
  logic              force_tl, force_t, force_tr, force_l;
  logic [D_W-1:0]    dm1, dp1;

  census_cost #(.N(N), .COST_W(C_W)) u_cost (.a(cl), .b(rhist[d]), .cost(cost));

  always_comb begin
    force_tl = first_row || (x == '0);
    force_t  = first_row;
    force_tr = first_row || (x == X_W'(WIDTH - 1));
    force_l  = (x == '0);
    dm1 = (d == '0) ? d : d - 1'b1;
    dp1 = (d == D_W'(D - 1)) ? d : d + 1'b1;
    p0[0] = c_tl[d][0];  pm[0] = c_tl[dm1][0];  pp[0] = c_tl[dp1][0];  pmin[0] = m_tl[0];
    p0[1] = c_t[d][1];   pm[1] = c_t[dm1][1];   pp[1] = c_t[dp1][1];   pmin[1] = m_t[1];
    p0[2] = c_tr[d][2];  pm[2] = c_tr[dm1][2];  pp[2] = c_tr[dp1][2];  pmin[2] = m_tr[2];
    p0[3] = cl_old[d][3]; pm[3] = cl_old[dm1][3]; pp[3] = cl_old[dp1][3]; pmin[3] = ml_old;
    if (force_tl) begin p0[0] = CMAX; pm[0] = CMAX; pp[0] = CMAX; pmin[0] = CMAX; end
    if (force_t)  begin p0[1] = CMAX; pm[1] = CMAX; pp[1] = CMAX; pmin[1] = CMAX; end
    if (force_tr) begin p0[2] = CMAX; pm[2] = CMAX; pp[2] = CMAX; pmin[2] = CMAX; end
    if (force_l)  begin p0[3] = CMAX; pm[3] = CMAX; pp[3] = CMAX; pmin[3] = CMAX; end
  end

  for (genvar r = 0; r < 4; r++) begin : g_path
    sgm_path_cost #(.C_W(C_W), .COST_W(COST_W), .P1(P1), .P2(P2)) u_path (
      .c(cost), .prev_0(p0[r]), .prev_m1(pm[r]), .prev_p1(pp[r]),
      .has_m1(d != '0), .has_p1(d != D_W'(D - 1)), .prev_min(pmin[r]), .l(lnew[r]));
  end

  always_comb begin
    sum   = TOT_W'(lnew[0]) + TOT_W'(lnew[1]) + TOT_W'(lnew[2]) + TOT_W'(lnew[3]);
    sum_b = (sum > SMAX) ? SMAX : sum;
  end

  // ---------------------------------------------------------------- RAM port control
  always_comb begin
    ram_re = 1'b0;
    ram_ra = '0;
    ram_we = 1'b0;
    ram_wa = '0;
    ram_wd = '0;
    if (state == S_PRE) begin
      // read columns 0 and 1; write the previous row's last pixel to column WIDTH-1
      if (pre_cnt < PRE_W'(2 * D)) begin
        ram_re = 1'b1;
        ram_ra = RAM_AW'(pre_cnt);
      end
      if (pre_cnt < PRE_W'(D) && !first_row) begin
        ram_we = 1'b1;
        ram_wa = RAM_AW'((WIDTH - 1) * D) + RAM_AW'(pre_cnt);
        ram_wd = row3_t'(cl_old[pre_cnt[D_W-1:0]][2:0]);
      end
    end else if (state == S_PIX) begin
      if (32'(x) + 2 < WIDTH) begin
        ram_re = 1'b1;
        ram_ra = RAM_AW'((32'(x) + 2) * D) + RAM_AW'(d);
      end
      if (x != '0) begin
        ram_we = 1'b1;
        ram_wa = RAM_AW'((32'(x) - 1) * D) + RAM_AW'(d);
        ram_wd = row3_t'(cl_old[d][2:0]);
      end
    end
  end

  function automatic row3_t min3(row3_t a, row3_t b);
    row3_t m;
    for (int p = 0; p < 3; p++) m[p] = (b[p] < a[p]) ? b[p] : a[p];
    return m;
  endfunction

  // ---------------------------------------------------------------- control
  assign out_valid = (state == S_FIN);
  assign out_disp  = best_d;
  assign out_clamp = clamp_seen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_ACCEPT;
      in_cnt     <= '0;
      x          <= '0;
      first_row  <= 1'b1;
      d          <= '0;
      pre_cnt    <= '0;
      cap_en     <= 1'b0;
      cap_sel    <= CAP_T;
      cap_idx    <= '0;
      best       <= '0;
      best_d     <= '0;
      clamp_seen <= 1'b0;
      cl         <= '0;
      ml_old     <= CMAX;
      ml_new     <= CMAX;
      m_tl       <= '1;
      m_t        <= '1;
      m_tr       <= '1;
      m_nx       <= '1;
      for (int i = 0; i < D; i++) rhist[i] <= '0;
    end else begin
      // capture of the RAM word read in the previous cycle
      cap_en <= 1'b0;
      if (cap_en) begin
        unique case (cap_sel)
          CAP_T:  begin c_t[cap_idx]  <= ram_q; m_t  <= (cap_idx == '0) ? ram_q : min3(m_t, ram_q);  end
          CAP_TR: begin c_tr[cap_idx] <= ram_q; m_tr <= (cap_idx == '0) ? ram_q : min3(m_tr, ram_q); end
          default: begin c_nx[cap_idx] <= ram_q; m_nx <= (cap_idx == '0) ? ram_q : min3(m_nx, ram_q); end
        endcase
      end

      if (frame_start) begin
        state     <= S_ACCEPT;
        in_cnt    <= '0;
        x         <= '0;
        first_row <= 1'b1;
        cap_en    <= 1'b0;
        for (int i = 0; i < D; i++) rhist[i] <= '0;
      end else begin
        unique case (state)
          S_ACCEPT: if (accept) begin
            if (in_cnt == LAG_W'(LAG)) state <= S_CENSUS;
            else                       in_cnt <= in_cnt + 1'b1;
          end
          S_CENSUS: begin
            cl       <= cen_l;
            rhist[0] <= cen_r;
            for (int i = 1; i < D; i++) rhist[i] <= rhist[i-1];
            pre_cnt  <= '0;
            d        <= '0;
            state    <= (x == '0) ? S_PRE : S_PIX;
          end
          S_PRE: begin
            if (pre_cnt < PRE_W'(2 * D)) begin
              cap_en  <= 1'b1;
              cap_sel <= (pre_cnt < PRE_W'(D)) ? CAP_T : CAP_TR;
              cap_idx <= (pre_cnt < PRE_W'(D)) ? D_W'(pre_cnt) : D_W'(pre_cnt - PRE_W'(D));
            end
            pre_cnt <= pre_cnt + 1'b1;
            if (pre_cnt == PRE_W'(2 * D)) state <= S_PIX;
          end
          S_PIX: begin
            if (32'(x) + 2 < WIDTH) begin
              cap_en  <= 1'b1;
              cap_sel <= CAP_NX;
              cap_idx <= d;
            end
            cl_new[d] <= {lnew[3], lnew[2], lnew[1], lnew[0]};
            ml_new    <= (d == '0 || lnew[3] < ml_new) ? lnew[3] : ml_new;
            if (d == '0 || sum_b < best) begin
              best   <= sum_b;
              best_d <= DISP_W'(d);
            end
            clamp_seen <= (d == '0) ? (sum > SMAX) : (clamp_seen || (sum > SMAX));
            d <= d + 1'b1;
            if (d == D_W'(D - 1)) state <= S_DRAIN;
          end
          S_DRAIN: state <= S_FIN;
          S_FIN: if (out_ready) begin
            // slide the column window one pixel to the right
            for (int i = 0; i < D; i++) begin
              c_tl[i]   <= c_t[i];
              c_t[i]    <= c_tr[i];
              c_tr[i]   <= c_nx[i];
              cl_old[i] <= cl_new[i];
            end
            m_tl   <= m_t;
            m_t    <= m_tr;
            m_tr   <= m_nx;
            ml_old <= ml_new;
            if (x == X_W'(WIDTH - 1)) begin
              x         <= '0;
              first_row <= 1'b0;
            end else begin
              x <= x + 1'b1;
            end
            state <= S_ACCEPT;
          end
          default: state <= S_ACCEPT;
        endcase
      end
    end
  end

endmodule
