// line_window: sliding WIN x WIN pixel window over a raster-order pixel stream.
//
// WIN-1 line buffers, each WIDTH pixels deep, delay the stream by whole rows;
// together with the incoming pixel they form one window column, which is
// shifted into a WIN x WIN register array.  This is the usual FPGA structure
// for window-based matching; the design only states that windows are formed
// around each pixel.
//
// The frame is treated as one linear raster sequence P[k] that is zero before
// the first pixel.  After the pixel with index k has been accepted,
//   win[i][j] = P[k - (WIN-1-i)*WIDTH - (WIN-1-j)]
// so the window centre (i = j = WIN/2) is the pixel WIN/2 rows and WIN/2
// columns behind the newest one.  Columns are not clamped at the row edges:
// near the left/right border the window wraps onto the neighbouring row,
// which only affects the border pixels whose disparities are invalid anyway.
//
// Interface: `clear` (one cycle, before a frame) empties the window and marks
// the line buffers empty; `in_valid` accepts `in_pix`.  The window is
// registered and updates on the cycle after a pixel is accepted.
module line_window #(
  parameter int unsigned WIDTH = stereo_pkg::IMG_W,
  parameter int unsigned WIN   = stereo_pkg::SGM_WIN,
  parameter int unsigned PIX_W = stereo_pkg::PIX_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             in_valid,
  input  logic [PIX_W-1:0] in_pix,
  output logic [PIX_W-1:0] win [WIN][WIN]
);

  localparam int unsigned COL_W  = (WIDTH > 1) ? $clog2(WIDTH) : 1;
  localparam int unsigned FILL   = (WIN - 1) * WIDTH;
  localparam int unsigned FILL_W = $clog2(FILL + 1);

  logic [PIX_W-1:0]  lb [WIN-1][WIDTH];   // lb[l][c] = P[k-(l+1)*WIDTH]
  logic [COL_W-1:0]  col;
  logic [FILL_W-1:0] seen;                // pixels accepted, saturating at FILL
  logic [PIX_W-1:0]  col_in [WIN];        // new window column, top row first

  always_comb begin
    col_in[WIN-1] = in_pix;
    for (int l = 0; l < WIN - 1; l++) begin
      if (FILL_W'(seen) >= FILL_W'((l + 1) * WIDTH))
        col_in[WIN-2-l] = lb[l][col];
      else
        col_in[WIN-2-l] = '0;
    end
  end

  // Line buffers: read-before-write chain, one write per buffer per pixel
  always_ff @(posedge clk) begin
    if (in_valid) begin
      lb[0][col] <= in_pix;
      for (int l = 1; l < WIN - 1; l++)
        lb[l][col] <= lb[l-1][col];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col  <= '0;
      seen <= '0;
      for (int i = 0; i < WIN; i++)
        for (int j = 0; j < WIN; j++)
          win[i][j] <= '0;
    end else if (clear) begin
      col  <= '0;
      seen <= '0;
      for (int i = 0; i < WIN; i++)
        for (int j = 0; j < WIN; j++)
          win[i][j] <= '0;
    end else if (in_valid) begin
      col <= (col == COL_W'(WIDTH - 1)) ? '0 : col + 1'b1;
      if (seen != FILL_W'(FILL))
        seen <= seen + 1'b1;
      for (int i = 0; i < WIN; i++) begin
        for (int j = 0; j < WIN - 1; j++)
          win[i][j] <= win[i][j+1];
        win[i][WIN-1] <= col_in[i];
      end
    end
  end

endmodule
