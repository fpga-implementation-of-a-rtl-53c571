// census_transform: census vector of a WIN x WIN window.
//
// Every window element is compared with the centre element; the bit is 1 when
// the element is larger than the centre and 0 otherwise, as the census
// transform is defined in the design.  The vector keeps one bit per window
// element, the centre included (always 0), so an 11x11 window gives the
// 121-bit vector the design mentions.
// Bit i*WIN+j belongs to window row i, column j.  Purely combinational.
module census_transform #(
  parameter int unsigned WIN   = stereo_pkg::SGM_WIN,
  parameter int unsigned PIX_W = stereo_pkg::PIX_W
) (
  input  logic [PIX_W-1:0]   win [WIN][WIN],
  output logic [WIN*WIN-1:0] vec
);

  localparam int unsigned C = WIN / 2;

  always_comb begin
    for (int i = 0; i < WIN; i++)
      for (int j = 0; j < WIN; j++)
        vec[i*WIN + j] = (win[i][j] > win[C][C]);
  end

endmodule
