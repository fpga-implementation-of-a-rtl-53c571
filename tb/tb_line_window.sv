// tb_line_window: window contents against the zero-padded raster definition.
//
// Streams two frames of random pixels (12-pixel rows, 5x5 window) with random
// gaps between pixels, and after every accepted pixel k compares the whole
// window with P[k - (4-i)*12 - (4-j)], zero for indices before the frame.
// The `clear` between frames must empty the window and the line buffers.
module tb_line_window;
  localparam int W = 12, WIN = 5, NPIX = 7 * W;

  logic clk = 0, rst_n = 1, clear = 0, in_valid = 0;
  logic [7:0] in_pix = 0;
  logic [7:0] win [WIN][WIN];
  int checks = 0, failures = 0;

  line_window #(.WIDTH(W), .WIN(WIN), .PIX_W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int p [NPIX];

  function automatic int px(int k);
    return (k < 0) ? 0 : p[k];
  endfunction

  initial begin
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      for (int k = 0; k < NPIX; k++) p[k] = $urandom_range(1, 255);
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      for (int k = 0; k < NPIX; k++) begin
        repeat ($urandom_range(0, 2)) @(negedge clk);
        in_valid = 1; in_pix = 8'(p[k]);
        @(negedge clk) in_valid = 0;
        for (int i = 0; i < WIN; i++)
          for (int j = 0; j < WIN; j++) begin
            checks++;
            if (win[i][j] != 8'(px(k - (WIN-1-i)*W - (WIN-1-j)))) begin
              failures++;
              if (failures < 10) $display("frame %0d pixel %0d win[%0d][%0d]=%0d expected %0d",
                                          f, k, i, j, win[i][j], px(k - (WIN-1-i)*W - (WIN-1-j)));
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
