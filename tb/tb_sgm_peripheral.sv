// tb_sgm_peripheral: two-section SGM run through the memory port.
//
// A 16x12 image pair is placed in the memory model (which stalls at random).
// The peripheral (5x5 window, 6 disparities) is started twice, once per
// section of 6 rows, each section read with 2 extra rows at its inner border
// as the sectioning scheme requires.  Every written disparity is compared with
// the reference model run on the rows each section reads, rows outside a
// section's output range must stay untouched, and `done` must pulse once per
// section.
module tb_sgm_peripheral;
  import stereo_pkg::*;
  localparam int W = 16, H = 12, WIN = 5, D = 6, R = WIN / 2, HS = H / 2;
  localparam int AL = 'h0000, AR = 'h1000, AD = 'h2000;

  logic clk = 0, rst_n = 1, start = 0, busy, done;
  logic [ADDR_W-1:0] addr_left = AL, addr_right = AR, addr_disp = AD;
  logic [15:0] in_row0, in_rows, out_skip, out_rows;
  logic req_valid, req_ready, rsp_valid, clamp_event;
  mem_req_t req;
  logic [7:0] rsp_rdata;
  int checks = 0, failures = 0, dones = 0;

  sgm_peripheral #(.WIDTH(W), .WIN(WIN), .D(D)) dut (.*);
  ddr_model #(.AW(16), .LAT(4), .STALL(1)) ddr (.clk, .req_valid, .req_ready, .req,
                                                .rsp_valid, .rsp_rdata);

  always #5 clk = ~clk;
  always @(posedge clk) if (done) dones++;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned imgl[], imgr[], sl[], sr[];
  int disp[], clamp[];

  task automatic run_section(int row0, int rows, int skip, int nout);
    in_row0 = 16'(row0); in_rows = 16'(rows); out_skip = 16'(skip); out_rows = 16'(nout);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (busy);
    wait (!busy);
    repeat (2) @(negedge clk);
    sl = new[rows * W]; sr = new[rows * W];
    for (int i = 0; i < rows * W; i++) begin sl[i] = imgl[row0 * W + i]; sr[i] = imgr[row0 * W + i]; end
    sgm_ref_pkg::sgm(W, rows, WIN, D, SGM_P1, SGM_P2, SUM_W, sl, sr, disp, clamp);
    for (int y = skip; y < skip + nout; y++)
      for (int x = 0; x < W; x++) begin
        checks++;
        if (ddr.mem[AD + (row0 + y) * W + x] != 8'(disp[y * W + x])) begin
          failures++;
          if (failures < 10) $display("row %0d col %0d: %0d expected %0d", row0 + y, x,
                                      ddr.mem[AD + (row0 + y) * W + x], disp[y * W + x]);
        end
      end
  endtask

  initial begin
    imgl = new[W * H]; imgr = new[W * H];
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        imgl[y*W+x] = 8'($urandom_range(0, 255));
      end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        imgr[y*W+x] = (x + 2 < W) ? imgl[y*W+x+2] : 8'($urandom_range(0, 255));
    for (int i = 0; i < W * H; i++) begin
      ddr.mem[AL + i] = imgl[i];
      ddr.mem[AR + i] = imgr[i];
      ddr.mem[AD + i] = 8'hEE;
    end
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_section(0, HS + R, 0, HS);
    // the second half must still be untouched
    for (int i = HS * W; i < H * W; i++) begin
      checks++;
      if (ddr.mem[AD + i] != 8'hEE) begin failures++; $display("stray write at %0d", i); break; end
    end
    run_section(HS - R, HS + R, R, HS);
    checks++;
    if (dones != 2) begin failures++; $display("done pulsed %0d times", dones); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
