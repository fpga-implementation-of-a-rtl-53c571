// tb_ov7670_capture: luminance capture from a modelled OV7670 stream.
//
// A camera model sends an armed-for frame of 8x4 pixels (Cb Y Cr Y bytes while
// HREF is high, VSYNC pulses between frames, PCLK at 1/8 of the system clock)
// with random chroma bytes.  The stored frame must hold exactly the Y bytes,
// `done` must pulse once, and a frame sent before arming must be ignored.  A
// second instance whose memory never accepts must report overflow.
module tb_ov7670_capture;
  import stereo_pkg::*;
  localparam int W = 8, H = 4, BASE = 'h40;

  logic clk = 0, rst_n = 1, start = 0, busy, done, overflow;
  logic pclk = 0, vsync = 1, href = 0;
  logic [7:0] data = 0;
  logic req_valid, req_ready, rsp_valid;
  mem_req_t req;
  logic [7:0] rsp_rdata;
  logic [31:0] pixels;
  logic busy2, done2, overflow2, req_valid2;
  mem_req_t req2;
  logic [31:0] pixels2;
  int checks = 0, failures = 0, dones = 0;

  ov7670_capture dut (.clk, .rst_n, .start, .busy, .done, .addr_frame(32'(BASE)),
    .cam_pclk(pclk), .cam_vsync(vsync), .cam_href(href), .cam_data(data),
    .req_valid, .req_ready, .req, .overflow, .pixels);
  ddr_model #(.AW(12), .LAT(2), .STALL(1)) ddr (.clk, .req_valid, .req_ready, .req,
                                               .rsp_valid, .rsp_rdata);
  ov7670_capture blocked (.clk, .rst_n, .start, .busy(busy2), .done(done2), .addr_frame(32'(BASE)),
    .cam_pclk(pclk), .cam_vsync(vsync), .cam_href(href), .cam_data(data),
    .req_valid(req_valid2), .req_ready(1'b0), .req(req2), .overflow(overflow2), .pixels(pixels2));

  always #5 clk = ~clk;
  always @(posedge clk) if (done) dones++;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] y [H*W];

  // one PCLK period: 4 system clocks high, 4 low; data changes on the fall
  task automatic pclk_cycle(logic v, logic hr, logic [7:0] d);
    vsync = v; href = hr; data = d;
    repeat (4) @(posedge clk);
    pclk = 1;
    repeat (4) @(posedge clk);
    pclk = 0;
  endtask

  task automatic send_frame();
    for (int i = 0; i < 6; i++) pclk_cycle(1, 0, 8'($urandom));
    for (int i = 0; i < 4; i++) pclk_cycle(0, 0, 8'($urandom));
    for (int l = 0; l < H; l++) begin
      for (int i = 0; i < 2 * W; i++)
        pclk_cycle(0, 1, (i % 2 == 1) ? y[l*W + i/2] : 8'($urandom));
      for (int i = 0; i < 5; i++) pclk_cycle(0, 0, 8'($urandom));
    end
    for (int i = 0; i < 6; i++) pclk_cycle(1, 0, 8'($urandom));
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // a frame before arming is ignored
    for (int i = 0; i < H*W; i++) y[i] = 8'hAA;
    send_frame();
    for (int i = 0; i < H*W; i++) y[i] = 8'($urandom);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    send_frame();
    repeat (20) @(posedge clk);
    for (int i = 0; i < H*W; i++) begin
      checks++;
      if (ddr.mem[BASE + i] != y[i]) begin
        failures++;
        if (failures < 10) $display("pixel %0d: %h expected %h", i, ddr.mem[BASE + i], y[i]);
      end
    end
    checks++;
    if (ddr.mem[BASE + H*W] != 8'h00 || ddr.mem[BASE - 1] != 8'h00) begin
      failures++; $display("write outside the frame");
    end
    checks++;
    if (dones != 1 || busy || pixels != H*W) begin
      failures++; $display("dones %0d busy %b pixels %0d", dones, busy, pixels);
    end
    checks++;
    if (overflow || !overflow2) begin failures++; $display("overflow flags %b %b", overflow, overflow2); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
