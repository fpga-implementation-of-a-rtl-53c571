// tb_vga_display: VGA timing and pixel output from a frame in memory.
//
// A reduced timing (8x4 visible, 16x8 total, a pixel every 2 clocks) keeps the
// run short.  Every pixel period of three frames is compared with a model of
// the timing: sync pulses at their positions and, in the visible area, the
// grey level of the stored byte shifted left by 2.  A second instance behind
// a memory with a 40-cycle latency must raise the underflow flag, the first
// must not.
module tb_vga_display;
  import stereo_pkg::*;
  localparam int HV = 8, HF = 2, HS = 3, HB = 3, VV = 4, VF = 1, VS = 2, VB = 1, DIV = 2;
  localparam int HT = HV + HF + HS + HB, VT = VV + VF + VS + VB;
  localparam int BASE = 'h100;

  logic clk = 0, rst_n = 1, start = 0;
  logic busy, req_valid, req_ready, rsp_valid, hs, vs, underflow;
  logic [3:0] r, g, b;
  mem_req_t req;
  logic [7:0] rsp_rdata;
  logic busy2, req_valid2, req_ready2, rsp_valid2, hs2, vs2, underflow2;
  logic [3:0] r2, g2, b2;
  mem_req_t req2;
  logic [7:0] rsp_rdata2;
  int checks = 0, failures = 0;

  vga_display #(.H_VIS(HV), .H_FP(HF), .H_SYNC(HS), .H_BP(HB), .V_VIS(VV), .V_FP(VF),
                .V_SYNC(VS), .V_BP(VB), .CLK_DIV(DIV), .SHIFT(2)) dut (
    .clk, .rst_n, .start, .busy, .addr_frame(32'(BASE)), .req_valid, .req_ready, .req,
    .rsp_valid, .rsp_rdata, .vga_hs(hs), .vga_vs(vs), .vga_r(r), .vga_g(g), .vga_b(b), .underflow);
  ddr_model #(.AW(12), .LAT(3), .STALL(1)) ddr (.clk, .req_valid, .req_ready, .req,
                                               .rsp_valid, .rsp_rdata);

  vga_display #(.H_VIS(HV), .H_FP(HF), .H_SYNC(HS), .H_BP(HB), .V_VIS(VV), .V_FP(VF),
                .V_SYNC(VS), .V_BP(VB), .CLK_DIV(DIV), .SHIFT(2)) slow (
    .clk, .rst_n, .start, .busy(busy2), .addr_frame(32'(BASE)), .req_valid(req_valid2),
    .req_ready(req_ready2), .req(req2), .rsp_valid(rsp_valid2), .rsp_rdata(rsp_rdata2),
    .vga_hs(hs2), .vga_vs(vs2), .vga_r(r2), .vga_g(g2), .vga_b(b2), .underflow(underflow2));
  ddr_model #(.AW(12), .LAT(40)) ddr2 (.clk, .req_valid(req_valid2), .req_ready(req_ready2),
                                       .req(req2), .rsp_valid(rsp_valid2), .rsp_rdata(rsp_rdata2));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] frame [VV*HV];
  int tick = 0;

  // one comparison per pixel period, after the outputs have been updated
  always @(posedge clk) if (dut.pix_en) begin
    automatic int t = tick, h, v;
    automatic logic ehs, evs;
    automatic logic [3:0] ec;
    automatic logic [7:0] sh;
    tick++;
    h = t % HT;
    v = (VT - 1 + t / HT) % VT;
    ehs = !(h >= HV + HF && h < HV + HF + HS);
    evs = !(v >= VV + VF && v < VV + VF + VS);
    sh = (h < HV && v < VV) ? frame[v*HV + h] << 2 : 8'd0;
    ec = sh[7:4];
    #1;
    if (t < 3 * HT * VT) begin
      checks++;
      if (hs !== ehs || vs !== evs || r !== ec || g !== ec || b !== ec) begin
        failures++;
        if (failures < 10) $display("tick %0d (h %0d v %0d): hs %b vs %b r %h, expected %b %b %h",
                                    t, h, v, hs, vs, r, ehs, evs, ec);
      end
    end
  end

  initial begin
    for (int i = 0; i < VV*HV; i++) begin
      frame[i] = 8'($urandom_range(0, 63));
      ddr.mem[BASE + i] = frame[i];
      ddr2.mem[BASE + i] = frame[i];
    end
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (tick >= 3 * HT * VT + 2);
    checks++;
    if (underflow) begin failures++; $display("unexpected underflow"); end
    checks++;
    if (!underflow2) begin failures++; $display("slow memory did not underflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
