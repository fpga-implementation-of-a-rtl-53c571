// tb_axil_regs: register file behaviour seen from the AXI4-Lite side.
//
// Checks write/read-back of every configuration register and its presence on
// `cfg`, SLVERR outside the file, the start pulse and its deferral while the
// peripheral is busy, the done flag and its clear-on-read, the idle bit, and
// repeated starts under auto restart.  A small model stands in for the
// peripheral: busy for 20 cycles after each start, then a done pulse.
module tb_axil_regs;
  import stereo_pkg::*;
  localparam int NREG = 8;

  logic clk = 0, rst_n = 1, start, busy = 0, done = 0;
  axil_req_t axi_req;
  axil_rsp_t axi_rsp;
  logic [NREG-1:0][31:0] cfg;
  int checks = 0, failures = 0, starts = 0, busy_starts = 0;

  axil_regs #(.NREG(NREG)) dut (.*);
  axil_bfm bfm (.clk, .req(axi_req), .rsp(axi_rsp));

  always #5 clk = ~clk;

  // peripheral model
  always @(posedge clk) begin
    done <= 0;
    if (start) begin
      starts++;
      if (busy) busy_starts++;
    end
    if (start && !busy) begin
      busy <= 1;
      fork begin repeat (20) @(posedge clk); busy <= 0; done <= 1; end join_none
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    logic [31:0] d, vals [NREG];
    logic [1:0] r;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 1; i < NREG; i++) begin
      vals[i] = $urandom;
      bfm.write(12'(4*i), vals[i], r);
      check("write resp", 32'(r), 0);
    end
    for (int i = 1; i < NREG; i++) begin
      bfm.read(12'(4*i), d, r);
      check("read back", d, vals[i]);
      check("cfg port", cfg[i], vals[i]);
    end
    bfm.write(12'h100, 32'h1234, r);
    check("write outside", 32'(r), 2);
    bfm.read(12'h100, d, r);
    check("read outside", 32'(r), 2);
    bfm.read(REG_CTRL, d, r);
    check("idle at reset", d, 32'h4);
    // single start
    bfm.write(REG_CTRL, 32'h1, r);
    repeat (3) @(posedge clk);
    check("one start", 32'(starts), 1);
    bfm.read(REG_CTRL, d, r);
    check("busy: not idle", 32'(d[2]), 0);
    // start requested while busy waits for the end
    bfm.write(REG_CTRL, 32'h1, r);
    wait (starts == 2);
    check("second start only after done", 32'(busy_starts), 0);
    wait (!busy);
    @(negedge clk);
    bfm.read(REG_CTRL, d, r);
    check("done flag", 32'(d[1]), 1);
    bfm.read(REG_CTRL, d, r);
    check("done cleared on read", 32'(d[1]), 0);
    // auto restart
    bfm.write(REG_CTRL, 32'h81, r);
    repeat (100) @(posedge clk);
    checks++;
    if (starts < 5) begin failures++; $display("auto restart: only %0d starts", starts); end
    bfm.write(REG_CTRL, 32'h0, r);
    wait (!busy);
    repeat (30) @(posedge clk);
    begin
      automatic int s = starts;
      repeat (60) @(posedge clk);
      check("auto restart off", 32'(starts), 32'(s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
