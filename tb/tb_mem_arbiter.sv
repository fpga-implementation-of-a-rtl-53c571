// tb_mem_arbiter: three masters sharing one memory port.
//
// Each master issues random reads and writes to a small address range,
// keeping requests stable until accepted.  A shadow memory updated in the
// order the arbiter accepts requests gives the data every read must return,
// and the response must reach the master that issued it.  With all masters
// busy the grants must be shared evenly (round robin), and with a long memory
// latency the read queue must fill and hold off new requests.
module tb_mem_arbiter;
  import stereo_pkg::*;
  localparam int N = 3, DEPTH = 4;

  logic clk = 0, rst_n = 1;
  logic [N-1:0] m_req_valid = '0, m_req_ready, m_rsp_valid;
  mem_req_t [N-1:0] m_req;
  logic [7:0] rsp_rdata;
  logic s_req_valid, s_req_ready, s_rsp_valid;
  mem_req_t s_req;
  logic [7:0] s_rsp_rdata;
  int checks = 0, failures = 0, full_cycles = 0;
  int grants [N];
  int reads_done [N];

  mem_arbiter #(.N(N), .DEPTH(DEPTH)) dut (.*);
  ddr_model #(.AW(8), .LAT(12), .STALL(1)) ddr (.clk, .req_valid(s_req_valid),
    .req_ready(s_req_ready), .req(s_req), .rsp_valid(s_rsp_valid), .rsp_rdata(s_rsp_rdata));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] shadow [256];
  logic [7:0] expq [N][$];

  initial m_req = '0;
  always @(posedge clk) begin
    if (dut.full && (|m_req_valid)) full_cycles++;
    for (int i = 0; i < N; i++) begin
      if (m_req_valid[i] && m_req_ready[i]) begin
        grants[i]++;
        if (m_req[i].we) shadow[m_req[i].addr[7:0]] = m_req[i].wdata;
        else expq[i].push_back(shadow[m_req[i].addr[7:0]]);
      end
      if (m_rsp_valid[i]) begin
        checks++;
        reads_done[i]++;
        if (expq[i].size() == 0) begin failures++; $display("master %0d: unexpected response", i); end
        else begin
          automatic logic [7:0] e = expq[i].pop_front();
          if (rsp_rdata != e) begin
            failures++;
            if (failures < 10) $display("master %0d read %h expected %h", i, rsp_rdata, e);
          end
        end
      end
    end
  end

  // master i: new request after the previous one is accepted
  for (genvar gi = 0; gi < N; gi++) begin : g_m
    initial begin
      wait (rst_n === 1'b1);
      repeat (400) begin
        @(negedge clk);
        m_req_valid[gi] = 1;
        m_req[gi].we    = $urandom_range(0, 2) == 0;
        m_req[gi].addr  = 32'($urandom_range(0, 255));
        m_req[gi].wdata = 8'($urandom);
        do @(posedge clk); while (!m_req_ready[gi]);
      end
      @(negedge clk) m_req_valid[gi] = 0;
    end
  end

  initial begin
    for (int a = 0; a < 256; a++) begin shadow[a] = 8'(a * 7); ddr.mem[a] = 8'(a * 7); end
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (m_req_valid == '0 && grants[0] + grants[1] + grants[2] == N * 400);
    repeat (40) @(posedge clk);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (expq[i].size() != 0) begin failures++; $display("master %0d: reads lost", i); end
    end
    checks++;
    if (full_cycles == 0) begin failures++; $display("read queue never filled"); end
    $display("grants %0d %0d %0d, reads %0d %0d %0d, full cycles %0d", grants[0], grants[1], grants[2],
             reads_done[0], reads_done[1], reads_done[2], full_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // round robin: while all three wait, no master is granted twice before the others
  int last_gnt = -1, streak = 0;
  always @(posedge clk) if (s_req_valid && s_req_ready) begin
    automatic int g = -1;
    for (int i = 0; i < N; i++) if (m_req_ready[i]) g = i;
    if (&m_req_valid && last_gnt >= 0) begin
      checks++;
      if (g != (last_gnt + 1) % N) begin
        failures++;
        if (failures < 10) $display("grant order %0d after %0d", g, last_gnt);
      end
    end
    last_gnt = g;
  end
endmodule
