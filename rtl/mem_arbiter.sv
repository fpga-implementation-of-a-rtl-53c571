// mem_arbiter: shares one memory port among N peripheral memory masters.
//
// Stands in for the AXI interconnect between the peripherals and the
// processor system's high-performance DDR port.  Requests are granted
// round-robin, one per cycle: the master after the last granted one has
// priority.  Reads return in order on the shared port, so the index of the
// master of every accepted read is queued in a FIFO of DEPTH entries and the
// response is routed back to that master; writes have no response.  While the
// FIFO is full no request is granted.
//
// Ports: per master m_req_valid[i]/m_req_ready[i]/m_req[i] and
// m_rsp_valid[i]/rsp_rdata (shared data); downstream s_req_valid/s_req_ready/
// s_req and s_rsp_valid/s_rsp_rdata.  The grant is combinational (no added
// latency).  A master must hold its request stable until it is accepted
// (checked by an assertion).
module mem_arbiter
  import stereo_pkg::*;
#(
  parameter int unsigned N     = 5,
  parameter int unsigned DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N-1:0]     m_req_valid,
  output logic [N-1:0]     m_req_ready,
  input  mem_req_t [N-1:0] m_req,
  output logic [N-1:0]     m_rsp_valid,
  output logic [7:0]       rsp_rdata,
  output logic             s_req_valid,
  input  logic             s_req_ready,
  output mem_req_t         s_req,
  input  logic             s_rsp_valid,
  input  logic [7:0]       s_rsp_rdata
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned PW = $clog2(DEPTH);

  logic [IW-1:0] last;             // last granted master
  logic [IW-1:0] gnt;
  logic          any;
  logic [IW-1:0] fifo [DEPTH];
  logic [PW:0]   count;
  logic [PW-1:0] wp, rp;
  logic          full, push, pop;

  always_comb begin
    any = 1'b0;
    gnt = '0;
    for (int k = 1; k <= N; k++) begin
      int unsigned c;
      c = (32'(last) + k) % N;
      if (!any && m_req_valid[c]) begin
        any = 1'b1;
        gnt = IW'(c);
      end
    end
  end

  assign full        = (count == (PW+1)'(DEPTH));
  assign s_req_valid = any && !full;
  assign s_req       = m_req[gnt];
  assign push        = s_req_valid && s_req_ready && !s_req.we;
  assign pop         = s_rsp_valid;

  always_comb begin
    m_req_ready = '0;
    if (any && !full && s_req_ready) m_req_ready[gnt] = 1'b1;
    m_rsp_valid = '0;
    if (s_rsp_valid) m_rsp_valid[fifo[rp]] = 1'b1;
  end
  assign rsp_rdata = s_rsp_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last  <= IW'(N - 1);
      count <= '0;
      wp    <= '0;
      rp    <= '0;
    end else begin
      if (s_req_valid && s_req_ready) last <= gnt;
      if (push) begin
        fifo[wp] <= gnt;
        wp <= (wp == PW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      end
      if (pop) rp <= (rp == PW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  // A response must belong to an accepted read
  assert property (@(posedge clk) disable iff (!rst_n) s_rsp_valid |-> count != 0)
    else $error("mem_arbiter: response without outstanding read");

  // Handshake rule for every master: a pending request stays stable
  for (genvar i = 0; i < N; i++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     m_req_valid[i] && !m_req_ready[i] |=> m_req_valid[i] && $stable(m_req[i]))
      else $error("mem_arbiter: master %0d changed a pending request", i);
  end

endmodule
