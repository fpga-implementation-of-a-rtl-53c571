// axil_bfm: AXI4-Lite master bus-functional model for testbenches.
//
// `write(addr, data, resp)` drives address and data together and waits for
// the response; `read(addr, data, resp)` issues a read and returns the data.
// Transactions are serialised; all signals change on the falling clock edge.
module axil_bfm
  import stereo_pkg::*;
(
  input  logic      clk,
  output axil_req_t req,
  input  axil_rsp_t rsp
);

  initial req = '0;

  task automatic write(input logic [11:0] addr, input logic [31:0] data, output logic [1:0] resp);
    bit aw_done = 0, w_done = 0;
    @(negedge clk);
    req.awvalid = 1; req.awaddr = addr;
    req.wvalid  = 1; req.wdata  = data; req.wstrb = 4'hF;
    req.bready  = 1;
    while (!(aw_done && w_done)) begin
      @(posedge clk);
      if (rsp.awready) aw_done = 1;
      if (rsp.wready)  w_done  = 1;
      @(negedge clk);
      if (aw_done) req.awvalid = 0;
      if (w_done)  req.wvalid  = 0;
    end
    while (!rsp.bvalid) @(negedge clk);
    resp = rsp.bresp;
    @(posedge clk);
    @(negedge clk);
    req.bready = 0;
  endtask

  task automatic read(input logic [11:0] addr, output logic [31:0] data, output logic [1:0] resp);
    @(negedge clk);
    req.arvalid = 1; req.araddr = addr; req.rready = 1;
    do @(posedge clk); while (!rsp.arready);
    @(negedge clk);
    req.arvalid = 0;
    while (!rsp.rvalid) @(negedge clk);
    data = rsp.rdata;
    resp = rsp.rresp;
    @(posedge clk);
    @(negedge clk);
    req.rready = 0;
  endtask

endmodule
