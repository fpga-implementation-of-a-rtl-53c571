// ddr_model: behavioural model of the off-chip DDR memory behind the
// peripherals' memory port (testbench use only, not synthesizable).
//
// Byte-addressed array of 2**AW bytes (addresses are taken modulo that size).
// A request is accepted when req_valid and req_ready are both high; req_ready
// is high by default and drops at random when STALL is set.  Reads return
// their byte LAT cycles later on rsp_valid/rsp_rdata, in order.  The array
// `mem` is read and written directly by testbenches through hierarchical
// references to load frames and to check results.
module ddr_model
  import stereo_pkg::*;
#(
  parameter int unsigned AW    = 16,
  parameter int unsigned LAT   = 3,
  parameter bit          STALL = 1'b0
) (
  input  logic       clk,
  input  logic       req_valid,
  output logic       req_ready,
  input  mem_req_t   req,
  output logic       rsp_valid,
  output logic [7:0] rsp_rdata
);

  logic [7:0] mem [2**AW];
  logic       pipe_v [LAT];
  logic [7:0] pipe_d [LAT];
  int unsigned reads = 0, writes = 0;

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
    for (int i = 0; i < LAT; i++) begin pipe_v[i] = 1'b0; pipe_d[i] = '0; end
    req_ready = 1'b1;
  end

  always @(posedge clk) begin
    for (int i = LAT - 1; i > 0; i--) begin
      pipe_v[i] <= pipe_v[i-1];
      pipe_d[i] <= pipe_d[i-1];
    end
    pipe_v[0] <= 1'b0;
    if (req_valid && req_ready) begin
      if (req.we) begin
        mem[req.addr[AW-1:0]] <= req.wdata;
        writes++;
      end else begin
        pipe_v[0] <= 1'b1;
        pipe_d[0] <= mem[req.addr[AW-1:0]];
        reads++;
      end
    end
    if (STALL) req_ready <= ($urandom_range(0, 3) != 0);
  end

  assign rsp_valid = pipe_v[LAT-1];
  assign rsp_rdata = pipe_d[LAT-1];

endmodule
