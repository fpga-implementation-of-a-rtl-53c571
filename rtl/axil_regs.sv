// axil_regs: AXI4-Lite register file that controls one peripheral.
//
// The processor configures a peripheral by writing its registers and starts it
// through the control register, as the design's peripherals are driven:
//   0x00 control  bit 0 start (write 1; reads 1 until the peripheral starts)
//                 bit 1 done  (set when the peripheral finishes, cleared when
//                              the control register is read)
//                 bit 2 idle  (read only)
//                 bit 7 auto restart (the peripheral is started again each
//                              time it finishes)
//   0x04 ...      NREG-1 plain 32-bit read/write registers (addresses, section
//                 geometry), presented on `cfg[1..NREG-1]`.
// Bit assignment and the auto-restart mechanism follow the control register
// convention of high-level-synthesis peripherals, which the design uses; the
// register offsets are listed in stereo_pkg.
//
// AXI4-Lite: address and data channels are accepted independently; the write
// happens when both are held, with one response (OKAY, or SLVERR for an
// address outside the file).  Reads return one cycle after the address is
// accepted.  `start` pulses for one cycle when a start is pending and the
// peripheral is idle (`busy` low); `done` from the peripheral is a pulse.
module axil_regs
  import stereo_pkg::*;
#(
  parameter int unsigned NREG = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  axil_req_t             axi_req,
  output axil_rsp_t             axi_rsp,
  output logic                  start,
  input  logic                  busy,
  input  logic                  done,
  output logic [NREG-1:0][31:0] cfg
);

  localparam int unsigned AW = $clog2(NREG);

  logic             aw_held, w_held;
  logic [11:0]      aw_addr;
  logic [31:0]      w_data;
  logic [3:0]       w_strb;
  logic             start_pend, done_flag, auto_restart;
  logic             do_write, do_read;
  logic [31:0]      ctrl_val;
  logic [AW-1:0]    widx, ridx;
  logic             wok, rok;

  logic        bvalid, rvalid;
  logic [1:0]  bresp, rresp;
  logic [31:0] rdata;

  always_comb begin
    axi_rsp.awready = !aw_held;
    axi_rsp.wready  = !w_held;
    axi_rsp.bvalid  = bvalid;
    axi_rsp.bresp   = bresp;
    axi_rsp.arready = !rvalid;
    axi_rsp.rvalid  = rvalid;
    axi_rsp.rdata   = rdata;
    axi_rsp.rresp   = rresp;
  end

  assign do_write = aw_held && w_held && !bvalid;
  assign do_read  = axi_req.arvalid && !rvalid;

  assign widx = aw_addr[AW+1:2];
  assign ridx = axi_req.araddr[AW+1:2];
  assign wok  = (aw_addr[1:0] == 2'b00) && (32'(aw_addr[11:2]) < NREG);
  assign rok  = (axi_req.araddr[1:0] == 2'b00) && (32'(axi_req.araddr[11:2]) < NREG);
  assign ctrl_val = {24'd0, auto_restart, 4'd0, !busy, done_flag, start_pend};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_held        <= 1'b0;
      w_held         <= 1'b0;
      aw_addr        <= '0;
      w_data         <= '0;
      w_strb         <= '0;
      bvalid <= 1'b0;
      bresp  <= 2'b00;
      rvalid <= 1'b0;
      rdata  <= '0;
      rresp  <= 2'b00;
      start_pend     <= 1'b0;
      done_flag      <= 1'b0;
      auto_restart   <= 1'b0;
      start          <= 1'b0;
      cfg            <= '0;
    end else begin
      start <= 1'b0;
      if (axi_req.awvalid && !aw_held) begin aw_held <= 1'b1; aw_addr <= axi_req.awaddr; end
      if (axi_req.wvalid && !w_held) begin
        w_held <= 1'b1;
        w_data <= axi_req.wdata;
        w_strb <= axi_req.wstrb;
      end
      if (bvalid && axi_req.bready) bvalid <= 1'b0;
      if (rvalid && axi_req.rready) rvalid <= 1'b0;

      // peripheral handshake
      if (done) begin
        done_flag <= 1'b1;
        if (auto_restart) start_pend <= 1'b1;
      end
      if (start_pend && !busy && !start) begin
        start      <= 1'b1;
        start_pend <= 1'b0;
      end

      if (do_write) begin
        aw_held        <= 1'b0;
        w_held         <= 1'b0;
        bvalid <= 1'b1;
        bresp  <= wok ? 2'b00 : 2'b10;
        if (wok) begin
          if (widx == '0) begin
            if (w_strb[0]) begin
              if (w_data[0]) start_pend <= 1'b1;
              auto_restart <= w_data[7];
            end
          end else begin
            for (int b = 0; b < 4; b++)
              if (w_strb[b]) cfg[widx][8*b +: 8] <= w_data[8*b +: 8];
          end
        end
      end

      if (do_read) begin
        rvalid <= 1'b1;
        rresp  <= rok ? 2'b00 : 2'b10;
        if (!rok)              rdata <= '0;
        else if (ridx == '0) begin
          rdata <= ctrl_val;
          if (!done) done_flag <= 1'b0;   // clear on read
        end else               rdata <= cfg[ridx];
      end
      cfg[0] <= ctrl_val;
    end
  end

endmodule
