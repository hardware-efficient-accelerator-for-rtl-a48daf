// axil_slave: AXI4-Lite slave turned into a simple memory-style bus.
//
// The programmable logic talks to the processor through four of these (image
// BRAMs, weight BRAMs, spike result BRAM, status buffer). A write is accepted
// when address and data are both valid and no response is pending: in that
// cycle awready/wready are high and a one-cycle `wr_en` carries the byte
// address and data to the local side; bvalid (OKAY) follows and is held until
// bready. A read is accepted when arvalid is high and no read is in flight:
// `rd_en` pulses with the address, the local side returns `rd_data` on the
// next cycle, and rvalid (OKAY) is held with it until rready. wstrb is
// ignored: every write is a full 32-bit word.
//
// Following the published design: AXI4-Lite between the processor and each block. This
// design's choices: the single-beat acceptance rule, full-word writes, one
// outstanding read and one outstanding write.
module axil_slave
  import snn_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  axil_req_t   req,
  output axil_rsp_t   rsp,
  output logic        wr_en,
  output logic [31:0] wr_addr,
  output logic [31:0] wr_data,
  output logic        rd_en,
  output logic [31:0] rd_addr,
  input  logic [31:0] rd_data
);

  logic bvalid, rvalid, rd_pend;
  logic [31:0] rdata;
  logic aw_ok, ar_ok;

  assign aw_ok = req.awvalid && req.wvalid && !bvalid;
  assign ar_ok = req.arvalid && !rvalid && !rd_pend;

  assign wr_en   = aw_ok;
  assign wr_addr = req.awaddr;
  assign wr_data = req.wdata;
  assign rd_en   = ar_ok;
  assign rd_addr = req.araddr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bvalid  <= 1'b0;
      rvalid  <= 1'b0;
      rd_pend <= 1'b0;
      rdata   <= '0;
    end else begin
      if (aw_ok)                     bvalid <= 1'b1;
      else if (bvalid && req.bready) bvalid <= 1'b0;
      rd_pend <= ar_ok;
      if (rd_pend) begin
        rdata  <= rd_data;
        rvalid <= 1'b1;
      end else if (rvalid && req.rready) begin
        rvalid <= 1'b0;
      end
    end
  end

  always_comb begin
    rsp         = '0;
    rsp.awready = aw_ok;
    rsp.wready  = aw_ok;
    rsp.bvalid  = bvalid;
    rsp.bresp   = 2'b00;
    rsp.arready = ar_ok;
    rsp.rvalid  = rvalid;
    rsp.rdata   = rdata;
    rsp.rresp   = 2'b00;
  end

  // AXI rule: a response stays valid, with stable data, until it is taken
  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n)
    bvalid && !req.bready |=> bvalid);
  a_r_hold: assert property (@(posedge clk) disable iff (!rst_n)
    rvalid && !req.rready |=> rvalid && $stable(rdata));

endmodule
