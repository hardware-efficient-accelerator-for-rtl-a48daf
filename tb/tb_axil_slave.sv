// tb_axil_slave: a small register file behind the slave; the testbench acts
// as an AXI4-Lite master with random valid delays and random back-pressure on
// the B and R channels, writes random words to random registers and reads
// them back, checking data, OKAY responses and that a response is held until
// it is accepted.
module tb_axil_slave;
  import snn_pkg::*;
  logic clk = 0, rst_n = 0;
  axil_req_t req;
  axil_rsp_t rsp;
  logic wr_en, rd_en;
  logic [31:0] wr_addr, wr_data, rd_addr, rd_data;
  logic [31:0] regs [16];
  logic [31:0] ref_regs [16];
  int checks = 0, failures = 0;

  // master-side signals, packed into the request struct
  logic [31:0] m_awaddr, m_wdata, m_araddr;
  logic [3:0]  m_wstrb;
  logic        m_awvalid, m_wvalid, m_bready, m_arvalid, m_rready;
  always_comb begin
    req.awaddr  = m_awaddr;  req.awvalid = m_awvalid;
    req.wdata   = m_wdata;   req.wstrb   = m_wstrb;   req.wvalid = m_wvalid;
    req.bready  = m_bready;
    req.araddr  = m_araddr;  req.arvalid = m_arvalid; req.rready = m_rready;
  end

  axil_slave dut (.*);
  always #5 clk = ~clk;

  // local side: register file with one cycle of read latency
  always_ff @(posedge clk) begin
    if (wr_en) regs[wr_addr[5:2]] <= wr_data;
    if (rd_en) rd_data <= regs[rd_addr[5:2]];
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic axi_write(input int r, input logic [31:0] d);
    int n;
    m_awaddr = 32'(r * 4); m_wdata = d; m_wstrb = 4'hf;
    repeat ($urandom_range(0, 2)) @(negedge clk);
    m_awvalid = 1; m_wvalid = 1;
    #1;
    n = 0;
    while (!(rsp.awready && rsp.wready)) begin @(negedge clk); n++; end
    @(negedge clk);
    m_awvalid = 0; m_wvalid = 0;
    repeat ($urandom_range(0, 3)) begin
      chk(rsp.bvalid, "bvalid held until bready");
      @(negedge clk);
    end
    m_bready = 1;
    while (!rsp.bvalid) @(negedge clk);
    chk(rsp.bresp == 2'b00, "write OKAY");
    @(negedge clk);
    m_bready = 0;
    chk(!rsp.bvalid, "bvalid drops after handshake");
  endtask

  task automatic axi_read(input int r, output logic [31:0] d);
    m_araddr = 32'(r * 4);
    repeat ($urandom_range(0, 2)) @(negedge clk);
    m_arvalid = 1;
    #1;
    while (!rsp.arready) @(negedge clk);
    @(negedge clk);
    m_arvalid = 0;
    while (!rsp.rvalid) @(negedge clk);
    d = rsp.rdata;
    repeat ($urandom_range(0, 3)) begin
      @(negedge clk);
      chk(rsp.rvalid && rsp.rdata == d, "read data held until rready");
    end
    m_rready = 1;
    chk(rsp.rresp == 2'b00, "read OKAY");
    @(negedge clk);
    m_rready = 0;
  endtask

  initial begin
    m_awaddr = 0; m_wdata = 0; m_araddr = 0; m_wstrb = 0;
    m_awvalid = 0; m_wvalid = 0; m_bready = 0; m_arvalid = 0; m_rready = 0;
    for (int i = 0; i < 16; i++) ref_regs[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) axi_write(i, 0);
    for (int t = 0; t < 400; t++) begin
      int r;
      logic [31:0] d;
      r = $urandom_range(0, 15);
      if ($urandom_range(0, 1)) begin
        d = $urandom;
        axi_write(r, d);
        ref_regs[r] = d;
      end else begin
        axi_read(r, d);
        chk(d == ref_regs[r], $sformatf("reg %0d read %h exp %h", r, d, ref_regs[r]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
