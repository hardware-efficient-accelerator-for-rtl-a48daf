// tb_image_bram: writes random pixel rows through port A and reads them back
// through both ports, checking the one-cycle read latency.
module tb_image_bram;
  logic clk = 0, a_we = 0;
  logic [3:0] a_addr = 0, b_addr = 0;
  logic [31:0] a_wdata = 0, a_rdata, b_rdata;
  logic [31:0] ref_mem [14];
  int checks = 0, failures = 0;

  image_bram dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    @(negedge clk);
    for (int r = 0; r < 14; r++) begin
      a_we = 1; a_addr = 4'(r); a_wdata = $urandom; ref_mem[r] = a_wdata;
      @(negedge clk);
    end
    a_we = 0;
    for (int t = 0; t < 500; t++) begin
      int ra, rb;
      ra = $urandom_range(0, 13); rb = $urandom_range(0, 13);
      a_addr = 4'(ra); b_addr = 4'(rb);
      @(negedge clk);
      chk(a_rdata == ref_mem[ra], "port A read");
      chk(b_rdata == ref_mem[rb], "port B read");
      if (t % 5 == 0) begin   // overwrite a row
        a_we = 1; a_addr = 4'(rb); a_wdata = $urandom; ref_mem[rb] = a_wdata;
        @(negedge clk);
        a_we = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
