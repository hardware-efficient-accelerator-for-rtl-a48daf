// tb_spike_result_bram: writes 100 counts through port B and reads them back
// through port A with one cycle of latency.
module tb_spike_result_bram;
  logic clk = 0, b_we = 0;
  logic [6:0] a_addr = 0, b_addr = 0;
  logic [31:0] a_rdata, b_wdata = 0;
  logic [31:0] ref_mem [100];
  int checks = 0, failures = 0;

  spike_result_bram dut (.*);
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
    for (int round = 0; round < 3; round++) begin
      for (int n = 0; n < 100; n++) begin
        b_we = 1; b_addr = 7'(n); b_wdata = $urandom_range(0, 65535); ref_mem[n] = b_wdata;
        @(negedge clk);
      end
      b_we = 0;
      for (int n = 99; n >= 0; n--) begin
        a_addr = 7'(n);
        @(negedge clk);
        chk(a_rdata == ref_mem[n], $sformatf("count %0d", n));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
