// tb_weight_bram: fills all 5600 words through port A with a pattern, then
// reads random addresses through port B (with its enable) and port A.
module tb_weight_bram;
  logic clk = 0, a_we = 0, b_en = 0;
  logic [12:0] a_addr = 0, b_addr = 0;
  logic [31:0] a_wdata = 0, a_rdata, b_rdata;
  int checks = 0, failures = 0;

  weight_bram dut (.*);
  always #5 clk = ~clk;

  function automatic logic [31:0] pat(input int a);
    return 32'(a) * 32'h9e37_79b9 ^ 32'h1234_5678;
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
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
    for (int a = 0; a < 5600; a++) begin
      a_we = 1; a_addr = 13'(a); a_wdata = pat(a);
      @(negedge clk);
    end
    a_we = 0;
    for (int t = 0; t < 2000; t++) begin
      int x, y;
      x = (t == 0) ? 5599 : int'($urandom_range(0, 5599));
      y = $urandom_range(0, 5599);
      b_en = 1; b_addr = 13'(x); a_addr = 13'(y);
      @(negedge clk);
      chk(b_rdata == pat(x), $sformatf("port B %0d", x));
      chk(a_rdata == pat(y), $sformatf("port A %0d", y));
      b_en = 0; b_addr = 13'(y);
      @(negedge clk);
      chk(b_rdata == pat(x), "port B holds while disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
