// tb_weight_addr_calc: checks that the weight address calculator emits
// row*400 + pos*50 + k for k = 0..49 on consecutive enabled cycles, flags the
// 50th word, holds while disabled and wraps for the next spike.
module tb_weight_addr_calc;
  logic clk = 0, rst_n = 0, en = 0;
  logic [3:0] row;
  logic [2:0] pos;
  logic [12:0] addr;
  logic [5:0] word;
  logic last;
  int checks = 0, failures = 0;

  weight_addr_calc dut (.*);
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
    row = 0; pos = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int r, p;
      r = (t < 8) ? 13 * (t % 2) : int'($urandom_range(0, 13));
      p = (t < 8) ? t : int'($urandom_range(0, 7));
      row = 4'(r); pos = 3'(p);
      for (int k = 0; k < 50; k++) begin
        en = 1;
        #1;
        chk(int'(addr) == r * 400 + p * 50 + k, $sformatf("addr r=%0d p=%0d k=%0d got %0d", r, p, k, addr));
        chk(last == (k == 49), "last flag");
        @(negedge clk);
        if (k == 20 && t == 3) begin   // a stall in the middle of a burst
          en = 0;
          repeat (3) @(negedge clk);
          chk(int'(word) == 21, "hold while disabled");
        end
      end
    end
    // the last spike starts at 5200 + 350 and ends at 5599, the top of the BRAM
    row = 13; pos = 7; en = 1;
    #1 chk(int'(addr) == 5550, "top start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
