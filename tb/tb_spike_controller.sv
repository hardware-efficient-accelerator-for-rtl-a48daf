// tb_spike_controller: drives Ready/Busy patterns of seven storages and checks
// that Start is broadcast exactly once, one cycle after any storage becomes
// ready, and that `done` pulses once, one cycle after all storages are idle.
module tb_spike_controller;
  logic clk = 0, rst_n = 0;
  logic [6:0] ready, busy;
  logic start, done;
  int checks = 0, failures = 0;

  spike_controller dut (.*);
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
    ready = 0; busy = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      logic [6:0] rdy;
      int len [7];
      int starts, dones, c;
      rdy = 7'($urandom_range(1, 127));
      repeat ($urandom_range(0, 4)) begin
        @(negedge clk);
        chk(!start && !done, "quiet while nothing is ready");
      end
      ready = rdy;
      for (int i = 0; i < 7; i++) len[i] = rdy[i] ? int'($urandom_range(1, 120)) : 0;
      @(negedge clk);
      chk(start, "start one cycle after ready");
      // storages that were ready enter busy together
      starts = 1; dones = 0;
      ready = 0;
      busy = rdy;
      c = 0;
      while (busy != 0) begin
        logic [6:0] busy_before;
        busy_before = busy;
        @(negedge clk);
        c++;
        chk(!done, "no done while a storage is busy");
        for (int i = 0; i < 7; i++) if (busy[i] && c >= len[i]) busy[i] = 0;
        starts += start; dones += done;
      end
      repeat (3) begin
        @(negedge clk);
        starts += start; dones += done;
      end
      chk(starts == 1, "one start per round");
      chk(dones == 1, "one done per round");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
