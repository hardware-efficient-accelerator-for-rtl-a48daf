// tb_global_controller: runs several images with random step counts and a
// spike controller model that answers each weight-delivery phase after a
// random number of cycles. Checks the phase order of every timestep (14 row
// writes with the image address one row ahead, delivery, 3 drain cycles,
// excitatory update, inhibitory update, inhibition), the write-back of 100
// counts, one done pulse and the cycle counter.
module tb_global_controller;
  import snn_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, proc_done = 0;
  logic [15:0] num_steps = 0, step;
  phase_t phase;
  logic clear, wr_en, upd_e, upd_i, inhib, wb_en, busy, done;
  logic [3:0] img_addr, wr_row;
  logic [6:0] wb_addr;
  logic [31:0] cycles;
  int checks = 0, failures = 0;

  global_controller dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // spike controller model: done pulse some cycles after delivery begins
  initial begin
    forever begin
      @(negedge clk);
      proc_done = 0;
      if (phase == PH_PROC) begin
        repeat ($urandom_range(1, 160)) @(negedge clk);
        proc_done = 1;
        @(negedge clk);
        proc_done = 0;
        while (phase == PH_PROC) @(negedge clk);
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int img = 0; img < 6; img++) begin
      int ns, n, c0, dones;
      ns = (img == 0) ? 1 : int'($urandom_range(2, 12));
      num_steps = 16'(ns);
      @(negedge clk);
      chk(!busy, "idle before start");
      start = 1;
      @(negedge clk);
      start = 0;
      c0 = 0;
      chk(clear && busy, "clear after start");
      @(negedge clk);
      c0++;
      for (int s = 0; s < ns; s++) begin
        chk(int'(step) == s, "step counter");
        chk(phase == PH_GEN && img_addr == 0 && !wr_en, "gen reads row 0 first");
        for (int r = 0; r < 14; r++) begin
          @(negedge clk); c0++;
          chk(wr_en && int'(wr_row) == r, $sformatf("row write %0d", r));
          if (r < 13) chk(int'(img_addr) == r + 1, "image address one row ahead");
        end
        @(negedge clk); c0++;
        chk(phase == PH_PROC && !wr_en, "delivery phase");
        n = 0;
        while (phase == PH_PROC) begin @(negedge clk); c0++; n++; end
        chk(n >= 2, "delivery waits for the controller");
        for (int d = 0; d < 3; d++) begin
          chk(phase == PH_DRAIN && !upd_e, "drain");
          @(negedge clk); c0++;
        end
        chk(upd_e && !upd_i && !inhib, "excitatory update");
        @(negedge clk); c0++;
        chk(upd_i && !upd_e && !inhib, "inhibitory update");
        @(negedge clk); c0++;
        chk(inhib && !upd_e && !upd_i, "lateral inhibition");
        @(negedge clk); c0++;
      end
      for (int a = 0; a < 100; a++) begin
        chk(wb_en && int'(wb_addr) == a, $sformatf("write-back %0d", a));
        @(negedge clk); c0++;
      end
      dones = 0;
      chk(done, "done pulse");
      chk(int'(cycles) == c0, $sformatf("cycles %0d exp %0d", cycles, c0));
      @(negedge clk);
      chk(!done && !busy, "back to idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
