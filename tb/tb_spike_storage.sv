// tb_spike_storage: loads random sparse spike rows, starts the storage and
// checks the weight request stream against a reference: for every stored
// spike, in row-then-position order, 50 consecutive requests with addresses
// row*400 + pos*50 + k. Also checks Ready/Busy, the total number of request
// cycles (50 per spike, no gaps) and an empty storage.
module tb_spike_storage;
  import snn_pkg::*;
  logic clk = 0, rst_n = 0, wr_en = 0, start = 0;
  logic [3:0] wr_row;
  logic [7:0] wr_spikes;
  logic ready, busy;
  wreq_t wreq;
  int checks = 0, failures = 0;

  spike_storage dut (.*);
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

  initial begin
    wr_row = 0; wr_spikes = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      bit [7:0] rows [14];
      int exp_addr [$];
      int exp_word [$];
      int n, cyc;
      exp_addr.delete();
      exp_word.delete();
      for (int r = 0; r < 14; r++) begin
        rows[r] = '0;
        if (t > 0) for (int p = 0; p < 8; p++) rows[r][p] = ($urandom_range(0, 99) < 4 + t);
      end
      if (t == 5) rows[13] = 8'hff;   // top row, every position
      for (int r = 0; r < 14; r++)
        for (int p = 0; p < 8; p++)
          if (rows[r][p]) for (int k = 0; k < 50; k++) begin
            exp_addr.push_back(r * 400 + p * 50 + k);
            exp_word.push_back(k);
          end
      chk(!ready && !busy, "idle before load");
      for (int r = 0; r < 14; r++) begin
        wr_en = 1; wr_row = 4'(r); wr_spikes = rows[r];
        @(negedge clk);
        chk(ready == (r == 13), "ready after the last row");
      end
      wr_en = 0;
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk);
        chk(ready && !busy, "ready holds");
      end
      start = 1;
      @(negedge clk);
      start = 0;
      n = 0; cyc = 0;
      while (busy && cyc < 6000) begin
        if (wreq.valid) begin
          chk(n < exp_addr.size(), "too many requests");
          if (n < exp_addr.size()) begin
            chk(int'(wreq.addr) == exp_addr[n], $sformatf("addr %0d exp %0d", wreq.addr, exp_addr[n]));
            chk(int'(wreq.word) == exp_word[n], "word number");
          end
          n++;
        end
        cyc++;
        @(negedge clk);
      end
      chk(n == exp_addr.size(), $sformatf("request count %0d exp %0d", n, exp_addr.size()));
      // busy lasts exactly 50 cycles per spike, plus one cycle to notice the end
      chk(cyc == exp_addr.size() + 1, $sformatf("busy cycles %0d", cyc));
      chk(!ready && !busy, "back to loading");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
