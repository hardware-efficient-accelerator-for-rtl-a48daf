// tb_exc_neuron_group: a bank of 20 excitatory neurons placed at global
// indices 40..59. Streams summed weight words for all 50 word numbers (only
// words 20..29 belong to this bank), applies lateral inhibition from random
// inhibitory spikes and steps the bank, comparing every neuron's spike and
// count with the reference model (which routes word k to neurons 2k, 2k+1
// and subtracts the partner's own inhibitory spike).
module tb_exc_neuron_group;
  import snn_pkg::*;
  import tb_ref_pkg::*;
  localparam int N = 20, BASE = 40;
  logic clk = 0, rst_n = 0, clear = 0, sum_valid = 0, inhib = 0, update = 0;
  logic [5:0] sum_word = 0;
  q_t sum_hi = 0, sum_lo = 0;
  logic [6:0] inh_total = 0;
  logic [N-1:0] inh_own = 0, spikes;
  logic [15:0] counts [N];
  int checks = 0, failures = 0;
  longint rv [N], rge [N], rgi [N];
  int rcnt [N];
  bit rspk [N];
  int total_spk = 0, inhib_rounds = 0;

  exc_neuron_group #(.N(N), .BASE(BASE)) dut (.*);
  always #5 clk = ~clk;

  // inhibitory conductances of the bank's neurons, for the lateral-inhibition check
  q_t gi_tap [N];
  for (genvar j = 0; j < N; j++) begin : g_tap
    assign gi_tap[j] = dut.g_n[j].u_n.gi;
  end

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
    for (int j = 0; j < N; j++) begin rv[j] = -2458; rge[j] = 0; rgi[j] = 0; rcnt[j] = 0; rspk[j] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int step = 0; step < 300; step++) begin
      // weight delivery: 1 to 3 spikes' worth of 50 words
      repeat ($urandom_range(0, 2)) for (int k = 0; k < 50; k++) begin
        sum_valid = 1; sum_word = 6'(k);
        sum_hi = q_t'($urandom_range(0, 3000));
        sum_lo = q_t'($urandom_range(0, 3000));
        for (int j = 0; j < N; j++) begin
          if (BASE + j == 2 * k)     rge[j] = sat(rge[j] + longint'(sum_hi));
          if (BASE + j == 2 * k + 1) rge[j] = sat(rge[j] + longint'(sum_lo));
        end
        @(negedge clk);
      end
      sum_valid = 0;
      // neuron update
      update = 1;
      for (int j = 0; j < N; j++) begin
        rspk[j] = exc_step(rv[j], rge[j], rgi[j], -2130, -2458);
        rcnt[j] += rspk[j];
      end
      @(negedge clk);
      update = 0;
      for (int j = 0; j < N; j++) begin
        chk(spikes[j] == rspk[j], $sformatf("step %0d neuron %0d spike", step, j));
        chk(int'(counts[j]) == rcnt[j], $sformatf("step %0d neuron %0d count", step, j));
        total_spk += rspk[j];
      end
      // lateral inhibition
      if (step % 40 == 39) begin
        inhib = 1;
        inh_own = '0;
        for (int j = 0; j < N; j++) inh_own[j] = ($urandom_range(0, 19) == 0);
        inh_total = 7'($countones(inh_own) + (step % 80 == 39 ? 1 : 0));
        for (int j = 0; j < N; j++)
          rgi[j] = sat(rgi[j] + 4096 * (longint'(inh_total) - longint'(inh_own[j])));
        inhib_rounds++;
        @(negedge clk);
        inhib = 0;
      end
      for (int j = 0; j < N; j++)
        chk(longint'(gi_tap[j]) == rgi[j], $sformatf("step %0d neuron %0d gi", step, j));
    end
    chk(total_spk > 20, $sformatf("bank fired %0d spikes", total_spk));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
