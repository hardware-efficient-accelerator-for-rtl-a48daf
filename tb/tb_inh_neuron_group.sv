// tb_inh_neuron_group: a bank of 20 inhibitory neurons driven by random
// excitatory partner spikes; every neuron's spike is compared with the
// reference model of equations (4)-(5) after each timestep.
module tb_inh_neuron_group;
  import snn_pkg::*;
  import tb_ref_pkg::*;
  localparam int N = 20;
  logic clk = 0, rst_n = 0, clear = 0, update = 0;
  logic [N-1:0] exc_spikes = 0, spikes;
  int checks = 0, failures = 0;
  longint rv [N], rge [N];
  bit rspk [N];
  int total = 0;

  inh_neuron_group #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    for (int j = 0; j < N; j++) begin rv[j] = -2458; rge[j] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int step = 0; step < 1500; step++) begin
      // partner j fires with a probability that grows with j
      for (int j = 0; j < N; j++) exc_spikes[j] = ($urandom_range(0, 39) < j);
      clear = (step == 700);
      update = !clear;
      for (int j = 0; j < N; j++) begin
        if (clear) begin rv[j] = -2458; rge[j] = 0; rspk[j] = 0; end
        else rspk[j] = inh_step(rv[j], rge[j], exc_spikes[j], 30720, -1638, -1843);
      end
      @(negedge clk);
      for (int j = 0; j < N; j++) begin
        chk(spikes[j] == rspk[j], $sformatf("step %0d neuron %0d", step, j));
        total += rspk[j];
      end
    end
    chk(total > 20, $sformatf("bank fired %0d spikes", total));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
