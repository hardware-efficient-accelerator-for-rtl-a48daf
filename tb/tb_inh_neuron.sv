// tb_inh_neuron: drives one inhibitory neuron with random partner spikes and
// compares v, ge and spike after every update with the integer reference
// model of equations (4)-(5); checks that it fires during the run.
module tb_inh_neuron;
  import snn_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, update = 0, exc_spike = 0;
  logic spike;
  q_t v, ge;
  int checks = 0, failures = 0;
  longint rv, rge;
  bit rspike;
  int nspk = 0;

  inh_neuron dut (.*);
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
    repeat (2) @(negedge clk);
    rst_n = 1;
    rv = -2458; rge = 0; rspike = 0;
    for (int t = 0; t < 5000; t++) begin
      clear = (t == 2500);
      update = !clear && ($urandom_range(0, 3) != 0);
      exc_spike = ($urandom_range(0, 2) == 0);
      if (clear) begin rv = -2458; rge = 0; rspike = 0; end
      else if (update) begin
        rspike = inh_step(rv, rge, exc_spike, 30720, -1638, -1843);
        nspk += rspike;
      end
      @(negedge clk);
      chk(longint'(v) == rv, $sformatf("t=%0d v %0d exp %0d", t, v, rv));
      chk(longint'(ge) == rge, $sformatf("t=%0d ge %0d exp %0d", t, ge, rge));
      chk(spike == rspike, "spike");
    end
    chk(nspk > 10, $sformatf("fired %0d times", nspk));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
