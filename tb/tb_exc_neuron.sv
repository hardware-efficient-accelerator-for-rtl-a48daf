// tb_exc_neuron: drives one excitatory neuron with random weight inputs,
// lateral inhibition and timestep updates and compares v, ge, gi, spike and
// the spike count after every operation with the integer reference model of
// equations (1)-(3). Also checks that clear restores the initial state and
// that the neuron both fires and stays silent during the run.
module tb_exc_neuron;
  import snn_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, ge_add_en = 0, gi_add_en = 0, update = 0;
  q_t ge_add = 0, gi_add = 0, v, ge, gi;
  logic spike;
  logic [15:0] count;
  int checks = 0, failures = 0;
  longint rv, rge, rgi;
  int rcount, nspk;
  bit rspike;

  exc_neuron dut (.*);
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

  task automatic compare(input string where);
    chk(longint'(v) == rv,   $sformatf("%s v %0d exp %0d", where, v, rv));
    chk(longint'(ge) == rge, $sformatf("%s ge %0d exp %0d", where, ge, rge));
    chk(longint'(gi) == rgi, $sformatf("%s gi %0d exp %0d", where, gi, rgi));
    chk(spike == rspike && int'(count) == rcount, $sformatf("%s spike/count", where));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    rv = -2458; rge = 0; rgi = 0; rspike = 0; rcount = 0; nspk = 0;
    compare("reset");
    for (int t = 0; t < 4000; t++) begin
      int op;
      op = $urandom_range(0, 9);
      if (t == 2000) op = 10;
      ge_add_en = 0; gi_add_en = 0; update = 0; clear = 0;
      if (op == 10) begin
        clear = 1;
        rv = -2458; rge = 0; rgi = 0; rspike = 0; rcount = 0;
      end else if (op < 4) begin
        ge_add_en = 1; ge_add = q_t'($urandom_range(0, 3000));
        rge = sat(rge + longint'(ge_add));
      end else if (op == 4 && t % 8 == 0) begin
        gi_add_en = 1; gi_add = q_t'($urandom_range(0, 600));
        rgi = sat(rgi + longint'(gi_add));
      end else begin
        update = 1;
        rspike = exc_step(rv, rge, rgi, -2130, -2458);
        if (rspike) begin rcount++; nspk++; end
      end
      @(negedge clk);
      compare($sformatf("t=%0d op=%0d", t, op));
    end
    chk(nspk > 10, $sformatf("neuron fired %0d times", nspk));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
