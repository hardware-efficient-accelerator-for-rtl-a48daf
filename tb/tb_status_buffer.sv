// tb_status_buffer: checks the register map: a CONTROL write produces one
// start pulse and clears DONE, STEPS is read/write with its default after
// reset, STATUS/CYCLES/STEP/PHASE reflect the controller inputs.
module tb_status_buffer;
  import snn_pkg::*;
  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0, start, busy = 0, done = 0;
  logic [31:0] wr_addr = 0, wr_data = 0, rd_addr = 0, rd_data, cycles = 0;
  logic [15:0] num_steps, step = 0;
  phase_t phase = PH_IDLE;
  int checks = 0, failures = 0;

  status_buffer #(.DEFAULT_STEPS(700)) dut (.*);
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

  task automatic wr(input int a, input logic [31:0] d);
    wr_en = 1; wr_addr = 32'(a); wr_data = d;
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic rd(input int a, output logic [31:0] d);
    rd_en = 1; rd_addr = 32'(a);
    @(negedge clk);
    rd_en = 0;
    d = rd_data;
  endtask

  initial begin
    logic [31:0] d;
    repeat (2) @(negedge clk);
    rst_n = 1;
    rd(8, d);  chk(d == 700, "default STEPS");
    chk(num_steps == 700, "num_steps output");
    for (int t = 0; t < 100; t++) begin
      int s, st;
      s = $urandom_range(1, 65535);
      wr(8, 32'(s));
      rd(8, d);  chk(d == 32'(s) && num_steps == 16'(s), "STEPS write");
      // start
      wr_en = 1; wr_addr = 0; wr_data = 1;
      @(negedge clk);
      wr_en = 0;
      chk(start, "start pulse");
      @(negedge clk);
      chk(!start, "start is one cycle");
      busy = 1; cycles = $urandom; step = 16'($urandom); phase = PH_PROC;
      rd(4, d);  chk(d == 32'h1, "STATUS busy");
      rd(12, d); chk(d == cycles, "CYCLES");
      rd(16, d); chk(d == {16'd0, step}, "STEP");
      rd(20, d); chk(d == 32'(PH_PROC), "PHASE");
      // a write of 0 to CONTROL does not start
      wr(0, 0);
      chk(!start, "no start on zero");
      busy = 0; done = 1;
      @(negedge clk);
      done = 0;
      rd(4, d);  chk(d == 32'h2, "STATUS done");
      st = $urandom_range(0, 3);
      repeat (st) @(negedge clk);
      rd(4, d);  chk(d == 32'h2, "done is sticky");
    end
    wr(0, 1);
    rd(4, d); chk(d == 32'h0, "start clears done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
