// tb_weight_accumulator: random subsets of the seven lanes request the same
// word number; the testbench plays the BRAMs (data one cycle after the
// request) and checks that two cycles after each request the unit outputs
// the saturated per-half sums of the requesting lanes only, with the word
// number, and nothing when no lane requests.
module tb_weight_accumulator;
  import snn_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  wreq_t req [7];
  logic [31:0] rdata [7];
  logic sum_valid;
  logic [5:0] sum_word;
  q_t sum_hi, sum_lo;
  int checks = 0, failures = 0;

  weight_accumulator dut (.*);
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

  // expected output pipeline: two stages
  bit     e_v [2];
  int     e_w [2];
  longint e_hi [2], e_lo [2];
  logic [31:0] mem_word [7];

  initial begin
    for (int i = 0; i < 7; i++) begin req[i] = '0; rdata[i] = '0; end
    for (int s = 0; s < 2; s++) begin e_v[s] = 0; e_w[s] = 0; e_hi[s] = 0; e_lo[s] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int w;
      longint hi, lo;
      bit any;
      w = $urandom_range(0, 49);
      hi = 0; lo = 0; any = 0;
      // data for the previous cycle's requests
      for (int i = 0; i < 7; i++) begin
        rdata[i] = (t % 50 == 7) ? 32'h7fff_8000 : $urandom;
        if (t % 50 == 9) rdata[i] = {16'h0100, 16'hff00};
        if (req[i].valid) begin
          hi += longint'(signed'(rdata[i][31:16]));
          lo += longint'(signed'(rdata[i][15:0]));
          any = 1;
        end
      end
      e_v[1] = any; e_w[1] = e_w[0]; e_hi[1] = sat(hi); e_lo[1] = sat(lo);
      // requests of this cycle
      for (int i = 0; i < 7; i++) begin
        req[i].valid = ($urandom_range(0, 2) != 0) && (t % 13 != 0);
        req[i].word  = req[i].valid ? 6'(w) : 6'($urandom_range(0, 49));
        req[i].addr  = 13'($urandom);
      end
      e_w[0] = w;
      @(negedge clk);
      if (t >= 1) begin
        chk(sum_valid == e_v[1], $sformatf("valid t=%0d", t));
        if (e_v[1]) begin
          chk(int'(sum_word) == e_w[1], "word");
          chk(longint'(sum_hi) == e_hi[1], $sformatf("hi %0d exp %0d", sum_hi, e_hi[1]));
          chk(longint'(sum_lo) == e_lo[1], $sformatf("lo %0d exp %0d", sum_lo, e_lo[1]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
