// tb_lfsr_spike_gen: compares the spike generator of lane 3 with an
// independent model of its eight LFSRs over 3000 rows of random pixels,
// including a reseed in the middle, and checks that a zero pixel never fires
// and a full-scale pixel fires at a rate close to 15/2048; also checks that
// each LFSR runs through all 2047 non-zero states.
module tb_lfsr_spike_gen;
  import tb_ref_pkg::*;
  localparam int GEN = 3;
  logic clk = 0, rst_n = 0, reseed = 0, en = 0;
  logic [31:0] pix_row;
  logic [7:0] spikes;
  int checks = 0, failures = 0;
  int st [8];
  int fired15 = 0, rows15 = 0;

  lfsr_spike_gen #(.GEN_ID(GEN)) dut (.*);
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
    pix_row = '0;
    for (int p = 0; p < 8; p++) st[p] = lfsr_seed(GEN, p);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      if (t == 1500) begin
        reseed = 1;
        @(negedge clk);
        reseed = 0;
        for (int p = 0; p < 8; p++) st[p] = lfsr_seed(GEN, p);
      end
      en = ($urandom_range(0, 3) != 0);
      for (int p = 0; p < 8; p++) pix_row[p*4 +: 4] = 4'($urandom_range(0, 15));
      if (t % 7 == 0) pix_row = 32'hffff_ffff;
      if (t % 11 == 0) pix_row = 32'h0;
      #1;
      for (int p = 0; p < 8; p++) begin
        int pix;
        pix = int'(pix_row[p*4 +: 4]);
        chk(spikes[p] == (pix > st[p]), $sformatf("row %0d pixel %0d", t, p));
        if (pix == 15) begin rows15++; fired15 += spikes[p]; end
      end
      @(negedge clk);
      if (en) for (int p = 0; p < 8; p++) st[p] = lfsr_step(st[p]);
    end
    // every LFSR has the maximal period of 2047 steps
    reseed = 1;
    @(negedge clk);
    reseed = 0;
    en = 1;
    begin
      logic [10:0] first [8];
      int period [8];
      for (int p = 0; p < 8; p++) begin first[p] = dut.state[p]; period[p] = 0; end
      for (int c = 1; c <= 2047; c++) begin
        @(negedge clk);
        for (int p = 0; p < 8; p++) if (period[p] == 0 && dut.state[p] == first[p]) period[p] = c;
      end
      for (int p = 0; p < 8; p++) chk(period[p] == 2047, $sformatf("LFSR %0d period %0d", p, period[p]));
    end
    en = 0;
    // full-scale pixels fire with probability about 15/2047 per row
    chk(fired15 > 0 && fired15 * 2047 < rows15 * 15 * 3, $sformatf("rate %0d of %0d", fired15, rows15));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
