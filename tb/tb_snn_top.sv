// tb_snn_top: end-to-end test of the accelerator at its default size.
//
// Acts as the host: loads all 39,200 weight words and the 98 image words
// over AXI4-Lite, starts images through the status registers and reads the
// 100 spike counts back from the spike result BRAM. A bit-accurate reference
// model of the whole network (LFSR spike trains, per-cycle cross-lane weight
// sums in the storages' service order, equations (1)-(5), immediate lateral
// inhibition) predicts every count and the cycle count of each image, which
// is 1 + sum over timesteps of (26 + 50 * largest per-lane spike count) + 100.
//
// Images run: a short one with a programmed step count, then one of the
// default 700 timesteps (the status register is left at its reset value).
// Mechanisms counted and required: Start broadcast, several lanes delivering
// weights in the same cycle, a busy lane finished while others still deliver,
// a lane with no spike in a timestep, excitatory and inhibitory spikes,
// lateral inhibition reaching the excitatory layer.
module tb_snn_top;
  import snn_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  axil_req_t mreq [4];
  axil_rsp_t mrsp [4];
  logic irq_done;
  int checks = 0, failures = 0;
  localparam int IMG = 0, WGT = 1, RES = 2, STAT = 3;

  snn_top dut (
    .clk, .rst_n,
    .s_img_req (mreq[IMG]),  .s_img_rsp (mrsp[IMG]),
    .s_wgt_req (mreq[WGT]),  .s_wgt_rsp (mrsp[WGT]),
    .s_res_req (mreq[RES]),  .s_res_rsp (mrsp[RES]),
    .s_stat_req(mreq[STAT]), .s_stat_rsp(mrsp[STAT]),
    .irq_done);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  // ---------------- host (AXI4-Lite master) ----------------
  task automatic axi_write(input int p, input int addr, input logic [31:0] d);
    mreq[p].awaddr = 32'(addr); mreq[p].wdata = d; mreq[p].wstrb = 4'hf;
    mreq[p].awvalid = 1; mreq[p].wvalid = 1; mreq[p].bready = 1;
    #1;
    while (!(mrsp[p].awready && mrsp[p].wready)) @(negedge clk);
    @(negedge clk);
    mreq[p].awvalid = 0; mreq[p].wvalid = 0;
    while (mrsp[p].bvalid) @(negedge clk);
  endtask

  task automatic axi_read(input int p, input int addr, output logic [31:0] d);
    mreq[p].araddr = 32'(addr); mreq[p].arvalid = 1; mreq[p].rready = 1;
    #1;
    while (!mrsp[p].arready) @(negedge clk);
    @(negedge clk);
    mreq[p].arvalid = 0;
    while (!mrsp[p].rvalid) @(negedge clk);
    d = mrsp[p].rdata;
    @(negedge clk);
  endtask

  // ---------------- test data ----------------
  // weight from input i (0..783) to excitatory neuron n, Q3.12
  function automatic int wgt(input int i, input int n);
    return 40 + ((i * 7 + n * 13) % 64) + (n % 5) * 20;
  endfunction
  // pixel of input i for image `im` (0..15): a bright disc on a dim field
  function automatic int pix(input int im, input int i);
    int x, y, cx, cy;
    x = i % 28; y = i / 28;
    cx = 10 + 6 * im; cy = 14;
    if ((x - cx) * (x - cx) + (y - cy) * (y - cy) < 64) return 15;
    return (i * 5 + im) % 4;
  endfunction

  // ---------------- reference model ----------------
  longint ev [N_EXC], ege [N_EXC], egi [N_EXC];
  longint iv [N_INH], ige [N_INH];
  bit     espk [N_EXC], ispk [N_INH];
  int     ecount [N_EXC];
  int     lfsr [N_LANES][8];
  int     exp_cycles;
  int     ref_inh_spikes, ref_exc_spikes;

  task automatic ref_image(input int im, input int steps);
    exp_cycles = 1 + 100;
    for (int n = 0; n < N_EXC; n++) begin
      ev[n] = -2458; ege[n] = 0; egi[n] = 0; ecount[n] = 0; espk[n] = 0;
      iv[n] = -2458; ige[n] = 0; ispk[n] = 0;
    end
    for (int g = 0; g < N_LANES; g++) for (int p = 0; p < 8; p++) lfsr[g][p] = lfsr_seed(g, p);
    for (int t = 0; t < steps; t++) begin
      int sp [N_LANES][$];
      int smax, ninh;
      smax = 0;
      // spike generation, row by row
      for (int g = 0; g < N_LANES; g++) begin
        sp[g].delete();
        for (int r = 0; r < 14; r++) begin
          for (int p = 0; p < 8; p++) begin
            int i;
            i = g * 112 + r * 8 + p;
            if (pix(im, i) > lfsr[g][p]) sp[g].push_back(i);
            lfsr[g][p] = lfsr_step(lfsr[g][p]);
          end
        end
        if (sp[g].size() > smax) smax = sp[g].size();
      end
      // synchronous delivery: burst j carries every lane's j-th spike
      for (int j = 0; j < smax; j++) begin
        for (int k = 0; k < 50; k++) begin
          longint hi, lo;
          hi = 0; lo = 0;
          for (int g = 0; g < N_LANES; g++) if (j < sp[g].size()) begin
            hi += wgt(sp[g][j], 2 * k);
            lo += wgt(sp[g][j], 2 * k + 1);
          end
          ege[2 * k]     = sat(ege[2 * k] + sat(hi));
          ege[2 * k + 1] = sat(ege[2 * k + 1] + sat(lo));
        end
      end
      exp_cycles += 26 + 50 * smax;
      for (int n = 0; n < N_EXC; n++) begin
        espk[n] = exc_step(ev[n], ege[n], egi[n], -2130, -2458);
        ecount[n] += espk[n];
        ref_exc_spikes += espk[n];
      end
      ninh = 0;
      for (int n = 0; n < N_INH; n++) begin
        ispk[n] = inh_step(iv[n], ige[n], espk[n], 30720, -1638, -1843);
        ninh += ispk[n];
      end
      ref_inh_spikes += ninh;
      for (int n = 0; n < N_EXC; n++) egi[n] = sat(egi[n] + sat(4096 * longint'(ninh - ispk[n])));
    end
  endtask

  // ---------------- mechanism monitors ----------------
  int m_start = 0, m_multi = 0, m_early_done = 0, m_empty_lane = 0;
  int m_exc_spk = 0, m_inh_spk = 0, m_inhib = 0;
  logic start_d = 0;
  always @(posedge clk) if (rst_n) begin
    int nv, nb;
    nv = 0; nb = 0;
    for (int g = 0; g < N_LANES; g++) begin
      nv += dut.wreq[g].valid;
      nb += dut.st_busy[g] && !dut.wreq[g].valid;
    end
    m_start += dut.sc_start;
    if (nv >= 2) m_multi++;
    if (nv >= 1 && nb >= 1) m_early_done++;
    // a lane with no spike is busy for one cycle, right after Start, without a request
    if (start_d) for (int g = 0; g < N_LANES; g++) m_empty_lane += (dut.st_busy[g] && !dut.wreq[g].valid);
    start_d <= dut.sc_start;
    if (dut.upd_i) m_exc_spk += $countones(dut.exc_spk);
    if (dut.inhib) m_inh_spk += $countones(dut.inh_spk);
    if (dut.inhib && dut.inh_total != 0) m_inhib++;
  end

  // ---------------- run one image ----------------
  task automatic run_image(input int im, input int steps, input bit set_steps);
    logic [31:0] d;
    int pc, done_seen;
    for (int g = 0; g < N_LANES; g++)
      for (int r = 0; r < 14; r++) begin
        logic [31:0] w;
        for (int p = 0; p < 8; p++) w[p*4 +: 4] = 4'(pix(im, g * 112 + r * 8 + p));
        axi_write(IMG, (g << 6) | (r << 2), w);
      end
    axi_read(IMG, (3 << 6) | (5 << 2), d);
    chk(d[3:0] == 4'(pix(im, 3 * 112 + 40)), "image read-back");
    if (set_steps) axi_write(STAT, 8, 32'(steps));
    axi_read(STAT, 8, d);
    chk(d == 32'(steps), "STEPS register");
    ref_image(im, steps);
    axi_write(STAT, 0, 1);
    pc = 0; done_seen = 0;
    while (!done_seen && pc < 2000000) begin
      @(negedge clk);
      pc++;
      done_seen = irq_done;
    end
    chk(done_seen, "image finished");
    axi_read(STAT, 4, d);
    chk(d == 32'h2, $sformatf("STATUS %h: done, not busy", d));
    axi_read(STAT, 12, d);
    chk(int'(d) == exp_cycles, $sformatf("image %0d cycles %0d exp %0d", im, d, exp_cycles));
    $display("image %0d: %0d timesteps in %0d cycles (%0.3f ms at 100 MHz)", im, steps, d, real'(d) / 100000.0);
    for (int n = 0; n < N_EXC; n++) begin
      axi_read(RES, n << 2, d);
      chk(int'(d) == ecount[n], $sformatf("image %0d neuron %0d count %0d exp %0d", im, n, d, ecount[n]));
    end
  endtask

  initial begin
    logic [31:0] d;
    for (int p = 0; p < 4; p++) mreq[p] = '0;
    ref_inh_spikes = 0; ref_exc_spikes = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // weights: lane g word l*50+k = {w(i, 2k), w(i, 2k+1)}, i = g*112 + l
    for (int g = 0; g < N_LANES; g++)
      for (int l = 0; l < 112; l++)
        for (int k = 0; k < 50; k++) begin
          int i;
          i = g * 112 + l;
          axi_write(WGT, (g << 15) | ((l * 50 + k) << 2), {16'(wgt(i, 2 * k)), 16'(wgt(i, 2 * k + 1))});
        end
    axi_read(WGT, (6 << 15) | (5599 << 2), d);
    chk(d == {16'(wgt(783, 98)), 16'(wgt(783, 99))}, "weight read-back");
    run_image(0, 700, 0);   // STEPS left at its reset value (700)
    run_image(1, 200, 1);
    $display("mechanisms: start=%0d multi_lane=%0d lane_done_early=%0d empty_lane=%0d exc_spikes=%0d inh_spikes=%0d inhibition=%0d",
             m_start, m_multi, m_early_done, m_empty_lane, m_exc_spk, m_inh_spk, m_inhib);
    chk(m_start > 0, "start broadcast seen");
    chk(m_multi > 0, "lanes delivering together seen");
    chk(m_early_done > 0, "lane finished before others seen");
    chk(m_empty_lane > 0, "lane without spikes seen");
    chk(m_exc_spk > 0 && m_exc_spk == ref_exc_spikes, $sformatf("excitatory spikes %0d exp %0d", m_exc_spk, ref_exc_spikes));
    chk(m_inh_spk > 0 && m_inh_spk == ref_inh_spikes, $sformatf("inhibitory spikes %0d exp %0d", m_inh_spk, ref_inh_spikes));
    chk(m_inhib > 0, "lateral inhibition seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
