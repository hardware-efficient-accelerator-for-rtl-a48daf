// snn_top: spiking neural network inference accelerator (784-100-100).
//
// A host processor loads an image into the seven image BRAMs and the
// synaptic weights into the seven weight BRAMs over AXI4-Lite, starts the
// run through the status buffer and reads one spike count per excitatory
// neuron from the spike result BRAM; the neuron with the most spikes names
// the class.
//
// Per timestep, seven lanes of 112 inputs each turn their pixels into spikes
// with 11-bit LFSRs (56 spikes per clock) and store them as 14 x 8-bit rows
// in their spike storages. The spike controller starts all loaded storages in
// the same cycle; each walks through its stored spikes, and its weight
// address calculator reads the 50 words (100 weights) of each spike from the
// lane's weight BRAM. Because all lanes read the same word number in the same
// cycle, one adder tree sums the seven words into a single word per cycle,
// which feeds excitatory neurons 2k and 2k+1 (five banks of 20). Then the
// excitatory neurons, their one-to-one inhibitory partners and the lateral
// inhibition are updated, each in one cycle, with no transmission delay.
//
// Host ports (AXI4-Lite, 32-bit, byte addresses):
//   s_img  lane = addr[8:6] (0..6), row = addr[5:2] (0..13); 8 x 4-bit pixels
//   s_wgt  lane = addr[17:15], word = addr[14:2] (0..5599); 2 x Q3.12 weights
//   s_res  neuron = addr[8:2] (0..99): spike count (read only)
//   s_stat registers of status_buffer
// `irq_done` pulses for one cycle when an image is finished.
// Host accesses to the image and weight BRAMs should not overlap a run.
//
// Following the published design: the seven lanes, the 5600-word weight
// BRAMs, the five excitatory and five inhibitory neuron modules, the
// synchronised weight delivery with one adder across lanes, the spike result
// BRAM, status buffer and global controller, AXI4-Lite towards the processor.
// This design's choices: the address maps, the phase sequence of a timestep,
// the default of 700 timesteps and clearing neuron state at each image start.
module snn_top
  import snn_pkg::*;
#(
  parameter int unsigned DEFAULT_STEPS = 700
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t s_img_req,
  output axil_rsp_t s_img_rsp,
  input  axil_req_t s_wgt_req,
  output axil_rsp_t s_wgt_rsp,
  input  axil_req_t s_res_req,
  output axil_rsp_t s_res_rsp,
  input  axil_req_t s_stat_req,
  output axil_rsp_t s_stat_rsp,
  output logic      irq_done
);

  localparam int unsigned NG = 5;              // neuron banks
  localparam int unsigned GN = N_EXC / NG;     // neurons per bank

  // ---------------- host buses ----------------
  logic        img_we, img_re, wgt_we, wgt_re, res_we, res_re, st_we, st_re;
  logic [31:0] img_wa, img_wd, img_ra, wgt_wa, wgt_wd, wgt_ra;
  logic [31:0] res_wa, res_wd, res_ra, st_wa, st_wd, st_ra;
  logic [31:0] img_rd, wgt_rd, res_rd, st_rd;

  axil_slave u_ax_img (.clk, .rst_n, .req(s_img_req), .rsp(s_img_rsp),
    .wr_en(img_we), .wr_addr(img_wa), .wr_data(img_wd),
    .rd_en(img_re), .rd_addr(img_ra), .rd_data(img_rd));
  axil_slave u_ax_wgt (.clk, .rst_n, .req(s_wgt_req), .rsp(s_wgt_rsp),
    .wr_en(wgt_we), .wr_addr(wgt_wa), .wr_data(wgt_wd),
    .rd_en(wgt_re), .rd_addr(wgt_ra), .rd_data(wgt_rd));
  axil_slave u_ax_res (.clk, .rst_n, .req(s_res_req), .rsp(s_res_rsp),
    .wr_en(res_we), .wr_addr(res_wa), .wr_data(res_wd),
    .rd_en(res_re), .rd_addr(res_ra), .rd_data(res_rd));
  axil_slave u_ax_st (.clk, .rst_n, .req(s_stat_req), .rsp(s_stat_rsp),
    .wr_en(st_we), .wr_addr(st_wa), .wr_data(st_wd),
    .rd_en(st_re), .rd_addr(st_ra), .rd_data(st_rd));

  // ---------------- status buffer and global controller ----------------
  logic        g_start, proc_done, clear, gen_wr, upd_e, upd_i, inhib;
  logic        wb_en, g_busy, g_done;
  logic [3:0]  img_addr, wr_row;
  logic [6:0]  wb_addr;
  logic [15:0] num_steps, step;
  logic [31:0] cycles;
  phase_t      phase;

  status_buffer #(.DEFAULT_STEPS(DEFAULT_STEPS)) u_status (
    .clk, .rst_n,
    .wr_en(st_we), .wr_addr(st_wa), .wr_data(st_wd),
    .rd_en(st_re), .rd_addr(st_ra), .rd_data(st_rd),
    .start(g_start), .num_steps, .busy(g_busy), .done(g_done),
    .cycles, .step, .phase);

  global_controller u_gctl (
    .clk, .rst_n, .start(g_start), .num_steps, .proc_done,
    .phase, .clear, .img_addr, .wr_en(gen_wr), .wr_row,
    .upd_e, .upd_i, .inhib, .wb_en, .wb_addr,
    .busy(g_busy), .done(g_done), .step, .cycles);

  assign irq_done = g_done;

  // ---------------- seven input lanes ----------------
  logic [2:0]  img_rlane_q, wgt_rlane_q;
  logic [31:0] img_a_rd [N_LANES];
  logic [31:0] wgt_a_rd [N_LANES];
  logic [31:0] img_b_rd [N_LANES];
  logic [31:0] wgt_b_rd [N_LANES];
  wreq_t       wreq     [N_LANES];
  logic [N_LANES-1:0] st_ready, st_busy;
  logic        sc_start;

  for (genvar i = 0; i < N_LANES; i++) begin : g_lane
    logic [ROW_BITS-1:0] spikes;

    image_bram u_img (
      .clk,
      .a_we    (img_we && img_wa[8:6] == 3'(i)),
      .a_addr  (img_re ? img_ra[5:2] : img_wa[5:2]),
      .a_wdata (img_wd),
      .a_rdata (img_a_rd[i]),
      .b_addr  (img_addr),
      .b_rdata (img_b_rd[i]));

    lfsr_spike_gen #(.GEN_ID(i)) u_lfsr (
      .clk, .rst_n, .reseed(clear), .en(gen_wr),
      .pix_row (img_b_rd[i]),
      .spikes);

    spike_storage u_store (
      .clk, .rst_n,
      .wr_en     (gen_wr),
      .wr_row,
      .wr_spikes (spikes),
      .start     (sc_start),
      .ready     (st_ready[i]),
      .busy      (st_busy[i]),
      .wreq      (wreq[i]));

    weight_bram u_wgt (
      .clk,
      .a_we    (wgt_we && wgt_wa[17:15] == 3'(i)),
      .a_addr  (wgt_re ? wgt_ra[14:2] : wgt_wa[14:2]),
      .a_wdata (wgt_wd),
      .a_rdata (wgt_a_rd[i]),
      .b_en    (wreq[i].valid),
      .b_addr  (wreq[i].addr),
      .b_rdata (wgt_b_rd[i]));
  end

  always_ff @(posedge clk) begin
    if (img_re) img_rlane_q <= img_ra[8:6];
    if (wgt_re) wgt_rlane_q <= wgt_ra[17:15];
  end
  assign img_rd = (img_rlane_q < 3'(N_LANES)) ? img_a_rd[img_rlane_q] : '0;
  assign wgt_rd = (wgt_rlane_q < 3'(N_LANES)) ? wgt_a_rd[wgt_rlane_q] : '0;

  spike_controller u_sctl (
    .clk, .rst_n, .ready(st_ready), .busy(st_busy),
    .start(sc_start), .done(proc_done));

  // ---------------- synchronous weight summation ----------------
  logic       sum_valid;
  logic [5:0] sum_word;
  q_t         sum_hi, sum_lo;

  weight_accumulator u_acc (
    .clk, .rst_n, .req(wreq), .rdata(wgt_b_rd),
    .sum_valid, .sum_word, .sum_hi, .sum_lo);

  // ---------------- neurons ----------------
  logic [N_EXC-1:0] exc_spk;
  logic [N_INH-1:0] inh_spk;
  logic [15:0]      counts [N_EXC];
  logic [6:0]       inh_total;

  always_comb begin
    inh_total = '0;
    for (int n = 0; n < N_INH; n++) inh_total += 7'(inh_spk[n]);
  end

  for (genvar g = 0; g < NG; g++) begin : g_bank
    logic [15:0] cnt_g [GN];

    exc_neuron_group #(.N(GN), .BASE(g * GN)) u_exc (
      .clk, .rst_n, .clear,
      .sum_valid, .sum_word, .sum_hi, .sum_lo,
      .inhib, .inh_total,
      .inh_own (inh_spk[g*GN +: GN]),
      .update  (upd_e),
      .spikes  (exc_spk[g*GN +: GN]),
      .counts  (cnt_g));

    inh_neuron_group #(.N(GN)) u_inh (
      .clk, .rst_n, .clear,
      .update     (upd_i),
      .exc_spikes (exc_spk[g*GN +: GN]),
      .spikes     (inh_spk[g*GN +: GN]));

    for (genvar j = 0; j < GN; j++) begin : g_cnt
      assign counts[g*GN + j] = cnt_g[j];
    end
  end

  // ---------------- spike result BRAM ----------------
  spike_result_bram u_res (
    .clk,
    .a_addr  (res_ra[8:2]),
    .a_rdata (res_rd),
    .b_we    (wb_en),
    .b_addr  (wb_addr),
    .b_wdata ({16'd0, counts[wb_addr]}));

endmodule
