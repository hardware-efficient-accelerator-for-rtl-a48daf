// lfsr_spike_gen: Poisson-like spike generator of one input lane.
//
// Holds eight 11-bit LFSRs, one per pixel of a row. When `en` is high the
// eight 4-bit pixels of `pix_row` are each compared with the current value of
// their own LFSR; a pixel whose intensity is greater than its LFSR value fires
// (spike bit = 1). All eight LFSRs then step once. Seven of these run in
// parallel, one per lane, so 56 spikes are produced per clock.
//
// Interface: pix_row[4*p+3:4*p] is pixel p; spikes[p] is its spike. The spike
// vector is combinational from pix_row and the LFSR state; the LFSRs advance
// on the clock edge when en = 1. Reset (synchronous, active low) and `reseed`
// load the per-LFSR seeds.
//
// Following the published design: 11-bit LFSRs, 7 parallel modules of 8 comparisons each,
// 4-bit pixel inputs, spike when pixel > LFSR value. This design's choices:
// the polynomial x^11 + x^9 + 1, the seeds, zero-extending the 4-bit pixel
// to 11 bits for the compare, and stepping the LFSRs only when a row is
// generated, which makes the spike trains independent of stall cycles.
module lfsr_spike_gen
  import snn_pkg::*;
#(
  parameter int unsigned GEN_ID = 0   // lane number, selects the seeds
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         reseed,
  input  logic                         en,
  input  logic [ROW_BITS*PIX_BITS-1:0] pix_row,
  output logic [ROW_BITS-1:0]          spikes
);

  logic [LFSR_BITS-1:0] state [ROW_BITS];

  always_ff @(posedge clk) begin
    for (int p = 0; p < ROW_BITS; p++) begin
      if (!rst_n || reseed) state[p] <= lfsr11_seed(int'(GEN_ID), p);
      else if (en)          state[p] <= lfsr11_next(state[p]);
    end
  end

  always_comb begin
    for (int p = 0; p < ROW_BITS; p++) begin
      spikes[p] = {7'd0, pix_row[p*PIX_BITS +: PIX_BITS]} > state[p];
    end
  end

endmodule
