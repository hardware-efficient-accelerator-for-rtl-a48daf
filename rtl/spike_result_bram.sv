// spike_result_bram: per-neuron spike counts of the last image.
//
// One 32-bit word per excitatory neuron; at the end of an image the global
// controller writes neuron n's spike count into word n through port B, and
// the host reads the counts through port A (AXI4-Lite) to pick the class.
// Both ports are synchronous; port A reads with one cycle of latency.
//
// Following the published design: a spike result BRAM fed by the excitatory neurons and
// read by the processor. This design's choice: storing counts, one per neuron.
module spike_result_bram
  import snn_pkg::*;
#(
  parameter int unsigned DEPTH = N_EXC
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  output logic [31:0]              a_rdata,
  input  logic                     b_we,
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  input  logic [31:0]              b_wdata
);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) a_rdata <= mem[a_addr];
  always_ff @(posedge clk) if (b_we) mem[b_addr] <= b_wdata;

endmodule
