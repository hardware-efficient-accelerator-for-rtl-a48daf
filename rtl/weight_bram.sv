// weight_bram: synaptic weight memory of one input lane.
//
// 5600 words of 32 bits hold the 11,200 weights from the lane's 112 inputs to
// the 100 excitatory neurons, two 16-bit Q3.12 weights per word. Input l of
// the lane (l = row*8 + position) owns words l*50 .. l*50+49; word l*50+k
// holds the weight to excitatory neuron 2k in bits [31:16] and to neuron 2k+1
// in bits [15:0]. Port A is the host side (AXI4-Lite), port B is read by the
// lane's weight address calculator. Both have one cycle of read latency.
//
// Following the published design: 5600 words x 32 bits, two 16-bit weights per word, 50
// words per input spike. This design's choice: which half holds the even
// neuron (the upper half, as the word is drawn left to right).
module weight_bram
  import snn_pkg::*;
#(
  parameter int unsigned DEPTH = W_DEPTH
) (
  input  logic                     clk,
  input  logic                     a_we,
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  input  logic [31:0]              a_wdata,
  output logic [31:0]              a_rdata,
  input  logic                     b_en,
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  output logic [31:0]              b_rdata
);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    a_rdata <= mem[a_addr];
  end

  always_ff @(posedge clk) if (b_en) b_rdata <= mem[b_addr];

endmodule
