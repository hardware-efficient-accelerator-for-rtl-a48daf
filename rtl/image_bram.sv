// image_bram: image buffer of one input lane.
//
// Holds the lane's 112 input pixels as 14 words of eight 4-bit pixels (pixel p
// of a word in bits [4p+3:4p]). Port A is the host side (written and read
// through AXI4-Lite); port B is read by the lane's LFSR spike generator, one
// row per cycle. Both ports are synchronous with one cycle of read latency.
//
// Following the published design: one image BRAM per lane, 4-bit pixels, eight per LFSR
// module. This design's choices: one image deep, the pixel packing.
module image_bram
  import snn_pkg::*;
#(
  parameter int unsigned DEPTH = ROWS
) (
  input  logic                     clk,
  // port A: host
  input  logic                     a_we,
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  input  logic [31:0]              a_wdata,
  output logic [31:0]              a_rdata,
  // port B: spike generator
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  output logic [31:0]              b_rdata
);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    a_rdata <= mem[a_addr];
  end

  always_ff @(posedge clk) b_rdata <= mem[b_addr];

endmodule
