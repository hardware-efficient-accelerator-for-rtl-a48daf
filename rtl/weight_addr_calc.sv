// weight_addr_calc (WAC): weight-address generator of one spike storage.
//
// For a spike at row `row` (0..13, the storage index) and bit position `pos`
// (0..7) it produces the 50 consecutive weight-word addresses holding that
// input's 100 weights, one per clock. It works with two adders: the first adds
// the position's start point (pos x 50, i.e. 0, 50, ..., 350) to the row's
// start point (row x 400, i.e. 0, 400, ..., 5200); the second adds the word
// counter 0..49, which steps by one every cycle while `en` is high.
//
// Interface: while en = 1 the address addr = row*400 + pos*50 + word is valid
// in the same cycle (combinational from row/pos and the counter); `last` marks
// word 49, after which the counter wraps to 0 for the next spike. Dropping en
// holds the counter. Synchronous active-low reset.
//
// Following the published design: the start-point tables, the two adders, the 0..49 step.
// This design's choices: the start points are computed with shifts and adds
// (x50 = x32 + x16 + x2, x400 = x256 + x128 + x16) rather than held in a table.
module weight_addr_calc
  import snn_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic [3:0]      row,
  input  logic [2:0]      pos,
  output logic [W_AW-1:0] addr,
  output logic [5:0]      word,
  output logic            last
);

  logic [W_AW-1:0] pos_start, row_start, spike_start;

  always_comb begin
    pos_start   = (W_AW'(pos) << 5) + (W_AW'(pos) << 4) + (W_AW'(pos) << 1);
    row_start   = (W_AW'(row) << 8) + (W_AW'(row) << 7) + (W_AW'(row) << 4);
    spike_start = pos_start + row_start;        // first adder
    addr        = spike_start + W_AW'(word);    // second adder
    last        = (word == 6'(WORDS_PER_IN - 1));
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  word <= '0;
    else if (en) word <= last ? '0 : word + 6'd1;
  end

endmodule
