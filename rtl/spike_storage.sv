// spike_storage: synchronous spike storage of one input lane.
//
// Stores the fourteen 8-bit spike rows that the lane's LFSR spike generator
// produces in one timestep (112 input neurons) and walks through the stored
// spikes, driving the weight address calculator (WAC) for each.
//
// States: LOAD - rows are written with wr_en/wr_row; writing row 13 moves the
// storage to READY (output `ready`). READY - waits for the controller's
// broadcast `start`, then enters BUSY (output `busy`). BUSY - a priority
// encoder picks the lowest-numbered stored spike (row first, then bit
// position); the WAC issues its 50 weight-word requests, one per cycle, and
// on the 50th the spike bit is cleared and the next spike follows without a
// gap cycle. When no spike is left the storage returns to LOAD. Since every
// busy storage starts in the same cycle and every spike takes exactly 50
// cycles, the requests of all storages stay aligned word for word.
//
// Interface: wreq is combinational (valid, BRAM word address, word number
// 0..49). Synchronous active-low reset. A storage with no spike at all is
// busy for a single cycle and requests nothing.
//
// Following the published design: 14 x 8-bit storage with a row index, the Ready / Busy /
// Start handshake, one WAC per storage, 50 words per spike. This design's
// choices: the scan order and the zero-gap priority encoder.
module spike_storage
  import snn_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                wr_en,
  input  logic [3:0]          wr_row,
  input  logic [ROW_BITS-1:0] wr_spikes,
  input  logic                start,
  output logic                ready,
  output logic                busy,
  output wreq_t               wreq
);

  localparam int unsigned NB = ROWS * ROW_BITS;   // 112

  typedef enum logic [1:0] {ST_LOAD, ST_READY, ST_BUSY} st_t;
  st_t st;

  logic [NB-1:0] bits;
  logic          any;
  logic [6:0]    first;
  logic          wac_en, wac_last;
  logic [5:0]    wac_word;
  logic [W_AW-1:0] wac_addr;

  // lowest set bit of the stored spikes
  always_comb begin
    any   = |bits;
    first = '0;
    for (int i = NB - 1; i >= 0; i--) if (bits[i]) first = 7'(i);
  end

  assign wac_en = (st == ST_BUSY) && any;

  weight_addr_calc u_wac (
    .clk, .rst_n,
    .en   (wac_en),
    .row  (first[6:3]),
    .pos  (first[2:0]),
    .addr (wac_addr),
    .word (wac_word),
    .last (wac_last)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st   <= ST_LOAD;
      bits <= '0;
    end else begin
      unique case (st)
        ST_LOAD: if (wr_en) begin
          bits[wr_row*ROW_BITS +: ROW_BITS] <= wr_spikes;
          if (wr_row == 4'(ROWS - 1)) st <= ST_READY;
        end
        ST_READY: if (start) st <= ST_BUSY;
        ST_BUSY: begin
          if (!any) st <= ST_LOAD;
          else if (wac_last) bits[first] <= 1'b0;
        end
        default: st <= ST_LOAD;
      endcase
    end
  end

  assign ready      = (st == ST_READY);
  assign busy       = (st == ST_BUSY);
  assign wreq.valid = wac_en;
  assign wreq.addr  = wac_addr;
  assign wreq.word  = wac_word;

  // rows are only written while the storage is loading
  a_write_when_loading: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> st == ST_LOAD);

endmodule
