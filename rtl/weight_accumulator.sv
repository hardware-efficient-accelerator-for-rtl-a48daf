// weight_accumulator: synchronous weight transmission (adder across lanes).
//
// All busy spike storages request the same word number k of their spikes'
// weight blocks in the same cycle. One cycle later the seven weight BRAMs
// return their words; this unit adds, separately for the upper and lower
// 16-bit halves, the words of the lanes that made a request, so that one
// summed word per cycle - the total input to excitatory neurons 2k and 2k+1
// - goes to the excitatory neurons instead of seven separate channels.
//
// Timing: req (valid, word) is sampled in the request cycle and delayed one
// cycle to line up with the BRAM data; the sums are registered, so sum_valid
// comes two cycles after the request. Sums saturate to Q3.12.
// Interface: req[i] / rdata[i] belong to lane i. Synchronous active-low reset.
//
// Following the published design: one accumulated value per clock cycle sent to the
// excitatory neurons. This design's choices: the pipeline registers and the
// saturation.
module weight_accumulator
  import snn_pkg::*;
#(
  parameter int unsigned N = N_LANES
) (
  input  logic        clk,
  input  logic        rst_n,
  input  wreq_t       req   [N],
  input  logic [31:0] rdata [N],
  output logic        sum_valid,
  output logic [5:0]  sum_word,
  output q_t          sum_hi,     // to excitatory neuron 2*sum_word
  output q_t          sum_lo      // to excitatory neuron 2*sum_word+1
);

  logic [N-1:0] v_d;
  logic [5:0]   w_d;
  logic [5:0]   w_any;
  logic signed [19:0] acc_hi, acc_lo;

  always_comb begin
    w_any = '0;
    for (int i = 0; i < N; i++) if (req[i].valid) w_any |= req[i].word;
  end

  always_comb begin
    acc_hi = '0;
    acc_lo = '0;
    for (int i = 0; i < N; i++) begin
      if (v_d[i]) begin
        acc_hi += 20'(signed'(rdata[i][31:16]));
        acc_lo += 20'(signed'(rdata[i][15:0]));
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_d       <= '0;
      w_d       <= '0;
      sum_valid <= 1'b0;
      sum_word  <= '0;
      sum_hi    <= '0;
      sum_lo    <= '0;
    end else begin
      for (int i = 0; i < N; i++) v_d[i] <= req[i].valid;
      w_d       <= w_any;
      sum_valid <= |v_d;
      sum_word  <= w_d;
      sum_hi    <= sat16(40'(acc_hi));
      sum_lo    <= sat16(40'(acc_lo));
    end
  end

  // synchronous transmission: every requesting lane asks for the same word
  for (genvar i = 0; i < N; i++) begin : g_chk
    a_aligned: assert property (@(posedge clk) disable iff (!rst_n)
      req[i].valid |-> req[i].word == w_any);
  end

endmodule
