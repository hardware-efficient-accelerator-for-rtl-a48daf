// exc_neuron_group: one excitatory neuron module, a bank of N neurons.
//
// The 100 excitatory neurons are built as five such banks of 20, all working
// in parallel. The bank decodes the summed weight stream: a word with number
// k carries the input of neurons 2k (upper sum) and 2k+1 (lower sum), and
// the neuron whose global index (BASE + j) matches takes it into ge. On
// `inhib` each neuron adds to gi W_IE times the number of inhibitory neurons
// that fired in this timestep other than its own partner, which is lateral
// inhibition without transmission delay. `update` advances all neurons one
// timestep at once.
//
// Interface: sum_* come from the weight accumulator; inh_total is the number
// of inhibitory spikes of the timestep (0..100) and inh_own[j] the spike of
// neuron j's partner. spikes/counts are the neurons' outputs. One cycle per
// operation, synchronous.
//
// Following the published design: five parallel excitatory neuron modules, lateral
// inhibition from every inhibitory neuron except the partner. This design's
// choices: 20 neurons per bank, W_IE and computing the inhibition as a count.
module exc_neuron_group
  import snn_pkg::*;
#(
  parameter int unsigned N    = 20,
  parameter int unsigned BASE = 0,
  parameter q_t          W_IE = Q_W_IE
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        sum_valid,
  input  logic [5:0]  sum_word,
  input  q_t          sum_hi,
  input  q_t          sum_lo,
  input  logic        inhib,
  input  logic [6:0]  inh_total,
  input  logic [N-1:0] inh_own,
  input  logic        update,
  output logic [N-1:0] spikes,
  output logic [15:0] counts [N]
);

  for (genvar j = 0; j < N; j++) begin : g_n
    localparam int unsigned IDX = BASE + j;
    logic       hit_hi, hit_lo;
    logic [6:0] others;
    q_t         gi_add;
    q_t         v_unused, ge_unused, gi_unused;

    assign hit_hi = sum_valid && (7'(sum_word) * 7'd2 == 7'(IDX));
    assign hit_lo = sum_valid && (7'(sum_word) * 7'd2 + 7'd1 == 7'(IDX));
    assign others = inh_total - 7'(inh_own[j]);
    assign gi_add = sat16(40'(W_IE) * 40'(others));

    exc_neuron u_n (
      .clk, .rst_n, .clear,
      .ge_add_en (hit_hi || hit_lo),
      .ge_add    (hit_hi ? sum_hi : sum_lo),
      .gi_add_en (inhib),
      .gi_add    (gi_add),
      .update,
      .spike     (spikes[j]),
      .v         (v_unused),
      .ge        (ge_unused),
      .gi        (gi_unused),
      .count     (counts[j])
    );
  end

endmodule
