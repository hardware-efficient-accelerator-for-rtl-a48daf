// inh_neuron_group: one inhibitory neuron module, a bank of N neurons.
//
// The 100 inhibitory neurons are built as five banks of 20 working in
// parallel; neuron j of the bank is driven by the spike of excitatory neuron
// j of the matching excitatory bank (one-to-one connection) and all neurons
// advance one timestep on `update`.
//
// Following the published design: five parallel inhibitory neuron modules, one-to-one
// excitatory-to-inhibitory connection. This design's choice: 20 per bank.
module inh_neuron_group
  import snn_pkg::*;
#(
  parameter int unsigned N    = 20,
  parameter q_t          W_EI = Q_W_EI
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         update,
  input  logic [N-1:0] exc_spikes,
  output logic [N-1:0] spikes
);

  for (genvar j = 0; j < N; j++) begin : g_n
    q_t v_unused, ge_unused;
    inh_neuron #(.W_EI(W_EI)) u_n (
      .clk, .rst_n, .clear, .update,
      .exc_spike (exc_spikes[j]),
      .spike     (spikes[j]),
      .v         (v_unused),
      .ge        (ge_unused)
    );
  end

endmodule
