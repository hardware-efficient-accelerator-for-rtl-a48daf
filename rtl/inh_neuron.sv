// inh_neuron: one inhibitory leaky integrate-and-fire neuron.
//
// Paired one-to-one with an excitatory neuron. On each `update` pulse it
// first adds W_EI to its excitatory conductance if its excitatory partner
// fired in this timestep (`exc_spike`), with no transmission delay, and then
// advances one timestep with the power-of-two model equations:
//   v  <- v  + (-v*(ge + 1) - 0.6) / 1024      (eq. 4)
//   ge <- ge - ge/32                           (eq. 5)
// A new v above V_TH fires the neuron: `spike` is set until the next update
// and v is set to V_RESET.
//
// Timing: state changes at the clock edge of `update`; `spike` is valid from
// the next cycle. `clear` (or reset) restores the initial state.
//
// Following the published design: the equations, shift divisions, Q3.12 format, the 0.6
// term and the removal of synaptic delays. This design's choices: W_EI,
// V_TH, V_RESET, V_INIT, the order "add input, then integrate", saturation.
module inh_neuron
  import snn_pkg::*;
#(
  parameter q_t W_EI    = Q_W_EI,
  parameter q_t V_TH    = Q_V_TH_I,
  parameter q_t V_RESET = Q_V_RESET_I,
  parameter q_t V_INIT  = Q_V_INIT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic update,
  input  logic exc_spike,
  output logic spike,
  output q_t   v,
  output q_t   ge
);

  q_t                 ge_in;
  logic signed [17:0] m;
  logic signed [33:0] p;
  logic signed [23:0] term;
  q_t                 v_next;

  always_comb begin
    ge_in  = exc_spike ? sat16(40'(ge) + 40'(W_EI)) : ge;
    m      = 18'(ge_in) + 18'(Q_ONE);
    p      = 34'(v) * 34'(m);
    term   = -24'(p >>> FRAC) - 24'(Q_REST);
    v_next = sat16(40'(v) + 40'(term >>> 10));
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      v     <= V_INIT;
      ge    <= '0;
      spike <= 1'b0;
    end else if (update) begin
      ge <= ge_in - (ge_in >>> 5);
      if (v_next > V_TH) begin
        v     <= V_RESET;
        spike <= 1'b1;
      end else begin
        v     <= v_next;
        spike <= 1'b0;
      end
    end
  end

endmodule
