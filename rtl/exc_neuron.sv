// exc_neuron: one excitatory leaky integrate-and-fire neuron.
//
// State (all Q3.12): membrane potential v, excitatory conductance ge and
// inhibitory conductance gi, plus a 16-bit count of the spikes fired since
// `clear`. During weight delivery every `ge_add_en` adds the summed input
// weight to ge; `gi_add_en` adds the lateral inhibition from the inhibitory
// layer to gi. One `update` pulse advances the neuron by one timestep with
// the power-of-two forms of the model equations:
//   v  <- v  + (-v*(ge + gi + 1) - gi - 0.6) / 1024      (eq. 1)
//   ge <- ge - ge/32                                      (eq. 2)
//   gi <- gi - gi/128                                     (eq. 3)
// the divisions being arithmetic right shifts. If the new v exceeds V_TH the
// neuron fires: `spike` is set until the next update and v is set to V_RESET.
//
// Timing: all operations take effect at the clock edge of the pulse; `spike`
// is valid from the cycle after `update`. Precedence: clear > update >
// gi_add_en > ge_add_en. Results saturate to the Q3.12 range.
//
// Following the published design: the equations, the shift divisions, the Q3.12 format and
// the 0.6 resting term. This design's choices: V_TH, V_RESET, V_INIT (the
// published design gives only the -0.8 .. -0.4 range of v), saturation, truncating
// shifts and the spike counter.
module exc_neuron
  import snn_pkg::*;
#(
  parameter q_t V_TH    = Q_V_TH_E,
  parameter q_t V_RESET = Q_V_RESET_E,
  parameter q_t V_INIT  = Q_V_INIT
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        ge_add_en,
  input  q_t          ge_add,
  input  logic        gi_add_en,
  input  q_t          gi_add,
  input  logic        update,
  output logic        spike,
  output q_t          v,
  output q_t          ge,
  output q_t          gi,
  output logic [15:0] count
);

  logic signed [17:0] m;
  logic signed [33:0] p;
  logic signed [23:0] term;
  q_t                 v_next;

  always_comb begin
    m      = 18'(ge) + 18'(gi) + 18'(Q_ONE);
    p      = 34'(v) * 34'(m);
    term   = -24'(p >>> FRAC) - 24'(gi) - 24'(Q_REST);
    v_next = sat16(40'(v) + 40'(term >>> 10));
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      v     <= V_INIT;
      ge    <= '0;
      gi    <= '0;
      spike <= 1'b0;
      count <= '0;
    end else if (update) begin
      ge <= ge - (ge >>> 5);
      gi <= gi - (gi >>> 7);
      if (v_next > V_TH) begin
        v     <= V_RESET;
        spike <= 1'b1;
        if (count != 16'hffff) count <= count + 16'd1;
      end else begin
        v     <= v_next;
        spike <= 1'b0;
      end
    end else if (gi_add_en) begin
      gi <= sat16(40'(gi) + 40'(gi_add));
    end else if (ge_add_en) begin
      ge <= sat16(40'(ge) + 40'(ge_add));
    end
  end

endmodule
