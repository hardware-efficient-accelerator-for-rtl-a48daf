// snn_pkg: constants, types and small helpers shared by the spiking neural
// network accelerator.
//
// Network shape: 784 input neurons, 100 excitatory and 100 inhibitory
// neurons. The 784 inputs are split over 7 parallel lanes (image BRAM, 11-bit
// LFSR spike generator, spike storage, weight BRAM); each lane covers 112
// inputs held as 14 rows of 8 spikes. Each input owns 100 synaptic weights,
// packed two per 32-bit weight word, so one input's weights are 50 words and
// one lane's weight BRAM is 112 x 50 = 5600 words.
//
// Number format: every state variable (membrane potential, conductances,
// weights) is 16-bit signed fixed point with 1 sign bit, 3 integer bits and
// 12 fraction bits (Q3.12), on the 10x voltage-scaled model. The neuron
// constants below are the values this implementation chooses where the model
// leaves them open (threshold, reset, lateral weights); the resting term 0.6
// is the model's own.
package snn_pkg;

  // ---- network geometry -------------------------------------------------
  localparam int unsigned N_LANES      = 7;    // LFSR / storage / BRAM lanes
  localparam int unsigned ROWS         = 14;   // 8-bit spike rows per storage
  localparam int unsigned ROW_BITS     = 8;    // spikes (pixels) per row
  localparam int unsigned N_INPUT      = N_LANES * ROWS * ROW_BITS; // 784
  localparam int unsigned N_EXC        = 100;  // excitatory neurons
  localparam int unsigned N_INH        = 100;  // inhibitory neurons
  localparam int unsigned WORDS_PER_IN = N_EXC / 2;                 // 50
  localparam int unsigned W_DEPTH      = ROWS * ROW_BITS * WORDS_PER_IN; // 5600
  localparam int unsigned W_AW         = 13;   // clog2(5600)
  localparam int unsigned PIX_BITS     = 4;    // input pixel intensity bits
  localparam int unsigned LFSR_BITS    = 11;

  // ---- fixed point --------------------------------------------------------
  localparam int unsigned FRAC = 12;
  typedef logic signed [15:0] q_t;               // Q3.12
  localparam q_t Q_ONE     = 16'sd4096;          // 1.0
  localparam q_t Q_MAX     = 16'sh7fff;
  localparam q_t Q_MIN     = -16'sh8000;
  localparam q_t Q_REST    = 16'sd2458;          // 0.6  (resting term of eq. 1 and 4)
  localparam q_t Q_V_INIT    = -16'sd2458;       // -0.6  initial membrane potential
  localparam q_t Q_V_TH_E    = -16'sd2130;       // -0.52 excitatory firing threshold
  localparam q_t Q_V_RESET_E = -16'sd2458;       // -0.6  excitatory reset potential
  localparam q_t Q_V_TH_I    = -16'sd1638;       // -0.4  inhibitory firing threshold
  localparam q_t Q_V_RESET_I = -16'sd1843;       // -0.45 inhibitory reset potential
  localparam q_t Q_W_EI      = 16'sd30720;       // 7.5 excitatory -> inhibitory weight
  localparam q_t Q_W_IE      = 16'sd4096;        // 1.0 inhibitory -> excitatory weight

  // saturate a wide signed value to Q3.12
  function automatic q_t sat16(input logic signed [39:0] x);
    if (x > 40'sd32767)       return Q_MAX;
    else if (x < -40'sd32768) return Q_MIN;
    else                      return q_t'(x);
  endfunction

  // 11-bit maximal-length Fibonacci LFSR, x^11 + x^9 + 1
  function automatic logic [LFSR_BITS-1:0] lfsr11_next(input logic [LFSR_BITS-1:0] s);
    return {s[LFSR_BITS-2:0], s[10] ^ s[8]};
  endfunction

  // non-zero seed of LFSR `lane` (0..7) in spike generator `gen` (0..6)
  function automatic logic [LFSR_BITS-1:0] lfsr11_seed(input int gen, input int lane);
    int unsigned v;
    v = ((gen * ROW_BITS + lane) * 37 + 1) % 2047;
    return LFSR_BITS'(v + 1);
  endfunction

  // ---- AXI4-Lite (32-bit data) ------------------------------------------------
  typedef struct packed {
    logic [31:0] awaddr;
    logic        awvalid;
    logic [31:0] wdata;
    logic [3:0]  wstrb;
    logic        wvalid;
    logic        bready;
    logic [31:0] araddr;
    logic        arvalid;
    logic        rready;
  } axil_req_t;

  typedef struct packed {
    logic        awready;
    logic        wready;
    logic [1:0]  bresp;
    logic        bvalid;
    logic        arready;
    logic [31:0] rdata;
    logic [1:0]  rresp;
    logic        rvalid;
  } axil_rsp_t;

  // ---- weight request from one lane ------------------------------------------
  typedef struct packed {
    logic            valid;   // a weight word is requested this cycle
    logic [W_AW-1:0] addr;    // word address in the lane's weight BRAM
    logic [5:0]      word;    // 0..49: which pair of excitatory neurons
  } wreq_t;

  // ---- global controller phases ------------------------------------------------
  typedef enum logic [3:0] {
    PH_IDLE, PH_CLEAR, PH_GEN, PH_PROC, PH_DRAIN, PH_UPD_E, PH_UPD_I,
    PH_INHIB, PH_WB, PH_DONE
  } phase_t;

endpackage
