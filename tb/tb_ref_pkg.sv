// tb_ref_pkg: reference arithmetic for the testbenches.
//
// Integer models of the neuron equations and the LFSR, written with plain
// integer division (rounded down) rather than shifts so that they check the
// RTL's shift-based datapath independently. All values are Q3.12 integers.
package tb_ref_pkg;

  localparam longint REST = 2458;   // 0.6
  localparam longint ONE  = 4096;

  function automatic longint fdiv(input longint a, input longint b);
    longint q;
    q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q = q - 1;
    return q;
  endfunction

  function automatic longint sat(input longint x);
    if (x > 32767) return 32767;
    if (x < -32768) return -32768;
    return x;
  endfunction

  // one excitatory step; returns 1 on a spike, updates v, ge, gi in place
  function automatic bit exc_step(inout longint v, inout longint ge, inout longint gi,
                                  input longint th, input longint vreset);
    longint vn;
    vn = sat(v + fdiv(-fdiv(v * (ge + gi + ONE), 4096) - gi - REST, 1024));
    ge = ge - fdiv(ge, 32);
    gi = gi - fdiv(gi, 128);
    if (vn > th) begin v = vreset; return 1; end
    v = vn;
    return 0;
  endfunction

  // one inhibitory step with the partner spike folded in first
  function automatic bit inh_step(inout longint v, inout longint ge, input bit exc_spike,
                                  input longint w_ei, input longint th, input longint vreset);
    longint vn, gin;
    gin = exc_spike ? sat(ge + w_ei) : ge;
    vn  = sat(v + fdiv(-fdiv(v * (gin + ONE), 4096) - REST, 1024));
    ge  = gin - fdiv(gin, 32);
    if (vn > th) begin v = vreset; return 1; end
    v = vn;
    return 0;
  endfunction

  // 11-bit LFSR with feedback from bits 10 and 8 (x^11 + x^9 + 1)
  function automatic int lfsr_step(input int s);
    int fb;
    fb = ((s >> 10) & 1) ^ ((s >> 8) & 1);
    return ((s * 2) % 2048) + fb;
  endfunction

  function automatic int lfsr_seed(input int gen, input int lane);
    return ((gen * 8 + lane) * 37 + 1) % 2047 + 1;
  endfunction

endpackage
