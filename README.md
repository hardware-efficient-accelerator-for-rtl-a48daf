# Spiking neural network accelerator with synchronous spike storage

This is synthesizable SystemVerilog for an inference accelerator for a small
spiking neural network (SNN): 784 input neurons, one per pixel of a 28 x 28
image, drive 100 excitatory leaky integrate-and-fire neurons. Each excitatory
neuron has one inhibitory partner, and that partner inhibits every other
excitatory neuron. The result is winner-take-all competition, and the class of
an image is read from which excitatory neurons fired most. The design targets a
Zynq-7020-class FPGA at 100 MHz, with a processor acting as host over AXI4-Lite.

The idea behind the architecture is to keep many input lanes in lock-step. The
784 inputs are split over seven lanes. In each timestep every lane turns its
112 pixels into random spikes and stores them. All lanes then fetch the
synaptic weights of their spikes in the same clock cycles and in the same
order. Because the seven weight words that arrive in one cycle always belong to
the same pair of excitatory neurons, a single adder tree can merge them. The
neurons therefore see one weight stream instead of seven independent channels.

The rest of the cost savings come from the arithmetic. Everything is 16-bit
fixed point: 1 sign bit, 3 integer bits and 12 fraction bits (Q3.12). Membrane
potentials are scaled up 10x so that small values keep their bits. The time
constants of the neuron equations are powers of two, so every division is a
shift.

## One timestep

A run processes one image for `STEPS` timesteps (700 after reset, programmable).
The global controller (`global_controller`) sequences each timestep:

| phase | cycles | what happens |
|---|---|---|
| GEN | 15 | Rows 0..13 of each lane's image BRAM are read, one per cycle, with one cycle of BRAM latency. Each lane's `lfsr_spike_gen` compares the eight 4-bit pixels of a row with eight 11-bit LFSRs. A pixel fires when it is greater than its LFSR value. The 8-bit result goes into row *r* of the lane's `spike_storage`. |
| PROC | 50·S + 5 | The `spike_controller` sees the storages Ready and broadcasts Start. Every storage serves its spikes, 50 weight words each. *S* is the largest number of spikes any single lane holds in this timestep. |
| DRAIN | 3 | The last summed words reach the neurons. |
| UPD_E | 1 | All 100 excitatory neurons step once (equations 1–3 below). |
| UPD_I | 1 | All 100 inhibitory neurons take their partners' spikes and step once (equations 4–5). |
| INHIB | 1 | Each excitatory neuron adds `W_IE` × (inhibitory spikes of this timestep, not counting its own partner's) to its inhibitory conductance. |

One image therefore takes `1 + Σ(26 + 50·S_t) + 100` cycles. The final 100
cycles copy the spike counts into the spike result BRAM. The cost is dominated
by the busiest lane of each timestep. A timestep in which no lane has a spike
costs 26 cycles.

There are no synaptic transmission delays. An excitatory spike reaches its
inhibitory partner in the same timestep, and the resulting inhibition reaches
the excitatory layer before the next timestep. This is deliberate: it removes
delay lines and sharpens the winner-take-all competition.

## Spike lanes and weight addressing

Lane *g* (0..6) owns inputs `112·g .. 112·g+111`. Inside the lane, input
`l = row·8 + pos` sits in row `row` (0..13) at bit `pos` (0..7) of the spike
storage. Its pixel is bits `[4·pos+3 : 4·pos]` of image word `row`.

Each input has 100 weights, one for each excitatory neuron, packed two per
32-bit word. The weights of input *l* fill words `50·l .. 50·l+49` of the lane's
weight BRAM (5,600 words). Word `50·l + k` holds:

* the weight to neuron `2k` in bits `[31:16]`;
* the weight to neuron `2k+1` in bits `[15:0]`.

The weight address calculator (`weight_addr_calc`, one per storage) produces
these addresses with two adders. The first forms the start point
`row·400 + pos·50`, both products built by shift-and-add. The second adds a
counter that runs from 0 to 49, one step per clock.

The storage's priority encoder always picks the lowest-numbered remaining
spike. When the 50th word of a spike is issued, that spike's bit is cleared and
the next spike's first word follows in the very next cycle. When nothing is
left, the storage drops Busy and returns to loading.

## Why the lanes stay aligned

This is the part of the design that is easiest to get wrong.

* Start is a single broadcast pulse. Every storage that is Ready enters Busy
  in the same cycle.
* Every spike takes exactly 50 cycles, and there is never a gap cycle between
  the spikes of a storage.
* It follows that, in any cycle, every lane that is still delivering is on the
  same word number *k*. The *j*-th burst of 50 cycles carries the *j*-th spike
  of every lane that has at least *j* spikes.

`weight_accumulator` relies on this. One cycle after the requests (BRAM
latency), it adds the upper halves and the lower halves of the words returned
by the lanes that requested. It ignores the other lanes and registers two
saturated Q3.12 sums. Each excitatory neuron bank (`exc_neuron_group`, five
banks of 20) decodes the word number. Neurons `2k` and `2k+1` add the sums into
their excitatory conductance `ge`.

An assertion in `weight_accumulator` checks that every requesting lane asks
for the same word number.

Lanes that run out of spikes early simply stop requesting. A lane with no spike
at all is Busy for one cycle. The controller pulses `done` once no storage is
Busy or Ready.

## Neuron arithmetic

All state is Q3.12 (`q_t` in `snn_pkg`). The excitatory neuron (`exc_neuron`)
computes:

```
v  <- v  + (-v*(ge + gi + 1) - gi - 0.6) / 1024     (1)
ge <- ge - ge/32                                    (2)
gi <- gi - gi/128                                   (3)
```

The inhibitory neuron (`inh_neuron`) first adds `W_EI` to `ge` if its partner
fired in this timestep, then computes:

```
v  <- v + (-v*(ge + 1) - 0.6) / 1024                (4)
ge <- ge - ge/32                                    (5)
```

Some details of the implementation:

* The product is kept at full width, shifted back by 12 bits and combined with
  the other terms.
* Every division is an arithmetic right shift, so it rounds toward minus
  infinity.
* Results saturate to the Q3.12 range.
* The constant 0.6 is the resting potential and appears as the integer 2458.
* A neuron fires when the new `v` exceeds its threshold. `v` is then set to
  the reset value, and the excitatory neuron increments its 16-bit spike count.

Because the step size is `/1024` and the state has only 12 fraction bits, `v`
moves only when the bracketed term is at least 0.25 in size. Small drives
therefore have no effect. This is inherent to the chosen number format.

The constants that the network's published description does not fix are
parameters. Their values in `snn_pkg` are this implementation's choices:

| constant | value | basis |
|---|---|---|
| excitatory threshold `Q_V_TH_E` | −0.52 | the usual −52 mV of this network type, scaled 10x |
| excitatory reset and initial `v` | −0.6 | the resting term of the equations |
| inhibitory threshold `Q_V_TH_I` | −0.4 | the top of the −0.8 … −0.4 operating range |
| inhibitory reset `Q_V_RESET_I` | −0.45 | −45 mV scaled |
| `W_EI` (excitatory → inhibitory) | 7.5 | the usual value (≈10) does not fit Q3.12 |
| `W_IE` (inhibitory → excitatory) | 1.0 per spike | chosen small so that inhibition does not silence the layer |

The adaptive threshold (θ) that trained networks of this kind often carry is
not modelled. If trained θ values are to be used, they would have to be folded
into a per-neuron threshold, which is not provided.

## Host interface

`snn_top` has four AXI4-Lite slave ports (32-bit data, byte addresses, full-word
writes only, one outstanding transaction per direction). They are packed
structs (`axil_req_t` and `axil_rsp_t` in `snn_pkg`).

| port | address | contents |
|---|---|---|
| `s_img` | lane = `addr[8:6]`, row = `addr[5:2]` | eight 4-bit pixels |
| `s_wgt` | lane = `addr[17:15]`, word = `addr[14:2]` | two Q3.12 weights (layout above) |
| `s_res` | neuron = `addr[8:2]` | spike count of the last image (read only) |
| `s_stat` | `0x00` CONTROL | write 1 to start |
| | `0x04` STATUS | bit 0 busy, bit 1 done |
| | `0x08` STEPS | timesteps per image |
| | `0x0C` CYCLES | cycles taken by the last image |
| | `0x10` STEP, `0x14` PHASE | progress |

`irq_done` pulses at the end of an image.

To classify an image:

1. Load the weights once.
2. Write the 98 image words.
3. Write CONTROL = 1.
4. Wait for done.
5. Read the 100 counts. The label comes from the host's own neuron-to-class
   assignment; the hardware only reports counts.

The image and weight BRAMs must not be written while a run is in progress.

Not included:

* the processor;
* the AXI interconnect that would join the four ports to a single master;
* any training.

## Files

`rtl/` holds one module or package per file:

* `snn_pkg`: geometry, Q3.12 constants, AXI and request structs, LFSR helper
  functions.
* `snn_top`: the whole accelerator.
* Per lane: `image_bram`, `lfsr_spike_gen`, `spike_storage`,
  `weight_addr_calc`, `weight_bram`.
* Shared datapath and control: `spike_controller`, `weight_accumulator`,
  `exc_neuron` / `exc_neuron_group`, `inh_neuron` / `inh_neuron_group`,
  `spike_result_bram`, `status_buffer`, `global_controller`, `axil_slave`.

`tb/` holds one self-checking testbench per module, plus `tb_ref_pkg`: integer
reference models of the neuron equations and the LFSR, written with integer
division instead of shifts.

`tb_snn_top` is the end-to-end test. It runs at the top's default parameters
and plays the host:

* it loads all 39,200 weight words over AXI4-Lite;
* it runs a 700-timestep image and then a 200-timestep image;
* it compares all 100 spike counts and the cycle count of each image with a
  bit-accurate model of the whole network.

It also counts how often each mechanism happened: Start broadcasts, lanes
delivering together, a lane finishing before the others, empty lanes,
excitatory and inhibitory spikes, and lateral inhibition. It fails if any of
these never happened. A 700-step synthetic image takes 59,651 cycles
(0.60 ms at 100 MHz). The whole test takes about a second of simulation.

Each testbench prints one line, `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv rtl/snn_pkg.sv tb/tb_snn_top.sv \
  --top-module tb_snn_top -o sim
./obj_dir/sim
```

Replace `tb_snn_top` with any other `tb_*` module to test a single block.
Testbenches that start with `import tb_ref_pkg::*` find it through `-y tb`.

## How far to trust it

Verified in simulation:

* the lane datapath: spike generation, storage service order and addresses,
  alignment, summation;
* the controller sequencing;
* the neuron arithmetic, against independent models;
* the whole design end to end.

Not verified:

* accuracy on real MNIST digits with trained weights, since no trained weights
  are included;
* timing closure at 100 MHz;
* FPGA resource use.

These points depart from, or fill gaps in, the description this design
follows:

* **Free choices.** The LFSR polynomial (x¹¹+x⁹+1) and seeds, the timestep
  count, the thresholds and lateral weights above, the phase order, the memory
  maps and the contents of the result BRAM (counts) are all this
  implementation's choices.
* **LFSR stepping.** The LFSRs advance only in the cycles that generate spike
  rows, not on every clock. This makes spike trains independent of how long
  weight delivery takes.
* **Neuron state at image start.** Neuron state is cleared at the start of
  each image instead of being left to relax during an idle period.
* **Neuron bank size.** Each excitatory and inhibitory neuron module holds 20
  neurons, all updated in parallel.
