# SEE — a spiking neural network emulation engine in SystemVerilog

Simulating a large pulse-coupled neural network is limited by memory bandwidth more
than by arithmetic. Every adaptive synaptic weight has to be read, integrated and
written back at every simulation event. This engine splits the work in two:

- **Network topology computation (NTC).** This part knows which neurons are sending
  (firing) and which are excited. For each excited neuron it builds a short
  *topology vector*: one bit per presynaptic neighbour, set while that neighbour is
  firing. It also keeps the list of excited neurons up to date as fire-start and
  fire-stop events arrive.
- **Neuron state computation (NSC).** This part takes each topology vector and
  integrates that neuron's membrane potential and all its incoming weights over one
  integration interval. It uses the modified-midpoint method, the inner step of
  Bulirsch-Stoer. The NSC has three processing elements (PEs), each with its own
  64-bit memory channel, so three weight streams run in parallel. For a fully
  connected layer, the intermediate values of one neuron no longer fit on chip. The
  NSC can then be switched so that one PE uses all three channels: it reads two
  streams and writes the third in every cycle.

The RTL covers the NTC datapath, the NSC datapath and their connection (`see_top`).
The control processors are left out: the event scheduling, the choice of step size
and the polynomial extrapolation are software around this RTL. Everything those
processors would drive is a port of `see_top`. The external SDRAM channels of the NSC
are ports too; the testbenches attach a behavioural memory model to them.

## The neuron model being integrated

Each neuron K is a non-leaky integrate-and-fire unit. Its membrane potential obeys

    a_K' = i_K + sum of W_KL over presynaptic neurons L that are sending

Here i_K is a constant external input. Each weight adapts by

    W_KL' = -gamma * W_KL + ( mu * (a_K - theta/2)   if X_K = 0 and X_L = 1
                              0                       otherwise )

- X_K = 1 while the postsynaptic neuron itself sends.
- X_L = 1 while the presynaptic neuron sends.
- gamma is a decay constant and mu a gain; both are stored per synapse.
- theta is the neuron's firing threshold.

Firing, that is crossing theta and the pulse width, is decided by the control
software from the integrated potentials. The RTL only integrates.

Number formats (`see_pkg`):

| quantity | format |
|---|---|
| a_K, theta, i_K | signed 32 bit, 12 fraction bits |
| W | signed 16 bit, 12 fraction bits, saturating |
| gamma, mu | unsigned 8 bit, 8 fraction bits |
| one synapse word (`syn_t`) | `{W[15:0], gamma[7:0], mu[7:0]}` = 4 bytes |

Products are scaled back by an arithmetic shift, which rounds toward minus infinity.

## Neuron information blocks and the midpoint passes

Each neuron has a *neuron information block* (NIB) in 64-bit words:

| word | contents |
|---|---|
| 0 | `{i_K, a_K}` |
| 1 | `{flags, theta}`; flag bit 0 is X_K |
| 2 … | two synapse words each; synapse 2j is in the low half |

Synapse s belongs to a fixed presynaptic neuron. In the sparse schemes it is
neighbour slot s. In the fully connected scheme it is neuron s.

The modified-midpoint step over an interval H uses N = 2(i+1) substeps of size
h = H/N. Here i is `cfg_seq_i`, the substep sequence index chosen by the software.

    k(0)   = the NIB
    k(1)   = k(0) + h f(k(0))
    k(m+1) = k(m-1) + 2h f(k(m))          m = 1 .. N-1
    y      = ( k(N) + k(N-1) + h f(k(N)) ) / 2

`mmid_pe` does this as N+1 passes over the whole block. Each pass streams two blocks
in and one block out:

- **Channel rotation.** The block k(j) for j ≥ 1 is written to channel j mod 3 at
  address `kbase[j mod 3]`. Pass m therefore reads k(m) and k(m-1) from two channels
  and writes k(m+1) to the third, and no channel is asked to read and write two
  different blocks at once.
- **Where k(0) is.** k(0) is the NIB itself, read from channel 0 at `nib_base`.
- **Where the result is.** y ends up in channel `res_ch = (N+1) mod 3`. The PE reports
  `res_ch` when it finishes. Copying the result back into the NIB is left to the
  controller.
- **Two synapses per cycle.** Reads come back in order with any latency and are queued
  per channel (`QDEPTH` = 32). The queues are popped in pairs, so two synapses go
  through two `bsi_lane` pipelines per cycle. This matches the two 4-byte synapses in
  one 8-byte memory word.
- **Membrane potential.** While the synapses stream, the PE sums the weights of the
  sending presynaptic neurons. At the end of the pass it writes the two header words
  with the new a_K. This uses the same midpoint formula, with a_K' = i_K + sum.
- **Asking for X_L.** The PE asks for X_L of synapses s and s+1 on `syn_idx`. The
  answer must come back on `xl_pair` in the same cycle.

`bsi_lane` is the per-synapse pipeline. Both products of the derivative run in
parallel 4-cycle multipliers, and the derivative is ready after 6 cycles. The step
product and the sum take 6 more, so a result leaves 12 cycles after its inputs. The
pass code (`PASS_FIRST`, `PASS_MID`, `PASS_LAST`) selects the three formulas above.

**Timing.** One pass takes roughly (NIB words + memory latency + 12 + about 6) cycles.
The whole neuron takes N+1 passes. The tests measure about 6 cycles more per pass than
the estimate (latency + 12 + ceil(n/2)) that the engine was sized with. The extra
cycles come from the header words and from pairing the queues. `tb_mmid_pe` checks
that the cycle count lies between that estimate and the estimate plus 8 cycles per
pass.

## Sparse and fully connected configurations (`nsc_top`, `tvu`)

`cfg_fc` selects how the three PEs and the memory channels are used.

- **Sparse (`cfg_fc = 0`, 4- or 8-neighbour layers).** Neuron K goes to PE K mod 3.
  Its NIB is at (K div 3) × `cfg_stride` in that PE's own SDRAM channel. The PE's two
  other channels are on-chip `kbuf_bram` buffers (2048 × 64 bit, 1-cycle read) at
  address 0. Because of the rotation, every third intermediate block (j mod 3 = 0)
  still goes to the PE's SDRAM channel at `cfg_kbase`. X_L of synapse s is bit s of
  the neuron's topology vector, which the TVU latches per PE.
- **Fully connected (`cfg_fc = 1`).** PE 0 alone runs, on all three SDRAM channels.
  The NIB of neuron K is at K × `cfg_stride`, and the intermediate blocks are at
  `cfg_kbase` in each channel. X_L of synapse s is read from a *fire-status map*
  inside the NSC. The map is two copies of a tag field, so that bits s and s+1 can be
  read in one cycle. It mirrors every write the NTC makes to its fire tag field
  (`ftf_we`, `ftf_clear` → `fm_we`, `fm_clear` in `see_top`).
- **Handing out vectors.** The topology vector unit (`tvu`) hands vectors out strictly
  in arrival order. If the target PE is busy, `tv_ready` stays low and the NTC waits.
  `res_valid[p]` pulses with the neuron number and `res_ch` when PE p finishes.

## Topology computation (`ntc_top`)

The NTC keeps two bit maps of 2^19 bits (`tag_field`):

- the **fire tag field (FTF)**, set while a neuron is sending;
- the **excitation tag field (ETF)**, set while a neuron is firing or excited, which
  means it is in the dynamic event list (DEL) that the control processor keeps.

Neurons form one width × height grid (`cfg_width`, `cfg_height`), numbered row by row.
`position_cntrl` gives the neighbour of each slot:

- slot order N, E, S, W, NE, SE, SW, NW;
- the 4n scheme uses the first four slots;
- there is no wrap-around, so slots outside the grid are invalid.

Neurons numbered below `cfg_n_input` form the input layer.

`ntc_cntrl` sequences two phases.

**Topology-vector phase (`cmd_vec`).**
1. The DEL is streamed in on `del_rd_*`.
2. For each excited neuron, `tag2vec_nn` reads the FTF bit of each neighbour slot, one
   per cycle, and builds the 8-bit vector.
3. The vector is offered to the NSC on `tv_*`.
4. When the NSC accepts a zero vector for a neuron outside the input layer, `tag_cntrl`
   clears its ETF bit: the neuron is no longer excited. The control software should
   drop that neuron from its DEL too.
5. In the fully connected scheme, bit 0 of the vector says whether any *other* neuron
   is sending. This uses a running count of set fire tags (`fire_cnt`); the
   per-synapse bits come from the NSC's fire map.
6. The entry flagged `del_rd_last` ends the phase.

**Topology-update phase (`cmd_upd`).** Events arrive on `evt_*`:

| `evt_kind` | event | action |
|---|---|---|
| 0 | fire-start | set FTF and ETF in one cycle; store the neuron in `fire_start_buffer` |
| 1 | fire-stop | clear FTF |
| 2 | external excitation | set ETF |
| 3 | end of list | start reading the buffer back |

For each buffered fire-start neuron, `tag2vec_nn` scans its neighbours in the ETF.
Every neighbour whose ETF bit is 0 is newly excited. `tag_set` offers it to the DEL on
`del_wr_*` and sets its ETF bit in the cycle the DEL accepts it. This keeps a neuron
from being listed twice. In the fully connected scheme, a single scan over all
neurons replaces the per-neighbour scans.

`cmd_init` clears both tag fields, one 32-bit word per cycle (2^14 cycles at full
size), and the fire count.

All NTC handshakes are valid/ready, and outputs are held while stalled. Assertions
check that the offered topology vector stays stable and that the fire-start buffer
never overflows or underflows. Tag reads are combinational, and writes land on the clock edge.
All registers use an asynchronous, active-low reset (`rst_n`). The memory arrays
are not reset.

## Where this design departs from the architecture it follows

- **Processing lanes.** Each PE has two synapse lanes, matching two synapses per
  8-byte word. Drawings of the architecture show eight integration units per PE.
  With one 64-bit channel feeding a PE, two lanes already keep pace with the memory.
- **Extrapolation.** There is no polynomial-extrapolation unit. A full Bulirsch-Stoer
  step needs the midpoint results for several i to be combined outside this RTL.
- **Fire-start store.** The external SDRAM that holds fire-start neurons in the NTC is
  replaced by an on-chip FIFO of 2^19 entries (`fire_start_buffer`). Size it down, or
  replace it with a memory interface, for a real device.
- **Which neurons are integrated.** The NSC integrates exactly the neurons streamed
  in during a vector phase. Two kinds of pass are needed:
  - a pass that looks for the next fire-start covers only the excited neurons;
  - a pass that advances the whole network covers every neuron.

  The controller chooses between them by what it streams on `del_rd_*`. Streaming a
  neuron that is not excited is harmless: if its vector is zero, the ETF bit it
  clears is already 0.
- **Event order.** Fire-stop events are handled as they arrive, before the buffered
  fire-starts are read back, not overlapped with the read-back. The resulting tags are
  the same.
- **Sparse k-buffers.** In the sparse configuration, one intermediate block in three
  lives in SDRAM because of the channel rotation. Only two on-chip buffers per PE are
  built (96 KB in total).
- **Pass overhead.** Each midpoint pass costs about 6 cycles more than the sizing
  estimate. For a 900-neuron fully connected layer with i = 0..2, that is 7170 cycles
  instead of 7080 per neuron, about 1.3 % more.
- **Own choices.** The NIB layout, number formats, event encoding, neuron-to-PE mapping
  and grid numbering are this design's own choices.

## Sizes

Defaults are full size:

- 2^19 neurons (19-bit neuron numbers);
- tag fields and fire map of 2^19 bits;
- fire-start buffer of 2^19 entries;
- 27-bit word addresses, which is 1 GB per channel;
- three PEs, and 2048-word k-buffers.

Up to 65535 synapses per neuron are supported. A 30 × 30 fully connected layer (900
synapses, NIB of 452 words) fits easily, and so does the 8-neighbour scheme.

## Files

| `rtl/` | role |
|---|---|
| `see_pkg.sv` | types (`neuron_t`, `syn_t`, `topo_t`, `mem_req_t`, `mem_rsp_t`, `conn_e`, `pass_e`) and constants |
| `see_top.sv` | NTC + NSC joined; top level |
| `ntc_top.sv`, `ntc_cntrl.sv` | topology computation and its sequencer |
| `position_cntrl.sv`, `tag2vec_nn.sv`, `tag_cntrl.sv`, `tag_set.sv` | neighbour lists, tag scanner, ETF clear, DEL write |
| `tag_field.sv`, `fire_start_buffer.sv` | 2^19-bit tag memory, fire-start FIFO |
| `nsc_top.sv`, `tvu.sv` | state computation, vector distribution, channel routing |
| `mmid_pe.sv`, `bsi_lane.sv`, `kbuf_bram.sv` | midpoint PE, synapse pipeline, on-chip k-buffer |

In `tb/`, `sdram_model.sv` is a fixed-latency memory channel (10 cycles by default).
`tb_ref_pkg.sv` is a bit-exact reference of the derivative, the three step formulas
and a whole midpoint integration. Each `tb_<module>.sv` checks one module against
references, random stimulus and directed corner cases. Each testbench prints
`TB_RESULT checks=<n> failures=<n>`.

`tb_see_top` runs the top at its full default sizes on a 3 × 3 network. It repeats
rounds of the update and vector phases in the 4n, 8n and fully connected schemes,
switching the NSC configuration between them. Every integration result is compared
with the reference, and the testbench's own DEL is compared with the ETF after every
phase. It counts and requires these mechanisms:

- DEL writes;
- ETF clears;
- vectors stalled on a busy PE;
- stalled DEL writes;
- results in both configurations.

`tb_see_workload` runs square single-layer networks at the full default sizes. It
covers 10 × 10, 15 × 15, 20 × 20, 25 × 25 and 30 × 30 neurons, each in the 4n, 8n and
fully connected schemes. The starting values are:

- every neuron gets an input current between 0 and 1, so every neuron stays excited;
- potentials start at random values between 0 and 1, and theta = 1;
- every weight starts at 0.12, with gamma = 0.1 and mu = 0.3.

For each case the testbench runs one update phase with random fire events and one
vector phase that integrates every neuron. Each result is checked against the
reference. In the fully connected cases it also measures the PE time per neuron at
i = 2 (7 passes). The sizing estimate below is (10 + 12 + ceil(n/2)) × 7.

| layer | synapses n | measured cycles | estimate |
|---|---|---|---|
| 10 × 10 | 100 | 546 | 504 |
| 15 × 15 | 225 | 987 | 945 |
| 20 × 20 | 400 | 1596 | 1554 |
| 25 × 25 | 625 | 2387 | 2345 |
| 30 × 30 | 900 | 3346 | 3304 |

At 50 MHz, a 30 × 30 fully connected neuron with i = 0, 1, 2 takes about 7170 cycles,
or 143 µs.

## Simulating

With Verilator 5, list the package first and then the remaining RTL:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_see_top \
        rtl/see_pkg.sv $(ls rtl/*.sv | grep -v see_pkg) \
        tb/tb_ref_pkg.sv tb/sdram_model.sv tb/tb_see_top.sv
    ./obj_dir/Vtb_see_top

For another testbench, change the top module and the last file. `-Wno-fatal` is only
needed for width warnings in the testbench code. Unit testbenches override parameters
to keep runs short. For example, `tb_tag_field` uses 256 tags, `tb_ntc_top` 64 tags,
and `tb_nsc_top` 64-word buffers.

**Before using this in a design:**
- `tag_field`, `fire_start_buffer` and the fire map are plain arrays, so at full size
  they map to block RAM or external memory.
- `position_cntrl` divides by the grid width combinationally. Pipeline it or replace it
  with row and column counters if timing is tight.
- `sdram_model` is not a controller. A real SDRAM interface must return reads in
  order, and the PE queue depth must cover its latency.
