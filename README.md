# Reconfigurable Viterbi decoder fabric

A Viterbi decoder for convolutional codes that can be reconfigured at run time.
One configuration word sets the constraint length K (3 to 9), the code rate
(1/2 or 1/3) and the generator polynomials. The same hardware then decodes
codes from 4-state up to 256-state trellises. The design follows a published
architecture for a domain-specific "Viterbi fabric" that sits next to a DSP in
a system-on-chip. That architecture centres on two reconfigurable parts:

* a **trace-back unit** built around a right shift register whose length
  changes with K, made with seven 2-to-1 multiplexers;
* a **data memory unit**: a cluster of eight 64x4 dual-port block RAMs with a
  clock controller and address generators. It can be used as a FIFO, a LIFO
  or a random-access RAM. RAMs that the current K does not need get no clock.

Around these sit a branch metric unit, an array of add-compare-select (ACS)
butterflies, configuration registers and a frame controller. All are written
here in synthesizable SystemVerilog.

## Trellis conventions

Everything depends on one state convention. Read this section before the RTL.

* **Encoder state.** After data bit `u_t` the state is
  `S_t = ((S_{t-1} << 1) | u_t) mod 2^(K-1)`. The newest bit is the LSB.
* **Generator polynomials.** `poly[n]` is applied to the K-bit encoder word
  `{S_{t-1}, u_t}`. Bit 0 taps the current input and bit j taps the input from
  j stages back. Code bit n is the parity `^(word & poly[n])`. Bits of
  `poly` at or above K must be 0. The usual octal generators (7/5, 171/133,
  561/753, ...) work as written. Reading them in this bit order gives the
  time-reversed code, which has the same distance properties.
* **Predecessors.** State `i` has two predecessors, `i >> 1` and
  `(i >> 1) | 2^(K-2)`. Its decision bit `d_t^i` is 1 when the survivor comes
  from the second one. A tie keeps the first.
* **Trace-back recursion.** `S_{t-1} = {d_t^{S_t}, S_t[K-2:1]}`. This is a
  right shift with the decision bit entering the MSB. The decoded bit of
  stage t is `S_t[0]`.

## Data path

### Branch metric unit (`bmu`)

Symbols are 3-bit soft values: 0 means a confident '0' and 7 a confident '1'.
The distance from symbol r to bit 0 is r, and to bit 1 it is 7-r. The unit
always forms the four rate-1/2 metrics from symbols 0 and 1. For rate 1/3 it
adds the distance of symbol 2 to get the eight rate-1/3 metrics. There is no
separate rate-1/3 circuit. The output is a table `bm[c]` indexed by codeword
`c = {c2,c1,c0}`.

### ACS butterflies (`acs_butterfly`, `acs_array`)

Butterfly m reads the metrics of states `m` and `m + 2^(K-2)` and writes
states `2m` and `2m+1`. It produces the pair of decision bits
`d_t^{2m}, d_t^{2m+1}`. Each butterfly works out its four expected codewords
from the configured polynomials (the "look-up" part of the butterfly). It
then picks the matching branch metrics, adds them, compares and selects.

The array has 128 butterflies and 256 path-metric registers, enough for
K = 9. For smaller K, only butterflies `m < 2^(K-2)` are active. The second
predecessor of each butterfly is chosen by a small multiplexer over the seven
legal K values. That multiplexer is what reconfigures the trellis. One trellis
stage completes per clock. The 256-bit decision vector of that stage is
presented in the same cycle. Bits for states that do not exist read 0.

Path metrics are 12 bits wide and are compared modulo 2^12 (sign of the
difference), so they never need normalising. At frame start, state 0 gets
metric 0 and every other state gets 256. The largest metric spread is about
256 + 8*21, well below 2048.

## Trace-back unit and the reconfigurable shift register

`rsr` holds the trace-back state in a fixed chain of eight flip-flops. The
leftmost is the MSB. Flip-flops 1 to 7 each have a 2-to-1 multiplexer in front
of them. The multiplexer chooses between the decision bit `d_t` and the
neighbour on the left. The first multiplexer's other input is 0. The eighth
flip-flop has no multiplexer. Exactly one configuration bit `C_i` is set:
`C_(10-K)`. This puts `d_t` into bit K-2. Everything to the right of it
shifts one place right, and everything to its left stays 0. So the 8-bit
chain behaves as a (K-1)-bit right shift register, and its contents can index
the decision vector directly.

`tbu` adds the selection `d_t = dv[S_t]` and outputs `S_t[0]`. When a
decision vector arrives, the unit emits one decoded bit and steps the state
back by one stage in the same cycle.

## Data memory units

`data_mem_unit` contains these parts:

* **RAM cluster** (`ram_cluster`): eight `bram_dp` RAMs, each 64x4 with one
  write port, one read port and one cycle of read latency. They sit side by
  side, so a word is 32 bits.
* **Clock controller** (`clock_ctrl`): one latch-based clock gate per RAM. It
  is driven by the `ram_en` configuration bits. A RAM that is not enabled
  gets no clock edges at all. It keeps its contents and its read register.
* **Two address generators** (`addr_gen`), one per RAM port. Each is an
  accumulator and a register with `load`/`initial_addr` and
  `en`/`add_sub`/`addr_offset`.

The `mode` input selects the access discipline:

| mode | `wr` | `rd` |
|---|---|---|
| `MEM_FIFO` | write at write pointer, pointer +1 | read at read pointer, pointer +1 |
| `MEM_LIFO` | push: write at top+1, both pointers +1 | pop: read top, both pointers -1 |
| `MEM_RAM`  | write at write pointer, then step it up (`w_up`) or down | read at read pointer, then step it up (`r_up`) or down |

In RAM mode each pointer is its address generator's register. `w_load` and
`r_load` set the pointer to `w_addr0` or `r_addr0` from the next cycle. A
random access is therefore a load followed by the access, and a run of
consecutive words needs only one load. A load in the same cycle as an access
takes effect after that access. `clr` empties the unit. In LIFO mode the read
pointer then sits one word below word 0. Read data arrives one cycle after `rd`, together with `rvalid`.
The unit has no full/empty flags, so the user counts. Do not push and pop in
the same cycle in LIFO mode; an assertion checks this.

**How the decoder uses the units.** A decision vector has 2^(K-1) bits, which
is up to 256. So decision memory is **eight** data memory units side by side:
256 bits by 64 stages. The configuration registers clock only the RAMs that
hold existing states. That is 1 RAM at K=3, 4 at K=5, 16 at K=7 and 64 at
K=9. A **ninth** unit, with one RAM clocked, is the output reorder buffer. It
turns the backward-ordered decoded bits back into time order. Both memories
run in RAM mode, driven by the controller as described in the next section.

## Frames, streaming and timing

The decoder works on **zero-terminated frames**. The encoder appends K-1 zero
bits, so every frame ends in state 0 and trace-back starts there. A frame has
`L = frame_len` stages, tail included, with `K <= L <= 64`. It yields L-K+1
data bits. Frames follow each other directly in the symbol stream.

`vd_ctrl` runs three engines at once, each on a different frame:

| engine | frame | work per clock |
|---|---|---|
| ACS | n+1 | accept a symbol, update all path metrics, write the decision vector; the last stage re-initialises the metrics |
| trace-back | n | read one decision vector, newest stage first; emit one bit; write data bits (not the K-1 tail bits) to the output buffer |
| output | n-1 | read one data bit from the output buffer, in time order |

**Why one 64-word decision memory is enough for two frames in flight.** Frames
are written in alternating directions. Even frames put stage s at address s.
Odd frames put stage s at address L-1-s. Trace-back of frame n reads its
stages from L-1 down to 0, and in doing so it visits the addresses in exactly
the order in which frame n+1 is being written. Trace-back starts the cycle
after frame n's last stage is written. It reads one word every clock, and ACS
writes at most one per clock. So every word is read in the same cycle as it
is overwritten, or earlier. In the same cycle the RAM returns the old word.
The output buffer uses the same trick. Data bits of even frames go upwards
from address 0, odd frames downwards from L-K, and reading a frame in time
order stays ahead of the trace-back that writes the next frame. Only the
address generators' load value and up/down control change from frame to
frame. No engine ever waits for another.

Timing: the last decoded bit of a frame appears **3L-K+2** clocks after the
frame's first symbol is accepted. With symbols offered back to back, a frame
finishes **every L clocks**, which is one trellis stage per clock, or
(L-K+1)/L data bits per clock. Gaps in `sym_valid` simply delay the ACS
engine, since `sym_ready` is always high.

The configuration word (`viterbi_pkg::cfg_t`) contains these fields:

| field | bits | meaning |
|---|---|---|
| `k` | 4 | constraint length, 3..9 |
| `rate3` | 1 | 0 = rate 1/2 (symbols 0,1), 1 = rate 1/3 (symbols 0,1,2) |
| `poly[2:0]` | 3x9 | generator polynomial of each code symbol |
| `frame_len` | 7 | stages per frame, K..64 |

A write is ignored while `busy` is high, and also when it is illegal (k or
frame_len out of range). Do not offer a symbol in the same cycle as a
configuration write. From the stored word, `cfg_regs` decodes the
shift-register select C1..C7 and the 72 RAM clock enables. After reset the
decoder is set to K=3, rate 1/2, generators 7/5 and 16-stage frames.

## Top-level interface (`viterbi_fabric`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `cfg_we`, `cfg_wdata` | in | 1, `cfg_t` | configuration write |
| `sym_valid`, `sym_ready` | in/out | 1 | one trellis stage per transfer; `sym_ready` is always 1 |
| `sym_data` | in | 3x3 | soft symbols, `sym_data[n]` is code symbol n |
| `out_valid`, `out_bit`, `out_last` | out | 1 | decoded bits in time order, no back-pressure |
| `busy` | out | 1 | a frame is in flight |

All sizes are constants in `viterbi_pkg`: K_MAX = 9, 64-word RAMs, eight RAMs
per unit, 3-bit soft symbols and 12-bit metrics. The lower-level modules take
them as parameters with these defaults.

## Where this RTL goes beyond or departs from the published architecture

These parts follow the published architecture:

* the K and rate ranges;
* the rate-1/3 branch metrics reusing the rate-1/2 circuit;
* butterflies built from two ACS operations, producing decision bits
  `d^i, d^(i+1)`;
* one decision vector per memory word;
* the trace-back recursion;
* the seven-multiplexer shift register;
* the data memory unit's RAM cluster of eight 64x4 dual-port RAMs, its
  per-RAM clock gating, its accumulator-based address generator and its
  FIFO/LIFO/RAM modes.

These are this design's own choices:

* soft-decision width and metric;
* path-metric width and modulo comparison;
* tie handling;
* the state and polynomial bit order;
* 128 butterflies, so that a stage completes every clock;
* eight memory units for a 256-bit decision vector;
* a separate address generator per RAM port;
* the clock-gate circuit;
* zero-terminated frames of up to 64 stages with full-frame trace-back;
* overlapping the ACS, trace-back and output of consecutive frames, using
  alternating-direction addressing and the output reorder buffer;
* the configuration word, the controller and all handshakes.

Known differences:

* **Throughput.** The architecture is quoted at one decoded bit per clock
  (200 Mb/s at 200 MHz). This RTL sustains one trellis stage per clock.
  Because every frame carries K-1 tail stages, the data rate is
  (L-K+1)/L bits per clock: 0.97 at L=64, K=3, and 0.875 at L=64, K=9.
  Sliding-window trace-back on an unterminated stream would remove that
  overhead. It was not built.
* **Address generators and K.** The architecture says the address generator
  must also be reconfigured for each K. Here the generators' start addresses
  depend on the frame length and on K: L-1 for decisions and L-K for data
  bits.
* **Host side.** The SoC bus, the DSP that streams data and the processor
  that writes configuration are not part of this RTL. Plain ports take their
  place.
* **Clock gating** stops the clocks of unused RAMs. Powering the RAMs down is
  a matter for the memory macro and the power intent, and is not modelled.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_viterbi_fabric` runs the full default-size design end to end. For every
  K from 3 to 9 and both rates it streams bursts of random frames made by a
  behavioural encoder. The frames are clean, have sparse channel errors, or
  have heavy soft noise, and are either 64 stages or K+5 stages long. Each
  decoded frame is compared bit for bit with an independent integer Viterbi
  decoder in the testbench. Frames that should be correctable are also
  compared with the transmitted data. The test checks the first-frame
  latency and the L-cycle frame period. It counts the mechanisms and fails
  if any never happens:
  * trace-back overlapping ACS;
  * a decision word read in the cycle it is overwritten;
  * output overlapping trace-back;
  * RAM clock gating;
  * configuration writes refused while busy or when illegal;
  * input stalls.
* The block tests compare against models written in the testbench:
  * exhaustive branch metrics;
  * random butterflies with forced ties and metric wrap-around;
  * the full 256-state array over 40 stages for every K;
  * the shift register and trace-back for every K;
  * address generator sequences;
  * gated clock edges counted against the enables, including enable changes
    while the clock is high;
  * RAM read/write collisions;
  * the cluster with random clock masks;
  * all three memory modes;
  * the configuration decode;
  * the controller against behavioural memories with tagged words, which
    shows that no word is overwritten before trace-back reads it.

To simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/viterbi_pkg.sv tb/tb_viterbi_fabric.sv --top-module tb_viterbi_fabric
./obj_dir/Vtb_viterbi_fabric
```

Any other testbench works the same way; replace the file and top-module
names. The end-to-end test takes well under a second.

**Notes for synthesis.** `clock_ctrl` contains one latch per RAM. This is
intended: it is the standard glitch-free clock-gate structure, and a real
flow would map it to the library's integrated clock-gating cell. `bram_dp` is
a behavioural array that stands in for a compiled 64x4 dual-port RAM macro.
The ACS array is the bulk of the logic: 3072 metric flip-flops and 128
butterflies.
