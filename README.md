# DDPMnet: a DNN accelerator whose MAC units are counters

A multiply-accumulate normally needs a multiplier and an adder per MAC unit.
DDPMnet removes both. Every input feature is sent into the array as a bit
stream whose density of ones equals the feature's value, and every weight
becomes a length of time: for |W| cycles a MAC unit counts the ones of the
stream it is listening to, up for a positive weight and down for a negative
one. The count that results is proportional to W·X, and running the next
weight on the same counter adds the next product. So a MAC unit is only a
multiplexer, a 12-bit up/down counter, a ReLU and an output register.

This repository holds synthesizable SystemVerilog for that core: a 27 × 30
MAC array, 27 × 2 pulse modulators, a three-bank input feature memory, a
displacement list that walks the input, a program (weight) memory and its
controller, plus self-checking testbenches for every block and an end-to-end
test at full size.

## Pulse-density multiplication

### The DDPM stream

An N-bit feature X (N = 8 here) is modulated over a period of 2^N cycles
using *dyadic digital pulse modulation*. Each bit of X owns a fixed,
binary-scaled set of positions in the period:

| bit        | positions in the 2^N-cycle period | ones per period |
|------------|-----------------------------------|-----------------|
| X[N-1]     | 0, 2, 4, 6, …                     | 2^(N-1)         |
| X[N-2]     | 1, 5, 9, 13, …                    | 2^(N-2)         |
| X[N-3]     | 3, 11, 19, …                      | 2^(N-3)         |
| X[N-1-k]   | positions whose binary value ends in exactly k ones | 2^(N-1-k) |
| (none)     | 2^N − 1                           | 0               |

The stream therefore carries exactly X ones per period, and the ones of each
bit are spread evenly, so any window of the stream holds close to
(window length) · X / 2^N ones. That evenness is what makes a short weight
pulse a good multiplier. Example with N = 3 and X = 101b (0.625): ones at
positions 0, 2, 4, 6 (bit 2) and 3 (bit 0), five per eight cycles.

The circuit (`ddpm_modulator`) is a binary position counter plus a one-hot
mask of the counter's lowest zero bit; the mask selects one bit of the
bit-reversed feature. The position counter restarts at 0 whenever a new
feature is loaded.

### Weights as durations

A weight is stored as a run of instructions: "count stream d up" (or
"down") held for |W| cycles. Weights are scaled by the off-line scheduler so
that one kernel fits a window of 2^R cycles, where R is a per-layer
precision knob: every bit less halves the window and so doubles throughput,
at the cost of a coarser product. R is not a hardware parameter; it is
simply how long the program makes the window. A weight of exactly 2^N
cycles on a freshly loaded stream gives exactly X; shorter weights give
W·X/2^N up to the discreteness of the stream (that approximation error is
part of the method, and is compensated off-line by retraining and by a bias
correction).

A bias is added by selecting a constant-1 input for as many cycles as the
bias value.

## Architecture

```
              host writes                            host reads
                  │                                      ▲
   ┌──────────────┼───────────────┐                      │ rd_row/rd_col
   │ input feature memory         │                      │
   │ 3 banks x 135 words x 27 lanes│   27 x 2 DDPM     ┌──┴───────────────┐
   │ 2 banks read, 1 refilled     ├──► modulators ────►│ 27 x 30 MAC array│
   └──────▲───────────────────────┘   (row-shared)     │ MUX+counter+ReLU │
          │ pointer moves (dX,dY)                      └──▲───────────────┘
   ┌──────┴─────────┐   ┌───────────────────┐             │ 30 x 4-bit
   │ displacement   │◄──┤ controller /      ├─────────────┘ instructions
   │ list (512)     │   │ program counter   │  (column-shared)
   └────────────────┘   └──────▲────────────┘
                        ┌──────┴────────────┐
                        │ program memory    │ 140 words x 132 bits (18 Kb)
                        └───────────────────┘
```

* **Rows share features, columns share weights.** All 30 units of a row see
  the same two pulse streams; all 27 units of a column run the same
  instruction. A column computes one output channel for 27 output positions
  at once.
* **Two modulators per row, two active banks.** Modulator port k of every
  row is loaded from active bank k. Port 0 and port 1 are reloaded
  independently, so one can be refreshed with the next feature while the
  other is being counted; the MAC unit's MUX picks the port that matches the
  current weight. This is also what lets the scheduler reorder weights.
* **Three-way bank interleaving.** Of the three input banks, two are read
  and the third (`im_idle_bank`) is free for the host to fill with the next
  input patch. A rotation makes the second active bank the first, the idle
  bank the second, and frees the old first bank.
* **Displacement list.** The scheduler precomputes, for every modulator
  load, a signed 6-bit dX and 4-bit dY step of that port's read pointer; a
  bank word is addressed as y·27 + x. A stride or kernel shape is thus
  purely a property of the list.

### MAC unit instruction set (4 bits)

| code   | meaning                                                     |
|--------|-------------------------------------------------------------|
| 0 s dd | count: if the selected input is 1, counter += 1 (s=0) or −= 1 (s=1); dd = 0/1 selects modulator port 0/1, dd = 2/3 selects constant 1 (bias) |
| 1000   | NOP — hold                                                  |
| 1001   | CLR — counter ← 0                                           |
| 1010   | STORE_RELU — output ← max(counter, 0)                       |
| 1011   | STORE — output ← counter (signed)                           |
| 11xx   | reserved, acts as NOP                                       |

The counter is 12-bit two's complement and wraps on overflow; STORE does not
clear it. A MAC unit synthesises (Yosys, generic cells) to 24 flip-flops
(counter and output register) and about twenty word-level cells: the
incrementer/decrementer, the input multiplexer, the ReLU and the decode. Every control instruction is idempotent, so a word may be held for
several cycles safely.

### Program word and sequencing

A program word is `{halt, rot, ld[1:0], dur[7:0]}` plus one instruction per
column (12 + 120 = 132 bits). The controller, after `start`, executes words
from address 0:

* the current word's instructions drive the 30 columns for `dur + 1`
  cycles;
* in the last of those cycles the next word is fetched, and on the clock
  edge that makes it current its side effects happen: `rot` rotates the
  banks; each `ld[k]` steps port k's pointer by the next displacement entry
  and loads port k's 27 modulators from the bank word there (loads of a
  word with `rot` already see the rotated banks);
* so the first cycle of a word that loads a port counts modulation
  position 0 of the new features;
* after the last cycle of a word with `halt`, `done` pulses for one cycle
  and the columns receive NOP. The counters keep their value while idle, so
  a kernel window can be continued by a following program.

A run takes 1 + Σ(dur + 1) cycles. A typical kernel window is:

```
word  ld  dur   column instructions
 0    11   0    CLR                         (load both ports, clear)
 1    00  w1-1  count port0 up / down ...   (weight 1 on feature A)
 2    01  w2-1  count port0 ...             (reload port 0: feature C)
 3    00  w3-1  count port1 ...             (weight on feature B)
 ...
 n    00   0    STORE_RELU
```

Columns whose weights end at different times get NOP for the rest of a
word; packing weights so that columns stay busy is the scheduler's job.

## Interface of `ddpmnet_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset of all registers (memories are not reset) |
| `start` | in | 1 | sampled at a rising edge while idle; starts the program at address 0 and resets the read pointers and the displacement index |
| `busy`, `done` | out | 1 | program running; one-cycle pulse after the last word |
| `pm_we, pm_waddr, pm_wctrl, pm_wops` | in | 1, 8, 12, 30×4 | program memory write |
| `im_we, im_wbank, im_waddr, im_wlane, im_wdata` | in | 1, 2, 8, 5, 8 | write one 8-bit feature into bank/word/lane |
| `im_idle_bank` | out | 2 | the bank not being read |
| `dm_we, dm_waddr, dm_wdata` | in | 1, 9, 10 | displacement list write (`{dx[5:0], dy[3:0]}` signed) |
| `rd_row, rd_col, rd_data` | in, in, out | 5, 5, 12 | combinational read of a MAC output register |

All writes are synchronous. The bank rotation state is not reset by
`start`, only by `rst_n`.

## Files

| file | contents |
|------|----------|
| `rtl/ddpm_pkg.sv` | sizes, instruction codes, program-word and displacement types |
| `rtl/ddpm_modulator.sv`, `rtl/ddpm_modulator_array.sv` | one modulator; the 27 × 2 grid |
| `rtl/ddpm_mac_unit.sv`, `rtl/ddpm_mac_array.sv` | one MAC unit; the 27 × 30 array with readout |
| `rtl/input_feature_memory.sv` | three rotating banks |
| `rtl/displacement_memory.sv` | dX/dY list |
| `rtl/program_memory.sv` | instruction memory |
| `rtl/ddpm_controller.sv` | program counter and sequencer |
| `rtl/ddpmnet_top.sv` | the core |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_ddpmnet_top.sv` | end-to-end test at full size |
| `tb/tb_conv_layer.sv` | a LeNet-5-style 5×5 convolution layer scheduled onto the core |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops; a watchdog
ends a hung run. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/ddpm_pkg.sv tb/tb_ddpmnet_top.sv --top-module tb_ddpmnet_top -Mdir obj -o sim
./obj/sim
```

(the `-I` paths let Verilator find the other modules by name). The
end-to-end test runs the core at its default size in well under a minute.
It fills all three banks, runs one window with 256-cycle weights whose
results are checked against the raw features with no model at all, then
two full program memories of random windows (up/down counts on both ports,
bias runs, mid-window reloads, rotations, NOPs, signed and ReLU stores)
checked against a cycle-level model, refilling the idle bank in between.
It fails if any of those mechanisms never occurred.

`tb_conv_layer` plays the scheduler for one output row of a LeNet-5-style
5×5 convolution (30 output channels, 27 output positions, R = 10): it
normalises random signed kernels to the 2^R-cycle window, cuts each tap into
words, builds the program and displacement list, and checks the results
against the exact pulse count and, within the method's error bound, against
the true integer convolution (the largest deviation seen is a few counts in
a window of about 1000). The layer is split over two programs, the second
starting with a bank rotation, and the idle bank is refilled while the
first program runs, so this test also covers counters holding between runs
and overlapped input loading.

## Where this design is its own

The block structure, the 27 × 30 array, 27 × 2 modulators, three banks with
two active, the DDPM pulse positions, the 12-bit counter with up/down by
weight sign, the MUX, ReLU, the memory-mapped result registers, 4-bit
instructions, 6-bit dX / 4-bit dY displacements and the memory sizes
(28.5 Kb per bank, about 18 Kb of program) follow the published DDPMnet
architecture. The following are choices made here and should be read as
such:

* feature width N = 8;
* the instruction encoding above, the constant-1 bias input, CLR as a
  separate instruction, and a counter that wraps rather than saturates;
* the program word format with a shared hold time, load and rotate bits,
  and the whole sequencing of the controller;
* restarting a modulator's position at each load;
* bank organisation (135 words of 27 lanes, address y·27 + x), pairing of
  modulator port k with active bank k, and the rotation order;
* a separate 512-entry displacement list, consumed one entry per port load;
* the host ports and a combinational readout;
* memories written as register arrays with combinational read; the
  original uses a latch-based memory.

Not included: the off-chip software stack (model selection, choice of R,
retraining, weight normalisation, weight reordering and displacement
generation), which produces the contents of the memories, and chip-level
parts such as clock generation and scan test logic.

## Limits worth knowing

* With R ≥ 12 a window can exceed the signed 12-bit counter range (±2047)
  and wraps silently; the weight normalisation has to keep partial sums in
  range.
* The read pointers wrap modulo 64 and 16; an address past the 135-word
  bank is a scheduling error, caught by an assertion in simulation and read
  as zeros in hardware.
* A word may load both ports, consuming two displacement entries; there is
  no bound check on the displacement index beyond wrap-around.
* The whole program must fit 140 words; kernels with more weight runs are
  split over several programs (the counters hold between runs).
