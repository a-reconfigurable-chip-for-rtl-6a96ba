# POEtic: a reconfigurable chip for evolvable hardware

Evolving digital circuits with a genetic algorithm needs a device whose
configuration can be written bit by bit, often and quickly, without any
configuration ever being able to damage it. This RTL describes such a chip.
A processor sits next to a fine-grained reconfigurable array, and every
configuration bit of the array is a word in the processor's address space.
A program can therefore build a candidate circuit with a few bus writes,
let it run, read its state back to compute a fitness, and start again,
all on-chip. All routing is built from multiplexers, so even a random
configuration cannot create a short circuit.

The chip has two halves:

* **Environmental subsystem**: the processor's bus (the APB form of AMBA)
  with the *system interface* to the array, a 16 x 16 Booth multiplier and
  two 16-bit timers. A 32-bit pseudorandom number generator sits beside the
  processor. The processor itself is not part of this RTL: its bus master
  port is a top-level port.
* **Organic subsystem**: a grid of *molecules* (10 x 20 = 200 by default).
  Each molecule is a 16-bit look-up table, a flip-flop and a switch box,
  defined by 76 configuration bits.

A second layer of routing units, which creates paths at run time between
molecules and chips, is not part of this RTL either. The molecules' signals
towards it (`route_in`, `route_out`, `trigger_out`) are top-level ports.

## The molecule

```
 long lines (2 per direction) --> input_select --4--> LUT / mode logic --> flip-flop --> func_out
 direct neighbour outputs    -->   (14 bits)          (molecule_core)      (options)       |
                                                                                           v
 long lines in --------------------------------------------------------------------> switch_box --> long lines out
```

A molecule works in one of eight **operational modes**, set by three bits:

| mode | what the 16 LUT bits do |
|---|---|
| 4-LUT | one 4-input function |
| 3-LUT | two 3-input functions of inputs 0..2. The lower one is the output; the upper one is a carry sent to the north neighbour, so a column forms a ripple chain |
| Shift memory | 16-bit shift register: input 0 is shifted in when input 1 is high; the output is bit 15 |
| Comm | lower 8 bits are a 3-LUT giving the output; upper 8 bits are a shift register fed from input 3 on every clock, whose last bit goes north |
| Configure | shifts like Shift memory. Bit 15 and a strobe (input 1) go to the neighbours as a serial configuration stream |
| Input | output = the bit coming from the routing plane |
| Output | input 0 is sent to the routing plane (and is the output) |
| Trigger | the LUT rotates every clock and bit 15 is a synchronisation pulse for the routing plane: a single 1 gives one pulse every 16 clocks |

In the shift modes the LUT contents change as the circuit runs, and a bus
read of word 0 shows them.

The **flip-flop** takes the mode's combinational result. Its options, all
configuration bits, are:
* registered or combinational output;
* a reset value;
* an enable, taken from LUT input 3;
* a rising or falling clock edge;
* a local reset, drawn from one of eight sources and acting synchronously or
  at once;
* a molecule enable, which freezes the flip-flop and the LUT shift modes.

The **switch box** has eight outputs, two per direction. Each is an 8-to-1
multiplexer with its own 3 bits. It picks among the six lines arriving from
the other three directions, the molecule output, or its inverse. Select codes
0..2 pick the other directions in N, E, S, W order, and code 3 picks the
output. Bit 2 picks line 1 instead of line 0, or the inverted output.

The **input multiplexers** pick the four LUT inputs from the eight long lines
with 3 bits each. Two more bits swap in extra sources:
* for input 0: the carry, the LUT's own bit 15, the configuration stream, the
  flip-flop, or a 0;
* for input 1: the four direct neighbour outputs.

Input 1's code 1 is a constant 1, which makes "always shift" easy to set.

Without these two bits, and with the lowest select bit at 0, every input
chooses among N0, E0, S0 and W0 with two bits. Likewise, with select bit 2
at 0 every switch box output chooses among three lines and the output with
two bits. Evolution uses these reduced choices.

## The configuration bits and the bus map

The 76 bits form five blocks. Each block begins with an enable bit that lets
a neighbouring molecule rewrite it. Three global bits come first: the enable
for partial configuration, and which neighbour it may come from.

| word | bits | contents |
|---|---|---|
| 0 | 15:0 | LUT |
| 0 | 16 | LUT block enable |
| 0 | 30:17 | input selection: `lut_sel[11:0]` at 28:17 (input k at 3k+2:3k), special at 29, direct at 30 |
| 0 | 31 | input block enable |
| 1 | 23:0 | switch box, output o = N0,N1,E0,E1,S0,S1,W0,W1 at 3o+2:3o |
| 1 | 24 | switch box block enable |
| 2 | 2:0 | mode (0 4-LUT, 1 3-LUT, 2 Shift, 3 Comm, 4 Configure, 5 Input, 6 Output, 7 Trigger) |
| 2 | 3 | mode block enable |
| 2 | 14:4 | other bits: 14 registered output, 13 reset value, 12 enable used, 11 falling edge, 10:8 local reset source, 7 local reset enable, 6 asynchronous local reset, 5 molecule enable, 4 flip-flop value |
| 2 | 15 | other-bits block enable |
| 2 | 17:16 | partial configuration origin (N, E, S, W) |
| 2 | 18 | global partial configuration enable |

All other bits read as 0. Molecule *i* (row r, column c, i = r*COLS + c)
occupies byte addresses `16*i + 0/4/8`. With no wait states, one write takes
two clocks, so a whole molecule takes six and a switch box alone takes two.

Word 2 bit 4 is the live flip-flop. Reading it returns the circuit's state,
and writing it sets that state.

Other addresses: multiplier at `0x10000` (A, B, product), timer 0 at
`0x10100`, timer 1 at `0x10200`. Each timer has CTRL {irq_en, auto_reload,
enable}, LOAD, COUNT and STATUS (write 1 to clear). A timer with
auto-reload fires every LOAD+1 clocks. Unmapped addresses, and molecules
beyond the array, answer with PSLVERR.

## Partial reconfiguration between molecules

A molecule in Configure mode sends a data bit (its LUT bit 15) and a shift
strobe to all four neighbours. A neighbour follows it only under two
conditions:
* its global enable is set;
* its origin bits name that molecule.

On each strobe, the neighbour's enabled blocks form one shift chain, in the
order LUT, inputs, switch box, mode, other bits. The incoming bit enters
LUT bit 0, or bit 0 of the first enabled block, and each block's top bit
moves into the next enabled block. Enable bits and the three global bits
never move, so the processor keeps control over what may be rewritten.

For example, with only the LUT enabled, 16 strobes copy a Configure
molecule's LUT into its neighbour. The Configure molecule rotates its own
LUT if input 0 is set to its own bit 15.

## Genome and phenotype

Evolution can work on the configuration words themselves. A genome is 96
bits per molecule. The phenotype that is written to the chip is
`(genome & mask) | (fixed & ~mask)`.

For the basic cell used for gate-level evolution, 22 bits are evolved and
the other 74 are fixed. The fixed part sets 3-LUT mode and the molecule
enable. The 22 evolved bits are:

| bits | where |
|---|---|
| 8 | LUT, word 0 bits 7:0 |
| 6 | the top two select bits of inputs 0..2, word 0 bits 18, 19, 21, 22, 24, 25 |
| 8 | the low two select bits of the N0, E0, S0, W0 outputs, word 1 bits 0, 1, 6, 7, 12, 13, 18, 19 |

`tb/tb_poetic_top.sv` runs exactly this flow with genomes drawn from the
on-chip generator.

`tb/tb_evolution.sv` goes one step further and runs a small genetic
algorithm, with the testbench acting as the processor's program. The
algorithm has a population of 8 and uses tournament selection, one-point
crossover, per-bit mutation and elitism. It evolves the cell until it
computes N0 XOR W0 on both its output and its north line.

Only words 0 and 1 change between individuals, so loading one costs two
back-to-back writes: four bus clocks, which the test checks. It usually
finds a perfect cell within a few tens of generations.

## Files

| file | contents |
|---|---|
| `rtl/poetic_pkg.sv` | configuration struct, mode enum, word packing, bus structs, address map |
| `rtl/poetic_top.sv` | the chip: bus, peripherals, generator, array |
| `rtl/organic_array.sv` | ROWS x COLS molecules and their wiring |
| `rtl/molecule.sv` | one molecule |
| `rtl/molecule_config.sv` | 76 bits, word port, partial reconfiguration |
| `rtl/molecule_core.sv` | modes and flip-flop |
| `rtl/input_select.sv`, `rtl/switch_box.sv` | the multiplexers |
| `rtl/system_interface.sv` | bus slave for the array |
| `rtl/apb_decoder.sv` | bus decoder |
| `rtl/booth_mul16.sv`, `rtl/timer16.sv`, `rtl/prng.sv` | peripherals |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_evolution.sv` | the genetic algorithm on the full-size chip |

Every testbench ends with `TB_RESULT checks=N failures=M`. To run one, for
example the whole chip at its default size (it finishes in under a second):

```
verilator --binary --timing --assert -Irtl -Itb rtl/poetic_pkg.sv rtl/*.sv \
          tb/tb_poetic_top.sv --top-module tb_poetic_top -o sim
./obj_dir/sim
```

The top-level testbench counts each mechanism it exercises and fails if any
of them never happened. The mechanisms are: all eight modes, routing across a
full row, the carry chain up a full column, partial reconfiguration, state
read-back and write, the falling edge, the local reset, the multiplier, both
timers, the generator, and bus errors.

## How far it follows the original design, and where it departs

Taken from the design description:
* the two subsystems and their units;
* the 76 bits and their five blocks, each with an enable bit;
* the 3 x 32-bit word access with two-clock writes;
* the eight mode names and their roles;
* the switch box structure (8 outputs x 3 bits, six lines + output + inverse);
* the sources of the first two LUT inputs;
* the flip-flop option list;
* the genome-masking scheme;
* about 200 molecules.

This design's own choices, where the description gives none:
* **Encodings and positions**: all bit positions inside the words, the mode
  and select codes, and the address map.
* **Modes**: what each input does inside the Shift, Comm, Configure and
  Trigger modes; the carry direction; and the Trigger pattern.
* **Partial reconfiguration**: its serial format.
* **Flip-flop**: the enable and local-reset sources.
* **Array and bus**: the 10 x 20 shape, and the use of APB.
* **Peripherals**: the timer, the multiplier's registers and signedness,
  and the generator's polynomial.

Departures to be aware of:
* The drawing of the first two input multiplexers shows some selection bits
  shared between inputs 0 and 1 depending on the mode. This is not
  reproduced: every input always uses its own bits.
* Inputs 2 and 3 are plain 8-line multiplexers.
* With the falling edge selected, a flip-flop value written over the bus
  lands half a clock later, at the next falling edge.
* The array contains structural combinational loops, as any FPGA fabric
  does. A configuration that closes a loop with an odd number of inversions
  oscillates, and in simulation it never settles. The configuration storage
  starts cleared, so that no such loop exists before the first write.
* The processor (32-bit RISC, 57 instructions), the routing plane, and the
  serial and parallel ports are not included.
