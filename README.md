# Multichannel digital synchronous integrator

A multichannel detector, such as the CCD line of an acousto-optical spectrum
analyser or a bank of filter channels, is sampled one channel after another.
Each scan gives one digitised value per channel. A weak signal only shows up
after thousands of scans are added up, and often only as the difference
between two states of a modulated input. In radio astronomy these are the
antenna ("Antenna") and a reference load ("Equivalent"), switched by a
modulation signal F. Adding up a thousand channels at every scan is too much
for the host computer, so this design does it in hardware. Each ADC code is
added to a buffer cell chosen by a counter that follows the channel
sequence. The computer reads the finished sums over CAMAC, and the read
empties each cell as it goes.

This RTL models a CAMAC integrator module from about 1990. It is a
functional model, not the board's circuit. One clock drives everything, and
the original's asynchronous strobe edges are turned into clocked phases. The
units and their connections, the buffer size, the four ALU functions, the
modes and the two CAMAC commands that have names (A0F0, A0F9) follow the
original. The clocking, the CAMAC codes of the test commands and the
handling of events that overlap are this design's own choices. The section
"Where this design makes its own choices" lists them all.

## How the accumulation works

One buffer cell per channel, and the same cell for a channel in every
modulation period:

* **Address reset.** An edge of F resets the address counter to 0, so the
  next ADC code goes to cell 0.
* **Writing strobe.** Every END from the ADC (end of conversion) runs one
  writing strobe, in three phases of one clock each:
  1. **LATCH**: the output register takes the addressed buffer word A.
  2. **WRITE**: the ALU result (A+B, A−B, B or 0) is written back to the
     same cell. B is the ADC code.
  3. **INC**: the address counter steps to the next channel.

So cell *k* collects channel *k* over all periods. The instruction register
sets which ALU function the strobe uses:

| mode | F rise | F fall | after N periods |
|---|---|---|---|
| integration | address := 0, function A+B | no effect | cells 0..K−1 = Σ a<sub>k</sub> (Antenna), cells K..2K−1 = Σ e<sub>k</sub> (Equivalent) |
| detection | address := 0, function A+B | address := 0, function A−B | cells 0..K−1 = Σ (a<sub>k</sub> − e<sub>k</sub>) |

In integration mode the address is not reset when F falls. The Equivalent
samples therefore carry on into cells K..2K−1. Detection mode needs half the
cells and half the readout time. Because only the difference is summed, it
also allows much longer integrations before a cell runs out of range.

**Readout and clearing are one operation.** The buffer has no reset. A0F9
resets the address. Each A0F0 then:

1. sets the ALU function to 0;
2. runs a writing strobe, which latches the cell into the output register
   and writes 0 back;
3. steps the address.

The latched word appears on the CAMAC read lines R1–R16. After one readout
pass the module is ready to integrate again.

**Two modules are used in a pair.** A module cannot take samples while it is
being read. `dsi_system` therefore holds two identical modules. The CIN line
goes to module 0 directly and to module 1 inverted. One module integrates
while the computer empties the other. Swapping CIN swaps their roles.

**Diagnostics.** The computer can write any word into the buffer and run any
ALU function on it, then read the result back:

* A0F17 loads the instruction register from W: W[1:0] is the function and
  W[2] is the mode.
* A0F16 runs a writing strobe with B set to the W word.

With CIN low, the B operand comes from the W word instead of the ADC.

## The control scheme (`dsi_control`)

This is the heart of the design and the part that differs most from the
original.

**What counts as an event.** F and END only count while CIN is high. Both
lines are ANDed with CIN and then edge-detected:

* a rise of F&CIN is the integration reset, `reset int`;
* in detection mode the fall of F&CIN is a second reset, `reset det`;
* a rise of END&CIN requests a strobe.

The CAMAC decoder gives one-clock pulses for A0F0, A0F9, A0F16 and A0F17.

**The sequencer.** It has four states: IDLE, LATCH, WRITE, INC. Every event
first sets a one-deep pending flag. In IDLE the controller serves one
pending item:

* **An address reset comes first.** It resets the counter. For an F edge it
  also sets the function to A+B or A−B.
* **Otherwise one strobe.** The order is END, then the test write, then
  A0F0. A0F0 also sets the function to 0 in the same clock.

The buffer is read synchronously. Its output register therefore holds the
word at the current address one clock after the address settles. The clock
the sequencer spends in IDLE between strobes is exactly that clock. A strobe
thus takes 3 clocks, and the next one can start after 1 more.

**Queueing.** An F edge that comes while the last strobe of a half-period is
still running waits and is served right after it. The end-to-end test makes
this happen on purpose. A second event of the same kind before the first is
served is lost. Assertions flag that for the CAMAC commands.

**Read gate.** The output logic drives R1–R16 only while the read gate is
open. The gate opens when an A0F0 strobe latches its word and closes on the
next command to the module. When a module is not being read, its R lines
are 0, so the two modules can share the dataway as a wired OR.

## Interface (`dsi_system`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | module clock; asynchronous active-low reset (registers only, not the buffer) |
| `adc_code` | in | 16 | ADC code from the front panel |
| `end_conv` | in | 1 | END, end of A/D conversion; one strobe per rising edge |
| `fmod` | in | 1 | F, modulation signal; high = Antenna, low = Equivalent |
| `cin` | in | 1 | module select; high enables module 0, low enables module 1 |
| `camac_n` | in | 2 | station (N) line of module 0 and module 1 |
| `camac` | in | `camac_cmd_t` | sub-address `a`, function `f`, strobe `s1` (one clock), write word `w` |
| `camac_r` | out | 16 | R1–R16, ORed from both modules |
| `camac_q`, `camac_x` | out | 1 | Q and X: high for an accepted command (A0 with F0, F9, F16 or F17) |
| `busy` | out | 2 | per module: a strobe or reset is pending or running |

CAMAC commands (sub-address 0):

| command | action |
|---|---|
| A0F9 | reset the address counter |
| A0F0 | read the addressed channel and clear it; address + 1 |
| A0F16 | test write: run one strobe with B = W |
| A0F17 | load instruction register: W[1:0] function (0 A+B, 1 A−B, 2 B, 3 zero), W[2] detection mode |

**Timing rules the environment must keep:**

* F, CIN and END pass through `SYNC_STAGES` (default 2) synchroniser
  flip-flops.
* The ADC code is not synchronised. It must stay valid from END until that
  sample has been written: `SYNC_STAGES` + 4 clocks, more if an F edge or a
  queued event is served first. A real ADC holds its code until its next
  END, which is enough.
* END pulses for one module must be at least 4 clocks apart.
* Read data is on `camac_r` 3 clocks after A0F0 and stays there until the
  next command to that module. A host waits until `busy` of that module is
  low.

## Capacity

* Each module has 4096 × 16 bits.
* Integration mode needs 2K cells. It therefore holds up to K = 2048
  channels, or 1000 channels (the size the original complex ran in real
  time) with room to spare.
* Detection mode holds up to 4096 channels.
* The sums wrap modulo 2<sup>16</sup>. Detection results read as two's
  complement.
* How many periods fit before a cell wraps depends on the ADC width and the
  sample rate, and neither is fixed here.

## Files

All files are in `rtl/`, one module or package per file.

| file | unit |
|---|---|
| `dsi_pkg.sv` | widths, ALU function enum `alu_op_t`, CAMAC command struct and function codes |
| `dsi_system.sv` | top: two modules, CIN inverted for the second |
| `dsi.sv` | one integrator module: wires the units below |
| `dsi_control.sv` | control scheme: event detection, pending flags, 3-phase strobe, read gate |
| `dsi_camac_decoder.sv` | N/A/F/S1 decoding, Q and X |
| `dsi_instr_reg.sv` | ALU function and mode bit |
| `dsi_input_logic.sv` | B operand: ADC code when CIN is high, held W word otherwise |
| `dsi_alu.sv` | A+B, A−B, B, 0 |
| `dsi_addr_counter.sv` | 12-bit address counter: clear, +1 |
| `dsi_ram.sv` | 4096 × 16 buffer, synchronous read, no reset |
| `dsi_out_reg.sv` | output register, loaded by the strobe's LATCH phase |
| `dsi_output_logic.sv` | AND gate of the output register onto R1–R16 |
| `dsi_sync.sv` | synchroniser for F, CIN, END |

Parameters `DATA_W` (16), `ADDR_W` (12) and `SYNC_STAGES` (2) are set on
`dsi_system` and `dsi`. They are passed down to the units.

## Simulation

Each unit has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
  rtl/dsi_pkg.sv tb/tb_dsi_system.sv --top-module tb_dsi_system -o sim
./obj_dir/sim
```

What the testbenches cover:

* **`tb_dsi_system`** runs the pair at its default size with K = 1000
  channels and N = 3 periods. Both buffers are emptied and checked. Module 0
  goes through the diagnostic commands. Then module 0 integrates. Next,
  module 1 detects while module 0 is read out at the same time. Last,
  module 0 detects while module 1 is read. Every word read is compared with
  sums computed in the testbench. It counts and requires each mechanism:
  * the reset on an F rise, and the A−B reset on an F fall;
  * one strobe per END;
  * readout and clearing, and the address reset;
  * the test write and the instruction load;
  * a queued F edge;
  * a readout that overlaps acquisition.

  It runs in well under a second.
* **`tb_dsi_capacity`** fills a whole buffer. It integrates K = 2048
  channels (every cell holds file A or E) and detects K = 4096 channels
  (every cell holds file D). It reads every cell back and checks that the
  readout cleared the buffer.
* **`tb_dsi`** covers one module: clearing, every ALU function through the
  test commands, integration and detection. It also checks the 3-clock read
  latency.
* **`tb_dsi_control`** checks the strobe phase order and every event rule of
  the control scheme.
* The leaf units have directed and random tests against reference models.

The buffer has no reset, and a two-state simulator starts it with random
contents. Like the real module, the testbenches empty it with a readout
pass before they integrate.

## Where this design makes its own choices

The original gives the units, their connections and the behaviour described
above. This design decides the following:

* **One clock.** F, CIN and END are synchronised and edge-detected. The
  strobe is three clock phases instead of a monostable pulse.
* **Test commands.** A0F16 is the test write and A0F17 loads the
  instruction register. Only A0F0 and A0F9 are named in the original. The
  mode bit in W[2] is also this design's choice; the original does not say
  how the mode is selected.
* **ALU codes.** The encoding (A+B 0, A−B 1, B 2, zero 3) is assumed. After
  reset the module is in integration mode with function A+B.
* **ADC code width.** It is taken as 16 bits, the buffer width. Results wrap
  on overflow.
* **CAMAC bus.** S1 is a one-clock pulse synchronous to `clk`. The W word is
  held in a register at the test write. Q and X answer only the four
  commands. The dataway's other lines (LAM, Z, C, I) are not modelled.
* **Overlapping events.** They are queued one deep, address resets first.
* **No status read.** Which module holds the finished data is known from
  CIN. No CAMAC status read was added for it.
* **Buffer read timing.** The buffer is a synchronous-read memory; the
  original chip's timing is not known.
