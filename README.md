# Broadcast hierarchy test chip (TBH) in SystemVerilog

A broadcast hierarchy connects many processing nodes (PNs) through a tree: messages
from the nodes are *concentrated* up a tree of switches, one message at a time wins
the root, and the root's output is broadcast to every receiver, where the message's
address picks the node that keeps it. This RTL implements one such broadcast domain,
the arrangement of the 1987 TBH test chip:

* 8 transmit PNs, each holding one 7-bit message `{value[3:0], destination[2:0]}`;
* a three-level binary **concentrate tree** of 7 switches that chooses which message
  goes next, using a **bandwidth-slice priority** at every switch;
* a single **global receive line** from the root switch to 8 receive PNs, each a 4-bit
  register.

Everything moves **bit-serially**, one bit per clock per link, with a three-wire
valid / bit / taken handshake on every link. The tree is a pipeline: once full, the root
delivers one bit per cycle, so eight messages (56 bits) cross it in 56 consecutive
cycles after a 3-cycle fill.

```
 DTIN_B,ATIN_B,WRITEINP                                ARIN_B,READINP -> DR,RRDYP
        |                                                       ^
   +---------+  valid/bit/taken x8  +------------+  s6v/s6b/s6t  +---------+
   |  inmod  | -------------------> |    tmod    | ------------> | outmod  | -> ADRB
   | 8 x PN  | <------------------- | 7 switches | <------------ | 8 x 4b  |
   +---------+                      +------------+               +---------+
                                      | SxVP/SxBP/SxTP monitor taps (x = 0..6)
```

## Messages and the operating sequence

A message is 7 bits. Bits 2:0 are the destination receive PN, bits 6:3 the value.
Bit 0 travels first, so every stage sees the three address bits before the four value
bits. Using the chip takes four steps:

1. Hold `resetinp` high for at least one cycle. This clears every register, including
   the message and value registers, and aborts anything in flight.
2. Write the transmit PNs, one per cycle: `writeinp` high, `atin_b` = the PN, and
   `dtin_b` = the message. A written PN raises its valid at once, without waiting for run.
3. Hold `runinp` high. All valid messages contend, pass through the tree and land in
   the receive PNs. The taps `s_vp/s_bp/s_tp[x]` show each switch's output link as it
   runs. `adrb` shows the address shift register of the receiver.
4. Read the receive PNs: `readinp` high and `arin_b` = the PN. `dr` shows its value
   combinationally. `rrdyp` says whether it holds a completely received value.

`writeinp` and `runinp` must never be high in the same cycle (an assertion in `inmod`
checks this). With `autoinp` high, a transmit PN requeues its message as soon as it
has been sent. The tree then stays fully loaded for as long as run is held. This is how
the priority scheme is observed.

## The concentrate tree and its priority scheme

Switches are numbered from the bottom. Switch *k* (0-3) serves transmit PNs 2*k* and
2*k*+1. Switch 4 serves switches 0 and 1, switch 5 serves 2 and 3, and switch 6 is the
root. In each pair the higher-numbered source is the switch's **H** (higher-address)
child, and the other is its **L** child.

A switch handles one whole message at a time. While idle, it picks a child. It then
takes exactly seven bits from that child, counted by a mod-7 counter, before it picks
again. Messages carry no framing: every stage knows where a message ends only by
counting to seven.

The pick follows a **bandwidth slice**: N_HIGH messages from H, then M_LOW messages from
L, round and round. Both numbers are 1 here, so a switch under load alternates H, L,
H, L. If the preferred child has nothing to send and the other child has, the switch
takes the other child's message. Such a fall-back message does not count toward the
slice, so the switch still prefers the same child next time. After reset every switch
prefers H.

With all eight PNs loaded, the alternation at each level nests. The root delivers the
messages in PN order **7, 3, 5, 1, 6, 2, 4, 0**, the bit-reversed count. In detail:

* The root takes H (switch 5), which takes H (switch 3), which takes PN 7.
* Next the root takes L (switch 4 → switch 1 → PN 3).
* Then switch 5 again, which now prefers L: switch 2 → PN 5. And so on.

When the PNs are only partly loaded, the fall-back rule decides the order. The order also
depends on which switches committed to a message while waiting: a switch that has taken
the first bit of a message finishes that message even if its parent is serving the other
side meanwhile.

The slice weights are parameters of `ct_switch` (`NH`, `ML`). Their defaults come from
`tbh_pkg::N_HIGH` and `M_LOW`. The switch testbench also runs a 2-high / 1-low switch.

## Link handshake and pipeline timing

Every link carries `valid`, `bit` and, going back, `taken`. A bit moves in a cycle where
`valid` and `taken` are both high, and both ends update at that clock edge. A source
must hold its bit and valid until the bit is taken; assertions in `ct_switch` check this
on both child links, and check that a parent never takes a bit that is not offered.

Each switch has one output register. It takes a bit from its granted child when run is
high, the child is valid, and the output register is empty or being taken this cycle.
`taken` is therefore combinational, and it ripples down from the root to the leaves
within one cycle. This gives full throughput with one register per level:

| run cycle | event (all PNs loaded, receiver always taking) |
|---|---|
| 1 | the bottom switches take bit 0 from their chosen PNs |
| 2 | level 2 takes it |
| 3 | the root takes it; the root link is valid from the next cycle |
| 4 | the receivers take bit 0 of the first message |
| 4-59 | 56 bits, one per cycle, with no gap between messages |

A switch that takes the seventh bit of a message is idle in the next cycle. In that same
cycle it chooses and takes bit 0 of the next message, so messages run back to back.

The receivers always accept: `s6t` equals `s6v` while run is high.

**RUNINP.** `runinp` qualifies both the switch output valid and the switch input load.
When run falls, every switch stops offering and stops taking bits, and it keeps what it
holds. The taps all go low. When run rises again, transfer resumes with nothing lost or
duplicated. The transmit PNs do not look at run for their valid, only for shifting.

## Transmit and receive buffers

**Transmit PN (`tx_pn`).** Each PN has a 7-bit register that rotates toward bit 0 on
every taken bit, with bit 0 re-entering at bit 6. It also has a mod-7 counter and a
valid flag. The flag is set by a write and cleared in the cycle the seventh bit is
taken, unless auto mode is on. After seven rotations the register holds the original
message again, so auto mode needs no reload. `inmod` adds the 3-to-8 write decoder.

**Receive buffer (`outmod`).** A mod-7 counter splits each incoming message:

* Counts 0-2 shift the bit into the 3-bit address register (`adrb`).
* Counts 3-6 shift it into the 4-bit receive register that the address selects.

Both shift in from the top, so bit 0 ends at bit 0.

A per-register "received" flag drives `rrdyp`. The flag is cleared while its register
is being rewritten and set on the message's last bit. A value that arrives later for
the same address overwrites the earlier one. Outside a read (`readinp` low), `dr` and
`rrdyp` are 0.

## How this RTL departs from the original chip

* **Clocking.** The original is built from latches on a non-overlapping two-phase clock
  (PH01/PH02, 12 MHz). Bits are trapped on phase 1, and taken is shown and shifts
  happen on phase 2. Here one rising-edge clock `clk` stands for one PH01/PH02 cycle,
  and `resetinp` is a synchronous reset. The pins PH01/PH02 become `clk`. The
  inverter/buffer trees that made the clock phases and their complements have no
  counterpart.
* **Switch storage.** The original switch holds a bit in an input latch and in an output
  latch on alternate phases. Here each switch has a single output register. The rate
  (one bit per cycle) and the latency (one cycle per level) are unchanged.
* **Run and the switch inputs.** The original is described as qualifying only each
  switch's *output* with run. Because of that, a bottom switch could load one extra bit
  when run fell, so run had to stay high for a whole run. Its gate-level drawings also
  route run into the input load logic. This RTL gates both, so no extra bit is loaded
  and run may be dropped and raised again mid-message. Every switch, not only the root,
  stops on run; with only the root stopping, the lower switches would halt a few bits
  later by back-pressure, which gives the same message order.
* **Choices where the original is silent.** These are this design's own:
  * the power-up preference (H);
  * the fall-back rule not advancing the slice count;
  * the exact meaning of `rrdyp`;
  * `dr` reading 0 outside a read.
* **Not modelled.** Pads and the clock buffers, and the race between the root's valid
  and the receivers' trap that affected the fabricated chips. The race is a circuit
  timing fault, which a synchronous model cannot have.
* **Pin buses** are numbered `[N-1:0]` with bit 0 the least significant bit.

## Files

| file | contents |
|---|---|
| `rtl/tbh_pkg.sv` | sizes (3-bit address, 4-bit value, 7-bit message, 8 PNs), slice weights, message struct |
| `rtl/mod7_cnt.sv` | mod-7 bit counter used by every serial stage |
| `rtl/tx_pn.sv`, `rtl/inmod.sv` | transmit PN, and the transmit buffer with its write decoder |
| `rtl/ct_switch.sv`, `rtl/tmod.sv` | tree switch, and the tree with the global receive line |
| `rtl/outmod.sv` | receive buffer |
| `rtl/tbh_chip.sv` | top level with the chip's pins |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

`tmod` and `inmod` take the number of PNs as a parameter (a power of two). The message
format in `tbh_pkg` ties the chip itself to 8.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. A watchdog ends it with
a failure if it hangs. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_tbh_chip \
    rtl/tbh_pkg.sv tb/tb_tbh_chip.sv -Mdir obj_tbh_chip -o sim
./obj_tbh_chip/sim
```

Use the same command with `tb_tmod`, `tb_ct_switch`, `tb_inmod`, `tb_tx_pn`, `tb_outmod`
or `tb_mod7_cnt`. Verilator finds the other modules in `rtl/` by their file names.
Lint with `verilator --lint-only -Wall -Irtl rtl/tbh_pkg.sv rtl/tbh_chip.sv`.

## Verification and how far to trust it

* `tb_tbh_chip` runs the chip at its only size, through its pins, against a
  message-level model of the tree. It covers:
  * full load, with exact order, first bit in run cycle 4, and last in cycle 59;
  * ten random partial loads with colliding destinations;
  * run dropped three times in mid-message;
  * three rounds of auto mode;
  * a reset in mid-run.

  It checks `adrb` after every message's third bit, every receive register, and
  `rrdyp`. It counts each mechanism (slice alternation, fall-back, switch stalls, run
  halts, auto requeues, reset abort, not-ready reads) and fails if one never happened.
* `tb_tmod` compares the tree against the same kind of model: full and random partial
  loads, with and without random back-pressure at the root, and the one-bit-per-cycle
  rate.
* `tb_ct_switch` checks the H/L alternation, the fall-back, the kept preference, back
  pressure, a run halt in mid-message, and a 2-high / 1-low switch.
* The unit testbenches for `tx_pn`, `inmod`, `outmod` and `mod7_cnt` compare against
  reference values computed in the testbench.

Each testbench fails when its module is given a deliberate bug, such as swapped tree
children, a frozen slice preference, the address shifting the wrong way, or a modulo-8
counter.

What was not checked is timing at the gate level: the RTL is cycle-accurate to its own
single-clock model, not to the original two-phase circuit.
