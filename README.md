# Statistics Counter Plus — 256 event counters for network hardware

A network processing module needs to count things so it can be managed and
debugged: cells per virtual circuit, memory accesses, errors. This block keeps
**256 independent 32-bit counters** in on-chip block RAM. Three event lines
can report events at the same time. A fourth port reads any counter back.

Incrementing a RAM-resident counter is a read-modify-write that takes several
cycles. A simple counter therefore accepts one increment per line every four
cycles. The "Plus" removes that limit. A line may stay high for as long as its
event keeps happening, and every high cycle is counted. A small accumulator per
line collects the events. Once per four cycles it sends the total (0 to 4) to
memory as a single add.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. It follows the
structure of the Statistics Counter Plus described by M. Attig and
J. W. Lockwood (Washington University, report WUCS-2002-25, for the FPX
platform). That report gives the interface, timing rules and block diagram,
but not the controller's internals. Where this implementation makes its own
choices, they are listed in the section on departures near the end.

## Interface

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `reset_l_int` | in | 1 | synchronous reset, active low |
| `event_1`, `event_2`, `event_3` | in | 1 | high in every cycle the event occurs |
| `event_1_number` … `event_3_number` | in | 8 | counter number for that line |
| `cntr_read` | in | 1 | one-cycle read request |
| `cntr_num_read` | in | 8 | counter to read, valid with `cntr_read` |
| `cntr_ready` | out | 1 | counters cleared; events are counted from now on |
| `data_strobe` | out | 1 | one-cycle pulse: `cntr_data` is valid |
| `cntr_data` | out | 32 | counter value |

### Rules the user must follow

The block does not check these rules, apart from one assertion on read
spacing. Breaking them produces wrong counts.

* **Keep the number steady.** Hold `event_#_number` steady while `event_#` is
  high.
* **One line per number.** Use a given event number on only one line at a time.
  Two lines updating the same counter race in the read-modify-write.
* **Four low cycles before a switch.** Before a line switches to a different
  event number, hold it low for at least four cycles. This guarantees that the
  old number's pending count has been sent first.
* **Reads four cycles apart.** Pulse `cntr_read` for exactly one cycle, at
  least four cycles apart. Repeated reads of the same number must obey this
  too.
* **Wait for `cntr_ready`.** Events before `cntr_ready` rises are ignored.

### Read timing

`data_strobe` and `cntr_data` arrive **3 to 6 cycles** after the `cntr_read`
pulse. The exact latency depends on where the internal rotation stands.
`cntr_data` is only meaningful while `data_strobe` is high. In every other
cycle it shows whatever counter the RAM happened to read.

## How it works

```
 event_# ──► event_requestor ──req/amount/number──► stat_req_regs ──number──► RAM port A (addra)
 (x3)        3-bit accumulator       (x3)          4x8-bit numbers     │      upper + lower 256x16
                per line                            3x3-bit amounts    │            │ dout (32)
 cntr_read / cntr_num_read ───────────────────────► 4x1-bit flags      │            ▼
                                                    slot multiplexers  │    stat_update_pipe
                      stat_fsm: clear, then  ◄──pending── │  ◄──slot───┘    dout reg → +amount → sum reg
                      rotate slots 0,1,2,3 ──slot/clear──►│                 addr, we delayed 3 cycles
                                  │                                               │
                                  └─ strobe ─► data_strobe reg     RAM port B (addrb/din) ◄─┘
                                 RAM dout ──► cntr_data reg
```

### The four-slot rotation

Everything is paced by a two-bit **slot** counter in the controller
(`stat_fsm`). It advances every cycle: slot 0 serves event line 1, slot 1 line
2, slot 2 line 3, slot 3 the read port. In each cycle the slot multiplexers put
that slot's counter number on RAM port A. If the slot's request flag is set,
the controller serves it: it clears the flag, and then either

* starts an increment (`inc_go`), for a line slot, or
* marks a read (`rd_go`), for the read slot.

If the flag is not set, the RAM still reads the selected address, but nothing
is written and no strobe follows.

Each source is visited exactly once every four cycles. That is the source of
the block's four-cycle rules: the read-modify-write of one counter takes four
cycles, so a line must not touch the same counter again sooner.

### Turning a held line into increments (`event_requestor`)

Each line has a 3-bit accumulator and a register holding the event number last
seen while the line was high. In the cycle *before* the line's slot, the
requestor pulses the line's increment request if the accumulator is non-zero.
The pulse hands over the accumulated amount and the number. In that same pulse
cycle the accumulator restarts:

* at **1** if the line is high in that cycle (that event goes into the next
  request), or
* at **0** if the line is low.

In all other cycles a high line adds one. Requests are exactly four cycles
apart, so a line held high continuously produces an increment of 4 every four
cycles. Three bits are therefore enough.

### The read-modify-write pipeline (`stat_update_pipe`)

The counter's two halves live in two 256 × 16 dual-port RAMs (`stat_bram`,
upper and lower). Port A reads and port B writes. For an increment served in
cycle *s*:

| cycle | what happens |
|---|---|
| s | slot multiplexer drives the number on `addra`; amount enters the first amount register |
| s+1 | RAM outputs the old 32-bit count |
| s+2 | `dout_q` holds the count; the amount, delayed twice, is added |
| s+3 | `sum_q` holds the new count; address and write enable, each delayed three times, write it through port B at the end of the cycle |
| s+4 | the next visit to the same slot may read the updated count |

From an event on a line to its presence in RAM takes at most 9 cycles (up to 4
waiting in the accumulator, then the steps above). A read may therefore not
yet include events of the last 8 cycles before its pulse.

### The read path

For a read pulsed in cycle *r*:

1. The pulse sets the read flag and loads the read number at the end of
   cycle *r*.
2. The read slot comes round in a cycle *s* between *r*+1 and *r*+4.
3. The RAM output appears in *s*+1.
4. It is registered into `cntr_data` at the same edge that registers the
   controller's strobe into `data_strobe`.

Both are therefore visible in cycle *s*+2, which is *r*+3 to *r*+6.

### Reset and clearing

Block RAM has no reset. After `reset_l_int` is released, the controller walks
port B over all 256 addresses and writes zero, one address per cycle. Only
then does it start the rotation. `cntr_ready` rises 257 cycles after the
reset is released. A reset at any later time clears all counters again.

## Example: counting in a control cell processor

The counter is used in a pipelined control cell processor. That processor
counts four kinds of events per virtual circuit (VCI) using the low
6 bits of the VCI:

| event number | meaning |
|---|---|
| `00vvvvvv` | control cell arrived on VCI `vvvvvv` |
| `01vvvvvv` | SRAM read on behalf of VCI `vvvvvv` |
| `10vvvvvv` | SRAM write on behalf of VCI `vvvvvv` |
| `11000000` (0xC0) | all control cells |

This uses 193 of the 256 counters. `tb/tb_stat_workloads.sv` simulates this
use:

* Line 1 counts cells per VCI.
* Line 2 counts the total, in the same cycle.
* Line 3 is held high for one cycle per SRAM word read or written.

The total counter sits at kind `11` in bits 7:6, like the other kinds. The
processor itself is not part of this RTL.

## Files

| file | contents |
|---|---|
| `rtl/stat_pkg.sv` | sizes (256 counters, 8-bit numbers, 32-bit counts, 3-bit amounts, 16-bit RAM halves) and types |
| `rtl/stat_counter_plus.sv` | top level: wires the blocks below, output registers |
| `rtl/event_requestor.sv` | per-line accumulators and increment request pulses |
| `rtl/stat_req_regs.sv` | number, amount and request-flag registers; slot multiplexers |
| `rtl/stat_fsm.sv` | clear after reset, four-slot rotation, service and strobe signals |
| `rtl/stat_update_pipe.sv` | dout register, 32-bit + 3-bit adder, sum register, delayed write port |
| `rtl/stat_bram.sv` | 256 × 16 RAM, one read and one write port (used twice) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_stat_workloads.sv` |

Size after generic synthesis is about 210 bits of registers and 8192 bits of RAM
(2 × 256 × 16). The rest is a few adders and multiplexers.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. A watchdog ends a
hung run with a failure. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/stat_pkg.sv tb/tb_stat_counter_plus.sv --top-module tb_stat_counter_plus
./obj_dir/Vtb_stat_counter_plus +verilator+rand+reset+2
```

Replace the testbench name to run another one. The simulator has no X state,
so the RAM starts with random contents; that is what makes the clear-after-reset
check meaningful.

What each testbench checks:

* **`tb_stat_counter_plus`** runs the top at its default size for about
  100,000 cycles. It drives random bursts on all three lines, obeying the
  rules above, with reads every 4 to 9 cycles. It holds one line high for
  70,000 cycles, so that its count carries from the lower RAM half into the
  upper one. It then reads all 256 counters and compares them exactly against
  a reference model. It also checks every read's latency (3 to 6) and the
  clear after each reset. During traffic, a read value is checked to lie
  between the reference count 8 cycles before the pulse and the count at the
  strobe. It counts and requires each mechanism at least once: held events,
  increments of four, number switches, all three lines active together, each
  of the four read latencies, the carry, and the clear.
* **`tb_stat_workloads`** runs the basic usage sequence and then the control
  cell processor example (3000 cells), with exact readback.
* **The unit testbenches** check each module against its own reference model
  cycle by cycle.

## Departures and choices made here

The published description fixes the following:

* the interface and its timing rules;
* the three-line, 256-counter, 32-bit organisation;
* the 3-bit amount registers;
* the two 16-bit block RAMs;
* the register stages of the update path (three on the write address, two on
  the amount, one on each side of the adder).

It does not describe the controller. The following are this implementation's
own choices:

* **Controller.** A fixed four-slot rotation in the order line 1, line 2,
  line 3, read. It was chosen as the simplest controller that gives exactly
  the stated 3-to-6-cycle read latency and four-cycle spacing.
* **Request timing.** The requestor times its request pulses from the
  controller's slot.
* **Request flags.** The flags are set by a request and cleared by the
  controller when served.
* **Clear after reset.** The RAM is cleared after reset, and `cntr_ready`
  signals the end of that clear. Events before it are dropped.
* **Write enable.** The write enable travels down the same three-stage delay
  as the write address.
* **Reset style.** Synchronous, active-low reset.

One inconsistency in the source: it once calls the new adder a "3-bit adder".
The datapath is really a 32-bit adder with a 3-bit second operand, which is
what is built.

The 32-bit counters wrap silently after 2^32 events.
