# Watchdog timer for a drone SoC

A drone's flight computer must not hang in mid-air. This watchdog is a small
bus peripheral that catches a processor that has stopped running its
software. The processor programs a timeout and must then check in with the
watchdog at regular intervals. If it misses one check-in, the watchdog raises
an interrupt and gives it one more timeout period to respond. If it misses
that too, the watchdog pulls the system reset.

The design is a 32-bit down counter plus a small controller and two bus
registers. It has one clock domain and about seventy flip-flops. The
behaviour follows the AMBA-style watchdog this work is modelled on. That
includes the `0x1ACCE551` unlock key that keeps runaway software from
reprogramming the timer. The bus handshake, the register offsets, the reset
values and the reset pulse shape are choices made here; the section
[Where the design chooses](#where-the-design-chooses) lists them.

## The timeout sequence

Everything happens on rising edges of `WDOGCLK` where `WDOGCLKEN` is high.
With a load value L in `WDOGLOAD`:

1. **Count.** After a reload, `WDOGCOUNT` runs L, L-1, ..., 0. That takes
   L+1 enabled cycles.
2. **Interrupt.** On the edge after the count shows 0, `WDOGINT` rises and
   the counter reloads to L. The next full count, another L+1 cycles, is the
   *service time*.
3. **Service.** If software drives `WDOGINTEN` high at any time before the
   service time ends, `WDOGINT` drops on the next edge. The counter then
   restarts from L and the sequence begins again at step 1.
4. **Reset.** If the count reaches 0 again while `WDOGINT` is still high,
   `WDOGRES` is high for exactly one cycle. On the same edge `WDOGINT` drops
   and the counter reloads to L. The watchdog therefore starts over as the
   system comes back up.

With L = 10, an unserviced watchdog looks like this (one column per enabled
edge; `^` marks the edge where an output changes):

```
WDOGCOUNT  10 9 8 ... 1 0 | 10 9 ... 1 0 | 10 9 ...
WDOGINT    0  0 0     0 0 | ^1 1     1 1 | ^0 0
WDOGRES    0  0 0     0 0 |  0 0     0 0 | ^1 0
```

`WDOGINT` comes L+1 cycles after the load. `WDOGRES` comes L+1 cycles after
that. Both outputs are driven straight from flip-flops.

`WDOGINTEN` is a level, not a register write. While it is high it clears
`WDOGINT` and restarts the count on every edge. A one-cycle pulse is the
intended use.

## Pausing: WDOGCLKEN

`WDOGCLKEN` low freezes the timer. The count does not move, and no interrupt
or reset can occur. A new load value does not reach the counter while it is
frozen, even if the write was accepted. Two things still work while the
timer is frozen:

- A `WDOGINTEN` pulse clears `WDOGINT` at once.
- Any reload asked for in the meantime is remembered: one from an accepted
  `WDOGLOAD` write, or one from `WDOGINTEN`. It is carried out on the first
  enabled edge, and the count then runs from the new value.

## Write protection: WDOGLOCK

The processor reaches the registers through a write-only AMBA APB slave
port. Two registers are decoded:

| offset | register | access | effect |
|-------:|----------|--------|--------|
| 0x000 | `WDOGLOAD` | write, only while unlocked | sets L; the count restarts from L one clock after the write (at the next enabled edge) |
| 0xC00 | `WDOGLOCK` | write, always | `0x1ACCE551` unlocks; any other value locks |

The watchdog is locked after reset. Software writes the key and then the load
value; afterwards it should lock the watchdog again. A `WDOGLOAD` write while
locked is ignored and has no side effect. No register can be read back.
Software sees the count on the `WDOGCOUNT` output port.

A write takes effect in the APB access phase, when `PSEL`, `PENABLE` and
`PWRITE` are all high. There are no wait states, so `PREADY` and `PSLVERR`
are left out. Writes to other offsets and read transfers are ignored.
Because the watchdog is meant to run from the processor's own clock, the
bus side and the timer share `WDOGCLK`.

## Ports of `watchdog`

| port | dir | width | meaning |
|------|-----|------:|---------|
| `WDOGCLK` | in | 1 | clock for bus and timer |
| `PRESETn` | in | 1 | asynchronous reset, active low |
| `PSEL`, `PENABLE`, `PWRITE` | in | 1 each | APB transfer control |
| `PADDR` | in | 10 | word address, byte-offset bits [11:2] (`wdog_pkg::wdog_addr_t`) |
| `PWDATA` | in | 32 | write data |
| `WDOGCLKEN` | in | 1 | timer enable |
| `WDOGINTEN` | in | 1 | interrupt service: clears `WDOGINT`, restarts the count |
| `WDOGINT` | out | 1 | watchdog interrupt |
| `WDOGRES` | out | 1 | one-cycle system reset request |
| `WDOGCOUNT` | out | 32 | current count |

After reset, `WDOGLOAD` and the count are `0xFFFFFFFF`, `WDOGINT` and
`WDOGRES` are low, and the registers are locked. A watchdog that nobody
programs therefore still times out, but only after the longest period.

Parameters: `W` (32) is the width of the counter and the data bus, and
`LOAD_RESET` (all ones) is the reset value of `WDOGLOAD`. The lock key is
32 bits and does not scale with `W`.

## Structure

```
watchdog            top: wiring only
├── wdog_regs       APB write decode, WDOGLOCK key check, WDOGLOAD register
├── wdog_counter    W-bit down counter with load and zero flag
└── wdog_ctrl       the timeout sequence: reload / interrupt / reset decisions
wdog_pkg            width, unlock key, register offsets, address type
```

Most of the logic sits in `wdog_ctrl`. On each enabled edge it chooses one
action, in this order:

1. **Reload.** Load the counter if a reload is wanted. That is the case when
   one is held over from a frozen period, when a `WDOGLOAD` write was just
   accepted, or when `WDOGINTEN` is high.
2. **Expire.** Otherwise, if the count is zero: reload, and either raise
   `WDOGINT` or, if it is already high, pulse `WDOGRES` and drop `WDOGINT`.
3. **Decrement.** Otherwise, decrement.

Because the reload check comes first, a service that lands on the very edge
where the service time runs out still wins: no reset follows. The
controller has three flip-flops: the held-reload flag, `WDOGINT` and
`WDOGRES`. Its assertions check that `WDOGRES` only ever follows a high
`WDOGINT`, and that the two outputs are never high together. `wdog_regs`
asserts the APB rule that `PENABLE` is only high while `PSEL` is.

## Where the design chooses

The following behaviour is the specification's:

- the 32-bit counter loaded from `WDOGLOAD`;
- the decrement gated by `WDOGCLKEN`;
- an interrupt at zero only when none is pending;
- clearing by `WDOGINTEN` with a reload;
- a reset when the count reaches zero again with the interrupt still
  pending, followed by a restart from the load value;
- the `0x1ACCE551` lock rule, with any other value locking again;
- a disabled timer ignoring the load register.

The following are choices made here:

- **Length of the service time.** The service time is one full reload
  period, the same as the timeout. It is not a separate, fixed number of
  cycles.
- **Reset pulse.** `WDOGRES` is a one-cycle pulse. Dropping the pending
  interrupt with it lets the watchdog rearm on its own. A design that needs
  a longer reset must stretch the pulse outside.
- **Bus.** A write-only APB port with the offsets above. There are no wait
  states and no read-back.
- **Reset state.** Locked, with the longest load value.
- **Same-edge conflicts.** A reload wins over the zero check. If a service,
  or the reload that follows a `WDOGLOAD` write, falls on the edge where the
  count is zero, the count restarts and no interrupt or reset is raised.
- **Reload delay.** A load write restarts the count one clock after the
  write, not on the same edge.

## Simulating

Each block has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. A watchdog process
in each testbench stops a run that hangs. For example:

```
verilator --binary --timing --assert -Irtl --top-module tb_watchdog \
  rtl/wdog_pkg.sv rtl/wdog_regs.sv rtl/wdog_counter.sv rtl/wdog_ctrl.sv \
  rtl/watchdog.sv tb/tb_watchdog.sv
./obj_dir/Vtb_watchdog
```

The class-based environment also needs the interface from `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  --top-module tb_watchdog_env rtl/wdog_pkg.sv tb/tb_watchdog_env.sv
./obj_dir/Vtb_watchdog_env
```

- `tb_watchdog` runs the whole design at its default size. It follows a
  processor through the full story:
  - a locked write is ignored;
  - with `WDOGCLKEN` low, nothing moves even after unlocking and writing 10;
  - after enabling, the count runs 10 to 0;
  - the interrupt arrives on the 11th cycle;
  - a service at count 4 prevents the reset;
  - an unserviced interrupt gives `WDOGRES` exactly 11 cycles later;
  - a new load value restarts the count;
  - relocking shuts out further writes.

  Then 20,000 random cycles are checked against a cycle model of the
  watchdog. The random traffic is bus writes (good and bad keys, new load
  values), enable gaps and services. The test also counts each mechanism
  and fails if one never happened: rejected write, unlock, accepted load,
  relock, stall, interrupt, service, reset.
- `tb_watchdog_env` is a class-based environment around the same top. A
  generator, a driver working through a virtual interface (`wdog_if`), a
  monitor and a scoreboard with its own cycle model take part. It replays
  the demonstration scenarios one after another: serviced interrupt,
  unserviced interrupt and reset, disabled timer, and lock/unlock access.
  Then it runs 2,000 random operations. Every output is compared on every
  clock edge.
- `tb_wdog_ctrl` closes the loop around the controller with a counter in
  the testbench. It checks the L+1 interrupt and reset timing, the held
  reload while frozen and clearing while frozen. Then it runs a random
  comparison against a model of the timeout sequence.
- `tb_wdog_regs` checks the lock key and relocking, and that no write lands
  in the setup phase. It also checks the one-cycle reload pulse and random
  write sequences.
- `tb_wdog_counter` compares the counter with a reference count under random
  load and decrement requests.

The simulations are short: each testbench finishes in well under a second.

## How far to trust it

All testbenches pass. Each of the four block testbenches fails against a deliberately
broken copy of its module. The RTL passes Verilator's lint with
`-Wall` without errors and elaborates in Yosys. The remaining warnings are
harmless: package constants unused by a given module, the asynchronous reset
also used in assertions' `disable iff`, and the `unlocked` flag, which is
left unconnected in the top. Synthesis gives about 70 flip-flops and 40 word-level
cells.

The testbenches' reference models are written from the timeout sequence
described above. They catch implementation slips but cannot catch a
misreading of the intended behaviour. Read the list of choices before
relying on exact cycle counts or on the reset pulse shape.
