# Watchdog timer with an APB configuration port

A watchdog timer notices when the software it supervises has stopped
running. The software must "kick" the watchdog regularly. If it fails to do
so within a set time, the watchdog raises an interrupt and a reset request,
so the system can restart itself with nobody present.

This design is a watchdog built for an SoC peripheral bus. The timeout is a
32-bit register that a bus master (in a typical SoC, the AHB-to-APB bridge)
sets through an AMBA APB slave port. The kick arrives on a separate wire,
`activity_in`, from the supervised processor. Everything runs on the APB
clock `pclk`.

```
            +------------------------------------------------------+
 APB  ----->|  apb_interface  --timer_value-->  watchdog_timer     |---> interrupt
 (psel,     |  (timeout register                (32-bit            |---> reset
  penable,  |   at 0x10)                         down-counter)     |
  pwrite,   |                                        ^             |
  paddr,    |                                        |             |
  pwdata)<--|  prdata, pready, pslverr          activity_in <------|---- from CPU
            +------------------------------------------------------+
                                  wdt_apb_top
```

## How the timeout works

The watchdog is a 32-bit down-counter (`watchdog_timer`).

* Every `pclk` cycle in which `activity_in` is high loads the counter with
  the current timeout `T`, the value of the register.
* In every other cycle the counter goes down by one. It stops at zero.
* While the counter is zero, the watchdog has timed out. `interrupt` and
  `reset` are both high.
* They stay high until `activity_in` loads the counter again, or `prst` is
  applied.

The exact timing: let cycle 0 be the last rising edge at which `activity_in`
was sampled high. `interrupt` and `reset` then rise at edge `T`, exactly `T`
cycles later, unless another kick comes first. A kick at least every `T`
cycles therefore keeps the watchdog quiet. With `T = 0` the counter is
loaded with zero, so the watchdog reports a timeout continuously.

`activity_in` is sampled as a level. Holding it high keeps reloading the
counter, so a pulse of any length works. It must be synchronous to `pclk`.
An asynchronous source needs a synchroniser in front of it.

Writing a new timeout does **not** restart the count in progress. The new
value is used from the next kick on. If software lengthens the timeout, it
should kick right after the write.

`interrupt` and `reset` are the same condition. They are kept as two ports
so that a system can send them to different places, for example the CPU's
interrupt controller and the reset generator. Both are decoded from the
counter register alone, so neither has a combinational path from an input.

After `prst` the counter holds the register's reset value, 30. The watchdog
is running from reset. Unless the software kicks it within 30 cycles, or
writes a longer timeout and then kicks it, it fires.

## Register map and APB behaviour

| Address | Name          | Access | Reset        | Meaning                                     |
|---------|---------------|--------|--------------|---------------------------------------------|
| `0x10`  | `timer_value` | R/W    | `0x0000_001E`| Timeout in `pclk` cycles, used at each kick |
| other   | —             | —      | —            | PSLVERR; writes ignored, reads return 0     |

* The address bus is 8 bits wide and the data bus 32 bits.
* A write takes effect when `psel`, `penable` and `pwrite` are high and
  `paddr` is `0x10`. A read is served when `psel` and `penable` are high,
  `pwrite` is low, and the address matches.
* The slave adds no wait states. `pready` is high in every access phase
  (`psel & penable`), so each transfer takes the APB minimum of two cycles:
  setup, then access.
* `prdata`, `pready` and `pslverr` are combinational from the bus and the
  register. They are zero outside an access phase.
* The register updates at the rising edge that ends the write's access
  phase. `timer_value_out` shows the new value from then on.
* There is no `PPROT` or `PSTRB`. Every write replaces all 32 bits.

Concurrent assertions in `apb_interface` check the master's side of the
protocol. `penable` may be high only together with `psel`. A setup phase must
be followed by its access phase. `paddr`, `pwrite` and `pwdata` must hold
from setup into access. The assertions are skipped while `prst` is high.

## Reset and clocking

There is one clock, `pclk`, and one reset, `prst`. The reset is **active
high and synchronous**. It sets the register to `0x1E` and the counter to
the same value (`RESET_COUNT`).

The counter takes its reset value from a parameter, not from the register.
This keeps a one-cycle reset correct: the register and the counter are
reset at the same edge.

## Ports of `wdt_apb_top`

| Port              | Dir | Width | Meaning                                   |
|-------------------|-----|-------|-------------------------------------------|
| `pclk`            | in  | 1     | clock                                     |
| `prst`            | in  | 1     | synchronous reset, active high            |
| `psel`, `penable`, `pwrite` | in | 1 | APB control                         |
| `paddr`           | in  | 8     | APB byte address                          |
| `pwdata`          | in  | 32    | APB write data                            |
| `prdata`          | out | 32    | APB read data                             |
| `pready`          | out | 1     | APB transfer done (no wait states)        |
| `pslverr`         | out | 1     | APB error: unmapped address               |
| `activity_in`     | in  | 1     | kick from the supervised system           |
| `interrupt`       | out | 1     | timeout interrupt                         |
| `reset`           | out | 1     | timeout reset request                     |
| `timer_value_out` | out | 32    | the timeout register, for observation     |
| `count`           | out | 32    | the running counter, for observation      |

`timer_value_out` and `count` are debug outputs. Leave them unconnected if
they are not needed; synthesis will not add logic for them.

## What is given, and what was chosen here

The following come from the reference description of this peripheral:

* the two-block structure, with the single `timer_value` connection between
  the blocks;
* the port list;
* the write and read conditions on `psel`, `penable` and `pwrite`;
* the 8-bit address and 32-bit data widths;
* the restart on every `activity_in` and the timeout after `timer_value`
  cycles without activity, raising both interrupt and reset;
* the register address `0x10` and the reset value `0x1E`. These two come
  from the reference design's simulation waveforms, not from a written
  register map.

Everything below is this design's own choice:

* counting down to zero rather than up to `timer_value`;
* the exact timeout cycle;
* the sticky outputs, which stay high until a kick;
* the new timeout taking effect at the next kick;
* the single register, with PSLVERR for every other address;
* zero wait states;
* the reset polarity and synchronous reset.

Change any of these and every testbench model below needs the same change.

## Files

| File | Contents |
|------|----------|
| `rtl/wdt_apb_pkg.sv`     | widths, register address and reset value |
| `rtl/apb_interface.sv`   | APB slave with the timeout register |
| `rtl/watchdog_timer.sv`  | the down-counter and timeout decode |
| `rtl/wdt_apb_top.sv`     | top level: the two blocks wired together |
| `tb/apb_if.sv`           | APB bus interface with master tasks, used by testbenches |
| `tb/tb_apb_interface.sv` | register map, error responses and transfer length (two cycles) |
| `tb/tb_watchdog_timer.sv`| timeout latency (T = 20, 1, 7, 0), restarts, recovery, random kicks |
| `tb/tb_wdt_apb_top.sv`   | end-to-end test at default parameters, listed below |
| `tb/tb_wdt_apb_random.sv`| 20,000 cycles of random legal APB traffic, kicks and resets, checked every cycle |

`tb_wdt_apb_top` runs the whole design through:

* the timeout after reset (30 cycles);
* APB writes and reads, including unmapped addresses;
* the watchdog test with the timeout set to 20 (`0x14`) and the kick held
  back, where interrupt and reset must rise after exactly 20 cycles;
* regular kicks that keep the watchdog quiet;
* reconfiguring the timeout while the counter runs;
* a random phase with APB traffic and kicks running at the same time.

It counts each mechanism (write, read, error response, restart, timeout,
recovery) and fails if any of them never happened.

Each testbench checks against its own reference model. That model tracks
the cycles since the last kick, not a counter. Each testbench prints
`TB_RESULT checks=N failures=M` at the end, and has a cycle limit that
counts as a failure.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal \
    rtl/wdt_apb_pkg.sv rtl/apb_interface.sv rtl/watchdog_timer.sv rtl/wdt_apb_top.sv \
    tb/apb_if.sv tb/tb_wdt_apb_top.sv --top-module tb_wdt_apb_top
./obj_dir/Vtb_wdt_apb_top
```

To run another testbench, change the testbench file and `--top-module`.
`tb_apb_interface` needs only the package, `apb_interface.sv` and
`apb_if.sv`. `tb_watchdog_timer` needs only the package and
`watchdog_timer.sv`. Each test runs in well under a second.

Verilator's lint warns that the port name `interrupt` is a common C++ word.
This is harmless; the name is kept because it is the port's name in the
interface description.

## Changing it

* **Widths:** `ADDR_W` and `DATA_W` are parameters of every module. The
  defaults live in `wdt_apb_pkg`. A narrower `DATA_W` gives a smaller
  counter and a shorter maximum timeout (`2^DATA_W - 1` cycles).
* **Register address or reset value:** change `WDT_TIMER_ADDR` or
  `WDT_TIMER_RESET` in the package. The top passes the reset value to both
  the register and the counter's `RESET_COUNT`, so the two stay equal.
* **Restart on write:** to have a write to the timeout register also
  restart the count, bring a write strobe out of `apb_interface` and OR it
  into the counter's load condition.
