# Self-timed interface with pausible clocking, and a self-timed cell library

A synchronous IP block with its own local clock gets data from a CPU that
runs at a different frequency. A two-flop synchroniser at the boundary
would add latency and can still fail if a signal changes close to a clock
edge. This design avoids that. The IP block's clock is a ring oscillator,
and the ring runs through a mutual-exclusion element (mutex). The interface
controller competes with the clock for that mutex. Once the controller holds
it, the next rising clock edge cannot happen. So the controller can change
signals going into the synchronous logic, and they are guaranteed stable
before the clock's next edge. The clock is never gated from outside. At most
its low phase is stretched for as long as the controller holds the mutex.

Data travels through a 4-stage, 32-bit self-timed FIFO (a micropipeline).
Every element is built from, or modelled on, a small library of self-timed
cells: Muller C-element, transparent latch, mutex, toggle, select, call and
arbiter. The RTL includes that library as well.

```
            in_req/in_ack/in_data[31:0]        fifo_req/fifo_ack/fifo_data
  sender ───────────────────────────▶ micropipeline_fifo ─────────────┐
            req (two-phase)                                            │
  sender ──────────────▶ ┌──────────┐ mreq  ┌──────────┐ r1=clk_req ┌──┴──────────────┐
            ack ◀─────── │ pcc_fsm  │──────▶│ st_mutex │◀───────────│ clock_generator │
                         │          │◀──────│          │───────────▶│ (ring osc.)     │
                         └──┬────▲──┘ grant └──────────┘ g1=rclk    └──────┬──────────┘
                       xfer │    │ taken                                   │ sysclk
                         ┌──▼────┴──────────┐◀───────────────────────────────┘
                         │ sync_logic_module│──▶ data_out, data_valid, word_count
                         └──────────────────┘
```

## One transfer, step by step

The sender pushes a word into the FIFO with a four-phase handshake, and
for each word it makes one transition on `req`, either rising or falling.
The two can overlap: `req` may come before the word has passed through the
FIFO. The interface answers with one transition on `ack`. It gives that
answer while it holds the clock, so the acknowledge comes with a clock
pause. The word itself stays at the FIFO head until the synchronous side has
taken it. The sender may make its next request as soon as it sees `ack`.
That request waits until the previous word has been popped.

The controller (`pcc_fsm`) has no clock. It is an asynchronous state machine
whose state is held in latches and changes only when an input changes:

| state      | exits when                          | action on exit                               |
|------------|-------------------------------------|----------------------------------------------|
| `S_IDLE`   | `req != ack`                        | raise `mreq` (ask for the clock)             |
| `S_MREQ`   | `grant = 1` (rclk is now held low)  | –                                            |
| `S_HOLD`   | `fifo_req = 1` (word at FIFO head)  | toggle `xfer`, set `ack = req`, drop `mreq`  |
| `S_HANDED` | `grant = 0` (clock running again)   | –                                            |
| `S_WAIT`   | `taken == xfer`                     | raise `fifo_ack` (pop the FIFO)              |
| `S_POP`    | `fifo_req = 0`                      | drop `fifo_ack`                              |

`xfer` and `ack` change only while the controller holds the mutex. At that
moment the oscillator's request is blocked, so `rclk` and `sysclk` are low
and no rising edge can come until the mutex is released. If the word is
still travelling through the FIFO, the controller keeps the mutex in
`S_HOLD`. The clock stays paused until the word arrives, so the synchronous
side never sees a word in flight, and it uses no power while it waits.

At the next rising edge, `sync_logic_module` sees `xfer != taken`. It loads
the FIFO head word into `data_out`, pulses `data_valid`, counts the word and
copies `xfer` into `taken`. The FIFO keeps its head word valid the whole
time, because `fifo_ack` is only raised after `taken` has followed. The
controller then reads `taken`. That is safe too: `taken` comes from a
flip-flop and changes cleanly, and the controller just waits for it.

## The pausible clock

`clock_generator` is a behavioural model of the inverter-chain ring
oscillator. Its output `clk_req` is the inverse of `rclk`, delayed by
`N_INV * T_INV_PS`. It goes into the mutex as request 1, and the mutex's
grant 1 is `rclk`. With nothing else competing, each phase lasts
5 × 45 ps = 225 ps. That gives a 450 ps period, about 2.2 GHz. `sysclk` is
`rclk` after a 20 ps buffer delay.

If the controller holds the mutex when the oscillator's request rises, the
rising edge of `rclk` waits until the mutex is released. This stretches the
low phase. If the oscillator holds the mutex (`rclk` high) when the
controller asks, the controller waits until `rclk` falls. `run = 0` forces
`clk_req` low, so the clock stops low and stays stopped. This is meant for
stopping the clock while the block is idle, to save power.

When the word is already at the FIFO head, the controller holds the mutex
for zero simulated time, because the self-timed logic has no gate delays.
When the request comes before the word, the pause lasts until the word
arrives, and simulation shows it. In silicon even the short case takes a
few gate delays, so every transfer stretches one low phase by a fraction of
a nanosecond. The `tb_clock_generator` bench also shows the stretch
directly, by holding the grant.

## The micropipeline FIFO

Each of the four stages (`micropipeline_stage`) is a Muller C-element plus a
32-bit transparent latch. The C-element of stage *i* computes
`c[i] = C(c[i-1], ~c[i+1])`. `c[0]` is `in_ack`, `c[3]` is `out_req`, and
`~out_ack` takes the place of `~c[4]`. While `c[i]` is high the stage's latch
is closed. While it is low the latch is transparent. A word is therefore
captured when the stage's request rises, and held until the next stage has
captured it.

This is a four-phase (return-to-zero) pipeline, so neighbouring words must
be separated by an empty stage. Four stages hold at most **two** words. When
the receiver stops, the third push waits for `in_ack`. Both sides follow the
usual four-phase bundled-data rule: the data is stable before the request
rises and stays stable until the acknowledge.

In `micropipeline_stage`, the C-element and the latch are written in one
level-sensitive process instead of as separate cell instances. In a
zero-delay simulator, separate cells race: stage *i* can open and pass a new
word while stage *i+1* still evaluates its old, open enable. In silicon the
C-element's delay keeps that from happening. Writing both parts in one
process gives the same behaviour with no race.

## The self-timed cell library

All cells have an active-low clear `cdn`. They are zero-delay and built from
latches. The two-phase elements treat every transition, rising or falling,
as one event.

| module       | behaviour |
|--------------|-----------|
| `muller_c`   | output takes the value of `in1`/`in2` when they agree, holds otherwise |
| `tlatch`     | transparent while `en = 1`, holds while `en = 0` |
| `st_mutex`   | four-phase; grants at most one of `r1`/`r2`; if both arrive in the same step, `r1` wins |
| `st_toggle`  | input events go alternately to `out0` (1st, 3rd, …) and `out1` (2nd, 4th, …); two latches in a ring |
| `st_select`  | an input event goes to `out_t` if `sel = 1`, else to `out_f`; `sel` must be stable around the event |
| `st_call`    | two clients share one procedure: `r = r1 ^ r2`, and the done event on `d` returns to the caller only; no concurrent calls |
| `st_arbiter` | two-phase arbiter: pending request `r ^ d` goes into a mutex, and a latch opened by the grant turns it into a grant event |

`pcc_interface_top` contains one instance of each of these cells, next to
the interface, with its own `lib_*` ports. Only the mutex is part of the
interface itself.

## Simulation model and its limits

- Self-timed logic written as latches with feedback shows up as
  "combinational loop" and "latch" warnings in lint and synthesis. These are
  intended. Each file's header says which loop it has.
- Nothing except `clock_generator` has delays. The cell delays of a real
  0.25 µm implementation (0.1–0.25 ns per cell) are not modelled. Neither is
  the FIFO's forward latency, which is about 0.6 ns per word at roughly
  1.6 GHz in such an implementation. So no bench measures FIFO speed in
  time.
- `clock_generator` uses `#` delays and is for simulation only. For silicon,
  replace it with a real ring oscillator.
- A real mutex resolves two requests that arrive together through
  metastability. Here `r1` always wins that tie. Do not rely on the order.
- In Verilator, `wait(sig)` on a signal that is computed inside a
  combinational loop can miss the change. The benches poll such signals
  with `#1` steps instead. Do the same in new benches.

## Choices this RTL makes

These points are this design's own choices:

- The transparent-latch four-phase FIFO control, and its 2-word capacity.
- The controller's states, and the `xfer`/`taken` toggle pair.
- Acknowledging the request during the clock pause, before the word has
  been taken, while the word waits at the FIFO head.
- Writing each FIFO stage's C-element and latch as one process rather than
  as `muller_c` and `tlatch` instances.
- Holding the clock paused while waiting for the FIFO word.
- The split of the clock period into inverter count (5) and inverter delay
  (45 ps). Only the target of about 2.2 GHz is given.
- The 20 ps `sysclk` buffer.
- The `run` input.
- The mutex tie-break.
- The synchronous module's behaviour: register, strobe and 16-bit counter.
  It stands in for whatever the IP block does.

The sizes come from the interface chip: 32-bit data, 4 FIFO stages and a
2.2 GHz local clock. A capture-pass micropipeline is a known alternative to
the transparent-latch FIFO and is not included. Neither are the cell
layouts, the pad ring, or the CPU.

## Files

- `rtl/st_pkg.sv` holds the width, the FIFO depth and the controller state
  type.
- `rtl/pcc_interface_top.sv` is the top: FIFO, controller, mutex, clock and
  synchronous module, plus the library cells.
- `rtl/micropipeline_fifo.sv` and `rtl/micropipeline_stage.sv` form the FIFO.
- `rtl/pcc_fsm.sv`, `rtl/st_mutex.sv`, `rtl/clock_generator.sv` and
  `rtl/sync_logic_module.sv` make up the pausible-clock interface.
- `rtl/muller_c.sv`, `rtl/tlatch.sv`, `rtl/st_toggle.sv`, `rtl/st_select.sv`,
  `rtl/st_call.sv` and `rtl/st_arbiter.sv` are the cell library.
- `tb/tb_<module>.sv` is one self-checking bench per module. Each ends with
  `TB_RESULT checks=N failures=M`.

## Running

Use Verilator 5 with timing support. From the directory that holds `rtl/`
and `tb/`, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/st_pkg.sv tb/tb_pcc_interface_top.sv \
          --top-module tb_pcc_interface_top -Mdir obj_top -o sim
./obj_top/sim
```

`-Wno-fatal` is needed because the intended latch loops raise `UNOPTFLAT`
warnings. Replace the bench name to run any other bench. All files use
`` `timescale 1ps/1ps``.

`tb_pcc_interface_top` runs the design at its default size. It transfers 60
words end to end and checks order and value, the word counter, one `ack` per
`req`, the 450 ps free-running period, and a transfer latency of at most 4
clock cycles. It checks that `xfer` and `ack` only change while the
controller holds the mutex with the clock low. It also forces and counts these cases:

- the FIFO fills up and stalls the sender;
- a request arrives before its word, so the clock is paused (its low phase
  stretched) until the word reaches the FIFO head;
- the controller waits for the clock to release the mutex;
- the clock is stopped with `run = 0` and restarted.

It also gives each library cell a short check. The smaller benches test each
cell and unit against an independent reference model or rule, with random
stimulus.
