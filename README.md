# Heterogeneous datapath: a fast run-time speed/energy knob for a RISC-V ALU

Real-time software that must meet hard deadlines (a video decoder at a fixed
frame rate, for example) wastes energy if it always runs at full speed, but
the usual knob for slowing down, DVFS, takes tens of microseconds to switch.
That is too coarse for jobs that last a few hundred microseconds.

The heterogeneous datapath (HDP) is a much faster knob. The core's ALU is
built three times. The three copies have the same function, but each is
implemented for a different speed/energy point:

| mode | index | target clock | implementation character |
|------|-------|--------------|--------------------------|
| fast | 0 | 3.69 GHz | low- and standard-Vth cells |
| mid  | 1 | 3.39 GHz | standard- and high-Vth cells, ~15% less energy than fast |
| slow | 2 | 2.46 GHz | standard- and high-Vth cells, fewer gates, ~28% less energy than fast |

Only one copy is active at a time. The other two are clock-gated and
power-gated. Software picks the mode by writing a CSR. A switch takes tens
of clock cycles, so a run-time scheduler can change the mode several times
within one job. It can run slower while it has slack and go back to fast
mode the moment a deadline is at risk.

The frequencies and energy figures in the table are physical targets. The
RTL here is the same for all three copies; only synthesis and place-and-route
would make them differ. The core clock comes from an external clock
generator, which the HDP asks to change frequency as part of a switch.

## Structure

```
                 CSR write                                 clock generator
                     |                                      ^        |
                 +---v----+   mode    +-----------+ clk_req |        | clk_ack
                 |hdp_csr |---------->| hdp_ctrl  |---------+        |
                 +--------+           | sequencer |<-----------------+
                                      +-----------+
                              active/stall |  pwr_on[3], clk_en[3]
                                           |  idle[3], pwr_good[3]
 req_i --stall mask--> hdp_demux ==> +-----v-----------------------+ ==> hdp_mux --> rsp_o, ready_o
                                     | hdp_alu_domain x3           |
                                     |  hdp_power_switch (model)   |
                                     |  hdp_icg -> gated clock     |
                                     |  hdp_alu                    |
                                     +-----------------------------+
```

- `hdp_top`: the whole HDP. Its ports are the core's issue and writeback
  ports, the CSR access port and the clock generator handshake.
- `hdp_csr`: the mode CSR.
- `hdp_ctrl`: the switch sequencer (described in detail below).
- `hdp_demux`: sends each operation to the active ALU only. The idle ALUs
  see all-zero inputs, so nothing toggles inside them.
- `hdp_mux`: returns the active ALU's result and ready.
- `hdp_alu_domain`: one gated domain. It holds a power switch, a clock gater
  and an ALU. Its outputs are clamped while the domain is down, which stands
  in for isolation cells.
- `hdp_alu`: the RV64 integer ALU.
- `hdp_icg`: a latch-based glitch-free clock gater.
- `hdp_power_switch`: a **behavioural model** of the header power switch.
  It only models the wake-up delay and a power-good flag.
- `hdp_pkg`: shared types, the mode enum, the operation enum, the
  request/response structs and the latencies.

## The mode switch

This is the part that needs the most care. Writing the CSR sets a
*requested* mode. The control unit compares it with the *active* mode every
cycle. When they differ, it runs this sequence:

| step | state | what happens | leaves when |
|------|-------|--------------|-------------|
| 0 | `S_RUN` | The request differs from the active mode, and issue is stalled from this cycle on. | next cycle |
| 1 | `S_WAKE_DRAIN` | The target domain's power switch is turned on. At the same time the active ALU finishes what it holds: a divide can need up to 66 cycles, the longest ALU latency. | active ALU idle **and** target domain up |
| 2 | (transition) | The target's clock is ungated. The demux and mux select the target. `clk_req_o` pulses with `clk_sel_o` set to the target mode. | — |
| 3 | `S_CLK_WAIT` | Issue stays stalled until the clock generator pulses `clk_ack_i`. | acknowledge |
| 4 | `S_GATE_CLK` | Issue resumes. The previous ALU's clock is gated. | next cycle |
| 5 | `S_GATE_PWR` | The previous ALU's power switch is turned off. | next cycle |

Some details:

- **"Idle"** means that no operation is in flight and no result is waiting
  to be delivered. The last result of the old ALU therefore always reaches
  the core before the mux moves away from it.
- **Issue stays stalled until the new frequency is acknowledged.** Going
  from slow to fast is then safe, because the fast ALU briefly runs at a
  slow clock. Going from fast to slow is also safe, because the slow ALU
  never sees the fast clock.
- **Waking a domain.** Power good rises `WAKE_CYCLES` cycles after power-on
  (default 8). In the next cycle the domain's clock is opened for a single
  edge while the ALU reset is still held, which clears every ALU register.
  Only after that does the domain report itself up. It reports itself down
  one cycle after its power switch is turned off. Its ALU therefore always
  starts clean, whatever its flops held before it was powered down.
- **Timing with an idle ALU.** From the cycle in which the request becomes
  visible, the stall lasts `1 + (WAKE_CYCLES + 2)` cycles plus the clock
  generator's time from request to acknowledge. That is 23 cycles with the
  testbench's clock model, which acknowledges 11 cycles after the request.
  With a divide in flight, the 66-cycle drain dominates and the stall is
  about 80 cycles. In both cases the switch takes well under 100 ns.
- **Requests during a switch.** A request written while a switch is in
  progress is acted on once the switch ends.
- **Reset.** The fast mode is active, and only the fast domain is powered
  and clocked. Issue is stalled until that domain is up.

Two assertions in `hdp_ctrl` state the gating invariants:

- a clock is never enabled on an unpowered domain;
- outside a switch, exactly the active ALU is clocked and powered.

## The ALU

`hdp_alu` implements the RV64 ALU operations and the RV64M multiply and
divide operations. The operations are add/sub, logic, shifts, set-less-than
and branch compares, plus the 32-bit `W` forms of add, subtract, shift,
multiply and divide. All three ALU copies
compute exactly the same function.

| operations | latency (cycles from issue to valid result) | new issue |
|------------|------------------------------|-----------|
| add, logic, shift, compare | 1 | every cycle |
| `MUL*` | 2 | when the result is out |
| `DIV*`, `REM*` | 66: 1 load, 64 radix-2 restoring steps, 1 sign fix | when the result is out |

Division by zero and signed overflow give the RISC-V results. The request
side is a valid/ready handshake. The response is a one-cycle valid pulse and
has no back-pressure.

## CSR

The CSR is at address `0x7C0` (custom machine read/write space) and is
64 bits wide.

| bits | field | access |
|------|-------|--------|
| 1:0 | requested mode (0 fast, 1 mid, 2 slow). Writing 3 is ignored. | RW |
| 3:2 | active mode | RO |
| 4 | switch in progress | RO |

A write in cycle *c* is visible as a request in cycle *c*+1. Reads are
combinational: `csr_hit_o` tells the core's CSR file that the address
belongs to the HDP.

## What is outside this RTL

- **The host core.** The HDP connects to the execute stage, writeback and
  CSR file of an RV64 core (Ariane-class), and those connections are the
  ports of `hdp_top`. The core also has to hold back dependent instructions
  while `ready_o` is low.
- **The clock generator.** It is an analog/mixed-signal part. `hdp_top`
  only sends it the request pulse and the target mode and waits for its
  acknowledge. `tb/hdp_clkgen_model.sv` models it: it produces the three
  frequencies above and acknowledges after a lock time.
- **The run-time scheduler.** Software on the core decides when to switch,
  using predicted execution times and guaranteed upper bounds. Its only
  hardware interface is the CSR write.
- **Physical effects.** Power switches, isolation cells and the per-mode
  timing and energy come from implementation. `hdp_power_switch` models
  only the wake-up delay, and the output clamping in `hdp_alu_domain`
  stands in for isolation.

## Choices made in this implementation

The overall structure follows the HDP concept: three equal-function ALUs,
an input demux, an output mux, an ICG and a power switch per ALU, a mode CSR
and a control unit that drains, wakes, switches, retunes the clock and then
gates the old ALU. The worst-case drain of 66 cycles is also part of it. The
following are this design's own choices:

- XLEN = 64. The operation set is the RV64 ALU plus RV64M. The multiply
  latency is 2 cycles.
- The 66-cycle worst case is taken to be a serial radix-2 divider.
- The power-switch wake-up time is 8 cycles (`WAKE_CYCLES`).
- The handshake with the clock generator is a one-cycle request pulse and a
  one-cycle acknowledge.
- Issue stays stalled until the acknowledge arrives.
- The CSR address is `0x7C0`, with the field layout above. Encoding 3 is
  ignored, and reset selects fast mode.
- Idle ALUs get all-zero inputs. An unpowered domain's outputs are clamped,
  and its ALU is reset on every wake-up.
- Clock gating is applied one cycle before power gating.

## Simulating

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/hdp_pkg.sv tb/hdp_ref_pkg.sv tb/tb_hdp_top.sv --top tb_hdp_top
./obj_dir/Vtb_hdp_top
```

Substitute `tb_hdp_workload`, `tb_hdp_alu`, `tb_hdp_alu_domain`,
`tb_hdp_ctrl`, `tb_hdp_csr`, `tb_hdp_icg`,
`tb_hdp_power_switch`, `tb_hdp_demux` or `tb_hdp_mux` for the other blocks.

- `tb_hdp_top` runs the full design at its default parameters. The clock
  generator model supplies the core clock. The testbench issues 4000 random
  operations (about 10% of them divides) and checks each result in order
  against an independent reference model (`hdp_ref_pkg`). It also writes
  about 120 mode changes to the CSR, many of them while a divide is in
  flight. Its checks are:
  - each mode becomes active and runs at its own clock period;
  - the switch passes through each of its steps: drain waits, wake-ups,
    clock changes, clock gating, power gating and issue stalls;
  - an idle ALU's gated clock never toggles outside a switch;
  - each switch ends within 66 + wake-up + clock lock + a few cycles, and
    a switch with nothing to drain stalls issue for exactly 23 cycles;
  - the CSR reads back the active mode.
- `tb_hdp_workload` replays a streaming run at full size: 10 frames of 10
  jobs. A CSR write at each job boundary sets the job's mode in three
  phases: 20 jobs fast, 70 jobs alternating mid and slow, and 10 jobs slow.
  Each job is 250,000 back-to-back ALU operations, about 115-170 µs at the
  modelled clocks. All 25 million results are checked. The run makes 70
  switches, which cost 1,610 stalled cycles out of 42.3 million (0.004%).
  The run takes about a minute.
- `tb_hdp_alu` tests every operation on corner operands (0, 1, -1, the most
  negative values, and so on) and on 3000 random operands. It checks both
  the value and the exact latency, and also the back-to-back throughput and
  the idle/ready behaviour around a divide.
- `tb_hdp_alu_domain` checks one domain on its own:
  - the domain comes up exactly `WAKE_CYCLES` + 1 cycles after power-on;
  - its outputs are clamped while it is down;
  - a clock-gated domain keeps a half-finished divide;
  - a domain powered off in the middle of a divide wakes up clean.
- `tb_hdp_ctrl` plays the domains and the clock generator. Drain, wake-up
  and lock times are random. It checks the switch sequence cycle by cycle.

## Changing it

- `WAKE_CYCLES` on `hdp_top` sets the power-switch wake-up time.
- The latencies, the mode encoding and the CSR address are in `hdp_pkg`.
- Adding a fourth mode means:
  - raising `N_ALU`;
  - adding an enum value to `hdp_mode_e` (the field is 2 bits wide, so this
    uses the encoding the CSR now ignores);
  - updating the CSR's legal-value check.
- The demux, mux and control unit take `N_ALU` as a parameter. With the
  2-bit mode field they support up to four ALUs.

## How far to trust it

All blocks compile cleanly with Verilator lint and with the slang front end
of Yosys. All testbenches pass. Each testbench was also shown to fail
against a deliberately broken copy of its module.

What has not been verified:

- The ICG and the gated-clock domains have only been checked in a two-state
  cycle simulator. Gated-clock timing and reset release on wake-up would
  need checking again in gate-level simulation and static timing analysis.
- The power switch is a behavioural model.
- Nothing here reproduces the per-mode frequencies or energies. Those
  depend on the cell libraries and the physical implementation.
