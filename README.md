# SEU-hardened logic driver for an active Li-ion cell equalizer

An active balancing system for a Li-ion battery stack moves charge between
cells with a single DC/DC converter. A balancing bus (B+, B−) runs past every
cell tap, and eleven double-pole single-throw switches, SW1…SW11, connect
one cell at a time to that bus. If two switches conduct together, the bus
shorts the cells between them. That can burn the board. This gives the one
hard safety rule of the design:

> at most one of the switch drives `s[11..1]` may be asserted at any time.

The switch drives come from a small *logic driver*. It sits in a CPLD and is
commanded by a microcontroller through a 4-bit code `d[3..0]` and a strobe
`str`. A CPLD's configuration can be corrupted by radiation (single event
upsets, SEUs), so the driver is hardened. Classic triple modular redundancy
(TMR) votes away most upsets. The scheme here aims at the catastrophic case
only. A **safety filter** forces all switches open whenever more than one
would close. The filter is itself **triplicated**, and the copies are
combined by a **unanimity (AND) voter**. An upset may still open a switch or
pick the wrong cell, which only slows balancing. But it can hardly produce a
short circuit. The only single nets that still can are the voter's outputs.

This repository holds the SystemVerilog for the logic driver. The
microcontroller, the DC/DC converter and the power switches are outside it.

## Block structure

```
            str ──► retrig_monostable ──clk──┐
                                             ▼
  d[3:0] ──────────────────────────► ft_control_logic ───► s[11:1]  (to SW11..SW1)
                                     ┌───────────────────────────────────────────┐
                                     │ control_logic (CL)                        │
                                     │   d_q  ◄─ 4-bit input register            │
                                     │   o    = command_decoder(d_q)  (CN)       │
                                     │   s_cl ◄─ 11-bit register of o & all_open │
                                     │           all_open = (s_cl == 0)          │
                                     ├───────────────────────────────────────────┤
                                     │ SCHEME = FT_CLF3UV (default):             │
                                     │   3 × safety_filter(s_cl) ─► unanimity_voter ─► s
                                     │ SCHEME = FT_CLF:  safety_filter(s_cl) ─► s│
                                     │ SCHEME = FT_CL:   s = s_cl                │
                                     └───────────────────────────────────────────┘
```

| File | Role |
|---|---|
| `rtl/ld_pkg.sv` | widths (`NUM_SW = 11`, `CMD_W = 4`), `sw_vec_t` (`logic [11:1]`), the `ft_scheme_t` enum |
| `rtl/logic_driver.sv` | top: monostable plus hardened control logic |
| `rtl/retrig_monostable.sv` | behavioural model of the external RC monostable (not synthesizable) |
| `rtl/ft_control_logic.sv` | the CPLD contents: CL plus the filter and voter for the chosen scheme |
| `rtl/control_logic.sv` | input register, decoder, interlock, output register |
| `rtl/command_decoder.sv` | CN: 4-bit command to one-hot switch request `o[11:1]` |
| `rtl/safety_filter.sv` | passes a word with at most one bit set, otherwise outputs all zeros |
| `rtl/unanimity_voter.sv` | bitwise AND of `N_COPIES` (3) words |

Bit `k` of every 11-bit vector drives switch SWk. The vectors are declared
`[11:1]`, so the index in the code is the switch number.

## The command protocol and the interlock

This is the part that most needs care when the driver is used.

**Clock.** The control logic has no free-running clock. Each strobe on
`str` triggers the retriggerable monostable. The rising edge of its output
pulse is the only clock edge the registers see. Strobes that come closer
together than the pulse width (`PULSE_NS`, 1000 ns by default) extend the
pulse and give just one edge. A glitchy or repeated strobe therefore counts
once.

**Two registers, one clock.** On each edge, two things happen at once:

1. the input register takes the command now on `d`;
2. the output register takes the decoded command that was *already* in the
   input register, but only if all switches are open at that moment.
   Otherwise it takes all zeros.

The gate in step 2 is the interlock. It gives break-before-make behaviour:
one switch can never hand over straight to another. Between any two closed
switches there is always at least one clock with every switch open.

**Command codes.** `d = k` with 1 ≤ k ≤ 11 selects SWk. `d = 0` and `d = 12…15`
select nothing.

**What the microcontroller does**, starting from reset (all open):

| strobe | `d` held | input register after | `s` after |
|---|---|---|---|
| 1 | 5 | 5 | all open (the register held 0) |
| 2 | 5 | 5 | SW5 closed |
| 3 | 9 | 9 | all open (interlock: SW5 was closed) |
| 4 | 9 | 9 | SW9 closed |
| 5 | 0 | 0 | all open |
| 6 | 0 | 0 | all open |

So a new selection takes effect one strobe after it is presented, and a
change from one cell to another takes two strobes. While a switch is
closed, the next strobe always opens it, whatever `d` is. To keep a cell
connected, do not strobe. Strobing the same command over and over toggles
the switch between closed and open.

**Reset.** `rst_n` is asynchronous and active low. It clears both registers,
so all switches open at once.

## The hardening schemes

`ft_control_logic` and `logic_driver` take a `SCHEME` parameter of type
`ld_pkg::ft_scheme_t`:

- **`FT_CL`**: no hardening. An upset in the 15 flip-flops or in the decode
  logic can set two output bits at once.
- **`FT_CLF`**: one `safety_filter` after CL. An upset anywhere in CL that
  would close two or more switches is turned into "all open". The filter's
  own outputs are still a single point of failure. A stuck-high output bit,
  together with a legitimately closed switch, makes a short.
- **`FT_CLF3UV`** (default): three identical filters read the CL output, and
  their outputs are ANDed bit by bit. A faulty filter copy that closes an
  extra switch is outvoted, because the other two copies say "open". A copy
  that wrongly opens a switch does open it, which is safe. What remains is
  an upset in the voter's own output cells.

The hardening adds no latency. Filters and voter are combinational between
the CL output register and the pins.

TMR, the reference point for this approach, is not included. TMR means
three copies of CL and a bitwise 2-of-3 majority voter. In the reference
evaluation it masked far more upsets of every kind than the filter schemes,
but let through about twice as many short circuits as CLF3UV.

**Size.** Every scheme has the same 15 flip-flops: the 4-bit input register
and the 11-bit output register. The reference implementation on Altera MAX V
CPLDs used about 26 (CL), 45 (CLF) and 94 (CLF3UV) logic cells. These fit
the 40-, 80- and 160-cell members of the family respectively, all of which
come in the same 64-pin package. So hardening needs no board change. This
RTL has not been mapped to MAX V.

## Fault-injection campaign

`tb/tb_seu_campaign.sv` reproduces the structure of the evaluation:

- for each sequence length i = 1…10 clocks, 10 000 runs;
- each run resets the design, makes one randomly chosen net stuck at a
  random value, then applies i random commands, one per clock;
- a run is a *failure* if `s` ever differs from the fault-free reference;
- it is *catastrophic* if `s` ever has two or more bits set.

All three schemes run side by side, each with its own independently drawn
fault. The fault sites are:

- the 4 input-register bits;
- the 11 decoder outputs;
- the all-open feedback;
- the 11 output-register bits;
- each filter copy's 11 outputs;
- the voter's 11 outputs.

That makes 27, 38 and 71 sites for CL, CLF and CLF3UV.

One run gave these catastrophic-failure probabilities at i = 10:

| | CL | CLF | CLF3UV |
|---|---|---|---|
| CFP₁₀ | 0.19 | 0.15 | 0.08 |

Every CLF short came from a fault in the filter's own outputs. Every CLF3UV
short came from a fault in the voter's outputs. The testbench checks these
exact properties, not the statistics:

- no CL fault ever shorts in CLF or CLF3UV;
- no filter-copy fault ever shorts in CLF3UV;
- fault-free runs never fail.

Read the numbers with care. They come from stuck-at faults on RTL nets. The
reference evaluation flipped bits of the CPLD configuration memory, where
one bit can change the function of a whole lookup table. It reported CFP₁₀ of
about 1.0 (CL), 0.09 (CLF), 0.01 (TMR) and 0.005 (CLF3UV). The ranking
agrees, but the absolute values do not carry over.

## Departures from the reference design and own choices

- **Command code.** The reference only says that `d[3..0]` encodes the
  switch configuration. The binary switch-number code is this design's
  choice.
- **Interlock gate.** The reference block diagram shows a feedback from
  `s` gating every decoder output, but does not say what the gate is.
  "Load only when all switches are open" is this design's reading. It agrees
  with the one-switch rule and with the flip-flop count.
- **Blocked words.** The filter outputs all zeros for a blocked word. The
  reference only says such commands are blocked.
- **Reset.** `rst_n` is an addition. The reference does not describe a
  reset.
- **Monostable.** Pulse width (1000 ns) and rising-edge triggering are
  assumed. The real part is an RC-timed chip, so it is modelled
  behaviourally with delays. This makes `logic_driver` a simulation-only
  top. Synthesize `ft_control_logic` for the CPLD.
- **Not modelled.** The DC/DC converter and its supercapacitor, the switch
  matrix, the microcontroller and the DC/DC enable line are outside the
  logic driver. The TMR baseline is also not included.

## Simulating

Every file starts with `` `timescale 1ns / 1ps ``. The package must be read
first. From the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/ld_pkg.sv tb/tb_logic_driver.sv --top-module tb_logic_driver -o sim
./obj_dir/sim
```

Replace `tb_logic_driver` with any testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it
hangs.

| Testbench | What it shows |
|---|---|
| `tb_logic_driver` | end to end at default parameters: the balancing sequence above, 300 random commands, a strobe burst giving one clock, a double selection blocked by the filters, a faulty filter copy outvoted, and reset; counts each mechanism |
| `tb_ft_control_logic` | the three schemes in lockstep against a reference model, with forced upsets |
| `tb_control_logic` | cycle-exact model comparison, latency, break-before-make, reset |
| `tb_command_decoder`, `tb_safety_filter` | exhaustive (16 and 2048 inputs) |
| `tb_unanimity_voter` | directed and random triples |
| `tb_retrig_monostable` | pulse width, retriggering, separate pulses |
| `tb_seu_campaign` | the fault-injection campaign above (about 1 s) |

The testbenches inject faults with `force` on internal nets such as
`u_core.s_cl` and `g_clf3uv.s_filt[c]`. If you rename these nets, update the
testbenches too.
