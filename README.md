# Reversible-logic shift registers and a 4-bit LFSR

A reversible gate maps its inputs one-to-one onto its outputs, so no
information is destroyed inside it. A sequential circuit counts as reversible
when its combinational part is built only from such gates and the state is
fed back around it. This RTL builds a small library on that principle. It
starts from three reversible gates (Feynman, Fredkin and a modified Fredkin
"MF" gate). From them it makes a D latch, a master-slave D flip-flop, serial-in
serial-out (SISO) and serial-in parallel-out (SIPO) shift registers, and the
main design: a 4-bit linear feedback shift register (LFSR) with a 15-state
period.

Two rules shape every netlist here:

* **No fan-out.** A reversible line cannot drive two inputs. Wherever a signal
  is needed twice, a Feynman gate with its second input tied to 0 makes two
  copies of it. This covers a stored bit, a clock, and a serial input shared
  by two registers.
* **Garbage lines.** Gate outputs that nothing needs are left as named
  `unused_*` signals. They are the garbage outputs of the reversible
  realization.

## The gates

| module         | inputs  | outputs (P, Q, R)          | used as                                  | quantum cost |
|----------------|---------|----------------------------|------------------------------------------|--------------|
| `feynman_gate` | A, B    | A, A xor B                 | copier (B = 0); the LFSR feedback XOR    | 1            |
| `fredkin_gate` | A, B, C | A, A'B + AC, AB + A'C      | slave latch; passes the clock on         | 5            |
| `mf_gate`      | A, B, C | A', A'B + AC, AB + A'C     | D latch and master latch                 | 4            |

The MF gate is a controlled swap whose control line leaves the gate inverted.
This mapping is this design's reading of the MF gate. The source describes the
gate only through its cost and two properties:

* driven with (E, Q, D), its Q output is the latch equation Q+ = D·E + E'·Q;
* a flip-flop that takes its clock from an MF gate's first output receives an
  inverted clock.

The mapping above satisfies both. If a different MF truth table is wanted,
`mf_gate.sv` is the only file to change. Its testbench pins down the latch
equation and the bijection property, not the exact garbage outputs.

## How a stored bit is held

On paper, a reversible latch is a gate whose output is wired back to one of
its own inputs. In RTL that would be a combinational loop. Here the feedback
line is a flip-flop clocked by a free-running **sampling clock `clk`**, with
an asynchronous active-low reset `rst_n`. The circuit's own clock, called
**E** throughout, is an ordinary input that `clk` samples. As a result:

* `rev_d_latch` is transparent at every `clk` edge where E = 1 (`q` shows `d`
  one `clk` cycle later). It holds while E = 0.
* Everything is synchronous to `clk`, has no combinational loops or real
  latches, and maps directly onto an FPGA.

`clk` must be faster than E: each high phase and each low phase of E must
last at least one `clk` cycle. `clk`, `rst_n` and the reset values are not
part of the reversible circuit. They are this design's choices.

## Master-slave flip-flop (`rev_ms_dff`)

```
 E ──FG──┬─ e_m ─> MF latch (master, open while E=1) ── qm ─┐
         └─ e_s ─> Fredkin (slave, open while E=0) <────────┘ ── FG ──> q
                       │ P output = E, uninverted
                       └──────────────────────────────────────────────> e_out
```

* The master is an MF-gate D latch that follows D while E = 1.
* The slave is a Fredkin gate driven with (E, Qm, Qs), so its Q output is
  E'·Qm + E·Qs: it follows the master while E = 0 and holds while E = 1.
* The output therefore changes only when **E falls**. It takes the value D
  had at the last `clk` edge with E = 1, and `q` shows it one `clk` cycle
  after the fall.
* The Fredkin gate's first output is E itself. It is brought out as `e_out`
  so the next flip-flop of a register can be clocked from it. Had the slave
  also been an MF gate, that line would carry E' and need an extra NOT gate.
  Avoiding that NOT gate is the point of the MF/Fredkin pairing.

## Shift registers (`rev_sipo`, `rev_siso`)

`rev_sipo #(N, TRIG, INIT)` is a row of N stages. `q[0]` is stage 1, which
takes the serial input, and `q[N-1]` is stage N. Each stage output is copied
by a Feynman gate: one copy goes to the parallel output, the other to the
next stage. `rev_siso` is the same chain with only stage N brought out, so a
bit shifted in appears at `sout` after exactly N pulses.

`TRIG` (type `rev_pkg::trig_e`) chooses the stage:

* `TRIG_EDGE` uses master-slave flip-flops. Stage k+1 is clocked from stage
  k's `e_out`. The register shifts once per E pulse of any width, and the
  outputs change one `clk` cycle after E falls. No stage changes while E is
  high, so the chain has no race.
* `TRIG_PULSE` uses single D latches. Their enables are Feynman copies of E.
  The register shifts once per pulse **only if the pulse is exactly one
  `clk` cycle wide**, and the outputs change one `clk` cycle after E rises. A
  wider pulse lets data ripple through several open latches. This is the
  usual limit of pulse-triggered latch registers, and it is reproduced here
  rather than hidden.

## The LFSR (`rev_lfsr`)

The LFSR is a `rev_sipo` (edge-triggered by default) whose serial input is
Q(N-1) xor QN, formed by a Feynman gate. Two more Feynman gates copy Q(N-1)
and QN, so that each feeds both its output and the XOR. For the default
N = 4:

    Q1' = Q3 xor Q4,   Q2' = Q1,   Q3' = Q2,   Q4' = Q3      (x^4 + x^3 + 1)

The feedback polynomial is primitive. Starting from the reset seed
Q1 = 1 (`q = 4'b0001`, where `q[3:0]` = Q4 Q3 Q2 Q1), the register visits
all 15 non-zero states and then repeats:

    0001 0010 0100 1001 0011 0110 1101 1010 0101 1011 0111 1111 1110 1100 1000 | 0001

In each period `sout` (= Q4) gives 8 ones and 7 zeros. The all-zero state
maps onto itself:

* elaboration rejects `SEED == 0`;
* an assertion fires if the register ever reaches zero.

Other sizes work as long as x^N + x^(N-1) + 1 is primitive (N = 2, 3, 4, 6,
7, 15, ...). N = 3 gives the 7-state sequence 001 010 101 011 111 110 100.
Other values of N still shift, but with a shorter period. The tap positions
and the seed are this design's choices.

By default the stages are master-slave flip-flops, so the LFSR steps once per
E pulse of any width. With `TRIG = TRIG_PULSE` the stages are single D
latches. That form steps once per pulse only if the pulse is exactly one
`clk` cycle wide, and it then updates one `clk` cycle after E rises.

## Top level (`rev_top`)

Three independent parts share `clk` and `rst_n`:

| ports                                                               | part                                         |
|---------------------------------------------------------------------|----------------------------------------------|
| `lfsr_e` → `lfsr_q[3:0]`, `lfsr_sout`                               | the 4-bit LFSR, one step per pulse of E      |
| `e_edge`, `sin_edge` → `siso_edge_sout`, `sipo_edge_q[3:0]`         | edge-triggered SISO and SIPO, 4 bits each    |
| `e_pulse`, `sin_pulse` → `siso_pulse_sout`, `sipo_pulse_q[3:0]`     | pulse-triggered SISO and SIPO, 4 bits each   |

Within each register pair, Feynman gates copy the shared E and serial input.
The edge-triggered SISO and SIPO therefore hold identical state, and a
synthesis tool merges their flip-flops.

## Gate count compared with the published figures

The published figures for the 4-bit reversible LFSR are a quantum cost of
50, 9 garbage outputs and 50 ns delay. This netlist, counted gate by gate,
comes to:

* **Quantum cost 55.** Per stage: clock copy 1 + MF 4 + master copy 1 +
  Fredkin 5 + slave copy 1 + stage copy 1 = 13, so 52 for four stages. The
  feedback adds 3 Feynman gates.
* **14 garbage lines.** Each flip-flop leaves 3 (MF P, MF R, Fredkin R), and
  the clock and data lines that leave the last stage add 2.

The difference comes from the copy gates. Here every stage has its own
parallel-output copy, and the LFSR makes its own copies of Q3 and Q4 instead
of reusing the spare copy left at the end of the chain. A leaner netlist could
share those copies. No delay is modelled: the RTL has no gate delays, and its
timing is counted in `clk` cycles.

## Where this RTL departs from or goes beyond the source

* The MF gate truth table is this design's reading (see above).
* The latch feedback is modelled on a sampling clock with a reset. The
  source's circuits have neither.
* The LFSR taps, its seed, and loading the seed by reset are this design's
  choices. The source states only that the start must not be all zeros and
  that the period is 2^n − 1.
* The pulse-triggered stage is taken to be the single clock-enabled D latch.
* The older master-slave variant built from two MF gates (clock inverted at
  its output) is not included. Neither is the Toffoli gate, which the
  proposed circuits do not use.

## Simulating

All files are in `rtl/` (design, plus the package `rev_pkg.sv`) and `tb/` (one
self-checking testbench per module). Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. For
example:

    verilator --binary --timing --assert --timescale 1ns/1ps \
      -Irtl -y rtl -y tb --top-module tb_rev_top \
      rtl/rev_pkg.sv tb/tb_rev_top.sv -o sim
    ./obj_dir/sim

| testbench          | what it checks                                                                                                              |
|--------------------|-----------------------------------------------------------------------------------------------------------------------------|
| `tb_feynman_gate`, `tb_fredkin_gate`, `tb_mf_gate` | exhaustive truth tables, bijection, self-inverse (Feynman, Fredkin), conservation (Fredkin), latch equation (MF) |
| `tb_rev_d_latch`   | reset values; 400 random cycles against "last D seen while E = 1"                                                           |
| `tb_rev_ms_dff`    | random-width E pulses; output frozen while E is high, updated exactly one `clk` cycle after the fall; `e_out` = E            |
| `tb_rev_sipo`      | N = 4 and N = 6 edge-triggered, N = 4 pulse-triggered, against a bit history, including the update cycle                    |
| `tb_rev_siso`      | a lone 1 reaches `sout` on exactly the 4th pulse; a 64-bit random stream in both forms                                     |
| `tb_rev_lfsr`      | the 15-state table above (and the 7-state one for N = 3) over 45 pulses; hold while E is high; no zero state; 8 ones per period; the pulse-triggered form over 30 one-cycle pulses |
| `tb_rev_top`       | the full design at default size: 3 LFSR periods and 64 shifts through both register pairs, with each mechanism counted     |

All testbenches pass with Verilator 5. The design also elaborates in yosys
with the slang front end.
