# Two-vector-testable latches and flip-flops from MX-CQCA conservative gates

A sequential circuit is hard to test. Its outputs depend on its stored state
as well as its inputs, so a full test has to walk every input through every
state. This library builds latches and flip-flops from one kind of
*conservative* gate. Such a gate always has as many 1s on its outputs as on
its inputs. A network of them that has no feedback therefore answers the
all-0s input vector with all 0s and the all-1s vector with all 1s. A
stuck-at-1 fault anywhere shows up as a stray 1 under the first vector, and a
stuck-at-0 fault as a stray 0 under the second. Two vectors are enough.

Latches do have feedback, and the feedback breaks this argument: a latch that
holds a 1 keeps it when the all-0s vector arrives. Each testable circuit here
therefore has a pair of control inputs, C1 and C2. In normal operation they
pass the latch node around the loop. In test mode they replace the fed-back
value with a constant 0 or 1. With the loop cut, the circuit is once more a
feedback-free conservative network, and the two vectors test it.

The circuits come from a published design method for quantum-dot
cellular-automata (QCA) logic. Here they are written as gate-level,
synthesizable SystemVerilog, with zero-delay behaviour.

## The MX-CQCA gate

`mxcqca_gate` has three inputs and three outputs:

| output | function             | role                                 |
|--------|----------------------|--------------------------------------|
| P      | A & B                |                                      |
| Q      | A & ~B \| B & C      | 2:1 multiplexer: B ? C : A           |
| R      | B \| C               |                                      |

Every circuit below is a network of this one gate, used in three ways:

* **As a multiplexer (Q).** This output is the heart of every latch: with
  select = enable, Q = E ? D : feedback.
* **As a copier.** With A = 1 and C = 0, P and R are both copies of B and
  Q is its inverse. Reversible logic forbids fan-out, so copies are made
  with a gate.
* **As an OR (R).** The SR latch uses R this way.

The functions are defined once in `mxcqca_pkg`. The package also holds the
control codes as the enum `ctrl_e`.

## Where the state lives

No circuit here contains a flip-flop or `always_latch`. Each stores its state
in a combinational loop, exactly as in the gate schematics. For example, the
multiplexer output of the enable gate comes back to its own data input. The
consequences:

* Lint (`UNOPTFLAT`) and synthesis report a combinational loop for every
  storage element. That is expected; each module's header says so.
* No circuit has a reset. A latch is loaded by opening its enable. The JK and
  T latches cannot be loaded by their own inputs alone (see below).
* Simulation is zero-delay. A loop that keeps inverting itself never
  settles: Verilator stops with "did not converge". Only the level-sensitive
  JK latch (J = K = 1) and T latch (T = 1) can do this, and only while E = 1.
  Apply those inputs only while E = 0. The master-slave JK and T flip-flops do
  not have the problem.
* Change an enable and a data input in different time steps. As in any
  latch, their simultaneous change is a race.

## The testable D latch (`mx_test_d_latch`)

This is the building block of every testable circuit. It has three gates.

```
            +-------- T1 (feedback) <--------------------------+
            v                                                  |
  E ---> gate 1: n = E ? D : T1                                |
  D --->    |                                                  |
            n ---+--> gate 2: s = n ? C2 : C1                  |
                 |              |                              |
                 +--> gate 3: A = n, B = 1, C = s              |
                        P = n  -> Q                            |
                        Q = s  -> T1 --------------------------+
                        R = 1  -> T2
```

Gate 2 decides what goes back around the loop:

| {C1,C2} | `ctrl_e`      | T1       | behaviour                                      |
|---------|---------------|----------|------------------------------------------------|
| 01      | `CTRL_NORMAL` | n        | loop closed: an ordinary D latch               |
| 00      | `CTRL_TEST0`  | 0        | loop cut; all inputs 0 gives all outputs 0     |
| 11      | `CTRL_TEST1`  | 1        | loop cut; all inputs 1 gives all outputs 1     |
| 10      | `CTRL_SWAP`   | ~n       | never used (in normal use it would oscillate)  |

Notes:

* **T2 is always 1.** Gate 3 has B tied to 1, so its R output (T2) is 1 under
  the all-0s vector too. The fault-free all-0s response is "everything 0
  except T2", not literally all 0s.
* **Garbage outputs are ports.** These are the gate outputs that carry no
  function (P and R of gates 1 and 2). The two-vector test relies on watching
  *every* gate output, so they are brought out on `garbage`.
* **`NEG_EN` selects the polarity.** `NEG_EN = 0` gives the positive-enable
  latch, transparent while E = 1. `NEG_EN = 1` gives a negative-enable latch,
  transparent while E = 0, which the flip-flops need. It swaps gate 1's two
  data inputs (A = D, C = T1), so n = E ? T1 : D. No inverter is needed.
  The source draws the negative-enable latch with the same symbol and does
  not show how it differs; this swap is this design's own choice.

The plain one-gate latch `mx_d_latch` (n = E ? D : n, no controls) is
included for comparison. It cannot be tested this way: after the all-1s
vector, the all-0s vector leaves Q at 1. Its testbench shows this.

## Master-slave D flip-flop (`mx_ms_dff`)

A positive-enable testable latch (the master, controls mC1/mC2) drives a
negative-enable one (the slave, controls sC1/sC2). While E = 1 the master
follows D. When E falls, the master closes and the slave opens. **Q therefore
takes D at the falling edge of E**, in the same time step. The master is
positive-enable and the slave negative-enable, as the source states.

| mode        | mC1 mC2 sC1 sC2 |
|-------------|-----------------|
| normal      | 0 1 0 1         |
| all-0s test | 0 0 0 0         |
| all-1s test | 1 1 1 1         |

## Double-edge-triggered D flip-flop (`mx_det_dff`)

It samples D at both edges of E, using eight gates:

* **Gate 1** (A = dC2, B = D, C = dC1) copies D. With dC2 = 1 and dC1 = 0,
  both P and R equal D. P goes to the positive latch and R to the negative
  one.
* **Gates 2-4** form a positive-enable testable latch (pC1, pC2; outputs
  pT1, pT2).
* **Gates 5-7** form a negative-enable testable latch (nC1, nC2; outputs
  nT1, nT2).
* **Gate 8** (A = positive latch, B = E, C = negative latch) outputs the latch
  that is currently *holding*. While E = 1 that is the negative latch, which
  captured D at the rising edge. While E = 0 it is the positive latch, which
  captured D at the falling edge.

Q is therefore D as sampled at the most recent edge of either polarity: two
updates per clock period. In test mode gate 1's controls go to the test value
as well:

| mode        | dC2 dC1 | pC1 pC2 nC1 nC2 |
|-------------|---------|-----------------|
| normal      | 1 0     | 0 1 0 1         |
| all-0s test | 0 0     | 0 0 0 0         |
| all-1s test | 1 1     | 1 1 1 1         |

## JK, SR and T latches (`mx_jk_latch`, `mx_sr_latch`, `mx_t_latch`)

Each uses four gates:

1. Two gates form the next-state function of the current Q.
2. One enable multiplexer: Q = E ? next : Q.
3. One copy gate: P = Q, Q output = Q'. Its P output is the fed-back Q.

| latch | next-state gates                                             | next state  |
|-------|--------------------------------------------------------------|-------------|
| JK    | g1(1, K, 0) gives K'; g2(J, Q, K') gives Q ? K' : J          | J.Q' + K'.Q |
| SR    | g1(Q, R, 0) gives R'.Q; g2(1, R'.Q, S), R output             | S + R'.Q    |
| T     | g1(1, T, 0) gives T'; g2(T, Q, T') gives Q ? T' : T          | Q ^ T       |

These latches have no test controls. As level-sensitive latches, JK with
J = K = 1 and T with T = 1 keep toggling for as long as E = 1. While E = 0,
gate 3's R output (`garbage[5]`) equals the next state, which is how the
testbenches check the toggle function.

## Master-slave JK, SR and T flip-flops (`mx_ms_jk_ff`, `mx_ms_sr_ff`, `mx_ms_t_ff`)

The source names these flip-flops without giving their schematics. Each is
built as:

1. the two next-state gates of the matching latch above;
2. a positive-enable testable D latch (the master, mC1/mC2);
3. a negative-enable testable D latch (the slave, sC1/sC2);
4. a copy gate that gives Q, Q' and a second copy of Q.

The next-state gates read that second copy, i.e. the *slave's* output. The
slave is closed whenever the master is open, so a toggle happens exactly once
per clock period and never races. Q updates at the falling edge of E. The
control settings are those of the master-slave D flip-flop. The composition
is this design's own.

## What the two vectors catch

`tb_two_vector_stuck_at` injects single stuck-at faults with `force`. Every
internal net of the testable circuits is forced in turn: to 1 under the
all-0s vector, and to 0 under the all-1s vector. A fault counts as caught
when any output, garbage outputs included, differs from the fault-free
response.

* Testable D latch, master-slave D and DET D flip-flops: 50 faults, all
  caught.
* Master-slave SR flip-flop: every fault excited and caught.
* Master-slave JK and T flip-flops: every excited fault caught, but 3
  stuck-at-0 faults in each are never excited. The K' and T' inputs of their
  next-state gates make the next-state net, the master node and the master
  output 0 under the all-1s vector as well. A fault that holds these nets
  at 0 changes nothing under either vector. Closing this gap would need a
  different front end for these two flip-flops.

The copy gates' constant inputs also show through in these flip-flops'
fault-free responses. Those responses are worked out by hand in the
testbenches, e.g. `{q, qn, mt1, mt2, st1, st2, garbage}` =
`010101_100000000000` under all 0s.

## Departures and open points

* **Negative-enable latch.** It is made by swapping gate 1's data inputs
  (see above). This is not shown in the source.
* **DET output under the all-0s controls.** The source's simulation plot, for
  E = D = 1 with all latch controls 0 and dC2 dC1 = 1 0, shows Q = 1. Under
  the stated rule (gate 8 passes the holding latch) the output is 0 there:
  the holding latch's feedback is forced to 0. This design follows the rule.
  The other values in that plot, and all values in the plot with the controls
  at 1, match and are checked.
* **Fan-out.** The testable latch fans the latch node out to gates 2 and 3,
  and the JK/SR/T latches fan Q out to two gates, as the schematics draw it.
  This is so even though reversible logic in principle forbids fan-out.
* **Not modelled.** The source reports delay and power figures from an FPGA
  implementation, and cell counts and area of a QCA layout. The RTL is
  zero-delay and says nothing about either. The QCA cell-level devices
  (cells, wires, majority voters) are below the level of this description.

## Files

| module              | what it is                                        |
|---------------------|---------------------------------------------------|
| `mxcqca_pkg`        | gate functions, control-code enum                 |
| `mxcqca_gate`       | the MX-CQCA gate                                  |
| `mx_d_latch`        | one-gate D latch (not two-vector testable)        |
| `mx_test_d_latch`   | testable D latch, parameter `NEG_EN`              |
| `mx_ms_dff`         | testable master-slave D flip-flop                 |
| `mx_det_dff`        | testable double-edge-triggered D flip-flop        |
| `mx_jk_latch`, `mx_sr_latch`, `mx_t_latch` | JK, SR, T latches          |
| `mx_ms_jk_ff`, `mx_ms_sr_ff`, `mx_ms_t_ff` | testable master-slave JK, SR, T flip-flops |
| `mxcqca_seq_top`    | all of the above side by side, ports prefixed `dl_`, `tl_`, `ms_`, `det_`, `jk_`, `sr_`, `t_`, `msjk_`, `mssr_`, `mst_` |

Each module has a testbench `tb/tb_<module>.sv`. Each testbench checks
against a behavioural model and prints `TB_RESULT checks=N failures=M`.

* `tb_mxcqca_seq_top` runs every circuit end to end. It counts each
  mechanism (transparent/hold, forced feedback, both test vectors, MS capture,
  DET rising and falling capture, JK/SR/T set, reset and toggle) and fails if
  one never happened.
* `tb_two_vector_stuck_at` is the fault campaign above.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-UNOPTFLAT \
    -y rtl rtl/mxcqca_pkg.sv tb/tb_mxcqca_seq_top.sv --top-module tb_mxcqca_seq_top
./obj_dir/Vtb_mxcqca_seq_top
```

Substitute any other testbench name. `-Wno-UNOPTFLAT` only silences the
expected combinational-loop warning; without it Verilator stops on the
loops. Each run takes well under a second.

If you change a circuit, keep the loops free of oscillation for the inputs
you apply. Otherwise Verilator stops with a convergence error rather than a
failed check.
