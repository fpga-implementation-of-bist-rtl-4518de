# Self-feedback deterministic BIST

Built-in self-test (BIST) usually starts from pseudo-random patterns from an
LFSR. Circuits with random-pattern-resistant faults then need either very long
tests or stored deterministic seeds, in an on-chip ROM or on an external tester.
This design needs neither. The next seed is taken from the circuit under test
(CUT) itself: a few internal nets of the CUT are wired, through simple gates,
back to its inputs. The response of those nets to the current pattern becomes
the next pattern. Each such feedback pattern is then rotated in a ring register
made from the CUT's inputs, which gives up to n-1 more patterns at one pattern
per clock.

Which nets to tap, which gates to use and how often to rotate are all chosen
offline by a test-generation procedure. That procedure is not part of this RTL.
The hardware only replays its result, with fixed wiring and a small counter
FSM, so no seeds or patterns are stored anywhere.

## Structure

```
              +-------------------+   cfg_sel   +--------------+
   cut_nets ->| sfl               |<------------| bist_ctrl    |<- start
   (from CUT) | self-feedback     |             | control unit |-> busy, done
              | logic             |   csr_mode  |              |
              +---------+---------+   +---------|              |
                        | fb_pattern  |         +------+-------+
                        v             v                | test_valid, mon_clear
              +-------------------------+              v
              | csr  circular shift reg |      +---------------+
              +------------+------------+      | resp_monitor  |-> signature
                           | cut_pattern       | (MISR)        |
                           v                   +---------------+
                     circuit under test  --- cut_resp ---^
```

| File | Role |
|---|---|
| `rtl/bist_pkg.sv` | Shared types: feedback operations, candidate and segment structs, CSR commands, the worked-example defaults |
| `rtl/sfl.sv` | Self-feedback logic: one feedback candidate per CSR bit for each configuration, plus a configuration multiplexer |
| `rtl/csr.sv` | Circular shift register: clear, load feedback pattern, rotate by one bit, hold |
| `rtl/bist_ctrl.sv` | Control unit: applies the all-zero pattern, then loads and rotations per the schedule, then done |
| `rtl/resp_monitor.sv` | Response monitor: a MISR that compacts the CUT responses |
| `rtl/bist_top.sv` | Wires the four blocks together. The CUT connects from outside. |

The CUT is not included. `bist_top` drives the CUT's inputs on `cut_pattern`,
takes the tapped internal nets on `cut_nets`, and takes the observed
outputs on `cut_resp`.

## How a pattern is made: the worked example

The defaults of every module reproduce a small example CUT. It has four inputs
I1..I4 and five tapped nets N1..N5. There is one configuration: I1 <- N5,
I2 <- N4, I3 <- N1, I4 <- N1, all without inversion. Each feedback pattern is
rotated fully, 3 times. The session runs as follows (I1 written first):

| Test cycle | CSR (I1..I4) | How it was made | N1..N5 response |
|---|---|---|---|
| 1 | 0000 | cleared at start | 11100 |
| 2 | 0011 | feedback from cycle 1: N5,N4,N1,N1 = 0,0,1,1 | 01100 |
| 3 | 1001 | rotate | 01100 |
| 4 | 1100 | rotate | 11001 |
| 5 | 0110 | rotate | 11101 |
| 6 | 1011 | feedback from cycle 5: 1,0,1,1 | 10111 |
| 7 | 1101 | rotate | 01111 |
| 8 | 1110 | rotate | 10010 |
| 9 | 0111 | rotate | 11011 |

Note the following:

* The same configuration produces two different seeds, because the nets
  respond differently to different patterns. The offline procedure picks its
  taps so that this reuse works. It sorts nets by the values they gave in past
  cycles: N4 gave 0 and then 0, N5 gave 0 and then 1, N1 gave 1 and then 1.
* A rotation moves every bit one place towards the last input and the last
  bit into I1.
* A new seed is always formed from the responses to the pattern just applied.
  This includes the first seed of a new configuration, which comes from the
  last pattern of the previous configuration. Nothing needs to be remembered.

## Feedback candidates (`sfl`)

Each CSR bit gets its next value from a *feedback candidate* (`fb_cand_t`):
an operation `op` applied to net `a`, and also to net `b` for the binary
operations. There are ten operations:

| Kind | Operations |
|---|---|
| Unary | `OP_BUF` (no operation), `OP_INV`, `OP_ONE` (tie to VDD), `OP_ZERO` (tie to GND) |
| Binary | `OP_AND`, `OP_NAND`, `OP_OR`, `OP_NOR`, `OP_XOR`, `OP_XNOR` |

A *configuration* is one candidate for each CSR bit. The `CFG` parameter is a
packed array: `CFG[c][i]` is configuration `c`, bit `i`, and bit 0 is I1.
Because `CFG` is a parameter, synthesis turns each configuration into wiring
and at most one gate per bit. A multiplexer driven by `cfg_sel` then picks one
configuration. Net indices start at 0 for N1. An index out of range raises an
elaboration-time assertion.

## The schedule (`bist_ctrl`)

The offline procedure works in two phases:

* **Phase 1** picks seeds that are each rotated fully (n-1 times). These
  remove the easy faults.
* **Phase 2** picks seeds with shorter rotations. It groups seeds that need
  similar rotation numbers, and every seed in a group uses the largest
  rotation number of that group.

The controller takes the result as the `SEG` table. Each segment (`seg_t`)
means: make `count` feedback patterns with configuration `cfg`, and rotate
each one `rot` times.

* A Phase 1 run is a segment with `rot = N_CSR-1`.
* Each Phase 2 group is a segment with its own `rot`.
* A change of configuration starts a new segment.

The segment fields are 4, 16 and 16 bits wide (`bist_pkg`). Elaboration
assertions reject a segment with `count = 0` and one with `rot >= N_CSR`.

Cycle by cycle:

* A one-cycle `start` pulse while idle sets `csr_mode = CSR_CLEAR` and
  `mon_clear`.
* Each following cycle is a test cycle: `test_valid` is high and the CUT sees
  the CSR contents. In that same cycle, `csr_mode` and `cfg_sel` give the CSR
  update for the next clock edge.
* After the last test cycle, `busy` falls and `done` rises. `done` stays high
  until the next `start`, and `signature` is then final.
* The session length in test cycles is
  `1 + sum over segments (count * (1 + rot))`. The example takes 9.
* A `start` pulse during a session is ignored. A concurrent assertion checks
  that the CSR is cleared only from idle.

## Response monitor

The response monitor is a W-bit MISR. In each test cycle it computes
`sig' = (sig << 1) ^ (sig[W-1] ? POLY : 0) ^ cut_resp`.

The defaults are W = 5 and x^5+x^2+1, matching the example's five observed
nets. For another width, set `N_RESP` and `MISR_POLY` together. The fault-free
signature must be worked out for the actual CUT, for example by simulating the
fault-free CUT, and compared outside this block.

## What follows the method and what is this design's choice

These parts follow the method:

* the four blocks and how they connect
* the all-zero first pattern
* the one-bit rotation per test cycle and its direction
* the ten feedback operations
* reuse of one configuration for several seeds
* a rotation number for each seed or group
* no seed storage

These parts are this design's own choices:

* The configuration and schedule tables are parameters, with the encodings
  described above.
* The start/busy/done handshake and the exact cycle timing.
* Asynchronous active-low reset.
* The response monitor is a MISR, with its width and polynomial. The method
  only says that the monitor captures the responses.
* The CUT is assumed to answer within one clock (test per clock).

These parts are not included:

* The offline test-generation procedure (fault simulation, ATPG, circular
  merging of test cubes, grouping by rotation number). It produces `CFG` and
  `SEG` and is software.
* Any particular benchmark CUT.
* Any reduction of the wiring from the tapped nets to the feedback logic. The
  method names that wiring as its main cost but does not say how it is reduced.
* A reset of the CSR in the middle of a session. The method says an initial
  pattern *can* also come from resetting the CSR, but its procedure uses the
  all-zero pattern only at the start. This design does the same.

## Using it on a real CUT

1. Run a test-generation flow of the kind described above on the CUT. It
   yields the tapped nets, the configurations and the schedule.
2. Set the parameters:
   * `N_CSR`: the number of CUT inputs plus scan cells
   * `N_NETS`: the number of tapped nets
   * `N_RESP`: the number of observed outputs
   * `CFG`, `NUM_CFG`, `SEG`, `NUM_SEG`: the configuration and schedule tables
   * `MISR_POLY`
3. Connect the CUT inputs to `cut_pattern`, the tapped nets to `cut_nets`, and
   the observed outputs to `cut_resp`. The tapped nets must settle within the
   clock period.

## Verification

Each testbench checks its block against a reference written independently in
the testbench, and prints a `TB_RESULT` line.

| Testbench | What it checks |
|---|---|
| `tb/tb_sfl.sv` | 3 configurations × 10 bits over 7 nets, all ten operations, random net values |
| `tb/tb_csr.sv` | the example's load-and-rotate sequence, then 150 random commands on a 9-bit register |
| `tb/tb_resp_monitor.sv` | random responses, enable and clear against a bitwise model of x^5+x^2+1 |
| `tb/tb_bist_ctrl.sv` | three segments (full rotation, then groups of 3 and 1 rotations, three configurations): every command, the 31-cycle session length, a restart |
| `tb/tb_bist_top.sv` | end to end with an 8-bit CSR, 12 nets, 2 configurations and 4 segments, against a model CUT and a software replay of the method: every pattern, 40 cycles, the signature, two sessions. It counts each mechanism and fails if one never happens: zero pattern, load, rotation, configuration switch, change of rotation number, each of the ten operations, done, restart. |
| `tb/tb_bist_top_fig3.sv` | `bist_top` at its defaults with `tb/fig3_cut.sv`, a model CUT that returns the example's responses. It checks the nine patterns of the table above, 9 test cycles, and the signature. |

To run one testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb rtl/bist_pkg.sv \
    tb/tb_bist_top_fig3.sv --top-module tb_bist_top_fig3 -o sim
./obj_dir/sim
```

Replace the testbench name to run the others; `-Irtl -Itb` lets Verilator find
the modules.

The lint run reports two kinds of warnings that are intended:

* `rst_n` is used both asynchronously by the flip-flops and synchronously in
  the assertion's `disable iff`.
* Some package constants and the unused bits of the current-segment struct in
  `bist_ctrl` are flagged as unused.
