# Low-power BIST with reference signatures and selective pattern application

Built-in self-test usually pushes every pseudorandom pattern into the circuit
under test (CUT). Every one of them switches the CUT inputs, and that switching
is where test power goes. This design does not do that. It knows ahead of time
which patterns add something to the test and what a good CUT answers to each
of them. Only those patterns reach the CUT. All the others are held back at a
Toggle/Hold register, so the CUT inputs stay still while they go by.

The idea is model-predictive. For every pattern, the expected response (the
*reference signature*) is known before the pattern is applied. The controller
decides from that model whether a pattern is worth applying at all. It then
checks the real response against the prediction.

## Vocabulary

| term | meaning |
|---|---|
| NRD pattern | non-redundant: it must be applied to the CUT, and its response is checked |
| RD pattern | redundant (don't care): skipped, never applied |
| reference signature | the response a fault-free CUT gives to a pattern (3 bits here) |
| Toggle state | the Toggle/Hold register takes the current pattern, and the CUT inputs change |
| Hold state | the Toggle/Hold register keeps its value, and the CUT inputs do not change |

## Structure

```
             +----------+ pattern  +-------------+  cut_in_o   +-----+
  free-run ->| tpg_lfsr |--------->| toggle_hold |------------>| CUT |  (outside)
             +----------+    |     +-------------+             +-----+
                             |            ^ toggle                 | cut_resp_i
                             v            |                        v
                      +-------------+  nrd, sig  +-----------------+
  tbl_wr_* ---------->| ref_sig_mem |----------->| test_controller |--> busy/done/pass/fail
                      +-------------+ nrd_count  +-----------------+
```

| module | role |
|---|---|
| `mpc_bist_top` | wires the four blocks together. The CUT is connected through `cut_in_o` / `cut_resp_i`. |
| `tpg_lfsr` | 8-bit pseudorandom generator. It runs freely and produces a new pattern every clock. All 256 patterns occur once per 256 clocks. |
| `ref_sig_mem` | 256-entry table, indexed by pattern. Each entry holds an NRD flag and a 3-bit reference signature. The table also keeps the number of NRD entries. |
| `toggle_hold` | register between the generator and the CUT, loaded only in Toggle state |
| `test_controller` | picks Toggle or Hold for each pattern, compares responses, and gives the verdict |
| `bist_pkg` | shared widths, generator taps and the controller's state type |

## How a test runs

The generator never stops. In every clock, the table is looked up with the
pattern that the generator offers. While the controller is in `RUN`:

1. **Classify.** If the pattern is RD, `toggle` stays low (Hold). The CUT keeps
   its previous input, and nothing switches.
2. **Apply.** If the pattern is NRD, `toggle` goes high (Toggle). The pattern
   is loaded into `toggle_hold` at the clock edge, and the controller stores the
   pattern's reference signature.
3. **Check.** In the next clock the pattern is at the CUT. The controller
   compares `cut_resp_i` with the stored signature. A match increments the
   checked-pattern counter. A mismatch stops the test at once (`FAIL`).
4. **Finish.** The test passes (`PASS`) when the counter reaches the number of
   NRD entries in the table.

Steps 2 and 3 overlap: while one NRD pattern is being checked, the next one
can already be loaded. The controller therefore handles one pattern per clock.

The generator visits every pattern exactly once in 256 clocks. So each NRD
pattern is applied exactly once, and a passing test takes at most 257 clocks
after `start`. The exact length is the position of the last NRD pattern in the
generator sequence, counted from where the generator happened to be at start,
plus 2.

When the test fails, `cut_in_o` still holds the pattern whose response was
wrong.

### Timing of one NRD pattern

```
clock            n          n+1             n+2
pattern_o        P (NRD)    Q (RD)          R ...
toggle_o         1          0               ..
cut_in_o         old        P               P      (held through Q)
check            -          resp(P)==sig(P) -
```

`toggle_o` is combinational. It depends on the NRD flag of the current
pattern. It also depends on the result of the check that is happening in the
same clock: when that check ends the test, no further pattern is loaded.
`cut_resp_i` is sampled one clock after the pattern is loaded, so the CUT must
be combinational between `cut_in_o` and `cut_resp_i`.

## Preparing the table

The RD/NRD split and the signatures are worked out offline from the CUT's
truth table. They are written through the load port (`tbl_wr_en`,
`tbl_wr_addr`, `tbl_wr_nrd`, `tbl_wr_sig`, one entry per clock) before
`start`. Reset clears all NRD flags, so an unloaded table passes at once. Only
the entries whose NRD flag is set are ever compared.

The method leaves the choice of NRD patterns open. The end-to-end testbench
uses a simple rule:

- Simulate every single stuck-at fault of the CUT.
- Walk the patterns in numeric order.
- Mark a pattern NRD if it detects a fault that no earlier pattern detects.

For the example CUT in `tb/cut_pkg.sv` this gives 12 NRD patterns out of 256,
and these 12 detect all 34 stuck-at faults.

## Choices made in this RTL

- **Generator.** An 8-bit Fibonacci LFSR with polynomial
  x^8+x^6+x^5+x^4+1 and seed `8'h01`. The all-zero state is spliced in: the
  feedback is inverted when bits [6:0] are zero. This gives a 256-state period,
  so every pattern, including `8'h00`, can be an NRD pattern. `TAPS` and `SEED`
  are parameters.
- **Toggle/Hold element.** A register with a load enable, not a transparent
  latch. This keeps the design in one clock domain, and the CUT inputs change
  only at clock edges.
- **Programmable table.** The table is a loadable memory, so the RTL does not
  depend on one particular CUT. A version built for one fixed CUT could
  hard-wire the NRD decode and the signatures as logic, and it would be much
  smaller. This version synthesises to about 295 flip-flop bits and 768 memory
  bits. A hard-wired controller needs only a few flip-flops.
- **Control interface.** `start` begins a test from idle or after a previous
  verdict. `busy_o`, `done_o`, `pass_o` and `fail_o` report progress. Reset is
  active-low and asynchronous.
- **Naming.** `toggle_o` is the Toggle/Hold select signal. A high level means
  that patterns pass to the CUT.
- **Parameters.** `PAT_W` (default 8) and `RESP_W` (default 3) are parameters.
  The generator taps default to the 8-bit polynomial, so you must supply
  matching `TAPS` if you change `PAT_W`.

## Limits

- **CUT.** The CUT is not part of the RTL. Only its widths are fixed: 8 inputs
  and 3 outputs. `tb/cut_model.sv` is a stand-in combinational circuit with
  stuck-at fault injection, and it is used only in simulation.
- **Power.** Power is not modelled. The end-to-end testbench counts switching
  at the CUT inputs instead. On the fault-free run with the example table
  there are 25 bit changes. Applying every generated pattern over the same
  clocks would give 1027.
- **Aliasing.** A faulty CUT that gives the correct 3-bit answer for every NRD
  pattern passes. Coverage is only as good as the NRD selection.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_tpg_lfsr` | every step against the polynomial; all 256 patterns in 256 clocks; the seed after reset; holding when `en` is low |
| `tb_toggle_hold` | 500 random Toggle/Hold steps against a model |
| `tb_ref_sig_mem` | random writes and rewrites against a model, reading every address and checking the NRD count |
| `tb_test_controller` | random RD/NRD streams with faults at the first, a middle and the last NRD pattern, and an empty table. It checks `toggle_o` every clock, the verdict and the exact latency. |
| `tb_mpc_bist_top` | end to end at the default sizes, described below |

`tb_mpc_bist_top` builds the table by fault simulation, then checks four
things:

- The fault-free CUT passes, in exactly the predicted number of clocks.
- Only NRD patterns are applied, each one once.
- Every one of the 34 stuck-at faults is detected, and the test stops at the
  first exposing NRD pattern in generator order.
- An empty table passes at once, and a reloaded table is used.

It also counts Toggle, Hold, pass, discontinue and empty-table events, and it
fails if any of them never happened.

The controller asserts two properties: `toggle_o` is high only while a test
runs, and the checked count never exceeds the NRD count.

### Running a testbench with Verilator

From the folder that holds `rtl/` and `tb/`:

```
verilator --binary --assert --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/bist_pkg.sv tb/cut_pkg.sv tb/tb_mpc_bist_top.sv --top-module tb_mpc_bist_top -o sim
./obj_dir/sim
```

Replace `tb_mpc_bist_top` with any other testbench name. The packages are
listed first. The `-y` search finds the modules. Every testbench finishes in
well under a second.

Lint any module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/bist_pkg.sv rtl/<module>.sv`. Two
kinds of warning remain:

- `SYNCASYNCNET` comes from the assertions, which use the asynchronous reset
  in `disable iff`.
- `UNUSEDPARAM` comes from package constants that a given module does not use.
