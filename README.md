# Low-switching-activity logic BIST with a cyclic pseudorandom chain (MLSA-BIST)

Scan-based logic BIST usually fills every scan chain straight from an LFSR.
Neighbouring scan cells then differ about half of the time, so the chains toggle
far more during shift than the circuit ever does in operation. The extra power
can cause supply droop, yield loss or heat damage.

This design lowers shift power cheaply, with one multiplexer, one AND gate and
one OR gate per scan chain. Most of the time a chain's multiplexer does not take
new pseudorandom data. Instead it feeds the chain's first scan cell back into
the chain, which writes the same value again and causes no transition. It takes
pseudorandom data only when all K phase-shifter bits at its AND gate are 1.

Long runs of equal bits cost fault coverage, because some patterns can no longer
occur. To recover that coverage, a one-hot cyclic shift register (CSR) forces
one chain per pattern to take fully pseudorandom data. The forced chain changes
from pattern to pattern and visits every chain in turn. Most chains stay quiet,
and each chain still gets a fully random pattern every N patterns.

With `mlsa_en = 0` the CSR is gated off. What remains is the simpler scheme
without a pseudorandom chain (called LSA here).

## Block diagram

```
            +-------------+   N*(K+1)   +-------------------- per chain i --------------------+
 seed ----->| prtg_lfsr   |--state----->| phase_shifter --K--> AND --+                         |
            | (30 stages) |             |               --1--> data  |   csr[i] & mlsa_en      |
            +-------------+             |                            v        |                |
                                        |                           OR <------+                |
                                        |                            | sel                     |
                                        |   first cell ---> 0 |\     v                         |
                                        |   data        ---> 1 | MUX--> scan_in --> scan_chain --+--> misr --> signature
                                        +-----------------------------------------------------+
 cyclic_shift_register (one-hot, rotates between patterns) --> csr[N-1:0]
 bist_controller: init / shift / capture / unload, pass = (signature == expected)
```

| Module | Role |
|---|---|
| `mlsa_bist_top` | Wires everything together. The circuit under test (CUT) logic stays outside, reached through ports. |
| `prtg_lfsr` | 30-stage maximal-length LFSR, the pseudorandom test generator (PRTG). |
| `phase_shifter` | XOR network. Each of its N·(K+1) outputs is the XOR of 3 LFSR stages. |
| `scan_in_select` | Per-chain logic: the K-input AND, the OR with the CSR bit and the 2-to-1 mux. |
| `cyclic_shift_register` | N-bit one-hot ring that chooses the pseudorandom chain. |
| `scan_chain` | M scan cells with shift, capture and clear. |
| `misr` | 32-bit multiple-input signature register. |
| `bist_controller` | Runs the test session. |
| `lsa_bist_pkg` | Controller state type, polynomial table and phase-shifter tap generator. |

## Scan input selection and its toggle rate

Each chain `i` (chain 1 is index 0) uses K+1 phase-shifter outputs:

- `ps_out[i*(K+1)]` is the pseudorandom data bit, on mux input 1.
- `ps_out[i*(K+1)+1 +: K]` are the K inputs of the AND gate.

The mux control is `sel = (&ctrl) | csr_bit`. When `sel` is 0 the mux passes the
chain's first scan cell (cell M, `cells[M-1]`), which is the value shifted in
on the previous clock. So a chain not chosen by the CSR changes its scan input
only when two things happen together:

- the AND gate gives 1, with probability 0.5^K;
- the new data bit differs from the previous scan input, with probability 0.5.

The toggle probability is therefore **0.5^(K+1)**:

| K | Toggle probability |
|---|---|
| 1 | 0.25 |
| 2 | 0.125 |
| 3 | 0.0625 |

A plain LFSR feed toggles with probability 0.5. The chain chosen by the CSR also
toggles at 0.5.

The end-to-end testbench measures this at K = 3. Over about 850,000 shift clocks
it sees 0.062 on the AND-controlled chains and 0.50 on the CSR chain. Larger K
saves more power but costs more coverage. The values the scheme is meant for are
K = 1, 2 and 3. For K = 1 the single phase-shifter bit drives the OR gate
directly.

## Test session and timing

The `bist_controller` runs one session for each `start` pulse.

1. **Init, 1 clock.** This clock:
   - loads `seed` into the LFSR (a zero seed loads 1);
   - sets the CSR to `CSR_INIT`, by default `10…0`, so only chain 1 is chosen;
   - clears the MISR and all scan chains.
2. **For each of the `num_patterns` patterns:**
   - **Shift, M clocks.** The LFSR advances each clock. Every chain shifts its
     `scan_in` into cell M. Cell 1 goes to the MISR, which is idle during the
     first pattern.
   - **Capture, 1 clock.** The chains load `cut_response` (normal mode). In the
     same clock the CSR rotates one place, from chain i to chain i+1, wrapping
     from N back to 1. So the chosen chain changes just before the next pattern
     is shifted in.
3. **Unload, M clocks.** The last response is shifted into the MISR.
4. **Done.** `done` stays high and `pass = (signature == expected_signature)`.
   A new `start` begins a new session.

A session of P patterns takes **1 + P·(M+1) + M clocks** from the clock after
`start` until `done` rises. At the defaults (M = 87) that is 88·P + 88 clocks.
`start` is ignored while `busy` is high.

The chains are cleared in the init clock for a reason. The hold path can copy a
chain's old contents into the first pattern, so without the clear the signature
would depend on what the chains held before the session.

## Interface of `mlsa_bist_top`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | Clock and asynchronous active-low reset. |
| `start` | in | 1 | Starts a session. |
| `mlsa_en` | in | 1 | 1: CSR active (MLSA). 0: CSR gated off (LSA). |
| `seed` | in | LFSR_W | LFSR seed. |
| `num_patterns` | in | PAT_W | Test length. 0 is treated as 1. |
| `expected_signature` | in | SIG_W | Fault-free signature. |
| `cut_pattern` | out | N×M | Scan cell contents, which drive the CUT logic. `cut_pattern[i][M-1]` is cell M of chain i+1. |
| `cut_response` | in | N×M | CUT responses captured in normal mode. |
| `scan_sel`, `scan_in`, `csr_state` | out | N | Observation: mux controls, scan inputs and CSR contents. |
| `signature`, `patterns_applied` | out | SIG_W, PAT_W | MISR contents and number of captured patterns. |
| `busy`, `done`, `pass` | out | 1 | Session status. |

| Parameter | Default | Notes |
|---|---|---|
| `N` | 20 | Number of scan chains. The evaluated circuits use 10, 15 or 20. |
| `M` | 87 | Chain length, this design's choice. 20 × 87 cells hold the largest ISCAS'89 circuit in the evaluation (s35932, 1728 flip-flops). |
| `K` | 3 | AND-gate inputs. 1, 2 and 3 are the intended values. |
| `LFSR_W` | 30 | LFSR length. 40 is also supported. |
| `SIG_W` | 32 | MISR width, this design's choice. |
| `PAT_W` | 20 | Pattern counter width. It covers test lengths up to 1,048,575. |
| `CSR_INIT` | `10…0` | CSR start value; bit 0 is chain 1. One 1 gives one pseudorandom chain per pattern, as evaluated. More ones make several chains pseudorandom at once. |

`poly_taps` in `lsa_bist_pkg` supports LFSR and MISR widths of 4, 8, 16, 20, 24,
30, 31, 32 and 40. Any other width stops elaboration with an error.

## What is fixed by the scheme and what is chosen here

These parts follow the scheme itself:

- an LFSR as the PRTG, 30 or 40 stages;
- an XOR phase shifter;
- per chain, a K-input AND, a 2-input OR with a CSR bit and a 2-to-1 mux, whose
  input 0 is the first scan cell and input 1 is phase-shifter data;
- a one-hot N-bit CSR, starting at `10…0` and rotating by one before each
  pattern;
- a MISR on the chain outputs;
- a capture in normal mode after each shift-in.

These are choices of this design:

- **LFSR.** The polynomial is x^30+x^6+x^4+x+1 (x^40+x^38+x^21+x^19+1 at 40
  stages). The feedback is internal: the register shifts towards stage 0 and
  stage 0 feeds back into the top stage through XORs.
- **Phase shifter.** Each output XORs three distinct LFSR stages. The stages are
  drawn by an xorshift generator that runs at elaboration time, and any set that
  repeats an earlier output is drawn again. All N·(K+1) outputs are different.
  A chain's data bit and its AND inputs never share an output.
- **MISR.** 32 bits with polynomial x^32+x^22+x^2+x+1. Chain i goes into bit
  i mod 32.
- **Controller.** One capture clock per pattern. The MISR is idle while the
  first pattern is loaded. M unload clocks follow the last capture. Chains and
  MISR are cleared at the start of each session.
- **Mode input.** `mlsa_en`, which selects the LSA variant on the same hardware.
- **Defaults.** The chain length M = 87 and the counter width.

Two parts are not included:

- **The CUT logic.** In the evaluation it is the ISCAS'89 benchmark circuits.
  Its scan cells and responses are ports of the top.
- **Power and fault-coverage measurement.** Weighted switching activity and
  fault simulation are evaluation tools, not hardware. The testbench measures
  only scan-input toggle rates.

Area is small. There is one flip-flop per chain for the CSR, plus one AND, OR
and mux per chain. The LFSR, phase shifter, MISR and controller are shared.

## Evaluated circuits

The scheme was evaluated on seven ISCAS'89 circuits. Their scan-chain counts and
test lengths come from that evaluation. The flip-flop counts come from the public
benchmark descriptions.

| Circuit | Chains | Patterns | Flip-flops |
|---|---|---|---|
| s5378 | 10 | 65,536 | 179 |
| s9234 | 10 | 524,288 | 211 |
| s13207 | 15 | 132,072 | 638 |
| s15850 | 15 | 132,072 | 534 |
| s35932 | 20 | 128 | 1,728 |
| s38417 | 20 | 132,072 | 1,636 |
| s38584 | 20 | 132,072 | 1,426 |

At the defaults (20 chains of 87 cells and a 20-bit pattern counter) every one of
them fits. To reproduce a 10- or 15-chain split, instantiate the top with that
`N` and `M = ceil(flip-flops / N)`.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=… failures=…` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_prtg_lfsr` | A 16-stage instance has a full period of 65535. The 30-stage register matches a reference written separately. Seed loading, the zero-seed rule and holding. |
| `tb_phase_shifter` | Finds each output's taps with one-hot states: exactly 3 per output, all outputs distinct. Linearity and 0/1 balance on random states. |
| `tb_cyclic_shift_register` | The `1000000000 → 0100000000 → …` sequence at N = 10, including wrap and re-init. |
| `tb_scan_in_select` | Exhaustive, for K = 3 and K = 1. |
| `tb_scan_chain` | Random clear, shift and capture against a queue model. |
| `tb_misr` | A separately written reference, and that a single flipped bit changes the signature. |
| `tb_bist_controller` | Every control output on every clock for P = 1, 3 and 7. The session length 1 + P(M+1) + M. |
| `tb_mlsa_bist_top` | End to end at the default parameters (see below). |
| `tb_toggle_rates` | The evaluated shapes (see below), checking session length and scan-input toggle rates. Each shape is built by the helper `tb/toggle_probe.sv`. |

`tb_mlsa_bist_top` runs four sessions of 128 patterns, the test length used
for s35932. A small XOR/AND stand-in plays the CUT:

1. MLSA mode without a fault, to obtain the golden signature.
2. MLSA mode again without a fault; it must pass.
3. MLSA mode with a stuck-at-0 fault; it must fail.
4. LSA mode.

A reference model runs in lockstep. It predicts:

- every chain's mux control and scan input on each shift clock;
- the loaded pattern and the CSR state at each capture;
- the final signature and the clock count.

The testbench also counts how often each mechanism happened and fails if any
never did: hold, AND-selected data, CSR-selected data, CSR wrap-around, capture,
both modes, pass and fail. It also checks the toggle rates described above.

`tb_toggle_rates` builds the top in six shapes:

- 10 chains of 18 cells (s5378-sized) with K = 1, 2 and 3;
- 15 chains of 43 cells with K = 2 and a 40-stage LFSR;
- LSA mode;
- two pseudorandom chains per pattern.

In every shape the AND-controlled chains toggle within 15 % of 0.5^(K+1), and
the CSR chains toggle at 0.5 ± 0.05.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/lsa_bist_pkg.sv tb/tb_mlsa_bist_top.sv --top-module tb_mlsa_bist_top
./obj_dir/Vtb_mlsa_bist_top
```

To run another one, replace the testbench name in both places. The full-size
end-to-end run takes about 15 seconds. `tb_toggle_rates` also needs
`-Itb -y tb` for its helper.
