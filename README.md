# Time-gated multi-frequency test wrapper for modular IP cores

An embedded IP core is often too big to test in one go. Its test wrapper
therefore splits it into *virtual cores* (VCs), each a set of scan chains with
its own wrapper scan chains. Two things limit how fast the VCs can be tested:
the tester's bandwidth (`W_EXT` TAM wires at the tester rate `f_t`) and the
power the chip may use during test. This wrapper does not shift every VC at
once. It works through **groups of VCs, one group at a time**. The VCs of
the group under test shift in parallel, each at its **own shift frequency**
`f_t / 2^k`. All other groups are clock gated. Only the active group shares
the TAM bandwidth and the power budget, so:

* a VC with a low power budget can shift slowly on narrow TAM slices, while
  its group-mates use the rest of the bandwidth at full speed;
* idle groups use no shift power, which lowers average power;
* every VC captures with two **at-speed pulses** (launch and capture) taken
  from the fast on-chip PLL clock. Shifting can be slow, but the test itself
  runs at the functional clock rate.

Which VCs form a group, and each VC's width and frequency, are chosen offline
by a schedule optimiser (a 3-D "shelf packing" of VC test-time cubes under
bandwidth and power limits). The RTL takes that schedule as parameters. The
default is the final schedule of the seven-VC example core *hCADT01*, with
`W_EXT = 7` and `f_t = 100 MHz`.

This RTL implements the wrapper architecture described in "Shelf Packing to
the Design and Optimization of A Power-Aware Multi-Frequency Wrapper
Architecture for Modular IP Cores" (Zhao, Chandran, Fujiwara). That source
gives the block structure, the group-serial / VC-parallel scheme, the
bandwidth-matching rule, the clock-control structure and the example
schedule. The source does not specify the cycle-level timing, encodings,
handshakes or the chain partition algorithm; the choices made here are listed
under *Departures and own choices* below.

## Block structure

```
                 +------------------------- tgmf_wrapper --------------------------+
 WPI[W_EXT] ---> | tam_demux --grp bus--> per VC: bw_sipo -> vc_wsc -> bw_piso --> |
                 |   (outer DeMUX)                 (wrapper scan chains)   |       |
 WPO[W_EXT] <--- | tam_mux  <-------------- inner merge per group <-------+       |
                 |                                                               |
                 | scan_control: clock_division, group_decoder, capture_fsm,     |
 clk_pll ------> |   per VC: shift_gate + cpf  --> vc_clk_en / vc_scan_en        |
 test_start ---> |                                                               |
 TCK, WSI -----> | wby, bir  ---> WSO mux                                        |
                 +---------------------------------------------------------------+
                         | vc_seg_si/so, vc_core_in/out, vc_pi/po
                         v
                   the core (not part of the wrapper)
```

| module | role |
|---|---|
| `tgmf_pkg` | default schedule, chain partition tables, instruction codes, helper functions |
| `tgmf_wrapper` | top level |
| `scan_control` | clock generation and control; holds the five blocks below |
| `clock_division` | TAM strobe `ft_en` (every `T_DIV` PLL cycles) and shift-rate strobes `fs_en[k]` (every `2^k` TAM cycles) |
| `group_decoder` | group number to one-hot group enables |
| `capture_fsm` | test sequencer: group by group, shift phases and capture windows |
| `shift_gate` | one per VC: passes its shift rate while its group shifts, for exactly `VC_LEN` pulses per phase |
| `cpf` | clock pulse filter, one per VC: shift pulses while `scan_en` is high, then two at-speed pulses while it is low |
| `tam_demux` | outer DeMUX: WPI goes to the active group only |
| `tam_mux` | inner merge of a group's VC outputs, outer MUX onto WPO |
| `bw_sipo` / `bw_piso` | bandwidth matching between `f_t` TAM wires and slower wrapper scan chains |
| `vc_wsc` | a VC's balanced wrapper scan chains: input cells, the core's internal scan segment, output cells |
| `wbr_cell` | one boundary cell (CFI/CFO functional path, CTI/CTO test path) |
| `wby`, `bir` | serial-port bypass and instruction registers (TCK domain) |

## One clock, many rates

This is the part to understand first. Everything except `wby`/`bir` runs on
one clock, `clk_pll`, the output of the chip's PLL. All slower clocks are
**one-cycle enable strobes** of that clock, not separate clock nets:

* `ft_en` is high in one PLL cycle out of `T_DIV` (default 15: a 1.5 GHz PLL
  and a 100 MHz tester). The tester applies WPI and samples WPO on these
  strobes.
* A frame counter counts TAM cycles. `fs_en[k]` fires on the TAM strobe that
  ends a frame of `2^k` TAM cycles. Default rates: 100, 50, 25 and 12.5 MHz.
  At the start of every shift phase the frame counter restarts (`sync`), so
  frames line up with the phase.
* A VC's gated clock `vc_clk_en[i]` is its `fs_en` strobe, passed by its
  shift gate and CPF. In a capture window, the CPF instead gives a *launch*
  pulse one PLL cycle after the request and a *capture* pulse `VC_CDIV[i]`
  PLL cycles later, i.e. at the VC's functional clock period. A smaller
  `VC_CDIV` gives a beyond-at-speed capture.

A physical implementation would put an integrated clock-gating cell in
front of each VC using `vc_clk_en`. In the RTL and its testbenches, every
flop of a VC (boundary cells and the core model) is clocked by `clk_pll`
with `vc_clk_en` as its enable.

## A test, step by step

Load instruction `INSTR_TGMF` (3'b001) into the BIR, then raise
`test_start`. `INSTR_EXTEST` runs the same sequence for an interconnect
test (see *Wrapper scan chains and boundary cells*). For each group
`g = 0 .. N_GROUPS-1`, `capture_fsm` runs `n_patterns + 1` shift phases,
with a capture window between each pair:

```
group g:  SHIFT(load p0) CAP SHIFT(unload r0, load p1) CAP ... SHIFT(unload r_{n-1})
```

* **Shift phase.** Lasts `GRP_CYC[g] = max over the group of (VC_LEN+1) *
  2^VC_DIVLOG` TAM cycles. `tam_shift` is high exactly during these TAM
  cycles. Each VC gets `VC_LEN[i]` shift pulses at its own rate, starting at
  the beginning of the phase. A VC that finishes early stays clock gated for
  the rest of the phase. The extra shift period at the end drains the output
  converter.
* **Capture window.** The group's `vc_scan_en` goes low. One TAM cycle
  later, to let `scan_en` settle, every CPF of the group gives its
  launch/capture pair. The FSM waits
  until all of them report `cap_done`, then raises `scan_en` again. The next
  shift phase starts on the following TAM strobe.
* After the group's last phase, the next group starts on the next TAM
  strobe. After the last group, `test_done` rises and stays high until
  `test_start` falls.

`tam_group` names the group under test. In a shift phase, TAM strobe `n`
(counting from 0) carries, for a VC with ratio `R = 2^VC_DIVLOG`:

* input: wire `VC_OFS + j` feeds chain `j*R + (n mod R)` at shift
  `floor(n/R)`;
* output: wire `VC_OFS + j` shows the bit that chain `j*R + (n mod R)`
  shifted out at shift `floor(n/R) - 1`. There is one shift period of
  latency.

## Bandwidth matching

The rule is `sum over the group of (w_i * f_s,i) <= W_EXT * f_t`. A VC with
`w` wrapper chains at `f_t / R` uses `ceil(w / R)` consecutive TAM wires,
starting at `VC_OFS`. On input, `bw_sipo` collects `R` bits per wire per
frame and presents them to `R` chains in the TAM cycle of the shift pulse.
On output, `bw_piso` loads the chains' scan-out bits on the shift pulse and
serialises them over the next `R` TAM cycles. For `R = 1` both are plain
wires or registers. VCs in the same group must use disjoint wire slices; the
top checks this at elaboration.

Power is budgeted per group in the same way. A VC whose test power at the
full rate `f_t` is `Pow` draws `Pow * f_s / f_t` when shifted more slowly.
The sum over a group must stay within `P_AVE`. The top checks this at
elaboration from `VC_POW` and `P_AVE`. For the default schedule, group 0
draws 2572 + 930 + 450/8 ≈ 3558, group 1 draws 2605 + 40/4 = 2615, and
groups 2 and 3 draw 1314 and 576, all within 4500. No hardware measures
power at run time.

Default schedule (index 0 is VC1):

| group | VC | chains `w` | `f_s` (MHz) | wires | offset | `VC_LEN` | capture pulse spacing |
|---|---|---|---|---|---|---|---|
| 0 | VC1 | 4 | 100 | 4 | 0 | 689 | 8 PLL cycles (187.5 MHz) |
| 0 | VC3 | 2 | 100 | 2 | 4 | 546 | 13 (115 MHz) |
| 0 | VC2 | 5 | 12.5 | 1 | 6 | 150 | 3 (500 MHz) |
| 1 | VC5 | 6 | 100 | 6 | 0 | 521 | 3 (500 MHz) |
| 1 | VC7 | 2 | 25 | 1 | 6 | 71 | 6 (250 MHz) |
| 2 | VC4 | 7 | 100 | 7 | 0 | 219 | 2 (750 MHz) |
| 3 | VC6 | 7 | 100 | 7 | 0 | 114 | 5 (300 MHz) |

The capture dividers approximate each VC's functional frequency (200, 533,
120, 750, 500, 330 and 250 MHz) from a 1.5 GHz PLL, never faster than
functional. Per pattern, this schedule takes 1208 + 522 + 220 + 115 = 2065
TAM cycles. VC2 at 12.5 MHz sets the length of group 0.

## Wrapper scan chains and boundary cells

Each wrapper chain `k` of a VC runs: chain input → `VC_NI[i][k]` input cells
→ the core's internal scan segment (`vc_seg_si` out, `VC_NB[i][k]` flops on
the core side, `vc_seg_so` back) → `VC_NO[i][k]` output cells → chain output.
The segment is the core's internal scan chains that were assigned to this
wrapper chain, linked in series on the core side. A chain may have no
segment; it then joins its cells directly. Bidirectional pins count as one
input and one output cell.

The partition tables in `tgmf_pkg` come from a simple balancing rule:
1. Place each internal chain, longest first, on the currently shortest
   wrapper chain.
2. Add input cells, one at a time, to the wrapper chain with the shortest
   scan-in length.
3. Add output cells the same way, by scan-out length.

`VC_LEN = max over chains of max(NI+NB, NB+NO)` is the number of shifts per
pattern. Load and unload overlap, so this covers both. The resulting lengths
match the example's test-time figures (for example VC1 at `w = 4`: 689 bits,
6.89 µs at 100 MHz).

Boundary cells (`wbr_cell`) have three modes:
* **Normal.** No test instruction is loaded, and the cells are transparent
  (`CFO = CFI`).
* **Core test** (`INSTR_TGMF`). Every cell drives its `CFO` from its flop,
  which isolates the core. During capture, input cells hold the values they
  drive into the core, and output cells capture the core's outputs.
* **Interconnect test** (`INSTR_EXTEST`). The same group-by-group scan
  sequence runs, with the cell roles swapped. Output cells drive the wrapper
  pins from their flops and hold; input cells capture what arrives on the
  wrapper pins. This tests the wiring around the core rather than the core
  itself. The core's internal segments still shift and capture, and their
  contents can be ignored.

The wrapper's pin arrays `vc_pi`, `vc_core_in`,
`vc_core_out` and `vc_po` are sized for the largest VC (`MAX_NI = 218`,
`MAX_NO = 296`). Smaller VCs use the low bits; the unused outputs are
constant zero.

## Serial port

On `WSI`/`WSO`, clocked by `tck`, in the manner of IEEE 1500: `wby` is a
one-bit bypass register. `bir` is a 3-bit instruction register with shift,
capture and update stages. It resets to `INSTR_BYPASS` and shifts LSB first.
`select_wir` chooses the BIR (else WBY) for `shift_wr`, `capture_wr`,
`update_wr` and WSO.

| instruction | code | mode |
|---|---|---|
| `INSTR_BYPASS` | 3'b000 | normal; WSI to WSO through WBY |
| `INSTR_TGMF` | 3'b001 | core test |
| `INSTR_EXTEST` | 3'b010 | interconnect test |

Any other code acts as bypass. The two mode bits reach the PLL domain
through two-flop synchronisers. The instruction must stay stable while a test
runs.

## Top-level interface (`tgmf_wrapper`)

| port | dir | meaning |
|---|---|---|
| `clk_pll`, `rst_n` | in | PLL clock; asynchronous active-low reset for both domains |
| `tck`, `wsi`, `wso`, `select_wir`, `shift_wr`, `capture_wr`, `update_wr` | | serial port |
| `wpi[W_EXT]`, `wpo[W_EXT]` | in/out | parallel TAM, valid on `ft_en` |
| `ft_en` | out | TAM-cycle strobe |
| `tam_shift`, `tam_group` | out | shift phase in progress; group under test |
| `test_start`, `n_patterns` | in | start; patterns per group (same for every group) |
| `test_busy`, `test_done` | out | status |
| `vc_seg_si`, `vc_seg_so` | out/in | per VC, per chain: the core's internal scan segments |
| `vc_pi`, `vc_core_in`, `vc_core_out`, `vc_po` | | per VC functional pins through the boundary cells |
| `vc_clk_en`, `vc_scan_en` | out | per VC gated clock (enable of `clk_pll`) and scan enable |

## Simulating

Every testbench in `tb/` checks itself and ends with
`TB_RESULT checks=N failures=M`. With plain Verilator 5:

```
verilator --binary --timing --assert rtl/tgmf_pkg.sv tb/tb_tgmf_wrapper.sv \
          -y rtl -y tb --top-module tb_tgmf_wrapper -Mdir obj && obj/Vtb_tgmf_wrapper
```

Replace `tb_tgmf_wrapper` with any other `tb_<module>` to test one block.

`tb_tgmf_wrapper` runs the whole design at its default parameters. Each VC
is attached to `tb/vc_model.sv`, a behavioural stand-in for the core: its
internal scan segments use a made-up capture function, and its outputs are a
simple function of its inputs. The testbench then:
* checks the bypass path, instruction update and read-back, and that a test
  cannot start without the instruction;
* checks that the boundary cells are transparent in functional mode;
* runs three patterns per group and checks every WPO bit against its own
  reference model of every wrapper chain;
* checks per-VC shift counts, group-only clocking and core isolation during
  capture;
* checks two capture pulses per window at each VC's functional spacing, and
  the length of every group's shift phases;
* then loads `INSTR_EXTEST` and runs one pattern per group. Every WPO bit
  is checked again, now with the input cells capturing fixed pin values,
  and the wrapper pins are checked to follow the output cells.
It also counts each mechanism (every group, every shift rate, clock gating of
a finished VC, capture pairs, bit conversion at ratios above 1, interconnect
captures) and fails if one never occurs. It runs in a few seconds.

## Changing the configuration

A different schedule means new values for `VC_W`, `VC_DIVLOG`, `VC_GROUP`,
`VC_OFS`, `VC_LEN`, `VC_CDIV`, `VC_POW` and the `VC_NI/NB/NO` tables, plus
`N_VC`, `N_GROUPS`, `W_EXT`, `W_MAX`, `MAX_NI`, `MAX_NO` and `P_AVE`. Edit them
in `tgmf_pkg` or override them on `tgmf_wrapper`. The top rejects a schedule
at elaboration in any of these cases:
* its wire slices overlap or exceed `W_EXT`;
* its chains do not fit in `VC_LEN` shifts;
* a group exceeds `P_AVE`.

`T_DIV` sets the PLL-to-tester ratio, and `N_RATES` sets how many
`f_t / 2^k` rates exist. For example, `-GP_AVE=3000` is rejected, because
group 0 needs about 3558.

## Departures and own choices

* Clocks are enable strobes of one PLL clock (see above). There is no PLL
  model; the PLL's output is `clk_pll`.
* Shift frequencies are limited to `f_t / 2^k`, the trial set of the example
  (100 to 12.5 MHz). Capture frequencies are integer divisions of the PLL
  clock.
* The launch/capture pulse placement, the one-TAM-cycle settle before capture
  and the drain period after each shift phase are own choices.
* Every shift phase, including the final unload, shifts the full `VC_LEN`.
  All groups use the same pattern count. The example gives no pattern count,
  so it is a run-time input.
* The source's clock-control figure shows capture-FSM inputs `F_1 .. F_M`
  without explaining them. Here they are read as the VCs' capture
  frequencies, which are parameters (`VC_CDIV`).
* The example schedule prints 12.5 MHz for VC2. That makes group 0 longer
  (1208 TAM cycles per pattern) than its printed shelf height (6.89 µs).
  The printed frequency is used as given.
* Power scales linearly with shift rate, with the top trial rate `f_t` as
  the reference frequency. The power check happens only at elaboration.
* Boundary cells have no separate update stage: a cell's pin follows its
  scan flop while it shifts. Interconnect test therefore launches the
  last-shifted values, and the at-speed capture pair samples the pins.
  The cell roles in interconnect mode follow the usual IEEE 1500 practice;
  the mode itself is only named in the source.
* Instruction width, encodings and the bit-to-chain order inside a TAM frame
  are own choices.
* The offline schedule optimiser is software and is not part of this RTL.
