# Octet-parallel ATM cell delineation with a recursive HEC syndrome

An ATM receiver gets an unframed stream of octets and has to find where
cells begin. The only marker is the header CRC: the fifth octet of every
5-octet header (the HEC) is chosen so that the whole 40-bit header is
divisible by g(x) = x^8 + x^2 + x + 1. A receiver that has lost alignment
therefore tests *every* octet position: "do the last five octets divide by
g(x)?" Once a header is found it only needs to test one position per
53-octet cell.

Testing every position at one octet per clock is the hard part. A normal
CRC circuit computes the remainder of everything it has seen since it was
cleared; here the window slides by one octet per clock. This design keeps a
single 8-bit syndrome register and, per octet, multiplies it by x^8, adds
the new octet, and subtracts the contribution of the octet that just left
the window (multiplied by x^40). Two small XOR networks do the whole job,
independent of window length.

The RTL contains:

* the receive path (`cdsb_rx`): recursive syndrome generator, HUNT /
  PRESYNC / SYNC delineation state machine, single-bit header correction,
  payload descrambler;
* the transmit path (`cdsb_tx`): HEC generator and payload scrambler;
* two alternative sliding-window syndrome generators ("Direct" and
  "Successive") that compute the same value with more hardware, wired to
  the received stream for comparison;
* a top (`atm_tc_top`) with the two paths side by side.

All of it is plain synthesizable SystemVerilog, one octet per clock. At the
SDH STM-1 rate of 155.52 Mb/s that is a 19.44 MHz octet clock.

## Conventions

An octet is `d7..d0`; `d7` is the first bit on the line and the highest
power of x. A header `[B1 B2 B3 B4 B5]`, `B1` first, is the polynomial of
degree 39 with `d7` of `B1` as the coefficient of x^39. "Syndrome" means
remainder modulo g(x). R[p] is the remainder of p.

All XOR networks come from one helper. `atm_hec_pkg::rem_xn(n)` returns
R[x^n]. The network for R[x^N B] is the XOR of the columns R[x^(N+j)]
selected by the bits `d_j` of B. `gf_mul_xn #(N)` builds that network at
elaboration. For N = 8 it gives

```
s0' = s0^s6^s7        s4' = s2^s3^s4
s1' = s0^s1^s6        s5' = s3^s4^s5
s2' = s0^s1^s2^s6     s6' = s4^s5^s6
s3' = s1^s2^s3^s7     s7' = s5^s6^s7
```

The testbench compares the x^0, x^8, x^16, x^24, x^32 and x^40 networks
bit by bit with hand-written tables.

## The three syndrome generators

Each one outputs the syndrome of the last five octets received.

| module | structure | networks | registers |
|---|---|---|---|
| `direct_syndrome` | 5-octet buffer; octet *i* from the newest goes through x^(8i); 5-input XOR | x^8, x^16, x^24, x^32 (all different) | 40 |
| `successive_syndrome` | chain of 5 subsyndrome registers with an x^8 network between neighbours; 5-input XOR | 4 × x^8 (identical) | 40 |
| `recursive_syndrome` | one syndrome register with x^8 feedback, plus x^40 removal of the oldest octet | x^8, x^40 | 8 + 8, plus a 40-bit data delay line the receiver needs anyway |

Direct and Successive grow linearly with the window length and end in a
wide XOR sum. Recursive does not grow with the window. Its only feedback
path is x^8 → XOR → XOR → 2:1 mux.

### Recursive generator in detail

```
A  = R[x^8 S] xor B_new                 plain update     (sub = 0)
B' = A xor R[x^40 B_old]                sliding update   (sub = 1)
S <= sub ? B' : A                       when en (SYN-EN) is high
```

`clr` forces the x^8 feedback to zero, so the register restarts from the
new octet. This is the "clear before the first octet" step of a
cell-by-cell check. `B_old` is the octet that entered five clocks earlier.
The product R[x^40 B_old] is registered one clock ahead, from the fourth
stage of the delay line, which keeps the x^40 network off the feedback
path. Why the subtraction works:

R[B2..B6] = R[B1..B6] − R[B1·x^40] and, over GF(2), − is XOR.

The delay line's output `dout` is the first octet of the window the
register currently covers. When the syndrome is zero, `dout` is the first
header octet. That is how the receiver lines its outputs up with cells.

Sliding is valid only once the register really holds the five-octet
syndrome. The controller therefore clears on the first octet after reset,
does four plain updates, and only then starts sliding.

## Receiver (`cdsb_rx`)

```
rx_data ─► recursive_syndrome ──dout──► XOR ◄── error_pattern ◄── syndrome
              ▲      │ syndrome          │
              │      ▼                   ▼
         delineation_ctrl ──scr_en──► ssc_scrambler (descramble) ─► rx_data_o
```

### State machine (`delineation_ctrl`)

* **HUNT**: the syndrome is checked every octet (ERR-DETECT high every
  cycle). A nonzero result raises ERR and HERR. A zero result means a
  header starts at `dout`. CELL-SYNC is raised and the state moves to
  PRESYNC.
* **PRESYNC / SYNC**: the state machine tracks the position of `dout`
  within the cell. SYN-EN is high only for the five octets of the next
  expected header, with a clear on the first. The result is checked once,
  when that header's first octet reaches `dout`. The register then holds
  its value for the rest of the cell.
* Transitions: HUNT → PRESYNC on a zero syndrome. PRESYNC → HUNT on a
  nonzero one. PRESYNC → SYNC after DELTA = 6 consecutive zero syndromes
  (the one found in HUNT does not count). SYNC → HUNT after ALPHA = 7
  consecutive nonzero syndromes.
* When the state falls back to HUNT, the check cycle itself performs a
  sliding update. Hunting therefore continues at the window starting one
  octet after the failed header, with no refill.

### Header correction

For the five header octets after a cell-by-cell check, `error_pattern`
compares the syndrome with the 40 syndromes of single-bit errors,
R[x^p]. The bit at position p = 8·(4−k) + b belongs to header octet k,
bit b. These 40 values are all different, so a single-bit error is
located exactly. The matching bit is flipped as the octet leaves the
delay line. Any other nonzero syndrome leaves the header unchanged. In
HUNT nothing is corrected, because only a zero syndrome ends HUNT.

A corrected header still counts as a *bad* HEC for the state machine.

### Payload descrambling

`ssc_scrambler` with `DESCRAMBLE = 1` undoes the self-synchronous
x^43 + 1 scrambler, eight bits per clock, as a(t) = c(t) ⊕ c(t−43).
Descrambling is on only for payload octets (positions 5..52) in PRESYNC
and SYNC. Header octets bypass it and do not enter its history.
Descramble errors after a resync die out after 43 payload bits.

### Receiver timing

An octet sampled at clock edge *t* appears on `rx_data_o` after edge
*t+5*. Every flag refers to the octet on `rx_data_o` in the same cycle:

| output | meaning |
|---|---|
| `rx_cell_sync_o` | CELL-SYNC: first header octet (found in HUNT, or checked in PRESYNC/SYNC) |
| `rx_hdr_o` | one of the five header octets |
| `rx_payload_o` | descrambled payload octet |
| `rx_corr_o` | this octet had a bit corrected |
| `rx_err_detect_o`, `rx_err_o`, `rx_herr_o` | ERR-DETECT, ERR, HERR |
| `rx_syn_en_o`, `rx_dec_en_o` | SYN-EN and DEC-EN (header decode window) |
| `rx_state_o` | `ST_HUNT`, `ST_PRESYNC`, `ST_SYNC` |
| `ev_found_o`, `ev_lost_o`, `ev_sync_o` | one-cycle event pulses |

ERR, HERR and ERR-DETECT are all decided in the same cycle. They do not
fall one after another.

## Transmitter (`cdsb_tx`)

`hec_generator` runs the same recursive update, S ← R[x^8 S] ⊕ B, over
header octets 1–4. In the fifth octet slot it outputs R[x^8 S], which is
the HEC. `ssc_scrambler` (`DESCRAMBLE = 0`) then scrambles the payload
octets only. `tx_sop` marks the first octet of a cell and is needed only
once, because positions free-run modulo 53. Output latency is one clock.

## Parameters

| parameter | default | where |
|---|---|---|
| `CELL_LEN` | 53 octets | `atm_tc_top`, `cdsb_rx`, `cdsb_tx`, `delineation_ctrl`, `hec_generator` |
| `ALPHA_N` | 7 | `atm_tc_top`, `cdsb_rx`, `delineation_ctrl` |
| `DELTA_N` | 6 | `atm_tc_top`, `cdsb_rx`, `delineation_ctrl` |
| `TAP` | 43 | scrambler polynomial x^TAP + 1 |
| `N` | 8 | power of x in `gf_mul_xn` |
| `WIN` | 5 octets | window of `direct_syndrome`, `successive_syndrome`, `recursive_syndrome` |

The header length (5) and g(x) are package constants in `atm_hec_pkg`.
`WIN` lets the three syndrome generators cover CRC blocks longer than a
header. Recursive then uses an x^(8·WIN) removal network and a WIN-octet
delay line and is otherwise unchanged. The receiver itself always uses
the 5-octet header.

## Departures and design choices

These behaviours come from this implementation, not from the original
design description:

* 53-octet cells.
* Asynchronous active-low reset to zero.
* The `clr` input of the syndrome generator.
* The x^40 register tapped from the fourth delay stage.
* Resuming the hunt without a refill.
* DELTA counted in PRESYNC only.
* A corrected header counts as a bad HEC.
* A one-clock output register in the receiver.
* The meaning given to DEC-EN.
* The sop-based framing of the transmitter.
* The placement of the descrambler after the correction.

Other points to know:

* **No HEC coset.** ATM as standardised adds the coset 01010101 to the HEC.
  This design does not. An all-zero octet stream therefore looks like
  valid headers to the receiver. If you need the coset, XOR it in
  `hec_generator` and before the zero test in `delineation_ctrl`.
* **Miscorrection.** A double error whose syndrome happens to equal a
  single-bit syndrome is "corrected" wrongly. There is no separate
  detection-only mode in SYNC.
* **Physical layer.** The STM-1 framer and line interface that deliver the
  octets are outside this RTL. The stream is assumed to be continuous, one
  octet per clock, with no valid/gap signal.
* **Timing.** No timing analysis was run. The logic depth is a few XOR
  levels, so 19.44 MHz is not a concern in any technology.

## Files

`rtl/`: `atm_hec_pkg` (constants, state type, R[x^n] functions),
`gf_mul_xn`, `direct_syndrome`, `successive_syndrome`,
`recursive_syndrome`, `error_pattern`, `delineation_ctrl`,
`ssc_scrambler`, `hec_generator`, `cdsb_tx`, `cdsb_rx`, `atm_tc_top`.

`tb/`: one self-checking testbench per module (`tb_<module>.sv`).
`tb_ref_pkg` holds the independent reference models: bit-serial long
division by g(x) and a bit-serial x^43 + 1 scrambler. Every testbench
prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_delineation_ctrl` plays a scripted scenario: find, SYNC, six bad
  headers tolerated, seventh loses SYNC, loss in PRESYNC, resync. It
  checks the exact cells at which each transition happens.
* `tb_cdsb_rx` checks single-bit correction at random positions, ERR on
  damaged headers and payload descrambling.
* `tb_atm_tc_top` loops the transmitter into the receiver through a
  channel that injects garbage and header errors, at the default sizes.
  It counts every mechanism: HUNT misses, find, SYNC, loss from SYNC and
  from PRESYNC, correction, uncorrectable header and payload delivery.
  Each must occur at least once.
* `tb_stm1_workload` runs one millisecond of STM-1 line time, 19,440
  octet clocks, from transmitter to receiver. It checks that cells keep
  arriving at one octet per clock with a CELL-SYNC every 53 clocks and
  none lost. While the receiver hunts, it also checks that the Recursive,
  Direct and Successive syndromes agree on every clock.

To simulate, for example the end-to-end test (the `-y` search paths let
verilator find every module from its file name):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/atm_hec_pkg.sv tb/tb_ref_pkg.sv tb/tb_atm_tc_top.sv --top-module tb_atm_tc_top
./obj_dir/Vtb_atm_tc_top
```

Replace `tb_atm_tc_top` with any other testbench name to run that one.
Each testbench finishes in well under a second.
