# Parallel data sorting with sorting networks

A sorting network sorts a fixed number N of values with a fixed pattern of
compare-and-swap elements. The pattern does not depend on the data, so every
comparison in one column of the network can run at once. That makes these
networks a natural fit for FPGAs. This library holds SystemVerilog for four
classic network types, plus a much smaller *iterative* sorter. The iterative
sorter reuses a single column pair of N-1 comparators through a feedback
register, and stops as soon as the data is in order. Around these sit two
board-level systems:

* a switch-driven demo of the combinational network on eight 7-segment digits;
* a lab system that loads 16 bytes from a ROM, sorts them with a start/done
  sorter, and shows the sort time on 16 LEDs and the result on the display.

Everything is plain synthesizable SystemVerilog with no vendor primitives. Each
block has a self-checking testbench.

## The compare-and-swap element and the ordering convention

`comparator` takes two unsigned M-bit operands. It gives the larger on
`max_value` and the smaller on `min_value`; equal operands leave in the order
they came. Every network here sends the larger value to the **lower wire
index**.

N items travel as one packed word, with item `i` in bits `[i*M +: M]`. After
sorting, **item 0 (the least significant slice) holds the largest value** and
item N-1 the smallest. Read as a hexadecimal number, a sorted word shows the
items in ascending order from left to right. For example, the eight 4-bit
items of `32'h9C3AFEDC` sort to `32'h39ACCDEF`.

## The four network types

All four are combinational. The largest value comes out on item 0.

| module            | network             | comparators C(N)            | depth D(N)   | N = 8 |
|-------------------|---------------------|-----------------------------|--------------|-------|
| `bubble_network`  | bubble / insertion  | N(N-1)/2                    | 2N-3         | 28 / 13 |
| `eot_network`     | even-odd transition | N(N-1)/2                    | N            | 28 / 8 |
| `oem_network`     | even-odd merge      | (p²-p+4)·2^(p-2) - 1, N=2^p | p(p+1)/2     | 19 / 6 |
| `bitonic_network` | bitonic merge       | (p²+p)·2^(p-2), N=2^p       | p(p+1)/2     | 24 / 6 |

* **Even-odd transition** (`eot_network`) is the most regular of the four. It
  chains N/2 copies of `eot_two_lines`. Each copy is an *even* line of N/2
  comparators on pairs (0,1), (2,3)… followed by an *odd* line of N/2-1
  comparators on pairs (1,2), (3,4)…. Items 0 and N-1 pass the odd line
  unchanged.
* **Bubble / insertion** (`bubble_network`): pass r compares neighbours
  (0,1)…(N-2-r, N-1-r). The passes overlap in a diagonal wave: comparator i of
  pass r sits at level 2r+i, which gives the 2N-3 depth.
* **Even-odd merge** (`oem_network`, Batcher) and **bitonic merge**
  (`bitonic_network`) use the standard constructions. They are described level
  by level with elaboration-time functions that give each wire's partner.

The last three export two localparams, `NUM_COMPARATORS` and `DEPTH`. These
are counted from the generated structure, not taken from a formula. The
testbenches check them against the formulas above for N = 8 and N = 16.

Merge networks are shallow, but their size grows quickly. Sorting 1,024 32-bit
items with the even-odd merge network takes 24,063 comparators. That is more
than three times the roughly 7,100 32-bit comparators that fit in a large
Virtex-7 (XC7VX1140T). This is the motivation for the iterative sorter below.

## Iterative even-odd transition sorter (`eo_iter_sorter`)

A hard-wired transition network spends N/2 copies of the same two comparator
lines. The iterative sorter keeps one copy (N-1 comparators) and feeds its
output back into a register:

```
 input_data ──► [ register ] ──► even line ──► odd line ──┐
                     ▲                                    │
                     └────────────────────────────────────┘
```

* `reset` high on a rising edge loads `input_data` in parallel and clears
  `ready`.
* Each later edge loads the output of the two lines.
* `ready` is a register. It is set when the two lines' output equals their
  input, that is, when no comparator swapped.

**Why "nothing changed" means "sorted".** Between them, the two lines compare
every neighbouring pair, (0,1), (1,2) … (N-2,N-1). Because a comparator swaps
only when strictly out of order, a pass that changes nothing found every
neighbour pair already in order. The whole word is then sorted.

**Timing.** Say the data needs k passes; k ≤ N/2, the depth of the full
network. Then `ready` rises on the (k+1)-th clock edge after `reset` falls.
Already sorted data gives `ready` after 1 clock. Reversed data gives it after
N/2 + 1 clocks. `sorted_data` always shows the register, and `ready` stays
high while the data stays sorted.

Defaults: N = 16 items of M = 8 bits, 15 comparators. The sorter also works for
any even N ≥ 4. At N = 8, M = 32 it is the configuration whose area (279 slices
of a Spartan-6) and clock (122 MHz) were compared with the combinational merge
networks (474 and 584 slices, both near 21 MHz). Those figures come from the
original measurement and were not reproduced here.

## Start/done sorter (`eo_iter_sorter_hls`)

This is the same algorithm behind a block-level handshake, in the style that
C-to-RTL tools generate (`ap_ctrl_hs`). Its ports are `ap_clk`, `ap_rst`,
`ap_start`, `ap_done`, `ap_idle`, `ap_ready`, the input word `input_data_v`
(plain wires, no handshake) and the result `ap_return`. Its structure is that
of the fully unrolled, II = 1 pipelined sort loop: one even plus one odd
comparator line per clock.

```
state   IDLE ─(ap_start)─► SORT ─(pass with no swap)─► DONE ─► IDLE
                            │  one pass per clock       │  (or SORT again if
                            └───────────────────────────┘   ap_start is still high)
```

* `ap_idle` is high only in IDLE.
* `ap_done` and `ap_ready` are the same one-clock pulse in DONE.
* The input is captured on the edge that leaves IDLE (or DONE). After that it
  may change.
* `ap_return` is a register. It is updated when the sort ends and holds until
  the next `ap_done`.
* Latency: `ap_done` rises on the (k+1)-th edge after the capture edge, for
  data that needs k passes. With N = 16 that is at most 9 edges.

Two assertions check the protocol: `ap_done` never comes with `ap_idle`, and
`ap_done` is never high on two clocks in a row.

## The lab system (`lab2_hls_system`)

```
 btnC (reset) ──┬──────────────┬──────────────┬─────────────┐
                ▼              ▼              ▼             ▼
        unroll_control ─addr1/addr2─► brom ─douta/doutb─► shift_reg_n ──128──► eo_iter_sorter_hls ──► display
            reg_wr ───────────────────────────────────────►  (en)                   ▲   │ap_done
 btnU ─► debouncer ─pulse─► start flag ─────────────────────────────────────────────┘   │
                              ▲  └──► count_up_n (enable; pulse = clear) ─► led[15:0]   │
                              └──────────────────── cleared by ap_done ◄────────────────┘
```

1. **Load.** After `btnC` is released, `unroll_control` walks INIT, then
   READ/WRITE eight times, then FINISH. In READ it presents ROM addresses
   `{pair,0}` and `{pair,1}` to both ports of the 16 × 8 `brom`. The ROM has
   one clock of read latency, so its data is valid in WRITE. There `reg_wr`
   shifts the two bytes into the 128-bit `shift_reg_n`. The load ends 17
   clocks after reset. ROM byte `a` ends up as item `15-a`, so the first byte
   read sits in the most significant slice.
2. **Start.** `btnU` goes through `debouncer`: a two-flop synchronizer, then a
   level that must hold for `DEBOUNCE_CYCLES` clocks (10 ms by default). It
   gives a single one-clock pulse per press. The pulse clears the cycle
   counter, and on the next edge it sets the start flag.
3. **Sort and count.** The start flag drives `ap_start` and the counter's
   enable. `ap_done` clears it. The LEDs therefore show the sort time in
   clocks, which is k + 3: the set-up clock, the capture, the k passes and the
   final no-swap pass. The ROM contents in `sort_pkg` need 6 passes, so the
   LEDs show 9.
4. **Display.** The top 32 bits of the result, i.e. the four smallest bytes,
   appear on the eight digits, smallest on the left. For the ROM contents in
   `sort_pkg` the display reads `030D1926`.

`btnC` drives every reset in the system directly.

## The network demo (`top_eotn`)

This demo sorts eight 4-bit values with `eot_network` (M = 4, p = 3). The test
word is `{sw, 16'hFEDC}` while `btn_c` is released and `{16'h1234, sw}` while
it is pressed. Eight `bin7seg_decoder`s turn the result nibbles into patterns,
and `seg_ctrl` scans them onto the display: nibble 7 on the leftmost digit,
nibble 0 on the rightmost. `seg_ctrl` lights each digit for
2^(CNT_W-3) clocks (1.3 ms at 100 MHz). Cathodes and anodes are active low.

## Top level (`pdp_top`)

The top places the independent designs side by side. They share only `clk`.

| ports                                   | design                                   |
|-----------------------------------------|------------------------------------------|
| `btnC`, `btnU`, `led`, `seg`, `an`      | lab system                               |
| `eotn_btnC`, `eotn_sw`, `eotn_seg`, `eotn_an` | network demo                       |
| `iter_reset`, `iter_input`, `iter_ready`, `iter_sorted` | iterative sorter (ITER_N × ITER_M) |
| `bubble_in/out`, `oem_in/out`, `bitonic_in/out` | the other three networks, 2^NET_P × NET_M |

| parameter         | default   | meaning                                   |
|-------------------|-----------|-------------------------------------------|
| `ITER_M`, `ITER_N`| 8, 16     | item width and count of the iterative sorter |
| `DEBOUNCE_CYCLES` | 1,000,000 | button filter time in clocks              |
| `SCAN_CNT_W`      | 20        | display scan counter width                |
| `NET_M`, `NET_P`  | 32, 3     | item width and log2 item count of the three networks |

The lab system's 16 × 8 size is fixed in `sort_pkg` (`LAB_M`, `LAB_N`) and by
its 16-entry ROM.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=F` and ends with
`$finish`. Each has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_pdp_top \
          -y rtl -y tb +libext+.sv -Irtl rtl/sort_pkg.sv tb/tb_pdp_top.sv
./obj_dir/Vtb_pdp_top
```

Replace `tb_pdp_top` with any other testbench in `tb/`. `rtl/sort_pkg.sv` must
always come first on the command line.

* `tb_pdp_top` runs the whole top at its default sizes: 10 ms debounce and full
  display frames, about 7 s of Verilator time. It covers a bouncing press, a
  rejected short press, the ROM load, the LED count and display contents, both
  demo modes, and iterative sorts from best case to worst case. It also sorts
  random words with the three other networks. It counts how often each
  mechanism happened and fails if one never did.
* Block testbenches include:
  * an exhaustive test of the 4-bit comparator;
  * all 256 0/1 inputs for each 8-input network, which is a full proof by the
    0-1 principle;
  * clock-exact latency checks against a pass-counting model for both
    iterative sorters, plus an 8 × 32-bit instance of `eo_iter_sorter` (the
    size of the published area comparison);
  * protocol checks for the handshake;
  * debounce timing;
  * the loader's address sequence;
  * the ROM contents.

  Several testbenches shrink the filter and scan times to keep runs short.

## Choices made in this implementation

The algorithms, the structure of the comparator lines, the iterative sorter,
the loader state machine, the unrolled register and the start/counter logic
follow the original lecture design. The following are this implementation's
own choices:

* **Network wiring.** Bubble, even-odd merge and bitonic networks use the
  standard textbook wiring. Their comparator counts and depths match the
  published formulas, which the testbenches confirm.
* **`eot_two_lines` size parameter.** It is sized by N rather than by
  p = log2 N, so the iterative sorters can share it.
* **Handshake details** of `eo_iter_sorter_hls`: the state encoding, the held
  `ap_return` register and the restart when `ap_start` is held high. The
  variant with rolled loops (one comparator per clock and about 34 clocks per
  pass) is not provided; only the unrolled, one-pass-per-clock form is.
* **Lab system.**
  * `debouncer`, `seg_ctrl`, `bin7seg_decoder` and `count_up_n` are known only
    by name and ports. They are the simplest circuits that do the job.
  * The ROM contents are a 16-byte vector of this library (`sort_pkg::ROM_DATA`).
  * The ROM has a one-clock read latency.
  * The display shows the most significant 32 bits of the result.
  * `btnC` is used as reset without a synchronizer.
* **Display conventions.** Segment bit order is a = bit 0, active low. Anode 7
  is the leftmost digit.
* **Not included.** The host-PC/USB link used for the original area
  measurements is not part of this library. The slice counts and clock rates
  quoted above have not been reproduced.

Lint notes: `unroll_control` has two output bits that are constant by
construction (`addr1[0] = 0`, `addr2[0] = 1`). The lab system uses only the
top 32 bits of the sorted word, for its display.
