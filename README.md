# Concurrent BIST for a ROM, with a parity error detector

A ROM can be tested exhaustively by reading every word once and checking the
results. Taking the ROM offline to do that costs system performance. This
design tests the ROM *while the system is using it*. It watches the addresses
that the system applies anyway. The first time each address appears, it
captures the ROM's answer into a signature. Once every address has been seen,
the signature is checked against the fault-free value. A test mode is also
provided, in which the BIST logic drives the ROM itself and finishes the test
in a few dozen clocks.

The scheme is an input-vector-monitoring concurrent BIST. It follows the
"modified SRAM-based BIST" of D. Ramachandran and D. Jose, *Design and
Implementation of an Efficient BIST Architecture for ROM*, IJIRCCE 4(6), 2016.
That scheme builds on the SRAM-cell monitoring scheme of Voyiatzis and
Efstathiou (IEEE TVLSI 22(7), 2014). The scheme's main saving is that the BIST
unit has no address decoder of its own. It reads the ROM's own predecoder
lines to find which of its tracking cells to use. A separate, simpler check
also runs: every ROM word carries a parity bit, and the error detector flags,
word by word, any word whose parity is wrong.

The default size is a 32-word × 5-bit ROM (n = 5 address bits, m = 5 data
bits), watched in windows of 8 addresses (w = 3, k = 2).

## Structure

```
              a[n:1] ─┐
                      ├─ input_mux ── d[n:1] ──────────────┬──────────────┐
   tg[n:1] ───────────┘   (tn | init)                      │              │
      ▲                                          ┌─────────▼──────────┐   │ d[n:w+1]
      │                                          │ rom_array          │   │
      │                                          │  two_level_decoder │   │
      │         ┌──── d_lo[2**w:1] (predecoder) ─┤  (2-to-4, 3-to-8,  │   │
      │         │                                │   32 AND gates)    │   │
      │         │                                │  rows {parity,data}│   │
      │         │                                └──┬──────────┬──────┘   │
      │  ┌──────▼─────────── cbu ───────────────┐   │ out[m:1] │ cell_out │
      │  │ logic_module  ◄── cmp ── comparator ◄┼───┼──────────┼──────────┘
      └──┤ (cells, T, counter) tge ─► test_gen. │   │          │
         └────────────┬─────────────────────────┘   │          ▼
                      │ rve                         │    error_detector ─► error_data
                      ▼                             ▼
                 response_verifier ◄────────────────┘ ─► signature, rv_pass
```

| Module | Role |
|---|---|
| `rom_bist_top` | Wires everything together; the only module with plain-signal ports for system use. |
| `input_mux` | Selects the ROM address: normal input `a`, or the BIST test vector `tg` in test mode and during initialisation. |
| `rom_array` | The ROM under test: the two-level decoder plus 2**n rows of {parity, m data bits}. Exposes the low predecoder lines `d_lo` and every row (`cell_out`). |
| `two_level_decoder` | n-to-2**n decoder made of a k-to-2**k and a w-to-2**w predecoder and one AND gate per word. |
| `cbu` | Concurrent BIST unit: `test_generator`, `comparator` and `logic_module`. |
| `test_generator` | k-bit register holding the number of the window being examined. |
| `comparator` | `cmp` = the high address bits equal the window number. |
| `logic_module` | Remembers which addresses of the current window have already been seen, raises `rve` on first sightings and detects a full window. |
| `response_verifier` | Order-independent signature: the sum of all captured ROM outputs. |
| `error_detector` | Parity check of every row at once, one error bit per word. |
| `bist_pkg` | Default sizes and the T/N mode enum. |

## Windows, and how the cells track them

Remembering every address of a large ROM would take one bit per word. The
scheme remembers only a *window* of W = 2**w consecutive addresses at a
time. The k high-order address bits say which window an address belongs to.
The test generator holds the number of the window being examined. When the
comparator sees the high bits equal that number, the address is "in the
window", and its w low bits pick one of W cells in the logic module.

Those W cells are selected by the ROM's own low-order predecoder outputs
(`d_lo`, one-hot). Because the ROM decoder is split at the same bit position
as the window, the 3-to-8 predecoder inside the ROM is exactly the decoder
the logic module needs.

Each cycle the addressed cell is read. Its meaning depends on the toggle
flip-flop T:

* In an odd-numbered window (T = 0), a cell holding 0 means "not yet seen".
  A **hit** is an in-window address whose cell is 0. The hit raises `rve`,
  advances the hit counter, and writes 1 into the cell.
* In an even-numbered window (T = 1), the roles swap. A cell holding 1 means
  "not yet seen", and a hit writes 0.
* An in-window address whose cell already differs from T is a **repeat**. It
  causes no `rve` and no write. An address outside the window is ignored.

When the w-bit hit counter overflows, all W cells have been hit. At that
point every cell holds NOT T. The overflow is delayed by one flip-flop and
becomes `tge`. During the `tge` cycle no hit is accepted. At the end of that
cycle the test generator steps to the next window and T toggles. The cells,
all equal to the old NOT T, now all read "not yet seen" for the new window.
So the cells never need to be cleared between windows. This is the point of
the odd/even scheme.

After the last of the 2**k windows, every ROM address has been read once.
The `tge` of that last window is `test_done`. On `test_done` the response
verifier latches its sum into `signature`, sets `rv_pass` if the sum equals
the fault-free value, and starts again from zero. The BIST then wraps to
window 0 and begins the next round, with no gap.

### Cycle-level timing

* `d`, `out`, `cmp` and `rve` are combinational in the cycle the address is
  applied. The cell write, counter step, RV capture and every status flag
  take effect on the rising clock edge.
* The original circuit reads the cell in one half of the clock and writes it
  in the other. This RTL reads combinationally and writes at the edge, which
  behaves the same and uses a single clock edge.
* A window that sees its last new address in cycle t has `tge` high in cycle
  t+1. The new window starts in cycle t+2.

### Reset and initialisation

`rst` is synchronous and active high. It clears T, the counter, the window
number and the RV. The cells are cleared afterwards by a sweep of W cycles
with `init` high. During the sweep the BIST drives `tg` into the ROM, and
each cell, addressed through the ROM predecoder, is written with 0. The
normal inputs are ignored for those W cycles, so the system should not rely
on ROM reads until `init` falls. While `rst` is high, `tge` is also high, as
in the original logic.

### Test mode (`tn` = 1)

The ROM address becomes `tg = {window number, counter}`. The counter
advances every cycle except the `tge` cycle, so each window is swept in W
cycles plus one. From reset, a complete test takes W + 2**n + 2**k clocks:
`test_done` is high in cycle 8 + 32 + 4 − 1 = 43 after `rst` falls. The
testbench checks this count.

**Limitation.** In normal mode the counter counts hits. In test mode it is
the address. Both meanings agree only if test mode starts at a window
boundary. Switching normal → test in the middle of a window makes the sweep
start at the current hit count. Addresses of that window below that value
which had not been seen are then skipped, and that round's signature fails.
Enter test mode in the cycle where `tge` is high, or right after reset.
Switching test → normal at any time is safe.

## Response verifier

The order in which addresses hit depends on the system's traffic, so the
signature must not depend on order. A MISR would, so this design adds the
captured words instead. The accumulator is m + n bits wide, so the sum of all
2**n words cannot wrap. With the default content (word j holds j) the
fault-free signature is 0 + 1 + … + 31 = 496. Narrower accumulators hide
faults: a bit stuck in one column of the ROM changes 16 words by the same
amount, which cancels modulo 2**m for every bit but the lowest.

## Error detector

Every row stores m data bits and a parity bit as its MSB. The default parity
is odd: the row holds an odd number of ones. Set `ODD_PARITY = 0` for even
parity. The detector XORs each row in parallel and compares the result with
the parity kind. `error_data[j]` is 1 when word j is corrupted, so the bit
position locates the bad word. For a fault-free ROM the result is all zeros.
This check reads the stored rows directly. It is independent of the
concurrent BIST and needs no clock.
Because the ROM content is a parameter, synthesis folds `error_data` to a
constant for a given image. It is not constant in a physical ROM, where a
defect changes a stored row. To exercise it in simulation, give `ROM_DATA`
a value that differs from `EXPECT_DATA`.

## Parameters of `rom_bist_top`

| Parameter | Default | Meaning |
|---|---|---|
| `N` | 5 | ROM address bits (n); 2**N words |
| `W_BITS` | 3 | address bits per window (w); W = 2**W_BITS cells; k = N − W_BITS |
| `M` | 5 | ROM data bits (m) |
| `ODD_PARITY` | 1 | 1 odd, 0 even parity |
| `EXPECT_DATA` | word j = j | the intended content; the parity bits and the RV reference are computed from it |
| `ROM_DATA` | `EXPECT_DATA` | the content actually stored; set it differently to model a faulty ROM |

Word j occupies bits `[j*M +: M]` of the two data parameters.

## Ports of `rom_bist_top`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `tn` | in | 1 | T/N: 0 normal, 1 test |
| `a` | in | N | normal address |
| `out` | out | M | ROM data (combinational from the applied address) |
| `d` | out | N | address actually applied to the ROM |
| `tg` | out | N | BIST test vector |
| `rve` | out | 1 | this cycle's ROM output is captured (first sighting) |
| `tge` | out | 1 | window complete (also high in reset) |
| `init` | out | 1 | cell-clearing sweep after reset; the ROM is owned by the BIST |
| `t_even` | out | 1 | an even-numbered window is being examined |
| `test_done` | out | 1 | one-cycle pulse: every address has been read once |
| `signature` | out | M+N | last examined signature |
| `rv_done`, `rv_pass` | out | 1 | a signature has been examined / it was fault-free |
| `error_data` | out | 2**N | per-word parity error |
| `error_any` | out | 1 | OR of `error_data` |

## What follows the published scheme, and what is this design's own

Taken from the scheme:

* the window split of the address
* the comparator and test generator
* reuse of the ROM's predecoder by the BIST cells
* the cell / T flip-flop / counter structure and the hit rule for odd and even windows
* `tge` one flip-flop after the counter overflow
* the OR of reset into `tge`
* the two-level 5-to-32 decoder
* the multiplexer in front of the ROM
* a parity bit as the MSB of each word
* a 32-bit per-word error vector that is zero for a good ROM

Chosen here, because the description leaves them open:

* single-edge timing, with a combinational read and a write at the edge
* the W-cycle clearing sweep after reset and the `init` flag
* T toggling together with the test generator, at the end of the `tge` cycle
* the behaviour of the counter in test mode, and the limitation above
* a binary-count test generator
* an adder as the order-independent response verifier, m + n bits wide
* `test_done`, `signature` and `rv_pass` as the way the result is presented
* the default ROM content, word j = j
* odd parity as the default

The SRAM-like cells, bit lines and sense amplifier of the original are
modelled at bit level: the cells are flip-flops and the read is a one-hot OR.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=… failures=…`.

| Testbench | What it checks |
|---|---|
| `tb_input_mux`, `tb_comparator`, `tb_two_level_decoder`, `tb_rom_array`, `tb_error_detector` | Exhaustive or randomised checks against directly computed values. For the error detector: single-bit faults in random images under both parities. |
| `tb_test_generator`, `tb_response_verifier` | The count sequence and `test_done`. The signature and pass flag under random traffic, and order independence with the 32 words in shuffled order. |
| `tb_logic_module`, `tb_cbu` | Cycle-by-cycle comparison with a behavioural reference (`tb/bist_ref_pkg.sv`). The reference models a window as a set of visited addresses rather than cells and T. Also checks the length of the reset sweep and of a full test-mode run. |
| `tb_rom_bist_top` | The whole design at its default size over 20,000 cycles. It compares the address, ROM output, `rve`, `tge`, `init` and `test_done` with the reference, checks every signature, and counts each mechanism. Every mechanism must occur: hit, repeat, out-of-window, window completion, even window, test-mode hit, both mode switches, and end of test in both modes. |
| `tb_rom_bist_top_fault` | A ROM whose word 13 reads 9. The error detector flags exactly word 13, the signature is 492 and `rv_pass` stays low. A fault-free copy passes alongside. |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/bist_pkg.sv tb/bist_ref_pkg.sv tb/tb_rom_bist_top.sv \
    --top-module tb_rom_bist_top -o sim
./obj_dir/sim
```

Put `rtl/bist_pkg.sv`, and `tb/bist_ref_pkg.sv` where it is used, ahead of the
testbench. Every testbench finishes in well under a second.

All RTL is synthesizable. With the default sizes the whole design is about
140 word-level cells and 38 flip-flops, plus the ROM contents held as
constants.
