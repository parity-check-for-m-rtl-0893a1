# Parity correction for 1-of-n delay-insensitive links

Asynchronous (quasi-delay-insensitive, QDI) networks on chip move data as
m-of-n codewords: each group of wires carries a symbol by raising exactly m of
its n wires, with an all-zero *spacer* between symbols (four-phase
return-to-zero handshake). The code detects on its own a codeword with too many
or too few wires high, but it cannot say which wire is wrong, and one wrong
wire can corrupt several binary bits. A particle strike on a C-element of the
link most often leaves one extra wire high in one codeword: an *invalid
codeword*, which this README calls an ICD (m+1 of n wires high). Less often it
produces a *valid but wrong* codeword (VCD): one wire lost and another gained,
so the word is still a legal m-of-n word.

This RTL adds forward error correction around such a link. The sending side
computes a parity bit for every **wire position** over all the codewords of a
flit, and sends that parity vector as a few extra codewords. The receiving
side then has a product code:

* the unordered code finds the **row**: the invalid codeword;
* the parity finds the **column**: the wire whose parity no longer matches.

Clearing that wire in that row restores the flit. Every single extra-wire
error is corrected. A valid-but-wrong codeword cannot be located, but it
still upsets the parity, so it is detected and reported. The synchronous
sides see plain binary words and a status.

The default configuration is the 32-bit flit of a 1-of-4 network: 16 data
codewords plus 2 parity codewords per flit.

## The codeword matrix

A k-bit word is cut into groups of log2(n) bits, least significant first.
Group r becomes codeword r (row r). A group with value v raises wire v. For
1-of-4 this gives:

| value | wires A3 A2 A1 A0 |
|-------|-------------------|
| spacer| 0 0 0 0 |
| 00    | 0 0 0 1 |
| 01    | 0 0 1 0 |
| 10    | 0 1 0 0 |
| 11    | 1 0 0 0 |

Take the 16-bit word `0111100110111100`. Its pairs, lowest first, are
00 11 11 10 01 10 11 01, so the rows are:

```
row  A3 A2 A1 A0
 0    0  0  0  1
 1    1  0  0  0
 2    1  0  0  0
 3    0  1  0  0
 4    0  0  1  0
 5    0  1  0  0
 6    1  0  0  0
 7    0  0  1  0
----------------
P     1  0  0  1     column XOR
```

The parity vector P is an n-bit binary word. It is encoded like data, lowest
group first. P = 1001 gives the groups 01 and 10, so rows 8 and 9 are `0010`
and `0100`. Rows 0 to 9 together form the **extended flit**.

Sizes are `DCW = ceil(DATA_W / log2 n)` data rows and
`PCW = ceil(n / log2 n)` parity rows. The parity overhead depends only on n,
not on the flit width. These sizes are computed in `mofn_parity_pkg`.

## Decoding and correction

The decoder splits the extended flit into data rows and parity rows. It
decodes the transmitted parity P_tx from the parity rows, and recomputes
P_calc from the received data rows. The **syndrome** is P_tx XOR P_calc. It
marks the wire positions whose column parity is wrong. Then:

1. **Parity codewords invalid.** A parity row has other than one wire high.
   With at most one error per flit, the error is in the parity, so the data
   rows are delivered as they are. If a data row is invalid as well, there are
   two errors and the flit is reported *uncorrectable*.
2. **Parity codewords valid.** Every data row with other than one wire high is
   repaired: the wires marked in the syndrome are cleared (`wire AND NOT
   syndrome`). A wire is never set, only cleared. Several invalid rows are
   repaired together if their extra wires lie in different columns, and no
   extra wire shares a column with another row's correct wire.
3. **Final check.** Every repaired row must be a valid codeword, and the
   parity of the repaired rows must equal P_tx. If not, the flit is reported
   *uncorrectable*. This catches a valid-but-wrong codeword: it leaves a
   non-zero syndrome but no invalid row. It also catches a lost wire, which
   clearing cannot undo.

Worked case (8-bit flit, 4 data rows). The received rows are 1000, 1000,
**0110**, 0100. The parity rows decode to P_tx = 0110. The received rows give
P_calc = 0010, so the syndrome is 0100. Row 2 is invalid; clearing A2 gives
0010, and the final check passes.

| link error in one flit              | data delivered | status                      |
|-------------------------------------|----------------|-----------------------------|
| none                                | correct        | all clear                   |
| extra wire in one data codeword     | correct        | `corrected`, `data_cw_err`  |
| extra wires in two data codewords, different columns | correct | `corrected`, `data_cw_err` |
| extra wire in a parity codeword     | correct        | `parity_cw_err`             |
| valid but wrong data codeword       | wrong          | `uncorrectable`             |
| data codeword with its wire lost    | wrong          | `uncorrectable`, `data_cw_err` |
| extra wire in parity and in data    | wrong          | `uncorrectable`, both `_err` |

The status is a packed struct, `mofn_parity_pkg::dec_status_t`:
`{corrected, uncorrectable, data_cw_err, parity_cw_err}`. `uncorrectable` is
the signal to act on, for example by requesting a retransmission.

## Blocks

```
parity_top
├── parity_encoder        (sender clock)
│   ├── di_conversion        data word  -> DCW codewords
│   ├── parity_calculation   column XOR
│   └── di_conversion        parity     -> PCW codewords
└── parity_decoder        (receiver clock)
    ├── parity_extraction    split rows, decode P_tx, check parity rows
    │   └── binary_conversion
    ├── parity_calculation   P_calc from the received data rows
    ├── parity_correction    syndrome, row isolation, clear, final check
    └── binary_conversion    repaired rows -> data word
```

Each file in `rtl/` holds one module or package and opens with a description
of what the module does and of its timing.

### Interfaces and timing

`parity_top` puts the two halves side by side. They are joined only through
the network, and the network is not part of this RTL:

* sender domain: `tx_clk`, `tx_rst_n`, `tx_valid/tx_ready/tx_data` in,
  `noc_tx_valid/noc_tx_ready/noc_tx_flit` out;
* receiver domain: `rx_clk`, `rx_rst_n`,
  `noc_rx_valid/noc_rx_ready/noc_rx_flit` in,
  `rx_valid/rx_ready/rx_data/rx_status` out.

`noc_*_flit` is `logic [DCW+PCW-1:0][N_WIRES-1:0]`, row 0 first. For the
defaults that is 18 codewords of 4 wires.

All handshakes are valid/ready. A transfer happens on a rising edge when
both valid and ready are high. The encoder and the decoder each have one
output register. A flit accepted at one edge is presented from the next edge:
one cycle for encoding and one for decoding and correction. Both sides take
one flit per cycle when their output is not stalled. The resets are active
low and asynchronous, and clear only the valid flags. Each output register
has an assertion that its output stays stable while stalled.

### Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `DATA_W`  | 32      | binary flit width |
| `N_WIRES` | 4       | wires per codeword of the 1-of-n code; a power of two (2 = dual rail) |

`DCW`, `PCW` and the flit width follow from these two parameters.

## QDI link models

Two behavioural models show where the corrected errors come from. They use
delays and are for simulation only:

* `c_element` is a two-input Muller C-element with a `see` (strike) input.
  When the inputs are equal the output is driven. A strike then gives a
  transient (SET): the output flips for `SET_WIDTH` and recovers. When the
  inputs differ the cell only stores its value. A strike then gives an upset
  (SEU): the value flips and stays flipped until the inputs agree again.
* `qdi_wchb_pipeline` is a 3-stage 1-of-4 pipeline of weak-conditioned half
  buffers. Each stage is one C-element per wire. The second input of each
  C-element is the completion signal of the next stage, or `ack_in` for the
  last stage. `completion_detector` produces that signal: a NOR of the
  stage's wires, high on the spacer. The acknowledges are in NOR polarity:
  1 means ready for a codeword, 0 means a codeword was taken and the spacer is
  awaited.

`tb_qdi_wchb_pipeline` shows the mechanism behind the common error. The
receiver holds a codeword while the spacer queues behind it. The last stage's
low wires then sit in the storing state. A strike on one of them raises a
second wire, and the invalid codeword stays on the outputs.

## Simulation

Every testbench in `tb/` checks itself. It ends by printing
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.
`tb_ref_pkg` is an independent reference model of the code, written with
integer arithmetic. `tb_err_pkg` injects each class of link error.

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
    rtl/mofn_parity_pkg.sv tb/tb_ref_pkg.sv tb/tb_err_pkg.sv \
    tb/tb_parity_top.sv --top-module tb_parity_top
./obj_dir/Vtb_parity_top
```

Replace the testbench name to run another one.

| testbench | what it covers |
|-----------|----------------|
| `tb_parity_top` | end to end at the default size; 2000 flits; unrelated clocks; a network model with random delay, backpressure and every error class; counts every mechanism and fails if one never occurs |
| `tb_parity_encoder` | the 16-bit worked example; random 32-bit flits under backpressure; one-cycle latency; one flit per cycle |
| `tb_parity_decoder` | all error classes under backpressure; latency; a dual-rail instance |
| `tb_parity_correction` | the 4-row worked case; all error classes; the invalid-parity rule |
| `tb_parity_extraction`, `tb_parity_calculation`, `tb_di_conversion`, `tb_binary_conversion`, `tb_completion_detector` | unit checks against the reference model |
| `tb_parity_link_see` | the default design over 18 modelled QDI pipelines, with single and double upsets injected into their C-elements |
| `tb_c_element`, `tb_qdi_wchb_pipeline` | the C-element truth table, SET and SEU; four-phase transfers through the pipeline; an upset that creates an invalid codeword |

All testbenches pass. For each module, a copy with one deliberate bug was
also simulated, and its testbench reported failures.

## Where this design departs or stops

* **Code family.** The scheme applies to any m-of-n code. This RTL implements
  1-of-n with n a power of two (1-of-4, dual rail, 1-of-8 and so on). Then the
  binary-to-codeword mapping is a plain decoder. A general m-of-n code such as
  2-of-4 needs a mixed-radix conversion, because the number of codewords
  C(n,m) is not a power of two. That conversion is not provided. The
  parity, syndrome and clearing logic do not depend on the code family.
* **Network.** The asynchronous 4x4 mesh (XY routing, wormhole switching)
  between encoder and decoder is not included. Neither is the
  synchronisation between each clock domain and the asynchronous network.
  The network's packets carry one more control codeword per flit; its
  encoding is unknown and it is not produced here.
* **Choices of this design**, not given by the scheme: the valid/ready
  handshakes, the reset, the status flags, and the final consistency check
  after correction. That check turns some multi-error cases the scheme
  leaves open into detected errors. With several invalid rows the repair is
  guaranteed only when no extra wire shares a column with another row's
  correct wire. Otherwise the flit is reported uncorrectable rather than
  repaired.
* **Handshake hardening.** Errors that break the four-phase protocol itself
  (a spacer arriving early, data arriving early, stalls) are out of scope.
  This scheme protects only the data content.
* The C-element and pipeline models are not synthesizable. The numbers the
  scheme reports for area, power and error counts come from a 65 nm
  transistor-level campaign and cannot be reproduced from this RTL.
