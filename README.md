# 8b/10b Physical Coding Sublayer with 8-, 16- and 32-bit datapaths

A serial link carries no clock and runs through AC-coupled channels, so the
bit stream must hold as many ones as zeros over time and must change value
often. The Physical Coding Sublayer (PCS) of gigabit Ethernet and of CPRI does this with the
8b/10b code. Every byte is sent as a 10-bit code group. Each group has five
ones, or four or six. A one-bit *running disparity* remembers whether the line
has seen more ones or more zeros so far. The next unbalanced group is then
picked in the form that pulls the line back. Twelve extra code groups carry
control characters (K28.0–K28.7, K23.7, K27.7, K29.7, K30.7). Among them is
the K28.5 comma used for alignment.

This RTL gives a PCS transmitter and receiver. Both switch at run time
between three widths: one byte per clock (8b/10b), two bytes (16b/20b) or
four bytes (32b/40b). The wide modes are just 8b/10b lanes placed side by
side, with the running disparity passed from lane to lane within the cycle.
The receiver checks every group against the code table and flags the ones
that are in no column.

## Blocks

```
pcs_top
├── pcs_tx                       transmitter: schemes + mux + disparity register
│   ├── enc_8b10b                mode 00
│   ├── enc_16b20b  (2 × enc_8b10b)   mode 01
│   └── enc_32b40b  (4 × enc_8b10b + joining register)   mode 10
│         enc_8b10b = enc_8b10b_core (enc_5b6b → enc_3b4b) + 2 register stages
└── pcs_rx                       receiver: schemes + mux + disparity register
    ├── dec_10b8b                mode 00
    ├── dec_20b16b  (2 × dec_10b8b)   mode 01
    └── dec_40b32b  (4 × dec_10b8b + joining register)   mode 10
          dec_10b8b = dec_6b5b → dec_4b3b, table check (2 × enc_8b10b_core), 2 register stages
```

`pcs_pkg` holds the mode enum `pcs_mode_e` and the widths (4 byte lanes,
32 data bits, 40 code bits). It also holds the latencies and
`is_control_byte()`.

## Bit and byte conventions

* A byte is `HGFEDCBA`, with A in bit 0. `x = EDCBA` (bits 4:0) and
  `y = HGF` (bits 7:5), so the byte is called D*x*.*y* or K*x*.*y*.
* A code group is `abcdei fghj`, with **a in bit 9** and j in bit 0. `a` is the bit
  sent first on the line.
* In the wide modes byte *i* is `data[8i+7:8i]` and its code group is
  `code[10i+9:10i]`. Lane 0 comes first in the disparity chain, so it is the
  group to send first.
* Running disparity is 1 bit: `1` = positive, `0` = negative. Both ends
  reset to negative.

## How the encoder picks a code group

`enc_5b6b` holds only the negative-disparity form of each 6-bit sub-block.
The rule for the other form is:

* a sub-block with four or two ones is sent complemented when the disparity
  is positive, and it flips the disparity;
* a balanced sub-block is sent as it is and leaves the disparity unchanged.
  D.7 is the exception: it is `111000` at negative and `000111` at positive
  disparity.
* `K28` uses `001111` / `110000` in place of D.28's `001110`.

The disparity left by the 6-bit sub-block is the input of `enc_3b4b`. Its
rule is the same:

* D.x.0, D.x.4 and D.x.7 have three ones. They are complemented at positive
  disparity and flip it.
* D.x.3 is `1100` / `0011`. It changes form, but not the disparity.
* D.x.7 uses the alternate form `0111`/`1000` where the primary `1110`/`0001`
  would make a run of five equal bits across the sub-block boundary. That is
  x = 17, 18, 20 at negative and x = 11, 13, 14 at positive disparity.
* A control character takes the K forms. For K28.y these are complements of
  the data forms when y = 1, 2, 5, 6, and they always change with disparity.
  Kx.7 always takes the alternate 7.

Seen from outside, the result is the full IEEE 802.3 clause 36 table, 256
data rows and 12 control rows at both disparities. The testbenches check
every row. A `k` request for a byte that is not one of the twelve control
characters is encoded as data, and `kerr` is raised for that byte.

## How the decoder decides what is valid

`dec_6b5b` and `dec_4b3b` are the inverse tables. Each accepts both forms of
a sub-block. One detail needs care. After the sub-block `110000` (K28 sent
at positive disparity), the K28.y 4-bit forms are the complements of the data
forms: K28.5 is `110000 0101`, not `…1010`. So `dec_4b3b` complements fghj
first. The byte is a control character when the 6-bit part was K28's, or when
an alternate 7 follows x = 23, 27, 29 or 30.

Sub-block tables alone accept combinations that are not code groups, for
example `100011 1110` (D17 with the primary 7 where the alternate is
required). `code_err` must be set exactly for groups that are in neither
column of the table. So `dec_10b8b` encodes its candidate byte again at both
disparities, with two copies of `enc_8b10b_core`, and compares the results
with what it received:

* `code_err` = the group matches neither form;
* `disp_err` = the group is valid but matches only the form for the *other*
  running disparity. This flag is this design's addition and changes nothing
  else.

When `code_err` is set, the data and k outputs are undefined. They hold
whatever the sub-block tables gave.

The receiver tracks its running disparity from the received bits, sub-block
by sub-block. After a sub-block with more ones, or after `000111`/`0011`, it is
positive. After one with more zeros, or after `111000`/`1100`, it is negative.
Otherwise it is unchanged. So after one corrupted group the receiver
resynchronises on its own. Until then it may report `disp_err` on good
groups.

## Running disparity across lanes and modes

Neither `enc_8b10b` nor `dec_10b8b` stores the running disparity. Each one
takes `rd_in` and gives `rd_out` in the same cycle. The 2- and 4-lane schemes
chain these signals: lane 0's `rd_out` drives lane 1's `rd_in`, and so on.
`pcs_tx` and `pcs_rx` each keep **one** disparity register, which all three
schemes share. The enabled scheme reads it, and its `rd_out` is written back
at the same clock edge. The line therefore stays DC-balanced when the mode
changes between words. The register is a one-cycle loop through at most four
chained lanes, and that chain is the long combinational path of the design.

## Modes, timing and the one rule to respect

| `mode` | scheme | bytes used | latency (`valid_in` → `valid_out`) |
|---|---|---|---|
| `00` | 8b/10b, 10b/8b | 0 | 2 cycles |
| `01` | 16b/20b, 20b/16b | 0–1 | 2 cycles |
| `10` | 32b/40b, 40b/32b | 0–3 | 3 cycles |
| `11` | default: nothing is converted | – | no output |

Each lane registers its sub-block results on the first edge and the joined
code group (or byte) on the second. The 32-bit schemes add a third register
that joins the four lane results. A word can be presented every cycle.
Outputs of unused lanes are zero, and `mode_out` tells the width of the word
on the outputs. In mode `11`, valid words are dropped and the disparity
register holds its value.

Because mode `10` is one cycle slower, **a mode-00/01 word must not follow a
mode-10 word in the very next cycle**: both results would reach the output
mux together. Leave one idle cycle, or a mode-11 cycle. An assertion
(`a_one_result`) in `pcs_tx` and `pcs_rx` reports a violation. If the
receiver is fed straight from the transmitter, the idle cycle is used up on
the way, so the source must leave **two** cycles.

## Top level

`pcs_top` holds `pcs_tx` and `pcs_rx` side by side. They share clock and
active-low asynchronous reset, and each has its own select lines. The
serialiser/deserialiser (PMA) that would carry `tx_code_out` to `rx_code_in`
is not part of this design, so both ends are ports. In a loopback,
`rx_mode = tx_mode_out` and `rx_valid_in = tx_valid_out`. The receive side
has no code-group alignment (comma detection and word lock). It expects
groups already aligned to bit 9.

## Where this follows its source and where it chooses

The following come from the source description: the three widths built from
8b/10b lanes and their select codes; the transmitter as a set of encoding
schemes plus a mux; the split into 5b/6b and 3b/4b sub-blocks, with the
disparity of one feeding the other; the valid data and control groups; the
meaning of `code_err`; the two-edge timing of each lane; and the extra joining
edge of the 32-bit width, three edges in all.

The following are this design's own choices, where the source is silent:

* bit and byte order, as given above;
* mode `11` as "convert nothing";
* one disparity register shared by all modes, reset to negative;
* the `kerr` and `disp_err` outputs;
* the idle-cycle rule for mode changes;
* the re-encoding check in the decoder.

The table entries the source does not print are taken from IEEE 802.3
clause 36, and so is the alternate-7 rule.

Not included: the PMA, the MAC/GMII control signals, and code-group
synchronisation. None of them is specified beyond its name.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. `pcs_ref_pkg` is the
shared reference. It lists every sub-block for both disparities and the
control characters as whole groups, and it decodes by searching the whole
table. It therefore shares no structure with the RTL.

* `tb_enc_5b6b`, `tb_enc_3b4b`, `tb_dec_6b5b`, `tb_dec_4b3b` are exhaustive
  over their inputs.
* `tb_enc_*` send all 256 byte values in every lane, every control
  character, invalid control requests and random traffic. Words come
  back-to-back or with idle gaps. The tests check the code, `kerr`, `rd_out`
  and the latency.
* `tb_dec_*` present all 1024 patterns in every lane at both disparities.
  Then they run a valid stream with injected bit errors. The tests check the
  byte, `k`, `code_err`, `disp_err`, `rd_out` and the latency.
* `tb_pcs_tx` and `tb_pcs_rx` use random modes, including `11`, and mode
  changes, and check the shared disparity.
* `tb_code_tables` checks hand-written table rows and a few decoder cases.
* `tb_pcs_top` runs the transmitter into the receiver through a channel that
  flips a bit in about one word in ten. About 3000 words go through, and the
  test:
  * compares every receiver output with the table, and intact words with
    the bytes sent;
  * checks the 4- and 6-cycle loop latency;
  * checks on the serial stream that no run is longer than five bits and
    that the running digital sum stays at ±1 at group boundaries;
  * requires every mechanism to occur at least once: every mode, mode
    changes, control characters, commas, alternate 7, `kerr`, `code_err`,
    `disp_err`, and both disparity signs.

  The top has no parameters, so this is also the full-size run. It takes a
  few seconds.

To run one testbench with Verilator, give the two packages and let it find
the modules by name (`-y`):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/pcs_pkg.sv tb/pcs_ref_pkg.sv tb/tb_pcs_top.sv \
  --top-module tb_pcs_top -o sim
./obj_dir/sim
```

Every file lints with `verilator --lint-only -Wall`. Two kinds of warning
remain. Some package constants (the latencies) are used only by the
testbenches. `rst_n` is reported as both synchronous and asynchronous only
because the assertions use it in `disable iff`.
