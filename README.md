# Configurable link error control for a Spidergon NoC

Wires between routers of a network on chip get less reliable as geometries
shrink. Crosstalk and transient faults flip bits in flits in flight. This design
protects every flit with a linear error control code and lets the user pick, at
run time, what to do with an error:

* **correct** it at every hop, so flits keep moving with no added latency;
* **detect** it at every hop (switch-to-switch, *s-s*) and raise a flag, so the
  receiver can ask for the flit again or drop it;
* **detect** it only at the destination network interface (end-to-end, *e-e*).

The same hardware also runs a **mixed** mode, where header flits, which carry the
route, get stronger protection than payload flits. One set of encoders and
decoders serves every mode. Two control bits set what a decoder does:
`COR/DET#` (correct or detect) and `SS/EE#` (check at every hop or only at the
destination). A small policy decoder drives both bits from the selected policy
and from the type of each flit.

The RTL contains the codecs, a four-channel wormhole router with two virtual
channels per channel, and a Spidergon network of such routers. Each
router has an R (clockwise), an L (counter-clockwise), an A (across) and an
NI (local network interface) channel.

## Error control policies

| policy | header flits       | payload flits      |
|--------|--------------------|--------------------|
| I      | correct, s-s       | correct, s-s       |
| II     | correct, s-s       | detect, s-s        |
| III    | correct, s-s       | detect, e-e        |
| IV     | detect, s-s        | detect, s-s        |
| V      | detect, s-s        | detect, e-e        |

`policy` is a 3-bit input (`ecc_pkg::policy_e`, codes 1..5) shared by all
routers. `ec_mode_ctrl` turns it into `cor_det_n` and `ss_ee_n` for each flit,
using the flit's `head` bit. An undefined code acts as policy I. The policy
may be changed only while no flit is in flight: a flit that left its source
under one policy may be checked under another at a later hop.

## The decoders

**Router decoder** (`router_decoder`, one per R/L/A input). The received
codeword feeds a syndrome generator.

* **Correction mode** (`cor_det_n = 1`). The syndrome decoder turns the syndrome
  into an error vector over all n bits, check bits included. The correction
  stage XORs that vector into the word.
* **Detection mode** (`cor_det_n = 0`). Both stages are disabled. The error
  detection stage raises `error` when the syndrome is not zero, but only for a
  flit checked s-s (`ss_ee_n = 1`). Intermediate routers stay silent about flits
  that are checked only end to end.
* **Output mux.** It is steered by `s_bypass = cor_det_n | ss_ee_n`. When it is 1
  the mux takes the correction path; when it is 0 it forwards the raw word. In
  detection mode the correction stage is disabled, so both mux inputs carry the
  same data. The select therefore matters only for correction.
* **Uncorrectable errors.** In correction mode `error` stays low. A syndrome that
  matches no correctable pattern leaves the word unchanged. Such a syndrome comes
  from a Hsiao double error, for example. These cases are not flagged.

**NI decoder** (`ni_decoder`, on the channel to the NI). It is detection only.
The data bits pass straight through. The syndrome generator and detector are
enabled only while `ss_ee_n = 0`, that is, for flits checked end to end.

Both decoders and the encoder are purely combinational. They sit in front of
registers, so they lengthen the clock period but add no cycles.

## The codes

All three codes protect a 32-bit flit word. Codewords are laid out
`{check bits, data bits}`, with the data in `[31:0]`. Each check bit has a
unit-vector column, so the encoder outputs the data-bit part of the syndrome.

| `CODE`         | (n, k)  | corrects              | detects (detection mode)       |
|----------------|---------|-----------------------|--------------------------------|
| `CODE_HAMMING` | (38,32) | any single bit        | any 1 or 2 bit errors          |
| `CODE_HSIAO`   | (39,32) | any single bit        | 1 or 2 bit errors; double errors are also told apart in correction mode (not flagged) |
| `CODE_S2SC`    | (38,32) | any error inside one aligned 2-bit symbol | any errors in 1 or 2 symbols |

The code lengths follow the scheme. The matrices are this design's own
construction; see `ecc_pkg::gen_h`:

* **Hamming.** Data bit j gets the j-th 6-bit value of weight two or more, in
  increasing order.
* **Hsiao.** Data bit j gets the j-th 7-bit value of weight three, in increasing
  order. Every column has odd weight, but the rows are not balanced.
* **S2SC.** A (19,16) Hamming code over GF(4) with α² = α + 1. Data symbol j
  gets the j-th column of GF(4)³ that has at least two non-zero entries and a
  first non-zero entry of 1. In binary, bit 0 of a symbol takes that column and
  bit 1 takes α times it.

The syndrome decoder compares the syndrome with the syndrome of every
correctable pattern, so the same RTL serves all three codes.

## Where the coders sit: three router structures

`ARCH` chooses where the encoders and decoders go. "k" means 32 bits; "n" means
38 or 39 bits.

| `ARCH`       | encoder                | decoders                                   | input queues / switch | to-NI path |
|--------------|------------------------|--------------------------------------------|-----------------------|------------|
| `ARCH_EE`    | channel from NI        | NI decoder on the channel to NI, always checking | n / n           | k |
| `ARCH_SS_LA` | each R/L/A output      | router decoder on each R/L/A input         | k / k                 | k, no check |
| `ARCH_SS_HP` (default) | channel from NI | router decoder on each R/L/A input; NI decoder on the channel to NI | n / n | k |

* **`ARCH_SS_LA`** (low area). Only the data bits are stored and switched. Each
  output re-encodes them. A check-bit error is therefore seen only by the router
  right after the faulty link. This structure cannot check end to end: under
  policies III and V, payload errors pass unflagged.
* **`ARCH_SS_HP`** (high performance). The whole codeword is switched. In
  correction mode it is corrected, check bits included. In detection mode it is
  forwarded as received, so every later router flags the same error again. The
  NI decoder gives it the end-to-end half of policies III and V. The default
  structure is `ARCH_SS_HP`, because it alone runs all five policies.
* **`ARCH_EE`.** It ignores `policy`: no router checks anything, and every flit,
  header included, is checked at the destination NI.

## Router microarchitecture

Each router (`spidergon_router`) has three parts:

* **Input stage** of each R/L/A channel:
  * the decoder, if the structure has one;
  * a link register;
  * two virtual-channel queues (`flit_fifo`, `DEPTH` = 4).

  The NI channel goes through the encoder, if there is one, straight into its
  two VC queues, with a valid/ready handshake.
* **Switch stage.** It gives one path per output VC. Each output VC is granted
  round robin to an input queue of the same VC whose head flit is routed there.
  It then stays locked to that input from header to tail (wormhole). Routes are
  computed from the header and held for the packet's body flits.
* **Output stage** of each R/L/A channel:
  * two VC queues;
  * a round-robin choice between VCs that hold credits;
  * the encoder, in `ARCH_SS_LA`;
  * a link register.

  The NI output is held by one packet from header to tail. Its register has a
  valid/ready handshake and carries `ni_out_error`.

**Flits.** Every flit is a 32-bit word plus side-band bits `head`, `tail` and `vc`
(`ecc_pkg::flit_meta_t`). The side-band bits are not protected. A header
carries its 16 bits in `word[15:0]`, with the destination node in the low
`log2(NODES)` bits. A packet keeps the VC its source gave it.

**Routing** is Spidergon's across-first shortest path. Let r = (dst − here) mod
NODES:

* r = 0 goes to the NI;
* r ≤ NODES/4 goes to R;
* r ≥ 3·NODES/4 goes to L;
* anything else goes to A.

With the default 12 nodes, a packet crosses at most three links.

**Flow control** on R/L/A is credit based, per VC. A router pulses
`in_credit[p][vc]` whenever it pops that input queue. Each output starts with
`DEPTH` credits per VC.

**Timing** without contention:

| path                                          | cycles |
|-----------------------------------------------|--------|
| NI hand-shake to the first output link        | 3      |
| link to the next router's output link         | 4      |
| link to the destination NI output register    | 4      |

The 4 cycles of a hop are the input register, the VC queue, the switch into the
output queue, and the output register.

**Error flags.** Router decoder flags come out on `err_ss[p]` in the cycle the
flit is on the link. The NI decoder flag travels with the flit as
`ni_out_error`. Flagged flits are still delivered. A retransmission or drop
policy must be built around these flags; this RTL does not include one.

## The network

`noc_ecc_top` builds a ring of `NODES` routers (default 12) with across links:

* node i's R output feeds node i+1's L input;
* its L output feeds node i−1's R input;
* its A output feeds node i+NODES/2's A input.

Credits run back along the same links. Every node's NI channel is a port, so IP
cores and network interfaces attach outside.

`link_flip[i][p]` is an XOR mask applied to the codeword that node i sends on
channel p while that link carries a flit. It models the noisy wires and is how
the tests inject errors. Tie it to zero in normal use.

Parameters: `CODE` (default `CODE_HSIAO`), `ARCH` (default `ARCH_SS_HP`),
`NODES` (12; even, at most 16 for the testbenches' header layout) and `DEPTH`
(4). `ecc_pkg::K` = 32 is fixed, because the code constructions are built for
32 data bits.

## Departures and own choices

These points are not fixed by the scheme itself:

* **NI channels.** The NI channels have two VC queues, like the other channels,
  rather than one.
* **Decoder structure.** The error vector covers all n bits, not only the k data
  bits, so the high-performance router can repair check bits. The router
  decoder's flag is also gated by `ss_ee_n`.
* **Network level.** Routing, VC handling, queue depth, side-band bits, reset
  (synchronous, active low) and the cycle timing are this design's own.
* **The codes.** Their exact matrices are this design's own.
* **Not built.**
  * Retransmission of flagged flits and the actions that go with it.
  * Row balancing of the Hsiao matrix.
  * Any area or gate-delay estimate. The scheme is evaluated in equivalent
    gates, which RTL cannot reproduce.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. The testbenches compare against an independent
reference model of the codes (`tb/ecc_ref_pkg.sv`).

* `tb_check_bit_gen`, `tb_syndrome_gen`, `tb_syndrome_dec`,
  `tb_error_correction`, `tb_error_detection`, `tb_router_decoder`,
  `tb_ni_decoder`: these run all three codes. They cover every correctable
  pattern, double errors and every mode setting. They also check the code
  properties of the implemented matrices.
* `tb_ec_mode_ctrl`: the policy table. `tb_flit_fifo`: random traffic against a
  queue model.
* `tb_spidergon_router` covers one router:
  * routing to every destination;
  * zero-load latency;
  * correction, s-s and e-e detection on each input;
  * credit return;
  * stalling when credits run out.
* `tb_noc_ecc_top` runs the full default network (12 nodes, Hsiao, HP)
  through policies I–V. It sends random packets, applies random NI
  back-pressure and injects random link errors. It checks every delivered flit,
  every `err_ss` flag in every cycle, and every `ni_out_error` flag. It fails
  if corrections, s-s detections, e-e detections, back-pressure, both VCs,
  across links or policy switches never occur.
* `tb_noc_variants` and `tb_noc_variants_ee` run the same traffic, through
  `tb_noc_run`, on 8-node networks. Together with the default test they cover
  every structure with every code:
  * `tb_noc_variants`: low-area routers with all three codes, and
    high-performance routers with the Hamming and symbol codes;
  * `tb_noc_variants_ee`: end-to-end-only routers with all three codes.

  With the symbol code, the correctable errors injected are whole 2-bit symbols.

To simulate with Verilator 5, for example the network test:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
      rtl/ecc_pkg.sv tb/ecc_ref_pkg.sv tb/tb_noc_ecc_top.sv \
      --top-module tb_noc_ecc_top -Mdir obj_top
    ./obj_top/Vtb_noc_ecc_top

Replace the testbench name to run any other test. `ecc_pkg.sv` and
`ecc_ref_pkg.sv` must come first on the command line. Every test runs in about
a second. Building the two variant tests takes a few minutes, since each
network configuration is a separate model.

## Files

* `rtl/ecc_pkg.sv`: types, policy and structure enums, code construction.
* `rtl/check_bit_gen.sv`, `rtl/syndrome_gen.sv`, `rtl/syndrome_dec.sv`,
  `rtl/error_correction.sv`, `rtl/error_detection.sv`: the codec blocks.
* `rtl/router_decoder.sv`, `rtl/ni_decoder.sv`: the two decoders.
* `rtl/ec_mode_ctrl.sv`: the policy decoder.
* `rtl/flit_fifo.sv`: the VC queue.
* `rtl/spidergon_router.sv`: the router.
* `rtl/noc_ecc_top.sv`: the network.
* `tb/`: the testbenches and the reference model.
