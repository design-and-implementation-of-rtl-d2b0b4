# Low-power LDPC decoder for the (20, 3, 4) Gallager code

This is a soft-decision decoder for a small regular low-density parity-check (LDPC) code. It
takes a received 20-bit word and runs ten iterations of a modified sum-product (belief
propagation) algorithm. It then returns the corrected 20 bits, plus a flag that says whether the
result satisfies all parity checks. Every single-bit error is corrected. Three ideas keep the
hardware small and its switching activity low:

* **Multicast from the variable nodes, subtraction at the check nodes.** A variable node sends
  its whole a-posteriori LLR to all of its checks. It does not form a separate extrinsic
  message per edge. Each check node keeps the message it sent last time and subtracts that
  message itself.
* **Partially parallel check processing.** There are 20 variable node processors but only five
  check node processors. The five processors serve the 15 checks in three passes. They reach the
  variable nodes through multiplexers and a Benes permutation network.
* **Clock gating.** The variable node bank and the check node bank each have their own gated
  clock. A bank's clock only ticks in the cycles where that bank does work.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). Every block has a self-checking
testbench.

## The code

The code has 20 bits (variable nodes V1..V20) and 15 parity checks (C1..C15). Every bit is in
exactly 3 checks (w_c = 3), and every check covers exactly 4 bits (w_r = 4). The matrix is the
classic Gallager construction:

| band | checks | bits of each check (1-based) |
|------|--------|------------------------------|
| 0 | C1..C5   | {1,2,3,4} {5,6,7,8} {9,10,11,12} {13,14,15,16} {17,18,19,20} |
| 1 | C6..C10  | {1,5,9,13} {2,6,10,17} {3,7,14,18} {4,11,15,19} {8,12,16,20} |
| 2 | C11..C15 | {1,6,12,18} {2,7,11,16} {3,8,13,19} {4,9,14,17} {5,10,15,20} |

Each band of five checks covers every bit exactly once. The whole schedule rests on this
property:

* check node processor *k* handles check *k* of the current band;
* each variable node keeps one edge register per band;
* a band's messages form a permutation of the 20 bits, so they never collide in the network.

The matrix has rank 13, so there are 128 codewords. The all-zero and all-one words are both
codewords.

## Messages and one iteration

All messages are log-likelihood ratios (LLRs). A positive LLR means "bit is 0". They are 6-bit
two's complement numbers with 2 fractional bits, saturated symmetrically to ±31 (±7.75). A
received hard bit becomes the channel LLR r = +2.0 (bit 0) or −2.0 (bit 1).

Each variable node *i* holds three registers: RAM1 holds r_i, and the edge registers (RAM2)
hold one entry per band. Each check node processor holds a local RAM with its last outgoing
messages E for each of its three checks. The messages are exchanged as follows:

1. **Check half (per band).** The edge registers of the band hold the variable totals L_i.
   The check node computes M = L_i − E_old (extrinsic input) and then
   E_new = 2·atanh(∏ tanh(M/2)) over the other three edges. E_new goes into the local RAM
   (as next iteration's E_old) and back through the network into the variable node's edge
   register of that band.
2. **Variable half.** Each variable node computes L_i = r_i + E_1 + E_2 + E_3 with a tree of
   carry look-ahead adders and saturates it. It writes L_i into all three edge registers
   (multicast). The sign of L_i is the current decision for the bit.

The bands are processed in turn, but band *g* only reads and writes edge register *g*. So every
check still sees the totals of the previous variable half. The result is the usual flooding
schedule: it equals textbook sum-product decoding except for quantisation and saturation.
Before the first iteration all edge registers are loaded with r_i and all E_old are 0.

### Check node arithmetic

The product of tanh terms is computed in the log domain with φ(x) = −ln tanh(x/2), which is its
own inverse:

    |E| = φ( φ(|M_a|) + φ(|M_b|) + φ(|M_c|) ),   sign(E) = sign(M_a) ⊕ sign(M_b) ⊕ sign(M_c)

`cn_core` implements one output: an input table φ on each of three magnitudes, two carry
look-ahead adders, an output table φ on the 7-bit sum, and a negation when the XOR of the sign
bits is 1. The degree-4 processor `cnu` uses four cores, each fed by the other three inputs.

Both tables are built at elaboration by a constant function in `ldpc_pkg`:
`phi_q(m) = round(4 · φ(m / 4))`, clamped to 31, with `phi_q(0) = 31`. The hardware only sees
the constant tables: 32 entries for the input and 128 for the output, 5 bits each.

## Schedule and timing

`ldpc_ctrl` runs a fixed number of iterations (`ITERS`, default 10). It never stops early, and it
checks the result once at the end.

| cycle(s) | step | what happens |
|---|---|---|
| 0 | start | `start_i` seen while idle: channel LLRs loaded, check RAMs cleared |
| per band *g* = 0,1,2 | SUB | the multiplexers pick edge register *g*, the Benes network routes it to the CNUs, and `L − E_old` is stored in the CNU buffers |
| | CNC | the CNUs compute; results are latched and written to the local RAM |
| | WB | the return network writes the latched results into edge register *g* |
| then | VRD | variable node input registers take the three edge registers |
| | VADD | the tree adder sums; the total goes to all edge registers and the decision bit |
| after `ITERS` × 11 cycles | CHK | decisions and syndrome sampled into the output registers |

One iteration takes 3 × 3 + 2 = 11 cycles. `valid_o` rises 2 + 11·ITERS = **112 cycles** after
the clock edge that saw `start_i`. It stays high until the next start. A decoder runs one word
at a time, so one decode takes 112 cycles of throughput.

## Permutation network

`msg_perm_net` connects the 60 edge registers to the 20 inputs of the five CNUs, and back again:

* **Forward:** one 3:1 multiplexer per variable node picks the edge register of the current
  band. A 32-port Benes network then permutes the 20 picked values (ports 20..31 are unused and
  tied to 0). Output `4k + p` carries the *p*-th bit of check `5·band + k`.
* **Return:** a second Benes network is set to the inverse permutation of the band. It carries
  CNU *k*'s output *p* back to that bit's variable node.

`benes_net` is recursive: an input column of 2×2 switches, two half-size Benes networks, and an
output column. That gives 2·log2(N) − 1 = 9 stages of 16 switches, or 144 control bits. The
switch settings for each band come from the looping algorithm (`ldpc_pkg::benes_route`). It runs
as a constant function during elaboration, so each direction has just three constant 144-bit
words, selected by the band. `benes_route` works for any permutation of 32 ports. To use another
code with the same band structure, only `H` has to change.

## Clock gating

`clk_gate` is a latch-based gating cell: the enable passes through a latch that is transparent
while the clock is low, and the gated clock is `clk & latched_enable`. The top level uses two
such cells:

* **VN bank:** enabled in the load, write-back, register and add cycles;
* **CN bank:** enabled in the load, subtract and compute cycles.

The latch inside `clk_gate` is intentional. The controller and the output registers run on the
free clock. Inside each bank, clock enables still select which registers change (for example,
only edge register *g* in band *g*), so the gating never changes behaviour.

## Interface (`ldpc_decoder`)

| port | dir | width | meaning |
|---|---|---|---|
| `clock_c` | in | 1 | clock |
| `rst` | in | 1 | synchronous reset, active high |
| `start_i` | in | 1 | one-cycle pulse while idle; ignored while a decode runs |
| `message_i` | in | 20 | received word; bit *v* is code bit V(*v*+1) |
| `message_o` | out | 20 | decoded word, same order; valid while `valid_o` is high |
| `valid_o` | out | 1 | result ready (level, cleared by the next start or by reset) |
| `codeword_ok_o` | out | 1 | `message_o` satisfies all 15 checks |

Parameter: `ITERS` (default 10). The code and word-length constants are in `ldpc_pkg`.

## Files

| file | role |
|---|---|
| `rtl/ldpc_pkg.sv` | code constants, H, message type, saturation, φ tables, Benes routing |
| `rtl/ldpc_decoder.sv` | top level |
| `rtl/ldpc_ctrl.sv` | controller (fixed-iteration schedule) |
| `rtl/vnu.sv` | variable node processor with RAM1, edge registers and tree adder |
| `rtl/cnu.sv` | check node processor: subtractor, buffer, local RAM, four cores |
| `rtl/cn_core.sv` | one check-to-variable output (φ LUTs, adders, sign) |
| `rtl/cla_adder.sv` | carry look-ahead adder (4-bit look-ahead blocks) |
| `rtl/msg_perm_net.sv` | multiplexers and the forward and return Benes networks |
| `rtl/benes_net.sv`, `rtl/benes_switch.sv` | recursive Benes network and its 2×2 switch |
| `rtl/clk_gate.sv` | latch-based clock gating cell |
| `rtl/syndrome_chk.sv` | parity check of the decisions |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every testbench computes its expected values independently of the RTL, counts checks, and ends
with `TB_RESULT checks=N failures=M`. Each also has a watchdog.

* `tb_ldpc_decoder` runs the top at its default parameters. It finds the 128 codewords by
  testing all 2^20 words. A behavioural decoder written with plain integers and floating-point φ
  (no network, no schedule) gives the reference output. The test covers:
  - all 128 codewords, error-free and with each of the 20 single-bit errors (2688 decodes, all
    must be corrected);
  - 150 words with 2 to 5 errors, compared bit for bit with the model;
  - the 112-cycle latency of every decode;
  - a start while busy (ignored) and a reset in mid-decode.

  It also requires each mechanism to occur at least once: both clock gates closing, all three
  bands, a result that is not a codeword, the ignored start and the recovery from reset.
* `tb_cn_core`: all 2^18 input triples. `tb_cla_adder`: exhaustive at 7 bits, random at 13.
  `tb_syndrome_chk`: all 2^20 words.
* `tb_benes_net`: identity, reversal, all rotations and 3000 random permutations of 32 ports.
* `tb_msg_perm_net`, `tb_cnu`, `tb_vnu`, `tb_ldpc_ctrl`, `tb_clk_gate`: per-block behaviour
  against their own models, including the glitch-free property of the gating cell.

To run one with Verilator (any testbench; substitute its name):

    verilator --binary --timing --assert -Irtl -y rtl rtl/ldpc_pkg.sv tb/tb_ldpc_decoder.sv \
              --top-module tb_ldpc_decoder
    ./obj_dir/Vtb_ldpc_decoder

The full decoder test runs in well under a second.

## Departures and own choices

The decoder structure follows the published design: 20 variable node processors with RAM1/RAM2
storage, carry look-ahead tree adders, check processors built from φ look-up tables, look-ahead
adders and XOR sign correction, subtraction of the previous message in front of a buffer,
multiplexers ahead of a Benes network, a fixed ten iterations, and clock gating. The following
are this implementation's own decisions and should be judged as such:

* **Input and word length.** The interface takes hard bits, as the original 20-bit ports do.
  They are mapped to channel LLRs of ±2.0. All messages are 6 bits with 2 fractional bits.
  Neither the mapping nor the widths were given. A soft-input variant would only need a
  different `llr_in` on the VNUs.
* **Five time-shared check processors.** The source describes both one processor per node and a
  partially parallel design. Here the check side is shared across the three bands, which gives
  the 3:1 multiplexers in front of the network their role. The cost is 9 of the 11 cycles of
  each iteration.
* **Return path.** The "bidirectional" connection between the check processors and the edge
  registers is a second Benes network with inverse settings.
* **`codeword_ok_o`** is an added output. It reports the single end-of-decoding validity check
  that the algorithm performs.
* **Schedule, handshake, reset, bit order** and the 11-cycle iteration are all this design's
  own.
* The original FPGA netlist contained an additional input-side block of six flip-flops whose
  purpose is not described. It is not reproduced.
* **Size.** Generic synthesis gives about 1135 flip-flop bits, most of them the 60 edge
  registers and the 100 check-side words (local RAMs, buffers and output latches). That is far more than the
  roughly 100 registers reported for the original FPGA implementation. The published figures
  cannot be reproduced from the description, and no power figures are given here.
