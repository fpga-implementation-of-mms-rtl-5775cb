# MMS over CDMA: an IS-95B style baseband transceiver in SystemVerilog

Short multimedia messages are carried between two users as 14-bit frames.
Each frame holds a channel header, a selector and 4 bits of data for each
user. The frames travel over a code-division (CDMA) traffic channel built
the IS-95B way. Twelve frames fill one 20 ms traffic frame, which gets a
CRC. It is then convolutionally encoded, block interleaved and spread with a
64-chip Walsh code. Several users can share the band at the same time
because their Walsh codes are orthogonal. The receiver correlates against its
own code, deinterleaves, and decodes with a Viterbi decoder. That decoder
replaces the usual trellis tables with on-the-fly encoder replicas, and its
survivor memory holds one register per trellis state. It then checks the CRC
and hands the 14-bit frames back. A power-control measurement and the
reverse-link data burst randomizer sit alongside.

Everything runs on one clock with one asynchronous active-low reset. One
chip per clock at 1.2288 MHz gives exactly the 9600 bit/s traffic-channel
rate.

```
 tx_hdr/sel/user1/user2                                                tx_chip
   │   ┌───────────────┐  ┌──────────────────────┐  ┌────────────┐  ┌───────────────┐  ┌───────────────┐
   └──►│frame_assembler├─►│traffic_frame_builder ├─►│conv_encoder├─►│block_interleaver├►│walsh_spreader ├──►
       │  14-bit frame │  │12 frames+pad+CRC+tail│  │K=9, r=1/2  │  │ 2 pages 16x24  │  │ 64 chips/sym  │
       └───────────────┘  └──────────────────────┘  └────────────┘  └───────────────┘  └───────────────┘
 rx_chip ┌────────────────┐  ┌──────────────────┐  ┌───────────────┐  ┌────────────────────┐  ┌──────────────────┐
   ─────►│walsh_despreader├─►│block_interleaver ├─►│viterbi_decoder├─►│traffic_frame_parser├─►│frame_disassembler├─► rx_*
         └──────┬─────────┘  │ 24x16 (inverse)  │  └───────────────┘  │  CRC check, unpack │  └──────────────────┘
                └──► power_control (pc_bit per 24 symbols)            └────────────────────┘
 data_burst_randomizer (reverse-link group mask), stand-alone
```

## The MMS frame and the channel header

`frame_assembler` packs the fields most significant first:

| bits  | field     | width |
|-------|-----------|-------|
| 13:10 | header    | 4 |
| 9:8   | selector  | 2 |
| 7:4   | user 1 data | 4 |
| 3:0   | user 2 data | 4 |

The header names the channel state:

| code | meaning |
|------|---------|
| 0011 | REQ, connection request |
| 1100 | ACK |
| 1010 | communication, user 1 to user 2 |
| 0101 | communication, user 2 to user 1 |
| 0111 | closed |

These codes are `cdma_pkg::hdr_e`. The layout is `cdma_pkg::mms_frame_t`.
The assembler flags a header that is not one of the five (`tx_hdr_ok`), and
so does the disassembler (`rx_hdr_known`). The header sequence is not
generated here. That belongs to the link layer, which drives `tx_hdr` and
reads `rx_hdr`. The selector is carried through unchanged; its meaning is
left to the user of the core.

## The traffic frame (20 ms, 192 bits)

`traffic_frame_builder` emits, as one serial bit stream:

```
| 12 MMS frames, 168 bits | pad 4 x 0 | CRC-12 | tail 8 x 0 |
|<------ 172 information bits ------>|  12    |     8      |  = 192 bits
```

The CRC is g(x) = x^12+x^11+x^10+x^9+x^8+x^4+x+1. The register starts at all
ones, as in IS-95 rate set 1. The tail returns the convolutional encoder to
state 0. The decoder relies on this. The sizes 172/12/8 are the IS-95
full-rate numbers. Putting twelve 14-bit frames into a 172-bit field, with 4
pad bits, is this design's own packing.

On the receive side, `traffic_frame_parser` recomputes the CRC over the 172
information bits and compares it with the 12 received check bits. It then
releases the 12 MMS frames, one per cycle, each tagged with `crc_ok`.

## Coding and interleaving

`conv_encoder` is a K=9 encoder. Rate 1/2 uses generators 753 and 561
(octal); rate 1/3 uses N=3 and 557, 663, 711. Symbol i of an input bit b is
the parity of `{b, state} & GEN[i]`, and the next state is `{b, state[7:1]}`.
The N symbols of each bit leave one at a time.

A 192-bit frame becomes 384 symbols. That is exactly one 16 x 24 page of
`block_interleaver`, which keeps two such pages. One page fills while the
other is read out (ping-pong). Symbols are written column by column (input i
goes to row i mod 16, column i div 16) and read row by row. Neighbouring
input symbols therefore end up 24 positions apart on the channel. The same
module with rows and columns exchanged (24 x 16) is the exact inverse and
serves as the deinterleaver. A burst of chip or symbol errors on the channel
becomes scattered single errors at the decoder's input, and the decoder can
correct those.

Back-pressure follows from the pages. The transmit chain runs ahead until
both pages are full, and `tx_ready` then drops until the spreader has sent
a page. The receiver's deinterleaver realigns its write position on every
frame marker.

## Spreading and despreading

`walsh_gen` builds Walsh code `idx` the way the code tree grows. Starting
from one chip, each level doubles the code to {c, c} or {c, ~c}, the choice
being bit `level` of the index. Chip j is therefore parity(idx & j). Any two
different codes agree on exactly 32 of 64 chips.

`walsh_spreader` sends `symbol XOR walsh_chip` for 64 chips per symbol, one
per `chip_en`, back to back. On the channel a 0 chip means +1 and a 1 chip
means -1. `tx_chip_sync` marks the first chip of every traffic frame.

`walsh_despreader` takes signed soft samples (`rx_chip`, 8 bits). Over one
symbol it adds +sample or -sample according to the local Walsh chip. The
sign of the sum is the symbol, and its magnitude is a measure of signal
strength. A second user on another code adds exactly zero when the two are
chip-synchronous. `rx_chip_sync` must mark the first chip of a frame: frame
timing acquisition is outside this design.

## The Viterbi decoder (`viterbi_decoder`)

This is the largest block and the one that differs most from a textbook
decoder.

*One trellis step per cycle.* Every N received symbols form one step. For
each of the 256 states there are:

* two `vit_encoder_engine` replicas, one for each predecessor. Each
  predecessor is `{ns[6:0], b}`, and the branch input bit is `ns[7]`. Each
  replica computes the symbols the transmitter would have sent on that
  branch. No trellis table is stored.
* two `vit_branch_metric` units. Each one takes the Hamming distance
  between the received and the expected symbols (XOR and count), which is
  2 x 256 x N XORs per step.
* one `vit_acs` unit. It adds, compares and keeps the smaller sum. On a tie
  it keeps predecessor 0.

*Path metric memory.* 256 registers of PM_W bits (10 bits at rate 1/2).
State 0 starts at 0 and every other state starts above any frame's worth of
branch metric, so the decoder always begins from the encoder's zero state.
The width is enough for a whole frame, so no normalisation is needed.

*Survivor memory.* 256 registers of L = 192 bits, one per state. On every
step, state `ns` copies the register of its winning predecessor and appends
its own input bit (register exchange). After the last step each register
holds the whole decoded frame of its survivor path. No trace-back is needed.

*Present state.* The tail forces the encoder into state 0, so state 0's
register is the decoded frame. The first 184 bits are information and CRC,
and the tail is dropped. They are read out one per cycle with
`out_first`/`out_last`. The first bit is valid the cycle after the last
symbol is accepted. Input is paused during the 184-cycle read-out. A frame
arrives only every 24 576 chips, so this costs nothing.

Cost at the defaults: 49 152 survivor bits, 2 560 path-metric bits and 256
ACS lanes. This is a speed-first layout. A smaller device would time-share
the ACS lanes and keep the survivors in RAM. That is a change of
architecture, not of parameters.

## Power control (`power_control`)

The unit adds the despreader's symbol magnitudes over each power control
group of 24 symbols (1.25 ms, 16 groups per frame). At the end of a group it
issues `pc_bit`:

* 1 means "lower your power". It is sent when the group energy has reached
  `pc_setpoint`.
* 0 means "raise your power".

It also reports the group energy and its change from the previous group.
The grouping realigns on each frame start. The bit is brought out as a port.
Inserting it into the forward traffic stream is not part of this design.

## Data burst randomizer (`data_burst_randomizer`)

On the reverse link, a lower data rate repeats symbols. Only one copy needs
to be sent, so the transmitter gates whole 1.25 ms groups. From 14 long-code
bits b0..b13 this block builds the 16-bit mask of transmitted groups:

* full rate: all 16 groups.
* half rate: group 2i + b_i.
* quarter rate: the half-rate choice in pair 2i + b_(8+i).
* eighth rate: the quarter-rate choice 2i + b_(12+i).

Each rate's set lies inside the set of the next higher rate. The block is
combinational, and the top brings its ports out beside the two paths. The
long-code generator that supplies b0..b13 is not part of the design.

## Top-level interface and timing (`mms_cdma_transceiver`)

| group | ports | notes |
|-------|-------|-------|
| clock/reset | `clk`, `rst_n` | one clock; asynchronous active-low reset |
| transmit frames | `tx_valid`, `tx_ready`, `tx_hdr`, `tx_sel`, `tx_user1`, `tx_user2`, `tx_hdr_ok` | valid/ready; frames are taken in bursts while an interleaver page is free |
| transmit chips | `tx_walsh_idx`, `chip_en`, `tx_chip`, `tx_chip_valid`, `tx_chip_sync` | one chip per `chip_en` |
| receive chips | `rx_walsh_idx`, `rx_chip` (signed 8-bit), `rx_chip_valid`, `rx_chip_sync`, `rx_overflow` | `rx_overflow` is sticky: a symbol found both deinterleaver pages full |
| receive frames | `rx_valid`, `rx_hdr`, `rx_hdr_known`, `rx_sel`, `rx_user1`, `rx_user2`, `rx_crc_ok` | 12 one-cycle pulses per traffic frame |
| power control | `pc_setpoint`, `pc_valid`, `pc_bit`, `pc_group_energy`, `pc_energy_diff` | one result per 24 symbols |
| burst randomizer | `dbr_rate`, `dbr_pn`, `dbr_mask` | combinational |

Parameters: `K` (9), `RATE_N` (2), `GEN` (753/561), `IL_ROWS` x `IL_COLS`
(16 x 24), `WALSH_LEN_P` (64), `CHIP_W` (8), `PC_GROUP` (24). A rate-1/3
build also needs an interleaver page of 576 symbols (for example 18 x 32).

Latency through the receive chain is dominated by the page. A frame is
decoded once its last chip has arrived. Its 12 MMS frames appear about
384 + 184 + 20 cycles later.

## Where this design makes its own choices

The 14-bit frame, the five header codes, the 16 x 24 two-page interleaver
with column-wise write and row-wise read, Walsh spreading, the Viterbi
organisation and the single clock and reset all come from the design
description. These are this design's own choices:

* The IS-95 numbers. These are the 172/12/8-bit frame, the CRC polynomial,
  the generator polynomials, the 64-chip codes, the 24-symbol power control
  group and the burst randomizer rule.
* The packing of 12 MMS frames per traffic frame.
* Hard-decision decoding with 8-bit soft chips at the despreader.
* The power-control rule (group energy against a setpoint).
* Every handshake.
* Distributed flow control. Each block has its own small controller and
  the blocks pace each other through valid/ready handshakes. The original
  implementation describes a centralised controller.

Not included:

* The "N mod M" interleaver that the original study compares with the
  rectangular one. Its construction is not available.
* The compression of 16-bit user streams to 4 bits, whose method is not
  given.
* The link-layer header sequencing and a clock master.
* Frame-timing acquisition, RAKE combining, long-code scrambling and the RF
  front end.

## Verification

Every module has a self-checking testbench in `tb/` named `tb_<module>`.
Each one prints `TB_RESULT checks=N failures=M` and has a watchdog.
Reference models, such as CRC by polynomial long division and the encoder
by direct convolution, are in `tb/tb_ref_pkg.sv` and are independent of the
RTL. Highlights:

* `tb_viterbi_decoder` decodes rate-1/2 and rate-1/3 frames with up to 12
  inverted symbols exactly, and checks the one-cycle latency and the
  184-cycle drain.
* `tb_block_interleaver` checks the exact permutation, the inverse, the
  ping-pong overlap and the stall when both pages are full. A partial page
  cut short by a new page start is dropped.
* `tb_walsh_spreader` checks every chip, the 64-cycle symbol rate, and that
  no chip appears when `chip_en` is low.
* `tb_mms_cdma_transceiver` runs the whole design at its default size. It
  sends 5 traffic frames (60 MMS frames) over a channel that adds a second
  Walsh user and noise. One frame has 9 inverted symbols, which must be
  corrected. One frame is weak, and must produce power-up bits. One frame
  is heavily corrupted, and must fail its CRC. The test also requires
  transmit back-pressure, both interleaver pages full and all five headers
  received. It takes about 150 000 cycles, roughly 10 s with Verilator.

* `tb_two_user_link` runs two transceivers on Walsh codes 5 and 40. They
  transmit at the same time into one shared channel, and each must recover
  only the other's frames. The test walks through REQ/ACK, traffic in both
  directions and CLOSED.
* `tb_rate13_transceiver` builds the top for rate-1/3 coding (557/663/711)
  with an 18 x 32 page and corrects 12 inverted symbols.

To simulate with Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal rtl/cdma_pkg.sv tb/tb_ref_pkg.sv \
    $(ls rtl/*.sv | grep -v cdma_pkg) tb/tb_mms_cdma_transceiver.sv \
    --top-module tb_mms_cdma_transceiver -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. Lint any module with
`verilator --lint-only -Wall rtl/cdma_pkg.sv rtl/*.sv --top-module <name>`;
the remaining warnings are unused package constants and the reset used in
assertion `disable iff` clauses.
