# CADEC: a crosstalk-avoiding, double-error-correcting link code for networks on chip

Links between network-on-chip switches are long, closely packed wires. They
suffer from two problems at the same time:

* **crosstalk**: when a wire switches while both neighbours switch the other
  way, its effective capacitance rises from `(1+2λ)C` to `(1+4λ)C`. This
  costs delay and energy.
* **transient bit errors**: noise, particle hits and low supply voltage flip
  bits.

CADEC (Crosstalk Avoiding Double Error Correction) handles both with one cheap
code. Each 32-bit flit is first protected by an ordinary shortened (38,32)
Hamming code. Every bit of that codeword is then sent on **two adjacent
wires**, and one overall parity wire is added, for 77 wires in all. The
doubling means no wire can ever have both neighbours switching against it.
The two copies plus the parity wire give enough redundancy to correct **any
two wire errors** with a decoder that is barely bigger than a Hamming
decoder. Any flit with three or four wire errors is recognised, and so are
nearly all with more. Such a flit is fetched again over the same link
(switch-to-switch, flit-level retransmission).

Stronger correction lets the link run at a lower voltage swing for the same
residual error rate, and the doubling lowers the coupling capacitance. Both
save energy. The codec is small compared with a switch.

This repository contains synthesizable SystemVerilog for:

* the code itself: the Hamming parts, the CADEC encoder and the CADEC decoder;
* the two ends of a protected link, with ARQ and retransmission;
* one complete switch-to-switch hop that ties them together;
* an optional boundary-shift (BSC) wire layout for the link;

plus a self-checking testbench for each.

## The code word on the wires

| wires       | content                                                        |
|-------------|----------------------------------------------------------------|
| 2i, 2i+1    | Hamming bit i (i = 0..37), the same value on both wires        |
| 76          | XOR of all 38 Hamming bits (the parity of one copy), `p0`      |

The even wires form **copy a** and the odd wires form **copy b**.

The Hamming code uses the textbook layout:

* codeword bit i is Hamming position i+1 (positions 1..38);
* check bits sit at positions 1, 2, 4, 8, 16 and 32;
* the 32 data bits fill the remaining positions in increasing order.

With this layout, the syndrome of a 38-bit copy is just the XOR of the
positions that hold a 1. A single flipped bit therefore gives a syndrome equal
to its own position. Because the code is shortened from 63 to 38 bits, the
syndromes 39..63 cannot come from a single error. The decoder uses this to
detect some worse patterns.

Because every pair of wires carries the same bit, the worst transition the
link can see is `0011 -> 1100`. The victim wire's near neighbour always
switches with it.

### Optional boundary-shift layout

The link ports and the hop take a parameter `BSC` (default 0). With `BSC = 1`,
every second word on the link is rotated by one wire (`bsc_shift`): the
parity wire moves to wire 0 and each Hamming pair moves up by one. Successive
words therefore have their parity wire at opposite ends of the bus, the
boundary-shift style of crosstalk avoidance. The pairing is kept inside each
word, so the duplicated pairs still switch together.

Which words are rotated is set by a phase flip-flop in each port. Both toggle
every clock cycle from reset, so the receiver always knows the phase of the
word it sees, including during idle cycles and replays. The receiver rotates
the word back before decoding, so the decoder is the same in both layouts.

## How the decoder picks a copy

This is the heart of the scheme (`cadec_dec`). The decoder does not correct
both copies. It picks the copy that is most likely clean and runs a single
(38,32) SEC Hamming decoder on it.

1. Compute `p1` = parity of copy a and `p2` = parity of copy b.
2. **`p1 != p2`**: one copy holds an odd number of errors. Take the copy whose
   parity equals the sent parity `p0`: b if `p2 == p0`, else a. No syndrome
   is needed on this path, which is the common case (a single error). The
   inputs of the syndrome unit are then held at zero by AND gates, so it
   does not switch and costs no dynamic energy.
3. **`p1 == p2`**: compute the syndrome of copy b. Take b if it is zero,
   otherwise take a.
4. SEC-decode the chosen copy.

Why every pattern of up to two wire errors is corrected:

| errors                              | path                 | chosen copy holds |
|-------------------------------------|----------------------|-------------------|
| 1 in a                              | p1≠p2, p2==p0 → b    | 0 errors          |
| 1 in b                              | p1≠p2, p2≠p0 → a     | 0 errors          |
| parity wire only                    | p1==p2, syn(b)=0 → b | 0 errors          |
| 1 in a and the parity wire          | p1≠p2, p2≠p0 → a     | 1 error, fixed    |
| 1 in b and the parity wire          | p1≠p2, p2==p0 → b    | 1 error, fixed    |
| 1 in a and 1 in b                   | p1==p2, syn(b)≠0 → a | 1 error, fixed    |
| 2 in a                              | p1==p2, syn(b)=0 → b | 0 errors          |
| 2 in b                              | p1==p2, syn(b)≠0 → a | 0 errors          |

Both wires of one pair in error counts as "1 in a and 1 in b". The testbench
checks all 1 + 77 + 2926 patterns of weight 0, 1 and 2 for several flits.

## When the decoder asks for a retransmission

A flit with three or more wire errors should be fetched again rather than
delivered. The check relies on the code's minimum distance of 7: a
weight-3 Hamming codeword becomes 6 wires plus a parity wire of 1.

`cadec_dec` takes the corrected copy from the Hamming decoder. It spreads
that copy back over the 77 wires (both copies plus its parity) and counts the
wires on which the received word disagrees, saturating at three. `arq_o` is
raised when

* there are three or more disagreements, or
* the chosen copy's syndrome is above 38, so no single error explains it.

The rule works because of the distance:

* With two errors or fewer, the corrected copy is the sent codeword, so there
  are at most two disagreements. No ARQ is raised.
* With three or four errors, there are at least three disagreements, whatever
  happened. If the decoder restored the sent codeword, the disagreements are
  the errors themselves. If it landed on a different codeword, that codeword
  is at least 7 - 4 = 3 wires away from the received word.

So every pattern of three or four errors is caught. Of random five-error
patterns, all but about one in 5,000 are caught as well.

The scheme as first described suggests a different test: raise ARQ on any
non-zero syndrome of the chosen copy. That test would also reject one error
in each copy, a case that must be corrected. The wire-disagreement count does
what that test was meant to do. It costs about 77 XOR gates and a small
saturating counter.

## The link and its retransmission

```
 upstream switch                 link (77 + 2 wires)            downstream switch
 in_valid/in_flit ─► cadec_enc ─► [reg] ── link_code ──► cadec_dec ─► [reg] ─► out_valid/out_flit
     in_ready ◄──── retransmission ◄──────── arq ◄──────────────────── [reg]
                    buffer (2 flits)
```

The encoder is the last pipeline stage of the sending switch (`cadec_link_tx`).
The decoder is the first stage of the receiving one (`cadec_link_rx`). Each
takes one clock cycle. A flit accepted in cycle t is on the link in cycle t+1
and leaves the hop in cycle t+2.

The retransmission protocol:

* If the decoder flags the flit on the link in cycle t, the receiver drops it
  and raises the registered `arq` wire in cycle t+1.
* In that same cycle t+1 the next word is already on the link. The receiver
  drops it unseen.
* The transmitter keeps the last two flits it sent. On `arq` it sends the
  named flit again in t+2 and the dropped one in t+3. New input resumes in
  t+4 (go-back-2).
* `in_ready` is low in cycles t+1 and t+2. Each ARQ therefore costs exactly
  two link cycles.
* Flits still leave the hop exactly once and in order.
* If a replayed flit fails again, the same procedure simply repeats.

The buffer holds raw 32-bit flits and re-encodes them when it replays them.
This is smaller than keeping the 77-bit words. The `link_valid` and `arq`
control wires are assumed to be reliable and are not coded. An assertion in
`cadec_link_tx` checks that an ARQ only ever names a real flit that was not
dropped.

## Modules

| file                   | module               | role                                                      |
|------------------------|----------------------|-----------------------------------------------------------|
| `rtl/cadec_pkg.sv`     | package              | flit width (32), derived Hamming sizes (6 check bits, 38, 77) |
| `rtl/hamming_enc.sv`   | `hamming_enc`        | (38,32) Hamming encoder                                   |
| `rtl/hamming_syndrome.sv` | `hamming_syndrome` | 6-bit syndrome of one copy                                |
| `rtl/hamming_dec.sv`   | `hamming_dec`        | SEC decoder, flags syndromes above 38                     |
| `rtl/cadec_enc.sv`     | `cadec_enc`          | 32 → 77 wires                                             |
| `rtl/cadec_dec.sv`     | `cadec_dec`          | 77 wires → 32 bits, copy selection, ARQ                   |
| `rtl/cadec_link_tx.sv` | `cadec_link_tx`      | encoder stage + retransmission buffer                     |
| `rtl/cadec_link_rx.sv` | `cadec_link_rx`      | decoder stage + ARQ + drop rule                           |
| `rtl/cadec_hop.sv`     | `cadec_hop` (top)    | tx → link → rx, with a noise input on the link            |
| `rtl/bsc_shift.sv`     | `bsc_shift`          | one-wire rotation of a link word, or its inverse          |

`cadec_hop` has a `link_noise[76:0]` input that is XORed onto the wires. It
exists to inject transient errors in simulation; tie it to zero in a real
design. Its outputs `arq`, `corrected` and `retx` show the events on the hop.

All modules except `bsc_shift` take the parameter `K` (flit width, default
32). The link ports and the hop also take `BSC` (0 or 1, see above), and
`bsc_shift` takes the word width `W` and `UNSHIFT` (0 = sending side). The Hamming
sizes follow from it: R is the smallest value with 2^R ≥ K+R+1, N = K+R, and
the link is 2N+1 wires wide. Only K = 32 is tested.

Reset is synchronous and active low. The codecs are purely combinational, and
only the link ports hold state. After coarse synthesis, the full hop is about
850 word-level cells and 213 flip-flops.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops. They use the
shared reference model `tb/cadec_tb_pkg.sv`, which is written separately from
the RTL. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/cadec_pkg.sv tb/cadec_tb_pkg.sv tb/tb_cadec_hop.sv --top-module tb_cadec_hop
./obj_dir/Vtb_cadec_hop
```

Swap in `tb_hamming_enc`, `tb_hamming_syndrome`, `tb_hamming_dec`,
`tb_cadec_enc`, `tb_cadec_dec`, `tb_cadec_link_tx`, `tb_cadec_link_rx` or
`tb_bsc_shift` to test a single block.

`tb_cadec_hop` runs the top at its default size for 20,000 cycles:

* random traffic with gaps;
* on about half the cycles, a random error pattern on the link: one wire, two
  wires, the parity wire alone, or three or four random wires;
* a scoreboard that requires every flit to arrive once, in order and intact;
* a check that a flit which meets no ARQ arrives exactly two cycles after it
  was accepted.

It also counts every mechanism of the hop and fails if one never happened:
single and double correction, the one-in-each-copy case, the parity-only
error, ARQ, the dropped follower, replay, a replay that fails again, and
source stalls. `tb_cadec_hop_bsc` runs the same test with `BSC = 1`.

`tb_cadec_hop_ber` sends 2,500 packets of 16 flits over a link on which every
wire flips independently with probability 1/128. It compares the measured
rates with the binomial figures for 77 wires:

| quantity                                 | measured | expected |
|------------------------------------------|----------|----------|
| words with an ARQ (3 or more errors)     | 0.0224   | 0.0227   |
| words delivered after correction (1–2)   | 0.432    | 0.431    |
| throughput, flits per link cycle         | 0.956    | 0.956    |

The expected throughput is (1 − P3)/(1 + P3), where P3 is the chance of three
or more errors, since each ARQ costs two cycles. All testbenches pass.

## Departures and limits

* The default layout is the DAP style, with the pair copies side by side.
  The boundary-shift layout is a parameter. Its select is a phase flip-flop
  that toggles every cycle, not the clock signal itself, and the rotation
  direction is this design's choice.
* The comparison codes (plain Hamming with DAP or BSC, MDR, ED) are not built
  as separate designs.
* The ARQ test departs from the published one: it counts wire
  disagreements instead of checking the chosen copy's syndrome (see "When
  the decoder asks for a retransmission").
* The Hamming H matrix, the wire-to-copy naming (even = a), the one-cycle
  ARQ timing, go-back-2, the valid/ready handshake, the operand isolation of
  the syndrome unit and the reset style are choices of this design. The
  scheme as published leaves them open.
* The switches and the networks in which the scheme was evaluated are not
  included: 64-IP mesh, folded torus and butterfly fat tree networks with
  wormhole routing. Only the hop between two switch pipeline stages is
  modelled. The receiver has no back-pressure towards its switch.
* Energy, voltage-swing and wire-delay figures belong to the circuit and
  wiring level. The RTL does not model them.
