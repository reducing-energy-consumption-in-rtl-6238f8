# Coupling-aware flit inversion for network-on-chip links

On long on-chip wires, much of the dynamic power goes into the coupling capacitance between
neighbouring lines rather than into the capacitance to ground. Two adjacent lines that switch
in opposite directions cost about twice as much as one line switching next to a quiet one.
This RTL cuts that cost without touching the network. Each flit is re-coded in the
source network interface and restored in the destination network interface. The re-coding
inverts a chosen subset of the lines whenever that lowers the coupling activity against the
word already on the link.

Wormhole switching sends the flits of a packet down the path in order. So every link of the
path carries the same word sequence as the first one, and one decision at the source saves
power on every hop. The routers see ordinary flits: the head flit is never re-coded, so routing
works unchanged.

Three encoders are provided. Each adds logic and saves more than the one before:

| scheme | choices per flit                  | control lines | payload bits (W = 32) |
|--------|-----------------------------------|---------------|-----------------------|
| I      | unchanged, odd inversion          | 1             | 31                    |
| II     | unchanged, odd, full inversion    | 2             | 30                    |
| III    | unchanged, odd, even, full        | 2             | 30                    |

"Odd inversion" inverts the odd-numbered lines (1, 3, 5, ...). "Even inversion" inverts the
even-numbered ones. "Full inversion" inverts all lines.

## The coupling model

Take two adjacent lines i and i+1, and one transfer from time t-1 to time t. There are four
kinds of transition:

| type | what happens                                   | coupling cost |
|------|------------------------------------------------|---------------|
| I    | exactly one of the two lines switches          | 1             |
| II   | both switch, in opposite directions (01 <-> 10) | 2             |
| III  | both switch, in the same direction (00 <-> 11) | 0             |
| IV   | neither switches                               | 0             |

A word of W lines has W-1 adjacent pairs. For a flit, the coupling power is proportional to
T1 + 2*T2, where T1 and T2 count pairs of Type I and Type II. All decisions in this design
minimise that figure. Self-switching (lines going 0 to 1) is deliberately left out of the
decision, because the coupling capacitance dominates. As a result, a chosen inversion can
raise the number of rising edges even while it lowers the coupling term.

## What each inversion does to a pair

Inverting exactly one line of a pair (this is what odd or even inversion does to every pair)
gives these results:

* Types II, III and IV all become Type I: cost 1.
* A Type I transition becomes Type IV if the inverted line was the one switching (cost 0). It
  becomes Type III or Type II if the inverted line was the quiet one. It becomes Type II (cost
  2) exactly when the two lines differed at t-1.

Full inversion gives these results:

* Type II becomes Type IV (saves 2).
* Type IV on a 01/10 pair becomes Type II (costs 2); this case is called T4**.
* Type IV on 00/11 becomes Type III, Type III becomes Type IV, Type I stays Type I.

Which line of a pair is "odd" alternates along the word. So the odd and even inversions help
different Type I transitions, and Scheme III recovers the cases that odd inversion makes worse.

## The decision: counting instead of comparing costs

The encoder does not compute the link cost of each candidate word. It runs one small detector
per line pair, adds the detector outputs with population counters, and compares the sums:

* **Ty** (`ty_block`) flags a pair whose transition is Type II, or Type I where odd inversion
  does not produce Type II. Relative to sending unchanged, odd inversion changes the cost by
  `(W-1) - 2*Ty`. So it pays off when `Ty > (W-1)/2`.
* **Te** (`te_block`) is the same test for even inversion: the change in cost is `(W-1) - 2*Te`.
* **T2** and **T4**** (`t2_t4_block`) give the change for full inversion: `2*(T4** - T2)`.

For W = 32, the payoff test for odd inversion is "16 or more of the 31 pairs are flagged".

* Scheme I sends odd-inverted when `2*Ty > W-1`.
* Scheme II (`module_a`) chooses odd when `Ty > (W-1)/2` and `2(T2-T4**) < 2Ty-W+1`. It
  chooses full when `T2 > T4**` and `2(T2-T4**) > 2Ty-W+1`. The two cannot both hold. When W-1
  is odd, the two sides of the second test can never be equal.
* Scheme III (`module_c`) computes the three changes in cost and takes the smallest negative
  one. Ties go to the earlier option in the order unchanged, odd, full, even, so the encoder
  inverts only when that saves something.

This gives exactly the cheapest candidate under the T1 + 2*T2 cost. The testbenches check it
against a reference that does try every candidate.

## Word format on the link

* The link has W data lines (default 32) and a two-line kind sideband
  (`nocenc_pkg::flit_kind_e`: BODY, HEAD, TAIL, HEADTAIL).
* Head flits (HEAD and HEADTAIL) cross unchanged, using all W lines.
* In body and tail flits, the top lines are control lines. Scheme I uses line W-1; Schemes II
  and III use lines W-1 and W-2. The encoder treats the control lines as 0 in the raw flit and
  then applies the chosen inversion to the whole word, control lines included. So the control
  lines need no separate logic. They read:

  | lines W-1, W-2 | meaning           |
  |----------------|-------------------|
  | 0 0            | unchanged         |
  | 1 0            | odd inversion     |
  | 0 1            | even inversion (III only) |
  | 1 1            | full inversion    |

  Scheme I has only line W-1, the inv flag, which is set by odd inversion.
* The payload of a body/tail flit is bits W-2..0 (Scheme I) or W-3..0 (Schemes II, III).
  The encoder ignores whatever the source puts on the control lines, and the decoder delivers
  them as 0.
* The encoder compares against the word last driven on the link. That can be a head flit or
  a word from an earlier packet. After reset it is all zeros.

## Modules

```
nocenc_top                  three independent channels, one per scheme
  encoder_s1                Scheme I
    ty_block x (W-1)
    ones_counter
  decoder_s1
  encoder_s2                Scheme II
    ty_block, t2_t4_block x (W-1)
    ones_counter x 3
    module_a
  decoder_s2
  encoder_s3                Scheme III
    ty_block, te_block, t2_t4_block x (W-1)
    ones_counter x 4
    module_c
  decoder_s3
nocenc_pkg                  flit kind enum, is_head(), Type I / Type II tests
```

`nocenc_top` has one parameter, `W` (default 32). For channel N it has ports with the prefix
`sN_`:

* `in_*`: raw flits into the encoder.
* `tx_*`: encoded words from the encoder towards the network.
* `rx_*`: encoded words from the network into the decoder.
* `out_*`: decoded flits.

The routers and wires are not part of this RTL. A real system joins `tx_*` to the network at
the source node and `rx_*` at the destination node. Only one scheme would normally be
instantiated; the top carries all three so that they can be compared.

## Timing and handshake

* Every stream is valid/ready: a word moves when both are high, and a stalled word is held.
  The encoders assert this rule on their link side.
* Encoder: the encoded word is registered. A flit accepted at one rising edge is on `link_*`
  after that edge. With no backpressure the encoder takes one flit per cycle;
  `in_ready = !link_valid || link_ready`. The reset is asynchronous and active low, and
  clears the link register.
* Decoder: combinational, with no state. Ready passes straight back.
* The critical path in the encoder is: pair detectors, a 31-input population count, a small
  signed compare, a 32-bit inversion mux, then the link register.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

* Pair detectors: all 16 input cases, with the pair starting on an even line and on an odd
  line. The expected value comes from the physical cost `|d(t) - d(t-1)|`, where
  `d = line(i) - line(i+1)`.
* `module_a`: all 32^3 count combinations. `module_c`: every (Ty, Te) pair with random
  (T2, T4**), plus random sets of counts.
* Encoders: 300 random packets plus directed alternating patterns, with random link stalls.
  Each word is compared with a brute-force reference encoder (`tb/tb_ref_pkg.sv`). The
  testbenches also check the one-cycle latency, one flit per cycle without stalls, head flits
  passing through, and that an encoded flit never costs more than the raw one.
* Decoders: random words of every code, and head flits.
* `tb_nocenc_top`: the full design at default parameters. Each channel sends 200 eight-flit
  packets through a behavioural multi-hop path with random stalls (`tb/noc_path_model.sv`)
  into a stalling sink, and every flit must arrive intact. It counts head bypasses, each
  inversion kind, network backpressure and sink backpressure, and fails if any of them never
  occurred.

`tb_workload_traffic` runs 500 eight-flit packets of two kinds of traffic through all three
channels and compares the links with an unencoded link carrying the same flits. Each figure
weighs rising edges by Cs = 0.237 and coupling activity by Cc = 0.947:

| traffic                            | Scheme I | Scheme II | Scheme III |
|------------------------------------|----------|-----------|------------|
| uniform random 30-bit payloads     | 9.4 %    | 14.0 %    | 16.2 %     |
| slowly varying signed samples      | 0.0 %    | 0.8 %     | 0.8 %      |

The second row shows a real limitation. On data where few lines switch, odd inversion almost
never beats sending the flit unchanged. Full inversion removes some Type II transitions, but
it adds many rising edges, which the decision does not weigh. The saving therefore depends
strongly on the data. The encoder testbenches measure the coupling term alone on random
payloads: about 10 %, 16 % and 19 % lower for Schemes I, II and III.

To simulate with plain Verilator, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/nocenc_pkg.sv tb/tb_ref_pkg.sv tb/tb_nocenc_top.sv --top-module tb_nocenc_top
./obj_dir/Vtb_nocenc_top
```

Replace `tb_nocenc_top` with any other `tb_<module>` to run that module's testbench.

## Where this RTL makes its own choices

The source publication describes the decision rules, the per-pair detectors, the ones
counters and the Scheme II and III decision modules. It does not give the following, which
were chosen here:

* How many control lines Schemes II and III use, and their codes. Here: two lines, with codes
  that fall out of inverting raw control lines that are 0.
* How the decoder recognises a head flit. Here: a kind sideband next to the data lines.
* The handshake, the one-cycle registered encoder, the combinational decoder, and the reset
  value of the link word.
* The tie-break order in Scheme III.
* That the "previous word" is whatever was last on the link, head flits included.

The decision neglects self-switching, as described above. The network interface around the
encoder and decoder (packetisation, bus protocol) and the wormhole routers are outside this
RTL.
