# Inversion coding for low-coupling-energy network-on-chip links

On a deep-submicron on-chip link most of the switching energy goes into the
capacitance *between* neighbouring wires, not into the wires' capacitance to ground.
When two neighbours toggle in opposite directions the coupling capacitor sees twice
the supply swing. When one toggles and the other holds still it sees one swing. When
both move together, or neither moves, it sees none. The encoders here sit in the
network interface, before a flit enters the network, and the decoders sit where it
leaves. Each encoder looks at the flit it is about to send and at the word last sent
on the link, and picks the inversion that lowers the coupling activity: inverting
the odd-numbered wires, the even-numbered wires, all wires, or none. One or two
extra wires tell the decoder what was done. Routers and links are untouched; they
just carry a slightly wider flit.

Three schemes are provided, each with its encoder and decoder:

| scheme | inversions it may use | extra wires | decoder needs previous word |
|--------|-----------------------|-------------|-----------------------------|
| I      | odd                   | 1           | no                          |
| II     | odd ("half"), full    | 1           | yes                         |
| III    | odd, even, full       | 2           | no                          |

## Transition types and their cost

Take two neighbouring wires and compare their values in the previous word and the
current word. The pair makes one of four transitions:

| type | what happens                                  | example   | coupling weight |
|------|-----------------------------------------------|-----------|-----------------|
| I    | exactly one wire toggles                      | 00 -> 10  | 1               |
| II   | both toggle, in opposite directions           | 01 -> 10  | 2               |
| III  | both toggle, in the same direction            | 00 -> 11  | 0               |
| IV   | neither toggles                               | 01 -> 01  | 0               |

The cost of a word is the sum of the weights over the pairs that the encoder counts.
Only coupling is weighed; the energy of each wire to ground is ignored. The weights
1 and 2 come from the source design. Dropping the self-energy term is this
implementation's reading of it.

Two facts make the hardware small:

* **Inverting one wire of a pair always changes the pair's weight by exactly one.**
  Type II and type IV become type I. Type III becomes type I. Type I becomes type
  IV, III or II, depending on which wire is inverted and whether the two wires were
  equal before. Odd inversion inverts exactly one wire of *every* pair, and so does
  even inversion. Each pair therefore either gains 1 or loses 1. The saving of odd
  inversion is `2*N_ty - NP`, where `NP` is the number of pairs and `N_ty` is the
  number of pairs where it helps. The same holds for even inversion with `N_te`.
  Odd inversion pays off exactly when a majority of pairs are flagged.
* **Full inversion only matters for type II and type IV pairs with unequal wires.**
  Type II becomes type IV (saves 2). A stable 01 or 10 pair becomes type II (costs
  2). Every other pair keeps its weight. The saving is `2*(N_t2 - N_t4**)`.

So every decision reduces to counting flags per pair. The detectors are Ty
(odd-wire inversion helps), Te (even-wire inversion helps), T2 (type II) and T4**
(stable, unequal wires). Each row is summed by a popcount ("Ones" block), and the
counts are compared.

## The three encoders

All three have the same outer shape (`link_encoder`). A combinational block E
computes the link word `z` from the flit body `x` and the previous link word `y`. A
register then keeps `z` as the next `y`. The body is `DATA_W` bits (default 8). The
inversion wire(s) enter block E as 0 and leave it set to the action.

**Scheme I** (`enc_s1`) has one row of Ty detectors and a majority voter. If the
majority says so, the odd body wires and the inversion wire are inverted.

**Scheme II** (`enc_s2`) adds T2 and T4** rows and three popcounts. `module_a`
compares the odd saving `2*N_ty - NP` with the full saving `2*(N_t2 - N_t4)`. It
takes the larger one if it is positive, and prefers half inversion on a tie. Even
wires are XORed with *full*, odd wires with *half or full*, and the single
inversion wire is *half or full*.

**Scheme III** (`enc_s3`) has four rows (Ty, Te, T2, T4**), four popcounts and
`module_c`. `module_c` returns `{odd, even}`: `10` odd, `01` even, `11` full, `00`
none. It chooses the largest positive saving and breaks ties in the order odd,
even, full. The link has two inversion wires at positions `DATA_W` and `DATA_W+1`.
Odd inversion flips the odd-numbered one and even inversion the even-numbered one,
so together the two wires spell out the action.

## Decoding, and the one subtle point

Scheme I and scheme III decoders (`dec_s1`, `dec_s3`) read the inversion wire(s) and
XOR the body back. They do not need the previous word.

Scheme II is the hard case. It has one inversion wire for two different inversions.
`dec_s2` runs a row of Ty detectors on the *received* word against the *previous
received* word and takes a majority. A majority means full inversion, a minority
means half. For this to be exact, two things must hold:

* **After a half inversion the received word always shows a minority.** Odd
  inversion turns every flagged pair into an unflagged one and back. The encoder
  chose it because more than half the pairs were flagged, so fewer than half are
  flagged in what it sent. This holds by construction.
* **After a full inversion the received word must show a majority.** This does
  *not* follow from the savings alone. For example, if every pair is type II, full
  inversion is best, but the received word then has no flagged pairs at all. The
  encoder therefore has a fourth detector row. It runs the decoder's own Ty majority
  on the fully inverted flit and feeds the result to `module_a` as `full_ok`. Full
  inversion is allowed only when `full_ok` is high.

With the 8-bit body, the scheme II block test feeds a mix of random and alternating
flits. Scheme II chooses full inversion for about 4 % of them and half inversion for
about 55 %. Scheme III has a free choice among all four
actions, because its decoder does not have to infer anything.

## Link format and timing

```
scheme I / II :  wires [DATA_W-1:0] body, wire DATA_W = inv
scheme III    :  wires [DATA_W-1:0] body, wire DATA_W and DATA_W+1 = inversion flags
                 (with DATA_W even: DATA_W = even-inversion flag, DATA_W+1 = odd flag)
```

* Encoder and decoder are combinational from `valid`/`data` to `link` and from
  `link` to `data`. There is no added latency; a design that needs to break the
  path can register the link outside.
* The previous-word registers load only on valid cycles. Idle cycles do not disturb
  them, which matters for the scheme II decoder.
* `rst_n` is active low and synchronous. It clears both previous-word registers, so
  the link is taken to start at all zeros. Encoder and decoder must be reset
  together.
* Only the pairs inside the body (`DATA_W-1` of them) are counted. The pair formed
  by the top body wire and an inversion wire is left out. With an even body width,
  the scheme I/II inversion wire sits where odd inversion would flip both wires of
  that pair. That would break the "exactly one unit per pair" property on which the
  majority voter and the scheme II decoder rely.

## Top level

`link_code_top` is a self-contained demonstrator built as the source design's test
top was: an 8-bit address counter steps a 256 x 8 memory (`flit_sram`). Each word
read goes through the scheme I, II and III encoders side by side, over three links,
into the three decoders. With `enb` high the counter advances. The word read at that
clock edge appears on all three links and all three decoder outputs in the next
cycle, together with `out_valid`. The link words and the encoder and decoder actions
are brought out so that the switching on each link can be measured.

At start-up the memory holds a scrambled copy of its address: word `a` is byte 3 XOR
byte 1 of `a * 0x9E3779B1` (32-bit product). A write port lets other data be loaded.

## Files

| file | contents |
|------|----------|
| `rtl/link_code_pkg.sv` | transition types, action codes, pair-detector flags, cost function |
| `rtl/pair_detect.sv` | Ty / Te / T2 / T4** detectors of one wire pair |
| `rtl/ones_count.sv`, `rtl/majority_voter.sv` | popcount and majority |
| `rtl/module_a.sv`, `rtl/module_c.sv` | scheme II and scheme III decision logic |
| `rtl/enc_s1.sv` ... `rtl/enc_s3.sv` | block E of each scheme |
| `rtl/dec_s1.sv` ... `rtl/dec_s3.sv` | block D of each scheme |
| `rtl/link_encoder.sv`, `rtl/link_decoder.sv` | block E/D plus previous-word register, `SCHEME` = 1, 2, 3 |
| `rtl/addr_counter.sv`, `rtl/flit_sram.sv` | counter and memory of the demonstrator |
| `rtl/link_code_top.sv` | the demonstrator top |
| `tb/link_ref_pkg.sv` | reference model: costs from voltage steps, encoders by trying every inversion |
| `tb/*_tb.sv` | one self-checking testbench per module |
| `tb/link_width_tb.sv` | encoder-to-decoder loopback of every scheme at body widths 5 and 16 |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module link_code_top_tb \
    rtl/link_code_pkg.sv tb/link_ref_pkg.sv rtl/*.sv tb/link_code_top_tb.sv
./obj_dir/Vlink_code_top_tb
```

(List `rtl/link_code_pkg.sv` first. The glob lists it a second time, which Verilator
reports as a warning that `-Wno-fatal` lets pass.) The same command with
another `_tb` module runs any block test.

The reference model in `tb/link_ref_pkg.sv` does not reuse the RTL's detectors. It
computes a pair's coupling weight as `|dv_i - dv_{i+1}|`, from the voltage step of
each wire. It models each encoder by trying every inversion the scheme allows and
keeping the cheapest, with the same tie rules. The block tests compare the encoders
word for word with it, decode streams it produced, and check the decision modules
over every combination of counts. `link_code_top_tb` runs the top at its default
size for 1400 cycles. Enable drops out at random, and the address wraps four times.
Part of the memory is rewritten with 0x55/0xAA-like patterns. Every decoded flit and
every link word is checked. The test fails if any action of any scheme, a stall, a
wrap or a write never occurred. `link_width_tb` repeats the loopback at body widths 5
and 16. An odd width swaps the roles of the two scheme III inversion wires. A typical run reports this coupling cost of the body
wires:

```
raw 8184   scheme I 3605   scheme II 3589   scheme III 3035
```

That is 56 %, 56 % and 63 % less coupling activity than an unencoded 8-bit link for
this traffic. These numbers count coupling transitions only. They ignore the extra
wires and the energy of the encoder itself.

## Departures from the source design and open points

* **Decision rules.** The source names the blocks (Ty, Te, T2, T4**, Ones, Module A,
  Module C) and the action codes. It does not give their complete conditions. The
  savings-based rules above, the tie orders and the type lists behind Ty and Te
  are this implementation's, derived from the transition tables.
* **Scheme II full-inversion guard.** The extra Ty row on the inverted flit is
  added so that the single-bit decoder is always right. Without it, full inversion
  would sometimes be decoded as half inversion.
* **Scheme III decoder.** The source draws a single-inversion-bit decoder that can
  tell odd from even but not full. Its encoder drawing has two inversion wires, and
  it notes that two bits make the decoder cheaper. This implementation decodes from
  the two bits.
* **Previous word at the decoder.** The decoder keeps the previous *received*
  (encoded) word, which is what the encoder compared against, not the previous
  decoded word.
* **Inversion-wire pair not counted**, as explained under *Link format*.
* **Demonstrator.** The three schemes share one counter and memory. The source
  shows one scheme per top. The memory contents and its write port are this
  implementation's; the source does not give the data it sent.
* **Not modelled:** power. The source reports an FPGA power estimate; the
  testbench's transition count is only a proxy for it.
