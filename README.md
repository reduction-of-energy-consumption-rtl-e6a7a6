# End-to-end inversion coding for low-power NoC links

On long on-chip wires, most of the dynamic power does not go into charging
a wire against ground but into the coupling capacitance between neighbouring
wires. How much a flit costs depends on *how the neighbours switch together*:
two adjacent wires that switch in opposite directions cost twice as much as
one switching next to a quiet neighbour, and two that switch the same way
cost almost nothing in coupling.

This RTL reduces that coupling activity on network-on-chip links by sending
each body flit either as it is or with a fixed set of its wires inverted,
whichever makes the transition from the previous flit cheaper. The
encoding is done once, in the network interface (NI) that injects the
packet, and undone once, in the NI that receives it. Routers and links are
not changed. This works because wormhole switching sends the flits of a
packet one after another along the whole route. A flit sequence that is
cheap on the first link is then equally cheap on every later link of the
path.

Three encoding schemes are provided, each a superset of the previous one:

| scheme | inversions it can choose          | payload wires per body flit |
|--------|-----------------------------------|-----------------------------|
| I      | none, odd                         | W-1 (31 for W = 32)         |
| II     | none, odd, full                   | W-2 (30)                    |
| III    | none, odd, even, full             | W-2 (30)                    |

Head flits carry routing information and are never encoded.

## Transition types and the cost being minimised

For every pair of adjacent wires (i, i+1), the change from the word now on
the link to the next word falls into one of four types:

| type | what the two wires do                   | coupling weight |
|------|-----------------------------------------|-----------------|
| I    | exactly one of them switches            | 1               |
| II   | both switch, in opposite directions     | 2               |
| III  | both switch, in the same direction      | 0               |
| IV   | neither switches                        | 0               |

The link power is modelled as `P ~ T(0->1) + (T1 + 2*T2) * Cc/Cs`, where
T(0->1) counts rising wires and Tn the type-n pairs. The coupling capacitance
is about four times the self capacitance on the links in question. The
encoders therefore decide on the coupling term alone: **cost = T1 + 2*T2**,
with self switching left out. `coupling_cost` computes the four type counts,
the rising-wire count and this cost for a pair of words.

Inversion changes types in a predictable way. Inverting the odd wires of the
next word toggles whether each odd wire switches. That turns Type II and
Type III pairs into Type I, turns Type IV into Type I, and turns a Type I
pair into Type IV, II or III. Which of the three it becomes depends on which
wire was switching and whether the pair's old values matched. Full inversion
turns Type II and Type III pairs into Type IV, keeps Type I as Type I, and
turns Type IV into Type II or III. Even
inversion does for the even wires what odd inversion does for the odd
ones. A Type I pair whose *even* wire switches is removed by even inversion
but may become Type II under odd inversion. Offering both is what scheme III
adds.

Because every pair holds exactly one odd and one even wire, odd inversion
and even inversion each change the cost of every one of the W-1 pairs by
exactly one. With W = 32 there are 31 pairs, an odd number. Odd or even
inversion therefore always changes the cost by an odd amount, so most pairs
of candidates can never tie. The only ties possible are none against full,
and odd against even.

## Inversion state on the link: the control wires

The decoder must learn from the flit itself which wires were inverted.
All inversions are XORs with a mask, so two control wires are enough:

* **Wire W-1, the inversion bit.** It is an odd wire. The encoder clears it
  before inverting, so after encoding it reads 1 exactly when the odd wires
  were inverted (odd or full inversion).
* **Wire W-2, schemes II and III only.** It is an even wire. It is also
  cleared before encoding, so it reads 1 exactly when the even wires were
  inverted (even or full inversion).

The decoder XORs a body flit with the odd mask if wire W-1 is set. Under
schemes II and III it also XORs with the even mask if wire W-2 is set. This
restores the payload and at the same time returns both control wires to 0.
Under scheme I, wire W-2 is ordinary payload.

The control wires are real link wires. Their own transitions, and their
coupling to the payload wires next to them, are part of the cost each
encoder minimises.

## Decision rules

Each encoder forms its candidate words and costs each one against the word
currently on the link, using its own `coupling_cost` instance per candidate.
The costs are called P (none), P' (odd), P_even (even) and P'' (full).

* **Scheme I (`enc_scheme1`).** Odd inversion if P' < P, otherwise none.
* **Scheme II (`enc_scheme2`).** Odd inversion if P' < P and P' < P''.
  Otherwise, full inversion if P'' < P. Otherwise none.
* **Scheme III (`enc_scheme3`).** The cheapest candidate. The flit is sent
  as is unless some inversion is strictly cheaper. Among equally cheap
  inversions the later one in the order odd, even, full wins. Given the
  parity argument above, this means even beats odd on a tie.

The rules for schemes I and II compare P, P' and P'' directly. Closed-form
versions of these conditions exist, written in terms of the type counts.
The direct comparison gives the same decisions and is easier to check. All
encoders are purely combinational.

## Network-interface stages and timing

The encoding adds four stages to the NIs. On the sending side, a packer
feeds an encoder stage. On the receiving side, a decoder stage feeds an
unpacker.

### Packing the payload into narrower flits

Without encoding, a body flit carries W payload bits. With encoding, one
or two link wires carry the inversion state, so the payload is repacked.
`ni_flit_packer` takes a packet as a header word followed by W-bit payload
words, framed with `head` and `last` flags. The header becomes the head
flit unchanged. The payload words are laid end to end, least significant
bit first, in a 2W-bit buffer. A body flit of PW bits is taken from the
bottom of the buffer whenever enough bits are there:

* PW = W-1 under scheme I;
* PW = W-2 under schemes II and III;
* PW = W without encoding.

After the last word, the leftover bits are zero-padded to PW and sent as
the tail flit. A packet of n payload words therefore needs
1 + ceil(n*W/PW) flits. Seven 32-bit words take 8 flits without encoding
and 9 with it.

Once a packet's first body flit has left, its body flits leave back to
back at one per cycle. There is one idle cycle between the head flit and
the first body flit.

`ni_flit_unpacker` does the reverse. It appends PW bits from each body flit
and emits a word whenever W bits are there. After the tail flit, the
leftover bits are padding; it drops them and flags the last word with
`last`. Padding is always shorter than PW, so the tail flit always completes
the last word. Packer and unpacker must agree on PW, which depends only on
`scheme`.

### Encoder and decoder stages

`ni_tx_encoder` is the encoder stage of the sending NI. One register drives
the link wires, and it is also the "previous word" that every new flit is
compared with. The link is assumed to keep its last word while idle. All
three scheme encoders are built, and the `scheme` input selects one of them
or `SCHEME_NONE`. Head flits, and all flits under `SCHEME_NONE`, are loaded
unchanged. Even so, a head flit becomes the reference for the first body
flit.

`ni_rx_decoder` is the decoder stage of the receiving NI: `link_decoder`
followed by an output register.

Both stages use the same handshake and timing:

* valid/ready on every side; a flit moves when both are high;
* one cycle of latency per stage;
* one flit per cycle;
* a stalled output is held stable (checked by assertions);
* asynchronous active-low reset, which empties the stages and clears the
  link register to all zeros.

`scheme` must be the same at both ends. Change it only while no packet is
in flight.

`nocenc_top` chains packer, encoder stage, decoder stage and unpacker. The
network between the two sides (routers and links) is outside the module:
`link_tx_*` goes to the first router, and `link_rx_*` comes from the last
one. Tying them together gives a
single-link path. The status outputs report the inversion each flit
carries, and its coupling cost on the first link.

| port group       | signals                                        |
|------------------|------------------------------------------------|
| configuration    | `clk`, `rst_n`, `scheme` (`scheme_e`)          |
| from the core    | `tx_valid/ready`, `tx_head`, `tx_last`, `tx_data[W-1:0]` |
| to first router  | `link_tx_valid/ready/kind/data`, `link_tx_inv`, `link_tx_cost` |
| from last router | `link_rx_valid/ready/kind/data`                |
| to the core      | `rx_valid/ready`, `rx_head`, `rx_last`, `rx_data[W-1:0]` |

On the link, head and tail flags travel as two sideband wires next to the
W data wires.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `W`       | 32      | link wires, including the control wires (32-wire links are the evaluated configuration) |
| `CW`      | 7       | width of the cost and count outputs, `$clog2(2*W+1)` |

The RTL is parameterised for W from 4 to 1024; the odd and even masks are
cut from repeating patterns in `nocenc_pkg`. The testbenches run at
W = 32, and the end-to-end test also passes at W = 16.

## How far it is checked

Each block has a self-checking testbench in `tb/`. The testbenches compare
against a reference model, `tb_ref_pkg`, written independently of the RTL.
The model derives the cost from signed wire changes: pair cost = |Δi − Δi+1|
with Δ ∈ {−1, 0, +1}. It finds the encoding by trying every allowed
inversion.

* `tb_coupling_cost`, `tb_enc_scheme1..3` and `tb_link_decoder` check
  several thousand directed and random vectors each. The encoder testbenches
  also check that every inversion allowed by the scheme is chosen at least
  once, and that no other inversion ever is.
* `tb_ni_tx_encoder` and `tb_ni_rx_decoder` drive random packets against
  random backpressure. They check order, encoding, the one-cycle latency and
  that stalled flits are held.
* `tb_ni_flit_packer` and `tb_ni_flit_unpacker` send random packets of 0 to
  31 payload words under every scheme. They check the result flit by flit
  (or word by word) against the reference cut-up, including padding and the
  head/tail/last flags. The packer test also checks that body flits leave
  back to back when nothing stalls.
* `tb_nocenc_top` runs the whole design at its default parameters. The
  path is three behavioural router hops with random stalls (`tb_noc_path`).
  The same 200 packets are sent once without encoding and once under each
  scheme. Each packet is a header and seven random 32-bit words, which is
  8 flits without encoding.

  The test checks that every word arrives intact and correctly framed, and
  that the flit counts are right. It checks that each scheme lowers the
  coupling cost per link flit, and that this cost does not rise from
  scheme I to II to III. It also checks that each scheme lowers the total
  link energy. Finally, it checks that head bypass, every inversion kind,
  padded tails, stalls on both sides and scheme switches all occur.

The energy estimate uses Vdd² · (Cs · T(0->1) + Cc · (T1 + 2·T2)) with the
values of a 2 mm link in 65 nm: Vdd = 0.9 V, Cs = 0.237 pF, Cc = 0.947 pF.
On random data the results, relative to no encoding, are:

| scheme | coupling cost per flit (link power) | link energy per packet |
|--------|-------------------------------------|------------------------|
| I      | 84 %                                | 96 %                   |
| II     | 80 %                                | 91 %                   |
| III    | 78 %                                | 89 %                   |

The energy saving is smaller than the power saving because the narrower
payload needs one extra flit per packet here. Real traffic is more
correlated than random data, and the saving on it will differ.

Not verified here: timing closure at a given clock (700 MHz is the
intended NoC clock), area and power after synthesis, and behaviour on
real application traffic.

## Departures and design choices

These points are choices made in this RTL; check them before integration:

* The full/even marker on wire W-2 is this design's own. It costs
  schemes II and III one payload wire.
* The transition types and the weights 1 and 2 follow the usual
  coupling-capacitance model. The decision ignores self switching.
* The run-time `scheme` select is this design's own. It puts all three
  encoders in the NI. A design that uses one scheme only can instantiate
  that encoder directly, or tie `scheme` to a constant and let synthesis
  remove the others.
* The valid/ready handshake, the single register in each NI stage and the
  reset value of the link register are this design's own.
* The packer's bit order, its zero padding, the 2W-bit buffers and the
  core-side framing (a header word, then payload words, with head/last
  flags) are this design's own. The rest of the NI is not included: its bus
  protocol front end and its buffering. Neither are the routers. Their
  signals are the top's ports.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends. For
example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/nocenc_pkg.sv tb/tb_ref_pkg.sv tb/tb_nocenc_top.sv --top-module tb_nocenc_top
./obj_dir/Vtb_nocenc_top
```

Replace the top-level testbench with `tb_enc_scheme2` (and so on) to run
the block tests. The `-I` paths let Verilator find the other modules by
file name.

## Files

* `rtl/nocenc_pkg.sv`: scheme and inversion enums, flit sideband struct,
  mask patterns
* `rtl/coupling_cost.sv`: transition-type counter and coupling cost
* `rtl/enc_scheme1.sv`, `rtl/enc_scheme2.sv`, `rtl/enc_scheme3.sv`:
  encoding logic of the three schemes
* `rtl/link_decoder.sv`: decoder for all schemes
* `rtl/ni_flit_packer.sv`, `rtl/ni_flit_unpacker.sv`: payload packing
  into W-1/W-2-bit flits and back
* `rtl/ni_tx_encoder.sv`, `rtl/ni_rx_decoder.sv`: NI encoder and decoder
  stages
* `rtl/nocenc_top.sv`: top level
* `tb/`: testbenches, the reference model and the behavioural router path
