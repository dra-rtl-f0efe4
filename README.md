# DRA: linecards that cover for each other over an enhanced internal bus

A distributed router forwards traffic through its linecards (LCs). Each LC has
a physical interface unit (PIU), a protocol-dependent logic unit (PDLU), a
segmentation and reassembly unit (SRU) and a local forwarding engine (LFE).
In a conventional router, one failed unit takes its whole LC, and every link
on it, out of service until someone replaces the card. Spare LCs are expensive.

The Dependable Router Architecture (DRA) avoids spare cards. It upgrades the
maintenance bus that routers already have into an **enhanced internal bus
(EIB)**. When a unit on one LC fails, that LC sends the unit's work over the
EIB to a healthy unit of the same kind on another LC:

| failed unit on the incoming LC | what happens |
|---|---|
| PDLU | The PIU's frames go over the EIB data lines to the PDLU of a healthy LC that runs the **same Layer-2 protocol**. |
| SRU  | The PDLU's packets go over the data lines to the SRU of any healthy LC. |
| LFE  | Each route lookup goes out as a control packet (REQ_L). A healthy LC's LFE answers with REP_L. |
| PIU  | The link is gone, so incoming traffic stalls. |

The covering LC sends the covered traffic on through its own units and its own
switching-fabric port. The fabric, the route processor and the PIUs are
outside this RTL. Their signals are ports of the top module `dra_router`.

This repository holds synthesizable SystemVerilog for the linecard side of
the architecture:

- the per-LC bus controller and its protocol;
- the turn counters that share the data lines;
- the bandwidth-promise rule;
- simple PDLU, SRU and LFE units, so that traffic flows end to end;
- self-checking testbenches for every module.

## The EIB: two kinds of lines

The EIB is passive wiring. The shared lines are wired-OR: a line is high
when any LC drives it. The EIB has three parts:

- **Control lines** (`eib_control_lines`). One control packet (`ctrl_pkt_t`)
  is sent per clock. Access is CSMA/CD (`csma_cd_mac`). An LC drives when its
  back-off is over. If two LCs drive in the same cycle, every LC sees
  `coll`. Each sender then waits a random number of slots and tries again.
  The random value comes from an LFSR seeded by the LC number. The back-off
  window grows 1, 3, 7, 15 (binary exponential, capped by `MAX_EXP`). A
  packet counts as sent when the sender sees it on the lines with no
  collision.
- **Data lines** (`eib_data_lines`). They carry one tagged word
  (`dword_t`: src, dst, target unit, sop, eop, 32 data bits) per clock. Only
  the LC whose turn it is may drive them. `dl_clash_o` flags a second
  driver, and an assertion in `dra_router` checks that this never happens.
- **Turn lines** L_t and L_β. An LC pulses `lt_fall` when its turn ends
  (this stands for L_t falling). It raises `lbeta` when its turn counter
  reaches zero. `dra_router` ORs these pulses across all LCs.

### Control packets

| kind  | sent by | contents | effect |
|---|---|---|---|
| REQ_D | LC_init, the LC that needs help | target unit, protocol, bandwidth B_LC, dst = broadcast or one LC | asks for a logical path (LP) |
| REP_D | the covering LC | dst = requester, bandwidth | establishes the LP. Other candidates withdraw their pending REP_D. |
| REL_D | LC_init (broadcast), or the covering LC (addressed to LC_init) | id_r = the LP's ID | releases the LP and renumbers the others |
| REQ_L | LC with a failed LFE | address, sequence tag | remote lookup |
| REP_L | any LC with a healthy LFE | {hit, egress LC}, tag | lookup answer. Other servers withdraw. |
| FLT   | any LC whose fault status changed | fault vector | keeps everyone's fault table current |

Every LC therefore has the same view of which units have failed and which
LPs exist.

A **broadcast REQ_D** is answered only by an LC that meets all of these:

- its unit of the requested kind is healthy;
- its PIU is healthy;
- its spare bandwidth `avail_bw_i` (ψ) covers the request on top of the
  streams it already carries for others;
- for PDLU cover, it implements the same protocol and its SRU is healthy.

The first REP_D to get through wins. A collision between two REP_Ds is just
a CSMA/CD collision, and the losers hear the winner and back off for good.

A REQ_D addressed to one LC is the reverse-path form, and that LC always
replies. If no REP_D arrives within `REQ_TIMEOUT` cycles, the requester
repeats its REQ_D.

LC_init sends REL_D when its stream closes and its transmit buffer is empty.

The covering LC can also give an LP up. It does so when the unit it covers
with fails, or its PIU fails, or, for PDLU cover, its SRU fails. It sends an
REL_D addressed to LC_init, carrying LC_init's LP ID. Every LC tracks every
LC_init's LP ID, so all of them renumber the same way. It holds this REL_D
back while one of that LP's packets is half-way across the data lines, so
LC_init is never cut off inside a packet. LC_init then goes back to
requesting. Its buffered packets wait and go to whichever LC answers next.

## Sharing the data lines: the three counters

This is the least obvious part of the design. It is all in `tdm_arbiter`,
and every LC has one. The counters are:

- **Ctr_β** = β, the number of live LPs. Every LC keeps it.
- **Ctr_LC** = this LC's LP ID, from 1 to β. Only LC_init keeps it.
- **Ctr_c**, a turn pointer. Only LC_init keeps it.

The rules are:

1. **When this LC's own LP is established**, it does the following in order:
   - Ctr_LC ← β+1;
   - Ctr_c ← 4β+1;
   - β ← β+1.

   Other LCs only increment β.
2. **An LC whose Ctr_c equals its Ctr_LC owns the data lines.** When it is
   done it pulses L_t, and every Ctr_c decrements at the same moment.
3. **When any Ctr_c reaches 0**, that LC raises L_β. Every LC_init then
   reloads Ctr_c ← β. No one transmits in the reload cycle.
4. **Release of LP ID_r** (announced in REL_D) changes the counters on
   every LC:
   - β ← β−1;
   - Ctr_LC ← Ctr_LC−1 where Ctr_LC > ID_r;
   - Ctr_c ← Ctr_c−1 where Ctr_c ≥ ID_r and is not 0. This last part is this
     design's addition. It keeps the pointer on a live ID.

Example with two LPs:

```
A set up (β=0):  A: id=1 c=1        β=1      -> A's turn
A ends turn:     A: c=0  -> L_β     reload c=β=1 -> A's turn again
B set up (β=1):  B: id=2 c=5        β=2
A ends turn:     A: c=0, B: c=4 -> L_β, reload both to 2 -> B's turn (newest first)
B ends turn:     A: c=1, B: c=1                 -> A's turn
A ends turn:     A: c=0, B: c=0 -> L_β, reload to 2 -> B's turn ...
```

The 4β+1 start value does two jobs. It keeps a newly added LP from matching
its ID, or from reaching 0, before the older LPs' counters force a reload.
After that reload, every counter agrees.

**How long a turn lasts.** The bus controller sends whole packets from its
transmit FIFO. It starts a new packet only while fewer than
max(1, B_prom >> `BURST_SHIFT`) words have gone out in the current turn.
Turns therefore scale with the promised bandwidth. An LP with nothing
buffered passes its turn at once. A packet is started only when all of it is
buffered, so receivers always see a packet's words back to back.

## Bandwidth promise

`bw_promise` computes the rate each LP is promised:

- B_prom = B_LC when the total request B_LCT ≤ B_BUS;
- B_prom = B_LC · B_BUS / B_LCT otherwise, with integer division.

B_LCT is the sum over all live LPs. Each bus controller keeps a table of
requested bandwidth per LP ID, renumbered on every release, so every LC
computes the same sum.

Bandwidths are in Mbit/s in 16-bit fields. The default B_BUS is 10000. That
is a 10 Gbit/s bus, the same as one LC's line rate (`c_LC`). If the promise
is below what the traffic needs, the receive side drops whole packets.

### How much bandwidth faulty linecards get

Take six LCs, each with a 10 Gbit/s line rate and a uniform load L. X of
them lose their SRU. Each asks for B_LC = L·10 Gbit/s, and every LC offers
ψ = (1−L)·10 Gbit/s of spare capacity.

`tb/tb_fig8_bandwidth.sv` runs this on the full router. It prints the share
of the required bandwidth that the design promises. Next to it, it prints a
simple analytical bound, min(B_BUS, min(X, 6−X)·ψ) / (X·B_LC). In that
bound, several covering LCs may share one stream.

| L | X=1 | X=2 | X=3 | X=4 | X=5 |
|---|---|---|---|---|---|
| 15 % | 100 / 100 | 100 / 100 | 100 / 100 | 100 / 100 | 100 / 100 |
| 30 % | 100 / 100 | 100 / 100 | 100 / 100 | 83 / 83 | 40 / 46 |
| 50 % | 100 / 100 | 100 / 100 | 66 / 66 | 50 / 50 | 20 / 20 |
| 70 % | 0 / 42 | 0 / 42 | 0 / 42 | 0 / 21 | 0 / 8 |

Each cell is design % / bound %, truncated to whole percent. The bound
reproduces the published degradation results for six linecards. It is also
where the 10 Gbit/s B_BUS default comes from. The design and the bound
agree in 14 of the 20 configurations.
The gap comes from one rule: the design gives each stream exactly one
covering LC, which must take all of it. At 70 % load no LC has 7 Gbit/s to
spare, so no stream is covered. Where the bus itself is the limit, the
promises are scaled as described above and the numbers match.

## The linecard units (simplified stand-ins)

These units are deliberately simple. They exist so that traffic can be
carried and checked end to end.

- **PDLU** (`pdlu`). The Layer-2 protocol is modelled as a one-word envelope
  `{proto[31:28], 12'h0, 16'h0800}` in front of the IP packet.
  - Ingress checks the envelope and strips it. It drops and counts frames
    with the wrong protocol or type, and frames that are only an envelope.
  - Egress adds this LC's envelope.
- **SRU** (`sru`).
  - Stores a packet and looks up the IPv4 destination (32-bit word
    `DA_WORD` = 4).
  - Cuts the packet into cells of one header word plus `CELL_WORDS`
    payload words, padded with zeros. The header is
    `{dst[31:28], src[27:24], first[23], last[22], nwords[7:0]}`.
  - A lookup miss drops the packet.
  - Reassembly expects a packet's cells back to back.
- **LFE** (`lfe`).
  - A table of `ENTRIES` {prefix, length, egress LC} registers, written by
    the route processor.
  - Longest-prefix match with one cycle of latency.
  - Port A serves the local SRU. Port B serves lookups from other LCs.
- **Linecard** (`linecard`). Contains:
  - the steering from the table at the top;
  - three receive FIFOs for words that arrive over the data lines, one each
    for the PDLU, the SRU and the PIU;
  - 2:1 packet mergers (`pkt_merge`) that mix covered traffic with the LC's
    own traffic at packet boundaries.

  A receive FIFO admits a packet at its first word only if `BUF_DEPTH`
  words are free. Otherwise it drops the whole packet and counts it in
  `rx_drop_cnt_o`.

## Module map

```
dra_router
├── eib_control_lines, eib_data_lines
└── linecard  × N_LC          (linecard i runs protocol 1 + i/M)
    ├── pdlu, sru, lfe
    ├── sync_fifo × 3, pkt_merge × 3
    └── bus_controller
        ├── csma_cd_mac
        ├── tdm_arbiter
        ├── bw_promise
        └── sync_fifo         (transmit buffer)
dra_pkg                        shared types: ctrl_pkt_t, dword_t, unit_e, widths
```

Top-level defaults:

| parameter | default | meaning |
|---|---|---|
| N_LC | 6 | number of linecards (at most 15, since LC number 15 means broadcast) |
| M | 2 | LCs per protocol group |
| ENTRIES | 16 | entries in each LFE table |
| CELL_WORDS | 12 | payload words per fabric cell |
| BUF_DEPTH | 512 | largest packet size, in words |
| B_BUS | 10000 | data-line capacity, in Mbit/s |

The data-line receive FIFOs in each LC are 2·BUF_DEPTH deep. The
bus-controller transmit FIFO holds 512 words.

## Timing

- Everything is synchronous to one clock, with an active-low asynchronous
  reset.
- A control packet takes one cycle on the lines, plus back-off. Receivers
  act on it at the next edge.
- A data word takes one cycle.
- An L_β reload costs one idle cycle.
- The LFE answers one cycle after a request.

The design does not tie clock cycles to Gbit/s. Bandwidth values are numbers
that the promise and burst rules compare, not measured rates.

## What is and is not modelled

What this design adds or assumes, where the architecture leaves it open:

- the packet formats;
- the FLT announcement that spreads fault status;
- the REQ_D retry timer;
- the lookup sequence tag;
- the burst rule;
- the priority among pending control packets
  (REP_L > REP_D > REL_D from a covering LC > REL_D from LC_init > REQ_L >
  REQ_D > FLT);
- the Ctr_c adjustment on release;
- the condition under which a covering LC releases an LP (its covering unit
  failed);
- all widths and sizes except N = 6, M = 2 and B_BUS = 10 Gbit/s.

What is not modelled:

- **Egress-side coverage** (a fault on the outgoing LC). This covers its
  PDLU or SRU being bypassed on the reverse path, and delivery through an
  intermediate LC when the protocols differ. The bus controller supports
  the addressed REQ_D that this would use, but no linecard steering uses it.
- **The LFE's classification and filtering.** Only route lookup is built.
- **A real Layer-2 protocol, the PIU, the switching fabric and the route
  processor.** The end-to-end testbench uses a behavioural fabric
  (`tb/fabric_model.sv`).
- **More than one LP opened by the same LC at a time.**
- **Splitting one stream over several covering LCs.** This is why high
  loads get no cover (see the table above).

## Testbenches and how to simulate

Every module in `rtl/` that is not a helper has a self-checking testbench,
`tb/tb_<module>.sv`. Each one compares against values it works out itself,
has a watchdog, and ends by printing
`TB_RESULT checks=<n> failures=<n>`. The main ones are:

- `tb_tdm_arbiter`: four LCs with random LP set-ups and releases. Every
  cycle it checks that:
  - at most one LC holds the lines;
  - all LCs agree on β;
  - the live IDs are exactly 1..β;
  - every LP gets a turn before any LP gets a second one.

  A directed start checks the two-LP example above.
- `tb_bus_controller`: three controllers on a modelled EIB. It covers LP
  set-up with competing responders, qualification failures, scaled
  promises, whole-packet delivery, release and renumbering, remote lookups,
  and a covering LC that fails in the middle of a stream.
- `tb_linecard`: two linecards and a fabric model. It covers the
  fault-free, PDLU-fault and LFE-fault cases.
- `tb_fig8_bandwidth`: the bandwidth table above, checked against the
  design's own rules.
- `tb_dra_router`: the full router at its default parameters, with six LCs.
  It goes through these phases:
  1. no fault;
  2. a PDLU fault on LC0 and an SRU fault on LC2 together, which
     oversubscribes the bus so that both promises are scaled;
  3. an LFE fault on LC4, then an SRU fault on the LC that covers LC2. That
     LC releases LC2's path and LC2 is covered again by another LC;
  4. a PIU fault on LC5;
  5. repair.

  It checks that every packet arrives once, intact and correctly
  encapsulated. It counts collisions, LP set-ups and releases, turns, L_β
  reloads, scaled promises, remote lookups, the PIU stall, the PDLU/SRU
  cover traffic and releases by a covering LC, and it fails if any of them never happened.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    --top-module tb_dra_router rtl/dra_pkg.sv tb/tb_dra_router.sv
./obj_dir/Vtb_dra_router
```

To run another testbench, change the top module and the file name.
`dra_pkg.sv` must come first.
