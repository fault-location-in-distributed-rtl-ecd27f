# Self-diagnosing distributed-control cube network

A multistage cube network that routes messages by themselves, with no
central controller, is cheap and fast. It is also harder to diagnose than a
centrally set network. Under distributed control the routing tag travels
over the same wires as the data, and so do the request/grant and
data-available/data-received handshake lines. A stuck wire can therefore
misroute a message, block one, or hang a path, as well as corrupt data.

This RTL builds such a network for 16 processing elements (PEs) and adds a
hardware fault locator. On request, or automatically after a failed message,
a controller takes over every network port and runs a two-phase test. The
first phase sets every switch straight; the second sets every switch to
exchange. The controller records what each PE saw: a clean transfer, a
routing or parity error, or a block. From that pattern it names the faulty
component:

- an interchange box;
- a link;
- a box together with its input links;
- a pair of boxes and the link between them;
- or, in one case, only a faulty path.

A grant line stuck asserted is the one single fault that the test cannot
see. For that case a second engine searches for it, using deliberately
blocked paths.

Everything is synthesizable SystemVerilog (IEEE 1800-2017). The fault
injection points are part of the RTL. They let every single fault of the
model be switched on from a testbench.

## The network

### Topology and labels

There are N = 2^n network inputs and outputs (N = 16, n = 4). They are joined
by n stages of N/2 two-by-two interchange boxes. Stage n-1 is at the input
side and stage 0 at the output side.

Lines are labelled 0..N-1. Stage i pairs the two lines whose labels differ
only in bit i. A box keeps the labels of its lines: its upper input and upper
output both carry the smaller label, and the lower ones carry the larger.

The links between stages are indexed by *level*. Level n is the set of
network input links, level k lies between stage k and stage k-1, and level 0
is the network output links. Each level holds N links. A link is therefore
named (level, label), and a box (stage, label of its upper line).

### Destination-tag routing

A message's first word is its routing tag. The tag's low n bits are the
destination address. A box in stage i looks at bit i of the tag on each
input: 0 asks for the upper output and 1 for the lower.

Destination-tag routing fixes the whole path. From source s to destination d,
the link used at level k is

    label(k) = { d[n-1:k], s[k-1:0] }

This is `dcn_pkg::path_label`. Every step of the locator rests on it: two
paths meet in the box or link where their labels coincide.

### Lines of a link

Each link carries 22 lines (constants in `dcn_pkg`):

| lines | use |
|-------|-----|
| 15..0 | data; the routing tag is in bits 3..0, and the other tag bits are sent as 0 |
| 17..16 | even parity: bit 17 covers data bits 15..8, bit 16 covers bits 7..0 |
| 18 | REQ, message request (forward) |
| 19 | DAV, data available (forward) |
| 20 | GRANT, message grant (backward) |
| 21 | DRCV, data received (backward) |

All protocol lines are active high. DAV and DRCV are edge sensitive: the
receiver acts on a rising edge, so a line stuck at the asserted level gives
no edge.

## Protocol and ports

### Source port

A PE talks to the network through a source port (`source_port`) on network
input i. Commands are one-cycle pulses:

- **Setup.** The port puts the tag word on the data lines and raises REQ and
  DAV.
  - It reports OK when GRANT has come back and DRCV has risen.
  - It reports a *block* (BLK) when no GRANT arrives within `T_ROUTE` cycles.
  - It reports an *error* (ERR) when GRANT arrived but DRCV did not rise
    within `T_DATA` cycles.
  - DRCV without GRANT is reported separately as *illegal*. It is the
    signature of a grant line stuck negated.
- **Send.** The port sends one data word as a four-phase DAV/DRCV handshake,
  with the same `T_DATA` timeout.
- **Release.** The port drops REQ, and the path is released box by box.
  Release is accepted in any state, so a stuck or waiting port can always be
  cleared.

### Destination port

The destination port (`dest_port`) returns GRANT while a request is present.
It gates a word in on each rising edge of DAV while REQ is present; a DAV
edge on an idle output is ignored. It checks each word:

- both parity bits for every word;
- for the tag word, also that the destination field equals its own address.

It raises DRCV only for a word that passes. A misrouted or corrupted message
therefore shows up at its source as an error, not at the destination.

### Interchange box

A box (`interchange_box`) connects an input to its requested output on the
next clock edge, provided the output is free. The connection is held while
that input's REQ stays high.

If both inputs want the same free output in the same cycle, the upper input
wins. The loser waits, and it is reported as blocked if its source's timer
runs out. Set-up therefore costs one clock per stage. Once a path is set up,
data and protocol lines pass through without registers, as in a
circuit-switched path.

## Box states and the fault model

A box's connections form a 4-bit state:

| bit | connection |
|-----|------------|
| 3 | upper input to upper output |
| 2 | upper input to lower output |
| 1 | lower input to lower output |
| 0 | lower input to upper output |

Straight is S10 and exchange is S5; these are the only valid settings with
two connections. A box carrying one message or none shows a part of one of
them (S8, S2, S4, S1 or S0). The remaining states, including the broadcasts
S3 and S12, arise only from a fault.

- **One input drives both outputs.** The returning GRANT and DRCV of the two
  outputs are ANDed, so a negated return on either reaches the source.
- **Both inputs drive one output.** The output carries an *overwrite* of the
  two: bits on which the two inputs agree pass, and bits on which they differ
  take the value `ow_val`. This models a wired-AND (`ow_val`=0) or a wired-OR
  (`ow_val`=1).
- **Neither input drives an output.** The output carries all zeros.

The single faults the design is built to find are:

- **Link faults.** Any one of the 22 lines of any one of the (n+1)·N links
  is stuck at 0 or at 1 (`cube_link`, selected by `lnk_flt_*`).
- **Box faults.** One box takes a fixed wrong state `box_flt_s10` whenever
  its control asks for straight, and `box_flt_s5` whenever it asks for
  exchange. This covers a box stuck in one state as well as one that
  answers wrongly but consistently.

## The two-phase test

The diagnostic controller (`diag_controller`) drives all 16 source ports in
lock-step. The words come from a per-PE pattern generator
(`test_pattern_gen`).

| phase | tag (setup word) | boxes | word 1 | word 2 |
|-------|------------------|-------|--------|--------|
| 1 | own address | all straight | ~tag | word 1 ^ 0x0101 |
| 2 | ~own address in bits 3..0, other bits 0 | all exchange | ~tag | word 1 ^ 0x0101 |

Complementing the tag sends a 0 and a 1 over every data line of every used
link. In each phase every PE's path is set, so every link of the network
carries exactly one message.

Word 2 exists for the parity lines. A 16-bit word and its complement have
the same byte parities, so the tag and word 1 would exercise each parity line
at only one value. Flipping bit 0 and bit 8 changes both byte parities.

The test stops a phase at the first anomalous subphase:

- A phase starts with setup. If any PE sees a block or error, every path is
  dropped and the next phase starts.
- Otherwise word 1 is sent. An error stops the phase here in the same way.
- Otherwise word 2 is sent, and the paths are dropped.

The controller also drops every path before phase 1. A request that was
pending in normal use, or stuck, then cannot disturb the test. Each drop is
followed by `T_SETTLE` idle cycles.

The result per PE and phase is a `phase_rec_t`. It holds the setup outcome,
the data outcome and the illegal flag, and is brought out as `rec_main`.

## Locating the fault

This is the core of the design (`fault_locator`, purely combinational). The
PE path of phase 1 is s → s, and that of phase 2 is s → ~s. The locator first
decides which paths of each phase are *faulty*:

- the paths whose setup ended in an error, if there is one;
- otherwise the paths whose setup was blocked;
- otherwise the paths whose data transfer failed.

A block next to an error is not counted, because a misrouted message can
block a healthy path.

It then intersects faulty paths. With the labelling above, two paths share a
box at stage i when their level-(i+1) labels agree outside bit i. They share
a link when their labels at some level agree. The patterns fall into five
groups, tried in the order 5, 1, 3, 2, 4.

| group | pattern | conclusion | reported as |
|-------|---------|------------|-------------|
| 5 | no anomaly in either phase | a grant line stuck asserted | `LOC_NONE`, `need_search` |
| 1 | two or more faulty paths in one phase | only a box fault does this | `LOC_BOX`: the box the two paths share |
| 3 | clean in one phase, one faulty path in the other | see below | `LOC_BOX_OR_IN` or `LOC_PATH` |
| 2 | a phase whose setup was clean but whose data failed | a link fault | `LOC_LINK`: the link shared by the two phases' faulty paths |
| 4 | setup anomalies in both phases | see below | link, box or box pair |

**Group 3.** Suppose the faulty phase shows an error together with blocks
(EB). The locator takes the box where the error path meets a blocked path,
nearest the network input. The fault is that box or one of its input links.
The input link covers a request line stuck asserted that holds an old path.
Without EB only the faulty path is known.

**Group 4.** The subgroup is 3·c1 + c2 + 1. Here c is 0 for E, 1 for EB and
2 for B, per phase.

- **Mixed subgroups (2, 3, 4, 6, 7, 8).** Link faults always give the same
  setup pattern in both phases, so a mix means a box. The two faulty paths
  share either one box, or a link with a box at each end. The latter is
  reported as `LOC_BOX_PAIR`.
- **Subgroup 1 (E, E).** This can be one of several link faults or a box in
  certain double-wrong states. The locator raises `need_retest`. The
  controller then runs both phases again and sends the data words despite
  the setup errors.
  - If a box is at fault, its overwrite corrupts both words that cross it. A
    retest phase with two data errors then names the box, as in group 1.
  - Otherwise the link shared by the two faulty paths is reported.
- **Subgroup 9 (B, B).** A source may have seen DRCV without GRANT. Then the
  grant line of the shared link is at fault, reported as `LOC_LINK`.
  Otherwise the fault is narrowed to a box pair and its link.
- **Subgroup 5 (EB, EB).** The fault is narrowed to a box pair and its link.

`flt_level` and `flt_label` hold the location:

- For `LOC_LINK` and `LOC_BOX_PAIR`, `flt_level` is a link level. A box pair
  is the boxes at stages level and level-1 on that link, together with the
  link. At level n or 0 only one box is on the link, so the pair is that box
  and the edge link.
- For the box kinds, `flt_level` is a stage.
- `flt_label` is the link label, or the upper-line label of the box.
- `flt_path_src` is the source PE of the first faulty path.

## Finding a stuck-asserted grant line

The grant search is in `grant_search`. A grant line stuck asserted makes
every request look granted up to the stuck point, so the two-phase test sees
nothing (group 5). The search needs the request that failed in normal
operation. The top records it (`trig_src`, `trig_dest`) when `auto_diag`
starts a diagnosis after a failed setup.

To block that path at stage i, PE src XOR 2^i first sets up a path to the
same destination. The two paths meet at stage i, and the helper holds the
output the searched request needs. The searched request is then made, and
its source watches GRANT:

- It stays asserted exactly when the stuck line lies between the source and
  the blocking box, that is, when the faulty link's level is above i.
- Otherwise the negated grant from the blocked box gets through.

A binary search over the n+1 levels takes ceil(log2(n+1)) trials, which is 3
for n = 4. The stuck link is the searched path's link at the level found.

The search starts by itself when an automatic diagnosis ends in group 5.
After a manual `diag_start` there is no failed request to search along, and
`need_search` is left for the host.

## Top level: `dcn_fault_top`

| port group | meaning |
|------------|---------|
| `pe_cmd_valid/op/word`, `pe_done/res/illegal` | each PE's source-port command interface (op 1 setup, 2 send, 3 release; result `res_t`) |
| `rx_valid/word/is_tag/par_ok/addr_ok` | each PE's received words and their checks |
| `diag_start`, `auto_diag`, `diag_busy`, `diag_done` | start a diagnosis, or let a failed normal setup start one |
| `flt_group/subgroup/kind/level/label/path_src`, `flt_retested`, `need_search`, `rec_main` | diagnosis result, valid while `diag_done` |
| `trig_src/dest` | the failed request that triggered an automatic diagnosis |
| `search_busy/done/level/label/trials` | grant-search result |
| `lnk_flt_*`, `box_flt_*`, `ow_val` | fault injection; tie to 0 (and S10/S5) in normal use |
| `box_state` | current state of every box, `[stage*N/2 + box]` |

Commands go to the source ports in priority order: the grant search, then
the diagnostic controller, then the PEs. PE commands are ignored while a
diagnosis or search runs.

### Timing

- Path set-up takes one clock per stage, plus one clock for GRANT at the
  destination port.
- A word transfer takes a few clocks of handshake.
- A two-phase diagnosis of the fault-free network takes about 70 clocks at
  the default parameters. Much of that is settle time between subphases.
- Blocks and errors are detected by the timers, so an anomalous phase takes
  about `T_ROUTE` or `T_DATA` clocks more. For example, a request line stuck
  negated takes about 160 clocks to diagnose.
- A retest repeats both phases. A data-available line stuck negated, which
  needs the retest, takes about 580 clocks.

### Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 16 | number of PEs, network inputs and outputs |
| `LOGN` | 4 | number of stages, log2 N |
| `T_ROUTE` | 64 | cycles a setup waits for GRANT before reporting a block |
| `T_DATA` | 64 | cycles a port waits for a DRCV edge before reporting an error |
| `T_SETTLE` | 8 | idle cycles after dropping all paths |

The word width (16 data bits, two parity bits) is fixed in `dcn_pkg`. The
modules take N and LOGN as parameters, but only the default size has been
simulated. Several fields assume at most 16 PEs: the 3-bit trial count, and
the 4-bit destination field of the tag word.

## Choices made here and limits

The fault analysis fixes the routing rule, the box state numbering, the
overwrite and AND-return behaviour, the test patterns, the test sequence
and the grouping rules. The following are this design's own choices:

- **Protocol polarity.** All protocol lines are active high. The analysis
  reasons about the asserted and negated levels, so only polarity changes.
- **Conflicts.** The upper input wins a conflict in a box.
- **Timers.** There is one timeout per timer, and the lengths are chosen
  here.
- **Grant.** The destination returns GRANT as soon as a request arrives,
  independent of the tag check. The tag check acts on DRCV.
- **Lock-step test.** All PEs run the test in lock-step under one
  controller.
- **Retest.** The retest is run only for group 4 subgroup 1, where it is the
  prescribed next step.
- **Search level 0.** A search that never sees a stuck grant reports level
  0. A grant line stuck at the last link cannot be told apart, by blocking,
  from no stuck line.
- **Request stuck asserted at a network output.** This fault (REQ on a level-0
  link) holds no box, because no box lies after it. It only keeps the
  destination port granting, so it is not detected.
- **Request stuck asserted elsewhere.** It holds the path that was set up
  when it struck. It is located to a box on that held path, below the stuck
  link, not to the link itself.
  - A destination port knows a word is a routing tag because it is the first
    word after REQ rises. The stuck line hides that rise from the held
    destination.
  - A misrouted setup word that reaches the held destination is therefore
    accepted as data. It then shows as an extra block, not as a routing
    error.
  - The fault then lands in group 1, or in a group-4 subgroup other than 5,
    instead of group 3 or subgroup 5.

Two further isolation steps exist for the cases left at a box pair: group 4
subgroups 5 and 9 without the illegal flag, and the mixed subgroups whose
paths meet on a link. They set boxes in different stages to different valid
states. The same applies to group 3 without an EB pattern. These steps are
not built: the locator reports the box pair or the path, and a host can take
it from there.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_interchange_box` | routing, conflicts, hold/release, broadcast with AND return, overwrite with both values, empty state |
| `tb_cube_link` | every line stuck at 0 and 1 |
| `tb_cube_network` | all 16 XOR permutations, one clock per stage, a stuck data line, a box stuck empty |
| `tb_source_port`, `tb_dest_port` | handshake, timers, block/error/illegal, parity and address checks |
| `tb_test_pattern_gen` | every word of both phases, parities |
| `tb_diag_controller` | sequencing, early phase end, retest |
| `tb_fault_locator` | the rules of each group, from hand-made outcome records |
| `tb_grant_search` | against a network model: every stuck level, found link, trial count, choice of blocker |
| `tb_dcn_fault_top` | end to end at default parameters: traffic, conflicts, a fault-free diagnosis, link faults of every kind, box faults including a retest and a box pair, automatic diagnosis, and a grant search. It counts each mechanism. |
| `tb_fault_sweep` | every single fault (see below) |

`tb_fault_sweep` injects, one at a time, all 3520 link faults: 80 links, 22
lines, stuck at 0 and at 1. It also injects all box faults: 32 boxes, 15
wrong states for a straight request and 15 for an exchange request, each
with both overwrite values. That makes 5440 diagnoses. It checks each report
against the injected fault:

- **Exact:** the named component is the faulty one.
- **Narrowed:** the fault lies in the named box pair, box-and-inputs or path.
- **Adjacent:** a box is named for a fault on one of its links.
- **Wrong.**
- **Hidden.**

Any wrong report, and any hidden fault other than the two expected ones,
counts as a failure. The sweep also checks that each fault lands in the
group that the error analysis predicts:

- for a link fault, from the kind of line, its stuck value and its place;
- for a box fault, from the wrong state it takes.

Every fault matches, except the request-stuck-asserted cases described
above. The expected hidden faults are a grant stuck asserted,
and a request stuck asserted at a network output. The sweep runs in a few
seconds.

At the default parameters the sweep gives the following results:

- 4880 faults located exactly;
- 464 narrowed to a box pair, a box with its inputs, a held path or a path;
- 0 adjacent;
- 96 hidden, all of the two expected kinds;
- 0 wrong;
- 0 in a group other than the predicted one (for a request stuck asserted, the groups given above).

The 80 grant lines stuck asserted are then injected again and located end to
end. For each one:

- a normal message fails on the fault;
- the automatic diagnosis finds nothing (group 5);
- the grant search must name the link.

It names the link in all 80 cases.

### Simulating with Verilator

The package must come first:

    verilator --binary --timing --assert -Mdir obj_top \
        rtl/dcn_pkg.sv rtl/cube_link.sv rtl/interchange_box.sv rtl/cube_network.sv \
        rtl/source_port.sv rtl/dest_port.sv rtl/test_pattern_gen.sv \
        rtl/diag_controller.sv rtl/fault_locator.sv rtl/grant_search.sv \
        rtl/dcn_fault_top.sv tb/tb_dcn_fault_top.sv --top-module tb_dcn_fault_top
    ./obj_top/Vtb_dcn_fault_top

For another testbench, swap the last file and `--top-module`. Block
testbenches need only the package and the modules below the block. Warnings
from the style and lint classes, such as unused package constants, are
harmless. Add `-Wno-fatal` if your Verilator version stops on them.
