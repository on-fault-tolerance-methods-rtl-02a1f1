# Fault tolerant NoC links and routing

A network-on-chip link sees three kinds of faults. Transient faults flip a bit now and then. Intermittent faults come and go on one wire. Permanent faults (an open, a short, a stuck wire) never leave. An error-correcting code handles the first kind well. Against the other two it fails: a stuck wire uses up the code's whole correction power in every word, and the next transient error then corrupts the data.

This RTL combines a code for transient faults with two ways of getting a damaged wire out of the data path:

* **Spare wires with on-line reconfiguration.** The receiver spots a permanent fault, tells the transmitter, and both ends move the data off the bad wire onto a spare, in the same clock cycle and without stopping traffic. A background in-line test checks every wire on the spares. It can mark a wire the data stream never exposed, and it gives back a wire whose fault was only intermittent.
* **Split transmission.** Each word is sent as two halves, each half duplicated across both halves of the link. The receiver keeps the copy that does not cross the bad wire. This costs half the throughput but no extra wires.

A third, separate part is the **routing decision** of a mesh router. It steers packets around broken links using only local information. It comes as one fully adaptive algorithm and four deadlock-free variants based on turn models.

The design follows the methods of the doctoral thesis *On Fault Tolerance Methods for Networks-on-Chip* (T. Lehtonen). Where the thesis only describes what a block does, the details here are this design's own. They are listed under "Departures and own choices".

## Files

| File | Contents |
|---|---|
| `rtl/ftl_pkg.sv` | shared constants, the Hamming position table, command and direction enums |
| `rtl/hamming_enc.sv`, `rtl/hamming_dec.sv` | interleaved (12,8) Hamming encoder and decoder |
| `rtl/tmr_voter.sv` | majority voter for triplicated control lines |
| `rtl/ssd_unit.sv` | syndrome storing detector |
| `rtl/reconf_tx_mux.sv`, `rtl/reconf_rx_mux.sv` | ripple reconfiguration multiplexers |
| `rtl/reconf_tx_ctrl.sv`, `rtl/reconf_rx_ctrl.sv` | the two ends of the reconfiguration command channel |
| `rtl/ilt_tpg.sv`, `rtl/ilt_ctrl.sv` | in-line test pattern generator and sequencer |
| `rtl/sw_link_tx.sv`, `rtl/sw_link_rx.sv` | spare-wire link, transmitter and receiver |
| `rtl/split_tx.sv`, `rtl/split_rx.sv` | split-transmission link, transmitter and receiver |
| `rtl/ft_route.sv` | routing decision |
| `rtl/noc_ft_top.sv` | all of the above side by side |
| `tb/tb_<module>.sv` | one self-checking testbench per module; `tb/tb_ref_pkg.sv` holds reference models |

## The link code

A 32-bit word is split into four interleaving sections of 8 bits. Data bit *i* belongs to section *i* mod 4. Each section is coded with a shortened (12,8) Hamming code that corrects one error. The 48 codeword bits are laid out as follows:

* wires 0..31 carry the data bits in their natural order;
* wire 32 + 4*j* + *s* carries check bit *j* of section *s*.

Adjacent wires always belong to different sections. So any burst of up to four adjacent wrong wires is corrected, and so are up to four scattered errors as long as each falls in a different section. The code rate is 32/48 = 2/3.

Inside a section, the Hamming positions 1, 2, 4 and 8 are check bits. Positions 3, 5, 6, 7, 9, 10, 11 and 12 hold the data bits in order. The position table `data_pos` is in `ftl_pkg`.

Syndromes 13 to 15 point outside the shortened word. The decoder turns them into a zero error vector and raises `uncorrectable`. A double error whose syndrome does point to a real position is miscorrected, as with any single-error-correcting code. The decoder's error vector covers the check bits too, because a stuck check wire must be found and replaced like any other.

## Spare-wire link

### Data path

```
data_in -> hamming_enc -> reconf_tx_mux -> register -> 50 wires -> reconf_rx_mux -> hamming_dec -> register -> data_out
                              ^ bypass, test values                      ^ bypass
```

There are 48 codeword wires plus `SPARES` = 2 spare wires. Each end keeps a `faulty` mask. While a test runs, it also keeps the wire or pair under test. Their union is the `bypass` mask. Bypassed wires carry no codeword bits.

The multiplexers do a **ripple shift**. Physical wire *j* carries codeword bit *j* − *k*, where *k* is the number of bypassed wires below *j*. Each wire therefore needs only a (SPARES+1)-input multiplexer, and every bit moves at most SPARES positions. Wires under test carry the test pattern. Other bypassed wires carry 0.

Latency is two clocks from `data_in` to `data_out`. The `valid` line travels as three voted copies.

### Finding permanent faults: syndrome storing

`ssd_unit` compares each valid word's syndrome with the previous one. After T_OP = 9 equal, non-zero syndromes in a row it reports a permanent error. The location it reports is the lowest set bit of the decoder's error vector. Details:

* A zero syndrome or a different syndrome restarts the count.
* Syndromes that decode to nothing (`uncorrectable`) are never reported.
* A stuck wire only shows up in words where the data disagrees with the stuck value. With random data, detection can take many words.
* The thesis chose 9 to keep the chance of a transient error during detection under 1 % at a transient bit error rate of 1e-6.

### The command channel

The receiver decides and the transmitter follows. Commands go from receiver to transmitter on two lines, `cfg_sync` and `cfg_data`. Each line is three copies, voted at the transmitter.

A frame is 9 bits, sent MSB first:

| bits | contents |
|---|---|
| 3 | operation |
| 6 | wire index |

`sync` is high for exactly those 9 cycles. The operations are:

| code | operation | effect |
|---|---|---|
| 1 | MARK | add the wire to `faulty` |
| 2 | UNMARK | remove the wire from `faulty` |
| 3 | TEST_PAIR | put the wire and the one above it under test |
| 4 | TEST_ONE | put the wire under test |
| 5 | TEST_END | end the test configuration |

Both ends switch configuration on the same data word:

* The transmitter applies the change at the clock edge that first sees `sync` low.
* The receiver applies it one clock later, which matches the link register.

A frame of the wrong length is dropped and sets the sticky `tx_frame_err`.

`reconf_rx_ctrl` arbitrates between the detector and the test sequencer. The rules, all this design's own:

* A detection has priority over a test command.
* A detection is mapped from codeword bit to physical wire under the configuration of the moment it arrives.
* A detection that finds no free spare is dropped and sets the sticky `spares_out`. The code then goes on correcting that wire's errors.
* A detection that would fit once the current test configuration ends waits for it.
* A test command that would need more than `SPARES` bypassed wires is refused at once.

### The in-line test

`ilt_ctrl` walks across all 50 wires. A run starts every `ILT_PERIOD` = 4096 clocks while `ilt_enable` is high. It also starts at once when a word arrives `uncorrectable`.

For each position it chooses one of three tests:

* **Pair test.** Used when the wire and its neighbour fit into the free spares. Both wires are bypassed and carry "01" and "10" on alternating clocks. This finds opens, stuck wires and shorts between the two.
* **Single-wire test.** Used when only one wire fits. The wire carries 0, 1, 0, 1...
* **No new test.** Used when nothing fits. Only wires that are already marked are retested; they are bypassed anyway.

After each configuration the receiver watches `CHECK` = 4 cycles of the pattern. The pattern restarts at phase 0 on the cycle the configuration takes effect, so both ends agree on the phase without extra signalling. The decision rule is simple: a wire that mismatched in any of the 4 cycles is faulty, otherwise it is healthy.

* A healthy wire that was marked is restored with UNMARK. This recovers spares lost to intermittent faults.
* A failing wire that was not marked gets MARK.

Data keeps flowing throughout, because the wires under test are bypassed like faulty ones. The counters `ilt_runs`, `ilt_marked` and `ilt_restored` report progress.

### Using it

Put the transmitter and receiver in the two routers and connect:

* `link_data`/`link_valid` from transmitter to receiver;
* `cfg_sync`/`cfg_data` from receiver to transmitter.

`sw_link_tx` has no stall. Both ends run on one clock.

## Split-transmission link

The same code on 48 wires, with no spares:

1. The receiver runs the same syndrome storing detector. It only needs to know which half of the link (wires 0..23 or 24..47) holds the fault.
2. On a detection it raises the mode line (three copies).
3. From the next word the transmitter sends each codeword in two transfers.
   * First transfer: the 24 bits of sections 0 and 1, copied on both halves of the link, with the `first` line set.
   * Second transfer: the 24 bits of sections 2 and 3, copied the same way.
4. The receiver takes each transfer from the healthy half, rebuilds the codeword and decodes it.

Grouping the halves by section matters. If the halves were taken by wire position, wire *w* would carry codeword bits *w* and *w*+24. Those two bits are in the same section, so a single new stuck wire in the half still in use would be a double error. Grouped by section, such a wire hits one bit of section 0 or 1 and one bit of section 2 or 3, and the code corrects both.

In split mode `ready_out` is low on every second cycle. The source must hold its word then. Split mode stays on until reset.

## Routing decision (`ft_route`)

The decision is combinational. It sees:

* the router's own coordinates;
* the packet's destination;
* the port the packet came in on;
* a 4-bit mask of working links (N, E, S, W);
* the packet's hop count.

It takes the first entry of this list that exists (routers on the mesh edge lack some directions), has a working link and is allowed by the turn model:

1. the progressive direction in X;
2. the progressive direction in Y;
3. a direction in a dimension where the packet is already aligned;
4. a direction away from the destination;
5. back out of the input port (a U-turn), for the fully adaptive algorithm only.

Ties are broken in the order E, W, N, S. If nothing is left, the packet is dropped (`drop`). At the destination the output is the local port.

`ALG` selects the algorithm.

| `ALG` | forbidden turns | U-turns | progressive order |
|---|---|---|---|
| `ALG_FULLY_ADAPTIVE` | none | allowed | X first |
| `ALG_WEST_FIRST` | NW, SW | forbidden | X first (west is then taken first) |
| `ALG_NORTH_LAST` | NW, NE | forbidden | X first (north is then taken last) |
| `ALG_NEGATIVE_FIRST` | ES, NW | forbidden | progressive W or S before E or N |
| `ALG_ODD_EVEN` | NW, SW in odd columns; EN, ES in even columns | forbidden | see below |

A turn "XY" means a packet travelling in direction X leaves in direction Y.

The progressive order is adjusted per model, so that a fault-free mesh always gives a minimal path:

* Negative-first takes a progressive W or S before a progressive E or N.
* Odd-even: a packet heading east to an even destination column, and not yet in the destination row, turns in the odd column just before it.

Non-minimal moves can make a packet circle. So every packet carries a 6-bit hop count, decremented per hop, and is dropped when it reaches zero. The source sets the initial count.

In the testbench's 8x8 mesh with about 10 % of links broken, north-last delivers the most packets of the four deadlock-free variants. The fully adaptive algorithm delivers nearly all. This matches the ranking the thesis reports.

## Top level

`noc_ft_top` instantiates the spare-wire link (both ends), the split link (both ends) and one routing unit. A link's two ends sit in different routers, and the router itself is not part of this RTL. So every wire bundle is a port:

* `sw_tx_link_*` → `sw_rx_link_*`, and `sw_rx_cfg_*` → `sw_tx_cfg_*`;
* `st_tx_link_*` → `st_rx_link_*`, and `st_rx_mode` → `st_tx_mode`;
* `rt_*` are the routing unit's inputs and outputs.

Defaults:

| parameter | default | origin |
|---|---|---|
| `NSECT` | 4 | the thesis |
| `SPARES` | 2 | chosen, from the thesis's spare-count analysis for links of about 64 wires |
| `T_OP` | 9 | the thesis |
| `ILT_PERIOD` | 4096 | chosen |
| `MESH_X`, `MESH_Y` | 8 | chosen |
| `ALG` | fully adaptive | chosen |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For example:

```
verilator --binary --timing -Wno-fatal --top-module tb_noc_ft_top -y rtl -y tb \
    rtl/ftl_pkg.sv tb/tb_ref_pkg.sv tb/tb_noc_ft_top.sv
./obj_dir/Vtb_noc_ft_top
```

`tb_noc_ft_top` runs the whole design at its default parameters in about 20,000 clocks. The testbench is the channel between the link ends. It injects:

* transient flips;
* stuck wires;
* a transient double error;
* corruption of single copies of the triplicated lines.

It also walks packets over a mesh with broken links. It counts every mechanism and fails if any never happened:

* correction;
* syndrome storing detection;
* reconfiguration;
* exhausted spares;
* in-line test restore and mark;
* a test started by an uncorrectable word;
* split mode, correction inside split mode and source stalls;
* voted-out control copies;
* minimal routes, detours and U-turns;
* drops at a dead end and on an exhausted hop count.

The block testbenches compare against independent reference models in `tb_ref_pkg`: a position-by-position Hamming encoder and the wire mapping. Some override the test period to stay short.

Three more testbenches run the design under the loads it is meant for:

* **`tb_sw_link_spares`** runs the link at its default size against one, two and three permanent faults arriving one after another on random wires. It repeats each case in eight trials.
  * With up to two faults, every fault is detected and moved to a spare at both ends.
  * The third fault reports exhausted spares, and the code keeps correcting it.
  * No word is lost.
* **`tb_sw_link_wide`** does the same for a wider link: ten sections (80 data bits, 120 codeword wires) with three spares, 123 wires in all. This is the nearest multiple of the 12-wire section below a 128-wire link, the size for which three spares are the usual choice. Up to three faults are repaired; the fourth exhausts the spares and is still corrected.
* **`tb_route_sweep`** compares the five routing algorithms on the 8x8 mesh with 0 to 32 of the 112 links broken. It uses 2000 random packets per point. The last point (32 broken links) gives:

| algorithm | packets delivered | mean hops |
|---|---|---|
| fully adaptive | about 81 % | 7.7 |
| north-last | about 43 % | 4.9 |
| west-first | 33–37 % | 4.0–4.3 |
| negative-first | 33–37 % | 4.0–4.3 |
| odd-even | 33–37 % | 4.0–4.3 |

## Departures and own choices

These points are not fixed by the thesis. Change them with that in mind.

* **Link width and spares.** The thesis gives no link width. 32 data bits and two spares shared by the whole link are chosen here. It also describes a variant with one spare per interleaving section, which is not built.
* **Synchronous FEC link.** This is the variant with forward error correction. The asynchronous, self-timed link with retransmission (ARQ) and its protocol converters is not built.
* **Per-wire multiplexer control.** The thesis keeps a control register per wire holding the number of bypassed wires below it. Here only the bypass mask is registered, and the per-wire counts are derived from it combinationally. The multiplexer settings are the same; the counting logic sits in front of the multiplexers instead of behind a register.
* **Both detectors in one link.** The thesis presents syndrome storing and the in-line test as two methods. Here both run together, with the arbitration rules described above.
* **Frame format, command codes, and the one-clock offset** between the transmitter and receiver switching are this design's own.
* **In-line test decision.** The thesis derives a look-up table for deciding from the test results whether a wire is faulty, but does not reproduce it. The rule here (any mismatch in 4 cycles means faulty) is the simplest that works. A short that only shows up under some data patterns may escape it.
* **Routing list.** The exact list of choices, the tie order, and which U-turns the turn-model variants may take are defined in separate papers not reproduced in the thesis. Here all U-turns are banned in the deadlock-free variants, which loses some fault tolerance in dead ends. The hop counter is this design's own answer to livelock.
* **Split-mode halves** are grouped by interleaving section, as explained above. Split mode is never left.
* **Code limits.** Two errors in one section are not corrected, and may be miscorrected without a flag.
* **Not included:** the router itself (buffers, switch, flow control), the network interface, the multi-interface mesh variants with 3- to 8-port routers, and the resources.
