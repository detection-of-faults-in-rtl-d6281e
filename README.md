# Fault-tolerant bufferless deflection router and 8x8 mesh

This is a SystemVerilog model of a network-on-chip built from bufferless deflection routers
that detect, correct and route around faults. The default configuration is an 8x8
Nostrum-style 2-D mesh. Each router has four mesh ports (N, E, S, W) and one local port. On the
mesh boundary, an output is looped back into the input on the same side of the same router.

The design combines four fault-handling mechanisms:

- **Link error control (hybrid ARQ/FEC).** Every link word is SECDED-coded.
  - A single error in any part of the word is corrected by the receiver.
  - A double error makes the receiver raise `arq`. The sender then repeats its last word from
    a retransmission buffer.
  - If the repeated word shows the same double error again, the link is declared
    permanently faulty and is no longer used.
- **Back-pressure.** Each input has a small hold buffer. When that buffer is full, a
  registered `fault_to` signal temporarily disables the upstream router's output towards it.
- **Crossbar diagnosis.** An 8-bit CRC, g(x) = x^8 + 1, is checked twice:
  - after the input register;
  - again after the crossbar, using a checksum rebuilt from the updated header.

  A crossbar connection that repeatedly corrupts packets which entered the router clean is
  marked permanently faulty. Allocation then avoids it.
- **Deflection routing.**
  - Packets are served in hop-count order, oldest first.
  - Each packet takes a productive output if one is free.
  - Otherwise it is deflected to the free output whose neighbour reports the lowest stress.
    Stress is the number of packets that neighbour processed in the last four cycles.
  - A packet that has reached its destination is ejected to the local port.

## Packet and link format

The packet is 114 bits. Fields are listed from the least significant bit (`noc_pkg::pkt_t`):

| bits | field | meaning |
|---|---|---|
| 0 | V | valid |
| 9:1 | HC | hop count (saturating) |
| 21:10 | SA | relative source address, 6-bit sign-magnitude x and y |
| 33:22 | DA | relative destination address, same format |
| 105:34 | data | 72 data bits |
| 113:106 | CRC | 8-bit checksum over header and data |

The 34-bit head and 80-bit payload are coded as seven SECDED parts. The result is 156 bits
on the link:

- head bits 0-16 go to code bits 0-22, as Hamming(23,17);
- head bits 17-33 go to code bits 23-45, as Hamming(23,17);
- payload part k (k = 0..4), 16 bits each, goes to code bits 46+22k to 67+22k, as Hamming(22,16).

Each part has its check bits at code positions 1, 2, 4, 8 and 16, and its overall parity at
position 0. An idle link carries all zeros, which is a valid code word.

Addresses are relative, in the Nostrum way:

- +x is East and +y is North.
- A packet has arrived when both DA magnitudes are zero.
- On each hop, DA and SA step by the same amount.
- On a boundary loopback, only the hop count changes.

## Blocks (rtl/)

| module | role |
|---|---|
| `noc_pkg` | types, widths, CRC fold, sign-magnitude helpers |
| `noc_mesh` | top: COLS x ROWS routers, links, loopbacks, arq/fault_to/perm/stress wiring, fault-injection inputs |
| `ftdr_router` | one router: 4 input ports, allocator, crossbar, 4 output ports, stress counter, crossbar diagnosis, local injection/ejection |
| `input_port` | input register, packet decoder, input CRC unit, hold buffer, arq, fault_to, permanent-link detection |
| `output_port` | header update, output CRC unit, packet encoder, retransmission buffer RB and new/retransmit mux |
| `route_alloc` | combinational hop-count-priority deflection allocator |
| `stress_counter` | packets processed in the last WIN = 4 cycles |
| `pkt_encoder` / `pkt_decoder` | seven-part 156-bit SECDED packet code |
| `secded_enc` / `secded_dec` | extended Hamming code, K data bits |
| `crc_in_unit` / `crc_out_unit` | CRC check after the input register; checksum rebuild and check after the crossbar |
| `xbar_diag` | per-connection count of consecutive crossbar CRC errors; sticky fault status |

### Timing

A router is a single pipeline stage. A word received at clock edge t is decoded, allocated,
switched, re-coded and driven on the output link during the cycle that follows. It is
captured by the next router at edge t+1.

- `arq` is combinational from the receiver's input register. The sender's mux switches to
  RB in the same cycle, so the repeated word arrives at the next edge.
- `fault_to` is registered.
- `perm` is sticky and is also raised in the cycle the fault is detected. No new word is
  therefore sent into a link that is being given up.
- Reset is synchronous and active low (`rst_n`).

## Choices this design makes where the source leaves a gap

- **Input buffer.** "An input buffer with two entries" is read as the input register plus one
  hold entry (HD = 1). Boundary inputs have three entries (HD = 2).
- **Packet size.** Two formats appear: a 128-bit Nostrum packet in the CRC figure, and the
  114-bit packet of the ECC section. The 114-bit packet is used, and the 8-bit CRC is taken
  from the 80-bit payload.
- **CRC coverage.** The CRC covers head and data. With x^8 + 1 it is the XOR of all 8-bit
  slices.
- **Permanent link test.** The "link test" after a repeated double error is not described. Here
  the link counts as permanently faulty when the repeated word has the same non-zero syndromes.
  That word is dropped and counted as an event.
- **Crossbar diagnosis threshold.** THRESH = 2 consecutive errors; a clean transfer resets the
  count. A packet corrupted in the crossbar is forwarded, not repeated.
- **Allocation details.**
  - Ties in hop count go to the lower input index (N, E, S, W).
  - With two productive ports, the one with lower stress is taken.
  - The local packet is injected only if an output is still free.
  - One packet per cycle is ejected, and the node always accepts it.
- **Stress.** "Processed" means routed, ejected or injected in that cycle.
- **Fault-injection test hooks.** These are this design's own: `link_err` XORs a pattern into
  any link, and `xbar_flip` flips data bit 0 at a crossbar output.

## Not implemented

- **Reinforcement-learning routing table (FTDR / FTDR-H).** The source refers to earlier work
  for it and gives neither its contents, update rule nor size. Routing here is the
  stress-based deflection of the router section, plus avoidance of faulty links and crossbar
  connections.
- **Processing elements.** Injection and ejection ports are brought out of `noc_mesh` instead.
- **Hamming(122,114) whole-packet code.** The source mentions it only for comparison.
- **Throughput comparison against FoN and cost-based routing.** Not reproduced; those
  algorithms are not described.

## Testbenches (tb/)

All testbenches are self-checking and use a watchdog. They end with a line
`TB_RESULT checks=<n> failures=<n>`.

| testbench | what it checks |
|---|---|
| `secded_tb` | K = 16 and 17: clean words, every single error corrected, double errors flagged |
| `pkt_codec_tb` | 156-bit packet code: idle word, one error per part corrected, double error in a part flagged |
| `crc_tb` | input and output CRC units against a reference fold; header update; errors and bursts detected |
| `stress_counter_tb` | window sum against a reference history |
| `route_alloc_tb` | grants against a reference allocator: priority, productive ports, stress choice, ejection, disabled ports, faulty connections |
| `xbar_diag_tb` | error counts and sticky status against a reference table |
| `input_port_tb` | upstream model with retransmission: correction, arq, hold buffer, fault_to, permanent fault and drop |
| `output_port_tb` | header update, CRC, encoding, retransmission of the last word, loopback output |
| `ftdr_router_tb` | one router with neighbour models: every packet leaves exactly once, with a correct header and data |
| `noc_mesh_tb` | full 8x8 mesh, see below |

`noc_mesh_tb` runs the default 8x8 mesh with no parameter overrides, under uniform random
traffic (35 % injection per node for 1200 cycles, about 20 000 packets). It applies:

- single-bit link errors on 0.4 % of words;
- double errors on about 0.2 % of words;
- from cycle 200, one permanently faulty link (27 → E);
- from cycle 200, one faulty crossbar output (node 45, S).

It checks that every packet is delivered once, to the right node, with intact data, except
the words dropped at the permanent link. It also counts every mechanism: corrections, arq,
retransmissions, holds, fault_to, permanent link, drops, CRC errors, crossbar diagnosis,
deflections, loopbacks, injections and ejections.

To run a testbench with Verilator 5 (X is the testbench name):

```
verilator --binary --assert -j 4 -Irtl -Wno-fatal --top-module X rtl/noc_pkg.sv tb/X.sv -y rtl -Mdir obj_X -o sim
./obj_X/sim
```

The mesh testbench takes a few minutes to compile and about 10 s to run.

## Known limitations

- Packets dropped at a newly diagnosed permanent link are lost. No end-to-end recovery is
  modelled.
- The crossbar CRC fault is detected one hop later only through `xbar_diag`'s own counters.
  The next router regenerates the checksum, so a corrupted data bit is not flagged at the
  destination.
