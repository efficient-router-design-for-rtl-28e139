# Three five-port routers for a network on chip

A router in a network on chip takes packets arriving on its ports and sends each one out on the port
its header names. This repository holds synthesizable SystemVerilog for three ways of building
such a router. Each has five ports (in a mesh, four go to neighbouring routers and one to the local
processing element) and moves 8-bit packets:

| | Router I, `router_fifo` | Router II, `router_xbar` | Router III, `cdma_router` |
|---|---|---|---|
| Buffering | 25 FIFOs, one per input/output pair | one FIFO per input | 25 virtual output queues, five per input |
| Switch | per-output round-robin scheduler reading its five FIFOs | 5x5 multiplexer crossbar + round-robin arbiter | Walsh-code spreading, one shared sum bus, correlation receivers |
| Latency, no contention | 3 cycles after the write edge | 1 cycle | 1 cycle, the same for every port pair |
| Peak rate | 5 packets/cycle | 5 packets/cycle | 5 packets/cycle |
| Blocking | none between outputs | head-of-line | none between outputs |

The third design is the most interesting one. It replaces the crossbar with code-division
multiple access (CDMA): every sender spreads its packet with its own orthogonal code, all spread
signals are simply added, and every receiver pulls its own packet out of the sum. The three designs
follow the architectures in S. Swapna, *Efficient Router Design for Network on Chip*, M.Tech
thesis, NIT Rourkela, 2013. That work gives the block structure and algorithms. The cycle timing,
handshakes and corner cases are choices made here, and are listed below.

`noc_router_top` places the three routers side by side. They share only the clock and the
active-high asynchronous reset, and their ports are prefixed `r1_`, `r2_` and `r3_`.

## Packets and port numbers

Inside packets, ports are numbered 1 to 5 with a 3-bit address. RTL arrays index them 0 to 4.

* Routers I and II: the destination is in bits `[2:0]`. The other bits are carried unchanged. For
  example, `68 = 0100_0100` goes to port 4, and `154 = 1001_1010` goes to port 2.
* Router III: `{dest[7:5], src[4:2], data[1:0]}`. For example, `102 = 011_001_10` goes from port 1
  to port 3. `src` must be the number of the port the packet enters by, because it selects the
  sender's spreading code (see below).

A destination of 0, 6 or 7 names no port. Routers I and III never write such a packet into a
FIFO. Router II drops it when it reaches the head of its input FIFO.

## Router III: the CDMA router

### Data path

```
 di[i] -> by dest -> VOQ[i][1..5] (FIFO(4) each) -> granted head -> cdma_modulator (code msrc[i]) --+
                          |                                                                       |
                          +-> req[i][j], src[i][j] -> cdma_scheduler                    code_adder <--+
                                                        |                                    | sum P
                                  grant[i][j], msrc[i], dval[j], dsrc[j] -> walsh_code_gen -> cdma_demodulator[j] -> dout[j]
```

Each input keeps a separate queue for each output (virtual output queues, VOQ). A packet waiting
for a busy output therefore never holds up a later packet of the same input that is going
elsewhere. Setting the parameter `VOQ = 0` gives one FIFO per input instead.

All eight bits of a packet are spread in parallel. Each bit becomes 8 chips, so a packet is 64
chips. The code adder produces 64 chip sums of 3 bits each. One packet per port can therefore
cross the router in every cycle.

### Walsh codes (`walsh_code_gen`)

Code `k` (3-bit index) is an 8-chip row of a Hadamard matrix, complemented:

```
chip i of code k = NOT parity(k AND i)        (chip 0 is the MSB)
000 11111111   001 10101010   010 11001100   011 10011001
100 11110000   101 10100101   110 11000011   111 10010110
```

Codes 1 to 7 each have four ones and four zeros (they are *balanced*), and any two of them agree
on exactly four chips (they are *orthogonal*). Port `p` uses code `p`. Code 0 is never used.

### Spreading and adding (`cdma_modulator`, `code_adder`)

A granted sender sends, for each packet bit `b`, the codeword if `b = 0` and its complement if
`b = 1`. A sender without a grant sends all-zero chips. The code adder counts, chip by chip, how
many senders sent a 1. That sum `P` is between 0 and 5 and is held in 3 bits.

### Recovering a bit (`cdma_demodulator`)

With codeword chips `c[i]` and `N = 8`:

```
X[i] = 2P[i] - N   if c[i] = 0
X[i] = N - 2P[i]   if c[i] = 1
sum(X) = +N  -> bit 1        sum(X) = -N -> bit 0        anything else -> no clean decode
```

This works for the following reasons. Write `s[i] = +1` where `c[i] = 0` and `s[i] = -1` where
`c[i] = 1`. Then `sum(X) = 2·Σ s[i]·P[i] − N·Σ s[i]`.

* Because the code is balanced, `Σ s[i] = 0`. So the constant term vanishes, whether `N` or the
  number of senders is subtracted, and idle all-zero senders add nothing.
* A sender using a different code adds 0, by orthogonality. This holds whichever bit it sends,
  because complementing a chip pattern only flips the sign of a sum that is already 0.
* The sender using this code adds `−4` for a 0 bit and `+4` for a 1 bit. Doubled, that is `∓N`.

The demodulator compares with `±N` instead of dividing by `N`. Its `ok` output is high only if all
eight bits decoded cleanly.

### Scheduling: who may send to whom (`cdma_scheduler`)

A receiver can decode only if it knows the sender's code and only one sender uses that code. The
scheduler enforces both, in the spirit of an arbiter-based transmitter-code protocol:

* It sees which virtual output queues are non-empty (`req[i][j]`) and the `src` field of each
  queue head.
* An input may hold packets for several outputs, but it has only one modulator and so can send
  one packet per cycle. The scheduler therefore makes a one-pass match:
  * Each output proposes to the first requesting input after the input it served last.
  * Each input accepts the first proposing output after the output it sent to last.
  * Only accepted pairs are granted, and only they move the round-robin pointers.
* Each granted input's modulator spreads with the code of that packet's `src` (`msrc`).
* Each destination's demodulator is told the granted sender's `src` (`dsrc`) and loads that code.

Up to five packets cross the router in the same cycle, at most one per input and one per
destination. Request, match and code selection all happen in the same cycle. An output that loses
the accept step may stay idle for that cycle even though another input has a packet for it. This
is the usual cost of a single-pass match.

If two concurrent senders claim the same `src`, their chips collide. The affected outputs then
raise `err` instead of `dvalid`, and the packets are lost.

### Timing

A packet written with `wr[i]` at clock edge *t* appears on `dout[dest-1]` with `dvalid` high after
edge *t+1*, if nothing else in that cycle wants the same destination. This latency is the same for
every input/output pair. Packets that contend for one output leave one per cycle. Each virtual
output queue holds four packets. The writer cannot know the destination before the write is
accepted, so `full[i]` is high while any queue of input *i* is full, and a write is ignored then.

## Router I: per-pair FIFOs and round-robin schedulers

* `reg8_demux` (one per input) registers the packet when `wr` is high. In the next cycle its
  demultiplexer raises the write enable of FIFO (input, dest).
* Each `fifo` is a block-RAM style queue: a read request at an edge puts the word on its output
  after that edge.
* `rr_scheduler` (one per output) raises a read request (`rr`, RR1 to RR5) each cycle for the
  first non-empty FIFO after the one it served last. One edge later it registers the word onto
  `datao` with `valid`.

Latency is 3 cycles after the write edge. When several inputs target one output, their packets
leave one per cycle in round-robin order, so their latencies differ in steps of one clock. Packets
for different outputs never block each other.

A packet that finds its FIFO full is lost; `full[i][j]` shows it. The FIFOs are depth 4. The
source gives no depth for this design, so it uses the same depth as the other two.

## Router II: crossbar and ring-counter arbiter

* `fifo` (one per input, showing its head word) holds up to four packets. Its destination bits
  form a request to one output.
* `arbiter` contains one `rr_arbiter` per output:
  * A one-hot ring counter enables one of five priority-logic blocks.
  * Block *k* grants the first request from *k* upward, wrapping round.
  * The blocks' grants are ORed together.
  * The ring moves one place after each cycle in which that output granted something.
  * The grant is also encoded as the 3-bit select for the `crossbar`, which is five 5:1
    multiplexers.
* The granted FIFO is popped, and the crossbar output is registered onto `data_out` with `valid`.

Latency is 1 cycle after the write edge. A FIFO whose head is blocked also holds up the packets
behind it (head-of-line blocking). `full` is exported, and writes are ignored while it is high.

## Shared FIFO (`fifo`, `fifo_ctrl`, `fifo_ram`)

`fifo_ctrl` keeps a read pointer, a write pointer and an occupancy count. It refuses writes when
full and reads when empty, and drives the enables and addresses of `fifo_ram`. Reset clears the
count, the stored words and the output register. The parameter `FWFT` chooses the read style:

* `FWFT = 0` (router I): synchronous read.
* `FWFT = 1` (routers II and III): the head word is shown on the output before it is read.

The RAM has separate read and write addresses, so the FIFO can read and write in the same cycle.

## Where this RTL departs from, or adds to, the original description

* **Spreading codes.** The source describes both transmitter-owned codes (the arbiter tells the
  receiver which code to use) and selecting the codeword by destination. This RTL uses
  transmitter-owned codes.
* **Code table.** The codes follow the source's code table. One worked example there uses the
  complement of code 4. Decoding does not depend on which of the two is used.
* **Virtual output queues.** The source uses virtual output queues in the CDMA router but gives
  no matching algorithm and a buffer depth of four. Here each of the 25 queues is four deep, and
  the match is the single-pass round-robin propose/accept described above.
* **Contention order.** The round-robin start point is not specified in the source. The order in
  which contending packets leave may therefore differ from its published waveforms. The set of
  packets and the port each reaches match.
* **Ports added.** `valid`, `full`, `err`, the per-port write strobes of router III, and the empty
  inputs of the router I scheduler are additions.
* **Latencies.** The source quotes 24 to 40 ns for router I, 52 to 68 ns for router II and
  10 ns for router III. Router III and the one-clock steps of router I match. Router II has no
  extra delay here.
* **Crossbar clock.** The source suggests clocking the crossbar faster than the rest of the
  router. That is not done here.
* **Resource-dependent sizes.** The code adder is sized for 0 to 7 (3 bits), as in a seven-sender
  system. With five ports the largest sum is 5.
* **Not modelled.** The processing elements, network interfaces and links outside the routers.

## Parameters

Every module takes `NPORTS` (5), `DW` (packet width, 8) and `DEPTH` (FIFO depth, 4) where they
apply. The CDMA blocks also take `NCHIP` (8) and `SUMW` (3), and the defaults come from
`noc_pkg`. `cdma_router` takes `VOQ` (1): 1 gives five queues per input, 0 one FIFO per input.

`DW` can be raised, and 16- and 32-bit packets are tested. Routers I and II keep the destination
in bits `[2:0]`; router III keeps `{dest, src}` in the top six bits.

`NPORTS` up to 7 should fit the 3-bit addresses and the seven usable 8-chip codes; only 5 is tested. More ports would
need longer codes (`NCHIP = 2**AW`) and a wider `SUMW`.

## Simulating

Every testbench is self-checking and ends with a line `TB_RESULT checks=N failures=M`. With plain
Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/noc_pkg.sv tb/tb_cdma_router.sv \
          --top-module tb_cdma_router -Mdir obj_cdma
./obj_cdma/Vtb_cdma_router
```

Swap in any testbench name to run it:

| Testbench | What it covers |
|---|---|
| `tb_fifo` | both read styles against a queue model |
| `tb_reg8_demux`, `tb_rr_scheduler`, `tb_router_fifo` | router I |
| `tb_crossbar`, `tb_arbiter`, `tb_router_xbar` | router II |
| `tb_walsh_code_gen`, `tb_cdma_modulator`, `tb_code_adder`, `tb_cdma_demodulator`, `tb_cdma_scheduler`, `tb_cdma_router` | router III |
| `tb_cdma_router_fifo` | router III built with `VOQ = 0`: per-input order and head-of-line blocking |
| `tb_noc_router_top` | all three routers at default sizes |
| `tb_payload_sweep` | 8-, 16- and 32-bit packets |

What the tests establish:

* **Router tests.** They replay the packet sets of the source's published simulations. For
  example, `102, 43, 174, 83, 149` into router III must leave as `43, 83, 102, 149, 174` on ports
  1 to 5, all in the same cycle. Random traffic is then checked with per input/output
  scoreboards.
* **Top-level test.** It counts how often each mechanism occurred and fails if any never did:
  contention, five-way concurrent CDMA delivery, FIFO full in each router, discard of packets
  with no destination, loss on a full router I FIFO, the CDMA decode error, and a CDMA packet
  overtaking an older packet of its input that waits for another output.
* **Throughput.** The top-level test also writes on every input in every cycle, with input *i*
  sending to a different output each cycle, and checks that every router delivers five packets
  per cycle while none of its FIFOs fills.
* **Timing.** Router latencies are checked cycle-exactly.

The source's FPGA area, clock-frequency and power figures are implementation results and are not
reproduced.
