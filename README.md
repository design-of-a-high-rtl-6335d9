# CDMA router for an on-chip network

This is a router for a network-on-chip that switches with code-division
multiple access (CDMA) instead of a crossbar. Up to seven resources
(processors, memories, accelerators) attach to one router. In the same clock,
each of them can send a whole packet to any other, and all those packets share
one summing datapath. They stay apart because each destination owns its own
Walsh codeword, and Walsh codewords are orthogonal. The only conflict left is
two packets for the *same* destination in the same clock, and a small
scheduler resolves it.

The RTL follows the architecture of *"Design of a High-Performance Scalable
CDMA Router for On-Chip Switched Networks"*: the block set, the modulation
rule and the demodulation equations come from that design. Where it gives no
detail (buffer depth, handshakes, the scheduling rule, pipeline registers),
this implementation makes its own choices. They are listed in
[Design choices](#design-choices-beyond-the-original-description).

## The idea: spreading every bit with the destination's codeword

With `ADDR_W` address bits there are `L = 2**ADDR_W` Walsh codewords, each
`L` chips long. The default is `ADDR_W = 3`, which gives eight 8-chip
codewords. Codeword *k*, chip *i*, is the parity of `k & i`, which gives the
rows of a Sylvester Hadamard matrix in 0/1 form:

| k | chips 0..7 |   | k | chips 0..7 |
|---|-----------|---|---|-----------|
| 0 | 00000000  |   | 4 | 00001111  |
| 1 | 01010101  |   | 5 | 01011010  |
| 2 | 00110011  |   | 6 | 00111100  |
| 3 | 01100110  |   | 7 | 01101001  |

Codeword 0 is all zeros and means "no data". Resource *n* (address *n*,
n = 1..7) owns codeword *n*. A packet to address *d* is sent by replacing
**every packet bit** with a full codeword, all bits in parallel:

| packet bit | chips sent                |
|------------|---------------------------|
| 0          | codeword *d*              |
| 1          | codeword *d*, inverted    |
| no packet  | all zeros (codeword 0)    |

Read as ±1 values (0 → +1, 1 → −1), any two different codewords agree on
exactly half their chips, so their correlation is zero. Codeword 0 is the
all-(+1) row, so it is orthogonal to every resource's codeword. That is why an
idle port's zeros are invisible to every receiver, and why the router copes
with ports that have nothing to send.

## Summing and recovering

For each packet bit position and each chip *i*, the **code adder** counts how
many of the seven modulators send a 1. That count is S[i], from 0 to 7, which
fits in `ADDR_W` bits. Each port's **demodulator** then correlates the counts
with its own codeword *c*:

```
D[i]   = 2*S[i] - L     if c[i] = 0
D[i]   = L - 2*S[i]     if c[i] = 1
lambda = (D[0] + ... + D[L-1]) / L
```

`lambda` = +1 means a 1 was sent to this port, −1 means a 0, and 0 means
nothing was sent to it. Using `L` in place of the number of ports (7) is
harmless: the difference adds `sum(±1 over c)`, which is 0 for every non-zero
Walsh codeword. The hardware never divides. It sums the eight D values into a
signed accumulator and looks at its sign. With at most one sender per
destination, the sum is exactly +L, −L or 0.

A worked example with eight chips. Port 2 sends a 1 to address 3, port 4
sends a 0 to address 5, and every other port is idle.

```
chip i                 0  1  2  3  4  5  6  7
to 3, bit 1: ~01100110 1  0  0  1  1  0  0  1
to 5, bit 0:  01011010 0  1  0  1  1  0  1  0
S[i]                   1  1  0  2  2  0  1  1
port 3 (c=01100110) D -6 +6 +8 -4 -4 +8 +6 -6   sum +8 -> lambda +1 -> bit 1
port 5 (c=01011010) D -6 +6 -8 +4 +4 -8 +6 -6   sum -8 -> lambda -1 -> bit 0
port 1 (c=01010101) D -6 +6 -8 +4 -4 +8 -6 +6   sum  0 -> no data
```

A demodulator reports a packet (`out_valid`) when every bit of it has a
non-zero decision factor. It also computes an error flag for a decision
factor outside {−1, 0, +1}, or for a packet with only some bits present. This
can only happen if two packets shared a codeword, and the router asserts that
it never does.

The demodulator is by far the largest block: seven ports × 22 bits × an
8-term signed sum. The code adder and the modulators come next. The scheduler
and header decoders do not grow with the payload.

## Packet format and ports

A packet is one parallel word, `PKT_W = 2*ADDR_W + PAYLOAD_W` bits (22 by
default):

```
 PKT_W-1          PAYLOAD_W+ADDR_W   PAYLOAD_W-1        0
 [   SRC (ADDR_W)   |   DST (ADDR_W)   |   PAYLOAD         ]
```

The whole packet, header included, is spread and recovered, so the receiver
also gets SRC and DST. In the RTL, array index *p* (0..6) is the port of the
resource with address *p+1*. Destination 0 is not a resource: the header
decoder drops such a packet from the buffer without sending it.

`cdma_router` ports, per resource *p*:

| signal           | dir | meaning |
|------------------|-----|---------|
| `in_valid[p]`    | in  | resource offers `in_pkt[p]` |
| `in_ready[p]`    | out | its buffer has room. The packet is taken at a rising edge where both are high |
| `in_pkt[p]`      | in  | packet |
| `out_valid[p]`   | out | one-clock strobe: a packet for this resource is on `out_pkt[p]` |
| `out_pkt[p]`     | out | the received packet (SRC tells who sent it) |

There is no backpressure on the output side. A resource must take a packet
in the clock it arrives.

## Pipeline and timing

```
edge 0   packet written into the port's buffer (cdma_fifo)
cycle 1  header decoder requests DST, scheduler grants (combinational),
         Walsh storage supplies codeword DST
edge 1   modulator registers the spread chips; buffer pops
edge 2   code adder registers the chip counts
edge 3   demodulator registers the packet -> out_valid / out_pkt
```

A packet therefore leaves 3 clocks after the edge that wrote it into an
empty buffer. With no contention, every port sends one packet per clock, so
the router moves `7 × PKT_W` bits per clock. Its payload throughput is
`7 × PAYLOAD_W × f_clk`, the figure the original work used for its evaluation
(for example 7 × 128 bits × 50 MHz = 44.8 Gbit/s). The original work reports
a packet latency of 160 ns but no pipeline. That is 8 clocks at its 50 MHz
figure and about 15 at its 94 MHz figure, so no clock count can be matched to
it. The pipeline here is this design's own.

## Contention: the scheduler

Two packets for the same destination in one clock would add two signals on
one codeword, and the receiver could not separate them. The scheduler
(`cdma_scheduler`) looks at every port's request (buffer not empty, head
packet's DST) and grants, **per destination, exactly one** requester.
Requests for different destinations are all granted in the same clock. The
winner for a destination is the first requesting port after the one that won
that destination last time (round-robin), so a port under contention waits at
most six grants. The losers keep their packet at the head of their buffer and
request again next clock. Once a buffer is full, `in_ready` drops. Two
assertions check the scheduler: at most one grant per destination, and no
grant without a request. The original design leaves the scheduling algorithm
open, so round-robin is this design's choice.

## Modules

| file | block | what it is |
|------|-------|------------|
| `rtl/cdma_pkg.sv` | — | default sizes and the Walsh chip function |
| `rtl/cdma_router.sv` | router | top: wires one buffer, header decoder, modulator and demodulator per port to the shared scheduler, Walsh storage and code adder |
| `rtl/cdma_fifo.sv` | buffer | first-word fall-through packet FIFO, `DEPTH` packets |
| `rtl/header_decoder.sv` | HD | request/grant glue between buffer, scheduler and modulator |
| `rtl/cdma_scheduler.sv` | scheduler | per-destination round-robin arbiter |
| `rtl/walsh_code_mem.sv` | Walsh codeword storage | read-only codeword table with `NRD` read ports (7 by DST for the modulators, 7 fixed for the demodulators) |
| `rtl/cdma_modulator.sv` | MOD | per-bit codeword / inverted codeword / zero, registered |
| `rtl/code_adder.sv` | CA | per-bit, per-chip population count over the ports, registered |
| `rtl/cdma_demodulator.sv` | DEMOD | decision variables, decision factor sign, packet valid, registered |

## Parameters and scaling

| parameter | default | notes |
|-----------|---------|-------|
| `ADDR_W` | 3 | address width. Sets `L = 2**ADDR_W` codewords/chips and `NPORTS = L-1` ports. 4 gives a 15-port router with 16-chip codewords, 5 a 31-port router with 32-chip codewords; both are simulated |
| `PAYLOAD_W` | 16 | payload bits. The original evaluation covers 8, 16, 32, 64 and 128, and all five are simulated |
| `FIFO_DEPTH` | 4 | packets per input buffer |

The datapath grows linearly with `PAYLOAD_W`, because every bit is spread,
summed and correlated separately. It grows roughly with `L²` per packet bit
as ports are added. With the defaults, a coarse synthesis gives about 2000
flip-flops, most of them in the modulator and code adder registers.

## Design choices beyond the original description

- Input handshake valid/ready; output a strobe without backpressure.
- Buffers of 4 packets, first-word fall-through.
- The Walsh codeword contents (Hadamard rows as above). The original names
  only the codeword `01100110` as an example; here that is codeword 3.
- Round-robin arbitration per destination, with grants in the same clock as
  the request.
- One register stage each in the modulator, code adder and demodulator.
- Packets addressed to 0 are dropped.
- The demodulator's error flag and the router's no-collision assertion.
- Asynchronous active-low reset on all control and pipeline registers. The
  FIFO storage array is not reset.
- The modulators select their codeword through the Walsh storage's read port.
  The original draws a bank of multiplexers in front of the modulator. The
  function is the same.

## Not included

The original work also shows how routers combine into larger networks: a
*star+star* network, with local routers joined by a central CDMA router, and
a *star+mesh* network, with routers in a 3×3 mesh. Neither is built here.
The extra packet field ("group") they need is not defined, nor is the routing
between routers. As drawn, both networks also attach more links to a router
than its seven codewords allow.

Area, frequency and gate counts of the original structured-ASIC synthesis
are properties of that technology and are not reproduced.

## Simulating

Every testbench in `tb/` is self-checking and ends by printing
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/cdma_pkg.sv \
    tb/tb_cdma_router.sv --top-module tb_cdma_router -Mdir obj_router
./obj_router/Vtb_cdma_router
```

Replace the testbench to run another one. Each module in `rtl/` lints on its
own with `verilator --lint-only -Wall -Irtl rtl/cdma_pkg.sv rtl/<module>.sv`.

| testbench | what it checks |
|-----------|----------------|
| `tb_cdma_router` | the router at its default size. It sends a single packet (3-clock latency), then permutation traffic with all 7 ports sending every clock (one packet per port per clock), then random traffic with hot spots, loopback and address-0 packets, then drains. Every delivered packet is checked against a queue per (source, destination) pair, and nothing may be lost. It fails if contention, full buffers, all-ports-at-once, partly idle clocks, loopback or dropped packets never occurred |
| `tb_cdma_router_payloads` | the same sequence on five routers with 8, 16, 32, 64 and 128-bit payloads |
| `tb_cdma_router_scaled` | the same sequence on a 15-port router (16-chip codewords) and a 31-port router (32-chip codewords). The 31-port build takes a few minutes to compile |
| `tb_cdma_fifo` | buffer against a queue model, including full and simultaneous push/pop |
| `tb_walsh_code_mem` | table against a recursive Hadamard construction; orthogonality of every pair |
| `tb_header_decoder` | exhaustive |
| `tb_cdma_scheduler` | one grant per requested destination, and the round-robin order against a model |
| `tb_cdma_modulator` | chips against the modulation rule |
| `tb_code_adder` | counts against a direct sum |
| `tb_cdma_demodulator` | sums built from random sender sets; recovers the right packet, reports "no data", flags collisions |

`router_harness.sv` in `tb/` holds the router stimulus and scoreboard that
both router testbenches share. `tb_cdma_router` accesses the scheduler's
`req`/`gnt` hierarchically to count contention.

All of these pass. Each block's testbench was also run against a copy of its
block with one deliberate bug, and it caught every one: a stuck round-robin
pointer, swapped codeword polarity, a port left out of the code adder, and
so on. The RTL has only been linted, elaborated and put through a generic
coarse synthesis. No timing closure or gate-level simulation has been done,
so clock frequency and area are unknown for any particular technology.
