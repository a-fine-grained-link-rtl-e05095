# Partially faulty links for a mesh NoC

On-chip network links are wide bundles of parallel wires, and wear-out
(electromigration above all) tends to break individual wires, not whole
links. Throwing away a 40-wire link because one or two wires failed
disconnects the network. This design keeps such a link in service as a
*partially faulty link* (PFL): the sender transmits each flit several times,
rotated by one wire position per cycle, and the receiver keeps each bit from a
copy that crossed a working wire. If the longest run of adjacent broken wires
is `m`, every flit needs `L = m + 1` cycles instead of one. Faults are
found at run time: a parity check notices a corrupted flit, two test vectors
locate the broken wires, and the flit is sent again.

The RTL has the link-level encoder and decoder, the parts they are built
from, a 5-port virtual-channel wormhole router with an encoder on every output
link and a decoder on every input link, and a 4x4 mesh of those routers.

## The rotation idea

Take an 8-wire link whose wires 0, 2, 4 and 5 are stuck. The longest run of
broken neighbours is wires 4-5, so `m = 2` and a flit takes 3 beats:

| beat | wire `i` carries bit | bits that cross a good wire (1, 3, 6, 7 good) |
|------|----------------------|-----------------------------------------------|
| 0    | `i`                  | 1, 3, 6, 7                                    |
| 1    | `i - 1`              | 0, 2, 5, 6                                    |
| 2    | `i - 2`              | 7, 1, 4, 5                                    |

After three beats every bit has crossed a good wire at least once. In general,
bit `j` travels over wires `j, j+1, ..., j+m` (mod W) in beats `0..m`; a run
of broken wires is at most `m` long, so at least one of those `m + 1`
consecutive wires works. Runs are counted **circularly**: wires W-1 and 0
are neighbours, because the rotation wraps around. A link with every wire
broken (`m = W`) is declared dead. A link with one good wire still works, at
`L = W` cycles per flit.

The receiver rotates beat `k` back by `k` positions and uses a copy of the
fault vector (1 = good wire), rotated the same way, as the mask of bits
that are valid in this beat.

## Finding broken wires

The link runs in one of three ways:

1. **Fault-free path** (`m = 0`): a flit is one beat. The encoder adds an
   even-parity bit, so a 39-bit flit fills the 40 wires. The decoder checks
   parity and writes the flit into the router's input buffer.
2. **Reconfiguration path.** When parity fails at the end of a flit, the
   decoder raises `nack` in that same cycle and drops the flit. The encoder,
   which still holds the flit, sends two test vectors on the next two cycles:
   `1010...` (wire 0 = 1) and its complement, marked by the `tv` wire. A
   wire stuck at either value delivers the same bit twice. The XOR of the two
   received words is therefore the fault vector: 0 on broken wires, 1 on good
   ones. The decoder computes `m`, keeps it, and returns it to the encoder
   (two cycles after the second vector). The encoder loads its `m` register
   and resends the flit.
3. **Data recovery path** (`m > 0`): each flit is `m + 1` rotated beats, as
   above. Parity is checked on the re-assembled word, so a wire that breaks
   later starts a new diagnosis in the same way.

Timeline of a diagnosis, from the cycle `t` of the corrupted flit's last
beat: TV1 at `t+1`, TV2 at `t+2`, fault vector registered at `t+3`, `m`
returned at `t+4`, resent flit starting at `t+5`.

### What single parity can and cannot catch

A broken wire that happens to carry the value it is stuck at does no harm and
is not noticed until it does. A wire that breaks while the link is already
degraded can corrupt more than one bit of a re-assembled flit, and two wrong
bits cancel in the parity. The decoder limits this: it keeps the **first**
good copy of each bit and ignores later copies. A wire `w` is then used only
by the bits for which it is the first good wire, and if wire `w-1` is good
that is bit `w` alone. So a new fault is always seen when it is isolated, or
when it extends a cluster of broken wires downwards (toward wire 0), but two
bits can be wrong, and go unseen, when it extends a cluster upwards or when
two wires fail at once. Stronger detection means a stronger code in
`pfl_parity_gen` / `pfl_parity_chk`. The code word is `{check, flit}` and
everything else is independent of the code, but the flit width would shrink.

## Encoder (`pfl_encoder`)

* error coding (`pfl_parity_gen`) on the flit from the output buffer;
* the `m` register, loaded from the downstream decoder's answer. Its value is
  also offered to the router's switch allocation;
* a flit buffer keeping the coded, unrotated flit until it has been accepted,
  and a working register that a single-position barrel shifter rotates left
  once per beat;
* the test vector generator (`pfl_tv_gen`);
* the output multiplexer choosing test vectors, beat 0 (unrotated, straight
  from the coder) or a rotated copy.

`ready_o` is high in the last beat of a flit that is not nacked, so flits
follow back to back: one per cycle on a healthy link, one every `m + 1`
cycles on a degraded one. All link outputs come from registers.

## Decoder (`pfl_decoder`)

* a demultiplexer on the `tv` wire: test vectors go to `pfl_fv_calc`
  (holds the first vector, XORs it with the second) and `pfl_max_seg`
  (longest circular run of zeros, one pass over the vector written twice);
* a barrel de-shifter that rotates beat `k` back by `k`;
* the fault vector register, plus a working copy that a single-position
  de-shifter turns once per beat to mask the current beat;
* the flit re-assembly buffer with a "saved" bit per position (first copy
  wins), and error detection (`pfl_parity_chk`) on the merged word;
* `nack_o` and the flit output are combinational from the link inputs in the
  last beat, so the input buffer writes the flit at the end of that cycle.

## Router (`noc_router`)

Ports in the order X+, Y+, X-, Y-, local. Each input has `NVC` FIFOs of
`BUF_DEPTH` flits (`noc_fifo`), chosen by the flit's VC field.

* **Route computation** (`noc_route_xy`): X first, then Y, on the head flit.
* **VC allocation**: a head flit gets a free VC of its output port. Priority
  rotates over all input VCs. The VC stays owned until the tail flit leaves.
* **Switch allocation**: separable round-robin: first one VC per input, then
  one input per output. A flit can go when its output VC has a credit, the
  output buffer has room and the output link is not dead. Because the output
  buffer (`OUT_DEPTH` flits) drains at the encoder's rate, a slowed link
  throttles the switch.
* **Credits**: per VC. A credit goes upstream when a flit leaves an input
  buffer. The ejection port takes a flit every cycle and needs none.

A head flit written into an input buffer in cycle `t` gets its VC in `t+1`,
wins the switch in `t+2`, enters the encoder in `t+3` and is on the wires in
`t+4`. Body flits skip the VC stage.

## Mesh (`noc_mesh`, top)

`MESH_X x MESH_Y` routers. Router `r = y*MESH_X + x`, X+ toward `x+1`,
Y+ toward `y+1`. The data wires of each directed link are brought out:
`link_tx_o[r][d]` is what router `r` drives on its output `d`, and
`link_rx_i[r][d]` is what arrives at the other end. Tie `rx` to `tx` for a
perfect network, or force bits to model broken wires. The back channel of
each link (`nack`, `m`, credits) stays inside and is taken to be reliable.

Local port: a source may put a flit on VC `v` only while it holds a credit.
It starts with `BUF_DEPTH` credits per VC and gets one back on each
`inj_credit_o[r][v]` pulse. It must keep each packet on one VC, and not
interleave two packets on the same VC. Ejected flits carry the VC they used
on the last hop.

### Flit and link formats (`pfl_pkg`)

| field   | bits | meaning                                               |
|---------|------|-------------------------------------------------------|
| ftype   | 2    | 0 body, 1 head, 2 tail, 3 head+tail (one-flit packet) |
| vc      | 3    | virtual channel on the current link                   |
| dst_x   | 2    | destination column                                    |
| dst_y   | 2    | destination row                                       |
| payload | 30   | free                                                  |

The parity bit makes the 40th wire. `link_fwd_t` = `{valid, tv, data[39:0]}`,
`link_bwd_t` = `{nack, m_valid, m_size[5:0]}`.

## Parameters

| parameter          | default | where                                          |
|--------------------|---------|------------------------------------------------|
| `LINK_W` (pkg), `W` | 40     | wires per link                                 |
| `MESH_X`, `MESH_Y` | 4, 4    | mesh size (coordinates are 2 bits in `pfl_pkg`) |
| `NVC`              | 6       | VCs per port (up to 8)                         |
| `BUF_DEPTH`        | 6       | flits per input VC                             |
| `OUT_DEPTH`        | 2       | flits per output buffer                        |

The 40-wire links, 4x4 mesh and 6 VCs of 6 flits are those of the system the
mechanism was evaluated in. The PFL blocks take any `W`; the router and mesh
take `LINK_W` from the package.

## How far to trust it, and where it departs from the original mechanism

Taken from the mechanism as published: the four phases (error, detection,
test-vector diagnosis, rotation-based recovery), `L = m + 1`, the test
patterns, the XOR fault vector, the left rotation at the sender and de-rotation
at the receiver, and the block structure of the encoder, decoder and router.

This design's own choices:

* the error code (one even-parity bit on the top wire), the flit layout;
* the nack / test-vector / `m` handshake, its timing, and resending the
  corrupted flit; back-channel, `valid`, `tv` and credit wires assumed
  fault-free;
* circular counting of fault runs, first-good-copy re-assembly, and an
  unrotated fault vector and flit kept beside their rotating working copies;
* the dead-link state for `m = W`. Its pending flit is dropped, and XY
  routing does not avoid the link, so traffic routed over it stalls;
* router microarchitecture (allocators, credits, output buffer depth, a
  4-stage pipeline of its own design). The adaptive OPT-Y routing with the
  MCRD/MELU/SL selection functions, used in the published evaluation, is not
  implemented; XY, the reference algorithm, is.

Not part of the RTL: the processors, caches and memory controllers of the
evaluated full system, and network interfaces (the testbenches act as them).

## Simulation

Every testbench is self-checking, ends with a `TB_RESULT checks=N failures=M`
line and has a watchdog. For example:

```
verilator --binary --timing --assert -Irtl rtl/pfl_pkg.sv rtl/*.sv tb/noc_mesh_tb.sv --top-module noc_mesh_tb
./obj_dir/Vnoc_mesh_tb
```

(The lint may warn about `rst_n` being used both in flip-flops and in
assertion `disable iff` clauses; that is expected.)

| testbench            | what it exercises |
|----------------------|-------------------|
| `pfl_parity_gen_tb`, `pfl_parity_chk_tb` | parity against a bit count; every single-bit flip caught |
| `pfl_tv_gen_tb`      | the two complementary vectors on consecutive cycles |
| `pfl_fv_calc_tb`     | random stuck-at-0/1 sets give the exact fault vector |
| `pfl_max_seg_tb`     | longest circular run against a brute-force count, including wrapped runs and all-good / all-bad |
| `pfl_encoder_tb`     | beats equal the rotated code word; 1 flit/cycle healthy, 4 cycles at `m = 3`, 40 cycles at `m = 39`; test vectors and resend after a nack; dead link at `m = 40` |
| `pfl_decoder_tb`     | the 8-wire example (fault vector `11001010`, `m = 2`); 14 faults added one by one under traffic: each caught, `m` right, every flit delivered once and intact |
| `noc_fifo_tb`, `noc_route_xy_tb` | FIFO against a queue; XY first hop for all 256 source/destination pairs |
| `noc_router_tb`      | one router with encoder/decoder neighbours, five sources, faults on an input and an output link: XY ports, wormhole order, no loss, diagnosis, degraded transfers |
| `noc_mesh_tb`        | the full 4x4 mesh at default parameters: 640 packets from all nodes, clusters of up to 3 broken wires (one wrapping wire 0) grown on four links during traffic; checks delivery, integrity, order and each link's `m`, and that diagnosis, degraded transfers, `m >= 2`, output-buffer stalls and credit waits all occur |

The mesh testbench takes about 1.5 minutes to build and a few seconds to run.
