# Approximate communication on a mesh NoC: reconfigurable-swing links

Most of the energy a network-on-chip spends goes into its links, and the energy
of a link transition grows with the square of the voltage swing. This design
gives every router output link two modes:

* **full swing** (VDDH = 1.1 V): reliable, bit-error rate about 1e-17;
* **low swing** (VDDL = 0.6 V): about 70 % less energy per transition, but a
  bit-error rate of about 4e-6.

Each packet picks its mode. Data that the application can tolerate errors in
(pixels of an image, for example) travel at low swing. Control information
always travels at full swing: headers, addresses, sizes and every request
packet. A programmer marks error-tolerant data structures as *resilient*. The
network interface turns that marking into flags in the packet header, and the
routers set the swing of each output link from those flags, one packet at a time.

The RTL is a 2x3 mesh with four processing-core nodes and two memory-controller
nodes. This is the layout used for a pipelined JPEG encoder: level shift, DCT,
quantize and entropy encode on the cores, two memories behind the controllers.
Routers, network interfaces and memory controllers are synthesizable
SystemVerilog. The link itself is analog, so it is a behavioural model. The
model has the link's characterised bit-error rates and its energy per
transition, which lets a simulation show the trade between energy and errors.

## How a packet chooses its swing

The rule is simple, and the whole design turns on it:

1. **The header flit always goes at full swing.** It carries the route and the
   flags. A corrupted header would misroute or lose the packet.
2. **The body and tail flits of a packet go at low swing** only if its header
   has `APPROX = 1` and the network is in approximate mode (`approx_en = 1`).
3. With `approx_en = 0` the same hardware is the *baseline* NoC: every link
   stays at full swing whatever the headers say.

Loads and stores reach this rule differently, because a load is two packets:

| transaction | packet | travels from | `APPROX` | `RESP_APPROX` |
|---|---|---|---|---|
| load  | request (one flit: address, size) | core to memory controller | always 0 | = resilient |
| load  | response (header + data) | memory controller to core | copied from the request's `RESP_APPROX` | 0 |
| store | request (header + data) | core to memory controller | = resilient | 0 |

A load request carries only control information, so it never goes at low
swing. It does carry the `RESP_APPROX` flag, which tells the memory controller
how to send the data back. Stores are posted: there is no acknowledgement.

In hardware, each router output has a `swing_ctrl` next to its one-flit output
register. When a header is loaded into the register, `SEL` is set to 1 (full
swing) and the header's `APPROX` bit is stored. For each following flit of the
packet, `SEL = !(approx_en && APPROX)`. `SEL` is registered, so it reaches the
link in the same cycle as the flit it controls. When no flit is sent, `SEL` and
the payload keep their values, so an idle link does not toggle.

Only the 32 payload bit-lines of a link can switch swing. The 2-bit flit type and
the valid/ready wires are control signals and stay on nominal wires.

## The reconfigurable bit-line (`swing_bitline`, `swing_link`)

One bit-line has these parts:

* a demultiplexer steered by `SEL`, which feeds one of two tapered drivers. One
  driver is full swing. The other is low swing, with its output stage on VDDL.
* two transmission-gate tristate buffers. One is enabled by `SEL`, the other by
  `SEL`-bar, so the unused path is disconnected from the line.
* the line itself: Metal 7, 2.8 mm long, 0.4 µm wide, 225 Ω, 946 fF.
* a level-restorer receiver, which brings a low-swing signal back to full swing.

`swing_link` puts one such line on each payload bit, all sharing one `SEL`.

The behavioural model keeps the logic function and adds two things a digital
simulator can use:

* **Errors.** On each change of `in` or `sel`, the model draws a random number.
  It inverts `out` with probability `BER_LOW` (3.8e-6) at low swing, or
  `BER_HIGH` (1.3e-17) at full swing. An inverted bit stays inverted until the
  line's next change, so one error can spoil more than one received word.
* **Energy.** The model counts transitions in each mode. The package holds the
  energy per transition: 527 fJ at full swing, 152 fJ at low swing, and 512 fJ
  for a conventional single-swing line of the same length. The totals are
  `hs_total()`, `ls_total()` and `err_total()`.

The line's worst-case delay, 410 ps, fits in one period of the 2 GHz router
clock, so the model has no delay.

## Network

```
        x=0                   x=1                 x=2
 y=0    core 0 (level shift)  core 1 (DCT)        memory controller 0 -> memory 0
 y=1    core 2 (quantize)     core 3 (entropy)    memory controller 1 -> memory 1
```

* **`noc_router`** is a five-port router (local, N, E, S, W) built from these
  parts:
  * a 4-flit input FIFO per port (`flit_fifo`);
  * XY dimension-order routing, with y growing southwards;
  * wormhole switching, with a round-robin arbiter per output that holds the
    output until the tail flit has passed;
  * a one-flit output register per port, with its `swing_ctrl`;
  * valid/ready flow control. `in_ready` means "buffer not full" and never
    depends on `in_valid`.

  A header accepted at an input reaches the output register two clock edges
  later. At full throughput each output moves one flit per cycle. XY routing
  keeps the mesh free of routing deadlock. Requests and responses share the
  network, and a memory controller accepts no new request while it sends a
  response. A core must therefore keep accepting load data (`rsp_ready`)
  whatever the state of its own requests, or the network can stall.
* **`core_ni`** packs a core's loads and stores into packets and returns load
  data with a flag that says whether they came over low-swing links.
* **`mem_ctrl`** serves one packet at a time:
  * a store writes one word per cycle;
  * a load sends the response header, then reads and sends one word every three
    cycles (issue, wait one cycle for the memory, send).

  Its memory port is synchronous, with read data one cycle after the request.
* **`approx_noc_top`** wires six routers together with 14 mesh links and 6
  ejection links, each a `swing_link`. A node injects into its router over a
  plain local connection. The top brings out the core-side channels of the four
  interfaces, the two memory ports and `approx_en`.

### Packet format (`approx_noc_pkg`)

A flit is `{ftype[1:0], data[31:0]}`, where `ftype` is HEAD, BODY, TAIL or
SINGLE. A SINGLE flit is a one-flit packet. The header payload:

| bits | field |
|---|---|
| 31:30 | kind: load request, store request, load response |
| 29 | `APPROX`: body and tail of this packet may go at low swing |
| 28 | `RESP_APPROX`: the response to this load may go at low swing |
| 27:20 | source x, y and destination x, y (2 bits each) |
| 19:14 | length − 1, in words (1 to 64, one 8x8 block) |
| 13:0 | first word address (16K words per memory) |

## Simulation results

`tb_approx_noc_top` runs the whole network at its default parameters. It runs
a four-stage stand-in for the JPEG pipeline over 16 blocks of 64 words. The
cores are behavioural models that load, do simple arithmetic and store, and
their data flows match the encoder's:

1. load Y1 (level shift)
2. store Y1 (level shift)
3. load Y1 (DCT)
4. store Y1 (DCT)
5. load Y1 (quantize)
6. load Ilqt (quantize)
7. store Temp (quantize)
8. load Temp (entropy)
9. store outputBuffer (entropy)

Configuration *k* marks flows 1..k resilient. *opt* marks flows 1-6 and 9,
leaving out the Temp flows, which affect output quality most. The link energy
is normalised to the baseline NoC with conventional 512 fJ links:

| configuration | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | opt |
|---|---|---|---|---|---|---|---|---|---|---|---|
| normalised link energy | 1.028 | 1.003 | 0.904 | 0.838 | 0.771 | 0.639 | 0.610 | 0.478 | 0.379 | 0.313 | 0.544 |

With one flow approximated at a time, the normalised energies for flows 1 to 9
are 1.003, 0.929, 0.962, 0.962, 0.896, 0.999, 0.897, 0.930 and 0.963.

What the results show:

* Configuration 0 pays the 3 % overhead of the reconfigurable line at full swing.
* With every flow approximated, link energy falls by about 69 %, which is near
  the 70 % the low-swing line saves per transition.
* About a dozen bit errors occur over all runs at the characterised
  low-swing BER. The baseline and configuration 0 always produce exact output.

These are link-only energies with stand-in data. Router energy is not counted,
and the savings for one configuration depend on how many bits its data toggle.
The share of each flow therefore differs from what a real JPEG encoder would
show. For example, the raw 8-bit pixels of flow 1 toggle few of the 32
bit-lines.

## Files and testbenches

| file | content |
|---|---|
| `rtl/approx_noc_pkg.sv` | widths, flit and header types, energy constants |
| `rtl/swing_ctrl.sv` | `SEL` generation for one output link |
| `rtl/swing_bitline.sv`, `rtl/swing_link.sv` | behavioural link models |
| `rtl/flit_fifo.sv` | router input buffer |
| `rtl/noc_router.sv` | five-port router |
| `rtl/core_ni.sv` | processing-core network interface |
| `rtl/mem_ctrl.sv` | memory controller |
| `rtl/approx_noc_top.sv` | 2x3 mesh |

Each `tb/tb_<module>.sv` is self-checking and ends with a
`TB_RESULT checks=N failures=M` line:

* `tb_swing_ctrl`: random packets against the swing rule.
* `tb_swing_bitline`, `tb_swing_link`: error rates, transition counts and
  energy, with the low-swing BER raised so that errors can be counted.
* `tb_noc_router`: random traffic from all five inputs, with back-pressure.
  Checks routing, in-order and contiguous delivery, `SEL` for every flit, and
  header latency.
* `tb_core_ni`: packet formats and flags.
* `tb_mem_ctrl`: stores, loads, the `RESP_APPROX` to `APPROX` copy, and the
  three-cycles-per-word rate.
* `tb_approx_noc_top`: the pipeline above. It also runs each flow approximated
  alone, and counts stalls, headers waiting for a busy output, low-swing flits,
  approximate loads and stores, and bit errors.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/approx_noc_pkg.sv \
          tb/tb_approx_noc_top.sv --top-module tb_approx_noc_top
./obj_dir/Vtb_approx_noc_top
```

The whole-network run takes a few seconds. The link models use `$urandom`, so
the exact error counts depend on the simulator seed.

## What is assumed, and what is not here

These parts follow the approximate-communication scheme:

* the bit-line structure and its characterised numbers;
* the header-always-full-swing rule;
* the two flags for loads and stores;
* the 2x3 placement of tasks and memory controllers.

These are this design's own choices:

* the link width (32 bits) and the packet format;
* the router's buffering, routing, arbitration and flow control;
* the handshakes of the network interface and the memory controller;
* posted stores;
* the 16K-word address range per memory.

These parts are not in the RTL:

* the processing cores and the encoder software;
* the main memories;
* the compiler support that turns `#pragma resilient(x)` into the resilient
  bit of each core request;
* router power and timing analysis.

The link model has no delay and no analog behaviour beyond its error rate and
energy per transition. Synthesis sizes exist for every module except the link
models and the top, which contains them. The link models use real-valued
parameters and `$urandom` and are not meant for synthesis.
