# ILN switch fabric: an 8 x 8 Improved Logical Neighborhood network in SystemVerilog

The Improved Logical Neighborhood (ILN) network is a space-division switch fabric for a packet
switch. It is a multistage network: packets enter on one of N = 8 inputs, cross n + 1 = 4 stages
of small crossbar switches called switching elements (SE), and leave on the output named by their
destination address. Two things set it apart from a Banyan or generalised-cube network:

* Consecutive stages are joined by **straight and cube links**. SE(i, j) in stage i, row j, has
  four outputs: output p (p = 0, 1, 2) goes to row j XOR 2^p of the next stage (the p-cube
  neighbour), output 3 goes to the same row (straight). Every link changes at most one bit of the
  row address, and a packet can correct the differing bits of its address in any order, so there
  are up to n! = 6 distinct routes between an input and an output.
* Each SE **routes on its own and looks for alternates**. If the port it wants is busy, the next
  SE does not answer, or the next SE reports that it could not go on, the SE tries its next
  choice. Only when every choice has failed does it send a negative acknowledgment back.

There are no buffers inside the fabric. A packet travels as a session, much like a circuit:
first the path is set up hop by hop with a request/acknowledge handshake, then the data words
stream through the held path, one register per SE. The input and output modules of the
surrounding switch, which hold the packet FIFOs, are outside this RTL; their side of each port
is the top module's port list.

The RTL is synthesizable. Every block has a self-checking testbench, and the whole fabric is
simulated end to end at its default parameters.

## Topology and port numbering

```
 stage 0          stage 1          stage 2          stage 3
 SE(0,j) --p--> SE(1, j^2^p) --p--> SE(2, .) --p--> SE(3, y) --SEO-3--> output y
   ^ SEI-0 <- input j
```

| SE(i,j) output | goes to | arrives at input |
|---|---|---|
| SEO-0 (cube 0) | SE(i+1, j ^ 1) | SEI-0 |
| SEO-1 (cube 1) | SE(i+1, j ^ 2) | SEI-1 |
| SEO-2 (cube 2) | SE(i+1, j ^ 4) | SEI-2 |
| SEO-3 (straight) | SE(i+1, j) | SEI-3 |

Network input j drives SEI-0 of SE(0, j); the other three inputs of a first-stage SE are tied
off, so it works as a 1-to-4 selector. Network output y is SEO-3 of SE(3, y); a last-stage SE
only ever uses its straight output, so it works as a 4-to-1 concentrator. Which input port a link
arrives at is this design's choice: each link keeps its port number from one stage to the next.

The example used throughout the tests, input 0 to output 7, takes cube 0, cube 1, cube 2 and
straight: SE(0,0) → SE(1,1) → SE(2,3) → SE(3,7) → output 7.

## Ports and the session handshake

Every port, inside the fabric and at its edges, is a 35-wire pipe. In the RTL it is a packed struct
`fwd_t {req, flag, data[31:0]}` going forward plus one `ack` wire going back (`iln_pkg.sv`).

One session between a sender (the input module, or the SE before) and a receiver (the SE after, or
the output module):

1. The sender raises `req` and holds it for the whole session.
2. The receiver answers with **ACK**: `ack` high for exactly two cycles. This only means "I am here
   and free".
3. The sender puts the destination word on `data` with `flag` high for one cycle. The low three
   bits are the output number; the rest of the word goes along unchanged.
4. The receiver sets up the rest of the path (see below). Then either:
   * **path established**: `ack` goes high and stays high; or
   * **NACK**: `ack` is high for exactly one cycle, meaning no way on was found. The sender
     drops `req` and may try somewhere else.
5. The sender streams data words with `flag` high. Each SE copies `flag` and `data` to its output
   one cycle later.
6. **Flow control**: while the path is up, the receiver may pull `ack` low. Every SE on the path
   passes that back, so the sender pauses. Words already in flight still drain forward. When `ack`
   returns, the stream resumes.
7. The sender drops `req`. Each SE drops its own `req` one hop at a time, clears itself and is
   free again.

The receiver tells ACK from NACK by the pulse length: two high samples in a row mean ACK, one
high sample followed by a low one means NACK. An SE only accepts a new session after it has seen
`req` low. So a sender that keeps `req` high just after a NACK is not mistaken for a new request.

## Start-up: the address and reset chain

No SE is told its address. `reset_n` (asynchronous, active low) reaches only SE(0,0), whose
`sign` input is tied high. Every SE then works out its own (i, j) from its predecessor in a chain,
and releases the reset of the next SE:

* SE(i,0), the top of a stage, takes the *horizontal* outputs of SE(i-1,0).
  `addr_ih = {i, 0}`: bit 0 = 0 means "you are one stage further".
* SE(i,j) with j > 0 takes the *vertical* outputs of SE(i,j-1).
  `addr_iv = {i, 1}`: bit 0 = 1 means "you are one row further down".
* `addr_jb = j` goes to both.

The address generator needs three cycles after its reset rises. It captures its inputs, computes
(i, j), then drives the address outputs and raises `reset_bar`, which is the next SE's reset.
It then waits `Delay = 3 × (NET_SIZE − (8i + j))` cycles with NET_SIZE = 32 (the number of SEs)
before it raises `enable` for the rest of the SE. The chain is ten SEs long, SE(0,0) to SE(3,7)
along the top row and then down, so SE(i,j) has its reset released 3(i + j) cycles after the
fabric's. It is enabled 4 + 3(i + j) + 3(32 − 8i − j) = **100 − 21i cycles after `reset_n` rises**.
The last stage is ready first (37 cycles) and the first stage last (100 cycles). No request can
therefore meet an SE that is not yet switching. The user of the fabric should wait 120 cycles
before the first request.

## Inside a switching element

```
            +--------------------- switching_element ---------------------+
 addr/rst ->| address_generator --enable, (i,j)--+                        |-> addr/rst
            |                                    v                        |
 SEI-0..3 ->| switching_module: 4 x sub_switching_module --> output_port_ |-> SEO-0..3
            |   (one SSM per input port)    prt_req/gnt     selector      |
            +-------------------------------------------------------------+
```

* **address_generator**: the start-up chain described above.
* **switching_module**: four independent **sub switching modules (SSM)**, one per input port. An
  SSM runs the whole session for the packets of its port.
* **output_port_selector (OPSel)**: gives each output port to at most one SSM. Per output port
  there is an `opsel_selector` and an `opsel_outport`:
  * `opsel_selector` is a multiplexer that looks at one SSM's port request.
  * `opsel_outport` moves that multiplexer on by one SSM every cycle while the port is free. It
    stops on the first SSM that asks for this port, and the stop is the grant (`prt_gnt`).
  * From the next cycle on, that SSM's forward pipe is wired to the output and the output's
    `ack` is wired back to the SSM, with no register in between.
  * The port is freed when the SSM withdraws its request; scanning resumes at the next SSM.
  * A request for a busy port is simply not answered, and the SSM times out. That timeout is
    how contention is resolved.

### The sub switching module

The SSM is built as a small processor: a control FSM (`ssm_control`) and functional units that
obey a one-hot command bus (`ssm_cmd_t`: `clear` plus functions A..M) and answer on a response
bus (`ssm_rsp_t`). The units:

* `ssm_sensor`: senses requests, ACKs and NACKs; sends ACK and NACK (functions I, J, K, L, M).
* `ssm_translator`: captures the destination, forms the routing vector, sends the destination
  word and copies the data (F, G, H).
* `ssm_router`: asks the OPSel for ports in routing order (E).
* `ssm_timer`: the three time-outs (A, B, C).
* The request unit (D) is the `req_out` flip-flop inside `sub_switching_module`.

| state | commands | leaves on |
|---|---|---|
| IDLE | clear | `enable` high → READY |
| READY | M sense request | new `req_in` → ACKNOWLEDGE |
| ACKNOWLEDGE | J send ACK, M | two-cycle ACK sent → TRANSLATION |
| TRANSLATION | H routing vector, M | destination captured → ROUTING |
| ROUTING | A OPSel timer, E seek port, M | port granted → REQUEST; no candidate left → NEG_ACK |
| REQUEST | B next-SE timer, D request, K sense, M | ACK → DESTINATION; NACK or time-out → ROUTING |
| DESTINATION | C path timer, D, G send destination, L sense, M | held ACK → TRANSPORT; NACK or time-out → ROUTING |
| TRANSPORT | D, F send data, J, L, M | `ack_in` low → SUSPEND |
| SUSPEND | C, D, F, L, M | `ack_in` high → TRANSPORT; time-out → NEG_ACK |
| NEG_ACK | I send NACK (one cycle) | → TERMINATION |
| TERMINATION | clear | → READY |

From any state from ACKNOWLEDGE to SUSPEND, `req_in` going low leads to TERMINATION and then
READY. In TRANSPORT, J together with L makes `ack_out` follow `ack_in`. That is how the held ACK
and the flow-control pauses travel back along the path.

## Routing

The translator forms the routing vector `rv = j XOR dest[2:0]`: a 1 in bit p means that the
p-cube link fixes a wrong address bit. The router tries the candidates in this order:

1. the cube ports p with `rv[p] = 1`, lowest p first;
2. then the straight port, which leaves the wrong bits for later stages to fix.

In the last stage (i = 3) the straight port is the only candidate, and only if `rv = 0`. A packet
that reaches the wrong row there is refused with a NACK at once. Each candidate is tried once per
packet. A candidate fails in any of these cases:

* the OPSel does not grant the port within `T_OPSEL` cycles (port busy);
* the next SE does not give its two-cycle ACK within `T_NEXT` cycles (dead link or SE);
* the next SE answers the destination with a NACK;
* nothing comes back within `T_DEST` cycles.

After a failure the SSM goes back to ROUTING, releases the port for one cycle and asks for the
next candidate. When none is left it sends a NACK to its own sender, which then tries its next
candidate. Refusals therefore travel backwards, and the search for a path is a distributed
depth-first search over the fabric.

Cube ports whose `rv` bit is 0 are never tried. Trying them would need the "intelligent routing"
extension (deliberately setting extra `rv` bits so that a later stage corrects them), which is
not built.

## Timing summary

| event | cycles |
|---|---|
| address generator: reset to `reset_bar` | 3 |
| SE(i,j): `reset_bar` to `enable` | 1 + 3 × (32 − (8i + j)) |
| SE(i,j) enabled after `reset_n` | 100 − 21i (whole fabric: 100, allow 120) |
| ACK pulse / NACK pulse | 2 / 1 |
| OPSel grant after a request for a free port | 1 to 4 |
| data latency per SE, once the path is up | 1 (4 through the fabric) |
| `T_OPSEL` / `T_NEXT` / `T_DEST` defaults | 8 / 12 / 2000 |

The clock rate is a property of the target technology, not of this RTL. The original
implementation reached about 112 MHz on an FPGA of its day.

## Measured behaviour: fault tolerance and load

Two testbenches run the fabric at its default parameters under the two kinds of evaluation that
are usual for this network. They compare the simulation with the analytical models published
for it. The figures below are from one run; other seeds give similar numbers.

**Terminal reliability** (`tb_iln_reliability`). Each of the 96 inter-stage links is cut with
probability q, and one packet is sent between a random input and a random output. An
independent model in the testbench searches the cut network for a route that bit-wise routing
may take. The packet must arrive exactly when such a route exists, and must be refused with a
NACK otherwise. This holds in every trial, so the depth-first search of the SEs misses no
surviving route.

| q | 0.05 | 0.10 | 0.20 | 0.30 | 0.50 |
|---|---|---|---|---|---|
| delivered (80 packets each) | 0.96 | 0.94 | 0.93 | 0.69 | 0.45 |
| analytical R_t = (1 − q⁴)⁴ | 1.00 | 1.00 | 0.99 | 0.97 | 0.77 |

The fabric does worse than the formula. The formula credits every route the topology offers,
but bit-wise routing uses only the cube links that fix a wrong bit, plus the straight links.
For example, a packet from row 0 to row 0 has one route, straight at every stage.

**Throughput and delay at 90% load** (`tb_iln_throughput`). In each slot every input offers a
14-word packet with probability 0.9, to a random output. All offered packets start together.
Refused packets are dropped. Over 250 slots:

* Th = 0.83 delivered packets per port per slot;
* p_a = 0.92 of offered packets get through;
* t = (1 − p_a)/p_a = 0.09 slots of average delay.

The analytical values for N = 8 are Th = 0.19 if a last-stage SE accepts one packet per slot,
and 0.77 if it accepts all of its inputs. A slot here is not of fixed length, though. A blocked
packet keeps searching until a port frees, so two packets for one output are often served one
after the other within the same slot. Measured against the time of one packet alone (90
cycles), the fabric delivers 0.41 packets per port.

## Parameters

The fabric size is fixed by `iln_pkg`: `LOG_N = 3`, `N_PORTS = 8`, `N_STAGES = SE_PORTS = 4`,
`DATA_W = 32`. The per-SE parameters are:

* `NET_SIZE` (32) and `ROWS` (8): used by the enable delay.
* `T_OPSEL`, `T_NEXT` and `T_DEST`: the three time-outs above.

The top passes the timer values down. `T_DEST` must be larger than the time the rest of the path
may need to try all of its own alternates. Otherwise an SE gives up on a path that a later stage
is still working on.

The `link_fault[i][j][p]` input of the top is a test aid. When set, it cuts the link from SE(i,j)
output p in both directions, as a broken wire or a dead SE would. Tie it to zero in use.

## Where this design departs from, or adds to, its reference description

* **Data latency** is one register per SE. The reference simulation shows two cycles.
* **Enable delay**: the delay formula is used with a network size of 32 SEs. With that value
  SE(0,0) is enabled after 100 cycles. The reference SE simulation shows 120 cycles (a network
  size of 40 in the same formula), while the reference also says the whole fabric needs at most
  120 cycles. The second statement holds here.
* **Leaving ACKNOWLEDGE**: the state is left when the two-cycle ACK has gone out. The reference
  text mentions a timer here, but its command table has none.
* **Send data stays on in SUSPEND**, so words already in flight reach the next SE. In the
  reference command table the cell is a don't-care.
* **Long congestion**: a congestion longer than `T_DEST` ends the session with a NACK towards
  the sender. The reference leaves this as an option.
* **Alternate order**: cube ports with a 1 in the routing vector come first, then straight; no
  other port is tried. The reference gives the first-choice order and shows the straight port
  tried last, but its exact rule for alternates is not spelled out.
* **Defined by this design, not by the reference**:
  * the link-to-input-port numbering;
  * the one-cycle destination flag;
  * the destination word layout;
  * the timer values;
  * the rule that a request is accepted only after `req` has been low;
  * the OPSel resuming its scan after the released SSM;
  * the `link_fault` test input.
* **Not built**: the intelligent-routing extension of the routing algorithm; the input and
  output modules with their FIFOs; sizes other than 8 × 8.

## Files

| file | contents |
|---|---|
| `rtl/iln_pkg.sv` | constants, pipe and port-request structs, FSM states, command and response buses |
| `rtl/iln_network.sv` | top: the 4 × 8 array of SEs, links, address/reset chain |
| `rtl/switching_element.sv` | one SE |
| `rtl/address_generator.sv` | location, neighbour addresses, `reset_bar`, `enable` |
| `rtl/switching_module.sv` | four SSMs |
| `rtl/sub_switching_module.sv` | one SSM, with the request flip-flop |
| `rtl/ssm_control.sv` | eleven-state FSM and command table |
| `rtl/ssm_sensor.sv`, `ssm_translator.sv`, `ssm_router.sv`, `ssm_timer.sv` | functional units |
| `rtl/output_port_selector.sv`, `opsel_selector.sv`, `opsel_outport.sv` | port selector |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_iln_reliability.sv`, `tb/tb_iln_throughput.sv` | the fabric under random link failures and under 90% random load |
| `tb/tb_source.sv`, `tb/tb_sink.sv` | models of a sender and a receiver of the port handshake |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself. Each has a
watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/iln_pkg.sv tb/tb_iln_network.sv \
          --top-module tb_iln_network -o sim
./obj_dir/sim
```

Replace `tb_iln_network` with any other `tb_<module>` to test one block. Every testbench runs in
well under a second.

What the testbenches check:

* `tb_iln_network` runs the whole fabric at its default parameters:
  * start-up: every SE has its own address and is enabled within 120 cycles;
  * the 0 → 7 path through the expected SEs, with 4 cycles of data latency;
  * with the first-choice link cut, an alternate path is taken;
  * with all of SE(0,0)'s links cut, a NACK comes back;
  * a congestion is suspended and resumed with no word lost;
  * 40 rounds of random traffic from all eight inputs at once: every packet is either
    delivered whole, in order and to the right output, or refused with a NACK.

  It counts, and requires at least once, each of these mechanisms: port refused by the selector,
  alternate routing, negative acknowledgment, suspension and termination. A typical run
  delivers about 275 packets, refuses about 45, and makes about 4000 checks.
* `tb_iln_reliability` cuts random links. Every packet must be delivered exactly when a
  bit-wise-routing route survives.
* `tb_iln_throughput` applies 250 slots of 90% random load. It checks every output word, and it
  checks that each packet is either delivered whole or NACKed. It prints the throughput, p_a
  and delay.
* `tb_switching_element` checks one SE:
  * addressing and enable timing;
  * the first choice for several routing vectors;
  * rerouting around a dead output, and the NACK when all outputs are dead or refuse;
  * two inputs contending for one output;
  * flow control;
  * the last-stage rule.
* `tb_sub_switching_module` checks one SSM:
  * its state sequence;
  * the ACK and NACK pulse lengths;
  * the time-outs between alternates;
  * the order in which ports are tried;
  * suspension.
* The unit testbenches check:
  * the FSM transitions and command rows;
  * the sensor's pulse shapes and detection;
  * the routing vector for all 64 row/destination pairs;
  * the router's order for every vector in a middle and in the last stage;
  * the timer limits;
  * the selector and outport under random traffic.
