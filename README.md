# Low-power wireless sensor node with error-correcting links

A wireless sensor network spends most of its energy in the radio, and its
links are noisy. This design is the digital part of a small network built
around those two facts:

* a **coordinator node** assembles 24-bit data packets and knows the routes;
* a **sensor node** sleeps until it is addressed, then delivers, forwards or
  asks for a route, and goes back to sleep as soon as it has done so;
* the packet link between them is protected by a **Hamming code** that
  corrects any single flipped bit of the 29-bit code word;
* a separate **CRC-16 link** (polynomial x^16 + x^12 + x^5 + 1) detects
  multi-bit errors in 16-bit words and, using a table of single-error
  syndromes, also corrects any single flipped bit.

Everything is synchronous to one clock with a synchronous, active-high reset.
The codecs are purely combinational.

## The data packet

All packets are 24 bits, most significant field first (`wsn_pkg::packet_t`):

| bits    | field          | width | meaning                                        |
|---------|----------------|-------|------------------------------------------------|
| 23:20   | `src`          | 4     | source address (the coordinator's)             |
| 19:18   | `req_id`       | 2     | request id: a counter at the coordinator; 00 on a forwarded packet |
| 17:14   | `dst`          | 4     | destination address                            |
| 13:2    | `data`         | 12    | payload (the sensor reading)                   |
| 1:0     | `endsig`       | 2     | end signal, carried unchanged                  |

The 2-bit request codes a sensor node uses are `00` (destination known, data
forwarded) and `01` (destination unknown, route requested).

## How a packet travels

Every hop is taken the same way, by `hello_forwarder`, which both node types
contain:

1. say **hello** to the chosen next hop (one-cycle `hello_valid` with the
   address);
2. wait up to `ACK_TIMEOUT` cycles for the one-cycle **acknowledgment**;
3. if it comes, send the **packet** on the next cycle (`pkt_valid`, with the
   hop address on `pkt_addr`);
4. if it does not, say hello to the next address in the `NEIGHBORS` list and
   go back to 2; after the last neighbour, give up (`dropped`).

With an immediate acknowledgment the packet leaves three cycles after the
request: hello in cycle 1, ack in cycle 2, packet in cycle 3. A hop that never
answers costs `ACK_TIMEOUT + 2` cycles before the next neighbour is tried.

**Coordinator** (`coordinator_node`). A `send` strobe while idle loads the
packet register `data_packet` with {source register, request-id counter,
`dcode`, `data`, `endsig`} and increments the 2-bit counter. The first hop is
the route LUT's entry for `dcode`, or `dcode` itself when the LUT has none.
The coordinator's LUT is loaded through `cfg_we/cfg_dst/cfg_next`.
It also answers route requests: a `rreq_valid` with `req = 01` is answered one
cycle later with a `route_reply_t` {valid, asking node, destination, next
hop}. The next hop is the LUT entry, except that when there is no entry or the
entry is the asking node itself (the coordinator's own route runs through it)
the reply tells the node to go to the destination directly.

**Sensor node** (`sensor_node`). States: SLEEP, RX, CHECK, FWD, ROUTE.

* SLEEP: `awake` is low and everything but a hello for `MY_ADDR` is ignored.
  Such a hello is acknowledged (`ack_out`, one cycle) and the node goes to RX.
* RX: wait up to `RX_TIMEOUT` cycles for the packet and capture it.
* CHECK: a comparator tests the destination against `MY_ADDR`.
  For this node: one-cycle `rx_valid` with the packet on `rx_pkt`, then sleep.
  Known in the LUT: set `req_id` to `00`, show `req = 00`, hand the packet to
  the forwarder (state FWD) and sleep when it finishes or gives up. If it
  gives up, the route is removed from the LUT: the path has changed, and the
  next packet for that destination will ask the coordinator again.
  Unknown: show `req = 01`, pulse `rreq_valid` with `rreq_dst`, go to ROUTE.
* ROUTE: when a route reply for this node and this destination arrives, it is
  written into the LUT and the node goes back to CHECK, where it now finds the
  route. No reply within `RX_TIMEOUT` cycles: `dropped`, then sleep.

Concurrent assertions in `hello_forwarder` and `sensor_node` state the
handshake rules: a packet leaves only right after an acknowledged wait,
strobes last one cycle, a node acknowledges only a hello addressed to it
while asleep, and a route request always shows code 01. Simulate with
`--assert` to have them checked.

`awake` is the node's power-management output: it is high only from the
acknowledged hello until the packet has been delivered, forwarded or dropped,
and is meant to gate the sensing and transmission units.

The route LUT (`route_lut`) has one entry per 4-bit address: a valid bit and
the next-hop address, and a port that clears one entry. Reset clears the
valid bits, so a fresh node knows no routes and learns them from the
coordinator, again whenever a route has failed.

## Hamming code on the packet link

`hamming_encoder` and `hamming_decoder` take `DATA_W` data bits (default 24,
one packet) and use the smallest `PAR_W` with 2^PAR_W >= DATA_W + PAR_W + 1
(5 for 24 bits), for a 29-bit code word.

Code word bit `i` is code position `i+1`. The redundant bits sit at the
power-of-two positions 1, 2, 4, 8, 16 (`red[j]` at position 2^j); the data bits
fill the remaining positions in order, data bit 0 at position 3, data bit 1 at
position 5, and so on. `red[j]` is the even parity (XOR) of every data position
whose index has bit `j` set.

The decoder recomputes the parities and XORs them with the received ones. The
result `red1` is the position of a single flipped bit, or 0 for a clean word.
That bit is toggled (`c`) and the data positions are read out (`out`).
Example: flipping code bit 2 (position 3, data bit 0) gives `red1 = 00011`.

With five redundant bits there is no overall parity bit, so the code is
single-error-correcting only. A double error always gives a non-zero
syndrome (`err`), but is corrected to the wrong word unless the syndrome
points beyond bit 29 (`uncorrectable`, positions 30 and 31).

## CRC-16 with single-bit correction

`crc16_pkg::crc` computes the remainder of d(x)·x^16 divided by 0x11021, with
a zero start value, the message's top bit first, no reflection and no final
inversion. As a loop over a constant number of message bits it unrolls into one
XOR equation per checksum bit, the parallel form of the shift register
x^0 … x^15 with feedback taps after x^0, x^5 and x^12.

`crc16_encoder` sends the frame `ftr = {dtr, ctr}` (message in bits 31:16,
checksum in 15:0). Example: message 0x5AEA has checksum 0xBD10.

`crc16_decoder` splits the received frame into `dre` and `cre`, recomputes
`ccal = crc(dre)` and forms the syndrome `a = ccal ^ cre`. CRC arithmetic is
linear, so a single flipped bit gives a syndrome that depends only on its
position: a message bit i gives crc(1 << i), and a checksum bit j gives
1 << j. The decoder builds this 32-entry table at elaboration and compares
`a` against every entry in parallel. The 32 entries are all different, so the
match is unique. The matching index is the error position `c` (message bit i is
position i, checksum bit j is position 16 + j). A message bit is toggled; a
checksum-bit error leaves the message as it is. A non-zero syndrome that
matches no entry means two or more errors: `uncorrectable`, message passed on
unchanged. Example: 0x5AEA/0xBD10 with message bit 1 flipped gives
`a = 0x2042`, `ccal = 0x9D52`, `c = 1`, and `data` is 0x5AEA again.

## The top level

`wsn_top` connects one coordinator (address `COORD_ADDR`, default 0) and one
sensor node (`NODE_ADDR`, default 1):

```
 send/data/dcode/endsig          ham_noise (29 b)
        |                             |
  coordinator --pkt--> hamming_encoder --XOR--> hamming_decoder --> sensor node --next_*--> next node
        |  <--hello/ack-->                                            |
        |  <--route request / route reply--------------------------->|
 crc_dtr --> crc16_encoder --XOR crc_noise--> crc16_decoder --> crc_data, crc_pos, flags
```

The `*_noise` inputs model the radio channel: each set bit flips that bit of
the coded word. The onward side of the sensor node (`next_hello_*`,
`next_ack`, `next_pkt*`) is brought out for a further node or a radio. The
`link_*` and `node_rreq_valid` outputs expose the traffic on the
coordinator-to-node link.

Hello, acknowledgment and route messages use their own wires and are not
coded. The CRC link is not on the packet path: it carries 16-bit words, and a
24-bit packet does not fit in one.

## Parameters

| module | parameter | default | notes |
|---|---|---|---|
| `wsn_pkg` | `ADDR_W`, `REQ_W`, `DATA_W`, `END_W`, `PKT_W` | 4, 2, 12, 2, 24 | packet fields |
| `hamming_encoder/decoder` | `DATA_W`, `PAR_W`, `CW` | 24, 5, 29 | `PAR_W` derived |
| `crc16_encoder/decoder` | `DATA_W` (message), `POS_W` | 16, 6 | messages up to `crc16_pkg::MAX_W` = 64 bits; `POS_W` must count `DATA_W`+16 positions |
| `coordinator_node` | `SRC_ADDR`, `ACK_TIMEOUT`, `NUM_NB`, `NEIGHBORS` | 0, 4, 2, '0 | |
| `sensor_node` | `MY_ADDR`, `RX_TIMEOUT`, `ACK_TIMEOUT`, `NUM_NB`, `NEIGHBORS` | 1, 8, 4, 2, '0 | |
| `wsn_top` | as above, plus `COORD_NEIGHBORS` {3,2}, `NODE_NEIGHBORS` {5,4} | | |

`NEIGHBORS` is a packed array of `NUM_NB` addresses, tried from index 0 up.

## Files

| file | contents |
|---|---|
| `rtl/wsn_pkg.sv` | packet struct, request codes, route reply |
| `rtl/hamming_pkg.sv`, `rtl/crc16_pkg.sv` | code sizing and the CRC function |
| `rtl/route_lut.sv` | route table |
| `rtl/hello_forwarder.sv` | hello / acknowledge / send with neighbour retry |
| `rtl/coordinator_node.sv`, `rtl/sensor_node.sv` | the two node types |
| `rtl/hamming_encoder.sv`, `rtl/hamming_decoder.sv` | Hamming codec |
| `rtl/crc16_encoder.sv`, `rtl/crc16_decoder.sv` | CRC-16 codec |
| `rtl/wsn_top.sv` | the network |
| `tb/tb_<module>.sv` | self-checking testbench of each module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself; a
watchdog ends a run that hangs, counting a failure. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl \
  rtl/wsn_pkg.sv rtl/hamming_pkg.sv rtl/crc16_pkg.sv \
  tb/tb_wsn_top.sv --top-module tb_wsn_top -o sim
./obj_dir/sim
```

Replace `tb_wsn_top` with any other testbench. The packages are listed first
because modules import them; `-y rtl` finds the rest.

What the testbenches check:

* `tb_hamming_encoder`, `tb_hamming_decoder`: against a reference written as
  "XOR of the positions of all set bits"; every single-bit error of random
  words, random double errors, the bit-2 example above.
* `tb_crc16_encoder`, `tb_crc16_decoder`: against polynomial long division;
  every single-bit error of random frames, random double errors, the 0x5AEA
  example.
* `tb_hamming_sizes`: the codec at 4 data bits (all 16 words of the 7-bit
  code, with the parity equations written out), 16 and 24 data bits.
* `tb_route_lut`: random writes and dual-port reads against a model.
* `tb_coordinator_node`: packet assembly, counter wrap, first-hop choice,
  cycle-exact hello and send timing, neighbour retries and drop timing,
  route replies.
* `tb_sensor_node`: sleep, wake on hello, local delivery, route request and
  reply, forwarding with request 00, timeouts.
* `tb_wsn_top` (default parameters): 34 packets to the node, 30 of them with
  a random bit flipped on the link; a route learnt and reused; a neighbour
  retry; drops at the node and at the coordinator; a dropped route asked for
  again; 200 CRC frames with no,
  one or two errors. It counts each of these events and fails if one never
  happens. It runs in well under a second.

## Where this design makes its own choices

The packet format, the request codes, the route LUT in each node, the
coordinator's counter and source register, the hello/response/send sequence,
the sleep-after-processing rule, both code constructions and the
CRC-with-syndrome-table correction are those of the original design. The
following are this implementation's:

* **Registers instead of latches.** The original node holds the packet in
  D-latches; here it is in edge-triggered registers, for a single-clock
  synchronous design.
* **Hello one hop at a time.** The coordinator is described as signalling all
  neighbours and sending to the one that answers. Here it asks the route's
  first hop, then the neighbours in a fixed order.
* **Wake-up source.** The node wakes on a hello addressed to it. A periodic
  wake-up timer, mentioned as common practice, is not built.
* **Timeouts, neighbour lists, addresses and the LUT size** are parameters
  with chosen defaults; the original gives no values.
* **Noticing a changed path.** The original has a node ask for a new route
  when the path changes. Here a node notices this when no hop answers, and
  then forgets the route.
* **Route replies** name the destination itself when the coordinator has no
  better hop, as described under the coordinator above.
* **Hamming width.** 24 data bits, the packet width; the original also
  mentions 16 bits for the same 5 redundant bits. Set `DATA_W = 16` for that.
* **Hamming layout.** Redundant bits at the power-of-two positions. A
  block-diagram style that appends them after the data would need a
  different decoder bit mapping.
* **Double errors.** The original credits the Hamming code with detecting two
  errors, which would need a sixth, overall parity bit. This decoder has none
  and corrects single errors only.
* **Codec placement.** Hamming on the coordinator-to-node packet link, CRC as
  a separate 16-bit link; where the codecs sit is not fixed by the original.
* **CRC conventions.** Zero start value, no reflection, the position numbering
  of `c`, and the flags `err`, `corrected`, `uncorrectable`.
* **Not built:** the coordinator's GPS receiver, the radio, and the sensing
  front end. The `*_noise` inputs and the `data` input stand in for them.

Power, area and delay figures for a cell library are not part of this RTL.
