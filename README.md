# An FPGA as a software-radio processor: a down converter inside a middleware layer

A software-defined radio spreads its physical-layer processing over a set of
heterogeneous processors (general-purpose CPUs, DSPs, FPGAs), and application
code should not have to know which one it lands on. Here each processing
*object* sees only a small, uniform service interface:

* it reads samples from an input FIFO and writes results to an output FIFO,
* its parameters are read and written through a control port,
* it is enabled, disabled and reset by a control word from a time/status unit,
* if it needs bulk memory, it sees a single-cycle synchronous RAM.

Everything else belongs to a platform abstraction layer built around the
object. That includes packets, time stamps, routing between boards, the
physical buses and the wait states of the real memory. On an FPGA this layer
is hardware. This repository is the SystemVerilog for one such FPGA. The
object is an in-phase digital down converter with a 51-tap half-band
decimating filter. Around it sit a serial control port, two daisy-chain
links, a local-bus slave, an internal packet bus with a routing table, a time
register with a status monitor, and an SRAM adapter.

```
            serial ──► control_port ──► register bus ─┬─► ddc_filter coefficients
                                                      ├─► time_status (control word, time, status)
                                                      ├─► packet_router (routing table)
                                                      └─► object id / output destination
 left link ◄─► daisy_itf ─┐                 ┌─► rx_depacketizer ─► in FIFO (256x16) ─► ddc_filter
right link ◄─► daisy_itf ─┼─ packet_router ─┤                                              │
 local bus ◄─► ibus_itf  ─┘  (internal bus) └─◄ tx_packetizer ◄── out FIFO (256x16) ◄──────┘
      SRAM ◄─► ram_adapter ◄─► ram_* ports (service for objects that use external RAM)
```

Everything runs on one clock. The filter runs at the interface clock rather
than at a clock tied to the sample rate, so there are no clock-domain
crossings.

## The down converter (`ddc_filter`, `da_coef_mult`)

### What it computes

The input is a stream of signed 10-bit samples x[n]. The carrier sits at a
quarter of the sample rate, so the in-phase carrier cos(πn/2) is the sequence
1, 0, −1, 0, … and mixing needs no multiplier:

    v[n] = x[n]·(−1)^(n/2)  for even n,    v[n] = 0  for odd n.

v is filtered by a symmetric 51-tap FIR h[0..50] and decimated by two:

    y[m] = Σ_k h[k]·v[2m−k].

The filter is half-band: the odd-index taps are zero except the centre tap
h[25]. Since v is zero at odd n and the output is taken at even n, only the
26 even-index taps ever meet a non-zero sample:

    y[m] = Σ_{j=0..25} h[2j]·v[2m−2j].

The centre tap always multiplies a zero in this in-phase branch, so it gets no
multiplier. It is still stored, and it can be written and read back. Symmetry
(h[k] = h[50−k]) leaves 13 independent values. Coefficient address u (0..12)
writes h[2u] and h[50−2u], and address 13 writes the centre tap.

Scaling: coefficients are Q1.15. The 26 products (26 bits each) are summed in
31 bits, shifted right arithmetically by `OUT_SHIFT` = 9 and saturated to a
signed 16-bit output. With a unit-gain filter, a 10-bit input then fills the
top of the 16-bit output.

### How it computes it: multiplication from a RAM table, three bits at a time

There are no hardware multipliers. Each of the 26 delay-line taps has a
`da_coef_mult` unit with an 8-entry RAM that holds c·0, c·1, …, c·7 for its
coefficient c. A 10-bit two's-complement sample is split into its sign bit
X[9] and three 3-bit groups X[8:6], X[5:3], X[2:0]. Over four clocks a
multiplexer feeds one group at a time to the RAM address, and an
add/subtract accumulator builds the product, most significant part first:

| phase | RAM address      | accumulator            |
|-------|------------------|------------------------|
| 0     | {00, X[9]}       | acc = −tbl             |
| 1     | X[8:6]           | acc = 8·acc + tbl      |
| 2     | X[5:3]           | acc = 8·acc + tbl      |
| 3     | X[2:0]           | acc = 8·acc + tbl      |

After phase 3, acc = c·(−512·X[9] + X[8:0]) = c·x. The `neg` input flips
every add and subtract, which negates the product. The filter uses it for
the −1 samples of the carrier, so the mixing costs nothing. A second
multiplexer gives the RAM address to the coefficient loader instead. A
coefficient write starts an 8-clock loader that fills both symmetric units'
tables with c·k (by repeated addition). The datapath waits while the loader
runs.

### Timing

The operation control overlaps work. The sum of output m is registered in
the same clock in which phase 0 of output m+1 runs. Each output needs two new
input samples: the even one is kept and the odd one is read and dropped. The
FIFO supplies these during the four phases. In steady state one output
leaves **every 4 clocks**, which is one output per two input samples. The
input rate can therefore be up to half the clock rate. An output appears 5
clocks after its even sample is taken from the pending register. If the
output side is not ready, the unit holds in phase 0 (`stall`) instead of
overwriting products that have not been summed.

## The packet layer

### Packets

All data between objects and boards travel as packets of 16-bit words:

| word | content |
|------|---------|
| 0 | `{dst_obj[3:0], dst_itf[3:0], src_obj[3:0], src_itf[3:0]}` |
| 1 | payload length in words |
| 2, 3 | origin time stamp, high then low half |
| 4 … | payload |

Physical links carry bare words. `pkt_framer` finds packet boundaries from the
length in word 1.

### Internal bus and routing (`packet_router`)

There are four packet sources: the left daisy chain, the right daisy chain,
the local bus and the object's packetizer. They share one internal bus that
moves one word per clock. A round-robin arbiter grants the bus to one source
for a whole packet. One idle clock chooses the route from the address word:

* The destination is this object and its input interface: the packet goes to
  `rx_depacketizer`. That block strips the header, passes the time stamp to
  the monitor and pushes the payload into the input FIFO.
* The destination is another object: the packet goes to the physical port
  stored in the 16-entry routing table (left, right, local bus or drop).
* The destination is this object but an unknown interface, or a table entry
  says drop: the packet is read and thrown away.

The platform master writes the table through the control port. At reset
every entry is "drop".

**Head-of-line blocking:** because there is only one bus, a destination that
stops accepting words (its buffer is full or its link is held off) stalls
*all* traffic until the granted packet completes. One consequence is that
input samples cannot reach the object while one of its output packets is
blocked. The filter's own back-pressure stall therefore only happens when
the output FIFO fills by other means. It is exercised in the filter's own
testbench.

**Bus load:** a packet of 28 samples occupies the bus for 33 clocks (4
header words, 28 payload words and the routing clock). At its full rate the
filter takes 2 samples in and gives 1 out every 4 clocks. Carrying both
directions then needs 3·33/28 ≈ 3.5 bus clocks out of every 4, or 88 % of the
bus. Feeding the object at half its maximum rate leaves a little over half of
the bus for traffic that only passes through. In other words, the clock
should be about twice the rate the object itself needs.

### Output side (`tx_packetizer`)

The object writes results into the 256-word output FIFO. When 28 words are
waiting, the packetizer builds a packet to the configured destination
(`REG_DEST`) and stamps it with the time at which it starts. 28 words of
payload plus 4 of header make 64 bytes, one local-bus burst.

### Physical interfaces

* `daisy_itf` (used twice, left and right): 16-bit words each way. The
  receive side has no flow control and buffers 64 words. A word that finds
  the buffer full is lost and raises `overrun`, which the status monitor
  records. The transmit side buffers 64 words and sends while the neighbour
  shows ready.
* `ibus_itf`: a synchronous local-bus slave. Address 0 is the data port:
  writes push received words and reads pop words to send, with one clock of
  read latency. Address 1 is a status word: `{words waiting to be read,
  free receive space}`. The bus moves bursts of up to 32 words (64 bytes),
  and each FIFO holds two bursts (128 bytes). An assertion flags a burst
  longer than 32 data words plus one status read.

## Control, time and status

### Control port (`control_port`)

The serial link is two wires, both idle high, at `CLKS_PER_BIT` = 4 clocks
per bit, most significant bit first:

* In: a start bit, then `{wr, addr[6:0], data[15:0]}`. wr = 1 writes and
  wr = 0 reads.
* Out: a start bit, then `{kind, payload[15:0]}`, then at least one idle bit.
  kind = 0 is a read reply. kind = 1 is a request from the object for
  parameter `payload[6:0]`.

After reset the FPGA sends one request for `REG_COEF0`, asking the master
for the object's initialisation values.

Register map (7-bit addresses, `phal_pkg`):

| addr | register |
|------|----------|
| 0x00–0x0C | h[0], h[2] … h[24] (each also sets its mirror tap) |
| 0x0D | centre tap h[25] |
| 0x10 | control word: bit 0 enable, bit 1 reset (also clears status), bit 2 timed (run only inside the window) |
| 0x11 | status (read): {missed deadline, late, interface overrun, out-FIFO overrun, in-FIFO overrun, running} |
| 0x12, 0x13 | time register high and low (reading high freezes low) |
| 0x14 | {object id, input interface}; output interface = input + 1 |
| 0x15 | output destination {dst_obj, dst_itf} |
| 0x16 | maximum packet age in clocks (0 = no check) |
| 0x17 | number of late packets (read) |
| 0x18, 0x19 | run-window start time, high and low |
| 0x1A, 0x1B | run-window stop time, high and low |
| 0x1C | number of missed processing deadlines (read) |
| 0x20–0x2F | routing table entry for object id 0–15 |

### Time register and status monitor (`time_status`)

A 32-bit counter advances every clock. The board's time interface can set it
(`time_load`, `time_in`) so that all boards share one time base. It stamps
outgoing packets. For each packet delivered to the object, the monitor
computes the age, now minus the origin stamp. It counts the packet as late
when the age exceeds the configured bound. It also holds the control word
that enables the object or keeps it in reset, and it keeps sticky overrun
flags. In timed mode the object is enabled only while the time register is in
the window [start, stop). The comparison is made relative to the start time,
so it works across wrap-around. This lets the master schedule exactly when an
object processes. The enable follows the window edges one clock late.

The stop time of the window is also the object's processing deadline. If
the window closes while samples are still waiting in the input FIFO, the
object did not finish its work in time. The monitor then counts a missed
deadline and sets a sticky status bit. Only input that is still waiting
counts: an output packet still being sent does not.

### RAM adaptation (`ram_adapter`)

An object sees a synchronous RAM with single-cycle access: request in one
clock, read data in the next. The adapter stretches each access into an
asynchronous SRAM cycle of `WAIT_STATES` + 1 clocks (2 wait states by
default). It raises `obj_wait` meanwhile so the object holds. With zero wait
states the object sees exactly the RAM it was written for. The down converter
keeps its tables on chip and does not use this service, so in the top the
object side is brought out as the `ram_*` ports.

## Where this design departs from, or goes beyond, its source description

The overall structure is described at block level: the object with its input
stage, coefficient multipliers, sum and operation control; two FIFOs; the
control port; time/status; packet routing with a bus arbiter; two daisy-chain
interfaces; a local bus; and SRAM. So are the filter's equation and number
formats, the one-output-per-four-clocks rate, the 256 × 16 FIFOs and the
64-byte bursts. The following are this design's own choices:

* All encodings: packet header layout, serial framing, register map,
  routing-table format, link and bus signalling, status bits.
* The arbitration policy (round-robin, one packet at a time) and packet
  length (28 words).
* The contents of the multiplier RAMs (c·k) and the order of the bit groups.
* Output scaling (Q1.15 coefficients, shift by 9, saturation).
* The packet-age check as the way to bound packet arrival times.
* The stop time of the run window as the processing deadline, and input
  left in the input FIFO as the sign that it was missed.
* The interface FIFO depths (64), and receive links without flow control.
* The start-up parameter request, the default object id (1) and the SRAM
  type and wait states.
* The 1/t coefficient decay condition, which would let the tables be
  narrower, is not used. The tables are full width, so any coefficients work.

Figures quoted for the source implementation (about 550 Virtex slices for the
filter; 250 slices and 2 block RAMs for the layer; 64 MHz in a Virtex 150)
have not been reproduced. No FPGA implementation was run.

## Files

| file | contents |
|------|----------|
| `rtl/phal_pkg.sv` | word and header types, port codes, register map |
| `rtl/phal_fpga_top.sv` | the FPGA: all blocks and the register read mux |
| `rtl/ddc_filter.sv`, `rtl/da_coef_mult.sv` | the down-converter object |
| `rtl/sync_fifo.sv` | FIFO (object FIFOs and interface buffers) |
| `rtl/control_port.sv`, `rtl/time_status.sv` | management |
| `rtl/packet_router.sv`, `rtl/tx_packetizer.sv`, `rtl/rx_depacketizer.sv`, `rtl/pkt_framer.sv` | packet layer |
| `rtl/daisy_itf.sv`, `rtl/ibus_itf.sv` | physical interfaces |
| `rtl/ram_adapter.sv` | RAM adaptation |
| `tb/tb_<block>.sv` | a self-checking testbench per block |
| `tb/sram_model.sv` | behavioural asynchronous SRAM with a 3-clock access time |

Parameters default to the sizes above: 51 taps, 10-bit samples, 16-bit
coefficients and output, 256-word FIFOs, 64-word interface buffers, 28-word
packets, 4 clocks per serial bit, 18-bit SRAM address, 2 wait states.

## Verification and simulation

Each testbench drives its block, compares the outputs with values it
computes independently, and ends by printing
`TB_RESULT checks=N failures=M`. Each also has a watchdog.

* `tb_ddc_filter` compares every output with the filter equation computed
  directly. It checks the 4-clock output interval, coefficient read-back and
  stalls under random output back-pressure.
* `tb_phal_fpga_top` runs the whole FPGA at its default parameters. It
  configures the FPGA over the serial port, streams 40 packets of samples in
  over the left link and the local bus, and checks all 560 filtered outputs.
  They come back in packets, first on the right link and then, after a
  change of destination, on the local bus. It also counts and requires:
  * the start-up request, coefficient loading, time loading, a timed run
    window, and a window that closes on unfinished input;
  * forwarding to the left link, a dropped packet, a late packet;
  * back-pressure on the internal bus, an interface overrun, an object reset;
  * SRAM accesses through the adapter.
  It runs in well under a minute.

To simulate with Verilator, for example the top:

```
verilator --binary --timing --assert -Irtl -Itb --top tb_phal_fpga_top \
    rtl/phal_pkg.sv tb/tb_phal_fpga_top.sv -y rtl -y tb +libext+.sv
obj_dir/Vtb_phal_fpga_top
```

Verilator is two-state. Every register that is read is reset by the
asynchronous active-low `rst_n`. The FIFO and table storage is not reset;
nothing reads it before writing it.
