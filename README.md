# GRIDNET node hardware in SystemVerilog

GRIDNET is a packet network meant to survive damage. Its basic unit is the
CROSSFIRE loop: two fiber rings through the same nodes, one run clockwise (CW)
and one counter-clockwise (CCW). Every packet goes out on both rings at once.
So every receiver gets two copies, at different times, by two separate paths.
One cut anywhere, even through both fibers, still leaves one path to every
node. Where both copies arrive, the receiver compares them bit by bit. That
check comes on top of the CRC of each copy.

This RTL covers the custom digital hardware of one node in the Phase I
prototype:

- the **front end (FE)**, which does the link-level work at wire speed,
- the backplane **priority chain** the FE shares with the node's computer,
- the **time distribution** boards that give every node a common timestamp,
- the **gate** in front of the optical by-pass switches.

The commercial parts are outside the RTL, and their signals are ports. They
are the 8x305 microcontroller, the 68000 single-board computer (SBC) with its
memory, the two ADCCP (HDLC-style) link chips, and the optics. The report
this RTL is built from describes the block structure and the function of
these boards. It does not give the bit layouts, register maps or timeout
values. Those are choices made here, and each is listed below and in the
header comment of its file.

## The node at a glance

```
             IEEE-796 backplane (slot 0 = highest priority)
   +------------+------------+--------------+
   | FE proc.   | 68000 SBC  | FE I/O board |   bus_priority: daisy chain
   | board      | (external) |              |
   +------------+------------+--------------+
        |  cable (io_*)             |
   fe_board                      fe_io
   slave_dma  -> ucode_ram 2Kx48  byte_fifo x2 -> rx_compare -> pingpong_buffer
   adr_gen    -> data_ram 4Kx8    rx_timers, error word, transmit fan-out
   master_dma <-> SBC memory      <-> ADCCP CW, ADCCP CCW (external)

   master_clock (in the host) --Clock, Clear--> time_code (in each node)
   bypass_gate x2 (CW and CCW switch drive)
```

`gridnet_node` is the top module. It has one clock (`CLK_HZ`, 12 MHz by
default) and a synchronous active-low reset `rst_n`.

## How the FE runs: microcode with a control field

The FE is an 8x305 bipolar microcontroller. Its program sits in a 2K x 48
RAM (`ucode_ram`). Each word holds two fields:

- bits [47:32]: the 16-bit 8x305 instruction;
- bits [31:0]: a 32-bit **control field**, which drives the rest of the FE
  hardware in that same instruction cycle.

So one word can run the processor, form a RAM address and strobe an I/O
register, all at once. The control field layout is `gridnet_pkg::uctrl_t`,
which is this design's own:

| bits | field | meaning |
|------|-------|---------|
| 2:0 | base_sel | base register used for the data RAM address |
| 3 | use_cnt | add the address counter instead of the constant |
| 4 | cnt_rst | the counter reads as 0 in this access and is cleared |
| 5 | cnt_inc | post-increment the counter |
| 13:6 | offset | constant added to the base |
| 14 / 15 | ram_rd / ram_wr | data RAM read to / write from the local bus |
| 16 / 17 | base_wr / base_hi | load the low byte / high nibble of base register `base_sel` |
| 18 / 19 | io_rd / io_wr | device register read / write |
| 23:20 | io_reg | register number |
| 24 | io_dev | 0 = I/O board, 1 = master DMA |
| 31:25 | spare | unused |

The 8x305 is outside the RTL. It drives `pc` and takes `instr` back, and it
moves data on the 8-bit local bus through `lb_wdata` and `lb_rdata`.

**Timing.** `pc` is sampled on a clock edge. The instruction and control
field act in the next clock. Read data (RAM, I/O register or DMA status)
appears on `lb_rdata` one clock later. Control strobes act only while the FE
runs. Word 2047 of every program should be all zeros. A test holds `pc`
there as a no-op.

**Download.** The SBC writes the program through the FE's bus slave port
(`slave_dma`). Each 48-bit word is sent as three 16-bit writes. The write of
part 2 stores the word. A write of 1 to the control register (`addr[13]`
set) then releases the 8x305, which starts at location 0. From then on the
store refuses writes, so the program cannot change itself. Writing 0 stops
the FE again.

**Interrupt to the SBC.** The FE itself cannot be interrupted; it polls. It
can interrupt the SBC, though: to report a finished fetch, a finished
transmission or a received packet. A micro-instruction that writes register 9
of the DMA device sets `sbc_irq`. The SBC clears it by writing the control
register with bit 1 set, keeping bit 0 (run) at 1.

**Address generation** (`adr_gen`). The data RAM is 4K x 8, so it needs 12
address bits, but the 8x305 has 8-bit data paths. So the address is made in
hardware:

`addr = base[base_sel] + (use_cnt ? counter : offset)`

The 8x305 may reload any of the 8 base registers at any time. With a base
set to a packet and the counter stepping, one micro-instruction can move one
byte of a packet.

## Receiving a packet twice

The receive path is the core of the I/O board (`fe_io`). It is also the
hardest part to follow. Each ADCCP chip hands over one byte of its copy at a
time, with flags removed and the CRC checked.

1. **Resynchronising FIFOs** (`byte_fifo`, 32 bytes per loop). The copies
   are skewed by the difference in path length. Each copy's bytes wait in a
   FIFO of their own.
2. **Compare** (`rx_compare`). When byte *i* of both copies has arrived, both
   are popped in the same clock and compared. Both are stored. Any
   difference sets a mismatch latch that stays set until the packet is
   closed. If one copy has ended, the other is drained and stored alone.
   This is the single-copy case after a cut. If the ended copy was not lost,
   the two copies had different lengths, and that also counts as a
   mismatch.
3. **Timers** (`rx_timers`).
   - The *loop timer* starts with the first byte on either loop. If the
     other loop has delivered nothing when it expires (200 us), that loop is
     declared broken and its copy ended.
   - A *byte timer* per loop catches a copy that stops partway through
     (16 us without a byte, which is two byte times at 1 Mbit/s).
4. **Ping-pong buffer** (`pingpong_buffer`). There are four 1K-byte buffers in
   two pairs. One pair fills while the 8x305 reads the other. When both
   copies have ended and been stored, the fill pair is closed with the two
   lengths and an error word. Filling then moves to the other pair.

The error word (`rx_err_t`) holds one bit per condition:

| bit | condition |
|-----|-----------|
| 0 | mismatch |
| 1 / 2 | loop error on CW / CCW |
| 3 / 4 | byte dropout on CW / CCW |
| 5 / 6 | CRC error reported by the CW / CCW ADCCP chip |
| 7 | overrun |

An overrun means a packet arrived while both pairs were full. That packet is
dropped, and the overrun bit is set on the next packet stored. The FE polling
protocol should keep this from happening.

**Register map of the I/O board** (`io_dev = 0`):

| reg | R/W | meaning |
|-----|-----|---------|
| 0 | W | transmit byte, sent to both ADCCP chips in the same clock |
| 1 | R | status `{1'b0, resp_run, resp_timeout, started[1:0], pkt_active, fill_busy, ready}` |
| 2 | R | error word of the read pair |
| 3 | W | bit0 receive mode, bit1 transmit mode, bit2 release the read pair, bit3 arm the response timer, bit4 end of message (pulse on `tx_eom`) |
| 4 / 5 | R | CW length, low byte / high 3 bits |
| 6 / 7 | R | CCW length, low byte / high 3 bits |
| 8 / 9 | W | buffer pointer, low byte / `{copy (1 = CCW), ptr[9:8]}` |
| 10 | R | buffer byte at the pointer; the pointer advances |

**Transmitting.** The 8x305 sets transmit mode, then writes the packet to
register 0 one byte per byte time. Each write reaches both ADCCP chips in the
same clock. The send is synchronous, so the program must keep pace with the
line. Writing bit 4 of register 3 after the last byte pulses `tx_eom`. The
chips then append the CRC and the closing flag themselves.

**Response timer.** After sending a packet that expects an answer, the
8x305 arms a third timer. The first byte received on either loop stops it.
If 1 ms passes first, `resp_timeout` is set. This tells a Primary node that
the node it addressed is down, cut off, or does not exist.

The master DMA reads the same buffer through a port of its own, which also
advances the pointer. When the 8x305 and the DMA read in the same clock, the
8x305 goes first.

## Moving packets to and from the SBC: master DMA and bus priority

The FE reaches the SBC's dual-ported memory without help from the 68000.
`master_dma` is a block engine on the IEEE-796 bus. The 8x305 loads
registers 0–6, then starts the engine with a write to register 7:

| GO value | direction | use |
|----------|-----------|-----|
| bit0 = 1 | fetch: SBC memory to data RAM | packet to transmit |
| bit0 = 0, bit1 = 0 | store: data RAM to SBC memory | status |
| bit0 = 0, bit1 = 1 | store: receive buffer to SBC memory | received packet |

The registers and their meanings:

| reg | meaning |
|-----|---------|
| 0–2 | bus address, 20 bits |
| 3–4 | local address, 12 bits |
| 5–6 | count, in bytes |
| 7 | GO, as above |
| 8 (read) | `{done, busy}`; reading clears done |
| 9 (write) | raise `sbc_irq` (see above) |

The engine raises its bus request and holds the bus for the whole block. It
moves one byte per bus cycle: `mbus_rd` or `mbus_wr` stays up until
`mbus_xack`. On the FE side the 8x305 always has first use of the data RAM,
and the DMA waits for a free cycle.

Because the DMA runs by itself, the 8x305 can feed a packet to the ADCCP
chips byte by byte while the DMA copies the packet just received to the
SBC. This overlap is the FE's one time-critical job: answering a packet on
the loop while handing the received one to the SBC.

`bus_priority` is the backplane's serial priority chain. A slot passes
priority upward only while it is not requesting. The slots are:

- slot 0: the FE processor board, the highest priority;
- slot 1: the SBC;
- slot 2: the FE I/O board.

A master keeps the bus until it drops its request.

## Time distribution

The time system is for the prototype's measurements, not part of the network
itself. One **Master Clock** (`master_clock`) sits in the host and drives a
**Time Code Board** (`time_code`) in every node over two coax lines:

- **Clock**: 100 kHz, which gives 10 us resolution;
- **Clear**: a single 10 us pulse that starts all counters together.

The lines are transformer coupled, so each one carries bursts of a 2 MHz
carrier instead of levels. Each Time Code Board recovers the levels with
envelope detectors (`envelope_det`). Here a detector is a sampled,
retriggerable hold of 8 clocks.

The board counts Clock rises in 32 bits. That covers 2^32 x 10 us = 11.9
hours. A rise during Clear sets the count to 0. On each Clock fall the count
is copied to a latch, which the bus reads as two 16-bit halves. The latch is
frozen from the first half read until both halves are read, so the two halves
always belong together. If no Clock rise comes within 1.5 periods, a
missing-pulse interrupt is raised and held until `tc_irq_ack`.

A start command that comes while the Master Clock is already running
restarts it with a new Clear.

## By-pass gate

Each node sits in each ring behind an optical by-pass switch. The switch
routes light through the node only while its coil is driven. `bypass_gate`
drives it only while power is good and none of the enabled failure inputs is
active. Otherwise the light passes the node by, and the loop stays whole
without it. The top has one gate per ring.

## Files

| file | what |
|------|------|
| `rtl/gridnet_pkg.sv` | control field, error word, register numbers |
| `rtl/gridnet_node.sv` | top: one node plus the Master Clock |
| `rtl/fe_board.sv` | FE processor board: `slave_dma`, `ucode_ram`, `adr_gen`, `data_ram`, `master_dma` |
| `rtl/fe_io.sv` | FE I/O board: `byte_fifo`, `rx_timers`, `rx_compare`, `pingpong_buffer` |
| `rtl/bus_priority.sv` | backplane daisy chain |
| `rtl/master_clock.sv`, `rtl/time_code.sv`, `rtl/envelope_det.sv` | time distribution |
| `rtl/bypass_gate.sv` | by-pass switch gate |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/sbc_mem_model.sv` | behavioural model of 128K bytes of SBC memory on the bus, for tests |
| `tb/tb_phase1_loop.sv` | four nodes on the Phase I ring, with fiber delay, cuts and a node without power |

## Parameters and what they rest on

| parameter | default | from |
|-----------|---------|------|
| microcode store | 2048 x 48 | report |
| data RAM | 4096 x 8 | report |
| packet buffer `PKT_BYTES` | 1024 | report (largest data packet) |
| loop rate | 1 Mbit/s | report |
| Time Code counter `CNT_W` | 32 | report |
| Clock `TICK_HZ` / carrier `OSC_HZ` | 100 kHz / 2 MHz | report |
| `CLK_HZ` | 12 MHz | own choice |
| FIFO depth | 32 bytes | own choice: the worst skew is the loop timeout, 200 us = 25 bytes |
| loop timeout | 200 us | own choice: 160 us of fiber, plus up to 8 us per node passed, plus margin |
| response timeout | 1 ms | own choice |
| byte timeout | 16 us | own choice |
| base registers | 8 | own choice |
| missing-pulse timeout | 1.5 Clock periods | own choice |
| envelope hold | 8 clocks | own choice |
| failure inputs per gate | 4 | own choice |

## Where this departs from the original hardware, or is uncertain

- Everything on one synchronous clock. The original boards mix a 333 ns
  processor cycle, ADCCP chips with their own clocks, and analog envelope
  detectors.
- The ADCCP chips' byte interface is modelled as:
  - a byte strobe;
  - an end-of-packet strobe;
  - a CRC-good flag.

  The real chips' pins are not modelled.
- The 8x305 instruction set is not modelled. The RTL fetches its
  instructions, and its strobes reach the hardware only through the control
  field.
- All bit layouts, register maps and timeout values listed above are this
  design's.
- The source is inconsistent about the microcode word. It gives a 2K x 48
  store with a 16-bit instruction and a 32-bit control field. It also says
  that a micro-instruction is 40 bits, with 24 control bits. This design
  follows 48 = 16 + 32 and uses 25 of the control bits.
- Gateway nodes (two nodes on one backplane with shared memory) need no extra
  logic here and are not built separately.
- The master clock's bus interface is reduced to start and stop strobes.
- The spare bits [31:25] of the control field are not used, so lint reports
  them as unused.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. It
has a watchdog that counts a failure if the run hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/gridnet_pkg.sv tb/tb_gridnet_node.sv --top-module tb_gridnet_node
./obj_dir/Vtb_gridnet_node
```

`tb_gridnet_node` runs the whole node at its default sizes. It covers:

- downloading a program and starting the FE;
- a full 1024-byte packet at 1 Mbit/s with 10 bytes of skew, checked in the
  buffer and stored to SBC memory by DMA;
- a bus request from the SBC that must wait for the FE's DMA;
- packets with a mismatch, a cut loop, a byte dropout and a CRC error, and an
  overrun;
- a 32-byte fetch, then a transmit to both ADCCP chips while the DMA stores a
  received packet;
- the FE's interrupt to the SBC and its acknowledge;
- a response timeout when no answer comes;
- Clear and counting of the time code, a timestamp read and a missing-pulse
  interrupt;
- the by-pass gates.

It counts each of these mechanisms and fails if one never occurs. It finishes
in a few seconds.

The block testbenches are `tb_byte_fifo`, `tb_rx_timers`, `tb_rx_compare`,
`tb_pingpong_buffer`, `tb_fe_io`, `tb_ucode_ram`, `tb_slave_dma`,
`tb_adr_gen`, `tb_data_ram`, `tb_bus_priority`, `tb_master_dma`,
`tb_fe_board`, `tb_master_clock`, `tb_envelope_det`, `tb_time_code` and
`tb_bypass_gate`. Some shrink sizes to run faster:

- `tb_fe_io` uses a 2 MHz clock and 64-byte buffers;
- `tb_pingpong_buffer` uses 16-byte buffers.

`tb_phase1_loop` runs four complete nodes on a ring shaped like the Phase I
test loop: 16 km, 10 m, 16 km and 10 m of fiber, at 5 us per km. The
ADCCP chips and the 8x305 programs are modelled in the testbench. Each
powered node repeats the light of both rings with one byte time of delay
(an assumption; the report does not give this figure). Node 0 acts as the
Primary and polls the others. The test covers:

- a poll and an answer that arrive as two matching copies;
- a broadcast received by every node;
- one fiber cut, which each node reports as a loop error on one ring while
  the other copy arrives intact, so the Primary can locate the cut;
- both fibers cut at one place, where every node still receives one copy;
- a node without power, which its by-pass gate drops out of the ring; the
  poll to it ends in the response timeout.
