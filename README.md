# Flexible-radio MPSoC platform — RTL

This is the logic of a multiprocessor system-on-chip built to prototype
software-defined radios. Three processors share the work of an 802.11 DSSS
radio at 1 and 2 Mb/s:

- an **OS processor** (a PowerPC 405 in the reference system) runs the
  protocol stack and talks to the MAC through a shared memory and a mailbox;
- a **MAC processor** (MicroBlaze) runs the medium-access layer, times the
  inter-frame spaces with a timer, and talks to the PLCP processor over two
  FSL links (point-to-point FIFOs, one per direction);
- a **PLCP processor** (MicroBlaze) builds and parses PHY frames. It drives
  two hardware processing chains, one for transmit and one for receive,
  controls the analog front end over SPI, and configures the chains through
  memory-mapped registers.

The chains are made of small blocks. They all share one stream interface:
`valid`/`ready`, with a 4-bit **ID label** on every item. Stream
multiplexers read these labels. When an item with a chosen ID goes by, the
chain changes path. This is how a single frame sends its PLCP header with
DBPSK at 1 Mb/s and its payload with DQPSK at 2 Mb/s. The processor does
not have to stop the chain to make the change.

The processors, the external DDR memory, the board I/Os and the analog parts
are not RTL. Each processor is a **bus port** on `flex_radio_top`: a
request struct in, read data out, an interrupt line, and its FSL ports. A
testbench, or a processor model, drives these ports.

```
 OS bus ──┬─ shared BRAM (A) ───────── shared BRAM (B) ─┬── MAC bus
          ├─ mailbox (A) ◄──────────► mailbox (B) ──────┤
          └─ OS intc                        MAC local BRAM, MAC intc, timer
                                                         │
                                    FSL MAC→PLCP / FSL PLCP→MAC
                                                         │
 PLCP bus ── PLCP local BRAM, PLCP intc, chain controller, PHY registers, SPI
 PLCP FSL ─► TX chain ─► data sync ─► MAX19713 interface ─► DAC bus
 PLCP FSL ◄─ RX chain ◄─ data sync ◄─ correlator ◄─ MAX19713 interface ◄─ ADC bus
```

## Files

`rtl/` holds one module or package per file. `radio_pkg.sv` defines:

- the widths: ID 4 bits, sample 10 bits, correlation 16 bits, phase 8 bits;
- the 802.11 defaults: Barker-11, 4 samples per chip, SFD 0xF3A0;
- the stream and bus types.

`flex_radio_top.sv` wires up the whole platform. `tb/` holds one
self-checking testbench per block and `tb_flex_radio_top.sv`, the
end-to-end test.

## Stream interface and ID labels

An item moves on a cycle where `valid` and `ready` are both high. Its ID
travels with it through every block. Where a block merges several inputs
into one output, the output takes the ID of the last input that formed it:

- the deserializer's byte takes the ID of its last bit;
- the DQPSK symbol takes the ID of its second bit.

Where a block splits one input into several outputs, every output keeps the
input's ID:

- each bit from the serializer;
- each chip sample from the spreader;
- both bits from the DQPSK demapper.

## The processing chains

**Transmit** (`tx_chain.sv`). All blocks run on `clk` except the last one:

1. The FSL interface FIFO takes 32-bit words. Bits 7:0 are the byte and
   bits 11:8 are the ID.
2. The serializer sends the bits out LSB first.
3. The demux splits the bits between the DBPSK mapper (one bit gives 0 or
   π) and the DQPSK mapper (two bits give 0, π/2, π or 3π/2 with 802.11
   Gray coding).
4. The mux joins the two paths again.
5. One differential encoder sums the phase steps. Because it is shared by
   both paths, the carrier phase carries on across a rate change.
6. The Barker spreader turns each symbol into 11 chips × 4 samples = 44
   complex samples.
7. The data synchronizer moves the samples into the `clk_rf` domain.

**Receive** (`rx_chain.sv`):

1. The correlator runs at `clk_rf`.
2. The data synchronizer moves its results to `clk`.
3. A CORDIC phase computer finds the phase of each result, 8 bits per turn.
4. The differential decoder takes the phase difference between successive
   symbols.
5. A demux and two demappers (DBPSK, DQPSK) turn the differences into bits,
   and a mux joins the paths again.
6. The pattern filter holds back all bits until the SFD has gone by.
7. The deserializer packs the bits into bytes.
8. The FSL interface FIFO hands the bytes to the PLCP processor as words of
   the same layout as on transmit.

Each chain has one init signal for all its blocks. Init clears the data
path state and keeps the configuration.

## Timing recovery in the correlator

The receiver does not know where symbols start. The correlator therefore
finds symbol timing by itself and emits exactly one result per symbol.

- A delay line of 41 samples feeds 11 taps, 4 samples apart. Each tap is
  multiplied by ±1 from the configured chip sequence and the taps are summed.
  Chip 0 is `RX_SEQ[10]` and meets the oldest sample. A clean symbol gives a
  peak of 11 × its amplitude. The peak is flat over 4 neighbouring sample
  positions, because a chip lasts 4 samples.
- The input is counted in windows of 44 samples. For each of the 44
  positions a leaky sum is kept: `acc ← acc − acc/8 + |I| + |Q|`. This
  averages the correlation energy at that offset over roughly the last 8
  symbols.
- At the end of each window, the position with the largest sum becomes the
  new sampling position. It only replaces the current one if it beats it by
  more than 1/8. This hysteresis stops the choice from wandering between
  the 4 equal samples of a peak, and it stops noise from moving it.
- The result at the sampling position is sent out with that sample's ID.
- After init the sums are zero and the sampling position is 43, the last
  sample of the window. This is correct when the first symbol starts on the
  sample after init. When it does not, the sums lock onto the real timing
  within the sync preamble.

The simpler scheme of taking the largest correlation inside each fixed
window does not work: when a peak straddles two windows, some symbols are
emitted twice and others are lost. With 128 sync symbols in the 802.11 long preamble,
the leaky sum has locked long before the SFD. The testbench checks this
with leads of 2, 21 and 42 samples and with noise.

## ID switching (demux and mux)

Each `stream_demux` and `stream_mux` has a 7-bit rule:

| bits | field | meaning |
|---|---|---|
| 3:0 | `sw_id` | ID that triggers the switch |
| 4 | `sw_sel` | path taken once `sw_id` is seen |
| 5 | `sw_en` | switching enabled |
| 6 | `init_sel` | path taken after init |

Path 0 is DBPSK and path 1 is DQPSK.

- After init the block uses path `init_sel`.
- The first item whose ID equals `sw_id` goes to path `sw_sel`, and so do
  all items after it until the next init. At that moment `irq_switch`
  pulses for one cycle.
- The demux routes each item combinationally to its selected output.
- The mux takes input only from its selected path. It moves to the other
  path only when its current path has nothing waiting and the other path
  offers the switch item. Items still in the old path are therefore never
  overtaken.
- Because the path is taken when init happens, write the rule first and
  then issue the init.

**A typical frame.** The header is at ID 1 and the payload at ID 2. Every
rule is `init_sel=0, sw_en=1, sw_sel=1, sw_id=2`, so the register value is
`0x32`.

- **Transmit:** the PLCP writes the header bytes with ID 1 and the payload
  bytes with ID 2. The TX demux and mux switch to DQPSK at the first payload
  bit.
- **Receive:** the IDs come from the MAX19713 interface, which tags every
  sample with `RF_CTRL.rx_id`. The receiver cannot know where the payload
  starts until the header has been decoded. So the PLCP firmware reads the
  header from the RX FSL port and then writes `rx_id = 2`. The switch
  happens at the first sample tagged with the new ID. This sample should
  arrive at the first payload symbol.
- The end-to-end test writes `rx_id` as the first DQPSK symbol reaches the
  receiver. Real firmware has the 48-bit header time, about 48 µs, to do the
  same.

## Clock domains

| clock | typical | contents |
|---|---|---|
| `clk` | 100 MHz | processors' side: buses, memories, intcs, timer, SPI, FSL links, every chain block except the two below |
| `clk_rf` | 44 MHz | MAX19713 interface, correlator, RF side of both data synchronizers |

Each domain has its own asynchronous active-low reset (`rst_n`,
`rst_rf_n`). Signals cross between the domains in four ways:

- **Sample streams** go through `data_sync`, an asynchronous FIFO with
  Gray-coded pointers and two flops per pointer bit. The TX one writes on
  `clk` and reads on `clk_rf`; the RX one goes the other way. They are
  cleared only by reset, not by chain init.
- **Configuration** used at `clk_rf` passes through `cfg_sync` (two flops
  per bit). This covers `rx_en`, `tx_en`, `rx_id` and `RX_SEQ`. It is meant
  for values that change while the receiving logic is idle, or, like
  `rx_id`, for values where one sample of skew does not matter.
- **Init** comes from `chain_ctrl`. It gives a one-cycle pulse on `clk` and,
  through a toggle synchronizer, a one-cycle pulse on `clk_rf` a few cycles
  later.
- **The RX overflow interrupt** comes back to `clk` through `cfg_sync`. It
  stays set until the next RX init, so the two-flop crossing is safe.

## Processor buses

A request is one cycle with `cs` high: `{cs, we, be[3:0], addr[31:0],
wdata[31:0]}`. Read data comes back on the next cycle. Each bus is decoded
on `addr[19:16]`, with 64 KB per slave:

| `addr[19:16]` | OS | MAC | PLCP |
|---|---|---|---|
| 0 | shared BRAM | local BRAM | local BRAM |
| 1 | mailbox (port A) | shared BRAM | interrupt controller |
| 2 | interrupt controller | mailbox (port B) | chain controller |
| 3 | — | interrupt controller | PHY registers |
| 4 | — | timer | SPI master |

Each memory holds 4096 words (16 KB). The 16 KB shared BRAM and the two
16 KB local BRAMs use 0.4 Mb of the device's 2 Mb of block RAM.

## Register maps

All offsets are byte offsets. Reads return one cycle after the request.

**PHY registers** (PLCP, slave 3):

| offset | name | contents | reset |
|---|---|---|---|
| 0x00 | RF_CTRL | bit 0 rx_en, bit 1 tx_en, bits 7:4 rx_id | 0 |
| 0x04 | RX_SEQ | bits 10:0 correlator chip sequence | Barker-11 (0x712) |
| 0x08 | TX_SEQ | bits 10:0 spreading chip sequence | Barker-11 |
| 0x0C | TX_AMP | bits 8:0 chip amplitude | 256 |
| 0x10 | RX_DEMUX | switch rule (see above) | 0 |
| 0x14 | RX_MUX | switch rule | 0 |
| 0x18 | TX_DEMUX | switch rule | 0 |
| 0x1C | TX_MUX | switch rule | 0 |
| 0x20 | PF_PATTERN | pattern, first bit in bit 0 | 0xF3A0 |
| 0x24 | PF_LEN | pattern length in bits, 1..32 | 16 |

**Chain controller** (PLCP, slave 2):

- Writing offset 0x0 with bit 0 set inits the TX chain; bit 1 inits the RX
  chain.
- Reading 0x0 gives `{RX init count[31:16], TX init count[15:0]}`.

**Interrupt controller** (one per processor):

| offset | name | access | meaning |
|---|---|---|---|
| 0x0 | ISR | read | latched sources |
| 0x4 | IPR | read only | ISR & IER |
| 0x8 | IER | read/write | enable mask |
| 0xC | IAR | write only | write 1 to clear |
| 0x10 | MER | read/write | bit 0 = master enable |

A source is latched on every cycle it is high. So a one-cycle pulse is
caught, and a level that stays high comes back after it is acknowledged.

Interrupt sources:

| processor | sources |
|---|---|
| PLCP | 0 SFD found, 1 RX demux switched, 2 RX mux switched, 3 TX demux switched, 4 TX mux switched, 5 RX sample overflow, 6 SPI word done, 7 word from MAC waiting |
| MAC | 0 mailbox, 1 timer, 2 word from PLCP waiting |
| OS | 0 mailbox |

**Mailbox** (same offsets on both ports). There is one 16-word FIFO per
direction.

- 0x0, write: send a word. The word is dropped if the FIFO is full.
- 0x4, read: take the oldest received word, or 0 if none.
- 0x8, read: status `{receive count[31:16], 0, send full[1], receive
  empty[0]}`.
- The interrupt stays high while a received word is waiting.

**Timer** (MAC, slave 4). It counts down once per cycle.

| offset | name | meaning |
|---|---|---|
| 0x0 | CTRL | bit 0 enable, bit 1 auto-reload |
| 0x4 | LOAD | a write also loads COUNT |
| 0x8 | COUNT | current count (read) |
| 0xC | STATUS | bit 0 expired; write 1 to clear; this is the interrupt |

Expiry comes exactly LOAD cycles after the write that enables the timer. A
SIFS (10 µs) is `LOAD = 1000` at 100 MHz.

**SPI master** (PLCP, slave 4):

| offset | meaning |
|---|---|
| 0x0 | write: send a 16-bit word, MSB first (ignored while busy) |
| 0x4 | read: bit 0 busy |
| 0x8 | SCLK half-period in `clk` cycles (reset 4) |

It uses mode 0: MOSI changes on falling edges and the slave samples on
rising edges. A word takes `2 × 16 × divider` cycles and ends with the
"SPI done" interrupt.

**FSL words** (chain ports):

| bits | contents |
|---|---|
| 7:0 | byte |
| 11:8 | ID |
| 31:12 | zero on receive, ignored on transmit |

The control bit is unused. Writing while `m_full` is high is ignored.

## MAX19713 interface

The converter bus is 10 bits wide and runs at the sample clock. I is
carried in the half of the clock period before the rising edge and Q in the
half before the falling edge, in both directions.

**Receive:**

- Each `clk_rf` cycle gives one complex sample, tagged with `rx_id`.
- The converter cannot wait. A sample the chain refuses is lost and sets the
  overflow interrupt until the next RX init.
- With the chain keeping up (one sample per cycle), overflow never happens
  unless the PLCP stops reading its FSL port.

**Transmit:**

- With `tx_en` set, one sample is taken per cycle.
- When no sample is waiting, the DAC is driven with zero.

## Where this design departs from the reference system

- **Buses.** PLB, OPB and LMB are replaced by the simple single-cycle bus
  described above, one port per processor. The processors, DDR memory,
  Ethernet, RS232, Compact Flash, the OPB bridge, the analog front end and
  the Wireless-USB device are outside this RTL.
- **PHY registers.** The reference design gives each chain block its own
  memory-mapped registers. Here one register file (`phy_regs`) serves all
  blocks of both chains. The register layouts of all peripherals are this
  design's own.
- **Receive switching.** The receive ID comes from a register that firmware
  sets at the header/payload boundary (see above). The reference text
  leaves open how received samples get their IDs.
- **Correlator.** The timing recovery is this design's addition.
- **Phase computer.** This design uses a CORDIC.
- **Data synchronizers.** They are not cleared by chain init; only by reset.
- **I/Q on the converter bus.** Carrying I and Q on the two clock halves is
  an assumption about the converter bus.
- **Not implemented:** the 802.11 scrambler and the header CRC. The
  end-to-end test sends an unscrambled frame with a fixed header.
- **Memory sizes and FIFO depths.** These are chosen here (memories 16 KB;
  FSL, mailbox and chain FIFOs 16 entries) and set by parameters of
  `flex_radio_top`.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. A
watchdog ends a hung run with a failure. With Verilator 5, from the
repository root:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  --top-module tb_flex_radio_top -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/radio_pkg.sv tb/tb_flex_radio_top.sv
./obj_dir/Vtb_flex_radio_top
```

Replace `tb_flex_radio_top` with any other `tb/tb_<block>.sv` to test one
block. Use `+verilator+rand+reset+2` to start with random flop values, which
checks that the reset covers every flop that needs one.

The end-to-end test models the three processors with testbench threads:

1. The OS writes a 64-byte payload to shared memory and posts it in the
   mailbox.
2. The MAC copies it and passes it to the PLCP.
3. The PLCP configures the PHY and sends a 1 Mb/s header and a 2 Mb/s
   payload.
4. The frame comes back through an RF loopback with noise. The PLCP
   receives it and returns the payload to the MAC.
5. The MAC waits one SIFS with the timer and posts the result to the OS,
   which checks it.
6. The test then forces an RX overflow and clears it.

Every mechanism used is counted. A mechanism that never happened is a
failure. The run takes about 0.5 ms of simulated time.
