# icBLM acquisition logic

The ionisation-chamber beam loss monitor (icBLM) digitises the currents of
four ionisation chambers with a PICO4 ADC card. Each channel is sampled at
1 MSPS. The samples must reach the host continuously and none may be lost
silently. This RTL does that. It reads the four ADCs over SPI and packs the
samples into timestamped frames, each closed by a CRC. It writes the frames
as bursts into circular buffers in two DDR banks, and the host reads them out
at its own pace. Software controls the logic through a small register file.
An interrupt tells it that a buffer holds enough data.

Everything is SystemVerilog-2017. The design is synthesisable, apart from
the testbench models.

## Data flow

```
 ADC x4 --SPI--> pico4_spi --> pico4_tmem --> AXI-stream (4 x 32 bit / us)
                 (75 MHz)      pattern mux        |
                                                  v  RAW_DATA_SELECTOR, decimator gate
            dummy_data_generator --+--  raw_data_framer  (per channel, 125 MHz)
                                   v         v
                          data_channel_controller  (per channel, 125 -> 250 MHz)
                                   |  channels 2b, 2b+1
                                 arbiter --> smem_writer --> SMEM bank b (250 MHz)
```

- Sample words are 32 bits wide. The 20-bit ADC value sits in bits 19:0.
  Bits 31:20 hold a 12-bit sample number that counts conversions. A gap in
  the number therefore shows a lost or gated sample.
- `pico4_tmem` is a pattern memory of 4096 words per ADC. When a channel's
  bit in PATTERN_MASK is set, its ADC value is replaced by the word that the
  sample number points to. The sample number is kept. This lets the whole
  chain be tested with known data.
- `raw_decimator` opens the framers' input for DUTY microseconds out of every
  PERIOD microseconds. A PERIOD of 0 keeps the input open all the time.
- `dummy_data_generator` produces a 128-bit counter word. It replaces the
  framer of its channel while GENERATOR_PARAMETERS is non-zero. It emits
  MULTIPLIER words every DIVIDER cycles. This is done with an accumulator
  (add MULTIPLIER every cycle, emit a word and subtract DIVIDER when the sum
  reaches DIVIDER), so no division is needed.

## Frames

All words are 128 bits (a "DQW", double quad word).

| word     | bits 127:64          | 63:32     | 31:24 | 23:16 | 15:0    |
|----------|----------------------|-----------|-------|-------|---------|
| header   | SOF 50F50F50F50F50F5 | MTW index | S     | INFO  | SAMPLES |
| payload  | samples 4k+3, 4k+2   | 4k+1      |       | 4k    |         |
| trailer  | CRC32 (127:96), EOF E0FE0FE0FE0FE0FE0FE0FE0F (95:0) |||||

- Payload sample k sits in lane k mod 4, with lane 0 in bits 31:0. The last
  payload word is zero-padded.
- MTW index and S form the timestamp of the first sample. MTW index is the
  serial number of the 1 µs window. S is the 125 MHz clock cycle within that
  window at which the sample arrived.
- INFO is the ADC channel the framer reads, as set by RAW_DATA_SELECTOR.
- The CRC is the usual reflected CRC-32: polynomial 0xEDB88320, preset and
  final inversion all ones. It covers the header and the payload. The bytes
  of each word are fed LSB byte first.

When a frame starts:

- A frame normally holds SAMPLE_THRESHOLD samples.
- If the output was blocked, the next frame takes everything that piled up,
  so frames grow instead of dropping samples.
- If LATENCY_THRESHOLD ms pass with samples waiting, a short frame goes out.
- If the framer is disabled, a short frame goes out as well.

Samples that arrive at a full framer buffer (1024 samples) are counted as
dropped.

## The Data Channel Controller (the hard part)

Each channel owns a ring in DDR from BASE_ADDR up to END_ADDR. Both must be
4 kB aligned. The controller has three FIFOs that cross from the 125 MHz side
to the 250 MHz side:

- The **Data FIFO** takes 128-bit words and gives 64-bit words, lower half
  first. It holds 512 words.
- The **Forward FIFO** carries scheduled bursts (address, size).
- The **Back FIFO** returns finished bursts.

All three are Gray-pointer asynchronous FIFOs (`async_fifo`).

On the 125 MHz side, the *Write Data Counter* holds the bytes in the Data
FIFO that no burst covers yet.

- When the counter reaches BURST_SIZE, a burst is scheduled. Its size is the
  smallest of three values: BURST_SIZE, the room to the next 4 kB page
  boundary, and the room to END_ADDR. A burst therefore never crosses a page
  or the ring end.
- Some events schedule everything in the counter at once, still cut at the
  page and ring ends. These events are: the write latency timer reaching
  LATENCY_THRESHOLD ms, the Data FIFO filling up, and a disable request.
- After END_ADDR the address wraps to BASE_ADDR. W_POINTER is the end of the
  last *finished* burst, not of the last scheduled one.

The *Read Data Counter* holds the bytes stored and not yet read. It grows when
a burst comes back and shrinks when software writes R_POINTER.

- DATA_COLLECTED is set when the counter reaches DATA_THRESHOLD, or when the
  data has waited LATENCY_THRESHOLD ms.
- If a finished burst would push the counter past the ring size, the ring has
  been overrun. DATA_OVERWRITTEN is then set, and the read pointer at that
  moment is kept in R_POINTER_OVERWRITTEN. Reading that register clears the
  flag.
- Data arriving at a full Data FIFO is lost and sets DATA_OVERFLOW.
  CLEAR_OVERFLOW clears it. Framed channels do not overflow: the framer waits
  instead. The dummy generator does not wait, so it can overflow.

The control state machine has five states: WAIT_FOR_RESET, IN_RESET
(8 cycles, emptying all FIFOs and counters), WAIT_FOR_NO_RESET, DISABLED and
ENABLED. DCH_RESET and DCH_ENABLE drive it.

- A disable request leaves ENABLED only when three things hold: nothing is
  left unscheduled, no burst is outstanding, and no burst is being scheduled.
  DCH_ENABLE reads the real state, so software can poll it until it drops.
- The top module adds one more rule. A framed channel keeps its controller's
  request high until the framer has sent its last short frame, so that frame
  is still stored.

### SMEM side

Each bank serves two channels. Channels 2b and 2b+1 go to bank b.

The `arbiter` goes round-robin, starting after the channel it served last. It
uses a two-signal handshake:

1. It raises `channel_ready` together with the chosen channel's address and
   size.
2. The SMEM writer answers with `in_progress` for as long as the burst lasts.
3. When `in_progress` falls, the arbiter pulses `transfer_done` to the
   channel. The channel then pops its Forward FIFO and pushes the burst into
   its Back FIFO.

The `smem_writer` turns a burst into the memory port protocol:

- **Command phase:** WREQ[0] is held with WADD (byte address) and WSIZ
  (64-bit words) until WACK[0].
- **Data phase:** WREQ[1] marks a valid WDAT. Every cycle with WACK[1] moves
  one word.

The real SMEM controller belongs to the carrier board's framework and is not
part of this RTL. The handshake above is an assumption. It is the first thing
to check against the real controller.

## Registers

The application bus (`icblm_regs`) uses byte offsets. The list gives the low
byte of each offset; the application base is 0x100.

| offset | register | access and contents |
|--------|----------|---------------------|
| 0x98 | IRQ_ENABLE | R/W |
| 0x9C | DCH_ENABLE | R/W |
| 0xA0 | DCH_RESET | R/W |
| 0xA4 | CLEAR_OVERFLOW | W |
| 0xA8 | DATA_COLLECTED | R |
| 0xAC | FIFO_EMPTY | R |
| 0xB0 | DATA_OVERWRITTEN | R |
| 0xB4 | DATA_OVERFLOW | R |
| 0xC0 | CBRS | R/W; channel in 31:16, index in 15:0 |
| 0xC4 | CBRV | R/W; the selected parameter |
| 0xD8 | RAW_DATA_SELECTOR | R/W; 3 bits per channel |
| 0xDC | DECIMATOR_PARAMETERS | R/W; period in 31:16, duty in 15:0, both in µs |

In all the flag registers, bit i belongs to channel i.

Parameter indices reached through CBRS and CBRV:

| index | parameter | bits |
|-------|-----------|------|
| 0 | BASE_ADDR | 28:12 |
| 1 | END_ADDR | 28:12 |
| 2 | BURST_SIZE | 11:4 |
| 3 | DATA_THRESHOLD | |
| 4 | LATENCY_THRESHOLD | ms |
| 5 | R_POINTER | |
| 6 | W_POINTER | R |
| 7 | R_POINTER_OVERWRITTEN | R |
| 8 | GENERATOR_PARAMETERS | multiplier in 31:24, divider in 23:0 |
| 9 | SAMPLE_THRESHOLD | |

- Addresses are byte addresses in 16-byte units.
- Writes to a parameter are ignored while its channel is enabled. R_POINTER
  is the exception.

The FMC bus (`pico4_regs`) uses word addresses:

| address | register | meaning |
|---------|----------|---------|
| 0x80 | ID | reset value 0xDEADBEE2 |
| 0x81 | RST | bit 0 = 1 runs the acquisition |
| 0x85 | PATTERN_MASK | |
| 0x86 | CLK_MON0 | xuser clock, in Hz |
| 0x87 | CLK_MON1 | SPI clock, in Hz |

`clock_monitor` counts each clock in its own domain with a Gray-code
counter. It samples the counter once per REF_FREQ reference cycles, which is
one second.

The pattern memory is a separate 32-bit bus, `tmem_*`. Word address
`ch * 4096 + i` holds pattern word i of ADC `ch`.

A typical bring-up:

1. Write the channel parameters.
2. Pulse DCH_RESET.
3. Set RST = 1 on the FMC bus.
4. Set DCH_ENABLE.
5. On each interrupt, read the data between R_POINTER and W_POINTER, then
   write the new R_POINTER.

## Clocks, timing and reset

There are three clocks:

- **clk125** (xuser clock): registers, PICO4 logic, framers, and the write
  side of the controllers. A prescaler (`tick_gen`) derives the µs and ms
  ticks and the MTW index from it.
- **clk250:** the controllers' read side, the arbiters and the SMEM writers.
- **spi_clk** (75 MHz): comes from a PLL outside this RTL. One conversion
  frame is 75 SPI cycles:
  - CNV is high for 2 cycles;
  - 10 cycles of conversion time follow;
  - then 20 SCK pulses;
  - SDO is sampled on the falling SCK edge.

The finished set of four samples crosses to clk125 through a toggle that a
`sync2` synchroniser samples. `rst` is synchronised into every domain.

## Departures from the source description and choices made here

- The SMEM handshake and the TCSR bus timing are assumptions. The TCSR bus
  has a one-cycle strobe, and read data is valid one cycle after the read
  strobe.
- These sizes were chosen here: FIFO depths, the framer buffer (1024
  samples), and the SPI frame timing inside the 75-cycle sample period.
- The frame field positions below the SOF, and the CRC bit order, were
  chosen to fit the published frame picture.
- CLK_MON0 uses a one-second gate of 125 000 000 cycles of the 125 MHz
  clock. The source quotes a fixed reading of 122 000 000 instead. Set
  REF_FREQ to change the gate.
- There are no nBLM algorithm modules: AMRS is writable and AMRV reads 0.
- Not included: the PLL, the FMC IO buffers, the DDR controller and the
  carrier framework. Their signals are ports of `icblm_top`.

## Testbenches and how far to trust them

Every block has a self-checking testbench `tb/tb_<block>.sv`. Each one
prints `TB_RESULT checks=N failures=M`. The models are:

- `tb/smem_model.sv`: a memory model with random command delays and random
  data stalls;
- `tb/adc_model.sv`: an ADC model whose channel c produces the values
  `c*0x11111 + 5 + n*(3+c)`.

`tb_icblm_top` runs the whole design at reduced sizes: a 10 µs "ms", a
64-word Data FIFO and a 64-word pattern memory. It runs four channels at
once:

- two framed ADC channels, one of them through the pattern memory;
- one generator channel overrunning its 8 kB ring;
- one generator at full rate, overflowing its Data FIFO.

It reads the frames back from the memory model and checks every field, the
CRC and every sample value. It also counts each mechanism and fails if one
never happened:

- nominal bursts, latency bursts, page cuts and ring wraps;
- FIFO overflow, ring overwrite, arbiter switches and SMEM stalls;
- threshold, latency and flush frames;
- decimator gating, interrupts, latency-driven DATA_COLLECTED, disable
  flushes and controller resets.

`tb_icblm_full` runs one 100 µs acquisition with every parameter at its
default and checks the frames of two channels and the generator stream.

Build and run any of them with plain Verilator from the top folder:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb rtl/icblm_pkg.sv tb/tb_icblm_top.sv \
          -y rtl -y tb --top tb_icblm_top -o sim && ./obj_dir/sim
```

The simulator has no unknown values, so the benches start from random
register contents: `+verilator+rand+reset+2`. The checks cover function and
cycle counts as modelled here. They do not cover the real SMEM protocol,
metastability, or the analog timing of the ADC interface.
