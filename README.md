# Streaming readout of a segmented ionization chamber: FPGA pipeline

A parallel-plate ionization chamber for proton-therapy quality assurance gives
one small current per readout strip. Each strip gets a transimpedance
amplifier and one channel of an 8-channel, 18-bit SAR ADC. All channels are
sampled together, 25,000 times a second, without a trigger. This RTL is the
FPGA half of a Cyclone V SoC, and it turns that constant stream into records
in processor RAM:

* it reads every ADC of the array at once over a shared serial bus;
* it adds all channels of each Sample, which gives the total beam fluence;
* it compresses every channel value into a Protocol Buffers *Varint*
  (LEB128), laid out as a packed repeated field that the processor's software
  can wrap into a message without touching the bytes;
* it writes each Sample into a circular buffer in RAM over the Avalon-MM
  FPGA2SDRAM port, and interrupts the processor once per block of 64 Samples.

Values from unlit strips are small, so most channels compress to one byte
instead of four. The whole design is sized by one number, `ADC_N`, the number
of ADCs. The default is 12 ADCs, which is a 96-channel detector.

The design follows the thesis *A Scalable FPGA-based Multi-channel Data
Acquisition System for Parallel Plate Ionization Chamber*. That thesis gives
the block structure, the ADC protocol, the CDC structure, the encoding and
packing algorithm and the memory layout. The details it leaves open were
chosen here and are listed under [Design choices](#design-choices).

## Pipeline

```
 ADC 0..ADC_N-1                      SCLK 10 MHz │ FCLK 50 MHz
 convst,csn,reset (shared) ┌──────────────┐      │
 ◄─────────────────────────┤adc_interface ├─► cdc_fifo ─┬─► integrator ────── sum ──────┐
 busy (OR), sdata[ADC_N] ─►│ SIPO x ADC_N │      │      │                               ▼
                           └──────────────┘      │      └─► varint_encoder ─ payload ─► sample_writer ─► Avalon-MM
                                                 │          (BRAM 256-bit)  entries ──►   (PIO irq,     FPGA2SDRAM
                                                 │                                         block num)
```

Every arrow between blocks is a Ready/Valid handshake: a word moves on a
clock edge where both `valid` and `ready` are high. `rv_if` bundles these
links in the top and asserts that a sender holds `valid` and data until the
word is taken. The unit of transfer up to the encoder is one **ADC word**: the
144 bits (8 x 18) of one ADC, plus a `last` bit on the final ADC of a Sample.

### Time budget of one Sample (40 µs at 25 kSps)

| step | clock | duration (12 ADCs) |
|---|---|---|
| timer tick → `convst` pulse → ADCs busy | SCLK | ~0.5 µs |
| serial readout of all ADCs in parallel, 144 bits | SCLK | 14.4 µs |
| 12 ADC words through the CDC FIFO, ~3 SCLK cycles each | SCLK/FCLK | ~3.5 µs (measured) |
| encode: 9 FCLK cycles per word, then flush | FCLK | overlaps the above |
| payload + one 256-bit write per entry + metadata write | FCLK | < 0.5 µs without wait states |

The serial readout takes most of the period. That is why all ADCs are read
in parallel, each into its own shift register, even though these registers
and the output multiplexer take most of the logic.

## ADC readout (`adc_interface`, SCLK domain)

All ADCs share `convst`, `csn` and `reset`. Each ADC has its own serial data
line, and the busy lines come in OR-ed together. While `data_aq_en` is high, a
timer requests a conversion every `SAMPLE_PERIOD` = 400 SCLK cycles. One
Sample then runs like this:

1. `convst` goes high for 2 cycles. Its rising edge starts the conversion in
   every ADC.
2. When busy is seen (after a two-flop synchroniser), `csn` goes low for
   exactly 144 cycles. On each rising SCLK edge every ADC's bit is shifted into
   that ADC's 144-bit serial-in/parallel-out register. The ADC sends channel 0
   first and each channel MSB first, so channel 0 ends up in bits
   [143:126]. The ADC allows readout while it is still converting, but only
   while busy is high. 144 cycles at 10 MHz fit easily.
3. A registered `ADC_N:1` multiplexer sends the words out one at a time, ADC 0
   first. This multiplexer is the slowest path in the SCLK domain as
   `ADC_N` grows.

A request that arrives while the previous Sample is still being sent waits
until the block is idle. While `adc_powerup_en` is low, `adc_reset` is held
high. After it rises, the first conversion waits `POWERUP_WAIT` cycles (1 ms).

## Crossing to the fast clock (`cdc_fifo`)

The two clocks are unrelated. The FIFO has two registers, so each pointer is a
single bit that toggles (XOR 1) on each transfer. Each pointer reaches the
other domain through two flops:

* write side: `ready = (wptr == rptr_synced)`;
* read side: `valid = (rptr != wptr_synced)`.

At most one word is in flight at any time, and the register being read is
never the one being written, so the 145 data bits need no synchroniser. A
round trip costs about 3 SCLK cycles per word. This FIFO sets the design's
channel limit (see [Scaling](#scaling)).

## Total current (`integrator`)

The integrator holds one ADC word and adds one sign-extended channel per FCLK
cycle to a 32-bit sum, 8 cycles per word. After the word marked `last`, the
sum goes to the Sample Writer. The encoder works at the same pace, 8 cycles
per word, so the fork that feeds both blocks (a word leaves the FIFO only when
both can take it) never stalls in practice.

## Varint encoding and packing (`varint_enc`, `varint_encoder`)

This is the most involved part of the design.

**Encoding (combinational, `varint_enc`).** The 18-bit value is cut into three
7-bit groups g0 (LSBs), g1 and g2.

* `pop[i] = |g[i]` marks a populated group.
* The continuation flag of byte i is set when any more significant group is
  populated: `flag[1] = pop[2]` and `flag[0] = pop[1] | pop[2]`.
* Byte i is `{flag[i], g[i]}`, with byte 0 lowest.
* The length is a priority selection on `pop`: 1 byte (the value 0 is one
  byte 0x00), 2 bytes if g1 is the highest populated group, 3 bytes if g2 is.
* Bytes beyond the length are zero.

For example, 365069 (with `DATA_W = 32`) encodes to the bytes 8D A4 16.

**Packing (`varint_encoder`).** The Varints of a Sample are written back to
back into 256-bit (32-byte) entries of a block RAM, with no gaps. Two values
are carried from cycle to cycle: a 272-bit register `pk` with bytes not yet
written, and its fill level `occ` in bytes. Each cycle encodes one channel:

```
p_occ = occ + len                    -- adder
p_pk  = pk | (varint << 8*occ)       -- left shift, OR-concatenate
if p_occ >= 32:  BRAM[n++] = p_pk[255:0];  pk = p_pk >> 256;  occ = p_occ - 32
else:            pk = p_pk;                 occ = p_occ
```

272 bits is exactly enough. After a write at most 31 bytes remain, and one
Varint adds at most 3 bytes. After the last channel, a partly filled `pk` is
flushed as the final entry, zero-padded. The block then:

1. offers the **payload**, the number of valid Varint bytes, on its own
   handshake;
2. once the payload is taken, raises `offloading`, stops accepting input, and
   sends the entries out one per cycle. The read address already points at the
   next entry when one is accepted, which hides the BRAM's one-cycle read
   latency;
3. returns to accepting input after the last entry.

A Sample takes `9·ADC_N + 1 + entries` cycles when nothing stalls. The BRAM
has `ADC_N` entries: the 8 Varints of one ADC take at most 24 bytes, so
`ADC_N` entries always hold a Sample.

## Sample Buffer in RAM (`sample_writer`)

Addresses are Avalon word addresses (one word = 256 bits). The buffer starts at
`RAM_BASE` (default word 2^24, the upper half of 1 GiB) and is a circular
sequence of `N_BLOCKS` = 64 **Sample Blocks**. Each Sample Block holds
`SAMPLES_PER_BLOCK` = 64 **Samples**, and each Sample has a fixed slot of
`ADC_N + 1` words:

| word in slot | content |
|---|---|
| 0 | metadata: bits [31:0] sum, [63:32] payload (bytes), [95:64] sample number, [103:96] parity byte, rest 0 |
| 1 .. ceil(payload/32) | packed Varints, channel 0 of ADC 0 first, then ascending channel and ADC |
| up to ADC_N | unused (not written) |

For each Sample the writer proceeds in this order:

1. It takes the sum and the payload, in either order.
2. It writes each data entry to `RAM_BASE + coarse + fine` as it arrives.
   `coarse` is the slot's first word and `fine` = 1, 2, and so on. On the way
   it XORs all bytes of these entries into the parity byte.
3. It writes the metadata word last, at `fine = 0`. A reader that finds the
   metadata written therefore knows the data is already there.

After the 64th Sample of a block, `ram_block_num` shows that block's number and
`read_ram_block` pulses for one FCLK cycle. This pulse is the processor's
interrupt to read the block. The sample number counts from 0 after each
rising edge of `data_aq_en`. While acquisition is off and no Sample is in
flight, the buffer position also goes back to block 0.

To read a Sample in software, read the metadata word. Then decode LEB128 bytes
starting at word 1 until `8·ADC_N` values are found: the byte count must equal
the payload, and the XOR of all bytes in words 1..ceil(payload/32) must equal
the parity byte.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `ADC_N` | 12 | `daq_pkg`, all blocks, `daq_top` | ADCs (8 channels each); 12 = 96 channels |
| `CH_PER_ADC`, `CH_W` | 8, 18 | `daq_pkg` | fixed by the ADC |
| `MEM_W` | 256 | `daq_pkg` | BRAM entry and Avalon data width |
| `SAMPLES_PER_BLOCK`, `N_BLOCKS` | 64, 64 | `daq_pkg`, `daq_top` | Sample Buffer geometry |
| `SAMPLE_PERIOD` | 400 | `daq_pkg`, `daq_top` | SCLK cycles per Sample (10 MHz / 25 kSps) |
| `POWERUP_WAIT` | 10000 | `daq_top`, `adc_interface` | SCLK cycles from ADC power-up to the first conversion |
| `AMM_ADDR_W`, `RAM_BASE` | 25, 2^24 | `daq_top`, `sample_writer` | Avalon word address width and buffer base |

At the defaults the design has about 1300 flip-flop bits, plus 5.6 kbit of
memory arrays (the SIPO registers and the encoder BRAM).

## Design choices

These points are not fixed by the original description and were chosen
here:

* **Channel codes are signed.** They are sign-extended for the sum, because
  the ADC range is bipolar (±5 V). The Varint encodes the raw 18-bit code, so a
  negative code takes 3 bytes.
* **Entry writes start at ≥ 32 bytes.** An entry is written as soon as the
  packed bytes reach 32, not only when they exceed it.
* **Flushing.** A partly filled last entry is written zero-padded.
* **Metadata layout** (word order, parity in the low byte) and **parity as the
  XOR** of all data-entry bytes.
* **Power-up.** `adc_reset` is held while the ADCs are powered down, followed
  by a 1 ms wait.
* **Pulse widths.** `convst` is 2 cycles wide. The interrupt is a one-cycle
  pulse with the block number held.
* **Late conversion requests** wait until the block is idle; they are not
  dropped.
* **Sample boundaries** are marked by a `last` bit carried with each ADC word.
* **Reset.** One asynchronous reset is synchronised into each clock domain.
* **Addressing.** Word addressing and the default `RAM_BASE`.

## Scaling

Each extra 8-channel ADC adds one 144-bit shift register, one multiplexer input,
one BRAM entry and one word to every Sample slot. The blocks in the fast clock
domain barely grow. The practical limit is time: the one-deep CDC FIFO passes
about one word per 0.3 µs, and all words must cross between the end of one
readout and the start of the next.

| configuration | ADC_N | result in simulation |
|---|---|---|
| 96 channels | 12 | 25 kSps, transfer 3.5 µs |
| 336 channels | 42 | 25 kSps, transfer 12.5 µs (`tb_daq_top_336`) |
| 1064 channels (19 boards of 56) | 133 | data correct, but the period stretches to 54.6 µs (≈18 kSps) |

At 25 kSps the limit is therefore about 85 ADCs (680 channels). Reaching 1064
channels at full rate needs a deeper CDC FIFO, or a faster clock on the write
side of the crossing.

## Simulation

All testbenches are self-checking and print
`TB_RESULT checks=N failures=M`. They need `--timing`. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_daq_top -y rtl -y tb +libext+.sv \
  rtl/daq_pkg.sv tb/tb_data_pkg.sv tb/tb_daq_top.sv -o sim && obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_varint_enc` | all 2^18 values match a loop-based LEB128 reference; 32-bit instance and worked example |
| `tb_cdc_fifo` | order, no loss, at most one word in flight, both clock ratios |
| `tb_integrator` | signed sums; exactly 8 cycles per word |
| `tb_varint_encoder` | entries and payload against a byte-level reference; all-zero and all-max Samples; cycle count per Sample |
| `tb_adc_interface` | data and order of three ADC models; 400-cycle period; 144-cycle `csn`; readout while busy; power-up and stop |
| `tb_sample_writer` | every Avalon write (address, data, parity, metadata), interrupts, wrap, restart, random wait states |
| `tb_daq_top` | whole chain with 3 ADCs, buffer of 3 x 4 Samples: RAM contents decoded and compared; 40 µs period; each Sample in RAM before the next conversion |
| `tb_daq_top_336` | 336-channel configuration (42 ADCs, two blocks of 64 Samples): the same read-back, and the 40 µs period holds |
| `tb_daq_top_full` | the same at the default parameters, through one full wrap of the 64-block buffer (~7 s of CPU) |

The two top-level testbenches read back each Sample Block when its interrupt
arrives, and count the mechanisms they exercise. Each must occur at least once:

* Avalon wait states;
* CDC backpressure;
* 1-, 2- and 3-byte Varints;
* Samples that span several entries;
* offloading;
* interrupts;
* buffer wrap.

`tb/ads8598s_model.sv` is a behavioural model of the ADC's serial readout. It
counts protocol errors, such as `csn` low outside busy or a readout cut short.
`tb/tb_data_pkg.sv` holds the test data generator, which produces mostly small
values like an unlit strip, and the reference models.

## Not included

* The SoC system: the processor, its PIOs, the PLL and the SDRAM controller.
  These are vendor IP; their signals are ports of `daq_top`.
* The ADCs and the analog front end.
* The processor software: event building, networking and storage.

The ADC's internal 8x oversampling filter is inside the chip and is not
modelled.
