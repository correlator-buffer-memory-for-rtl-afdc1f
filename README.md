# Correlator buffer memory

A radar receiver's matched filter delivers samples, tagged with one of eight
frequency channels, at up to 10 MHz. A digital correlator wants to read those
samples at its own pace, with its own addresses, and often several correlators
(a master and up to three slaves) want different parts of the data at the same
moment. This design sits between the two. It is a double-buffered memory:

* one **side** is loaded from the filter while the correlator reads the other;
* every **start-compute** pulse from the radar controller swaps the sides, so
  loading and reading never wait for each other;
* on the input, each of the 8 channels has its own **program-counter**, which
  decides where that channel's samples go;
* on the output, the memory is made of 1k-word **cards**, and each card can be
  told which page of the correlator's address it answers and which of **four
  16-bit data buses** it drives, so one correlator address can fetch four
  words from four different blocks at once.

Everything is set up from a host computer through two CAMAC registers.
The RTL is synthesizable SystemVerilog with one clock. Its defaults give the
full-size machine: 8 program-counters, and 8 cards of 1k x 32 bit, which is
8k x 16 bit per side.

## Data words

A word is 16 bits: an 8-bit x sample in bits 15:8 and an 8-bit y sample in
bits 7:0 (`buf_pkg::xy_word_t`). Both are two's complement. The correlator
cannot take the value -128, so the input path replaces -128 by -127 in x and
in y separately (`data_correction`). All other values are stored unchanged.

## Writing: channels and program-counters

With every sample the filter sends a 3-bit channel number (0 = channel 1). The
number goes into a register (`channel_decoder`). The register selects one of
eight `channel_control` program-counters onto the internal address bus, and
the word is written at that counter's address. After the write the counter
steps by one, so it already holds the address for its channel's next sample.

Each program-counter has a 16-bit start-address register, programmed once
over CAMAC. At every start-compute all counters are reloaded from their start
registers. Two examples:

* **One channel.** Program-counter 1 starts at 0. The others start beyond the
  memory (for example at 0x4000), so their writes go nowhere.
* **Eight channels.** Channel n starts at n x 1024, so each channel fills its
  own 1k area.

Nothing stops one channel from running into another's area. Choosing the
start addresses is up to the user.

## Sides and start-compute

`buffer_select` = 1 means side A is written and side B is read. Each rising
edge of start-compute does three things: it toggles `buffer_select`, reloads
all program-counters, and restarts the test sources. Start-compute can come
from the radar controller (`radar_st_comp`) or from bit 6 of CAMAC register 2;
either one is enough.

`address_switch` routes the addresses. The program-counter address goes to
the written side and the correlator address to the read side. It also outputs
the four active-low transceiver enables of the original board:

| writing | E1A | E1B | E2A | E2B |
|---------|-----|-----|-----|-----|
| side A  | 0   | 1   | 1   | 0   |
| side B  | 1   | 0   | 0   | 1   |

E1x gives the program-counter bus to side x, and E2x gives the correlator bus
to side x.

## Reading: cards, pages and the four data buses

This is the least obvious part. A card holds 1k words of side A and 1k words
of side B. The card compares bits 15:10 of a side's address with a page
number. The low 10 bits then pick the word.

* **On the side being written**, the page is the card's slot number (`CARD_NO`,
  like switches on the card). The program-counters therefore see one linear
  memory: card 0 holds 0-1023, card 1 holds 1024-2047, and so on.
* **On the side being read**, the page is the card's programmable `page`
  register. Several cards can hold the same page. Each card also has four
  bus-enable bits, which choose the data buses it drives.

A block is a group of cards with pages 0, 1, 2, … that drive the same bus.
Every block starts at correlator address 0, so one correlator address reads
the same offset in every block, and each block's word appears on its own bus.

| layout | cards → (page, buses) | correlator reads |
|---|---|---|
| one block (one correlator) | card c → (c, bus 1) | 0-8191 on bus 1 |
| four blocks of 2k (correlator + 3 slaves) | card c → (c mod 2, bus c/2+1) | 0-2047, four words per address, one on each bus |

After reset every card has page = slot and drives bus 1, which is the
one-block layout. `data_bus_control` merges the cards onto the buses:

* `bus_drive[k]` says bus k is driven. It stands for the enabled 3-state
  drivers; an undriven bus reads 0.
* The correlator's `corr_enable` = 0 turns all four buses off at once. It is
  active high here; at a connector it may need inverting.
* If two cards drive the same bus, the lower-numbered card wins and
  `bus_conflict` is set. That is a programming error.

There is no handshake towards the correlator. Read data and `bus_drive` appear
one clock after `corr_addr`.

## Programming over CAMAC

`camac_ad` is register 1, a 16-bit address/data word. `camac_ctl` is register
2, and its bits are:

| bit | meaning |
|---|---|
| 0 | low: enable address- or data-load |
| 1 | low: load address |
| 2 | low: load data |
| 6 | start-compute |
| 7 | test 1: take data from the internal PROM |
| 8 | test 2: take data from the x/y simulator |
| 9 | PENABLE: the data word sets a card's page |
| 10 | DENABLE: the data word sets a card's bus enables |
| 11 | display the last written word on `panel_data` |

One programming step has two phases. `program_control` acts on the first clock
of each phase, so holding a phase longer does nothing more.

1. **Address phase** (bits 0 and 1 low). Register 1 holds the buffer's ident
   code in bits 15:8 and an item number in bits 3:0. The item is a
   program-counter 0-7 or a card. The buffer remembers whether the ident code
   equals its `BUFFER_ID` (default 2).
2. **Data phase** (bits 0 and 2 low). If the buffer was addressed, register 1
   goes into the item:
   * PENABLE = DENABLE = 0: the word is the start address of program-counter
     item[2:0]. One of the eight programming clocks ACK1-ACK8 fires.
   * PENABLE = 1: bits 3:0 become the card's page.
   * DENABLE = 1: bits 7:4 become the card's bus enables, with bit 4 for bus 1.

Several buffers can share the CAMAC registers, each with its own `BUFFER_ID`.
`camac_ctl` and `camac_ad` are assumed to be synchronous to `clk`.

## Test sources

Bits 7 and 8 of register 2 replace the filter's data word; bit 7 wins if both
are set:

* `test_prom` is a 512 x 16 store read in order, one word per sample. Word i
  holds x = (37 i + 5) mod 256 and y = (101 i + 11) mod 256. Both sequences
  take every 8-bit value, so the -128 correction also gets exercised.
* `xy_simulator` counts x up from 0 and y down from 255.

Both restart at start-compute. The strobe and the channel number still come
from the filter port.

## Input handshake and timing

`timing_control` runs a four-phase handshake with the filter. All signals in
the RTL are active high.

1. The first clock that samples `filt_strobe` high captures the data word
   (after correction) and the channel number.
2. On the next clock edge the word is written.
3. The clock after that raises `filt_data_received` and steps the channel's
   program-counter in the same cycle.
4. `filt_data_received` stays high until the strobe goes low.

A sample therefore takes at least 4 clocks. A 10 MHz sample rate needs a clock
of at least 40 MHz, plus the filter's reply time.

## Modules

| file | role |
|---|---|
| `buf_pkg.sv` | sizes, register-2 bit positions, word and source types |
| `buffer_memory.sv` | top: wires everything below |
| `timing_control.sv` | handshake, write and count pulses, start-compute, side select |
| `program_control.sv` | CAMAC register decoding, ACK1-ACK8, card register writes |
| `channel_decoder.sv` | 3-bit channel register and gated 1-of-8 decoder (used twice) |
| `channel_control.sv` | one program-counter (start register and counter) |
| `input_mux.sv` | filter / PROM / simulator selection |
| `data_correction.sv` | -128 → -127 for one 8-bit sample |
| `test_prom.sv`, `xy_simulator.sv` | test data sources |
| `address_switch.sv` | address routing to sides A and B, E1A-E2B |
| `memory_card.sv` | 1k x 16 of each side, page compare, bus enables |
| `data_bus_control.sv` | cards onto the four data buses, correlator enable |

The top also outputs front-panel signals: both side addresses, the channel
register and `panel_data`.

## Simulating

Each `tb/tb_<module>.sv` checks its module against values it works out itself.
It ends by printing `TB_RESULT checks=N failures=M`. Example with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -Irtl \
    rtl/buf_pkg.sv tb/tb_buffer_memory.sv --top-module tb_buffer_memory
./obj_dir/Vtb_buffer_memory
```

`tb_buffer_memory` runs the top at full size and takes about a second.
It programs both output layouts, runs measurement intervals from the filter
while the correlator reads the previous interval, and compares every bus word
with a reference model. It also exercises and counts:

* both test sources;
* the data correction;
* a start address beyond the memory;
* a CAMAC write addressed to another buffer;
* a bus conflict;
* the correlator's bus disable;
* the data display.

It also checks the 4-clock handshake and the 1-clock read latency.

`tb_multi_buffer` puts two buffers, with ident codes 2 and 3, on one filter
and one pair of CAMAC registers. It programs them separately through the
ident-code field. The filter waits for both `filt_data_received` signals.

## Where this departs from the original hardware, and what is left out

* The original is asynchronous TTL logic timed by the strobes. This design
  uses one clock, and the cycle counts above are its own.
* The 3-state buses (channel address bus, data buses) are modelled as
  multiplexers with explicit drive flags.
* The original board's description disagrees with itself on some points:
  * *Memory size:* parts of it say 4k words per side, others 8k. The RTL uses
    8k, to match the stated total of 32 bit x 8k. The number of cards is a
    top parameter (`NUM_CARDS_P`).
  * *Bus enables:* these are described both as front-panel switches and as
    settings made over CAMAC. Here they are per-card registers loaded over
    CAMAC.
* Own choices where the original gives no detail:
  * the layout of register 1 (ident code and item number, page and bus-enable
    fields);
  * the use of PENABLE/DENABLE to steer the data word;
  * the PROM contents;
  * reset values;
  * test 1 priority;
  * the registered read.
* Not included:
  * the electrical line drivers;
  * the front-panel lamps;
  * the manual front-panel load and clock switches;
  * reading the output buses back through CAMAC;
  * use of the board as a buffer for the radar controller.
