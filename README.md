# SDHC-SPI reader and hardware boot loader

A small soft-core processor in an FPGA usually runs from a program memory that is
filled when the FPGA is configured, so every software change means rebuilding and
reloading the bitstream. This design loads the program from an SD card instead, entirely
in hardware: no boot code runs on the processor, and the program memory does not have to
be writable from its instruction set.

It consists of two parts:

* **`sdhc_spi`** – a minimal SD card reader. It talks to SDHC cards in SPI mode, knows only
  the five commands needed to initialise the card and read one 512-byte block, has no block
  buffer and no CRC logic, and hands the block out one byte at a time over a busy/err handshake.
* **`boot_adapter`** – a loader that holds the processor in reset, streams the selected
  program out of the reader, packs every three card bytes into an 18-bit instruction and
  writes it into the processor's 1024 × 18 program RAM, then releases the processor.

`bootloader_top` wires both to the program RAM (`prog_bram`). The processor core itself is
not part of this RTL: it connects through `p_reset`, `p_address` and `p_instruction`.

A second, separate board design, `sd_test_system`, exercises the reader on its own. It
reads single bytes, one block or a run of blocks chosen on eight switches, and shows the
byte or the xor checksum in hexadecimal on a seven-segment display. The top, `sdhc_top`,
holds the two designs side by side. Each has its own reset, its own SD card pins and its
own board pins; they share only the clock. On a board they would be built one at a time.

## Hierarchy

```
sdhc_top
├── bootloader_top            (pins bl_*)
│   ├── boot_adapter          loader FSM, block counter, 3-byte packing, RAM write
│   ├── sdhc_spi              the card reader
│   │   ├── main_fsm          card algorithm: init sequence, CMD17, byte stream, abort
│   │   └── sdcmd_unit        command unit: CMD FSM, ROM counter, byte mux, output register
│   │       ├── cmd_rom       24-byte ROM: CMD0, CMD8, CMD55, ACMD41 frames
│   │       └── spi_master    SPI mode 0, two clock rates, SS glitch filter
│   └── prog_bram             1024 × 18 program memory
└── sd_test_system            (pins ts_*)
    ├── sdhc_spi              a second reader, as above
    ├── sd_test_ctrl          byte viewer / block checksum / sequence checksum
    └── hex_display           four-digit multiplexed seven-segment driver
sdhc_pkg                      shared constants (ROM addresses, tokens, R1 values)
```

In more detail, the boot loader part:

```
bootloader_top
├── boot_adapter          loader FSM, block counter, 3-byte packing, RAM write
├── sdhc_spi              the card reader
│   ├── main_fsm          card algorithm: init sequence, CMD17, byte stream, abort
│   └── sdcmd_unit        command unit: CMD FSM, ROM counter, byte mux, output register
│       ├── cmd_rom       24-byte ROM: CMD0, CMD8, CMD55, ACMD41 frames
│       └── spi_master    SPI mode 0, two clock rates, SS glitch filter
└── prog_bram             1024 × 18 program memory
sdhc_pkg                  shared constants (ROM addresses, tokens, R1 values)
```

All logic runs on one clock, `clk50m` (50 MHz in the intended system). All resets are
synchronous and active high.

## The reader's interface

```
            +-----------+
 clk50m --->|           |---> sclk
 reset  --->|           |---> mosi
 r_block -->|  sdhc_spi |<--- miso
 r_byte --->|           |---> ss   (active low)
 addr[31:0]>|           |
            +-----------+
              |   |   |
          dout[7:0] busy err
```

Two operations exist, and both follow the same rule: **busy is high while the operation
runs; when busy has fallen, err tells whether it worked.**

**Initialisation.** It starts by itself when `reset` falls. `busy` is high during reset and
stays high until the card is initialised (or has failed). `err = 1` at that point means no
card, or a card that is not an SDHC card or did not answer as expected.

**Reading a block.** The address is the SDHC block number (the card is seen as an array of
512-byte blocks).

```
clk      _|‾|_|‾|_|‾|_ ... _|‾|_|‾|_|‾|_|‾|_ ... _|‾|_|‾|_ ... _|‾|_|‾|_ ...
r_block  ___/‾‾‾‾‾‾‾‾‾ ... ‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾ ... ‾‾‾‾‾‾‾‾‾ ... ‾‾‾\________
r_byte   _____________ ... ______/‾‾\_______ ... _________ ... ____________
busy     _____/‾‾‾‾‾‾‾ ... ‾‾\_______/‾‾‾‾‾‾ ... ‾‾\______ ... ______/‾‾‾ ... ‾‾\__
dout     XXXXXXXXXXXXX ... XXXXXXXXXXXXXXXXX ... X d[0] .. ... ...          ...
              CMD17, wait      first byte            d[0] valid     abort: rest of
              for the card     fetched                              block drained
```

1. Raise `r_block` with `addr` valid. `addr` is captured on the edge that accepts the
   request; `busy` rises on that edge.
2. The reader sends CMD17 and polls the card until it has the block ready. Then `busy`
   falls (check `err`).
3. Each one-cycle pulse on `r_byte` fetches the next byte directly from the card; `busy`
   is high while it travels over SPI, and the byte is on `dout` when `busy` has fallen.
   From the edge that samples `r_byte` to `busy` low takes **8 × READ_DIV + 4** cycles
   (20 cycles at the default 25 MHz SPI clock). At most 512 bytes are delivered;
   further pulses are ignored.
4. Drop `r_block` at any time, after 3 bytes or after 512. The reader clocks out whatever
   is left of the block plus the two CRC bytes, discards them, deselects the card, and
   drops `busy` when it is ready for the next block.

A user must give a request only while `busy` is low, and should ignore `busy` for the
cycle right after giving it (the reader has not yet registered it then).

If a read times out, or the card rejects the command or sends an error token, `err`
goes high and the reader refuses further reads until it is reset and re-initialises
the card.

## What happens on the SPI wires

### Initialisation sequence (`main_fsm`)

| step | on the wires | accepted answer |
|------|--------------|-----------------|
| INIT | 10 bytes of 0xFF with `ss` high = 80 clocks, to put the card into SPI mode | – |
| CMD0 | `40 00 00 00 00 95` | R1 = 0x01 (idle) |
| CMD8 | `48 00 00 01 AA 87`, then 4 more bytes read | R1 = 0x01, last byte echoes 0xAA |
| CMD55 | `77 00 00 00 00 01` | R1 = 0x00 or 0x01 |
| ACMD41 | `69 40 00 00 00 01` (HCS set: host supports high capacity) | 0x00 = ready → IDLE; 0x01 = still initialising → back to CMD55 |

The CMD55/ACMD41 pair repeats at most `ACMD41_TRIES` times. Every answer is found by
sending 0xFF until a byte with bit 7 clear arrives, at most `RESP_POLLS` bytes. Any
answer not in the table, or no answer, ends in an ERROR state (`busy` low, `err` high,
card deselected) that only `reset` leaves. The whole sequence runs at the slow SPI
clock. When ACMD41 reports ready, the reader switches to the fast clock for good.

Only SDHC/SDXC cards are supported. Standard-capacity cards use byte addresses and would
need CMD58/CMD16, which this reader does not send.

### Block read

CMD17 is `51 a3 a2 a1 a0 FF`: the command byte, the 32-bit block number MSB first, and
a dummy CRC with the stop bit. Its R1 must be 0x00. The reader then sends 0xFF until the
start token 0xFE arrives, for at most `TOKEN_POLLS` bytes. 0xFF means "not yet"; any other
byte is an error token. Then come the 512 data bytes and 2 CRC bytes, each clocked out
only on request.

### Chip select

The card is selected (`ss` low) for the whole of every command exchange. For a read,
that lasts from CMD17 to the end of the drained block. Between commands `ss` goes high.
A hardware controller could release and re-select the card in two consecutive clock
cycles, and some cards miss such a short pulse. `spi_master` therefore contains a
**glitch filter**: once `ss` has risen it stays high for at least `SS_MIN_SCLK`
(default 8) full SPI clock periods, and a transfer that wants the card selected earlier
waits. The 80 power-up clocks are sent with `ss` held high.

### Clock rates

`sclk = clk50m / INIT_DIV` during initialisation and `clk50m / READ_DIV` afterwards.
Both dividers must be even and at least 2. At 50 MHz the sensible choices are:

| divider | SPI clock | use |
|---------|-----------|-----|
| 2 | 25 MHz | fastest read rate (default `READ_DIV`) |
| 4 | 12.5 MHz | read |
| 64 | 781 kHz | read |
| 512 | 97.7 kHz | initialisation (default `INIT_DIV`; must be below 400 kHz) |

SPI mode 0 is used: `sclk` idles low, the card samples `mosi` on the rising edge, and
`miso` is sampled on the rising edge. `mosi` idles high.

## Command unit (`sdcmd_unit`)

The main controller never handles bytes of a command itself. It gives the command unit
one of three one-cycle requests:

| request | what the unit does | result on `dout` |
|---------|--------------------|------------------|
| `w_cmd`  | loads its ROM counter `cmd_cnt` with `din[4:0]`, sends the 6 ROM bytes from there, polls for R1 | R1, or 0xFF on timeout |
| `w_addr` | sends `din`, `addr[31:24]`, `addr[23:16]`, `addr[15:8]`, `addr[7:0]`, 0xFF, polls for R1 | R1, or 0xFF |
| `w_byte` | sends `din` and receives one byte | the received byte |

A byte multiplexer feeds the SPI unit from the ROM, the four address bytes, `din` or the
constant 0xFF. The output register captures the SPI unit's received byte. Two further
level inputs, `cs_req` (select the card) and `fast` (use the read clock), pass through to
the SPI unit.

The ROM (`cmd_rom`) holds four frames, 24 bytes in all, at addresses 0, 6, 12 and 18
(`sdhc_pkg::ROM_CMD0` …). CMD0 and CMD8 carry their real CRC7 (0x95, 0x87), because a
card in SPI mode still checks the CRC of those two. CMD55 and ACMD41 carry a dummy
CRC. CMD17 is not in the ROM, since its argument changes; it goes out through `w_addr`.

## Boot loader

### Card image

Program *p* (0 … 15, chosen with the `prog` switches) lives in an 8-block slot that
starts at block **8p** (4096 bytes per slot). The slot address is built as
`{25'b0, prog[3:0], 3'b000}`. A program is 1024 instructions of 18 bits, each stored as
three bytes, most significant group first. The two upper bits of every byte are unused:

| instruction | 18-bit word | bytes on the card |
|-------------|-------------|-------------------|
| `0x000AA` | `000000 000010 101010` | `00 02 2A` |
| `0x2C004` | `101100 000000 000100` | `2C 00 04` |
| `0x34000` | `110100 000000 000000` | `34 00 00` |

1024 × 3 = 3072 bytes = exactly 6 blocks, so blocks 8p+6 and 8p+7 of a slot are never
read. An image for the card is made by packing the assembler's hex output this way and
writing each program at byte offset 4096·p of the raw device.

### Loader sequence (`boot_adapter`)

1. On reset, `p_reset` goes high and the reader is reset (`sd_reset` pulse). The adapter
   waits for the card initialisation.
2. It loads `blk_cnt` with the slot address and the RAM word counter `ram_cnt` with 0.
3. For each block: it raises `r_block` and waits. Then, 512 times, it pulses `r_byte`,
   waits, and shifts `dout[5:0]` into the chain `sx0_r → sx1_r → sx2_r`. After every
   third byte it writes `{sx2_r, sx1_r, sx0_r}` to RAM word `ram_cnt` and increments
   `ram_cnt`. After 512 bytes it drops `r_block`, waits for the reader, and increments
   `blk_cnt`. A byte counter that runs across block boundaries keeps track of the
   position inside the instruction. So an instruction split between two blocks (4 per
   program) is packed correctly.
4. After word 1023 it closes the block and waits for the reader. Then it releases
   `p_reset`, and the processor starts from address 0.

A reader error stops the loader with `boot_err = 1` and the processor in reset.

While loading, the program RAM's address comes from `ram_cnt`; once `p_reset` is low,
it comes from `p_address`. The RAM reads synchronously: `p_instruction` is the word at
the `p_address` of the previous cycle.

### Load time

Load time is counted from the release of reset to the release of the processor. It
covers card initialisation at 97.7 kHz followed by the 3072 program bytes at the read
rate. Simulated with the default parameters, the given `READ_DIV`, and a card model that
is ready at its second ACMD41 and answers every read at once:

| `READ_DIV` | SPI read clock | simulated load time | measured on real cards with this type of loader |
|-----------|----------------|---------------------|-------------------------------------------------|
| 2 | 25 MHz | 7.05 ms | 6.84 ms |
| 4 | 12.5 MHz | 8.06 ms | 10.52 ms (12 MHz) |
| 64 | 781 kHz | 38.5 ms | 81.70 ms (780 kHz) |
| 512 | 97.7 kHz | 266 ms | 614 ms (97 kHz) |

At the fast rates, initialisation dominates: about 5.5 ms, most of it the CMD55/ACMD41
rounds. Each extra round costs about 1.5 ms, so a card that needs more rounds takes
longer. At the slow rates, the per-byte transfer dominates, at 8 × `READ_DIV` + 4
reader cycles plus a few loader cycles per byte. A real card adds its own access latency
before each block's data token, which the model leaves out. That latency explains most
of the difference from the measured times.

## Reader test system

`sd_test_system` is a reader plus a small controller (`sd_test_ctrl`) and a display
driver (`hex_display`). It is a bring-up design for checking the reader on a board
against a card that was filled with known data. The test runs when `reset` falls, and
`test[1:0]`, sampled during reset, selects it:

| test | what it does | button `btn` |
|------|--------------|--------------|
| 1 (or 0) | opens block `sw`, reads its first byte and shows it | reads and shows the next byte; after byte 512 it goes on to the first byte of the next block |
| 2 | reads block `sw` completely and shows the xor of its 512 bytes | does the same for the next block |
| 3 | reads `SEQ_BLOCKS` blocks from `sw` on and shows the xor of all their bytes | ignored; the test is over |

The display's left two digits show the low byte of the current block number. The right
two digits show the byte or the checksum. The rightmost decimal point and `led[0]` mean
that the value shown is a finished result; `led[1]` means the reader reported an error.
A test that failed stays failed until the next reset.

The controller talks to the reader exactly like the boot loader does. It holds `r_block`
while a block is open, sends one-cycle `r_byte` pulses, and after each request lets one
cycle pass before waiting for `busy` to fall, because `busy` rises on the edge that takes
the request. A checksum block takes 512 × (8 × `READ_DIV` + 4) reader cycles plus about
four controller cycles per byte: 12,590 cycles (0.25 ms) at 25 MHz.

`btn` passes through a two-flop synchroniser and is edge-detected. It is not debounced,
so a mechanical button needs a debouncer in front. The display driver lights one digit
at a time for `REFRESH_CYCLES` clocks (1 ms by default). Its outputs are registered and
active low, as for a common-anode display.

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `INIT_DIV` | 512 | reader, SPI | system clocks per SPI clock during initialisation |
| `READ_DIV` | 2 | reader, SPI | system clocks per SPI clock for reads |
| `SS_MIN_SCLK` | 8 | reader, SPI | minimum `ss` high time, in SPI clock periods |
| `INIT_BYTES` | 10 | main FSM | 0xFF bytes sent at power-up (10 = 80 clocks) |
| `RESP_POLLS` | 16 | command unit | bytes polled for an R1 answer |
| `ACMD41_TRIES` | 1024 | main FSM | CMD55/ACMD41 rounds before giving up (≈ 1.5 s at 97.7 kHz) |
| `TOKEN_POLLS` | 524288 | main FSM | bytes polled for the data token (≈ 0.2 s at 25 MHz) |
| `PROG_WORDS` | 1024 | adapter | instructions loaded |
| `DEPTH`, `WIDTH` | 1024, 18 | program RAM | memory size |
| `SEQ_BLOCKS` | 16 | test controller | blocks read by test 3 |
| `REFRESH_CYCLES` | 50000 | display driver | clocks each digit stays lit |

The 18-bit word and the 4-bit program select are fixed in the ports.

## Size

After generic synthesis, the numbers are:

| module | flip-flops | memory bits |
|--------|------------|-------------|
| `sdhc_spi` | 153 | the 24-byte command ROM, as logic |
| `boot_adapter` | 90 | – |
| `prog_bram` | – | 1024 × 18 |
| `sd_test_ctrl` | 84 | – |
| `hex_display` | 30 | the 16-entry segment table, as logic |

The 32-bit block-address register and the 20-bit poll counter account for about a third
of the reader's flip-flops. Lowering `TOKEN_POLLS` and `ACMD41_TRIES` shrinks the counter.
A comparable reader and loader on a Spartan-3E were reported at 111 and 82 registers, or
about 18.6 % and 5.7 % of the smallest device's slices.

## Design choices and departures

Taken from the reference design: the reader's ports, the operation and handshake
behaviour, the state sequence (INIT, CMD0, CMD8, CMD55/ACMD41 loop, IDLE, CMD17, next
byte, abort), the split into a main FSM and a command unit with a 24-byte command ROM,
an address multiplexer and an output register, no CRC units, no data buffer, the four
SPI clock choices, the SS glitch filter, and the boot loader's packing, register chain,
block counter layout and 6-block program size.

Choices made here, where the reference gives no detail:

* **Power-up clocks at 97.7 kHz, not 80 kHz.** 80 kHz is not one of the available
  dividers. 97.7 kHz still meets the 400 kHz limit.
* **`ss` high during the power-up clocks.** This is what the SD specification requires;
  "asserted" is read as logic one.
* **CMD17 framing.** The command ROM only has room for the four initialisation commands,
  so CMD17 is assembled from `din` (0x51), the address bytes and 0xFF.
* **Extra controls.** `cs_req` and `fast` run from the main FSM to the command unit. The
  request encoding (`din[4:0]` as ROM start address) is this design's.
* **Response checks and limits.** Exact expected answers, the R7 echo check, all poll
  and retry limits, and the ERROR state.
* **Abort drains the block.** Aborting clocks out the rest of the block and the CRC
  before deselecting, so the card is left in a clean state.
* **Filter width.** The glitch filter's minimum width (8 SPI periods).
* **Loader details.** The `sd_reset` pulse, the `boot_err` output, and the RAM address
  multiplexer.
* **No CRC checking.** A corrupted byte is loaded as is.
* **Test system.** All three tests are in one design, chosen by `test[1:0]`; each could
  just as well be built on its own. Other choices made here: tests 2 and 3 start at the
  switch-selected block, test 1 moves on to the next block, the display layout, the LED
  meanings, and `SEQ_BLOCKS` = 16.
* **One top for two designs.** `sdhc_top` only puts the boot loader system and the test
  system next to each other, so that both are built and tested together.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and ends with `$finish`.

| testbench | what it checks |
|-----------|----------------|
| `tb_cmd_rom` | all 32 ROM bytes, frame start/stop bits, CRC7 of CMD0/CMD8 recomputed |
| `tb_spi_master` | bytes both ways against a small SPI slave, sclk period and byte time at both rates, `ss` behaviour, minimum `ss` high time after a release |
| `tb_sdcmd_unit` | the three requests against the SD card model: power-up clocks, ROM frames accepted (CRC), R7, ACMD41 loop, CMD17 address, data bytes, poll timeout length |
| `tb_main_fsm` | exact request sequence against a scripted command unit; abort drain count; 512-byte cap; every error path (no CMD0 answer, bad echo, ACMD41 never ready, CMD17 rejected, error token, token timeout) |
| `tb_sdhc_spi` | the reader against the card model: init, full blocks byte for byte, per-byte latency, partial read and abort, `ss` pulse widths, timeout and recovery, missing card |
| `tb_boot_adapter` | loader against a reader stand-in: slot blocks, every word written once and correct, release, error |
| `tb_prog_bram` | all 1024 words, read latency, read-first |
| `tb_bootloader_top` | **whole system at default parameters**. Boots program 3 (card busy for 3 ACMD41 rounds) and program 12; reads all 1024 words back through the processor port; boots with no card. It counts every mechanism: power-up clocks, retry loop, both clock rates, filtered `ss` releases, blocks read, words split over blocks, drained blocks, releases, errors. It also checks the load time against bounds. |

The test system and the top have their own:

| testbench | what it checks |
|-----------|----------------|
| `tb_hex_display` | every hex digit in every position, random values, decimal points, digit order and dwell time |
| `tb_sd_test_ctrl` | the controller on a real reader and the card model: all 512 bytes of a block in test 1 and the step to the next block, test 0 as test 1, test 2 checksums and the time per block, test 3 over 3 blocks, a missing card |
| `tb_sd_test_system` | **default parameters**; results are read off the segment pins: test 2 on two blocks, test 1 on two bytes, a missing card |
| `tb_sdhc_top` | **whole top at default parameters**, both designs at once: boots program 3 and reads back all 1024 words, boots program 15 and runs it on the processor model, runs test 3 over 16 blocks and test 2 on two blocks through the display. It counts boots, words checked, processor writes, blocks read by the test system, results shown and digits decoded. |

Three more testbenches run the board-level tests, an actual program, and the load-time sweep:

| testbench | what it runs |
|-----------|--------------|
| `tb_sd_tests` | reader at default parameters. Test 1: the first bytes of a switch-selected block, then abandoning it. Test 2: xor checksum of whole blocks. Test 3: xor checksum of 16 sequential blocks. All compared with checksums computed from the card image. |
| `tb_program_run` | boots the three-instruction program from the table above (slot 15) and runs it on a behavioural model of the microcontroller (`tb/mcu_model.sv`: LOAD, OUTPUT, JUMP, two cycles per instruction). Checks that it writes 0xAA to port 0x04 once every six cycles and nothing else. |
| `tb_load_time` | four boot loader systems side by side with `READ_DIV` = 2, 4, 64, 512. Load times are printed and checked against bounds, and the programs are read back. |

`tb/sd_card_model.sv` is a behavioural SDHC card in SPI mode, for simulation only. It
insists on ≥ 74 power-up clocks, checks the CRC of CMD0/CMD8, has a configurable number
of "busy" ACMD41 answers and a configurable token delay, and can be made absent. Its
contents come from the formula in `tb/sd_image_pkg.sv`, which also gives the expected
program words.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/sdhc_pkg.sv tb/sd_image_pkg.sv tb/tb_sdhc_top.sv \
    --top-module tb_sdhc_top -o sim
./obj_dir/sim
```

Replace the testbench file and top name for the others. `tb_sdhc_top` runs in
about a second; `tb_load_time` takes about 15 seconds.

Not verified: behaviour with real cards (the card model is idealised: no busy periods
within a block, no card-side latency beyond the configured token delay), timing closure
on an FPGA, the processor itself, which is outside this RTL, and the test system with a
real display and a bouncing button.
