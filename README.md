# ATB0 baseboard controller

ATB0 is a test baseboard for a daughtercard chip. It powers the chip from sixteen
programmable supplies, measures their voltages and currents, clocks it from a
programmable synthesizer, and reaches it through 26 general-purpose pins or through
a small asynchronous bus called AHIP. A host PC drives all of this over a PCI
bridge card (a PLX card). The bridge presents a plain 32-bit multiplexed
address/data bus.

This repository holds the FPGA controller that sits between that bus and the board,
written in synthesizable SystemVerilog. From the host, the whole board is a
128 MB window of memory:

| byte address (27 bits)  | what it reaches |
|-------------------------|-----------------|
| `0x0000000 - 0x1FFFFFF` | on-board SDRAM, one 32-bit word per pair of 12-bit SDRAM locations |
| `0x2000000 - 0x3FFFFFF` | control registers (below) |
| `0x4000000 - 0x7FFFFFF` | daughtercard memory, forwarded over AHIP |

| register   | byte address | read | write |
|------------|--------------|------|-------|
| `LGA_LED`  | `0x2000000`  | 4 bits | bits 1:0 drive the LEDs, bits 3:2 the logic-analyzer outputs |
| `VSn`      | `0x21000n0`  | 12-bit set value | set value; writing `VS15` loads all 16 DACs |
| `VMn`      | `0x22000n0`  | measures supply n (n = 0..13) and returns 12 bits | ignored |
| `CM_BURST` | `0x2300000`  | measures all 14 currents into SDRAM, returns the first word address | sets the SDRAM word address of the next burst |
| `CMmn`     | `0x2301mn0`  | measures all currents, returns `{4'b0, I[m], 4'b0, I[n]}` | ignored |
| `CLOCK`    | `0x2400000`  | last value | 14 bits `{test[13:11], N[10:9], M[8:0]}` shifted into the synthesizer |
| `SDRAM_RT` | `0x2500000`  | refresh period in clocks | refresh period (default 78) |
| `USER_ALL` | `0x2600000`  | value on all 26 user pins | drive values for all pins |
| `USER_DIR` | `0x2600004`  | direction of all pins (1 = driven) | directions for all pins |
| `USERp`    | `0x2601pp0`  | `{direction, value}` of pin p | 0 or 1 drives the pin, 2 makes it an input |
| `AHIP_MODE`| `0x2700000`  | mode | 0 normal, 1 test, 2 8-bit, 3 8-bit test |
| `STATUS`   | `0x2800000`  | `{16'b0, da[7:0], done[7:0]}` | - |

Bits 23:20 of a control-register address are the number of the module that owns
it. The decoder uses those bits directly, so the register map fixes the module numbers:

| 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 |
|---|---|---|---|---|---|---|---|---|
| LGALED | VSET | VMEAS | CMEAS | CLOCK | SDRAM | USER | AHIP | DECODE (status) |

`STATUS` bit k is module k's `done` flag and bit 8+k its `da` flag, in the same
numbering.

## How an access travels

Everything happens in the PLX local-bus clock domain, `clk`. The one exception is the
AHIP acknowledge, which is synchronised on entry.

1. **PLX side.** The bridge puts an address on `HAD`, sets `HLWNR` (1 = write) and
   pulses `HADS` low for one clock. It then waits for `HLRDY` to go low.
   - On a write, the bridge drives the data while `HLRDY` is low.
   - On a read, the controller drives `HAD` while `HLRDY` is low.
   - `HXDIR` low means the controller owns `HAD`. The top exposes the pin as
     `had_in`, `had_out` and `had_oe = !hxdir`.
2. **Decoder** (`decode`). The decoder latches the word address `HAD[26:2]` and
   picks the module:
   - `HAD[26:25] = 00` selects SDRAM.
   - `01` selects the module numbered by bits 23:20.
   - `1x` selects AHIP.

   It waits in `WAIT_START` until that module's `done` flag is high, which means
   the module has finished its previous operation.
   - **Write.** The decoder lowers `HLRDY`. It latches the data two clocks later,
     which is when the PLX drives it, and pulses that module's `enable` with
     `w_nr = 1`.
   - **Read.** The decoder pulses `enable` with `w_nr = 0` and waits one stall clock
     for the module to drop `da`. It then waits for `da` to rise and sends the data.
     A module's `data_out` reaches `HAD` through the `datasel` multiplexer.

   A status read never touches a module: the decoder answers it straight away.
3. **Timeout.** A 16-bit counter runs while the decoder waits for `done` or `da`.
   - If the counter reaches `0xFFFF`, the decoder releases the PLX.
   - A timed-out write is dropped.
   - A timed-out read returns `0xDEADBEEF`.
4. **Registers toward the PLX.** `HLRDY`, `HXDIR` and the outgoing `HAD` word are
   registered once more in the top level.

   Measured from `HADS` low to `HLRDY` low:

   | access | clocks |
   |---|---|
   | status read | 3 |
   | write to an idle module | 4 |
   | read of a module that answers at once | 7 |

   Slow modules add their own time on top of these figures.

Modules never block each other. The decoder enables exactly one module per access,
and an assertion in `decode` checks this. A module that is still busy simply holds
its `done` flag low. For example, a read of `VS3` right after writing `VS15` waits
out the whole DAC load, about 2 100 clocks.

## The slow clock and the serial devices

The DACs, ADCs and synthesizer cannot run at the bus clock. A 3-bit counter divides
`clk` by 8 and its top bit is `sclk`. `sclk` is sent out as the serial clock of each
device (`PVSCK`, `PVMCK`, `PCMCK`, `CKSC`).

A module that talks to a serial device first lines up with `sclk`:

- If `sclk` is high, it waits for it to fall (`SYNC1`).
- It then waits for `sclk` to rise (`SYNC2`).

After that, its 7-bit (or 11-bit) counter runs in step with `sclk`: `count[2:0]` is
the phase within a serial bit and the bits above it count serial bits.

Two shift registers carry all serial traffic. Both move one bit every 8 clocks, when
their private 3-bit pace counter reaches 7.

- `shiftreg_out` loads in parallel while `shift` is low. It presents the MSB first
  and holds its output low when not shifting.
- `shiftreg_in` shifts the serial input into its LSB.

## SDRAM controller

The SDRAM is 12 bits wide. Each 32-bit word in SDRAM space is two SDRAM locations:

- host bits 27:16 are the first location (the high half);
- host bits 11:0 are the second (the low half);
- the other host bits are not stored and read as zero.

Word address bits:

| word-address bits | use |
|---|---|
| 23:22 | bank |
| 21:10 | row |
| 8:0 | column: the SDRAM column is `{0, 1, a[8:0], 0}`, and the `1` requests auto precharge |

With a 12-bit address bus there is no room for bit 9. Words that differ only in
word-address bit 9 therefore share storage.

Host SDRAM space is 32 MB, so host word addresses only reach bit 22. Bank bit 1
(word-address bit 23) is therefore always 0 for host accesses. Together with the
dropped bit 9, the host reaches 2^22 distinct words, half of the 2^24 12-bit SDRAM
locations. The current-measure port takes a full 24-bit word address and can reach
all four banks, but the host cannot read back what it writes to banks 2 and 3.

**Power-up.** After reset, `sdram_ctrl` runs this sequence:

1. NOP.
2. PRECHARGE with A10 set (`0x400`), then a 3-clock wait.
3. REFRESH, then a 3-clock wait, twice.
4. Load the mode register with `0x021`: sequential bursts of two, CAS latency 2.

`done` and `da` stay low until the sequence ends, so the decoder holds off early
accesses.

**Word write.** ACTIVE (bank, row), then WRITE with the high half, then the low half
on the next clock. One wait clock follows for the auto precharge. The sequence is
about 6 clocks.

**Word read.** ACTIVE, then READ. The high half is taken two clocks after READ and
the low half one clock later.

**Refresh.** `refresh_timer` counts clocks up to `SDRAM_RT`. Whenever it has expired
and the controller is idle, a REFRESH is issued and the timer restarts. The default
of 78 is a 15.6 µs refresh interval at 5 MHz. At 40 MHz, write 625.

Two details are this design's own:

- The timer tests `count >= SDRAM_RT`, so lowering the period never skips refreshes.
- An access that arrives in the same clock as a refresh is not dropped. It waits one
  clock after the REFRESH and then proceeds.

**Current-measure write port.** The current-measure module writes into SDRAM through
its own port (`cs_we`, `cs_address`). That port overrides the decoder's address and
looks to the controller like an ordinary write.

## Power supplies

**Setting voltages (`voltage_set`).**

- Sixteen 12-bit registers are written and read like memory. Only a write to `VS15`
  starts the DAC load.
- The sixteen DACs form one daisy chain. The module holds `PVSCSB` low and shifts
  256 bits in: for each DAC, 4 zero bits and then its 12-bit value, MSB first.
- The value for the DAC at the far end of the chain goes first. The chain order is
  VS9, 1, 5, 15, 11, 7, 3, 13, 12, 2, 6, 10, 14, 4, 0, 8. The package function
  `dac_chain_reg` holds it.
- `done` stays low for the whole 2 048-clock load.

**Measuring voltages (`voltage_measure`).**

- Each supply has its own ADC with its own convert line (`PVMCVB[13:0]`). All the
  ADCs share one data line.
- A read of `VMn` holds convert line n low for about two serial bits and then shifts
  12 bits in.
- Before `da` rises, the module waits two more serial bits so the ADC can settle.

**Measuring currents (`current_measure`).**

- One convert line starts all 14 current ADCs together.
- Fourteen `shiftreg_in` registers read their data lines in parallel.
- A `CMmn` read returns two of the results.
- A `CM_BURST` read then writes seven SDRAM words, one every 8 clocks, starting at
  the stored word address. Word k holds `{4'b0, I[2k+1], 4'b0, I[2k]}`.
- The read returns the burst's first address, and the stored address moves on by
  seven. Back-to-back bursts therefore fill SDRAM contiguously.
- Only reads with word-address bit 0 clear start a conversion.

## Clock synthesizer (`clock_set`)

A write to `CLOCK` stores 14 bits. After lining up with `sclk`, the module waits 3
more clocks so that data changes in the middle of a `CKSC` period. It then raises
`CKSL` and shifts the 14 bits out on `CKSD`, MSB first. The module holds `done` low
during the 14 serial bits.

## User pins (`user_pin`)

Each of the 26 pins has two flags:

- a drive value (`user_def`);
- a direction (`drive_pin`, 1 = the controller drives the pin).

The top brings each pin out as `user_in`, `user_out` and `user_oe`. Reads of
`USER_ALL` and `USERp` report the level actually on the pin, whoever drives it.

- `USER_ALL` writes set all drive values. Only pins set as outputs show the new
  value; an input pin shows it once the pin is made an output.
- `USER_DIR` writes set each pin's direction from the matching data bit.
- `USERp` writes work per pin: 0 or 1 drives the pin with that value, 2 makes it an
  input, and other values are ignored.
- Pin numbers 26 to 31 read as zero.

## AHIP: talking to the daughtercard (`ahip`)

AHIP is a four-phase request/acknowledge protocol between two unrelated clocks. The
controller is always the host. Every transaction starts with a header word,
`{opcode[3:0], 4'b0, address[23:0]}`.

**Write.**

1. The host raises `req` with the header on the bus.
2. The client raises `ack`.
3. The host puts the data on the bus and lowers `req`.
4. The client lowers `ack`.

**Read.**

1. The header goes out with `req` high and is acknowledged.
2. The host releases the bus and lowers `req`.
3. The client drives the data and lowers `ack`.
4. The host takes the data and raises `req`.
5. The client releases the bus and raises `ack`.
6. The host lowers `req`, and the client lowers `ack`.

**8-bit modes.** Each 32-bit word travels as four bytes, low byte first, one byte
per `req`/`ack` edge, on bus bits 7:0.

**Test modes.**

| access | opcode | what it does |
|---|---|---|
| write | `1000` | test write |
| read of daughtercard address 0 | `1101` | test address read |
| any other read | `1001` | test data read |

Normal mode uses opcode `0000` for a write and `0001` for a read.

`ack` passes through two flip-flops before the state machine uses it.

**Timeout.** A 16-bit counter covers the whole transaction. If the client stops
answering:

- the counter saturates;
- the state machine drops `req` and gives up;
- a read returns `0xDEADBEEF`.

The AHIP timeout and the decoder's timeout have the same length. On a silent client
the host therefore gets `0xDEADBEEF`, whichever side gives up first. The AHIP
module then returns to idle and accepts the next access.

## What this design adds or leaves out

Choices where the original description is silent or contradicts itself:

- **Module numbers.** They follow the register map, as in the table above. A
  separate list of module numbers in the original disagrees with its own addresses.
- **`HXDIR` polarity.** Low means the controller drives `HAD`. This agrees with the
  original state tables; one signal description says the opposite.
- **Timed-out read.** It returns `0xDEADBEEF` through the status path.
- **SDRAM refresh collisions.** They delay an access instead of losing it. The
  refresh timer compares with `>=`.
- **Current-measure burst pointer.** It steps by one word, not by four.
- **`USER_ALL` and `USER_DIR` writes.** They follow the register descriptions:
  `USER_DIR` sets each direction bit by bit, and `USER_ALL` changes drive values
  without changing directions. The original module description instead has
  `USER_ALL` make every pin an output and `USER_DIR` make every pin an input.
- **8-bit AHIP byte order.** The low byte goes first.
- **AHIP acknowledge.** It is synchronised with two flip-flops.
- **Reset.** All state resets asynchronously on `nreset` low.
- **Tri-state pins.** Every bidirectional pin is split into in/out/enable. The
  board-level tri-state buffers are left to the FPGA wrapper.

Not built:

- the `CM_MASK` register, which the original controller never supported;
- AHIP burst transfers, whose header field is always zero;
- the parts around the FPGA: the PLX card, the SDRAM chips, DACs, ADCs and
  synthesizer, and the daughtercard.

  The testbenches contain behavioural models of the SDRAM, the serial ADCs, the DAC
  chain, the synthesizer's shift register and an AHIP client.

## Files

`rtl/` holds one module or package per file:

| file | contents |
|------|----------|
| `atb0_pkg.sv` | module numbers, SDRAM commands and constants, AHIP opcodes, DAC chain order |
| `atb0_controller.sv` | top level: decoder, modules, clock divider, PLX output registers |
| `decode.sv` | PLX bus slave and access sequencer |
| `sdram_ctrl.sv`, `refresh_timer.sv` | SDRAM controller and its refresh timer |
| `voltage_set.sv`, `voltage_measure.sv`, `current_measure.sv` | power-supply modules |
| `clock_set.sv`, `user_pin.sv`, `ahip.sv`, `lgaled.sv` | the other modules |
| `shiftreg_out.sv`, `shiftreg_in.sv`, `counter.sv` | helpers |

`tb/` has one self-checking testbench per module, `tb_<module>.sv`, plus the device
models:

- `sdram_model.sv`
- `serial_adc_model.sv`
- `ahip_slave_model.sv`

`tb_atb0_controller` runs the whole controller at its default parameters through the
PLX bus. Each run prints a line `TB_RESULT checks=N failures=M`. The testbench:

- checks the SDRAM power-up sequence and refresh;
- writes and reads SDRAM;
- forces refreshes to collide with accesses;
- loads and checks the DAC chain;
- measures every voltage and current;
- runs current bursts into SDRAM and reads them back;
- programs the synthesizer;
- exercises the user pins;
- runs AHIP in all four modes and through a timeout.

It counts each of these mechanisms and fails any that did not occur. The unit
testbenches shorten the timeout counters through parameters so that a timeout takes
tens of clocks instead of 65 535.

To simulate with Verilator 5, run from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_atb0_controller \
    rtl/atb0_pkg.sv tb/tb_atb0_controller.sv -Mdir obj -o sim
./obj/sim
```

Replace `tb_atb0_controller` with any other testbench name to run that test. The
whole-controller run takes well under a second.
