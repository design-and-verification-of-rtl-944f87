# VME64x slave FPGA for a four-channel analog output card

This is the control FPGA of a VME64x analog output card (AOC). The card has
four analog outputs (0-10 V or 4-20 mA) driven by 14-bit DACs. It can also
read any output back, either at the DAC or at the card's output connector,
through two levels of analog multiplexers and an ADC. The FPGA sits between
the asynchronous VME bus and these parts. It does five jobs:

* it is a D16 slave in A16 and A24 space and answers read and write cycles
  with a DTACK* that it asserts after a set delay and actively drives high
  ("rescinds") before releasing it;
* it loads DAC codes into a quad parallel DAC, and into a serial DAC that
  may be fitted for channel 3 instead;
* it runs read-back conversions: it selects the channel on the multiplexers,
  waits for the amplifiers to settle, starts the ADC and stores the result;
* it provides two diagnostic registers for finding stuck data lines, and a
  software reset;
* it is a D16 interrupter with seven request levels and the IACK daisy
  chain.

Everything is synchronous to one FPGA clock, `clk`. The VME strobes are
synchronised before any logic uses them, so all bus timing is in whole
clocks. The testbenches run the clock at 50 MHz.

## Programming model

Software sees eight 16-bit registers. A03-A01 select them:

| A03-A01 | Write                                              | Read                          |
|---------|----------------------------------------------------|-------------------------------|
| 000     | DAC 0 code (D13-D00)                               | 0000                          |
| 001     | DAC 1 code                                         | 0000                          |
| 010     | DAC 2 code                                         | 0000                          |
| 011     | DAC 3 code; the full word also goes to the serial DAC | 0000                       |
| 100     | start a conversion of channel D02-D00              | last ADC result               |
| 101     | diagnostic register 1                              | diagnostic register 1         |
| 110     | diagnostic register 2                              | diagnostic register 2         |
| 111     | any value: software reset                          | status: bit 0 = conversion busy |

Read-back channels, given by the 3-bit channel number `c`:

* `mux_2_sel = c` drives the 8:1 second-level multiplexer.
* `mux_1_sel = c[1:0]` drives the 4:1 first-level multiplexer, which picks
  one of the four isolated field-current signals.

The board is expected to wire the four DAC outputs to second-level inputs
0-3 and the amplified first-level output to inputs 4-7. Then channels 0-3
read the DAC outputs and channels 4-7 read the field current of outputs 0-3.

Typical use:

* Write a code to 000-011 to change an output.
* Write 100 with a channel number, poll 111 until bit 0 is 0, then read 100.
  A convert command sent while bit 0 is 1 is ignored.
* For the data-line test, write 5555 and AAAA to the two diagnostic
  registers and read them back, then swap the patterns. A stuck line shows
  up as a wrong bit.

## Board address

The card's base address comes from the VME64x geographical address pins
(GA4*-GA0*, inverted, giving the slot number):

| Space | Address modifiers      | Decode                                |
|-------|------------------------|---------------------------------------|
| A24   | 39, 3A, 3D, 3E (hex)   | A23-A19 = slot, A18-A04 = 0           |
| A16   | 29, 2D                 | A15-A11 = slot, A10-A04 = 0           |

For example, a card in slot 5 has diagnostic register 1 at A24 address
0x28000A and at A16 address 0x280A.

The decoder accepts a cycle only when all of these hold:

* AS*, DS0* and DS1* are low, so it is a 16-bit transfer;
* LWORD* is high;
* IACK* is high.

Byte transfers, 32-bit transfers, other modifiers and slot 0 (all GA pins
high) get no DTACK*. The master then ends the cycle with its bus-error
timeout.

## One bus cycle, clock by clock

This is the part that needs the most care in a synchronous VME slave. The
master's strobes have no relation to `clk`.

1. **Synchronise** (`latch_sync_blk`). AS*, DS0*, DS1*, WRITE*, IACK*,
   IACKIN* and LWORD* each pass through two flip-flops (`SYNC_STAGES`).
   Address and modifier are not synchronised bit by bit. Instead a
   register follows them while the synchronised AS* is high and freezes
   when it goes low. Because the synchronised AS* lags the pin by two
   clocks, the frozen value was sampled after the real AS* edge, when the
   master was already holding the address stable. So the latched address
   is valid in the same clock in which the logic first sees AS* low.
2. **Select** (`add_am_dec`). A registered decode gives `board_sel_sig_n`.
   It goes low one clock after the synchronised strobes allow it, and stays
   low until a data strobe goes high.
3. **Register action.** Each register block watches for the falling edge of
   `board_sel_sig_n` and acts once per cycle. Write data is sampled from
   the bus at that point. The VME master puts write data on the bus before
   it asserts DS*, and DS* has taken three clocks to get here, so the data
   has long been stable.
4. **Read data** (`tri_state_bus_logic`). On a selected read the FPGA drives
   D15-D00 as soon as `board_sel_sig_n` is low. `data_buf_en_n` goes low at
   the same time and can steer the board's data transceivers.
5. **DTACK*** (`dtack_gen`). DTACK* falls `DTACK_DELAY`+1 clocks after the
   select, so read data has at least `DTACK_DELAY` clocks of setup. It stays
   low until the select drops, which happens when the master releases the
   data strobes. DTACK* is then driven high for `RESCIND_CYCLES` clocks and
   released (`dtack_oe` low). Driving it high actively makes the line rise
   faster than the pull-up alone could.
   The FPGA stops driving D15-D00 in the clock before DTACK* rises. A
   master starts its next data transfer only after it sees DTACK* high, so
   the two cannot collide on the data bus.

With the default parameters, DTACK* falls 4 to 5 clock periods after DS*
falls: 2 synchroniser clocks, 1 decode clock and 2 DTACK clocks, plus the
phase of DS* against the clock. That is 80-100 ns at 50 MHz. DTACK* rises 3 to
4 clock periods after DS* rises. The end-to-end testbench checks the 4-to-5-period
window on every cycle.

## DAC loading

**Parallel DAC** (`parallel_dac_if`). A write to 000-011 sets:

* `dac_addr` to A02-A01;
* `dac_data` to D13-D00.

After `WR_SETUP` clocks, `dac_wr_n` goes low for `WR_PULSE` clocks. The DAC
takes the word on the rising edge of `dac_wr_n`. Address and data stay on
the pins until the next load. `dac_clr_n` is low during power-on and
software reset.

**Serial DAC** (`serial_dac_if`). A write to 011 also sends all 16 data bits
to the serial DAC as one frame:

* `sdac_sync_n` falls and `sdac_sdin` shows bit 15;
* `sdac_sclk` (idle high) toggles every `SCLK_HALF` clocks;
* the DAC samples on falling edges, MSB first;
* `sdac_sync_n` rises after the 16th bit.

`busy_bit` is high for the `32*SCLK_HALF` clocks of the frame. A write to
011 during a frame does not start a new frame. Because 011 drives both
interfaces, either kind of DAC can be fitted for channel 3 without changing
the FPGA.

## Read-back conversion

`read_back_ctrl` is a five-state sequencer:

1. **IDLE.** A write to 100 loads the multiplexer selects from D02-D00 and
   sets busy.
2. **SETTLE.** Waits `SETTLE_CYCLES`+1 clocks for the isolation amplifiers
   and multiplexers (default 500 clocks, 10 us at 50 MHz).
3. **SOC.** Pulls `adc_rc_n` low for `ADC_RC_PULSE` clocks. This is the
   start-of-conversion command.
4. **WAIT_BUSY.** Waits for the ADC to pull `adc_busy_n` low.
5. **WAIT_EOC.** Waits for `adc_busy_n` to rise again (end of conversion).
   It then stores `adc_data` in the read-back register (`data_out`, also a
   pin) and clears busy.

`adc_busy_n` is resynchronised with two flip-flops. So `adc_data` is sampled
two clocks after the ADC ends the conversion, and must hold its value for
that long. The controller has no timeout. If the ADC never answers, busy
stays set until a software reset.

## Interrupts

Interrupter behaviour (`vme_interrupter`):

* **Requests.** Each of the seven levels has a request input
  `irq_req[n-1]`. A rising edge makes level n pending, and a pending level
  sets `irq7_1[n-1]`. That output is the enable of the board's
  open-collector IRQn* driver.
* **Acknowledge.** The handler runs an IACK cycle with the level on A03-A01.
  Once IACKIN* and DS0* are low, the interrupter decides:
  * if that level is pending here, it drives the status/ID
    `{STATUS_ID_BASE[15:3], level}` with DTACK*, and the level stops being
    pending when the cycle ends (release on acknowledge);
  * otherwise it passes the acknowledge on: `iack_out` (IACKOUT*, low
    active) is low until IACKIN* is released.

Interrupt acknowledges share the DTACK* generator and the data driver with
register cycles.

## Software reset

A write of any value to 111 makes `sw_reset_gen` pull `card_rst_n` low for
`RST_PULSE` clocks. `card_rst_n` also follows the power-on `reset_n`.

**What it resets:**

* the DAC interfaces, which pulse `dac_clr_n`, `sdac_clr_n` and
  `sdac_rstin_n`;
* the read-back controller and its result;
* the diagnostic registers.

**What it leaves running:** the bus interface (synchroniser, decoder, DTACK*
generator and interrupter). So the write that triggered the reset still
completes normally.

## Pins of `aoc_fpga_top`

| Group | Pins |
|-------|------|
| Clock, reset | `clk`, `reset_n` (asynchronous, low active) |
| VME in | `vme_addr[23:1]`, `vme_am[5:0]`, `vme_as_n`, `vme_ds_0_n`, `vme_ds_1_n`, `vme_write_n`, `vme_lword_n`, `vme_iack_n`, `vme_iack_in` (IACKIN*), `vme_ga_n[4:0]` |
| VME out | `dtack_n` with enable `dtack_oe`, `iack_out` (IACKOUT*), `irq7_1[6:0]` (IRQ7*-IRQ1* drive enables), `board_sel_sig_n`, `data_buf_en_n` |
| VME data | `bidir_data_bus[15:0]`, tri-state inout |
| Parallel DAC | `dac_data[13:0]`, `dac_addr[1:0]`, `dac_wr_n`, `dac_clr_n` |
| Serial DAC | `sdac_sync_n`, `sdac_sclk`, `sdac_sdin`, `sdac_clr_n`, `sdac_rstin_n`, `busy_bit` |
| Read-back | `mux_1_sel[1:0]`, `mux_2_sel[2:0]`, `adc_rc_n`, `adc_busy_n`, `adc_data[15:0]`, `data_out[15:0]` |
| Other | `irq_req[6:0]` (card interrupt sources), `a24_mode` (last access was A24) |

The board is assumed to supply:

* VME transceivers for the data bus;
* an open-collector or tri-state driver for DTACK*;
* open-collector drivers for the IRQ lines.

## Parameters

All timing parameters are in FPGA clocks. None of the values is given by the
card description, so all are choices of this design and should be set to
the data sheets of the parts fitted.

| Parameter | Default | Meaning |
|-----------|---------|---------|
| `SYNC_STAGES` | 2 | synchroniser depth of the VME strobes |
| `DTACK_DELAY` | 1 | extra clocks between select and DTACK* |
| `RESCIND_CYCLES` | 1 | clocks DTACK* is driven high before release |
| `DAC_WR_SETUP` | 1 | address/data setup before `dac_wr_n` |
| `DAC_WR_PULSE` | 2 | width of `dac_wr_n` |
| `SCLK_HALF` | 2 | half period of `sdac_sclk` |
| `SETTLE_CYCLES` | 500 | settling delay before a conversion |
| `ADC_RC_PULSE` | 2 | width of the `adc_rc_n` start pulse |
| `RST_PULSE` | 16 | length of the software reset |
| `STATUS_ID_BASE` | 16'h00A0 | upper 13 bits of the interrupt status/ID |

## Source structure

One module per file in `rtl/`, with shared constants in `vme_aoc_pkg`:

```
aoc_fpga_top
 |- latch_sync_blk       strobe synchroniser, address/AM latch
 |- add_am_dec           board select decoder
 |- dtack_gen            DTACK* with delay and rescinding release
 |- vme_interrupter      D16 interrupter, IACK daisy chain
 |- sw_reset_gen         software reset on writes to 111
 |- reg_diag             diagnostic registers 101, 110
 |- tri_state_bus_logic  read multiplexer and D15-D00 driver
 |- parallel_dac_if      parallel DAC loader
 |- serial_dac_if        serial DAC frame generator
 `- read_back_ctrl       multiplexer select, settle, SOC/EOC, result register
```

The partition and most internal signal names follow the original card
design. Its VHDL is not reproduced here; this is an independent
SystemVerilog implementation.

## How far this follows the original card design

**Taken from the card description:**

* the block partition;
* the register map and what each register does;
* the pin names;
* the A16/A24 D16 slave function;
* the read-back sequence (select, settle, start, end of conversion, store),
  the busy bit, and ignoring a convert command while busy;
* software reset by writing any word to 111;
* the data-line test through the diagnostic registers;
* the D16 interrupter with seven levels;
* the rescinding DTACK*.

**Chosen here, because the description leaves it open:**

* the base-address layout and the list of address modifiers;
* rejecting non-16-bit transfers;
* every delay and pulse width;
* the serial-DAC frame format, and using register 011 for it;
* the mapping of channel numbers onto the multiplexers;
* the ADC handshake polarity (low `adc_rc_n` pulse, low `adc_busy_n`);
* the interrupt sources, release mode and status/ID format;
* what the software reset covers;
* the `dtack_oe`, `data_buf_en_n`, `irq_req` and `a24_mode` ports.

**Points where the description is inconsistent, and what was done:**

* **Bus widths.** The pin list names a 31-bit address and a 32-bit data
  bus, but the card is specified as A16/A24 with D16 and the schematic
  shows `vme_addr[23:1]` and a 16-bit data bus. The narrower widths are
  used.
* **DAC channel 3.** One place says four parallel DAC channels plus one
  serial DAC. Another shows channels 0-2 parallel and channel 3 as
  "parallel/serial". Here all four channels are on the parallel interface,
  and channel 3 is also sent to the serial DAC.
* **DAC channel address.** The parallel DAC is said to have channel
  address pins A0-A2, but the FPGA's `dac_addr` is 2 bits wide. Two bits
  are used, enough for four channels.
* **Status register.** The original schematic ties the status register to
  zero and feeds the raw ADC pins to the read multiplexer. The text says
  bit 0 of the status register is the busy bit and register 100 holds the
  stored result. The text is followed.
* **Interrupter.** The original schematic ties the IRQ and IACKOUT* outputs
  to constants, although the text describes an interrupt interface. The
  interrupter here is an implementation of that text.
* **Reading DAC registers.** One sentence can be read as DAC values being
  readable through A03-A01. Nothing in the design gives the read
  multiplexer the DAC codes, so DAC registers read as zero.

**Not in the FPGA.** The DACs, ADC, multiplexers, amplifier, isolators, V/I
converters and VME transceivers are board parts. Only their control pins
appear here. The testbenches model the ADC and the serial DAC receiver
behaviourally.

## Verification

Every module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`.
Each one:

* compares against values worked out in the testbench;
* checks cycle counts wherever timing is defined (synchroniser latency,
  DTACK* delay and rescind time, DAC write setup and width, serial frame
  length, settling delay before start of conversion, reset pulse length);
* ends with a `TB_RESULT checks=N failures=M` line.

Each testbench has also been shown to fail when its module is given one
deliberate bug.

`tb/tb_aoc_fpga_top.sv` runs the whole FPGA at its default parameters. It
uses a bus-functional VME master and the behavioural models
`tb/adc_model.sv` and `tb/sdac_model.sv`. It covers:

* the diagnostic pattern test in A24 and A16;
* accesses to another slot, an A32 modifier and an unused A16 address,
  none of which may be answered;
* loads of all four DACs, including the serial frame for channel 3;
* conversions of all eight read-back channels, with status polling and a
  convert command while busy;
* the software reset;
* interrupt acknowledges that are answered and ones that are passed on.

It counts each of these mechanisms and fails if one never happens. It
checks the DTACK* latency and the rescinding release on every cycle. It
takes well under a second.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb --top-module tb_aoc_fpga_top \
          rtl/vme_aoc_pkg.sv tb/tb_aoc_fpga_top.sv
./obj_dir/Vtb_aoc_fpga_top
```

Replace the testbench name to run another one. The package must be listed
first. The RTL also parses and elaborates with the slang front end of Yosys.
Yosys's coarse synthesis of the whole top currently stops at the inout data
bus passed through `tri_state_bus_logic`, a front-end limitation. Every
other module synthesises on its own.

## Limits

* Only 16-bit single transfers are supported: no block transfers, no
  byte lanes, no A32 or CR/CSR space. The card description asks for
  nothing more.
* The VME timing is verified only against the protocol order (AS*, DS*,
  DTACK*, release) and the clock counts above. It has not been checked
  against the nanosecond limits of the VME standard at a particular clock
  frequency. With a slow `clk`, DTACK* comes late but correctly.
* The interrupt request inputs are edge-triggered. A source that needs
  level-triggered requests would need a small change in
  `vme_interrupter`.
* Lint leaves a few warnings: unused address bits in the decoder, unused
  data bits in the read-back controller, and the reset used both as an
  asynchronous reset and as an assertion disable.
