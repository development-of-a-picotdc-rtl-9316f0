# PicoTDC board firmware: USB 3.0 control and read-out path

This is the FPGA firmware of an evaluation board. The board carries two
PicoTDC time-to-digital converters and two LIROC SiPM/LGAD front-end chips.
A host PC talks to the board over an FTDI FT601Q USB 3.0-to-FIFO bridge.
Through it, the host configures the chips and reads out the PicoTDC hits.

The main idea is simple. The host sends bare IPbus transactions down the
USB pipe. The firmware executes them on an on-chip IPbus and streams the
replies back the same way.

Every configuration and read-out action is a register access on that bus:
- I2C frames to the chips;
- the analog-probe shift register of the LIROCs;
- the PicoTDC data FIFOs.

The rest of the design serves that idea:
- two clock domains;
- two large buffers;
- flow control in both directions;
- a reset scheme that can restart the USB side without disturbing the
  configured slaves.

```
 USB host                  FTDI domain (100 MHz, falling edge)      IPbus domain (40 MHz)
 ========   FT245 bus   +--------------+   InBuff 1024x32   +------------------+
  FT601Q  <==========>  | ft245_master | ==================> | ipbus_transactor |
                        |  read loop   |   OutBuff 65536x32 |  header/addr/data|
                        |  write loop  | <================== |  -> bus cycles   |
                        +--------------+                    +--------+---------+
                                                                     | IPbus
                                                              +------+-------+
                                                              | ipbus_fabric |
                                                              +------+-------+
        +-----------+------------+------------+--------------+-------+------+---------+
        | ctrl regs | I2C PicoTDC| I2C LIROC A| I2C LIROC B  | analog probe | TDC A rx | TDC B rx
        | (resets)  |            | + pwr/rst  | + pwr/rst    | (2 x 128 bit)| (8-bit port, own clock)
```

## Clocking

There are three kinds of clock domain:
- **FTDI domain.** The FT601Q supplies the 100 MHz FTDI bus clock. Both the
  chip and the FPGA act on its falling edge. The FTDI-side logic is clocked by
  the inverted clock, so its "rising edge" is the bus clock's falling edge.
- **IPbus domain.** Everything else runs on the 40 MHz IPbus clock.
- **PicoTDC domains.** Each PicoTDC read-out port brings its own byte clock.

The only crossings are dual-clock FIFOs and two-flop synchronisers:
- `dc_fifo` for InBuff, OutBuff and the PicoTDC receivers;
- `reset_sync` for the resets;
- two flops for the status flags.

`clk_divider` divides the IPbus clock by 64 (625 kHz). One divider drives the
LIROC slow-control core clock (`lr_clk_sm_i2c`). A second copy inside
`liroc_analog_setup` paces the probe shift register, which must stay under
1 MHz.

## The USB side: `ft245_master`

In FT245 synchronous mode the FT601Q signals with two flags:
- `RXF_N` low means the host has written data;
- `TXE_N` low means the host wants data.

The FPGA is the bus master and runs one of two loops from IDLE.

- **Master read (host → board).** When `RXF_N` is low and InBuff has room, the
  FSM spends one cycle with `OE_N` low and `RD_N` high. This is the bus
  turn-around, in which the chip takes over the data lines. It then holds
  `RD_N` low. Each cycle with `RXF_N` low and room in InBuff writes the word on
  `DATA` into InBuff.
  - The loop ends when the chip raises `RXF_N`.
  - If InBuff stays full for `TIMEOUT` cycles (1024, i.e. 10.24 µs), the loop
    ends with a read timeout.
- **Master write (board → host).** When `TXE_N` is low and OutBuff is not
  empty, `WR_N` and the OutBuff read enable go low together. The OutBuff
  output word is on `DATA` in the same cycle.
  - The loop ends when the chip raises `TXE_N`.
  - If the host asked for more words than OutBuff can supply within `TIMEOUT`
    cycles, the loop ends with a write timeout.

Strobes and enables are decoded combinationally from the state and the live
flags. A transfer therefore stops in the very cycle a flag changes, and no
word is lost or repeated.

Other details:
- A pending read is served before a pending write.
- Byte enables are driven all-ones, so every transfer is a whole word.
- Both timeout flags are sticky until the interface is reset.
- An assertion checks that the FPGA never drives `DATA` while `OE_N` is low.

## InBuff and OutBuff: `dc_fifo`

InBuff and OutBuff are dual-clock FIFOs built from the same module:
- InBuff is 1024 × 32. Commands are short: two or three words each.
- OutBuff is 65536 × 32. It must absorb PicoTDC read-out blocks.

Each FIFO is a RAM with Gray-coded pointers crossed by two-flop synchronisers,
plus one output register. The output register gives first-word-fall-through
behaviour: the oldest word is already on `rd_data` when `rd_empty` is low. The
same register also gives a capacity of DEPTH+1 words. Flags are conservative:
- `wr_full` can stay high for a few write clocks after a read;
- `rd_empty` can stay high for a few read clocks after a write.

## Command stream and replies: `ipbus_transactor`

The host sends bare IPbus 2.0 transactions with no packet header. Each
transaction is:
1. a transaction header;
2. an address word;
3. for writes, one data word per bus word.

The transaction header is laid out as follows:

| bits  | field    | request                                   | reply                     |
|-------|----------|-------------------------------------------|---------------------------|
| 31:28 | version  | 2                                         | 2                         |
| 27:16 | trans id | any                                       | copied                    |
| 15:8  | words    | 0–255                                     | words actually transferred|
| 7:4   | type     | 0 read, 1 write, 2 non-incr. read, 3 non-incr. write | copied       |
| 3:0   | info     | 0xF                                       | 0 ok, 4/5 bus error rd/wr, 6/7 timeout rd/wr |

For every transaction the transactor sends the read data words, if any, then
the status header. A request of more than 255 words must be split by the host.

A non-incrementing read keeps the address. This is how a FIFO register, such
as the PicoTDC data register, is drained at one word per bus cycle.

**The junk word.** The status header is written to OutBuff when the FSM
passes through its HEADER state. That state is entered once at the start of
every burst and once after each transaction. The first pass writes whatever
the header register holds: the last header of the previous burst, or 0 after
an interface reset. A burst of *n* transactions therefore answers with one
junk word followed by *n* replies. The host drops the first word.

Example: a single write, then a single read, sent in one burst. The reply is:

```
junk, 0x2000_0130 (write ok), <data>, 0x2001_0120 (read ok)
```

Further behaviour:
- **Flow control.** A read strobe is raised only while OutBuff has room. When
  OutBuff is full the transactor waits. When InBuff is full, the FT245 master
  waits and then times out, and it retries once there is room.
- **Errors.** A slave error or a bus timeout (255 cycles) ends the transaction
  with info 4–7. The remaining write words of that transaction are read and
  dropped, so the next header is found.
- **Invalid headers.** A word that is not a valid request header is dropped
  with a one-cycle `hdr_err` pulse. The FSM returns to IDLE and starts over
  with the next word. The host should follow an invalid header with an
  interface reset.
- **Timing.** Reads from zero-wait slaves run at one word per 40 MHz cycle.
  Writes take two cycles per word.
- **Assertion.** An assertion checks that a strobe is held until it is
  answered.

## Address map: `ipbus_fabric`

The fabric is combinational. It decodes address bits [11:8] as the slave
number and requires bits [31:12] to be zero. Any other address, or an unused
slave number, is answered with `err` in the same cycle.

| address | slave | registers |
|---------|-------|-----------|
| 0x000 | `ipbus_ctrl_regs` | 0 control (bit 0 soft reset, bit 1 interface reset; self-clearing), 1 status (= `status_o`), 2 scratch, 3 ID 0x50435444 |
| 0x100 | `ipbus_i2c_master` → PicoTDC | see I2C registers below |
| 0x200 | `ipbus_i2c_master` → LIROC A | same, plus power/reset pins |
| 0x300 | `ipbus_i2c_master` → LIROC B | same |
| 0x400 | `liroc_analog_setup` | 0 setup, 1 readback A, 2 readback B |
| 0x500 | `picotdc_readout_rx` A | 0 data (pop), 1 status |
| 0x600 | `picotdc_readout_rx` B | same |

## Resets: `reset_logic`

There are two reset domains:
- `rst_ipb` resets the IPbus slaves and the PicoTDC receivers.
- `rst_if` resets the "interface": FT245 master, InBuff, OutBuff and
  transactor.

Three sources drive them:
- The board button (`sys_rstn`) resets both.
- Soft reset (control bit 0) resets only the slaves.
- "Nuke" (control bit 1) resets only the interface. It brings the USB path
  back to a clean state without losing the chip configuration held in the
  slaves.

Each domain has a 5-bit counter that starts on a request and keeps the reset
asserted until it rolls over to zero. A single-cycle request on an idle
counter therefore produces a reset of 32 IPbus cycles.

The counters are not reset themselves. They run whenever a request is
present, so the reset lasts 1 to 32 cycles after the request is released. The
interface reset is brought into the FTDI clock domain through `reset_sync`.

A nuke is sent as an ordinary write. Its own reply is usually lost, because
OutBuff is cleared. The next burst answers with a junk word of 0.

## LIROC and PicoTDC slow control: `ipbus_i2c_master`, `i2c_master_fsm`

There are three identical I2C masters, one per bus. Each has eight registers:

| reg | name | meaning |
|-----|------|---------|
| 0 | prescaler | [15:0] SCL high time = low time, [31:16] SDA change delay after SCL falls, both in IPbus cycles. Reset value 640 / 320 (31.25 kHz) |
| 1 | device_addr | [6:0] 7-bit I2C address |
| 2 | rd | write *n* ([8:0]): read *n* bytes into the RX FIFO |
| 3 | wr | any write: send one byte from the TX FIFO |
| 4 | wr_data | push [7:0] into the TX FIFO |
| 5 | rd_data | pop one byte from the RX FIFO (0 if empty) |
| 6 | status | [0] busy, [1] no acknowledge (sticky until reset), [2] RX FIFO empty, [3] TX FIFO empty |
| 7 | pwr_rst | [1] LIROC power-on, [0] LIROC reset_n (both 0 after reset) |

Each transfer goes through these steps:
1. START.
2. The address byte with R/W, then the acknowledge slot.
3. Either one data byte (write), or *n* bytes (read). On a read the master
   acknowledges every byte except the last.
4. STOP.

SDA only changes while SCL is low, `data_setup` cycles after SCL falls, except
for the START and STOP edges. A missing acknowledge ends the transfer and
sets the sticky error bit. A start written while the master is busy is
ignored, so software polls `status[0]` between frames.

**The LIROC protocol.** A LIROC register access is three separate I2C frames.
Each frame goes to a different 7-bit address, {chip ID[3:0], frame[2:0]}.
Frame 0 carries the low byte of the 16-bit register address, frame 1 the
high byte, and frame 2 the data (written, or read back). The 16-bit address
packs an 11-bit register number *a* and a 5-bit sub-address *s* as
`{a[10:3], a[2:0], s[4:0]}`. Software builds these three frames out of
register writes. The firmware only needs a general one-byte-write /
n-byte-read master.

**The LIROC clock rule.** The LIROC slow-control core needs a clock
(`lr_clk_sm_i2c`, 625 kHz here) that is synchronous to SCL and 20 times
faster. Both clocks are derived from the same 40 MHz clock. The prescaler's
reset value, an SCL of 31.25 kHz, obeys the rule. Writing a smaller
prescaler breaks it on a real chip, although the testbench slave model does
not care.

## LIROC analog probe: `liroc_analog_setup`

Each LIROC has a 128-bit shift register that selects which internal analog
node is routed to the probe output. Exactly one bit must be 1.

Register 0 holds:
- [6:0] the position for LIROC A;
- [14:8] the position for LIROC B;
- [30] start A;
- [31] start B.

A start runs the following procedure with a 625 kHz shift clock (2⁶
divider):
1. Assert the shift-register reset for two shift-clock periods.
2. Release it and gate the shift clock to the selected chips for 256
   periods.
3. In periods 0–127, drive `srin` high in period 127−*p* only. After 128
   rising edges the single 1 sits in stage *p*, counted from `srin`.
4. In periods 128–255, send the same pattern again, so the register keeps
   its contents. Meanwhile, watch `srout`. The chip changes it on the
   falling edge; here it is sampled just before each rising edge. When a 1
   comes out in period 128+*m*, the position 127−*m* goes into the readback
   register (1 or 2).

A correctly working chain therefore reads back exactly *p*. The start bits
read as 1 until their procedure ends. One procedure takes 256 × 1.6 µs ≈
0.41 ms.

`sr_clk` is a registered copy of the gated divided clock, so it cannot
glitch. `srin` changes half a period before each rising edge.

## PicoTDC read-out: `picotdc_readout_rx`

A PicoTDC sends 32-bit frames on an 8-bit port, most significant byte first.
The receiver uses the mode in which the sync line is high with the first byte
of each frame. Two kinds of frame are dropped:
- idle frames, 0xD0D0D0D0 (and any frame whose top nibble is 0xD);
- frames cut short by an early sync.

Every other frame goes into a 1024-word dual-clock FIFO:
- data frames;
- headers (0x8 and 0x9);
- trailers (0xA);
- group separators (0xF).

On the IPbus side the registers behave as follows:
- Register 0 pops one frame, or returns 0xD0D0D0D0 when the FIFO is empty.
  A non-incrementing block read of register 0 therefore returns the
  available frames followed by idle words.
- Register 1 gives [0] empty and [1] overflow. Overflow is sticky: it is set
  when a frame arrives while the FIFO is full, and that frame is lost.

## Top level: `picotdc_board_top`

The top instantiates all of the above.

Its pads are split into input, output and output-enable signals:
- `ft_data_i/o/oe`;
- `*_scl_oe` / `*_sda_oe`, where 1 means pull low.

Index 0 of the two-element arrays is chip A and index 1 is chip B.

`status_o` is also readable at 0x001. Its bits are:
- [0] USB read timeout;
- [1] USB write timeout;
- [2] invalid header seen;
- [3] transactor busy.

The I2C master on the PicoTDC bus also has the power/reset register, but its
pins are left unconnected.

Parameters and their defaults:

| parameter | default | meaning |
|-----------|---------|---------|
| `INBUFF_DEPTH` | 1024 | InBuff words |
| `OUTBUFF_DEPTH` | 65536 | OutBuff words |
| `DIV_BITS` | 6 | LIROC clock divider (40 MHz / 2^6) |
| `TDC_FIFO_DEPTH` | 1024 | PicoTDC receiver FIFO words |

With the default sizes, synthesis gives about 1200 cells, 1170 flip-flop bits
and 2.2 Mbit of FIFO memory. Almost all of the memory is OutBuff, which maps
to block RAM.

## How far this follows the reference design

Taken from the published description of the board's firmware:
- The USB interface: the two-loop FT245 master with its timeouts, the 1024-
  and 65536-word buffers, the two clock domains and edges, and the
  transactor's header/address/data sequence with the junk word.
- The reset logic with two 5-bit stretch counters, soft reset and nuke.
- The register set of the LIROC I2C master: prescaler semantics and the
  power/reset register.
- The three-frame LIROC protocol.
- The analog-probe setup: register layout, two-period reset, 256 clocks,
  repeat-while-reading-back, and the 6-bit divider.
- The PicoTDC port format: MSB first, sync on the first byte, 0xD0 idle
  bytes.

This design's own choices:
- The address map, the control register layout and the status word.
- The I2C status bit assignment, FIFO depths and prescaler reset value, and
  the whole internal structure of the I2C master.
- The PicoTDC receivers and their register interface. The board's readout
  firmware is not described in detail.
- Read priority over write in the FT245 master, and the timeout lengths.
- The transactor's error handling: bus timeout, dropped write words, invalid
  headers.
- The probe position convention (stage *p* counted from `srin`) and the
  self-clearing start bits.

Departures:
- The transactor starts whenever InBuff is not empty, rather than on the
  0→1 edge of "not empty". The behaviour is the same for every edge, and
  the transactor also restarts if words arrived exactly as a burst ended.
- Only the four plain transaction types (0-3) are executed. The IPbus
  read-modify-write types (4 and 5) are treated as invalid headers.
- The PicoTDC's alternative sync mode (sync as a half-rate clock) is not
  supported.
- The Ethernet interface of the board's earlier firmware is not included.

## Verification

Every module has a self-checking testbench in `tb/`:

| testbench | what it checks |
|-----------|----------------|
| `tb_dc_fifo` | random traffic across unrelated clocks, ordering, capacity DEPTH+1, fill/drain, first-word latency |
| `tb_sync_fifo` | reference-model comparison, full/empty/count under random traffic |
| `tb_ft245_master` | read loop with turn-around, InBuff-full stall and resume, write loop, write and read timeouts, no bus contention (with `ft601_model`) |
| `tb_ipbus_transactor` | single, block and FIFO reads and writes, zero-word transactions, bus error and timeout, invalid header, OutBuff-full stall, exact reply stream |
| `tb_reset_logic` | which reset each source drives, and the stretch length |
| `tb_ipbus_fabric` | decoding, strobe routing, unmapped-address errors |
| `tb_ipbus_ctrl_regs` | reset pulses, scratch, status, ID |
| `tb_i2c_master_fsm` | bit-level frames, START/STOP, SDA timing, ACK/NACK, missing acknowledge (with `liroc_i2c_model`) |
| `tb_ipbus_i2c_master` | LIROC three-frame register write and read through the registers, SCL period, acknowledge error, power/reset pins |
| `tb_liroc_analog_setup` | positions on A, B and both; reset length; 256 clocks; one 1 in the right stage; readback (with `liroc_probe_model`) |
| `tb_clk_divider` | period, duty cycle, tick placement |
| `tb_picotdc_readout_rx` | frames, idles, gaps and truncated frames across clocks; overflow |
| `tb_picotdc_board_top` | end to end at the default sizes (see below) |

`tb_picotdc_board_top` drives the whole firmware from the USB side. It uses
models of the FT601Q, two LIROC I2C slaves, two probe shift registers and two
PicoTDC ports. The host model sends IPbus transactions, and a checker
compares every returned word with the expected stream.

Each mechanism below is counted, and the test fails if any one never
happens:
- read and write loops, turn-around, junk words;
- single, block and PicoTDC block reads;
- idle-frame removal;
- LIROC register write and read on both chips, and the power pins;
- I2C missing acknowledge;
- probe setup on both chips;
- bus error, invalid header;
- soft reset, nuke;
- write timeout, read timeout;
- OutBuff-full and InBuff-full stalls.

The stall test sends 300 block reads of 255 words plus 600 writes without
reading, so both buffers fill. It then drains all 77,400 reply words. The
whole test runs at the default parameters in well under a minute.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/ipbus_pkg.sv tb/tb_picotdc_board_top.sv --top-module tb_picotdc_board_top
./obj_dir/Vtb_picotdc_board_top
```

Each testbench ends with a line `TB_RESULT checks=N failures=M`. It has a
watchdog that counts a failure if the test does not end in time.

## Limits

- The FT601Q, LIROC and PicoTDC models are behavioural. They follow the
  chips' documented bus behaviour, not silicon timing. No I/O timing
  constraints are given.
- The LIROC 20× clock rule is obeyed by the prescaler's reset value only.
  Software must keep any other prescaler value slower.
- IPbus reads of both PicoTDC ports together drain at most one word per
  40 MHz cycle. That is well above test-beam rates, but below a PicoTDC
  port's peak rate of 80 Mwords/s.
