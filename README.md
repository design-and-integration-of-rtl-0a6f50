# AXI4 NAND flash controller

This controller lets a processor on an AXI4 bus use an ordinary 8-bit asynchronous
SLC NAND flash chip as storage. To software it looks like a small set of
registers and one streaming data address. Behind them it produces the flash
pin protocol: CLE, ALE, WE_n, RE_n, CE_n, the I/O byte and the R/B wait. It
runs the basic flash operations: reset, page program, page read, block
erase, read status (with a cheaper status re-read) and read ID. The page
program reports pass or fail from the flash status byte, and so does the
block erase.

The intended system is an OpenPOWER-based SoC on an FPGA with a 250 MHz system
clock and a 2 Gbit-class part with 2048-byte pages. The RTL's default
parameters are set for that case.

```
             +---------------+    +-----------+    +-----------+    +-------------+
 AXI4  <---> | nfc_axi_slave | -> | nfc_regs  | -> | nfc_main_ | -> | nfc_timing_ | <---> NAND pins
 slave       |  register and |    |  ROW COL  |    |   fsm     |    |   fsm       |   CE_n CLE ALE
             |  data window  | <- |  LEN CMD  | <- | operation |    | one bus     |   WE_n RE_n
             |               |    |  STATUS ID|    | sequences |    | cycle at a  |   IO[7:0] R/B
             |               | <==== byte streams ====>         |    | time        |
             +---------------+    +-----------+    +-----------+    +-------------+
```

| File | Contents |
|---|---|
| `rtl/nfc_pkg.sv` | Flash command bytes, operation codes, bus-cycle kinds, register offsets, AXI response codes |
| `rtl/nand_flash_ctrl.sv` | Top: the four blocks wired together, AXI4 slave port and flash pins |
| `rtl/nfc_axi_slave.sv` | AXI4 slave (one burst per direction at a time) |
| `rtl/nfc_regs.sv` | Register file and operation start logic |
| `rtl/nfc_main_fsm.sv` | Operation sequencer |
| `rtl/nfc_timing_fsm.sv` | Pin-level timing of one bus cycle |
| `tb/nand_flash_model.sv` | Behavioural flash chip used by the testbenches; it also checks the protocol |
| `tb/tb_*.sv` | One self-checking testbench per block, plus an end-to-end one |

## Using it from software

### Register map

All registers are 32 bits wide. The controller decodes only address bits [4:0].

| Offset | Name | Access | Contents |
|---|---|---|---|
| 0x00 | CMD | W/R | Write an operation code to start it: 1 reset, 2 page program, 3 page read, 4 block erase, 5 read status, 6 read ID, 7 status re-read. Reading returns the last code started. |
| 0x04 | STATUS | R | [0] busy, [1] R/B pin (1 = ready), [2] error, which is bit 0 of the last flash status byte, [3] done, [15:8] last flash status byte, [18:16] current or last operation |
| 0x08 | ROW | R/W | [23:0] row (page) address, sent as three address cycles |
| 0x0C | DATA | stream | Data window: page bytes, one per beat, in bits [7:0] |
| 0x10 | COL | R/W | [15:0] column (byte in page), sent as two address cycles |
| 0x14 | LEN | R/W | Bytes moved by a page program or page read. It resets to 2048. |
| 0x18 | ID | R | First four Read ID bytes, first byte in [7:0] |

The done bit is sticky: it is set when an operation ends and cleared when the
next one starts. Writes honour WSTRB.

A write to CMD while an operation is running is refused and answered with
SLVERR. So is an unknown code (0, or above 7 in bits [7:0]). A refused write
changes nothing.

### The operations

- **Reset** (CMD=1): the controller sends FFh and waits for R/B. It does this
  by itself once after `aresetn` is released, as soon as R/B reads ready.
  Until then STATUS shows busy.
- **Page program**: write ROW, and COL and LEN if they are not 0 and 2048.
  Then write LEN bytes to DATA, in one or more bursts of up to 256 beats. The
  first data burst starts the program, so no CMD write is needed. CMD=2 also
  starts it, and the bytes then follow on DATA. The write response of the
  burst that carries the last byte comes only after the flash has finished
  programming and its status byte has been read. That response is SLVERR if
  the flash reported a failure. The responses of earlier bursts come as soon
  as their beats are taken.
- **Page read**: write ROW (and COL, LEN), then read LEN beats from DATA, in
  one or more bursts. The first read burst starts the operation.
- **Block erase** (CMD=4): erases the block containing ROW. Poll STATUS until
  done. The error bit then gives the result.
- **Read status** (CMD=5): reads the status byte into STATUS[15:8].
- **Status re-read** (CMD=7): a flash that has just received 70h keeps
  returning its status byte on every RE_n pulse. So if the last command the
  controller sent was 70h, the status is read again without a new 70h. This
  holds after every program, erase or read status. Otherwise 70h is sent
  first, exactly as for CMD=5.
- **Read ID** (CMD=6): reads four bytes into ID.

A program of a whole 2048-byte page, as bus transactions:

```
AW 0x08, W row          -> B OKAY
AW 0x0C len 255, W x256 -> B OKAY      (bytes 0..255)
   ... six more bursts ...
AW 0x0C len 255, W x256 -> B OKAY/SLVERR after the flash has finished
```

## The data window: how AXI bursts become flash data cycles

This is the least obvious part of the design. The main reasons:

- An AXI4 burst has at most 256 beats, but a flash page has 2048 bytes or
  more. A page therefore cannot end on WLAST.
- The flash must receive the page bytes between its 80h and 10h commands
  without another command in between.
- The host has to learn the program result from somewhere.

The controller settles this as follows:

1. **The byte count closes the page, not WLAST.** LEN, default 2048, sets how
   many data cycles follow the address. The main FSM counts them and sends 10h
   after the last one. Bursts are only a transport: the first data-window
   write burst while idle starts the program, and later write bursts to 0x0C
   are accepted while that program still waits for data.
2. **Back-pressure.** Each beat is passed straight on as one flash data cycle.
   WREADY is high only while the main FSM asks for a byte, and a byte takes
   36 clocks at the default timing (144 ns at 250 MHz). A burst therefore
   streams at the flash's speed and needs no page buffer in the controller.
3. **The response of the last burst is held.** The burst that completes the
   page gets its B response only after 10h, the tWB and R/B wait, 70h, tWHR and
   the status read. Its BRESP is SLVERR if status bit 0 is set. An earlier
   burst is answered OKAY once the main FSM asks for the next byte. That tells
   the two cases apart without counting in the slave. Beats past the end of
   the page are dropped and answered SLVERR.
4. **Reads mirror this.** The first read burst from 0x0C while idle starts a
   page read. Each flash read cycle begins only after the previous byte was
   taken by an R beat, so RREADY stalls simply slow down the flash. Read beats
   asked for after the page has ended return 0 with SLVERR.
5. **Arbitration.** One operation runs at a time. A data-window burst for a
   different operation, or any data burst during an erase, waits with
   AWREADY or ARREADY low until the controller is idle. A program start or a
   CMD write in the same clock wins over a read start. A register read burst
   is served whenever the read channel is not in the middle of a page-read
   burst. Reading STATUS while an operation runs is the normal way to poll. A
   register write waits while the write channel holds the final response of a
   program.

The burst address is not incremented: every beat of a burst addresses the same
register or the data window. AWSIZE, ARSIZE, AWBURST and ARBURST are ignored.
Data goes in bits [7:0] of the bus, and the upper bits of a write beat are
ignored.

## Operation sequences (nfc_main_fsm)

The main FSM expands each operation into a list of bus cycles. It hands them
one at a time to the timing FSM through a valid/ready request and a one-clock
`done`. Each cycle is one of:

- command (CLE)
- address (ALE)
- data write
- data read
- wait tWB then R/B
- wait tWHR

| Operation | Bus cycles |
|---|---|
| Reset | FFh, wait tWB and R/B |
| Page program | 80h, C0, C1, R0, R1, R2, LEN data writes, 10h, wait tWB and R/B, 70h, wait tWHR, read status |
| Page read | 00h, C0, C1, R0, R1, R2, 30h, wait tWB and R/B, LEN data reads |
| Block erase | 60h, R0, R1, R2, D0h, wait tWB and R/B, 70h, wait tWHR, read status |
| Read status | 70h, wait tWHR, read status |
| Status re-read | wait tWHR, read status, if the last command sent was 70h; otherwise as read status |
| Read ID | 90h, 00h (address), wait tWHR, four data reads |

C0/C1 are the low and high bytes of COL. R0/R1/R2 are bytes [7:0], [15:8] and
[23:16] of ROW. After a program or erase, **status bit 0 = 1 means failure**,
and the FSM copies it to the error bit. CE_n is low from the first cycle of an
operation to its last and high while idle. The FSM also owns the two byte
streams toward the AXI slave: it accepts a program byte only in the data
phase, and offers a read byte until it is taken.

## Pin timing (nfc_timing_fsm)

Every flash pin output comes straight from a flip-flop.

In a write-type cycle (command, address or data):

1. CLE or ALE and the byte are set up for `T_SETUP` clocks.
2. WE_n is low for `T_WP` clocks.
3. WE_n goes high and stays high for `T_WH` clocks, with CLE/ALE and the byte
   still held.

The flash latches the byte on the rising edge of WE_n.

In a read cycle, RE_n is low for `T_RP` clocks. The bus is sampled on the
clock edge that raises RE_n, and RE_n then stays high for `T_REH` clocks.

CLE and ALE are active high: a command has CLE=1 and ALE=0, an address has
ALE=1 and CLE=0. R/B passes through a two-flop synchroniser. The wait after
10h, 30h, D0h or FFh first lets `T_WB` clocks pass, so the flash has time to
pull R/B low. It then waits for R/B to read high.

Cycle costs, from the handshake edge to `done`:

| Cycle | Clocks |
|---|---|
| Write-type | T_SETUP+T_WP+T_WH |
| Read | T_RP+T_REH |
| Wait tWB, R/B already high | T_WB+1 |
| Wait tWHR | T_WHR |

The main FSM adds about two clocks between cycles. A program data byte
therefore takes T_SETUP+T_WP+T_WH+2 = 36 clocks at the defaults.

| Parameter | Default | At 4 ns | Flash spec (mode 0) |
|---|---|---|---|
| `T_SETUP` | 13 | 52 ns | tCLS/tALS/tDS ≥ 50 ns (with tCS) |
| `T_WP` | 13 | 52 ns | tWP ≥ 50 ns |
| `T_WH` | 8 | 32 ns | tWH ≥ 30 ns, also covers tCLH/tALH/tDH |
| `T_RP` | 13 | 52 ns | tRP ≥ 50 ns |
| `T_REH` | 8 | 32 ns | tREH ≥ 30 ns |
| `T_WB` | 50 | 200 ns | tWB ≤ 200 ns |
| `T_WHR` | 30 | 120 ns | tWHR ≥ 60-120 ns |

These are conservative values for asynchronous timing mode 0. For a faster
part or another clock, override them on `nand_flash_ctrl`. The read sample
point assumes that tREA (RE_n low to data valid) plus the board delay is less
than `T_RP` clocks.

## Top-level parameters and ports

`nand_flash_ctrl` parameters:

| Parameter | Default | Meaning |
|---|---|---|
| `ID_W` | 4 | AXI ID width |
| `ADDR_W` | 32 | AXI address width |
| `DATA_W` | 32 | AXI data width (≥ 32) |
| `PAGE_BYTES` | 2048 | Reset value of LEN |
| `LEN_W` | 16 | Width of LEN and of the byte counter |
| `T_*` | see above | Pin timing in clocks |

Ports:

- `aclk` and `aresetn`, active-low and asynchronous.
- A full AXI4 slave: `s_axi_aw*`, `s_axi_w*`, `s_axi_b*`, `s_axi_ar*`,
  `s_axi_r*`.
- The flash pins: `nf_ce_n`, `nf_cle`, `nf_ale`, `nf_we_n`, `nf_re_n`,
  `nf_io_o[7:0]`, `nf_io_oe`, `nf_io_i[7:0]` and `nf_rb`. `nf_rb` needs a
  pull-up on the board, because the flash's R/B is open-drain.

The bidirectional I/O bus is split into out, enable and in. Join them at the
pad: `assign IO = nf_io_oe ? nf_io_o : 'z; assign nf_io_i = IO;`.

The 24-bit row and 16-bit column cover devices far beyond 2 GB. A 2 Gbit part
with 2048-byte pages uses 17 row bits, and a 2 GB one 20.

## Where this design departs from, or adds to, the source description

The description this controller was built from is inconsistent in a few
places. The choices made:

- **Address order.** The prose mentions "two row and three column" cycles.
  The program and read flows list two column cycles and then three row
  cycles. The RTL follows the flows, which is also what real devices need.
- **Status polarity.** The prose calls status 1 a successful program. The
  flows test bit 0 = 0 for success and branch to an error otherwise. The RTL
  follows the flows, which match real devices: bit 0 = 1 is FAIL.
- **Address latch.** The prose says an address is latched with both ALE and
  CLE high. The signal traces show ALE pulsing with CLE low during address
  cycles. The RTL drives ALE=1 and CLE=0, as real devices require.
- **Status re-read.** The source notes that repeated status reads need not
  resend 70h. Operation 7 does that. The main FSM keeps a one-bit "status
  mode" flag, set when 70h is sent and cleared by any other command, to know
  when it is safe. The tWHR wait is kept because it also covers the CE_n-low
  to data-out time.
- **tWHR before status reads.** The erase flow waits tWHR between 70h and the
  status read, but the program flow and the stand-alone read-status flow show
  no wait. The RTL waits tWHR in all three, because the flash needs it.
- **Own additions.** None of the following is specified in the source:
  - the register map
  - the operation codes
  - the multi-burst page handling and held write response
  - SLVERR reporting
  - the Read ID sequence (90h, 00h, four bytes)
  - the numeric timing defaults
  - the automatic reset after `aresetn`
  - the status-mode flag of the re-read
- **Not included.** There is no ECC, no spare-area management, no bad-block
  handling, no cache or multi-plane commands and no write-protect pin (WP_n
  is left to the board). There is also no DMA: data passes one byte per AXI
  beat. With LEN set above 2048, a page read or program can reach the spare
  bytes.
- **Processor side.** The processor, interconnect, debug and clocking IP of
  the surrounding SoC are not part of this RTL. The AXI4 slave port is where
  they connect.

## Verification

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_nfc_timing_fsm` | Which strobe latches each byte, the setup and pulse widths counted on the pins, the read sample, the tWB/R-B and tWHR wait lengths |
| `tb_nfc_main_fsm` | Every operation against the flash model: the command and address bytes received, data written and read back under random read stalls, program and erase failures, ID bytes, a status re-read with and without a new 70h, CE_n during strobes |
| `tb_nfc_regs` | Reset values, strobed writes, STATUS/ID fields, start priority, refusal while busy or for an unknown code, the sticky done bit |
| `tb_nfc_axi_slave` | Register bursts and IDs, RLAST, a page over two bursts with the held last response, a program failure and an over-long burst giving SLVERR, a two-burst page read, reading past the page, a held data burst |
| `tb_nand_flash_ctrl` | End to end at the default parameters, through AXI only (see below) |

`tb_nand_flash_ctrl` covers:

- power-up reset and Read ID
- a 2048-byte page programmed in eight 256-beat bursts and read back
- block erase, then a read showing the page erased
- read status, and a status re-read that sends no 70h
- an injected program failure and an injected erase failure
- a refused command and a reset command

It counts each mechanism and fails if one never occurs: R/B busy waits, write
back-pressure, read waits, multi-burst pages, both error paths, the refused
command and the status re-read. It also checks the flash-side rate of 36 clocks per program byte.
The flash model counts protocol violations, and any violation is a failure:
short WE_n or RE_n pulses, CLE and ALE together, a latch without CE_n, or a
command while busy.

The flash model (`tb/nand_flash_model.sv`) keeps its memory in an associative
array. Programming ANDs bits in, as real NAND does, and erase clears
64-page blocks. Its busy times are short so that simulations stay quick.

## Simulating

With Verilator 5. Each testbench is built from the package, the RTL it needs
and the flash model:

```sh
# end-to-end, default parameters (a few seconds)
verilator --binary --timing -Wno-fatal -Irtl --top-module tb_nand_flash_ctrl \
  rtl/nfc_pkg.sv rtl/nfc_timing_fsm.sv rtl/nfc_main_fsm.sv rtl/nfc_regs.sv \
  rtl/nfc_axi_slave.sv rtl/nand_flash_ctrl.sv tb/nand_flash_model.sv \
  tb/tb_nand_flash_ctrl.sv -o sim
./obj_dir/sim +verilator+rand+reset+2

# single blocks
verilator --binary --timing -Wno-fatal --top-module tb_nfc_timing_fsm \
  rtl/nfc_pkg.sv rtl/nfc_timing_fsm.sv tb/tb_nfc_timing_fsm.sv -o sim_t
verilator --binary --timing -Wno-fatal --top-module tb_nfc_main_fsm \
  rtl/nfc_pkg.sv rtl/nfc_timing_fsm.sv rtl/nfc_main_fsm.sv \
  tb/nand_flash_model.sv tb/tb_nfc_main_fsm.sv -o sim_m
verilator --binary --timing -Wno-fatal --top-module tb_nfc_regs \
  rtl/nfc_pkg.sv rtl/nfc_regs.sv tb/tb_nfc_regs.sv -o sim_r
verilator --binary --timing -Wno-fatal --top-module tb_nfc_axi_slave \
  rtl/nfc_pkg.sv rtl/nfc_axi_slave.sv tb/tb_nfc_axi_slave.sv -o sim_a
```

`+verilator+rand+reset+2` starts undriven state at random values. That
shows any flop that is read before reset sets it.

The testbenches drive inputs 1 time unit after the rising clock edge and
sample on the falling edge, so they do not depend on the order in which the
simulator evaluates events.

Lint with `verilator --lint-only -Wall` leaves only unused-signal warnings:

- the ignored AXI size and burst fields and the upper address bits
- the asynchronous reset used in the `disable iff` of the handshake
  assertions
