# NAND flash controller

A host that wants to use a raw NAND flash chip should not have to toggle the chip's pins
itself. This controller sits between the two. The host writes one 3-bit command and a
16-bit row address, then pulses a start signal. The controller runs the whole NAND
transaction on the chip's 8-bit bus: reset, read ID, block erase, page program or page read.
It then raises `nfc_done` together with an error flag if something went wrong. Page data
goes through a 2048-byte dual-port buffer. The host fills the buffer before a program and
empties it after a read, at its own pace. Each page carries a 12-byte Hamming ECC in the
flash's spare area. The controller computes the ECC on the way out and checks it on the way
back in.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. There are seven modules and
one package.

| module | role |
|---|---|
| `nfcm_top` | top level; wires the blocks below together |
| `MFSM` | main FSM: decodes the host command and steps through the operation |
| `TFSM` | timing FSM: turns each step into timed activity on the NAND pins |
| `Acounter` | byte counter: buffer address and byte index within each run of bytes |
| `ebr_buffer` | 2048 x 8 true dual-port RAM (host port A, controller port B) |
| `H_gen` | ECC generator: 24-bit Hamming code per 512-byte sector, 4 sectors |
| `Err_Loc` | ECC detector: compares the stored and recomputed codes and locates single-bit errors |
| `nfc_pkg` | command codes, NAND opcodes and timing-step types |

## Interface of `nfcm_top`

| port | dir | width | meaning |
|---|---|---|---|
| `CLK`, `RES` | in | 1 | clock; synchronous reset, active high |
| `BF_sel`, `BF_we`, `BF_ad`, `BF_din`, `BF_dou` | in/out | 1,1,11,8,8 | host port of the page buffer. `BF_sel` enables the port; `BF_dou` shows the addressed byte one clock after `BF_sel` |
| `nfc_cmd` | in | 3 | `011` reset, `101` read ID, `100` block erase, `001` page program, `010` page read |
| `nfc_strt` | in | 1 | start pulse; ignored while an operation runs |
| `RWA` | in | 16 | row (page) address; sent as RA0 = `RWA[7:0]`, then RA1 = `RWA[15:8]` |
| `nfc_done` | out | 1 | low while an operation runs; rises at its end and stays high until the next start |
| `PErr`, `EErr`, `RErr` | out | 1 | program, erase and read (ECC) error of the last operation |
| `ecc_bad`, `ecc_fix`, `ecc_loc` | out | 4, 4, 48 | per sector, after a read: the code mismatched; the error is a single data bit; its `{byte[8:0], bit[2:0]}` |
| `CLE`, `ALE`, `WE_n`, `RE_n`, `CE_n` | out | 1 | NAND control pins |
| `R_nB` | in | 1 | NAND ready/busy (asynchronous; synchronised inside) |
| `DIO_o`, `DIO_oe`, `DIO_i` | out/out/in | 8,1,8 | the bidirectional DIO[7:0] bus, split. Put a tristate pad at chip level: `DIO = DIO_oe ? DIO_o : 'z`, `DIO_i = DIO` |

The host protocol works like this. Wait for `nfc_done` (or for the end of reset) and drive
`nfc_cmd` and `RWA`. Pulse `nfc_strt` for one clock, then wait for `nfc_done`. The error
flags are valid while `nfc_done` is high. They are cleared at the next start. The host can
use the buffer port at any time. It must not touch the buffer during a read or a program of
the same page, because the controller is then writing or reading it.

## How an operation runs: two FSMs

All the work is split between two state machines. `MFSM` knows what the transaction is. It
holds the order of commands, addresses and data for each host command, listed below. It hands
the steps one at a time to `TFSM`, which knows how long each pin must stay where. A step is
one of:

| step | pins | length in clocks (defaults) |
|---|---|---|
| `TF_CMD` | CLE high, byte on DIO, WE_n low then high | T_WP + T_WH (2 + 2) |
| `TF_ADR` | ALE high, byte on DIO, WE_n low then high | T_WP + T_WH |
| `TF_DWR` | byte on DIO, WE_n low then high | T_WP + T_WH |
| `TF_DRD` | RE_n low, DIO sampled in the last low clock, RE_n high | T_RP + T_REH (2 + 2) |
| `TF_WB` | wait tWB | T_WB (10) |
| `TF_RB` | wait until R_nB is high | as long as the flash is busy |
| `TF_WHR` | wait tWHR | T_WHR (6) |

Each step is followed by one clock in which `TFSM` reports `done`. The flash latches a written
byte on the rising edge of WE_n. CLE or ALE, and the data, are held through the whole WE_n
high time, so the hold time equals T_WH. `CE_n` stays low for the whole operation.

`MFSM` runs these sequences. CA is the column address and RA the row address. The data column
is 0. The ECC sits at column 2048, the first byte of the spare area.

| command | steps |
|---|---|
| reset `011` | CMD FFh |
| read ID `101` | CMD 90h, ADR 00h, 4 x DRD into buffer bytes 0-3 |
| erase `100` | CMD 60h, ADR RA0, ADR RA1, CMD D0h, WB, RB, CMD 70h, WHR, DRD status |
| program `001` | CMD 80h, ADR CA0 CA1 RA0 RA1, 2048 x DWR from the buffer, CMD 85h, ADR 00h 08h, 12 x DWR ECC, CMD 10h, WB, RB, CMD 70h, WHR, DRD status |
| read `010` | CMD 00h, ADR CA0 CA1 RA0 RA1, CMD 30h, WB, RB, 2048 x DRD into the buffer, CMD 05h, ADR 00h 08h, CMD E0h, 12 x DRD ECC, compare |

Other `nfc_cmd` codes do nothing and end at once with `nfc_done`.

`MFSM` is a single state register with one state per row of a step list above. The step
content of each state is the opcode, which address byte, or buffer versus ECC data. It comes
from one `always_comb`, and the successor state from another. A pending flag ensures there is
exactly one step in flight. The state advances on `TFSM`'s `done` once `Acounter` shows the
last byte of the state's run.

### The byte counter and the buffer's read latency

`Acounter` is a 12-bit counter, cleared whenever a run of steps ends and incremented after
each step in a run. It serves as the address byte index, the buffer address (0-2047), the ECC
byte index (0-11) and the ID byte index. Buffer port B reads synchronously: the byte for
address *n* appears one clock after the counter reaches *n*. `Acounter` therefore also
outputs `changed`, which is high in the clock after the count moved, and `MFSM` issues no step
while it is high. This costs two clocks per byte. In exchange, the data-write path has no
special cases.

### Status check

After an erase or a program, `MFSM` reads the status byte (command 70h, then tWHR). Bit 0 =
1 means the operation failed. It sets `EErr` for an erase and `PErr` for a program. Bit 0 = 0
means success.

## ECC: what is stored and how an error is found

The controller writes 12 ECC bytes per 2048-byte page. This design splits the page into four
512-byte sectors and protects each with a 24-bit Hamming code (3 bytes). That corrects any
single flipped bit in a sector and detects any two.

The code is built from **parity pairs**. Take byte position *p* (9 bits, 0-511) and bit index
*b* (3 bits, 0-7) of a data bit:

* **Line parities, code bits 0-17.** For each position bit *k* in 0..8, bit 2k is the parity
  of all bytes whose position has bit *k* = 0. Bit 2k+1 is the parity of all bytes whose
  position has bit *k* = 1.
* **Column parities, code bits 18-23.** For each index bit *j* in 0..2, bit 18+2j is the
  parity of all data bits whose index has bit *j* = 0. Bit 19+2j is the parity of those with
  bit *j* = 1.

Every data bit falls into exactly one member of each of the 12 pairs. If one data bit flips,
the syndrome (the XOR of the stored and recomputed codes) has exactly one bit set in every
pair. The odd members of the pairs then spell out the bit's position: `p = syn[17,15,...,1]`
and `b = syn[23,21,19]`. Other syndromes are treated as follows:

* a zero syndrome is a clean sector;
* a syndrome with a single bit set means the stored code itself was hit;
* anything else means two or more bits are wrong.

`H_gen` accumulates the code byte by byte as data passes. A byte's contribution is its
parity, XORed into pair member 2k + p[k] for every k, plus its column parities. The update
therefore costs one XOR per sector register per byte, and bytes can arrive in any order. Its
outputs are the four 24-bit codes, plus one byte selected by `idx`. ECC byte 3s + i is bits
[8i+7:8i] of sector *s*, so bytes go low byte first, sector 0 first.

During a program, `H_gen` sees each buffer byte as it is sent. The 12 ECC bytes follow
command 85h. During a read, `H_gen` sees each byte as it arrives, and `MFSM` keeps the 12 ECC
bytes read after 05h/E0h. `Err_Loc` is combinational. It raises `RErr` if any sector
mismatches and reports `ecc_bad`, `ecc_fix` and `ecc_loc` for each sector. The buffer is left
as read. Flipping bit `ecc_loc[2:0]` of byte `512*s + ecc_loc[11:3]` is left to the host.

An erased page reads as all FFh, data and ECC alike. The code of all-FFh data is zero, so
reading an erased page reports `RErr` with `ecc_bad` = 1111 and `ecc_fix` = 0. There is one
catch. If an erased sector has exactly one bit at 0, its syndrome again has one bit per pair,
so that sector shows up in `ecc_fix` with a meaningless location. A host that reads unwritten
pages should therefore check for the erased pattern first (all stored ECC bytes FFh) and only
then trust `ecc_fix`.

## Timing and performance

With the default pulse widths, each byte on the bus costs 7 clocks:

* 4 clocks of strobe (T_WP + T_WH, or T_RP + T_REH);
* 1 clock in which `TFSM` reports done;
* 2 clocks of hand-off, in which the counter advances and the buffer output settles.

A page program moves 2071 bytes: 2048 data, 12 ECC, 4 + 2 address bytes, 3 commands, the
status command and the status byte. That is 14,497 clocks, plus the waits. In simulation
a program took 14,552 clocks and a page read 14,537, with the flash model busy for 40
clocks.

The timing parameters are in clock cycles: set them from the flash's datasheet and the clock frequency. As an example, at 100 MHz,
T_WP = 2 gives a 20 ns write pulse. The data is sampled in the last clock of RE_n low, so
T_RP must cover the flash's tREA plus the input path. `R_nB` goes through a two-flop
synchroniser. The tWB wait in front of every R_nB wait must therefore be at least 2 clocks,
so that a busy flash is seen as busy.

## Where this design makes its own choices

The command codes, NAND opcodes, order of steps, page size (2048), ECC size (12 bytes),
ID length (4), pin names and block partitioning follow the published description of this
controller. The following points were left open there, or were described inconsistently,
and were decided here:

* **Status polarity.** One account of the erase/program flow says a status bit of 1 means
  success. The flow charts test `io(0) = 0` for success, which matches the usual NAND status
  convention. This design follows the flow charts.
* **Page read ECC access.** The ECC is read with 05h, CA0, CA1, E0h (random data output), as
  in the read flow chart. The ECC column is 2048.
* **ECC code and layout**, sector size 512, and reporting the location without correcting
  the buffer.
* **tWHR** is waited after the status command in a program as well as in an erase. Only the
  erase flow chart shows that wait explicitly.
* **Read ID** bytes are stored in buffer bytes 0-3.
* **Reset** sends FFh and ends. It does not wait for R_nB. The host must let the flash
  finish its reset (watch `R_nB`, or wait the datasheet's tRST) before the next command.
* **CE_n** stays low for the whole operation. In the reference waveforms it also rises
  between some bus cycles.
* **DIO** is split into `DIO_o`/`DIO_oe`/`DIO_i`, with the pad left to the chip level.
* **Timing**: all pulse widths and waits are parameters in clock cycles. No flash timings
  are given as numbers.
* **Handshake**: `nfc_done` is a level that is cleared by the start pulse, and the error
  flags are held until the next start. Undefined command codes finish at once.
* **Not included**: address translation (virtual to physical), wear levelling and garbage
  collection. These are general controller duties with no scheme given. The host's `RWA`
  goes to the flash unchanged. Retrying a failed operation is also left to the host.

## Parameters

| module | parameter | default | note |
|---|---|---|---|
| `nfcm_top`, `MFSM` | `PAGE_BYTES` | 2048 | page size, buffer depth, ECC column |
| `nfcm_top`, `MFSM` | `ECC_BYTES` | 12 | = 3 x `PAGE_BYTES`/`SECTOR_BYTES` |
| `nfcm_top`, `H_gen`, `Err_Loc` | `SECTOR_BYTES` | 512 | must stay 512 so that a code is 24 bits |
| `nfcm_top`, `MFSM` | `ID_BYTES` | 4 | |
| `TFSM` | `T_WP`, `T_WH`, `T_RP`, `T_REH` | 2 each | WE_n / RE_n low and high times; the flash model in `tb/` answers one clock after RE_n falls, so it needs `T_RP` of 2 or more |
| `TFSM` | `T_WB`, `T_WHR` | 10, 6 | waits before checking R_nB and before reading status |
| `ebr_buffer` | `DEPTH`, `WIDTH` | 2048, 8 | |

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

* `tb_nfcm_top` runs at the default sizes against `nand_flash_model`. That is a behavioural
  NAND chip with a 2048+64-byte page, 64-page blocks, a busy time and test hooks to fail the
  next erase or program and to flip bits in a stored page. The test runs reset, read ID,
  program, a clean read, a read with one flipped bit (the location is checked), a read with
  two flipped bits, a failing program, a failing erase and a good erase, a read of the erased
  page, and an unused code. It checks every byte the flash latched, in order, against the
  expected flow. It checks the ECC bytes against a reference computed bit by bit from the
  definition above, and checks the buffer contents and the flags. It also counts each
  mechanism and fails if one never happened.
* `tb_MFSM` replaces `TFSM` with a responder that records each step. It checks the step lists
  of all five commands, the buffer writes, the ECC generator feed, the captured ECC and the
  flags.
* `tb_TFSM` checks pulse widths, CLE/ALE, DIO drive and step lengths, clock by clock.
* `tb_H_gen` and `tb_Err_Loc` check the code against the bit-level definition and check the
  error classification. `tb_ebr_buffer` and `tb_Acounter` compare against reference models.
* `tb_nfc_random` is a layered, class-based environment. It is built from a transaction,
  generator, driver, monitor, scoreboard and environment in `nfc_tb_pkg`, with the host
  signals bundled in the `nfc_host_if` interface. It runs 120 random host transactions on
  full pages: random data, random program and erase failures, and single and double bit
  errors injected into reads. The scoreboard keeps its own copy of the flash contents and
  checks every flag, ECC classification, error location and data byte. The test also checks
  that every command and outcome occurred. Randomisation uses `$urandom` only, so the
  environment runs on simulators without a constraint solver.

To simulate with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/nfc_pkg.sv tb/tb_nfcm_top.sv --top-module tb_nfcm_top
./obj_dir/Vtb_nfcm_top
```

Replace `tb_nfcm_top` with any other testbench name. Every run takes a few seconds at most.
