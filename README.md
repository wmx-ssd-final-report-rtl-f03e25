# WMX SSD: FPGA hardware for an encrypting flash drive

This solid-state drive is built on an FPGA. A soft processor runs the drive's
firmware. The host reaches the drive over PCI Express. The processor keeps data in
a DDR2 buffer and stores it on four 2 GB SLC NAND flash packages that sit on a
custom DIMM. Data moves in 4 KB blocks, and every block can be encrypted with
AES-128 on its way to the flash and decrypted on its way back.

The processor could do all of this in software, but that would be slow. Both
AES and the flash bus protocol would cost many instructions per byte, and the
flash protocol has nanosecond timing rules. This RTL moves that work into
hardware. Two jobs remain for the firmware:

- writing a key and 16 bytes of data into registers, then collecting the result;
- sending a short word stream ("program this page with these bytes") and
  reading back the data and a status word.

The processor, its bus, the DDR2 controller, the PCI Express endpoint and the
level-shifting CPLD between the FPGA and the flash are standard vendor parts.
They are not included here. The top module brings their connections out as ports.

```
             processor bus (PLB slave attachment)        FSL channel pairs
                 |                     |                 |   |   |   |
        +--------v-------+   +---------v------+   +------v---v---v---v------+
        | aes_encrypt_plb|   | aes_decrypt_plb|   | nand_fsl  x NUM_CHIPS   |
        |  aes_plb_regs  |   |  aes_plb_regs  |   |  (word stream <-> bytes)|
        |  aes_cipher_top|   |  aes_inv_cipher|   |  nand_controller        |
        +----------------+   +----------------+   |   nand_bus_cycle        |
                                                  +------------+------------+
                                                               | flash pins (per package:
                                                               | I/O out/in/dir, CE#, CE2#,
                                                               | CLE, ALE, WE#, RE#, WP#,
                                                               v R/B#, R/B2#) -> CPLD -> NAND
                              wmx_ssd_top
```

All logic runs on one clock, `clk`, with a synchronous active-high reset `rst`.

## Files

| File | Contents |
|---|---|
| `rtl/wmx_pkg.sv` | Command codes, flash opcodes and the CTRL codes of the AES peripherals |
| `rtl/aes_pkg.sv` | AES-128 round functions, S-box and key schedule as functions |
| `rtl/aes_cipher_top.sv` | Iterative AES-128 encryption core |
| `rtl/aes_inv_cipher_top.sv` | Iterative AES-128 decryption core with a stored key schedule |
| `rtl/aes_plb_regs.sv` | The 14-register slave bank shared by both AES peripherals |
| `rtl/aes_encrypt_plb.sv` | Encryption peripheral: register bank, 3-state FSM and core |
| `rtl/aes_decrypt_plb.sv` | Decryption peripheral: register bank, 5-state FSM and core |
| `rtl/nand_bus_cycle.sv` | Timed engine for a single flash bus cycle (command, address, data in or data out) |
| `rtl/nand_controller.sv` | Flash command sequencer for one two-die package |
| `rtl/nand_fsl.sv` | FSL peripheral: turns processor words into controller handshakes |
| `rtl/wmx_ssd_top.sv` | Top: two AES peripherals and `NUM_CHIPS` flash peripherals |
| `tb/nand_flash_model.sv` | Behavioural model of one flash die, with timing checks (simulation only) |
| `tb/tb_*.sv` | Self-checking testbenches, one per module, plus two system tests |

## The flash path

This path is the hardest part of the design. It has three layers. Each layer
hides one kind of detail from the layer above it.

### 1. Bus cycles: `nand_bus_cycle`

The flash chips have an 8-bit asynchronous bus, and every transfer is one of four cycles:

- **command latch**: CLE high, byte on I/O, WE# pulsed;
- **address latch**: ALE high, byte on I/O, WE# pulsed;
- **data write**: byte on I/O, WE# pulsed;
- **data read**: RE# pulsed, byte sampled while RE# is low.

The engine takes `start`, a cycle kind and a byte. It then holds WE# or RE#
low for `T_WP`/`T_RP` clocks and high for `T_WH`/`T_REH` clocks, and pulses
`done`. The flash latches on the rising edge of WE#. CLE, ALE and the data
stay valid through the high phase, so the hold time is always met. Read data
is sampled in the last clock of the RE# low phase. All pin outputs come
straight from flip-flops.

The default of 5 clocks for each phase gives 50 ns at 100 MHz. That meets the
slowest standard timing mode, which a flash uses after power-on.

### 2. Commands: `nand_controller`

The controller builds every command from bus cycles. The command-latch sequence is
therefore written once and shared.

| `cmd` | Flash sequence |
|---|---|
| `NAND_RESET` (1) | FFh, wait for ready |
| `NAND_READ_STATUS` (2) | 70h, wait tWHR, read 1 byte into `status` |
| `NAND_READ_PAGE` (3) | 00h, 2 column + 3 row address cycles, 30h, wait for ready, wait `T_WHR` clocks, read `len` bytes |
| `NAND_PROGRAM_PAGE` (4) | 80h, 5 address cycles, wait tADL, write `len` bytes, 10h, wait for ready, automatic status read |
| `NAND_ERASE_BLOCK` (5) | 60h, 3 row address cycles, D0h, wait for ready, automatic status read |

Program and erase end with a status read. So `status` always holds the result
of the last operation: bit 0 means it failed, bit 6 means the die is ready.
After any command that makes the flash busy, the controller waits `T_WB`
clocks before looking at R/B#. R/B# reaches the controller through a two-flop
synchronizer. The flash must be reset (`NAND_RESET`) before any other command.
The controller does not do this by itself.

**Address layout.** The 32-bit `addr` is `{die, row[17:0], column[12:0]}`:

- The column is the byte within a page: 4096 data bytes plus the spare area.
- The row is the page number: 4096 blocks × 64 pages per die.
- Bit 31 chooses CE# (die 0) or CE2# (die 1).

So 2 dies × 2^18 pages × 4 KB give 2 GB per package, and four packages give 8 GB.

**Host handshake.** The host starts a command with a one-clock `cmd_loaded`
while `done` is not pending and the controller is idle. Data moves one byte per
`data_ready` / `data_loaded` pair:

- When programming, `data_ready` means "give me a byte". The host puts it on
  `data_in` and pulses `data_loaded`.
- When reading, `data_ready` means "`data_out` is valid". The host takes the
  byte and pulses `data_loaded`.

`data_done` pulses after the last byte. `done` pulses when the whole command
has finished. `current_state_fsm` shows the state for debugging. Assertions
catch a command given while busy and both dies selected at once.

Timing parameters are counted in clocks. Their defaults assume a 100 MHz clock:

| Parameter | Default | Meaning |
|---|---|---|
| `T_WP`, `T_WH` | 5, 5 | WE# low / high |
| `T_RP`, `T_REH` | 5, 5 | RE# low / high |
| `T_WB` | 20 | last WE# of a busy command to first R/B# check |
| `T_WHR` | 12 | command to first data read |
| `T_ADL` | 20 | last address cycle to first program data |
| `COL_BITS`, `ROW_BITS` | 13, 18 | address layout |

For another clock, scale the timing parameters.

### 3. Processor words: `nand_fsl`

The processor reaches each flash package through a Fast Simplex Link: a
32-bit FIFO in each direction, with a control bit on every word. The
peripheral's FSM turns that stream into the controller's handshakes.

Request (processor → peripheral):

| Word | Control | Contents |
|---|---|---|
| header | 1 | `[2:0]` command, `[28:16]` byte count |
| address | 0 | flash address as above |
| data (PROGRAM PAGE only) | 0 | `ceil(count/4)` words; page byte `4k+j` sits in bits `[8j+7:8j]` of word `k` |

Response (peripheral → processor):

| Word | Control | Contents |
|---|---|---|
| data (READ PAGE only) | 0 | packed the same way; unused bytes of the last word are zero |
| completion | 1 | `[10:8]` command, `[7:0]` flash status |

A 4 KB write therefore takes a header, an address and 1024 data words. The
peripheral stalls while `FSL_M_Full` is high and while `FSL_S_Exists` is low. It
discards a stray data word that arrives when it expects a header, so a broken
stream resynchronises on the next control word. The I/O bus is split into
`n_io_o`, `n_io_i` and `n_io_dir` (high drives towards the flash). The tri-state
buffers sit in the CPLD, not in the FPGA.

## The AES peripherals

### Cores

`aes_cipher_top` and `aes_inv_cipher_top` implement AES-128 as in FIPS-197.
Byte 0 sits in bits `[127:120]`. Each runs one round per clock.

- The **encryption core** derives each round key from the previous one while it
  runs. `done` pulses on the 12th rising edge after the edge that sampled `ld`.
- The **decryption core** needs the round keys in reverse order, so it expands
  the key first. `kld` starts the expansion into an 11-entry register file, and
  `kdone` follows 12 edges later. After that, each `ld` decrypts one block in 12
  cycles. A key load plus one block takes 24 cycles. Later blocks under the same
  key take 12 cycles each.

The S-box is not a table. It is computed as the multiplicative inverse in
GF(2^8) (x^254) followed by the AES affine map. The inverse S-box applies the
inverse affine map and then the inversion.

### Register map (both peripherals)

| Register | Contents | Access |
|---|---|---|
| `slv_reg0..3` | key; `key[31:0]` in reg0 … `key[127:96]` in reg3 | R/W |
| `slv_reg4..7` | input block, same word order | R/W |
| `slv_reg8..11` | result, same word order | R |
| `slv_reg12` | scratch / debug | R/W |
| `slv_reg13` | CTRL: software writes a start code, hardware writes a done code | R/W |

The bus side has the user-logic signals of a PLB slave attachment:

- `Bus2IP_Data`, `Bus2IP_BE`, and one-hot `Bus2IP_RdCE`/`Bus2IP_WrCE`;
- acknowledges returned in the same cycle.

If the FSM writes CTRL in the same clock as software, the FSM wins.

### Software sequences and latency

Encryption:

1. Write the key and the plaintext.
2. Write CTRL = 0x2.
3. Poll until CTRL = 0x1.
4. Read `slv_reg8..11`.

CTRL reads 0x1 on the 15th clock after the write:

- 1 clock to leave `START_STATE`;
- 1 clock in `ENCRYPT_STATE_1` with the core's load high;
- 12 clocks in the core;
- 1 clock to write CTRL.

Decryption:

1. Write the key, then CTRL = `KEY_LOAD_READY` (0x4). Wait for
   `KEY_LOAD_DONE` (0x8).
2. For each block, write the ciphertext, then CTRL = `TEXT_LOAD_READY` (0x2).
   Wait for `TEXT_OUT_DONE` (0x1), then read the plaintext.

The key schedule stays loaded until the next key load. Each step again takes 15
clocks from the CTRL write. The states are `START_STATE`, `KEYLOAD_STATE_1/2`
and `ENCRYPT_STATE_1/2`. The text phase keeps the name `ENCRYPT_STATE` even
though it decrypts.

## Top level: `wmx_ssd_top`

Parameter `NUM_CHIPS` (default 4) sets the number of flash packages.

- **AES ports:** `enc_*` and `dec_*` are the two slave attachments.
- **FSL ports:** arrays `fsl_s_data[NUM_CHIPS]` and `fsl_m_data[NUM_CHIPS]`,
  plus bit vectors `fsl_s_control`, `fsl_s_exists`, `fsl_s_read`,
  `fsl_m_control`, `fsl_m_write` and `fsl_m_full`. There is one FSL pair per
  package.
- **Flash pins:** `nand_*` ports, one element per package, as seen from the
  FPGA before the CPLD.
- **Debug outputs:** `enc_state`, `dec_state` and `nand_state[]` carry the FSM
  states.

## Verification

Each module has a self-checking testbench. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_aes_cipher_top` | FIPS-197 and SP 800-38A vectors, random blocks against a reference model in the testbench, 12-cycle latency |
| `tb_aes_inv_cipher_top` | Same vectors in reverse, key reuse, 12 + 12 cycle timing, back-to-back blocks |
| `tb_aes_encrypt_plb` | Bus writes with byte enables, the CTRL handshake, 15-clock completion, result words |
| `tb_aes_decrypt_plb` | Key load, several blocks under one key, a key change, CTRL codes and timing |
| `tb_nand_controller` | Every command against `nand_flash_model`: reset, status, program, read-back, erase, second die, wait on R/B#, no timing violations |
| `tb_nand_fsl` | Word formats, odd byte counts, a stray data word, back-pressure on the master FIFO |
| `tb_wmx_ssd_top` | End to end at default size. 4 KB pages are encrypted, programmed, read back and decrypted. It counts these mechanisms and fails if any never happened: reset, status read, program, read, erase, R/B# wait, second-die select, encryption, key load, decryption under a kept key, FSL back-pressure, two packages busy at once |
| `tb_ssd_capacity` | Default size. The first and last page of every die of every package are programmed at the same time in all four packages, then read back. This covers the full 8 GB address range and shows that no pages alias |

The flash model (`tb/nand_flash_model.sv`) stores pages in a sparse
associative array. Erased bytes read FFh, and a program can only clear bits. It
counts timing violations (pulse widths, tWHR, tADL, commands while busy). The
testbenches require that count to be zero. Its array times are typical SLC
values: tR 25 µs, tPROG 200 µs, tBERS 500 µs. The testbenches count one time
unit as 1 ns and run the clock with a period of 10 units (100 MHz).

### Simulating

Verilator 5 runs it. Packages must be listed before the modules that import
them. `-y` finds the rest:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/wmx_pkg.sv rtl/aes_pkg.sv tb/tb_wmx_ssd_top.sv \
    --top-module tb_wmx_ssd_top -o sim
./obj_dir/sim
```

Swap in another testbench and its `--top-module` to run it. Every testbench
finishes in seconds. `-Wno-fatal` is there only because some parameters are
unused and the top leaves some debug pins open.

## Own choices and departures

These points are choices made for this RTL, where the description of the drive
leaves them open or where it was changed on purpose:

- **AES cores** are written from the AES standard. Only their port names, their
  128-bit width and the 12-cycle latency of each phase are fixed by the original
  design.
- **Encryption FSM state codes.** The state diagram gives `00`, `01` and `00`.
  Here `ENCRYPT_STATE_2` is `10`, so the three states can be told apart on the
  debug output.
- **Decryption CTRL codes** (0x4 / 0x8 for the key, 0x2 / 0x1 for text) are
  chosen here. Only the encryption codes 0x2 and 0x1 are given.
- **Flash commands.** The 3-bit command encoding, the address layout, the
  automatic status read after program and erase, the byte handshake and every
  timing parameter are chosen here. The opcodes and address cycles are those
  of standard SLC NAND parts.
- **FSL word format.** It is designed here: the original FSL peripheral's
  function is known, its message format is not.
  - Some debug signals printed on the original peripheral's symbol are not
    reproduced: `control_q`, `raddr_q` and separate FSL clocks.
  - `n_wp_l`, `nData_Done`, `nRB` and `nCtl_State` are added.
- **One NAND peripheral per package.** The system diagram draws a single NAND
  controller box. The hardware description calls for one controller per chip,
  and this design follows that description.
- **NAND peripheral bus.** It talks to the processor only over FSL. The
  original peripheral also had a PLB side, but that side's function is not
  described.
- **One clock** for everything, synchronous active-high reset.

## Not included

These parts are not included. Each is vendor IP, a memory chip, a board or
firmware, and the top module brings out the ports they would connect to:

- the MicroBlaze processor and its firmware (PCIe command handling, block
  moves, key handling);
- the PLB and XCL buses;
- the multi-port DDR2 memory controller and the 32 MB DDR2 chip;
- the PCI Express endpoint;
- the CPLD level shifter (tri-state buffers between 1.8 V flash and FPGA I/O);
- the CompactFlash card and UART;
- the DIMM board;
- the flash chips themselves (a behavioural model is used in simulation).
