# Secure SD-card storage device

The device sits between a PC and an SD card. It stores files encrypted and can read them back. It
is written for a Virtex-5 FPGA board with a 2x16 character LCD, a small external SRAM and an SD
card socket. The PC talks to it over a serial line with a terminal program.

Two PINs protect the data:

- An **access PIN** opens the device. It is kept in the external SRAM and checked character by
  character. Three wrong tries lock the device for 30 seconds.
- A **file PIN** is typed for every store or read and is never kept anywhere. It is padded with
  `*` to 16 characters, and those 16 bytes are the AES-128 key. A store encrypts everything with
  it. A read only goes ahead if the same PIN is typed again. Three wrong file PINs lock the device
  for 60 seconds.

The device decides whether a file PIN is right without storing anything about it. The
next section explains how.

## Card layout and the file PIN check

A store writes this layout to the card, in 512-byte blocks:

| card block | contents |
|---|---|
| 0 | header: bytes 0..15 = AES_key("SDSECURESTORAGE1"), byte 16 = N, rest 0 |
| 1 .. N | the data, encrypted 16 bytes at a time (AES-128 in ECB mode) |

On a read, the device loads block 0 and decrypts its first 16 bytes with the key from the typed
PIN. If the result is the constant `SDSECURESTORAGE1`, the PIN is the one used for the store.
Otherwise it counts as a wrong try. A card that never held a store also fails this check.

The data blocks are written first and the header last. The PC sends data without flow control. If
the header went first, bytes arriving while the 512-byte header was written would overflow the
16-byte receive buffer.

## Talking to the device

The serial line runs 8N1 at 115200 baud; the clock is 100 MHz. Everything on the terminal is plain
text, except the file transfer.

1. After power-on the device waits 200 ms and prints its name. After 2 s it asks for ENTER (0x0D).
2. "ENTER PIN CODE": type up to 16 characters, each echoed as `*`, then ENTER.
3. If the PIN is right, the menu offers `1` store, `2` read and `3` exit. Any other key gives an
   error message and the menu again.
4. **Store**: the device asks for the file PIN. It then expects one byte N (1..255), then exactly
   N x 512 bytes. It answers "OPERATION SUCCEEDED!" or "OPERATION ERROR!".
5. **Read**: the device asks for the file PIN. It sends one byte N, then the N x 512 decrypted
   bytes, then the success message.
6. **Exit** prints a goodbye and returns to the title.

The LCD always shows a short status for the current state, such as "DEVICE BLOCKED" or
"ENCRYPTING FILES".

## Structure

```
secure_storage_top
 +- uart_controller      serial RX (16x oversampled, frame error) and TX
 +- device_fsm           main flow; owns the 16-byte receive capture buffer
 |   +- uart_msg_sender  sends one text message, start/ready handshake
 |       +- uart_msg_rom 1k x 8 memory of zero-terminated texts
 +- lcd_ram              32 screens x 256 bits (32 characters)
 +- send_to_lcd          LCD initialisation, then 34 byte writes per screen
 |   +- lcd_controller   one 4-bit bus cycle with set-up, E pulse and hold times
 +- sram_controller      asynchronous 1k x 8 SRAM read/write cycles
 +- sd_card_controller   SPI-mode SD card: init, CMD17 read, CMD24 write
 |   +- sd_spi_byte      SPI mode-0 byte shifter with a run-time clock divider
 +- aes128_encrypt       one round per clock, key expanded on the fly
 |   +- aes_subbytes, aes_shiftrows, aes_mixcolumns, aes_addroundkey, aes_expandkey
 +- aes128_decrypt       one inverse round per clock, round keys walked backwards
```

`aes_pkg` holds the AES arithmetic as functions, and `device_pkg` holds the message numbers and
texts. Each file begins with a comment on its interface and timing.

### Main controller (`device_fsm`)

A single state machine follows the device flow. It does three things:

- **Messages.** To show a message, it loads a message number into the sender, pulses `start` and
  waits for `ready`. The LCD shows screen number `lcd_msg` all the time; changing that register
  is all a new screen takes.
- **Storing.** While a store runs, a capture register collects received bytes into a 16-byte
  block. Meanwhile the main machine encrypts the previous block and pushes its 16 bytes into the
  card. The PC's pace is the only timing constraint. Per 16 bytes, the machine needs 11 clocks of
  AES plus 16 SPI bytes at 25 MHz (about 6 us). The serial line needs about 1.4 ms for the next 16
  bytes at 115200 baud. In simulation the design also keeps up at 1.5625 Mbaud.
- **Reading.** This runs the other way. It pulls 16 bytes from the card, decrypts them and sends
  them as raw bytes.

Lock-out timers count clock cycles. They are sized from `BLOCK1_MS` and `BLOCK2_MS`.

### AES

Both cores are iterative. The encryptor loads the state with plaintext XOR key. It then runs ten
rounds, one per clock, through SubBytes -> ShiftRows -> MixColumns -> AddRoundKey, and skips
MixColumns in round 10. A block takes 11 clocks from `start` to `done`.

The S-box is not a table. It is the GF(2^8) inverse, computed as a^254, followed by the affine
map. That is larger in logic but needs no memory.

The decryptor needs round key 10 first. After every `key_load` it spends 10 clocks running the
schedule forward and keeps that key. Each block then takes 11 clocks. Every earlier round key is
recomputed from the next one: `w[i] = w[i+4] ^ w[i+3]` for the last three words, and the core
function for the first. The round constant is divided by x in GF(2^8) at each step.

### LCD path

`send_to_lcd` does not read the LCD busy flag. It waits fixed times instead:

- 15 ms after power-on
- the 3,3,3,2 nibble sequence with 4.1 ms / 100 us gaps
- 37 us after each instruction
- 1.52 ms after clear

After initialisation it writes a screen as: set address 0x80, 16 characters, set address 0xC0,
16 characters. It writes a screen again only when its 256-bit input changes. `lcd_controller`
produces each nibble cycle with at least 40 ns set-up, a 230 ns E pulse and a 500 ns cycle. Each
time is rounded up to whole clocks of `CLK_HZ`.

### SD card

After 80 clocks with CS high at 400 kHz, the card goes through this sequence:

- CMD0
- CMD8 (0x1AA)
- CMD55/ACMD41, repeated until the card leaves idle
- CMD58 reads CCS
- CMD16(512)

The clock then switches to 25 MHz. After that, `block_addr` is the block number for
high-capacity cards and is multiplied by 512 for the others.

The controller has two modes:

- **Command mode** (`data_mode_in = 0`): `rd` or `wr` starts CMD17 or CMD24.
- **Data mode** (`data_mode_in = 1`): each `rd` or `wr` moves one byte.

After byte 512 the controller closes the block by itself. For a read, that means reading the CRC.
For a write, it sends a dummy CRC, checks the data response `xxx00101` and waits out the busy
period. Any error is sticky on `error`.

### SRAM

`sram_controller` drives one read or write cycle of an asynchronous 1k x 8 SRAM. It uses
active-low CE/WE/OE and holds each cycle for `ACCESS_NS` (70 ns). `LOW_BATT` is only synchronised
and reported.

## Where this design departs from, or adds to, the original description

- The document gives the 30 s and 60 s lock-outs in the text and the flow chart. The FSM figure
  prints 60 s and 120 s. This design uses 30 s and 60 s.
- The PC file format (count byte, raw 512-byte blocks), the header block and the way a wrong file
  PIN is detected belong to this design. The original only says that a read needs the same PIN
  as the store.
- The original shows one start/ready module per terminal message and per check (PIN check,
  decrypt PIN check, menu choice). Here one message sender serves every text by number, and the
  checks are states of the main FSM. The FSM sees the same start/ready behaviour.
- Only single-block card commands are used. The data CRC is not checked.
- There is no way to set the access PIN from the device. The SRAM is expected to hold it, padded
  with `*` to 16 bytes at addresses 0..15. The LCD RAM write port and the SRAM write path are
  tied off in the top.
- AES runs in ECB mode, as described. Equal 16-byte blocks of a file give equal ciphertext.
- The clock frequency, baud rate, SPI clock rates and SRAM access time are not given in the
  original and were chosen here. The 200 ms power-on wait is the original's.
- The screen and terminal texts follow the original's screenshots where they can be read. The
  rest are new wording.

## Simulating

All modules and testbenches are in `rtl/` and `tb/`, one per file. Every testbench prints
`TB_RESULT checks=N failures=M` and stops itself. With Verilator 5:

```
verilator --binary --timing -Wno-fatal --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
  rtl/aes_pkg.sv rtl/device_pkg.sv tb/tb_aes128_encrypt.sv --top-module tb_aes128_encrypt
./obj_dir/Vtb_aes128_encrypt
```

The unit testbenches check against values worked out independently:

- **AES**: the FIPS-197 and SP 800-38A vectors, plus random encrypt/decrypt round trips. The
  cycle counts are checked too.
- **UART**: a bit-level line model, including a broken stop bit.
- **LCD**: a model that decodes the nibbles back into instructions and characters and measures
  E timing.
- **SRAM**: `tb/sram_model.sv`.
- **SD card**: `tb/sd_card_model.sv`, a card in SPI mode with CRC7 checking, initialisation,
  single-block read/write and a busy period.

`tb_secure_storage_top` runs the whole device against a terminal model, the SRAM model, the card
model and an LCD decoder. It goes through every step of the flow:

1. title and ENTER
2. two wrong access PINs, then a third that locks the device
3. the right access PIN
4. a bad menu key
5. a store of two blocks, with the card checked against independently computed ciphertext
6. wrong file PINs up to the lock
7. a read whose returned bytes must equal those sent
8. exit

It counts each of these mechanisms and fails if one never happened. To finish in about 30 ms of
simulated time, it shortens the timers to milliseconds and runs the serial line at 1.5625 Mbaud.

Simulation speed is about 2.6 ms of device time per second. At the default parameters, the 2.2 s
before the first prompt and the 30 s and 60 s lock-outs would each take minutes to hours. So no
testbench runs the top at its default parameters. The largest run is the end-to-end test
described above. It uses all default sizes (16-byte key, 512-byte blocks, 1k message memory,
32-screen LCD RAM) with shortened times and a faster serial line.
