# AES cipher unit for a polymorphic processor

This is an AES block cipher built as a functional unit of a MOLEN-style polymorphic
processor. The host CPU calls it the way it would call a software routine. The host puts
the call's parameters into an exchange register file (XREG) and pulses `start`. The unit
then fetches the expanded key and the data from main memory by itself, ciphers every
16-byte block in place, and pulses `stop` when it is done.

The work is split between software and hardware. Key expansion runs rarely and is cheap,
so the host computes it in software and leaves the schedule in memory. The cipher rounds
are the costly part, so they are done in hardware: one round per clock, on a single
round unit that every round reuses (a "folded" or fully rolled core).

The default build is the memory-based encryption core. Its round is built from
dual-port ROMs that hold the S-box and the MixColumns products together, which maps onto
FPGA block RAMs. A fine-grain round (S-box tables plus constant GF(2^8) multipliers in
logic) and a decryption core are available as parameters. AES-128, -192 and -256 are all
supported at run time, through the number of rounds Nr passed in the XREG.

## Calling the unit

| XREG word | contents |
|---|---|
| 0 | Nr: 10, 12 or 14 |
| 1 | byte address of the first word of the stored key schedule |
| 2 | end address of the key schedule, exclusive. Set it equal to word 1 to keep the key already loaded. |
| 3 | byte address of the first data block |
| 4 | end address of the data, exclusive. Must be a multiple of 16 bytes after word 3. |

- The XREG is read combinationally, through `xreg_addr`/`xreg_rdata`.
- Main memory has one 64-bit port.
  - Addresses are byte addresses and step by 8.
  - `mem_rd` returns data on `mem_rdata` one clock later.
  - `mem_wr` writes `mem_wdata`.
- Values are big-endian, as on the PowerPC host.
  - Byte *n* of a block or a round key (FIPS-197 order) is bits `[127-8n -: 8]`.
  - The 64-bit word at the lower address is the upper half.
- Results overwrite the input blocks.
- The unit keeps the stored key, and the other internal registers, between calls. A later
  call with key begin = key end reuses the key without fetching it again.

**Stored key schedule.** Nr+1 round keys of 128 bits each, stored one after another in
the order the hardware uses them:

- Encryption: round keys 0, 1, ..., Nr of the standard key expansion.
- Decryption, in the equivalent-inverse-cipher form:
  - round key Nr first;
  - then InvMixColumns(round key *i*) for *i* = Nr-1 down to 1;
  - then round key 0.

  With this schedule the inverse round can keep the encryption round's order:
  substitute, shift, mix, add key. That order lets the decryption core reuse the
  encryption datapath unchanged, with only the tables and coefficients swapped.

## Datapath (`aes_core`)

```
 64-bit bus -> data_in_buf (2 x 64 -> 128)
            -> XOR first round key (prologue)
            -> MUX (new block | fed-back state)
            -> aes_round  (one main round, registered, uses round key i)
                  |  ^------- feedback for rounds 2 .. Nr-1
                  v
            -> aes_last_round (no MixColumns, last round key)
            -> data_out_buf (128 -> 2 x 64) -> 64-bit bus
```

The prologue key addition and the last round have their own hardware. The main round
therefore runs only the Nr-1 middle rounds.

**One round as a table lookup.** ShiftRows is only wiring. After it, every state byte
feeds four products, one per row of its column. For encryption these are
`{2S', 1S', 1S', 3S'}`, where S' is the S-box of the byte. For decryption they are
`{eS', 9S', dS', bS'}`, where S' is the inverse S-box. Both sets are packed into one
32-bit word, most significant byte first. A byte that sits in row *k* uses the same word
rotated right by *k* bytes. Each output column is the XOR of its four rotated words,
XORed with the round key column.

The two styles differ only in where that word comes from:

- **`ARCH_MB`** (memory based, default): 8 `tbox_bram` instances. Each is one dual-port
  256 x 32 ROM serving two state bytes.
  - The ROM's output registers are the round register, and the round key is registered
    next to them.
  - With the 4 memories of the key store, this makes 12 block RAMs.
- **`ARCH_FG`** (fine grain): 16 `fg_byte_unit` instances, each an `aes_sbox` lookup
  table followed by a constant multiplier.
  - `gf_mul_enc` makes X, 2X and 3X. 2X is X shifted left, with 0x1B XORed in when the
    top bit falls out; 3X = 2X ^ X.
  - `gf_mul_dec` makes 2Y, 4Y and 8Y by three such doublings, then adds them:
    9Y = 8Y+Y, BY = 8Y+2Y+Y, DY = 8Y+4Y+Y, EY = 8Y+4Y+2Y.
  - A 128-bit register holds the round result.

Every table (S-box, inverse S-box, both ROM contents) is computed while the design is
elaborated, by constant functions in `aes_pkg`. The S-box is the multiplicative inverse
modulo x^8+x^4+x^3+x+1 (computed as b^254), followed by the affine map with constant 0x63.
The inverse S-box is the inverse permutation of that table. No table is typed in, so
nothing has to be trusted beyond these two formulas.

**Core timing.** The control unit issues one command per clock: `cmd_first`, then
`cmd_mid` Nr-2 times, then `cmd_last`. It sends the round number with each command. The
core runs each command one clock after it was issued, because the key store needs that
clock to read the round key (the round number is the read address). `blk_done` rises one
clock after the last round, when `bus_dout` shows the result.

## Key store (`key_register`)

The stored schedule arrives one 64-bit word at a time and is sorted by word index:

| word index | destination | read |
|---|---|---|
| 0 and 1 | first-key register | combinational |
| 2 to 2Nr-1 | bank row *word/2*, that is the round number | synchronous |
| 2Nr and 2Nr+1 | last-key register | combinational |

The bank is four 32-bit memories, one per key column; a 64-bit write fills two of them.
The first and last keys need their own registers: the prologue and the last round use
them in the same clocks as the bank. The store holds 15 round keys, enough for AES-256.

## Control unit

There are two state machines, joined by a one-bit `sync` line.

**`ctrl_main_fsm`**

1. Reads Nr and the key range from the XREG.
2. Fetches the key, one word per clock. Each returning word is tagged with its index.
3. Copies the data range from the XREG in two states.
4. Pulses `sync`.
5. Loops: read a block's two words into the input buffer, then wait until the round
   sequencer has taken the block.

The round sequencer runs alongside the loop:

- It starts a block when the input buffer is full and the round unit is free.
- A block holds the round unit for exactly Nr clocks.
- A new block never starts until the previous block's last-round command has been issued.

**`ctrl_write_fsm`**

1. Copies the data range when `sync` arrives.
2. Waits once for the first processed block to come out of the pipeline.
3. Then, for each block: waits for the block, writes its two words when the memory port is
   free, and moves the write address on.
4. Pulses `stop` in the clock after the last write.

**Memory port sharing.** `control_unit` shares the single memory port between the two
machines. Reads have priority, so a write waits while a read uses the port.

**Cycle counts** (default build, AES-128):

| operation | clocks |
|---|---|
| one block, key fetched (22 key words) | 48 |
| one block, key already loaded | 26 |
| steady burst | 10 per block (1280 Mbit/s at 100 MHz) |

Memory traffic is 4 accesses per 10 clocks, so the memory is never the limit at this
latency.

## Files

| file | contents |
|---|---|
| `rtl/aes_pkg.sv` | types, constants, GF(2^8) and S-box generator functions |
| `rtl/molen_aes.sv` | top level: control unit + key store + core |
| `rtl/control_unit.sv`, `ctrl_main_fsm.sv`, `ctrl_write_fsm.sv` | control |
| `rtl/key_register.sv` | expanded key store |
| `rtl/aes_core.sv` | folded datapath |
| `rtl/data_in_buf.sv`, `data_out_buf.sv` | 64/128-bit block buffers |
| `rtl/aes_round.sv`, `aes_last_round.sv` | main and final round |
| `rtl/tbox_bram.sv`, `fg_byte_unit.sv`, `aes_sbox.sv`, `gf_mul_enc.sv`, `gf_mul_dec.sv` | round building blocks |
| `tb/aes_ref_pkg.sv` | independent AES model: S-box by search, key expansion, cipher, inverse cipher, stored schedules |
| `tb/tb_<module>.sv` | self-checking test of each module |
| `tb/molen_aes_harness.sv` | host, memory and XREG model used by `tb_molen_aes` |
| `tb/tb_molen_aes.sv` | end to end, all four builds |
| `tb/tb_molen_aes_full.sv` | default build on 16 B, 512 B and 16 KiB messages |

Parameters:

- `molen_aes`, `aes_core` and `aes_round`:
  - `ARCH`: `ARCH_MB` (default) or `ARCH_FG`.
  - `DECRYPT`: 0 (default) or 1.
- `key_register`: `DEPTH` is the number of bank rows, default 14.

Reset is synchronous and active low. It clears only the control state. The data
registers and the key store are never read before they are written.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/aes_pkg.sv tb/aes_ref_pkg.sv \
    tb/tb_molen_aes.sv --top-module tb_molen_aes -Mdir obj_top -o sim && obj_top/sim
```

Swap in another `tb_*.sv` and top module name to run a different test. `-Irtl -Itb` lets
Verilator find the submodules by file name. Every test finishes in a few seconds.

What is verified:

- The FIPS-197 appendix C vectors for AES-128, -192 and -256 pass in all four builds,
  both encrypting and decrypting.
- Random keys and blocks are checked against the reference model in `tb/aes_ref_pkg.sv`.
- The end-to-end test also covers:
  - key reuse;
  - bursts of up to 32 blocks;
  - an empty data range;
  - writes held back by reads on the shared port;
  - a block period of exactly Nr clocks.
- The full-size test runs a 16 KiB message (1024 blocks) on the default build.

## Choices made in this implementation

The published description fixes the structure:

- folded core, with separate prologue and last round;
- a 64-bit bus, and 64/128-bit buffers;
- an expanded-key store with first and last key registers and a bank of four 32-bit
  memories;
- one round per clock;
- two state machines, with one-bit synchronisation;
- software key expansion.

The following points are this design's own:

- The XREG word layout, and end addresses that are exclusive.
- Endianness: big-endian, upper half first.
- A one-clock read latency for memory, and a combinational read for the XREG.
- Reads taking priority over writes on the single memory port.
- The block schedule: a new block enters only after the previous block's last-round
  command. This gives Nr clocks per block.
- The order of the products inside the ROM word, and rotating that word per row.
- Where the registers sit in the memory-based round.
- Logic S-boxes for the last round in both styles.
- The decryption key schedule convention described above.
- Stop as a one-clock pulse.
- A guard that holds the last round while the output buffer is still unwritten. It never
  triggers with this memory timing.

Not built:

- Unrolled cores, with two or more round units.
- A merged encryption/decryption unit.
- Key expansion in hardware. It is host software by design; the test reference includes it.
- The host processor, main memory and XREG. Testbenches model them.
