# Cell-site vault: secure key storage and encrypted DRAM for a base-station SoC

A base station sits in a cabinet or on a pole where anyone with a screwdriver
can reach its boards. Its secrets (subscriber keys, operator credentials,
the signed software image) must survive an attacker who can probe the DRAM
bus, swap memory contents, or reboot the board into their own code. This RTL
is the hardware part of a small "vault" inside the baseband SoC that closes
those holes:

* a **master key in one-time fuses**, readable only by secure boot software,
  and only until that software throws a **key-access switch** that no
  software can reset — only a hard reset of the chip reopens it;
* an **encrypted memory system** between the on-chip bus and the DRAM, so
  that nothing leaves the chip in clear and nothing that comes back altered
  is accepted;
* **secure-only control registers** that tie the two together.

The processor's secure execution state (a TrustZone-like "secure" bit that
travels with every bus access) is the only thing that may touch any of it.

```
            secure bit
  CPU/DMA ------------+-------------------------------+
                      |                               |
               +------v------+                 +------v------+
               |  vault_regs |---- throw ----->| key_access  |<-- hard_rst_n
               +-------------+<--- key --------|   _switch   |
                 | key load |                  +------^------+
                 | mutate   |                         | 256-bit key
  mem port  +----v----------v------------------+ +----+--------+
 ---------->| encrypted_memory                 | |fuse_key_    |
  32b addr  |  bus_interface -> write_buffer   | |  store      |
  256b data |        |              |          | +-------------+
            |        v              v          |
            |     encdec_logic (Rijndael 288) |
            |        |   rijndael_key_store    |
            |        |   key_region_ctrl       |
            |     dram_ctrl (9 x 40-bit words) |
            +--------+-------------------------+
                     | 40-bit words, ECC
                   DRAM
```

## How a block is protected

The unit of protection is a 256-bit (32-byte) block, one cache line. On its
way to DRAM a block is joined with its own 32-bit byte address into a 288-bit
value and encrypted with **Rijndael at a 288-bit block size** (nine 32-bit
columns, 256-bit key, 15 rounds). Rijndael is defined for any block of 4 to
8 columns; nine columns use the same round functions, with the row-shift
offsets of the 8-column case (rows 1, 2, 3 shift by 1, 3, 4 columns).

On a read the 288 bits are decrypted and the top 32 bits must equal the
address that was asked for. Because every output bit of the cipher depends
on every input bit, an attacker who changes any ciphertext bit, replays an
old block into another place, or copies one block over another produces a
random 32-bit value there, caught with probability 1 − 2⁻³². So the address
does the job of a message authentication code without any separate MAC
computation or storage lookup: the "MAC" is simply the ninth word of the
cipher block.

A failed check is reported, never silently used:

* a read answers with `err` set;
* the failure pulses `fail`, sets the sticky `irq`, and counts in `FAILS`;
* an uncorrectable (double-bit) ECC error is treated the same way.

Not covered (and not claimed): replay of an *older version of the same
block at the same address* passes the check until that block's key changes.
Key mutation (below) bounds how long such an old copy stays valid.

## Memory layout: 9 words for every 8

Each 288-bit cipher block is stored as nine 32-bit words, and each word gets
seven ECC bits (an extended Hamming code: single errors corrected, double
errors detected), giving a 40-bit DRAM word with one unused bit:

```
 DRAM word = { 1'b0, check[6:0], data[31:0] }
 check[5:0]: Hamming parity over codeword positions 1..38 (data at non-powers of two)
 check[6]  : parity over all 39 bits
```

Logical word address `W` (block `B = W/8`) maps to DRAM word address
`9·B = W + W/8`, one adder in `addr_expand`. Word `i` of a block holds cipher
bits `[32i+31:32i]`, so the address-carrying word is the ninth. The 12.5 %
space overhead is the cost of authentication; ECC rides in the width that a
40-bit ECC DIMM already has.

With `MEM_BLOCKS = 3 728 270` (the default) the encrypted memory presents
119 MB of protected data in a 128 MiB DRAM.

## The write buffer and backfill

Because the cipher block is the whole 32 bytes plus address, nothing smaller
can be written to DRAM: changing one byte means decrypting the block,
patching it, and re-encrypting it. The write buffer hides that:

* A bus write (any byte enables) completes as soon as it is in the buffer.
  Writes to a block already queued merge into its entry.
* Entries retire in order. A head entry with every byte valid is encrypted
  and written straight away. A partial one is first **backfilled**: the
  block is read and decrypted, and only the bytes the bus did not write are
  taken from it.
* A read whose bytes are all valid in some entry is a **hit** and returns
  the next cycle. A read of a block whose entry lacks some of the requested
  bytes waits until that entry is in memory, then misses normally.
* A full buffer stalls bus writes (`mem_req_ready` low).

The entry being backfilled or encrypted is locked; a bus write to the same
block waits for it to retire and then opens a new entry.

## Two keys, a boundary, and key mutation

`rijndael_key_store` holds two key slots, each with its full 144-word
schedule (expanded one word per cycle, 136 cycles after a load). A
**boundary register** splits memory into two regions: blocks below it use
the *new* slot, blocks at or above it the *current* slot. One compare per
access picks the key.

A key **mutation** re-encrypts memory under a fresh key in the background:

1. software loads the new key into the slot that is not current;
2. software sets `CONTROL.START_MUTATE`; the boundary starts at 0;
3. while nothing else is pending, `encdec_logic` reads the block at the
   boundary, decrypts it with the current key, encrypts it with the new one,
   writes it back, and increments the boundary;
4. at the end of memory the new slot becomes current and the boundary returns
   to 0; the old slot is free for the next key.

Normal reads and writes keep running throughout; the boundary decides their
key when each job starts. A block that fails its check during mutation is
left untouched (it will keep failing). Key loads are refused while a
mutation runs.

Job priority in `encdec_logic`: read miss, then write-buffer retirement,
then one mutation step. Reads come first because the processor stalls on
them; writes have already completed on the bus.

## Secure boot: fuses and the key-access switch

`fuse_key_store` is a model of the one-time fuse array: 256 key fuses, all
zero when made, each burnable once, plus a **lock fuse** (index 256) after
which no fuse can change. `key_access_switch` sits between fuses and the
rest of the chip: once software writes `CONTROL.THROW_SWITCH`, the key
reads as zero, the `MASTER` registers answer `err`, and fuse burning is
refused. Only `hard_rst_n` clears it.

The intended boot sequence: secure ROM code reads the master key, uses it
to check and decrypt the next software stage and to derive memory keys,
loads those keys into the memory system, throws the switch, and then
passes control on. Code that runs later, even in the secure state, never
sees the master key.

## Register map (`vault_regs`)

All registers are 32 bits at byte offsets on the register port. Every
non-secure access, unknown offset or forbidden access answers `err` and has
no effect. Responses come one cycle after the request.

| Offset | Name | Access | Meaning |
|---|---|---|---|
| 0x00 | STATUS | R | bit0 key access open, 1 fuses locked, 2 mutation active, 3 current key slot, 4 failure flag (= `irq`), 5 key load allowed, 6 memory idle |
| 0x04 | CONTROL | W | bit0 throw switch, bit1 clear failure flag and counters, bit2 start mutation (err unless key load allowed) |
| 0x08 | KEYLOAD | W | load KEYDATA into slot `wdata[0]` (err while expanding or mutating) |
| 0x0c | BOUNDARY | R | current boundary (block index) |
| 0x10–0x2c | KEYDATA | W | memory key, word 0 = key bits 255:224 |
| 0x30 | ECC_CORR | R | DRAM words corrected since the last clear |
| 0x34 | FAILS | R | authentication failures since the last clear |
| 0x38 | FUSE_BURN | W | burn fuse `wdata[8:0]` (256 = lock); err once thrown or locked |
| 0x40–0x5c | MASTER | R | master key, word 0 = bits 255:224; err once thrown |

The address of the last failing block is available inside
`encrypted_memory` (`fail_addr`) but is not brought to a register.

## Interfaces and timing

Top module `cell_site_vault` (package `vault_pkg` for the structs):

* **Memory port**: `mem_req_valid/mem_req_ready/mem_req` with
  `mem_req_t {write, secure, addr[31:0], be[31:0], wdata[255:0]}`; the
  response `mem_rsp_valid/mem_rsp {err, rdata[255:0]}` comes once per accepted
  request, in order. One request is outstanding at a time. The address
  is a byte address; bits 4:0 are ignored (a request covers one block, bytes
  selected by `be`, byte `b` at `wdata[8b+7:8b]`).
* **Register port**: `reg_req_valid/reg_req {write, secure, addr[7:0], wdata}`,
  `reg_rsp_valid/reg_rsp {err, rdata}`.
* **DRAM port**: `dram_cmd_valid/dram_cmd_ready/dram_cmd {we, addr[31:0],
  wdata[39:0]}`, one word per cycle; read data on `dram_rvalid/dram_rdata`
  in command order, any latency. This is a word interface: a DDR2 PHY and
  command scheduler would sit behind it and can burst the nine consecutive
  words.
* `irq`: high while the failure flag is set. `hard_rst_n`: asynchronous
  reset of everything, and the only way to reopen key access.

Latencies in clock cycles (`L` = DRAM read latency):

| Operation | Cycles |
|---|---|
| Write, buffer not full | response 1 cycle after acceptance |
| Read hit in the write buffer | 1 |
| Read miss | 28 + L (2 start, 9 commands, 1 collect, 15 decrypt, 1 answer) |
| Full-block retire | about 27 (start, 15 encryption rounds, 9 write commands) |
| Partial retire | one read miss worth of work, then a full retire |
| Key load | 136 cycles of schedule expansion |
| Mutation | one read + decrypt + encrypt + write per block |

Each Rijndael engine does one round per clock. At a 215 MHz clock the
15-round decryption takes 70 ns.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `cell_site_vault`, `encrypted_memory`, `key_region_ctrl` | `MEM_BLOCKS` | 3 728 270 | logical 256-bit blocks (128 MiB of DRAM at 36 bytes each) |
| `cell_site_vault`, `encrypted_memory`, `write_buffer` (`DEPTH`) | `WB_DEPTH` | 4 | write-buffer entries |
| `rijndael_enc/dec/key_store` | `NB`, `NK` | 9, 8 | block and key size in 32-bit words; other sizes give standard Rijndael (NB=4, NK=8 is AES-256) |
| `key_access_switch`, `fuse_key_store` | `KEY_W` | 256 | master key bits |

## Where this design makes its own choices

The block structure (bus interface, write buffer, encryption logic, DRAM
controller; address-plus-data cipher block; 9/8 expansion; ECC in a 40-bit
word; two key regions with a boundary register; fuses with a lock fuse; a
switch cleared only by hard reset; secure-state gating) follows the
published description of this vault. The following are choices made here:

* row-shift offsets for a 9-column Rijndael block (taken from 8 columns),
  the 256-bit key size, and one round per cycle;
* the address in the top 32 bits of the cipher input;
* the ECC code and bit placement;
* write-buffer depth, FIFO retirement, merging, and waiting reads on
  partial hits;
* the job priority, and what happens on a failed backfill (missing bytes
  become zero, the written bytes are kept) or a failed mutation step;
* refusal of every non-secure access, the register map, and the key-loading
  and mutation software interface;
* a word-level DRAM port instead of a DDR2 controller;
* the fuse array is a behavioural model of what is a process-specific
  macro; a battery-backed key RAM would fit the same ports.

Not built: the processor, caches, DMA, interconnect, boot ROM contents, the
AES and Kasumi accelerators, the other SoC peripherals, and the DRAM itself.

## Files

`rtl/` — packages `rijndael_pkg` (S-box and tables computed from the field
arithmetic at elaboration, round functions), `vault_pkg` (widths, structs,
register map), `ecc_pkg`; modules as in the diagram plus `rijndael_enc`,
`rijndael_dec`, `ecc_encoder`, `ecc_decoder`, `addr_expand`.

`tb/` — one self-checking testbench per module (`tb_<module>`; the ECC
encoder's is `tb_ecc`, both Rijndael engines' key path is checked in
`tb_rijndael*`), a reference model package `tb_ref_pkg` (byte-array
Rijndael written independently, ECC), and `dram_model` (sparse DRAM with
latency, random stalls and bit-flip injection). The Rijndael testbench
checks the FIPS-197 AES-256 vector with `NB=4` before the 288-bit case.

`tb_cell_site_vault` runs the whole vault with 12 blocks of memory: fuse
burning and lock, master key read, refusal to non-secure code, switch throw
and hard-reset reopening, memory key load, random secure traffic of full and
partial blocks checked against a model, ciphertext checked in the DRAM model,
single-bit error correction, a moved block caught by the address check with
`irq`, refused non-secure memory accesses, and a complete key mutation under
traffic. It counts write-buffer hits, misses, merges, backfills, full-buffer
stalls, refusals, corrections, failures and mutation steps, and fails if any
never happened. `tb_cell_site_vault_full` runs the same flow on the top at
its default parameters (3.7 M blocks); it checks a partial mutation (the
blocks in use and two more, with both regions read back) since a full pass over 128 MiB would
take far too long in simulation. Mutation steps over never-written blocks
fail their check by design and are counted as failures of the memory, not of
the test.

Every testbench ends with a line `TB_RESULT checks=N failures=M`.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/vault_pkg.sv rtl/rijndael_pkg.sv rtl/ecc_pkg.sv tb/tb_ref_pkg.sv \
  tb/tb_cell_site_vault.sv --top-module tb_cell_site_vault
./obj_dir/Vtb_cell_site_vault
```

Two-state simulation: everything the design reads is reset by `hard_rst_n`
except the fuse array, which starts at all zeros like real fuses.
