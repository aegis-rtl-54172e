# AEGIS-style secure processor: security hardware in SystemVerilog

In a single-chip secure processor, only the processor die is trusted. The board, the
DRAM, the buses and the peripherals may all be probed or rewritten by an attacker.
Security then rests on two things the chip must do by itself:

1. **Hold a secret without non-volatile memory.** A ring-oscillator *physical
   unclonable function* (PUF) derives bits from the frequency differences that
   manufacturing variation leaves between identically drawn oscillators. The bits
   exist only while the chip is running and measuring.
2. **Keep off-chip memory honest and private.** Every cache block that leaves the
   chip can be encrypted with a one-time pad (counter mode). Its integrity can be
   checked against a hash tree whose root never leaves the chip.

A small state machine of *secure modes* decides which protections apply, and who
may touch which memory. This repository holds the RTL for that security hardware:
the PUF measurement circuit, the mode controller, the MMU permission check, the
memory-encryption unit, the hash-tree integrity checker, and the sequencer that ties
encryption and checking to cache fills and write-backs. It also holds the on-chip
firmware RAM. The processor core (an OpenRISC 1200 class core), its caches, the UART
and the DRAM controller are outside this RTL. They connect through the ports of
`aegis_secure_top`.

## Block map

```
                      aegis_secure_top
  ro[N_OSC] ──► ro_puf ─────────────────────────────► puf_response / mask
  core ──────► sec_mode_ctrl ── mode ─┬─► access_check (core loads/stores) ─► acc_fault
   (security instructions, hash)      └─► access_check (cache blocks) ─┐
  data cache ─ blk_* ─────────────────────────────────► secure_mem_ctrl ──► mem_* (DRAM bus)
                                                          ├ otp_crypt ── 4 × aes128_enc
                                                          ├ hash_tree_iv ── sha1_compress
                                                          └ mem_arbiter
  core ──────► code_memory (12 KB firmware RAM)
```

| module | role |
|---|---|
| `aegis_pkg` | modes, instruction codes, region map, block geometry (512-bit blocks, 4 × 128-bit chunks) |
| `ro_puf` | oscillator-pair multiplexers, two edge counters, comparator, 1-out-of-k masking |
| `sec_mode_ctrl` | STD / TE / PTR / SSP modes, instruction legality, program hash, debug binding, catch-up stall |
| `access_check` | classifies an address into the protected regions and refuses what the mode may not do |
| `otp_crypt` | pad = AES_K(V, address, time stamp, chunk) for four chunks; XOR in both directions |
| `aes128_enc` | iterative AES-128, one round per clock |
| `hash_tree_iv` | 4-ary hash tree over the dynamic region: build, verify, update |
| `sha1_compress` | SHA-1 compression, one round per clock; node hash = first 128 bits |
| `mem_arbiter` | one memory bus shared by the integrity checker and the data path |
| `secure_mem_ctrl` | sequences time stamps, pads, block transfers and tree operations |
| `code_memory` | single-port 12 KB RAM for the security-instruction firmware |

## Secure modes

| mode | may access | security instructions |
|---|---|---|
| STD (standard) | unprotected memory only | only ENTER_TE / ENTER_PTR |
| TE (tamper-evident) | plus the integrity-verified (IV) regions | ENTER_PTR, SUSPEND, EXIT, SIGN |
| PTR (private tamper-resistant) | plus the encrypted (ME, "private") regions | as TE, and PUF |
| SSP (suspended secure) | unprotected memory only | only RESUME, which returns to the suspended mode |

On every mode, stores to a static (read-only) region are refused. User-level accesses
to the supervisor static regions are also refused. The debug-enable request is frozen
when a secure mode is entered, and it is reported together with the program hash. A
kernel running with debugging on therefore cannot pass for the same kernel with
debugging off. `puf_start` reaches the PUF only in PTR mode.

The physical memory map has three protected areas: user static, supervisor static and
dynamic. Each area has an IV range and an ME range, and the two may overlap. The
bounds arrive on the `regions` port. Firmware sets them when it enters a secure mode.

## Memory encryption: one-time pads

A 512-bit block at address `A` with time stamp `T` is stored as `P ^ pad`, where

```
pad[128*i +: 128] = AES_K( {V[61:0], A[31:0], T[31:0], i[1:0]} ),   i = 0..3
```

There are four AES cores, one per chunk. Because the pad depends only on `A` and `T`,
it is computed while the block itself is still being read. When the memory takes
longer than the 11-cycle pad, the pad is ready before the data arrives, and
decryption costs one XOR. The testbenches use a memory latency of 14 cycles and
check this. Static regions use
`T = 0`, so their pad can start as soon as the address is known. They use a
separate key for the user and the supervisor static area.

For the dynamic region, pads must never repeat. Each dynamic block has a 32-bit time
stamp, incremented on every write-back. Time stamps are stored sixteen to a block in
the last `LEAVES/16` blocks of the dynamic region. By default these are blocks 60 to
63 of 64, at `DYN_BASE + 60*64`. Because they lie inside the region, the hash tree
protects them. Rolling a time stamp back to replay an old ciphertext is then caught
like any other modification, and `tb_secure_mem_ctrl` checks exactly that.

## Integrity: the hash tree

This is the least obvious part of the design.

The dynamic region is `LEAVES` = 64 blocks of 512 bits. A *chunk* is also one 512-bit
block. It holds four 128-bit node hashes, the hashes of its four children. The tree
has `LEVELS = log4(LEAVES)` levels of chunks, all stored in untrusted memory at
`TREE_BASE`:

```
level 1 : 16 chunks at TREE_BASE + (0..15)*64    hashes of data blocks 4c..4c+3
level 2 :  4 chunks at TREE_BASE + (16..19)*64   hashes of level-1 chunks
level 3 :  1 chunk  at TREE_BASE + 20*64         hashes of level-2 chunks
root    :  hash of the level-3 chunk, kept on chip
```

Slot `s` of a chunk is bits `[128*s +: 128]`. The node hash is the first 128 bits of a
SHA-1 compression of the 512-bit block, started from the standard initial value with
no padding.

`hash_tree_iv` runs three commands:

* **verify(leaf, data)** reads the `LEVELS` chunks on the leaf's path. It then hashes
  the data and each chunk, bottom-up, and compares every hash with its slot in the
  parent; the top chunk is compared with the root. Any mismatch ends the command
  with `ok = 0`.
* **update(leaf, data)** first checks the path as above. Writing only the new hash
  is not enough: the sibling hashes that go into the new chunk hashes must be
  trusted. The command then puts the new hash into its level-1 slot and rehashes and
  writes each chunk in turn. Finally it replaces the root.
* **build** hashes the whole region bottom-up, writes every chunk and sets the root.
  It is run once when the protected region is set up.

Cost per command, with a memory that acknowledges after `A` cycles and a hash that
takes 82 cycles (start plus 80 rounds plus handoff):

* verify: `LEVELS` reads plus `LEVELS + 1` hashes, about 3·(A+1) + 4·82 cycles at
  the default size;
* update: the path check, then `LEVELS` writes and `LEVELS + 1` more hashes.

There is no hash cache, so every command walks to the root.

**Background checking and the stall rule.** A block fill is answered as soon as the
block is decrypted. The tree check of that block then continues in the background,
and `iv_busy` stays high until it ends. Write-backs likewise are acknowledged once
the block is written, and the tree update follows. Running ahead of verification is
safe as long as nothing observable escapes first. So `sec_mode_ctrl` raises `stall`
while `iv_busy` is high in two cases: a security instruction is issued, or a PTR-mode
store goes to memory that is not private. A failed check sets the sticky `tamper`
output.

**Fill sequence** (`secure_mem_ctrl`), for a block in the dynamic IV+ME region:
read the time-stamp block → verify it against the tree → start the pad → read the
data block (the pad is computed meanwhile) → return `ciphertext ^ pad` → verify the
stored block in the background.

**Write-back sequence:** read and verify the time-stamp block → increment the stamp →
write the time-stamp block and update the tree → compute the pad → write
`plaintext ^ pad` → acknowledge → update the tree in the background.

Blocks that are only ME, only IV, or unprotected skip the steps that do not apply. A
request whose class carries `fault` is answered with `resp_err` and causes no memory
traffic.

**Static regions: MACs instead of a tree.** Static regions are read-only, so an old
copy of a block can never replace a newer one. A per-block MAC that binds the data to
its address is therefore enough. The MACs live in untrusted memory, 16 bytes per
64-byte block. The user table starts at `MAC_USER_BASE` and the supervisor table at
`MAC_SUP_BASE`; a block's MAC sits at the table base plus a quarter of the block's
offset in its static IV range. MAC slot `s` of a 64-byte MAC block is bits
`[128*(3-s) +: 128]`, so byte offset 0 holds the most significant bits. The MAC is

```
MAC = first 128 bits of C({K, A, C(B), 192'b0})
```

Here `C` is the SHA-1 compression, `K` the static key of the area (user or
supervisor), `A` the block address and `B` the block as stored, which is ciphertext
in a static ME region. After the block is returned, the MAC block is read and the
two compressions run in the background, with `iv_busy` high. A mismatch sets
`tamper`. The MACs are written by whoever prepares the program image, which is
outside this hardware. The top module passes in the base of the static IV range
that the address hit.

## The ring-oscillator PUF

`ro_puf` measures one oscillator pair at a time. Pair `p` of the fixed sequence uses
oscillators `p mod N` and `(p + N/2 − 1) mod N`. All 1016 pairs of the default size
are distinct. Response bit `j` owns pairs `j·K … j·K + K − 1`.

For each pair, the block:

1. points both multiplexers at the pair;
2. flushes the synchronisers for 3 cycles;
3. counts rising edges of each oscillator for `WINDOW` clock cycles;
4. sets the bit to `count_a > count_b`.

* **Initialise:** all K pairs of a bit are measured. The pair with the largest count
  difference gives the bit, and a one-hot mask of K bits records the choice. Pairs
  far apart in frequency rarely swap order when temperature or voltage changes. The
  mask reveals which pairs were chosen, but not the bit values, so it can be stored
  in public.
* **Re-generate:** only the masked pair of each bit is measured.

`done` rises `1 + pairs·(WINDOW + 5)` clock edges after `start` is sampled. When
re-generating, add one cycle for each candidate skipped before the masked one. At
the defaults (1024 oscillators, 1-out-of-8, 127 bits, 1024-cycle window),
initialising takes about 1.05 M cycles.

The counters run in the system clock domain behind two-flop synchronisers. An
oscillator must therefore run below half the clock rate; a faster ring needs a
prescaler in front of the `ro` inputs. The oscillators themselves are analog and are
not in the RTL. The testbenches drive `ro` from `tb/ro_array_model.sv`, a phase
accumulator per oscillator.

The 127 response bits fit a BCH(127, 64, 21) code. That code corrects 10 flipped bits
and yields a 64-bit secret. Error correction, the syndrome, and hashing the
corrected response into keys are firmware tasks and are not in this RTL.

## Design choices

These choices are this design's own. The underlying architecture fixes only the
mechanisms.

* **Hash function.** SHA-1 compression truncated to 128 bits, so that four node
  hashes fill one block. The architecture does not name a hash.
* **Pad cipher.** AES-128 in the forward direction. A one-time pad needs only that
  encryption and decryption use the same function, so the inverse cipher would
  serve equally.
* **Pad input.** The layout `{V, A, T, i}` and the value of `V`
  (`V_CONST = 62'h0AE6_1500_AE61_5EC`) are choices.
* **Time stamps.** 32 bits wide, stored inside the tree-protected region, and
  incremented on every write-back. A time stamp wraps after 2^32 write-backs of one
  block; re-keying is left to firmware.
* **Region geometry.** The dynamic region the tree covers is fixed at
  elaboration (`LEAVES`, `DYN_BASE`, `TREE_BASE`). The software region registers
  must agree with it.
* **Static IV MACs.** The MAC function (a keyed two-step SHA-1 compression) and the
  MAC table layout are this design's own choices.
* **Not included.** There is no hash cache, no ECC or key generation hardware, and
  no processor core, caches, UART or memory controller.
* **Security instructions.** The set (ENTER_TE, ENTER_PTR, SUSPEND, RESUME, EXIT,
  SIGN, PUF) and the transitions allowed from each mode are one reading of the
  mode rules.
* **Memory bus.** The arbiter gives fixed priority to the integrity checker. Every
  port uses a request/ack handshake: the request holds until ack, and read data
  comes with ack.
* **Sequencing.** `secure_mem_ctrl` is serial: it takes no new block request until
  the background check of the previous one has ended.

## Sizes

Defaults: `N_OSC` = 1024, `K_MASK` = 8, `N_BITS` = 127, `WINDOW` = 1024,
`LEAVES` = 64, and `CODE_BYTES` = 12288.

After yosys coarse synthesis:

* `aegis_secure_top`: about 40 k word-level cells, 8.7 k flip-flop bits and 98 k
  memory bits. The memory bits are the firmware RAM.
* One `aes128_enc`: about 9.8 k cells, because the S-boxes are computed as logic
  rather than stored as tables.

## Simulation

Every testbench is self-checking. Each ends with a line `TB_RESULT checks=N failures=M`
and has a watchdog.

| testbench | what it shows |
|---|---|
| `tb_aes128_enc` | FIPS-197 vectors, latency |
| `tb_sha1_compress` | SHA-1 of "abc" and of the empty message, latency |
| `tb_otp_crypt` | pads against a reference AES (`tb/aes_ref_pkg.sv`), static and dynamic, decrypt, latency |
| `tb_hash_tree_iv` | root against a reference tree (`tb/sha1_ref_pkg.sv`), tampered block and chunks, replay, update |
| `tb_ro_puf` | most-distant-pair selection, mask, re-generation after drift, run time |
| `tb_access_check` | 4000 random accesses against a reference rule table |
| `tb_sec_mode_ctrl` | 400 random instructions against a reference transition table, stalls, debug, hash |
| `tb_mem_arbiter` | priority, grant holding, concurrent random traffic |
| `tb_code_memory` | byte-masked random traffic over the whole 12 KB |
| `tb_secure_mem_ctrl` | ciphertext and time stamps in memory, decryption, hidden pad latency, static keys, static MACs (accepted, and a block moved to another address caught), faults, replayed time stamp, modified block |
| `tb_aegis_secure_top` | end to end with a 32-oscillator PUF; counts each mechanism (mode switch, refused PUF, access fault, both stalls, illegal instruction, background check, refused transfer, tamper, PUF initialise and re-generate, static MAC check) and fails if one never occurs |
| `tb_aegis_full` | the same sequence with the top at its default sizes, about 15 s of simulation |

Both top-level testbenches include `tb/aegis_top_test.svh`. Off-chip memory is
modelled by `tb/block_mem_model.sv`. To run one with Verilator:

```
verilator --binary --timing -Wno-fatal --top-module tb_aegis_secure_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/aegis_pkg.sv tb/aes_ref_pkg.sv \
  tb/sha1_ref_pkg.sv tb/tb_aegis_secure_top.sv
./obj_dir/Vtb_aegis_secure_top
```

Replace the module and file names to run any other testbench.
