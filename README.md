# Secure memory for an IoT edge SoC: ASCON encryption and a Bonsai Merkle tree

An edge device's DRAM sits on board traces that an attacker can probe. They can
read it (data theft), change it (tampering), or put back an older, once-valid
copy (replay). This design sits between the processor's last-level
cache (LLC) and the DRAM controller and makes all three attacks useless for a
protected address window:

* **Confidentiality.** Every 64-byte block is encrypted in *split-counter mode*.
  The block is XORed with a one-time pad produced by the lightweight ASCON-128a
  cipher from the block's address and counters.
* **Integrity.** Every block has a 64-bit ASCON-Hash over its address, its
  counters and its ciphertext.
* **Freshness.** The counters are covered by an 8-ary *Bonsai Merkle tree*.
  The tree's root never leaves the chip.

A 4-way, 32 KB *metadata cache* keeps counters, hashes and tree nodes on chip,
which removes most of the extra DRAM traffic. Around the memory controller
the SoC has:
- a true random number generator (TRNG) built from four tetrahedral ring
  oscillators;
- a key manager;
- a 128-byte secure storage whose slots are kept encrypted and authenticated
  with the same ASCON core.

Everything is SystemVerilog; the processor, the LLC and the DRAM
controller are outside and connect through ports.

## How a protected access works

The controller (`smc`) handles one LLC request at a time: a 512-bit block read
or write, held until `llc_ack`. First the address is compared with the
protected window (`base <= addr < base + size`, two registers in the style of
RISC-V PMP; default 1 GB at 0xC000_0000). An address outside the window goes
straight to DRAM (*bypass*). Inside the window, three steps run in order:

1. **Check the counters.** The integrity controller (`int_ctrl`) fetches the
   page's counter block through the metadata cache and hashes it. It compares
   the hash with the entry in the level-1 tree node, then repeats one level up.
   It stops with success as soon as a node came from the metadata cache
   (anything on chip was checked when it was brought in). Otherwise it stops at
   the on-chip root (*early stop* when the cache hits). A mismatch stops with a
   fault naming the level.
2. **Encrypt or decrypt** (`enc_ctrl`).
   - **Read:** the ciphertext is fetched from DRAM while ASCON computes the pad;
     the plaintext is their XOR.
   - **Write:** the block's 7-bit minor counter is incremented first, written
     back to the counter block in the cache, and the new pad encrypts the data.
     If the minor counter would overflow, the page is re-encrypted (below).
3. **Verify or update.**
   - **Read:** the controller hashes `{address, counters, ciphertext}` and
     compares it with the stored 64-bit data hash. A mismatch is fault level 0.
   - **Write:** the new data hash is stored. The counter block is re-hashed into
     level 1, that node into level 2, and so on up to the root register.

A read returns data only if every check passed. Otherwise `llc_ack` comes with
`llc_fault`, `fault_addr` and `fault_lvl` for the processor's exception
handler. `fault_lvl` is 0 for the data hash, or 1..6 for the tree level whose
stored hash disagreed. A replayed counter block shows up at level 1 or
above; a changed ciphertext or data hash shows up at level 0.

**A protected block must be written before its first read.** At reset the
memory holds no valid data hashes. Reading a never-written block reports a
level-0 fault.

## Counters and the one-time pad

Each 4 KB page (64 blocks) owns one 512-bit counter block:

| bits | field |
|---|---|
| 511:448 | 64-bit major counter of the page |
| 7i+6 : 7i | 7-bit minor counter of block i (block 0 at the bottom) |

The pad for a block is the ASCON-128a encryption, under the memory key, of a
512-bit seed:

```
seed  = { SEED_IV (409 bits) , block address (32) , major (64) , minor (7) }
nonce = { block address (32) , major (64) , 25'b0 , minor (7) }
```

Encrypting a block costs four 128-bit seed blocks plus the cipher's padding
block. The four ciphertext blocks are the pad. The address and counters sit
in both the seed and the nonce, so two blocks, or two versions of one block,
never share a pad.

**Re-encryption.** A write that finds its minor counter at 127 triggers a
re-encryption of the page:
- the major counter is incremented and all 64 minors are cleared (the written
  block itself also uses minor 0);
- the page's other 63 blocks are each processed in turn. The LLC is asked
  first through the snoop port (`snp_*`). On a hit, its plaintext copy is
  used. On a miss, the block is read from DRAM and decrypted with the old
  counters.
- each block is encrypted again with the new counters and written back. Its
  data hash is recomputed, because the hash covers the counters.

With 7-bit minors this happens once every 128 writes to one block. A 64-bit
major counter never wraps in practice.

## The integrity tree and the metadata map

The data hashes need no tree: they include the counters, so an old
ciphertext/hash pair fails once the counter has moved on. Only the counter
blocks must be protected against replay. Each tree node is one 512-bit block
holding eight 64-bit hashes of eight blocks of the level below. For a 1 GB
window:

| region | base address | size | content |
|---|---|---|---|
| counter blocks | 0x8000_0000 | 16 MB | 2^18 pages x 64 B |
| data hashes | 0x8100_0000 | 128 MB | 8 B per 64 B block |
| tree level 1 | 0x8900_0000 | 2 MB | hashes of counter blocks |
| tree level 2 | 0x8920_0000 | 256 KB | |
| tree level 3 | 0x8924_0000 | 32 KB | |
| tree level 4 | 0x8924_8000 | 4 KB | |
| tree level 5 | 0x8924_9000 | 512 B | eight blocks |
| root (level 6) | register in `int_ctrl` | 64 B | eight hashes |

That is 146.3 MB of metadata per GB of data. The map functions are in
`smc_pkg` (`ctr_addr`, `dh_addr`, `node_addr`, `node_slot`).

The two hash messages, in 64-bit words, each closed by ASCON-Hash padding:
- data hash: `{address, 25'b0, minor}`, `major`, then the eight ciphertext
  words, most significant first;
- tree node: the eight words of the child block.

The hash is the first 64-bit output block of ASCON-Hash.

At boot, `int_ctrl` computes the root of an all-zero counter image, six
hashes in all. That image is what the DRAM holds if the counter region and
each tree level are initialised to the matching all-zero node. The
testbenches' DRAM model does this. `ready` rises when the root is done.

Updates always climb to the root, even when a node is in the cache. This
way, a dirty node evicted later never leaves a parent with a stale entry.
Verification, in contrast, stops at the first node found on chip.

## Metadata cache

`meta_cache` serves counter blocks, data-hash blocks and tree nodes. It is a
write-back cache: 64-byte lines, 4 ways, 2-bit LRU ages per way, 32 KB by
default (128 sets). A write carries a bit mask and merges into the cached
line: new minor/major counters, or a single 64-bit hash. A hit answers in
three clock edges. A miss adds a write-back of a dirty victim and a line
fill. `resp_hit` tells the integrity controller whether the line was already
on chip. The encryption and integrity controllers share the cache through a
round-robin arbiter.

Setting `CACHE_BYTES = 0` (`META_CACHE_BYTES` on the top) gives the
configuration without a metadata cache. Every request then misses, a read
costs one line fetch, and a write costs a fetch, the masked merge and a
write-through before the answer. Tree verification can then never stop early.
The controller traffic test (`tb_smc`) built this way passes all its data,
tamper and replay checks; only its early-stop count stays at zero, as
expected.

## Shared ASCON core and arbitration

One `ascon_core` serves three masters through a round-robin arbiter (`rr_arbiter`):
- the encryption controller;
- the integrity controller;
- the processor-side port `x_*`, used here by the secure storage.

The core computes one permutation round per clock:
- ASCON-128a encrypt/decrypt with 128-bit blocks and no associated data;
- ASCON-Hash with a 64-bit rate.

A one-block hash finishes 25 clock edges after `start`. A pad (4 blocks plus
padding) takes about 12 + 5 x 8 cycles.

The DRAM port has four masters: bypass, the encryption controller's block
transfers, its re-encryption traffic, and the metadata cache. All transfers
are whole 512-bit blocks, held until `mem_ack`.

## Keys, TRNG and the oscillator model

`trng` samples four oscillators with one flip-flop each, XORs the samples, and
registers the result as one random bit per clock. It also packs the bits
into 32-bit words for the bus.

`tetra_osc` models one modified tetrahedral oscillator at gate level. It has:
- three inverter loops of 3, 5 and 7 stages, each gated by `en` through a NAND;
- an XOR that stands for the node the loops fight over;
- a pair of switchable inverters, chosen by a multiplexer, in the fastest loop.
  The select signal toggles itself every 128 output edges.

The stage delays exist only in simulation. Synthesis sees intended
combinational loops. In silicon the oscillator is a hand-placed cell whose
randomness comes from analog jitter. A logic simulation cannot show that
randomness, so the TRNG test checks only balance and change rate.

`key_manager` holds three keys: the current memory key, the previous memory
key, and the storage key. A key can be generated from 128 TRNG bits (one per
clock) or loaded from outside. The memory controller always uses the current
key. Generate or load it before writing protected data: after a key change,
blocks written under the old key decrypt to garbage, although their hashes
still verify.

## Secure storage

`secure_storage` has eight 16-byte slots (128 bytes). A store encrypts the
staged 128-bit value with ASCON-128a under the storage key. The nonce is the
slot number and a per-slot write counter. The ciphertext and the 128-bit tag
go into the slot. A load decrypts and checks the tag:
- if the tag matches, the plaintext appears in the DATA registers;
- if not, DATA reads zero, STATUS bit 1 is set and `storage_exc` pulses.

## The top level, `secure_soc`

Ports (all plain signals):

| group | signals | meaning |
|---|---|---|
| system bus | `sys_req/we/addr/wdata`, `sys_rdata`, `sys_ack` | 32-bit processor bus, request held until a one-cycle ack |
| LLC | `llc_req/we/addr/wdata`, `llc_ack`, `llc_rdata` | block miss / write-back |
| LLC look-up | `snp_req/addr`, `snp_ack/hit/data` | used during re-encryption |
| DRAM | `mem_req/we/addr/wdata`, `mem_ack`, `mem_rdata` | 512-bit blocks |
| exceptions | `mem_fault`, `fault_addr`, `fault_lvl`, `storage_exc` | |
| status/events | `smc_ready`, `ev_bypass`, `ev_reenc`, `ev_snoop_hit`, `ev_early_stop`, `ev_fault`, `ev_keygen` | one-cycle pulses for counters |

System-bus registers:

| address | register |
|---|---|
| 0x1000_0000 / 0x1000_0004 | protected window base / size |
| 0x1000_0008 | bit 0: controller ready |
| 0x1000_1000 | write bit 0 = generate key, bit 1 = target (0 memory, 1 storage); read {storage key valid, memory key valid, busy} |
| 0x1000_1004 | write: load EXT0..3 as key, bit 1 = target |
| 0x1000_1010..1C | EXT0..EXT3 (EXT0 = key bits 127:96) |
| 0x1000_2000 | read: random word (consumes it) |
| 0x1000_2004 | read bit 0: word valid; write bit 0: oscillator enable |
| 0x1000_3000..0C | storage DATA0..3 |
| 0x1000_3010 | storage CMD: bits 2:0 slot, bit 8 load (else store) |
| 0x1000_3014 | storage STATUS: busy, last load failed, slot valid, slot |

## Where this design departs from the original

- **DRAM width.** The DRAM port carries whole 512-bit blocks. The original has
  a 32-bit DRAM bus with a block adapter in front of the DRAM controller;
  narrowing is left to that controller.
- **ASCON interface.** The original ASCON unit is driven over a 32-bit bus
  with instruction and status words. Here the core has a direct 128-bit block
  interface and is written from the published ASCON algorithm.
- **Step overlap.** The three steps of a protected access run one after the
  other, with one request in flight. The original overlaps the hash-value
  fetch with hash generation.
- **Tree updates.** Updates climb the whole tree, rather than stopping at a
  cached level.
- **Oscillator structure.** The oscillator's internal structure (loop lengths,
  XOR for the shared node, a switched pair of inverters) is a model choice,
  not a copy of the transistor-level circuit.
- **Storage access.** The secure storage is reached through a register window
  rather than as memory-mapped data with its own address check.
- **Fixed sizes.** The hash size is fixed at 64 bits and the encryption is
  always counter mode (no direct-mode option). The metadata cache is either
  off (`CACHE_BYTES = 0`: every access misses and writes go straight through)
  or at least one set of four ways.
- **Chosen details.** The register maps, handshakes, the metadata address
  map, the seed constant (`SEED_IV`) and the nonce are this design's choices.
- **Not included.** The processor, LLC, UART, SPI and DRAM controller/PHY.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. They need `verilator --binary --timing`.
Examples:

```
verilator --binary --timing --assert -Itb rtl/ascon_pkg.sv rtl/smc_pkg.sv rtl/*.sv \
  tb/tb_ref_pkg.sv tb/tb_dram_model.sv tb/tb_secure_soc.sv --top-module tb_secure_soc
./obj_dir/Vtb_secure_soc

verilator --binary --timing --assert rtl/ascon_pkg.sv rtl/ascon_core.sv \
  tb/tb_ref_pkg.sv tb/tb_ascon_core.sv --top-module tb_ascon_core
```

`tb_ref_pkg` is an independent reference model. It contains a table-driven
ASCON permutation, AEAD, hash, pad, data-hash and tree-node functions, and
the all-zero tree. The testbenches compare the RTL against it.

| testbench | what it shows |
|---|---|
| `tb_ascon_core` | known answers (empty hash, ASCON-128a with key/nonce 00..0f), random AEAD and hash against the model, decryption tag check, latency |
| `tb_rr_arbiter` | one-hot grants, grant held while requested, no starvation under random requests |
| `tb_meta_cache` | random masked reads/writes against a golden memory and a model of 4-way LRU: data, hit flag, write-back count, hit latency |
| `tb_meta_nocache` | the cache built with `CACHE_BYTES = 0`: data, no hit ever, one memory read per read, write-through of every write |
| `tb_enc_ctrl` | pads and ciphertexts against the model, counter increments, a full page re-encryption with snoop hits |
| `tb_int_ctrl` | boot root, data-hash verify (good, tampered, stale counter), tree walk and update, early stop on a cached node, a changed counter block (level 1) and a changed counter block with a matching level-1 entry (level 2) |
| `tb_tetra_osc`, `tb_trng` | oscillation, select switching, bit balance and change rate, word collection |
| `tb_key_manager` | key generation from the random stream, previous key kept, external load |
| `tb_secure_storage` | slot contents equal ASCON-128a of the data, load round trip, tampered ciphertext or tag rejected |
| `tb_smc` | controller with 4 KB metadata cache |
| `tb_secure_soc` | whole SoC at default sizes (32 KB cache, 1 GB window) |

`tb_smc` and `tb_secure_soc` share one test program, `tb_smc_traffic.svh`. It
does the following:
- writes and reads random blocks, checking the exact ciphertext in DRAM;
- exercises the bypass;
- writes one block 128 times to force a re-encryption with three LLC snoop
  hits;
- flips a ciphertext bit in DRAM (fault level 0);
- replays an old ciphertext, data hash and counter block after they have been
  evicted from the metadata cache (fault level 1);
- requires each mechanism (bypass, re-encryption, snoop hit, early stop,
  fault) to have happened.

The SoC test also generates both keys from the TRNG and exercises the secure
storage, including its exception. It runs in about ten seconds.
