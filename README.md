# Data and communication protection for a reconfigurable embedded system

An FPGA system that keeps its code and data in external DRAM and flash can be
attacked on the wires. An attacker can read memory (spoofing). They can also
write chosen values, move blocks to other addresses (relocation) or put back
old contents (replay). On a multiprocessor system-on-chip, a faulty or hostile
IP can also misuse the shared bus.

This RTL answers both threats in hardware, with two subsystems that sit side
by side in `secure_soc_top`:

* **(A) Protected external memory.** A *hardware security core* (`hsc`) sits
  between the processor caches and the external memory. It encrypts and
  authenticates every 256-bit cacheline with AES-GCM. Each memory segment is
  protected only as much as its own policy asks, so protection costs nothing
  where it is not wanted. A *secure loader* brings the application from flash
  and authenticates it. It also installs the application's security policy,
  and it re-encrypts the code for execution.
* **(B) Protected communication.** Each IP has a *local firewall*. The
  external-memory controller sits behind a *global firewall*. The global
  firewall holds its own security core, and it manages the local firewalls.
  The firewalls check every bus transaction against their rules and report
  every violation as an alarm. They can be reconfigured at run time.

## Security levels and the security memory map

The address space is split into *segments*. Each segment has a base address,
a size in bytes, a code/data flag and one of three levels:

| level | encoding | meaning |
|---|---|---|
| `SEC_CI` | 2 | confidentiality and integrity: encrypted, tag checked on every read |
| `SEC_CO` | 1 | confidentiality only: encrypted, no tag |
| `SEC_NONE` | 0 | plain; the security core is bypassed |

`smm` holds up to `NSEG` (16) entries of 64 bits (`hsc_pkg::smm_entry_t`):

* `[63:32]` is the base address.
* `[31:8]` is the size in bytes.
* `[2]` is the code flag.
* `[1:0]` is the level.

A lookup compares a line address with every entry in parallel. Segments need
not be line aligned. A line belongs to the lowest-numbered segment that
overlaps any of its bytes, and an address covered by no segment is
unprotected.

Each protected segment is given a run of *metadata slots*, one per line it
touches. Slots are handed out in entry order, so only protected memory uses
on-chip storage. A line's slot number indexes the timestamp and tag memories
(`LINES` = 8192 slots, which is 256 KB of protected memory).

## One protected cacheline

The core works on a 256-bit line, which is two AES blocks. For line address
`@` in segment `SegID`, with the line's timestamp `TS`:

```
K1 = AES_K(SegID64 || @32 || TS32)        K2 = AES_K(SegID64 || @32 || (TS+1)32)
C  = P xor (K1 || K2)
T  = ((C1 * H  xor  C2) * H  xor  (0^64 || 256)) * H          H = AES_K(0^128)
```

Multiplication is in GF(2^128), with the bit order of GCM. The tag is not
masked with an encrypted pre-counter block as in standard GCM. It is kept on
chip and never reaches the attacker, so the mask would add an AES pass without
adding strength. Each part of the counter defeats one attack:

* the address defeats relocation;
* the segment ID separates segments;
* the timestamp defeats replay.

The timestamp grows by 2 on every write, because each write uses two counter
values. No counter value is ever used twice with the same key.

Two `aes128_enc` cores run in parallel. Each does one round per clock, so the
keystream takes 10 cycles. `gf128_mul` multiplies in one cycle, so the tag
takes 3 cycles after the ciphertext. `aes_gcm_line` wraps these parts.

### Write (cache write-back)

1. Look up the segment.
2. Read the line's timestamp and bump it by 2 (`ts_mem`).
3. Compute the keystream.
4. Write the ciphertext to memory. For CI lines, the tag is computed during
   this write.
5. Store the tag (`tag_mem`).

### Read (cache fill)

1. Look up the segment.
2. Read the timestamp and the stored tag.
3. Start the keystream and the memory read in the same cycle, so the AES runs
   while the bus is busy.
4. XOR the ciphertext with the keystream.
5. For CI lines, compute the tag from the fetched ciphertext and compare it.
   A line that fails is returned as zeros with `c_auth_err` set.

### Cost in cycles

These overheads are measured against a bypassed access, with memory slower
than the AES. The `tb_hsc` testbench checks them.

| access | overhead |
|---|---|
| write, CO or CI | +12 |
| read, CO | +2 |
| read, CI | +5 |

The original figures were +13 for a write and +7 for a read, measured on a
specific processor bus. This design's handshake is simpler, so the numbers
differ. Their structure is the same: a write pays for a full AES, and a read
hides the AES behind the memory access.

## Secure loading

The application image in flash has its own transport protection: standard
AES-GCM under a separate load key. Layout, in 32-bit words:

```
IV (96 b) | TS (32 b) | Tag (64 b)                      -- plain
app address | app size (bytes) | segment entries (64 b each, ended by an
entry of size 0) | code words                            -- encrypted
```

The loader's counter block `Y0` is `IV || TS`, and payload block *i* uses
`IV || TS+i`. With `TS = 1` this is the usual 96-bit-IV GCM. The tag is the
first 64 bits of the GCM tag, computed over the whole encrypted payload with
no extra data.

`secure_loader` works as follows:

1. It clears the map and derives `H`.
2. It reads the header.
3. It decrypts block by block, with the flash reads overlapping the keystream.
4. It writes segment entries into the map as they arrive.
5. It gathers code into lines and writes each line through the security core,
   which encrypts it with the execution policy.
6. At the end it compares the tags. `done` pulses and `ok` reports the result.

The code and the map entries are written before the tag is known, so `ok` is
what allows the application to run. A refused image leaves its entries in the
map.

Some systems fix the memory map in the FPGA configuration and load only code.
For them, raise `keep_smm` together with `start`. The map is then neither
cleared nor written, and any entries in the image are skipped. In `secure_soc_top`, the loader owns the core while it
runs, and processor requests wait.

## Firewalls

Each rule (`fw_pkg::fw_rule_t`) covers an address section `[base, last]` and
lists:

* read and write rights;
* allowed access sizes;
* allowed source IDs;
* the range of allowed written values;
* for the global firewall, the memory protection level.

The first matching valid rule applies.

`local_firewall` checks transactions on two sides:

* **Outgoing, at the source.** The target section must exist, the read/write
  right must allow the access, and the access size must be allowed. The
  firewall then stamps its own `FW_ID` as the source, so an IP cannot claim
  another's identity.
* **Incoming, at the target.** The section must exist, the source must be
  allowed, and a written value must lie in the allowed range.

A refused transaction never crosses the firewall. The sender gets an error,
and a registered alarm (firewall ID, reason, source, address) goes out on the
alarm wire.

`global_firewall` sits in front of the external-memory controller:

* It checks the section, the source and the read/write right.
* It passes accepted lines through its own `hsc`, so memory behind it gets the
  protection of part (A).
* As manager, it takes rules from the security processor. Rules addressed to
  firewall 0 are its own. The *security builder* also turns each of them into
  a map entry with the rule's level.
* Rules for other firewalls are forwarded on the configuration network.
* A supervisor counts all alarms.

In `secure_soc_top`, `N_LF` = 7 local firewalls with IDs 1 to 7 share one
configuration broadcast, and each has one alarm wire.

## Where this RTL departs from the original design

* The dedicated firewall network-on-chip is replaced by direct wires: a
  configuration broadcast plus one alarm line per firewall. The system bus,
  the IPs, the processor, the security processor and the memory controllers
  are not included; their ports are top-level ports.
* Many details were not specified and are choices made here:
  * all encodings (map entries, rules, alarms);
  * the req/ack handshakes;
  * the zero-size end marker of the segment list;
  * how segment IDs and metadata slots are formed;
  * the zeroing of rejected lines.
* The cycle overheads differ, as explained above.
* Code-only images use the same layout as full images: the tag sits in the
  header, and the segment list is empty or skipped. The original code-only
  image put the tag after the code.
* Every protected line has a timestamp, code lines included. A leaner
  variant keeps timestamps only for data, since code is not rewritten while it
  runs. Here code also gets a timestamp, so loading the same code again never
  reuses a counter value.
* The example segment list used in `tb_smm` overlaps by 32 bytes (segment 1
  ends at 0x80006CC, and segment 2 starts at 0x80006AC). It is kept as given,
  and the lowest-index rule resolves the overlap.
* The checks stop at what the rules describe. There is no key management, no
  timestamp-wrap handling (2^31 writes per line) and no response filtering of
  read data in the local firewalls.
* `tag_mem` and `ts_mem` are plain arrays. The timestamps are cleared after
  reset by a sweep, one slot per cycle, and the core raises `ready` when the
  sweep is done.

## Parameters

| parameter | default | where |
|---|---|---|
| `NSEG` | 16 | map entries (`smm`, `hsc`, loader, top) |
| `LINES` | 8192 | timestamp/tag slots, 32 B each (`ts_mem`, `tag_mem`, `hsc`, `global_firewall`) |
| `TAG_W` | 128 | stored tag width (`tag_mem`, `hsc`) |
| `N_LF` | 7 | local firewalls (top, `global_firewall`) |
| `N_RULES` | 16 | global firewall rules |
| `N_OUT`, `N_IN` | 4 | outgoing and incoming rule tables of a local firewall |

## Files

`rtl/` holds one module or package per file. The two packages are `hsc_pkg`
(AES and GF arithmetic, map types) and `fw_pkg` (firewall types). `tb/` holds
one self-checking testbench per module, plus `tb_ref_pkg`. That package is an
independent reference model: an AES with a table-free S-box found by search,
a bitwise GF multiply, and GHASH. Each testbench prints
`TB_RESULT checks=N failures=M`.

`tb_hsc_workloads` programs the core, at its default sizes, with the memory
layouts of four applications:

* image processing, 12 segments and 75 KB protected;
* video on demand, 10 segments and 197 KB protected;
* communication, 4 segments and 139 KB protected;
* hashing, 2 segments and 92 KB protected.

It checks that their metadata slots fit. It then exercises the first, middle
and last line of every segment, checking data, storage form and latency, and
tampers with one line.

`tb_secure_soc_top` runs the whole top at its default parameters. It
exercises every mechanism and counts each one:

* the loader, including a tampered image;
* CI, CO and bypassed reads and writes;
* tampering and replay in external memory (relocation is tested in `tb_hsc`);
* the firewall checks;
* reconfiguration and alarms.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/hsc_pkg.sv rtl/fw_pkg.sv tb/tb_ref_pkg.sv rtl/*.sv tb/tb_secure_soc_top.sv \
  --top-module tb_secure_soc_top -o sim
./obj_dir/sim
```

Swap the last file and `--top-module` for any other testbench, for example
`tb_hsc` or `tb_secure_loader`. Listing a package twice, as the glob does
here, is accepted. The full top takes about ten seconds to build and well
under a second to simulate. Most of the simulated time goes into the
timestamp sweep over 8192 slots and the secure load.
