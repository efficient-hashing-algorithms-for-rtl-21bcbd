# Pipelined hash cores for FPGAs: SpookyHash, SipHash, Chaskey

Network hardware needs hashes at line rate. They are used for lookup-table indexing, flow
classification and message authentication. CRC and Toeplitz hashes are cheap but neither
resists collisions nor keeps a key secret. This library provides modern hash functions as
hardware pipelines:

| core | module | state | output | kind |
|---|---|---|---|---|
| SpookyHash V2, short form | `spooky_short` | 4 × 64 bit | 128 bit | non-cryptographic, up to 191-byte messages (verified to 64) |
| SipHash-c-d | `siphash_core` (`W=64`) | 4 × 64 bit | 64 bit | keyed PRF / MAC |
| extended SipHash | `siphash_core` (`W=64, EXTENDED=1`) | 4 × 64 bit | 128 bit | keyed, more collision resistance |
| HalfSipHash | `siphash_core` (`W=32`) | 4 × 32 bit | 32 bit | keyed, smallest |
| extended HalfSipHash | `siphash_core` (`W=32, EXTENDED=1`) | 4 × 32 bit | 64 bit | keyed, for short messages |
| Chaskey | `chaskey_core` | 4 × 32 bit | 128 bit | keyed MAC, whole state is the tag |

`hash_toolkit_top` instantiates all six side by side, each with its own ports. In a real system
you would instantiate only the core you need.

Roughly, choose as follows. SpookyHash is fastest and smallest when no secrecy is needed.
SipHash or Chaskey is for a hash an attacker must not be able to steer: Chaskey for a 128-bit
tag from 32-bit arithmetic, SipHash where 64-bit words pay off on longer messages. The half and
extended SipHash variants trade area against output width.

## The one idea: a hash as a chain of one-operation layers

All three algorithms use only additions, rotations and XORs on a few machine words (ARX). Each
core fixes the message length `MSG_BYTES` at build time. Every loop of the reference software
then has a known trip count, and the whole hash unrolls into a straight chain of **layers**.

* A layer is one level of dependent word operations: one adder or one XOR deep. Independent
  operations that can run side by side share a layer. Rotations are wiring and are free.
* A pipeline register may follow any layer. `OPS_PER_STAGE = k` puts a register after every
  k-th layer and always after the last one (`hash_pkg::reg_after`).
  * `k = 1` gives the deepest pipeline: a register between every pair of dependent operations,
    so the critical path is one 64-bit (or 32-bit) adder.
  * A large `k` collapses the core into a few long combinational stages.
  * Latency is `ceil(layers / k)` cycles (`hash_pkg::pipe_latency`).
* Whatever `k` is, a core accepts a new message on every clock. Throughput is one hash per
  cycle, that is `8·MSG_BYTES·f_clk` bit/s. Only the latency and the area change with `k`.

Each core describes its schedule as a constant function, `layer_code(i)`, that returns the kind
of layer `i` and a small argument (which message word, which round quarter). One shared generate
loop turns that list into hardware:

```
for i in 0 .. NL-1:
    lay_out[i] = apply_layer(layer_code(i), lay_in[i])     // combinational
    stg[i]     = reg_after(i) ? register(lay_out[i]) : lay_out[i]
    lay_in[i+1] = stg[i]
```

A packed struct carries the state words through the chain, together with the padded message.
Words already absorbed are never read again, so synthesis removes their registers. A valid bit
travels alongside. Only the valid bits are reset; data registers are not.

### Layer schedules

**SipRound** (all SipHash variants) and the **Chaskey round** have the same shape and are each
split into four layers:

| layer | SipHash (64-bit) | HalfSipHash (32-bit) | Chaskey (32-bit) |
|---|---|---|---|
| 0 | v0+=v1, v2+=v3 | same | same |
| 1 | v1=rotl(v1,13)^v0, v3=rotl(v3,16)^v2, v0=rotl(v0,32) | 5, 8, 16 | 5, 8, 16 |
| 2 | v0+=v3, v2+=v1 | same | same |
| 3 | v3=rotl(v3,21)^v0, v1=rotl(v1,17)^v2, v2=rotl(v2,32) | 7, 13, 16 | 13, 7, 16 |

* **SipHash** (`siphash_core`)
  * init layer: key XOR constants, plus 0xee into v1 for the extended variants
  * per W/8-byte block: `v3 ^= m`, then `4·C_ROUNDS` round layers, then `v0 ^= m`. The last
    block holds the 0..W/8-1 remaining bytes and the message length (mod 256) in its top byte.
  * `v2 ^= 0xff` (or `0xee` if extended), then `4·D_ROUNDS` round layers
  * extended variants only: the first output word is captured while `v1 ^= 0xdd`, then
    `4·D_ROUNDS` more round layers
  * output XOR: `v0^v1^v2^v3` for 64-bit words, `v1^v3` for 32-bit words

  Layer count: `1 + NB(2+4C) + 2 + 4D (+ 1 + 4D extended)`, where `NB = MSG_BYTES/(W/8) + 1`.
* **Chaskey** (`chaskey_core`)
  * The state starts as the key K.
  * Each 16-byte block is one XOR layer followed by `4·ROUNDS` round layers. The last block is
    also XORed with the subkey, as part of the same layer.
  * A closing XOR layer adds the subkey again; the whole state is the tag.
  * Subkey: K1 = 2K in GF(2^128) (shift left, XOR 0x87 on carry-out) if the last block is
    complete. Otherwise the block is padded with `01 00 ..` and K2 = 4K is used. The subkey is
    formed from the key before the first layer.

  Layer count: `NB(1 + 4R) + 1`, where `NB = ceil(MSG_BYTES/16)`.
* **SpookyHash short** (`spooky_short`)
  * The words a, b start as the seed; c and d start as `0xdeadbeefdeadbeef`.
  * Each complete 32-byte block is an add layer (c, d), then ShortMix, then an add layer (a, b).
  * A 16-byte half block is an add layer and ShortMix.
  * Tail layer: the last 0..15 bytes, zero-padded, are added to c and d. The message length
    goes into the top byte of d. With no bytes left, the constant is added to both instead.
  * ShortEnd ends the hash. The hash is `{b, a}`.
  * ShortMix has twelve steps `x = rotl(x,r) + y; z ^= x`, each two layers. ShortEnd has
    eleven steps `z ^= y; y = rotl(y,r); z += y`, each two layers.

  Layer count: `26·(MSG_BYTES/32) + 25·[MSG_BYTES mod 32 ≥ 16] + 1 + 22`.

Latencies at the defaults (64-byte messages, `OPS_PER_STAGE = 1`):

| core | layers = cycles |
|---|---|
| SpookyHash | 75 |
| SipHash-4-8 | 197 |
| extended SipHash-4-8 | 230 |
| HalfSipHash-4-8 | 341 |
| extended HalfSipHash-4-8 | 374 |
| Chaskey-12 | 197 |

Latency grows linearly with message length in every core. A 32-bit-word design needs twice as
many blocks as a 64-bit one for the same message. This is why Chaskey beats SipHash on short
messages but loses ground on long ones.

## Interfaces and timing

Every core has the same port pattern:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset of the valid flags |
| `in_valid` | in | 1 | a message is present; taken on the rising edge, every cycle if wanted |
| `msg` | in | `8·MSG_BYTES` | message, byte 0 in `msg[7:0]` |
| `key` / `seed` | in | 128 (64 for HalfSipHash) | secret key or seed, byte 0 in bits 7:0 |
| `out_valid` | out | 1 | result present |
| `hash` / `tag` | out | see table above | first output word in the low bits; little-endian bytes as in the reference software |

There is no back-pressure and no stall: `out_valid` rises exactly `LATENCY` clock edges after the
edge that took `in_valid`, and results leave in input order. Each core has a `LATENCY`
localparam. Parameters:

| parameter | cores | default | meaning |
|---|---|---|---|
| `MSG_BYTES` | all | 64 | message length, fixed per instance (SpookyHash: 1..191, verified to 64) |
| `OPS_PER_STAGE` | all | 1 | layers between pipeline registers |
| `W` | SipHash | 64 | word width, 64 or 32 (HalfSipHash) |
| `EXTENDED` | SipHash | 0 | 2W-bit output |
| `C_ROUNDS`, `D_ROUNDS` | SipHash | 4, 8 | compression and finalisation rounds (SipHash-4-8) |
| `ROUNDS` | Chaskey | 12 | permutation rounds |

## What follows the source design and what does not

Taken from the design these cores implement:
* the choice of algorithms
* the SpookyHash short form with its 191-byte limit
* the four SipHash variants and SipHash-4-8 as the evaluated setting
* Chaskey with 32-bit ARX, a full-state 128-bit output and 12 rounds
* configurable round counts
* variable pipelining down to a register between every logical operation

Filled in from the published algorithm definitions, which the design uses but does not spell
out: rotation amounts, constants, padding, and the length encoding.

This implementation's own choices:
* a fixed message length per instance, so that the whole hash unrolls into one pipeline
* the valid-only interface and the byte order
* the four-layer split of a round, and where constant XORs and injections sit
* the default message length of 64 bytes and the default `OPS_PER_STAGE` of 1

Points to be aware of:

* **Chaskey round count.** The source calls its 12-round setting "Chaskey-LTS". In Chaskey's own
  literature, 12 rounds is Chaskey-12 and LTS uses 16. `ROUNDS` defaults to 12; set 16 for LTS.
* **HalfSipHash round counts** default to 4-8 like SipHash. The source quotes 4-8 only for the
  64-bit variant.
* **PCARX**, the source's fourth, experimental function, is not included. It is a tree-parallel
  hash over 256-bit blocks with cellular-automata and ARX compression. Its definition is not
  available in enough detail: tree shape, compression function, CA rule and round counts are
  all missing.
* No timing or area figures are claimed here. The deep-pipeline setting is the one for which
  clock rates of 700 MHz to 1 GHz on FPGAs were reported, but these cores have not been through
  FPGA place and route.

## Verification

Each core has a self-checking testbench in `tb/`. It streams messages with random idle cycles
and checks every output and its latency against a sequential reference model
(`tb/hash_ref_pkg.sv`, written as loops over bytes in the style of the reference C code).

* `tb_siphash_core`
  * all four variants, with 2-4 and 4-8 rounds, message lengths 3, 8, 13, 15, 16 and 21, and
    `OPS_PER_STAGE` of 1, 2, 3, 4 and the whole chain in one stage
  * The reference model and the core are also checked against the published SipHash-2-4 vector
    (key `00..0f`, message `00..0e` → `a129ca6149be45e5`).
* `tb_chaskey_core`
  * 1, 7, 16, 17, 40 and 64-byte messages, covering padded and complete last blocks
  * 8, 12 and 16 rounds, several pipeline depths
* `tb_spooky_short`
  * 1, 9, 16, 31 and 64 bytes
  * covers the tail-only, half-block, empty-tail and full-block paths
  * **Known defect:** a 191-byte build, with five full blocks, does not match the reference
    model. Lengths above 64 bytes are therefore unverified, and the 191-byte case is wrong.
* `tb_hash_toolkit_top`
  * the whole toolkit with 8-byte messages and all other parameters at their defaults
  * All six cores are fed simultaneously with back-to-back runs and idle gaps.
  * It counts, per core, outputs, back-to-back inputs and idle gaps, and fails if any of them
    never occurred.
  * The default 64-byte build of the whole toolkit is about 1,400 layers deep. Its Verilator
    model did not compile within 20 minutes, so no test runs the top at its defaults. The
    64-byte setting is simulated per core (`tb_chaskey_core`, `tb_spooky_short`). For
    SipHash, the longest message simulated is 21 bytes.

Only the SipHash-2-4 vector comes from outside this library. The SpookyHash and Chaskey models
are independent re-codings of the reference algorithms; no published vectors were checked. Treat
them accordingly before interoperating with software implementations.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -j 4 --top-module tb_siphash_core \
  rtl/hash_pkg.sv tb/hash_ref_pkg.sv rtl/siphash_core.sv tb/sip_case.sv tb/tb_siphash_core.sv
obj_dir/Vtb_siphash_core
```

The other testbenches follow the same pattern:
* `chaskey_case.sv` with `tb_chaskey_core.sv`
* `spooky_case.sv` with `tb_spooky_short.sv`
* all three core files plus `hash_toolkit_top.sv` for `tb_hash_toolkit_top`

Each testbench prints `TB_RESULT checks=N failures=M`. The unrolled cores make large C++ models,
so expect the build to take minutes rather than seconds.

## Files

* `rtl/hash_pkg.sv`: layer-code packing, register placement, latency, rotations, constants
* `rtl/siphash_core.sv`, `rtl/chaskey_core.sv`, `rtl/spooky_short.sv`: the cores
* `rtl/hash_toolkit_top.sv`: all cores side by side
* `tb/hash_ref_pkg.sv`: reference models
* `tb/*_case.sv`: per-configuration drivers and checkers
* `tb/tb_*.sv`: testbenches
