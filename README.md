# AES-CCM engine with an 8-bit AES core and a shared, split S-box

This is a small AES-CCM security engine for IEEE 802.15.4 / ZigBee style
networks, for example home automation and security. Its core is a byte-serial
AES-128 encryption unit. The AES S-box is usually the most power-hungry part of
such a core, and here only one S-box serves both the data path and the key
schedule. That S-box is split into four 64-entry sub-tables ("sub-LUTs"),
each selected by the top two bits of the input byte. A data byte and a key byte
that need different sub-LUTs are substituted in the same cycle. When both need
the same sub-LUT they *collide*, and the step takes one extra cycle. A block
therefore takes 160 cycles with no collisions and at most 200.

Around the core, a CCM controller runs CBC-MAC authentication and counter-mode
encryption. This gives the AES-CCM-64 security suite of 802.15.4: a 13-byte
nonce and an 8-byte MIC. Both directions use only the forward AES cipher, so
the core has no inverse cipher.

The architecture follows a published shared-S-box AES-CCM design: the five core
units, the four-way S-box split, 16 cycles per round, the load and unload
scheme, the 160–200 cycle range and the CCM block counts. How the units work
inside, the handshakes and the controller are this implementation's own.
Each is marked as such below and at the top of every source file.

## Block diagram

```
                     +-------------------- aes_ccm ---------------------------+
  key, nonce, lens ->|  inreg (16 B)   xreg (16 B, CBC-MAC)   res (16 B)      |
  in_byte  (v/r)  -->|  CCM controller: B0, header, payload, A(i), MIC        |
  out_byte (valid)<--|        | data_in/key_in (v/r)      ^ data_out (valid)  |
                     |  +-----v------------- aes_core ----+-------------+     |
                     |  | ps_conv --col--> byte_perm --byte--> shared_sbox   | |
                     |  |   ^  (AddRoundKey)   (state,        (4 x sbox_slut)| |
                     |  |   |                  ShiftRows)        |     |     | |
                     |  |   +---4 bytes--- mixcol <--------------+     |     | |
                     |  |   key_exp <--- T bytes ----------------------+     | |
                     |  |   (round key, rcon) --- key bytes to substitute -->| |
                     |  +----------------------------------------------------+ |
                     +---------------------------------------------------------+
```

## The shared S-box and its collisions

`shared_sbox` has two request ports: data (`d_req`, `d_in`) and key (`k_req`,
`k_in`). Bits [7:6] of each byte pick one of the four `sbox_slut` instances,
and bits [5:0] address it. There are two cases:

* **Different sub-LUTs**: both requests are granted, and both results come
  back in the same cycle.
* **Same sub-LUT**: `collision` is raised. Only the key is granted this
  cycle (`k_gnt = 1`, `d_gnt = 0`). The core's controller holds its step
  counter and serves the data byte in the next cycle, so each collision costs
  exactly one cycle. The key goes first so that, during a load, the key byte
  on the input port can be used at once while the input handshake is held.

A sub-LUT that no granted request addresses gets address 0, so an idle table
does not switch. Each sub-LUT computes its contents at elaboration from the
S-box definition: the inverse in GF(2^8) modulo x^8+x^4+x^3+x+1, then the
affine map with constant 0x63. No table is pasted into the source.

### Where the key lookups happen

The key schedule needs four substitutions per round key. These are
SubWord(RotWord(w3)), on key bytes 13, 14, 15 and 12. The controller places
them as follows:

| phase | steps | data port substitutes | key port substitutes |
|---|---|---|---|
| LOAD (block *n*) | 0–15 | nothing | new key bytes 12–15 as they arrive (steps 12–15) |
| ROUND *r* = 1..9 | 0–15 | state byte for ShiftRows position *k* | bytes 13,14,15,12 of round key *r* (steps 0–3) |
| FINAL (round 10) | 0–15 | state byte for output byte *k* | nothing, or the next block's key bytes 12–15 when that block loads in the same steps |

So a collision can happen only in a step where both ports are busy. There are
4 such steps in each of rounds 1–9. When blocks run back to back there are 4
more in the overlapped FINAL/LOAD phase. That is 40 chances per block. With
random data each chance collides with probability 1/4, so a block averages
about 10 extra cycles, 170 in all. In the core testbench, 24 back-to-back
random blocks took 217 collisions in total, which the reference model
predicts exactly.

Cycle counts:

* **Back-to-back blocks** (the next block offered when FINAL starts):
  160 + *c* cycles per block, with 0 ≤ *c* ≤ 40.
* **An isolated block**: 16 load + (144 + *c*) round + 16 output cycles.
  Here *c* ≤ 36. The first ciphertext byte comes 160 + *c* cycles after the
  first input byte is taken.

## The byte-serial round

Each round takes 16 steps, one state byte per step:

1. `byte_perm` outputs the state byte that ShiftRows moves to position *k*
   (column *k*/4, row *k*%4). This is byte `4*((k/4 + k%4) mod 4) + k%4`.
   ShiftRows costs no logic beyond this read order.
2. The byte is substituted by the shared S-box.
3. `mixcol` keeps rows 0–2 of the column in registers. When row 3 arrives it
   outputs the mixed column, all four bytes in parallel.
4. `ps_conv` XORs the column with the round-key column (AddRoundKey) and
   writes it back to `byte_perm`.

ShiftRows still needs bytes of every old column until step 15. For that
reason new columns 0–2 wait in a 12-byte shadow bank. Writing column 3
copies the shadow bank and the new column into the state in one edge, so the
next round starts on the very next cycle.

In LOAD, `ps_conv` gathers `data_in ^ key_in` into columns: the initial
AddRoundKey is done as the block comes in. In FINAL there is no MixColumns.
The output is `data_out = S(state byte) ^ round key 10 byte`, in byte order 0
to 15. Because FINAL only reads the state and LOAD only writes it (through
the shadow bank), the next block can be loaded during the same 16 steps.

## On-the-fly key expansion

`key_exp` stores one round key K, 16 bytes, and a 4-byte register T for the
substituted word. With `upd` it replaces K by the next round key:
w0' = w0 ^ T ^ {rcon,0,0,0} and wi' = wi ^ wi-1'. This happens at the last
step of LOAD and of each ROUND.

A byte being loaded, or a T byte being written, in that same cycle is
forwarded into the update. This is why round key 1 is ready the cycle after
the last key byte arrives.

During FINAL the core reads round key 10 byte by byte. If a new key is being
loaded at the same time, byte *k* is read before it is overwritten at that
same edge.

## CCM engine

`aes_ccm` uses L = 2, a 13-byte nonce and `MIC_LEN` = 8 by default (4 or 16
are also allowed). It issues this sequence of AES runs:

| AES run | input block | result |
|---|---|---|
| B0 | `{flags, nonce, 0x00, m_len}`, flags = 0x40·(a_len>0) + 8·(M−2)/2 + 1 | X |
| header *j* | `X ^ {0x00, a_len, header…, zero pad}`, 16 bytes per run | X |
| CTR *i* | `A(i) = {0x01, nonce, 0x00, i}`, i = 1, 2, … | payload block *i* ^ E(A(i)) goes out |
| MAC *i* | `X ^ {plaintext block i, zero pad}` | X |
| S0 | `A(0)` | MIC = X[0..M−1] ^ E(A(0))[0..M−1] |

A frame with an *a*-byte header and an *m*-byte payload takes
1 + ⌈(a+2)/16⌉·[a>0] + 2⌈m/16⌉ + 1 AES runs.

### Keeping the core busy

The engine exploits the core's ability to load a block during the previous
block's final round. Three 16-byte registers are enough for this:

* `inreg` holds the next input block. It is refilled from the byte stream
  while the core is computing rounds.
* `xreg` holds the CBC-MAC value X.
* `res` holds the last AES result. Runs that did not overlap use it.

A run is offered to the core as soon as its input block is complete. If that
happens before the current run's final round, the two runs overlap.

* **MAC after MAC**: this is the CBC chain, B0 → header → header. The new
  input byte *k* is `E(...)[k] ^ B[k]`, taken from the result byte that
  leaves the core in the same step. The chain does not wait for the whole
  result.
* **CTR before MAC for the same block**: while E(A(i)) streams out and is
  XORed with the payload block, the MAC run of that block loads in the same
  16 steps. When decrypting, the recovered plaintext byte (zeroed beyond
  the block length) goes straight into the MAC input.
* **Independent runs** (CTR *i* after a MAC run, S0 after the last MAC) load
  while the previous result streams into `xreg`.

If the source delivers bytes fast enough (16 bytes within the 144 round
cycles), a frame takes 16 + 160·runs + collisions cycles. The testbench
checks this to within the 1–3 cycles of start/done handshaking. With a
slower source, a run starts from a plain LOAD as soon as its block is
complete.

**Interface**:

* Pulse `start` with `key`, `nonce`, `a_len`, `m_len` and `decrypt`
  valid. Byte 0 of `key` and `nonce` is in their top bits.
* Stream in on `in_byte` (valid/ready): the header bytes, then the payload
  bytes, then, when decrypting, the 8 received MIC bytes.
* `out_byte`/`out_valid` carries the processed payload and, when
  encrypting, the 8 MIC bytes. It has no back-pressure.
* `done` pulses at the end. `mic_ok` is 1 when the received MIC matched;
  for encryption it is always 1.
* `aes_block` and `aes_collision` report finished AES runs and S-box
  collisions, for statistics.

### Timing budget for 802.15.4 frames

The time available is set by the inter-frame spacing: 192 µs after a short
frame and 640 µs after a long one. At a 22.114 MHz system clock (45 ns
period), the testbench measured:

| frame | split used | AES runs | cycles measured | worst case (40 collisions/run) | time measured | budget |
|---|---|---|---|---|---|---|
| 18 octets | 9 header + 9 payload | 5 | 870 | 1016 | 39 µs | 192 µs |
| 127 octets | 25 header + 102 payload | 18 | 3053 | 3616 | 137 µs | 640 µs |

Both runs include random idle cycles in the input stream, about one in eight.

## Interfaces of the AES core (`aes_core`)

| port | dir | width | meaning |
|---|---|---|---|
| `in_valid` / `in_ready` | in / out | 1 | handshake for one (`data_in`, `key_in`) byte pair |
| `data_in`, `key_in` | in | 8 | plaintext and key bytes, byte 0 first |
| `out_valid`, `data_out` | out | 1, 8 | ciphertext bytes, byte 0 first, no back-pressure |
| `done` | out | 1 | with the last ciphertext byte |
| `busy` | out | 1 | a block is inside the core |
| `collision` | out | 1 | this cycle is an S-box collision stall |

`in_ready` is low in collision cycles and outside LOAD/FINAL. In FINAL, the
core loads the next block alongside only if `in_valid` is high in FINAL's
first step. Otherwise the block is taken in a separate LOAD afterwards. All
registers have an active-low asynchronous reset (`rst_n`).

## Departures and choices

* The internals of the byte permutation unit, MixColumns multiplier,
  parallel-serial converter and key expansion are not part of the
  architecture description. The organisation here is the simplest one
  that keeps 16 cycles per round: a state bank with a shadow bank, a
  column-serial MixColumns, AddRoundKey in the converter and one stored
  round key.
* Collision priority (key first) and the placement of the key lookups are
  choices. The placement makes the collision count match the published
  figure of 40 chances per block.
* The CCM run order (CTR before MAC for each payload block) and the
  overlap of runs are choices. They make a CCM block cost the same
  160–200 cycles as a plain AES block, which is what the published
  latency budget assumes.
* The CCM engine follows standard CCM: the header carries a 2-byte length
  prefix. The published block-count formula counts the whole frame as one
  MAC input. The totals agree for both frame sizes above (5 and 18 runs),
  but the 127-octet frame splits them 10 MAC + 8 CTR rather than 9 + 9.
* The header and payload lengths are 8-bit each. An 802.15.4 frame is at
  most 127 octets.
* Out of scope: the 802.15.4 MAC sublayer and PHY. The engine's frame
  ports are where they would connect.
* Size after coarse synthesis (yosys, word-level):
  * `aes_core`: 445 flip-flop bits, about 500 word-level cells.
  * The whole engine: 1141 flip-flop bits.

## Files and simulation

`rtl/`:

* `aes_pkg.sv`: shared types, GF(2^8) helpers, S-box function, ShiftRows
  order, rcon.
* `sbox_slut.sv`, `shared_sbox.sv`: the S-box.
* `byte_perm.sv`, `mixcol.sv`, `ps_conv.sv`, `key_exp.sv`: the core units.
* `aes_core.sv`: the AES core and its controller.
* `aes_ccm.sv`: the top level.

`tb/`:

* `aes_ref_pkg.sv`: an independent AES/CCM reference model, with the S-box
  inverse computed as a^254 and whole-block functions. It also predicts the
  collision count of every block.
* `tb_<module>.sv`: one self-checking testbench per module. Each ends by
  printing `TB_RESULT checks=N failures=M`.
  * `tb_aes_core` checks the FIPS-197 known answers, exact latency and
    block-to-block periods against the predicted collisions, and stalls
    in the input stream.
  * `tb_aes_ccm` checks the RFC 3610 packet vector #1, the two 802.15.4
    frame sizes, random frames in both directions and rejection of a
    corrupted MIC. It also checks frame cycle counts, and runs frames from a
    slow source so that runs wait for their input instead of overlapping.
    It runs the top at its default parameters.
  * `tb_collision_stats` streams 400 random blocks through the core. It
    checks every block period against the predicted collisions and checks
    the mean (about 10 per block). It prints a histogram and the resulting
    throughput at 174 MHz (about 131 Mbps; 139 with no collisions, 111
    with 40).

Run a testbench with plain Verilator, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_aes_ccm \
  rtl/aes_pkg.sv tb/aes_ref_pkg.sv rtl/sbox_slut.sv rtl/shared_sbox.sv \
  rtl/byte_perm.sv rtl/mixcol.sv rtl/ps_conv.sv rtl/key_exp.sv \
  rtl/aes_core.sv rtl/aes_ccm.sv tb/tb_aes_ccm.sv
./obj_dir/Vtb_aes_ccm
```

Every testbench finishes in well under a second of simulation.
