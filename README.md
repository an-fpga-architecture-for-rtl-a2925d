# WPA/WPA2 PMK generator: a shared-pipeline PBKDF2-HMAC-SHA1 engine

A WPA/WPA2 network in personal (pre-shared key) mode derives its pairwise
master key from the passphrase and the network name:

    PMK = PBKDF2-HMAC-SHA1(passphrase, SSID, 4096 iterations, 256 bits)

Anyone who has captured a four-way handshake can test candidate passphrases
offline. The test costs 8192 HMAC-SHA1 calls, or 16,384 SHA-1 compressions,
per candidate, and nearly all of that work is PMK derivation. This RTL is a
dictionary engine for that step. It reads 64-byte passphrase entries from
memory and computes their PMKs. It writes PMK *n* to slot *n* of a PMK table,
so host software can compare the table against the handshake's MIC, or keep
it as a lookup table for that SSID.

The central idea is that **one deeply pipelined SHA-1 core is shared by
every HMAC unit in the engine**. A single PBKDF2 computation cannot use a
pipeline: each SHA-1 depends on the previous one. Twenty independent HMAC
streams can use one, though. With the SHA-1 loop unrolled into 20 stages and
10 PBKDF2 units, each with two HMAC units, every stage holds work on
almost every cycle.

## Dataflow

```
            8 x 64-bit read ports                      4 x 64-bit write ports
memory ──► passphrase_manager ──► pbkdf2_manager ──► pbkdf2[0..N-1] ──► result_manager ──► memory
           (8 FIFOs, entry n)     (round robin,        │ 2 x hmac_sha1      (round robin,
                                   start/busy)          ▼                    valid/ack, stall,
                                                 sha1_pipeline              flush at end)
                                                 (one ring, UNROLL stages,
                                                  shared by 2N HMAC units)
```

| module | role |
|---|---|
| `attacker` | Top module. Takes the attack parameters, holds the SSID, and wires the four stages together. |
| `passphrase_manager` | Requests entry *n* on all eight read ports at once, one 64-bit word per port. It collects the replies in eight FIFOs. When every FIFO is non-empty it offers a 512-bit passphrase. |
| `sync_fifo` | Show-ahead FIFO used by the passphrase manager. |
| `pbkdf2_manager` | Hands each passphrase to the next PBKDF2 unit in a fixed rotation. It waits if that unit is busy. |
| `pbkdf2` | One PMK. Two HMAC units compute derived-key blocks T1 and T2 in parallel and XOR-accumulate their results over 4096 rounds. |
| `salt_gen` | Forms the round-1 message `SSID ‖ INT(i)` with a shift and an OR. |
| `hmac_sha1` | Ten-state FSM. It builds the two-block inner and outer SHA-1 messages and submits them to the shared pipeline. |
| `sha1_pipeline` | Ring of `sha1_round` stages that hashes two-block messages for all clients. |
| `sha1_round` | One registered SHA-1 round, including the 16-word message-schedule window. |
| `result_manager` | Collects the PMKs in the same rotation and writes each as four 64-bit words. It honours write stalls and flushes the write ports when done. |
| `wpa_pkg` | Widths, the SHA-1 slot type, the round functions and the byte-swap helper. |

## The shared SHA-1 ring (`sha1_pipeline`, `sha1_round`)

This is the part that sets the engine's throughput. It is also the least
obvious part.

**Stages.** SHA-1 has 80 rounds per 512-bit block. `sha1_round` computes one
round and registers the result. It also computes the next message word with
`W[t] = rotl1(W[t-3] ^ W[t-8] ^ W[t-14] ^ W[t-16])` and shifts it into a
16-word window. This way no 80-word schedule is ever stored: the window
itself carries along with the message. `UNROLL` such stages form a ring, and
`UNROLL` must divide 80.

**Slots.** Every register stage holds a *slot* (`sha_slot_t`). A slot
carries:

- a valid bit;
- the client's message id;
- which block it is on (0 or 1) and the round counter `t`;
- the chaining value `H`;
- the working state `a..e`;
- the schedule window;
- the parked second block.

A slot circulates once every `UNROLL` cycles. Each trip completes `UNROLL`
rounds, so a block needs `80/UNROLL` trips.

**Entry multiplexer.** Each cycle, the slot leaving the last stage decides
what enters stage 0, in this priority:

1. **Re-cycle.** If `t < 80`, the same slot goes round again.
2. **Second block.** If block 0 is finished, `H + (a..e)` becomes the new
   chaining value. The parked block 1 then starts in the same slot at
   `t = 0`, so a message never gives up its slot between its two blocks.
3. **Digest and new message.** If block 1 is finished, `H + (a..e)` is the
   160-bit digest. It is registered on `hash_o`, and `done_o[id]` is raised
   for one cycle. The slot is then free, and so is any empty slot. A free
   slot is granted to the next requesting client in round-robin order, and
   that client's two blocks are captured in the same cycle (`grant_o`).

Every message here is exactly two blocks long; the next section explains
why. That fixed length is what makes the parked-second-block scheme enough;
no general multi-block sequencing is needed.

**Timing.** A message takes 160 cycles in the ring from grant to
digest. The registered output adds one cycle, so `done_o` comes 161 cycles
after `grant_o`, whatever `UNROLL` is. `UNROLL` changes how many messages
are in flight, not the latency of one message. Messages finish in the order
they were granted. All clients read one shared `hash_o` bus; the `done_o` bit
tells each client when the bus carries its digest.

**Why `UNROLL = 20` with ten PBKDF2 units.** Each HMAC unit has at most one
message in the ring at a time. Twenty HMAC units therefore keep about twenty
slots busy. Between its two messages an HMAC spends only a few cycles
building blocks, so the ring is nearly full. If there are more units than
slots, they queue for slots. If there are fewer, slots run empty. Either way
the throughput is about `UNROLL/2` PMKs per PBKDF2 time.

## HMAC and PBKDF2 (`hmac_sha1`, `salt_gen`, `pbkdf2`)

WPA passphrases are at most 63 bytes. A zero-padded 64-byte dictionary entry
is therefore already the 512-bit HMAC key block *K*, and no key hashing is
needed. The key length is not needed either. Each HMAC is then two
two-block SHA-1 messages:

| message | block 0 | block 1 |
|---|---|---|
| inner | `K ^ 0x36…36` | `T`, a single 1 bit, zeros, 64-bit length `512 + len(T)` |
| outer | `K ^ 0x5c…5c` | inner digest (160 bits), a 1 bit, zeros, length 672 |

`T` is at most 288 bits: a 256-bit SSID plus the 32-bit block counter. The
inner message is therefore at most 512 + 288 + 1 + 64 = 865 bits, which fits
in two blocks. `hmac_sha1` builds each message in two cycles; the appended
1 bit is placed by shifting a one-hot value right by `len(T)` and ORing it
in. It then requests the pipeline and waits for its `done_o` bit. The FSM
states are: wait start, build 1, build 2, SHA of message 1, wait, build 1,
build 2, SHA of message 2, wait, done. An uncontended HMAC takes 329 cycles.

`pbkdf2` runs T1 on one HMAC and T2 on the other:

- **Round 0.** `T` comes from `salt_gen`. It forms `SSID ‖ INT(i)` by placing
  the big-endian counter just below the SSID's last bit, using a right shift
  by `ssid_len` and an OR. Its length is `ssid_len + 32`.
- **Rounds 1 to 4095.** `T` is the previous HMAC output `U` (160 bits).
- **Every round.** The unit waits until *both* HMAC units have reported,
  stores both `U`s, and XORs them into the two 160-bit accumulators.
- **After round 4095.** `PMK = T1 ‖ T2[159:64]`.

One PMK takes 4096 × 331 + 1 = 1,355,777 cycles. That is 329 cycles per HMAC
plus two cycles per round to restart both units.

The unit keeps its result and `valid` until the result manager acknowledges
them. Meanwhile it can accept and compute the next passphrase. If that
computation also finishes before the acknowledgement, the unit waits with
`busy` high.

## Ordering, back-pressure and the memory ports

PMK *n* must be passphrase *n*'s. Three things guarantee this, and no tags
are needed:

- The memory returns read data in request order on each port.
- The PBKDF2 manager and the result manager step through the units in the
  same fixed rotation: unit 0, 1, …, N-1, 0, …
- Every PMK takes the same number of cycles to compute.

The PBKDF2 manager waits on the busy unit it is pointing at; it does not skip
to a free unit. The result manager waits on the unit it is pointing at in the
same way.

**Read side.** Eight ports each carry a load request `rd_rq_ld_o` and an
address `rd_addr_o`, and return `rd_valid_i` and `rd_data_i`. Word *j* of
entry *n* is read from `dict_addr + 64n + 8j` on port *j*. A new entry is
requested on all eight ports in one cycle, as long as two conditions hold:

- fewer than `dict_size` entries have been requested;
- the replies already promised fit in the FIFOs (`FIFO_DEPTH` entries).

**Write side.** Four ports each carry a store request `wr_rq_st_o`, an
address `wr_addr_o` and data `wr_data_o`. They return `wr_rq_next_i`; when it
is low the port stalls. PMK *n* word *k* goes to `pmk_addr + 32n + 8k` on
port *k*. A PMK is written in one cycle, and only when all four
`wr_rq_next_i` are high. While any of them is low, the result manager holds
its position and the unit keeps its result.

**End of the attack.** After the last PMK the result manager raises
`wr_flush_o` on all four ports. `busy_o` falls once every `wr_fsh_cmp_i`
has been seen. `complete_count_o` counts the stored PMKs.

**Byte order.** Memory words are little-endian: byte 0 of the passphrase is
the least significant byte of word 0. The datapath is big-endian, as SHA-1
is, with the first character in the top bits. Words are therefore
byte-swapped on the way in and the way out, so the PMK's first byte sits at
the lowest address. The SSID is given left-aligned, with its first character
in `ssid_i[255:248]`, and `ssid_len_i` is its length in bits.

## Parameters (`attacker`)

| parameter | default | meaning |
|---|---|---|
| `N_PBKDF2` | 10 | PBKDF2 units. There are `2*N_PBKDF2` HMAC clients on the ring. |
| `SHA_UNROLL` | 20 | Pipeline stages. Must divide 80. |
| `ITER` | 4096 | PBKDF2 iterations. WPA fixes it at 4096; lower values are only for short simulations. |
| `CTR_BYTES` | 4 | Width of the block counter appended to the SSID. |
| `FIFO_DEPTH` | 16 | Entries per read FIFO. This also caps the reads in flight. |

Width constants are in `wpa_pkg`:

- 512-bit entries;
- 256-bit SSID;
- 48-bit addresses;
- 32-bit counts;
- 64-bit memory words.

Keep `N_PBKDF2 ≈ SHA_UNROLL/2`. The design is built to be replicated: four
engines with separate dictionary slices give four times the rate.

## Performance

- **Per engine.** At the defaults, one engine produces 10 PMKs every
  1,355,777 cycles. That is 7.4 µPMK per cycle.
- **Four engines at 300 MHz.** That gives about 8,850 PMK/s. 300 MHz is the
  memory system's clock; whether this RTL closes timing there depends on the
  device. The critical path is one SHA-1 round: a five-input add plus the
  round function.
- **Scaling.** Throughput grows linearly with `SHA_UNROLL`, with
  `N_PBKDF2 = SHA_UNROLL/2`.
- **Table 9 sweep.** A sweep over 2, 20, 40 and 80 stages measured
  normalized rates of 1 : 9.6 : 19.1 : 38.9. The ideal is 1 : 10 : 20 : 40.
  The shortfall comes from a few cycles of contention for slots at each HMAC
  hand-over.
- **Bandwidth.** Dictionary bandwidth is tiny: 640 bytes per 1.36 M cycles
  per engine, or about 0.57 MB/s for four engines at 300 MHz.
- **Hardware.** Synthesised as generic logic, the default engine has about
  66k flip-flops. About 27k are the 20 pipeline slots, at 1.4 kbit each.
  About 38k are in the ten PBKDF2 units, mostly the HMAC block registers.
  The read FIFOs add 8 kbit of memory.

## Where this design departs from, or fills in, the original architecture

- **Counter width.** The original architecture appends a *one-byte*
  counter 0x01/0x02 to the SSID. Standard PBKDF2, which WPA uses, appends a
  four-byte big-endian `INT(i)`. One byte gives PMKs that do not match real
  WPA keys. `CTR_BYTES` defaults to 4; setting it to 1 reproduces the
  one-byte variant.
- **XOR accumulation.** The description of the PBKDF2 unit feeds each HMAC
  result back as the next `T` but does not show the XOR sum. Two 160-bit
  accumulators were added; without them the result is not PBKDF2.
- **Waiting on both HMAC units.** A round ends when *both* HMAC units have
  reported, not only the first. The two units share the ring and can finish
  a few cycles apart.
- **Cycle count.** The ideal count is 1,343,488 cycles per PMK at 164
  cycles per HMAC message pair. This design needs 1,355,777, a 0.9%
  overhead from block building, requests and the output register.
- **Pipeline arbitration.** How the HMAC units share the pipeline is this
  design's own choice: round-robin grants, a message id carried in the slot,
  and one `done` bit per client.
- **Simplified memory interface.** The memory interface is a simplified
  version of a commercial memory controller's request/response ports:
  - in-order read replies;
  - a `request next` stall signal on writes;
  - flush and flush-complete.
  There is no write acknowledge or error signalling.
- **Not included:**
  - the register file through which host software passes the attack
    parameters;
  - the host software itself, which loads the dictionary, starts the four
    engines and checks PMKs against the handshake;
  - the memory system.
  The top module brings these signals out as plain ports.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=… failures=…` and has a cycle watchdog. The reference
values come from `tb/sha1_ref_pkg.sv`, an independent behavioural SHA-1,
HMAC and PBKDF2 model; the testbenches also use published test vectors.

| testbench | what it shows |
|---|---|
| `tb_sha1_round` | Each round matches the reference state, schedule window and `t`. |
| `tb_sha1_pipeline` | 20 clients with random two-block messages at the default size. Digests are correct. Latency is exactly 161 cycles. Messages come out in order. |
| `tb_salt_gen` | `SSID ‖ INT(i)` for random SSID lengths and both counter widths. |
| `tb_hmac_sha1` | RFC 2202 HMAC-SHA1 test case 2 plus random keys and messages. 329 cycles per HMAC. |
| `tb_pbkdf2` | The IEEE 802.11i test vector, with passphrase "password" and SSID "IEEE", at the full 4096 iterations, in exactly 4096 × 331 + 1 cycles. Also the hold-until-acknowledge behaviour. |
| `tb_sync_fifo`, `tb_passphrase_manager`, `tb_pbkdf2_manager`, `tb_result_manager` | Random traffic, stalls, ordering, byte order and the flush sequence. |
| `tb_attacker` | End to end at reduced size: 3 units, 8 stages, 3 iterations. It counts each mechanism and fails if one never happened. |
| `tb_attacker_full` | End to end at the default parameters. 23 dictionary entries, including the IEEE vector, give 23 correct PMKs in 4.07 M cycles, with a long forced write stall in the middle. |
| `tb_unroll_sweep` | PMK rate for 2, 20, 40 and 80 stages (16 iterations), checked within 5% of linear scaling. |

`tb_attacker` counts these mechanisms:

- reads in flight reaching the FIFO capacity;
- dispatch waiting on a busy unit;
- write stalls;
- results held until acknowledged;
- re-cycled slots;
- second-block launches;
- clients waiting for a slot;
- the final flush.

The memory seen by the top-level testbenches is `tb/mc_mem_model.sv`, a
behavioural model. It returns reads in order after random latencies. It
stalls writes at random, and it can also be forced to stall. It completes
flushes after a short delay. It flags any store issued while its port is
stalling. The testbench then reads the PMK table back from the model's memory
and compares it with the reference.

Every testbench was also run against a deliberately broken copy of its
module. Each broken copy had one change, such as a missing rotate, a missing
byte swap or an off-by-one full flag. All of them were detected.

### Running a testbench

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    -Irtl -Itb rtl/wpa_pkg.sv tb/sha1_ref_pkg.sv tb/tb_pbkdf2.sv \
    --top-module tb_pbkdf2 -o sim
obj_dir/sim
```

Replace `tb_pbkdf2` with any testbench name. Most testbenches finish in
under a second. `tb_pbkdf2` takes a few seconds and `tb_attacker_full` about
15 seconds. `tb_unroll_sweep` spends most of its time compiling the
80-stage ring.
