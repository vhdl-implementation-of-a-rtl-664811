# An AES-128 security co-processor: a compact engine and a multi-session pipeline

An IPSec gateway has to encrypt and decrypt whole packets at line rate. The target here is OC-12, 622 Mbit/s. The hard case is CBC (cipher block chaining). In CBC each 128-bit block is XORed with the ciphertext of the block before it, so one packet cannot be pipelined. This design answers that in two ways, which sit side by side in one top module:

1. **Space-optimised engines.** Each engine has one AES round in hardware and runs it eleven times, one clock per round. Three of them share one host bus: an encryption engine, a decryption engine and a key generator. Each engine moves 128 bits every 12 clocks. At 59.7 MHz that is 636.8 Mbit/s, just above OC-12, in ECB and CBC alike.
2. **Multi-session pipeline.** Eleven round stages are chained, so a new block can enter on every clock. The chaining problem goes away because the pipeline works on eleven *different* sessions at once. A scheduler feeds the stages so that the next block of a session arrives at round 0 in the same clock that the session's previous ciphertext leaves round 10. At 50 MHz the aggregate is 6.4 Gbit/s; each CBC session still gets 581.8 Mbit/s.

The cipher is AES-128 as defined in FIPS-197. The testbenches check it against the FIPS-197 known-answer vectors and an independent reference model.

## The AES round datapath

`aes_pkg` holds the shared types, `block_t` and `context_t`, and pure functions: `xtime`, ShiftRows, MixColumns, their inverses, and RCON. A block is `logic [127:0]` with byte 0 in bits 127:120. State byte (row r, column c) is byte 4c+r.

- **S-boxes** (`aes_sbox`, `aes_inv_sbox`). Each is a 256x8 ROM. The table is computed at elaboration, not listed: first the multiplicative inverse in GF(2^8), then the affine map b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63. The inverse ROM is the forward table inverted.
- **`aes_cipher_round`**. Sixteen S-box ROMs feed ShiftRows, then MixColumns, then the round-key XOR. It is purely combinational. It has three outputs, and the controller picks one by round number:
  - `data_out_round0`: the input XORed with the key;
  - `data_out_mid`: a full round;
  - `data_out_final`: a round without MixColumns.

  MixColumns is *balanced*. In each output byte the two 1x terms are XORed first, so every byte has the same XOR depth behind the xtime.
- **`aes_inv_cipher_round`**. It follows the FIPS-197 inverse order: InvShiftRows, InvSubBytes, AddRoundKey, InvMixColumns. It has the same three outputs.
- **`aes_key_expand`**. It turns round key r-1 into round key r in one combinational step: RotWord, SubWord through four S-box ROMs, RCON(r), and the four-word XOR chain.

## The space-optimised engine

`aes_cipher_module` and `aes_inv_cipher_module` each hold the same four parts:

```
 host 64b ─► aes_in_fifo ─128b─► aes_ctrl ◄──► round datapath
                                    │  ▲
                            key_address│  │key_in (one clock later)
                                    ▼  │
                              external key RAM
                 aes_ctrl ─128b─► aes_out_fifo ─64b─► host
```

### Host protocol and FIFOs

All strobes and flags are active low.

**Writing.** The host writes one 64-bit half per clock with `wrb` low, the upper half first. With each half it also writes:
- the matching half of the IV on `iv_in`;
- a 16-bit context word on `context_in`. The context word of the first half is the one that is used.

**Input FIFO** (`aes_in_fifo`). It is three circular buffers (data 64 bits, IV 64 bits, context 16 bits) sharing one pair of pointers. There are eight locations, so four blocks. The controller pops two locations at a time and sees a 128-bit block, its 128-bit IV and both context halves.
- `fullb` goes low when fewer than two locations are free.
- `emptyb` is high when at least one whole block is stored.

**Output FIFO** (`aes_out_fifo`). It mirrors the input FIFO. The controller pushes 128 bits as two locations. The host reads 64 bits per clock with `rdb` low. The head is always visible on `data_output`, so the upper half can be sampled before the first read clock.

**Context word.** Bit 15 here is the document's bit 0.

| bits  | field     | meaning                                                           |
|-------|-----------|-------------------------------------------------------------------|
| 15    | sop       | first block of a packet: CBC uses the IV instead of the chain value |
| 14    | encrypt   | carried but not used; each engine only encrypts or only decrypts |
| 13:12 | mode      | 01 = ECB, 10 = CBC; any other value drops the block with no output |
| 11:0  | key_index | key set; its low `KEY_IDX_W` bits are used                        |

### Control state machine and the 12-clock block

`aes_ctrl` has three states (IDLE, ROUND, DONE) and a round counter. One module serves all three engines; the `ENGINE` parameter selects encryption, decryption or key generation.

| clock  | state      | what happens                                                                      |
|--------|------------|-----------------------------------------------------------------------------------|
| 0      | IDLE/DONE  | pop a block from the input FIFO; read round key 0 (decryption: key 10)            |
| 1      | ROUND r=0  | whitening XOR (CBC encryption also XORs the IV or the chain value); read key 1    |
| 2..10  | ROUND 1..9 | one full round per clock; read the key for the next round                         |
| 11     | ROUND r=10 | final round into the result register (CBC decryption XORs the IV or the previous ciphertext here) |
| 12 = 0 | DONE       | push the result to the output FIFO and, in the same clock, pop the next block      |

Back to back, a block therefore costs exactly 12 clocks. If the output FIFO is full, the engine waits in DONE and pops nothing.

Key reads are issued one clock ahead. `key_address = {key_index, round}` with `read_mem` as the strobe, and the key memory must return the key on the next clock. With `KEY_IDX_W = 1` the address is 5 bits, which holds two key sets.

**CBC.**
- Encryption keeps its last ciphertext in a chain register.
- Decryption keeps the last ciphertext *input* (the CBC register) and XORs it, or the IV, onto the output of the final round.

The chain registers belong to the engine, not to a key set. The blocks of one CBC packet must therefore reach an engine back to back.

## Key generation and key memories

`aes_keygen_module` reuses the input FIFO and the controller (`ENGINE = ENG_KEYGEN`), with `aes_key_expand` as its datapath.
- The host writes a cipher key as an ordinary block. The key index in the context chooses the key set.
- The engine writes round keys 0..10 into the key memories over 11 clocks, one per clock.
- It has no output FIFO.

`aes_key_ram` is a 32 x 128-bit dual-port RAM: one write port and a registered read port. The top has two of them, one per cipher engine. The key generator writes both at once. A key set can be regenerated while the engines work on the other set.

## The multi-session pipeline

`aes_ms_cipher` has one stage per round:
- stage 0 is `aes_ms_round0`;
- stages 1..10 are `aes_ms_round` with `ROUND` = 1..10.

Every stage registers three things: the state, the block's key slot and a valid bit.

**Per-stage key stores.** Each stage holds its own store of `2**KEY_INDEX_W` round keys (16 by default), indexed by the key slot that travels with the block. Each stage's store is written through the `key_wr*` port, one round key at a time. A block therefore needs no key-schedule logic, and neighbouring stages can work for different sessions in the same clock.

**Round 0 and chaining.** Stage 0 chooses what to XOR into the incoming block before the round-0 key:
- ECB (`mode_in` = 0): nothing;
- CBC with `sop_in`: the IV;
- other CBC blocks: the *feedback*, which is the block leaving stage 10 in that same clock.

**Scheduling rule.** A session's next CBC block must enter exactly 11 clocks after its previous one, because only then is its previous ciphertext on the feedback wire. `aes_ms_scheduler` enforces this:
- it holds 11 queues and serves them in strict round robin, one slot per clock;
- whatever enters from queue q entered from queue q 11 clocks earlier too, so it meets its predecessor's ciphertext;
- an empty slot issues a bubble (valid = 0) and keeps the rhythm.

Many sessions can share one queue, but a packet's blocks must be contiguous in that queue.

**Throughput.** Once all queues are busy, the pipeline finishes one block per clock. That is 128 bits x 50 MHz = 6.4 Gbit/s overall. A single session gets one slot in eleven, 581.8 Mbit/s. Latency is 11 clocks.

## The co-processor top

`aes_security_coprocessor` wires together everything described above.

**Shared host bus.** The host bus (`data_input`, `iv_in`, `context_in`, `data_output`) is shared by the encryption engine, the decryption engine and the key generator. Each engine has its own strobes and flags:
- `wrb_enc`/`fullb_enc`, `wrb_dec`/`fullb_dec`, `wrb_kgen`/`fullb_kgen`;
- `rdb_enc`/`emptyb_enc`, `rdb_dec`/`emptyb_dec`.

`data_output` shows the decryption engine's FIFO head while `rdb_dec` is low, and the encryption engine's otherwise.

**Key memories.** The key generator writes two key RAMs, one per engine.

**Multi-session side.** The scheduler and pipeline have their own ports, all prefixed `ms_`: queue push, queue-full flags, key load and the output with its valid bit.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `IN_DEPTH`, `OUT_DEPTH` | 8 | FIFO locations (64-bit); 8 = four blocks |
| `KEY_IDX_W` | 1 | key-set bits; the key address is `KEY_IDX_W+4` bits |
| `MS_KEY_INDEX_W` | 4 | key slots per pipeline stage = 2**4 |
| `MS_QDEPTH` | 4 | blocks per scheduler queue |

## Verification

Every module has a self-checking testbench in `tb/`. Expected values come from `tb/aes_ref_pkg.sv`, a separate AES model that:
- finds the S-box by search and uses no tables from `rtl/`;
- has its own key schedule.

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_aes_sbox`, `tb_aes_inv_sbox` | all 256 entries against the reference S-box and its inverse |
| `tb_aes_cipher_round`, `tb_aes_inv_cipher_round` | the three outputs against the reference round, on random states |
| `tb_aes_key_expand` | the full schedule of the FIPS-197 key and of random keys |
| `tb_aes_in_fifo`, `tb_aes_out_fifo` | random traffic against a queue model, including the flags at full and empty |
| `tb_aes_key_ram` | write/read, and that the read register holds its value |
| `tb_aes_ctrl` | back-to-back blocks 12 clocks apart, key address order, output stalls |
| `tb_aes_cipher_module`, `tb_aes_inv_cipher_module` | FIPS-197 vectors, random ECB/CBC packets, the 12-clock spacing, full input and output FIFOs |
| `tb_aes_keygen_module` | all 11 round keys and their addresses |
| `tb_aes_ms_round0`, `tb_aes_ms_round`, `tb_aes_ms_cipher` | ECB and CBC through the pipeline with feedback, 11-clock latency, one block per clock |
| `tb_aes_ms_scheduler` | strict round robin, per-queue order, the full flags |
| `tb_aes_security_coprocessor` | everything at default parameters (below) |

**The end-to-end test.** `tb_aes_security_coprocessor` runs the top at its default parameters and does the following:
- generates two key sets and runs the known-answer vectors;
- sends a block with an undefined mode;
- sends random ECB and CBC packets through both engines while the reader pauses;
- regenerates one key set in mid-run;
- sends eleven sessions through the pipeline.

It counts each mechanism: key-generator writes, ECB and CBC blocks per engine, dropped blocks, full input FIFOs, output-FIFO stalls, key-set updates, feedback blocks and bubbles in the pipeline, and full scheduler queues. A mechanism that never happens is counted as a failure.

**Running a testbench with plain Verilator:**

```
verilator --binary --timing --assert rtl/aes_pkg.sv tb/aes_ref_pkg.sv -Irtl -Itb -y rtl +libext+.sv \
          tb/tb_aes_security_coprocessor.sv --top-module tb_aes_security_coprocessor
./obj_dir/Vtb_aes_security_coprocessor
```

To run another testbench, replace the testbench name.

Lint warnings remain:
- unused bits in helper functions;
- unused outputs, such as the key-write port of the cipher engines, which only the key generator uses.

The controller drives `fifo_rd` during reset. The FIFOs ignore it, since they are held in reset.

## Choices and departures

- **Key generator.** It writes the key RAMs directly, one round key per clock, rather than through an output FIFO.
- **Write protocol.** Each clock with `wrb` low writes one half. There is no lead-in clock.
- **Flags.** FIFO flag thresholds are whole blocks (two locations).
- **Reset.** It is synchronous and active-low.
- **Round module.** It is combinational. The controller's result register takes the place of a separate registered round-10 output.
- **Control state machine.** Three states and a counter take the place of a 27-state unrolled machine. The per-clock behaviour is the same, and so is the 12-clock block.
- **Context bits.** The encrypt bit is ignored, because there is one engine per direction. An undefined mode drops the block.
- **Pipeline key loading.** The pipeline's per-stage key stores are loaded through an added key-write port. The store depth (16 slots) and the scheduler queue depth (4) are this design's choices.
- **Scheduler placement.** The round-robin scheduler is described for an external processor. Here it is built in hardware so that the pipeline can be used and tested as a unit.
- **Table-based round.** The T-box round (four 256x32 tables per column) is only an alternative for comparison. It is not built.
- **Test vector.** The CBC-encryption and FIPS test-vector outputs are checked in FIPS-197 byte order.
