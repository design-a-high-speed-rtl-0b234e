# AES-128 encryption core with Razor-style timing-error prediction

This is an iterative AES-128 encryption core (one round per loop iteration, round
keys generated on the fly) whose critical paths are watched by timing-error
detectors. Each detector is a bank of Razor flip-flops: every bit is captured
twice, once by a main flip-flop on the clock and once by a shadow register on a
delayed copy of the clock. If a value reaches the flip-flop after the clock edge
but before the delayed edge, the two copies disagree. The core then throws away the
round result built from the stale value, the detector reloads the late (correct)
value from its shadow, and the round's second cycle runs again. The idea is that
the clock can be pushed close to, or past, the worst-case path delay. The rare
late arrival costs one extra cycle instead of a wrong cipher text.

The detectors sit on two connections:

* between Sub Bytes/Shift Rows and Mix Columns in the data loop (128 bits);
* between the key path's Sub Bytes and the second key-expansion block (32 bits).

The paper calls them STEPCs (suspicious timing-error prediction circuits).

## Block structure

```
data loop
  plain_text ─► Crypto FF ─► Sub Bytes/Shift Rows ─► STEPC (128) ─► Mix Columns
                   ▲  │                                  │               │
                   │  └─ round 0 ──────┐       round 10 ─┘     rounds 1-9 ┘
                   │                   ▼                 ▼               ▼
                   │                 ┌──────── round-input select ────────┐
                   │                 └───────────────┬───────────────────┘
                   │                                 ▼
                   └────────────────────────── Add Round Key ◄── round key
                                                     │
                                                     └─► cipher_text (= Crypto FF)
key loop
  common_key ─► Key Expansion FF ─┬─► round key (to Add Round Key)
                   ▲              ▼
                   │        first block ──32──► Sub Bytes ──32──► STEPC (32) ─┐
                   │              └─────────────── 128 ───────────────────────┤
                   │                                                          ▼
                   └──────────────────────────────────────────────── second block
```

| module | role |
|---|---|
| `aes_stepc_top` | the core; wires everything below |
| `aes_ctrl` | round sequencing, start/done, re-execution on a timing error |
| `aes_crypto_ff` | 128-bit state register, loads plain text or the round result |
| `aes_subbytes_shiftrows` | 16 S-boxes followed by the row rotation, as one combinational block |
| `stepc` | WIDTH-bit bank of `razor_ff` with one combined error flag |
| `razor_ff` | main flip-flop, shadow register on `clk_del`, XOR comparator, restore mux |
| `aes_mixcolumns` | column multiply by {02 03 01 01} over GF(2^8) |
| `aes_addroundkey` | three-way round-input select, then XOR with the round key |
| `aes_key_ff` | 128-bit round-key register, loads the cipher key or the next round key |
| `aes_keyexp_first` | RotWord of w3, and the running XORs w0, w0^w1, w0^w1^w2, w0^w1^w2^w3 |
| `aes_subword` | four S-boxes on the rotated word |
| `aes_keyexp_second` | t = SubWord ^ Rcon; next key = running XORs ^ {t,t,t,t} |
| `aes_sbox` | one S-box, computed as GF(2^8) inverse (x^254) plus the affine map |
| `aes_pkg` | shared types, GF(2^8) arithmetic, S-box and Rcon functions |

The round-input select chooses among three values. Round 0 (the initial key
addition) takes the Crypto FF content. Rounds 1 to 9 take the Mix Columns output.
Round 10 takes the Sub Bytes/Shift Rows output, because AES skips Mix Columns in
its last round.

The key schedule needs no key storage beyond the current round key. At the end
of each round the next round key replaces the current one.

## Rounds, timing errors and re-execution

The STEPC registers split the round loop in two, so a round takes two clock
cycles:

1. **CAPTURE.** The state in the Crypto FF passes through Sub Bytes/Shift Rows.
   The rotated last key word passes through the key Sub Bytes. At the closing
   `clk` edge both STEPCs capture the results (`cap_en` high). A quarter period
   or so later, at the `clk_del` edge, their shadows capture the same inputs
   again.
2. **EXECUTE.** Mix Columns, the round-input select, Add Round Key and the second
   key-expansion block work from the STEPC outputs. During this cycle each STEPC
   compares its main and shadow copies. At the closing `clk` edge the controller
   looks at the combined error (`timing_error`):
   * no error: the round result goes into the Crypto FF, the next key into the
     Key Expansion FF, and the next round starts;
   * error: nothing is stored. Every flagged Razor bit reloads its main
     flip-flop from the shadow, and EXECUTE runs once more from the corrected
     value. `reexec_count` counts these events.

A round with a late arrival therefore takes three cycles instead of two.
Only the data that went through the STEPC can be wrong, and it is repaired one
cycle later. This is the Razor recovery scheme, applied to a loop rather than
to a pipeline.

Electrical assumptions behind the scheme, which the RTL cannot enforce:

* `clk_del` has the period of `clk` and rises after `clk`, by less than half a
  period. The error flag is meaningful from the `clk_del` edge to the next `clk`
  edge, and that is the only window in which anything samples it.
* Hold constraint: no path into a STEPC may change its input before the
  `clk_del` edge that follows a capture. In this design the STEPC inputs only
  change when the Crypto FF or Key Expansion FF load. That happens at the end of
  EXECUTE, a full cycle after the capture, so the shadow's window is free of
  new data. The shadow's capture enable is `cap_en` delayed by one `clk` cycle.
  Because of that, short paths that change right after an EXECUTE edge are never
  mistaken for late arrivals.
* A late arrival must be later than the `clk` edge but settled before the
  `clk_del` edge. Anything later is outside what a Razor flip-flop can detect.

## Interface and latency

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `clk_del` | in | 1 | clock and delayed clock |
| `rst_n` | in | 1 | asynchronous active-low reset of all registers |
| `start` | in | 1 | one-cycle pulse; `plain_text` and `common_key` are read at this edge |
| `plain_text`, `common_key` | in | 128 | FIPS-197 byte order: byte 0 in bits [127:120] |
| `busy` | out | 1 | an encryption is running; `start` is ignored while it is high |
| `done` | out | 1 | one-cycle pulse; `cipher_text` is valid and stays valid until the next `start` |
| `cipher_text` | out | 128 | the Crypto FF |
| `timing_error` | out | 1 | a STEPC disagrees (valid between `clk_del` and `clk`) |
| `reexec_count` | out | 16 | re-executed rounds since reset (wraps) |

From the `start` edge to `done` there are 1 + 2 × 11 = **23 cycles** without
errors, plus one cycle per re-executed round. Back to back, with `start` raised
in the cycle after `done`, one block completes every 24 cycles. The only
parameter is `NR = 10`, the number of rounds. Changing it does not turn the key
path into AES-192/256.

## Departures from the paper and choices made here

* **Cycle count.** The paper gives 14 clock cycles per cipher text for the
  circuit *without* STEPCs and no cycle count with them. Here each round takes two
  cycles because the STEPC registers the connection it watches, so latency is 23.
  The paper's figure only shows a tap labelled STEP-D on the Sub Bytes/Shift
  Rows output. Reading the STEPC as a register on the connection, not as a
  side monitor, is a choice made here. It is what lets a late value be repaired
  by a repeat of the second half of the round only.
* **Shadow element.** The paper describes a shadow *latch*. Here it is an
  edge-triggered register on `clk_del` with a capture enable. The comparison is
  then stable for a whole window and never compares against a transparent latch.
* **Combined error.** Per-bit error flags are reduced so that any differing bit
  raises the STEPC error.
* **Re-execution decision.** The paper mentions an "AHL" circuit
  circuit that is told about errors and decides between one-cycle and two-cycle
  operation, but gives no rule for it. Here recovery is the fixed "repeat the
  EXECUTE cycle" action in `aes_ctrl`, and nothing predicts errors ahead of time.
* **Key-expansion split.** The paper splits key expansion into a first and a
  second block around a 32-bit Sub Bytes, with 128 bits passing beside it. The
  split of operations between them is chosen here: RotWord and the running XORs
  go first, and the Rcon/SubWord addition goes second.
* **S-box.** Computed from the GF(2^8) inverse and affine map rather than
  stored as a table.
* **Not built.** Decryption, AES-192 and AES-256 are mentioned in the paper but
  not designed there. The core encrypts only, with 128-bit keys.
* Reset, the start/done/busy handshake, the round-input select encoding and
  the two-enable register controls are choices made here.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with the line
`TB_RESULT checks=N failures=M`. Expected values come from `tb/aes_ref_pkg.sv`,
a separate AES-128 model. It finds S-box inverses by search, and it runs the
cipher on a byte array.

* `tb_aes_stepc_top` covers the core at its default size:
  * the FIPS-197 appendix B and C.1 vectors;
  * the appendix B vector with a late arrival in every round of both paths
    (34 cycles);
  * 40 random key/block pairs with random late arrivals, some of them with a
    stray `start` during `busy`.

  It checks every cipher text, the latency (23 + re-executions), the re-execution
  counter and the `done` pulse. It also counts how often each mechanism occurred.
* `tb_aes_file_encrypt` encrypts a generated 4 KiB file (256 blocks) back to
  back. About one block in eight has a late input. The test checks every block
  and the 24-cycle block period.
* Unit testbenches:
  * the S-box is checked over all 256 inputs;
  * Sub Bytes/Shift Rows and Mix Columns are checked against FIPS-197 round
    values and random states;
  * the key blocks are checked over whole key schedules;
  * `razor_ff` and `stepc` are checked with on-time, late and idle captures;
  * the controller is checked cycle by cycle with random errors.

Late arrivals are modelled in simulation by overriding a STEPC input with a
corrupted value across the `clk` edge (`force`). The true value is restored one
time unit later, before the `clk_del` edge. The main flip-flop therefore sees the
stale value and the shadow sees the correct one.

To simulate with Verilator (5.x), from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_stepc_top.sv --top-module tb_aes_stepc_top
./obj_dir/Vtb_aes_stepc_top
```

Any other testbench builds the same way with its own file and top name.
