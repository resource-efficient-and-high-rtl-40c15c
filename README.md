# PRINCE cipher with a pipelined round datapath, and an RFID mutual-authentication engine built on it

RFID tags are cheap, and so they have little room for hardware. They still need to prove to a
reader that they are genuine, and the reader must prove the same to them. This design does both
with one lightweight block cipher, PRINCE: 64-bit blocks and a 128-bit key. It has two layers:

1. **`prince_cipher`**: a PRINCE engine that encrypts and decrypts with the same hardware. Its
   twelve round operations are cut into four pipeline stages. A small controller drives the stages.
2. **`rfid_map`**: a server database, a reader and a tag that run a seed-based mutual
   authentication protocol. It uses seven cipher instances: five encrypt and two decrypt. After a
   successful session, tag and server both move to a new seed, so they stay synchronized.

All of it is plain synthesizable SystemVerilog. The only configuration is the one described here;
nothing is parameterized apart from the round shape of `prince_round`.

## PRINCE in one page

The 128-bit key is split as `K = K0 || K1`, with `K0 = K[127:64]` and `K1 = K[63:0]`. A third
64-bit key is derived from `K0`:

    K0' = (K0 >>> 1) ^ (K0 >> 63)      =  {K0[0], K0[63:2], K0[1] ^ K0[63]}

Encryption is `C = PRINCEcore_K1(P ^ K0) ^ K0'`. The core is a sequence of twelve round operations
on a 64-bit state of 16 nibbles. Nibble 0 is bits 63:60.

| op | what it does |
|----|--------------|
| R0 | `x ^ RC0 ^ K1` |
| R1..R5 (forward rounds) | S-box on every nibble, then `M = SR ∘ M'`, then `^ RCi ^ K1` |
| middle | S-box, `M'`, inverse S-box (no key) |
| R6..R10 (inverse rounds) | `^ RCi ^ K1`, then `M⁻¹ = M' ∘ SR⁻¹`, then inverse S-box |
| R11 | `x ^ RC11 ^ K1` |

- `M'` is a fixed 64×64 binary matrix. It is block-diagonal, `diag(M̂0, M̂1, M̂1, M̂0)`. Each 16×16
  block is made of 4×4 identity blocks, each with one diagonal bit cleared (`m_hat` in
  `prince_pkg`). `M'` is its own inverse.
- `SR` is a nibble permutation: output nibble *i* takes input nibble
  `0 5 10 15 4 9 14 3 8 13 2 7 12 1 6 11`[*i*].
- The S-box is `B F 3 2 A C 9 1 6 7 8 0 E 5 D 4`.

The round constants satisfy `RC[i] ^ RC[11-i] = α = c0ac29b7c97c50dd`. Because of this, the inverse
of the core under `K1` is the same core under `K1 ^ α`. Decryption therefore runs the *same*
datapath with different keys:

| mode | first key add (`kr0`) | round key (`kr1`) | last key add (`krs`) |
|------|-----------------------|-------------------|----------------------|
| 1 = encrypt | `K0`  | `K1`     | `K0'` |
| 0 = decrypt | `K0'` | `K1 ^ α` | `K0`  |

`prince_keygen` computes this table. No key schedule is needed beyond it.

## The cipher's datapath and its pipeline

The cipher is split into four units:

- key generation (`prince_keygen`)
- a register unit that holds every flip-flop (`prince_regs`)
- a purely combinational datapath (`prince_datapath`)
- a purely combinational controller (`prince_fsm`)

`prince_round` is one round operation. Its `KIND` parameter selects key-add, forward, middle or
inverse.

The three round registers `r3_reg`, `mr_reg` and `r8_reg` cut the twelve operations into four
stages:

    st_reg ──^kr0──R0─R1─R2─R3──► r3_reg ──R4─R5─middle──► mr_reg ──R6─R7─R8──► r8_reg ──R9─R10─R11──^krs──► Out
                                 (stage 1)               (stage 2)              (stage 3)                (stage 4)

- The round registers load on every clock.
- `st_reg` (the state register) loads only on `st_en`. It takes the input block in the
  *initialization* state and `Out` in the *updation* state.
- The key registers `kr0/kr1/krs` load on `k_en`, together with the input block.
- The control register `c_reg` loads on `c_en`.

The controller steps through `idle → s0 → s1 → s2 → su → idle`:

| cycle | state | what happens |
|-------|-------|--------------|
| t | idle, `start_i=1` | `i_s`: block → `st_reg`, keys → `kr0/kr1/krs` |
| t+1 | s0 | stage 1 result → `r3_reg` |
| t+2 | s1 | stage 2 result → `mr_reg` |
| t+3 | s2 | stage 3 result → `r8_reg` |
| t+4 | su | `ct_o` = stage 4 output, `done_o = 1`; `u_s` writes it back into `st_reg` |

So `done_o` comes exactly four cycles after the start cycle. Inputs are registered in the start
cycle and need not be held. The next operation can start in the cycle after `done_o`, which gives
one block every five cycles. A `start_i` while `busy_o` is high is ignored. Two assertions in
`prince_cipher` check the 4-cycle latency and that `done_o` is a single-cycle pulse.

The round registers run freely, but the controller feeds them only one block at a time. The
pipelining therefore shortens the critical path (three or four rounds between registers instead
of twelve); it does not add parallel blocks.

### Interface of `prince_cipher`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (all registers to 0, controller to idle) |
| `start_i` | in | 1 | start an operation; accepted when `busy_o` is low |
| `mode_i` | in | 1 | 1 = encrypt, 0 = decrypt |
| `key_i` | in | 128 | `K0 ‖ K1` |
| `pt_i` | in | 64 | input block |
| `ct_o` | out | 64 | result, valid while `done_o` is high |
| `done_o` | out | 1 | one-cycle pulse |
| `busy_o` | out | 1 | controller not idle |

## The mutual-authentication protocol in hardware

Server, reader and tag all hold the same key `K`. The server database also holds the seed `S`,
the tag ID `ID_T` and the reader ID `ID_R`. The tag holds `S` and `ID_T`, and the reader holds
`ID_R`. `E`/`D` are PRINCE under `K`. `K1 = K[63:0]`.

| step | where | computation |
|------|-------|-------------|
| query | server | `SC1 = E(S ^ ID_R)` → reader; in parallel `SC2 = E(S)` |
| | reader | `SD1 = D(SC1)` (= `S ^ ID_R`), `R_C = E(SD1 ^ ID_R)` (= `E(S)`) → tag |
| reader auth | tag | `T_C = E(S)`, computed from session start. If `T_C == R_C`: reader authenticated, seed ← `US_T = R_C ^ K1`, send `T_R = E(US_T ^ ID_T)`. Otherwise: `fail`, no reply |
| tag auth | server (via reader) | `SD2 = D(T_R)`, `ID_S = K1 ^ SC2 ^ SD2`. If `ID_S == ID_T`: tag authenticated, seed ← `US_S = SC2 ^ K1`. Otherwise: `fail` |
| sync | top | `sync_done` when both are authenticated and `US_T == US_S` |

The tag check works because `R_C = E(S) = T_C`. The server check works because
`SD2 = US_T ^ ID_T = E(S) ^ K1 ^ ID_T`, so `K1 ^ SC2 ^ SD2 = ID_T`. Both sides then hold
`E(S) ^ K1` as their new seed. The next session starts from it, and the test runs two sessions in
a row to show this.

Messages are `msg_t` structs: a one-cycle `valid` pulse plus 64 data bits. Each party registers
what it sends. One cipher instance is used per operation:

- server: 2 encryptions, 1 decryption
- reader: 1 decryption, 1 encryption
- tag: 2 encryptions

### Session timing (successful session, cycle 0 = `start_i`)

| cycles | event |
|--------|-------|
| 0–4 | server: `SC1` and `SC2`; tag: `T_C` |
| 5 | query `SC1` reaches the reader |
| 5–9, 9–13 | reader: `D(SC1)`, then `E(SD1 ^ ID_R)` |
| 14 | `R_C` reaches the tag; registered |
| 15 | tag compares, updates its seed, starts `E(US_T ^ ID_T)` |
| 20, 21 | `T_R` leaves the tag; the reader forwards it |
| 21–25 | server: `D(T_R)` |
| 26 | server compares; `tag_auth`, seed update, `done` |
| 27 | `session_done_o` and `sync_done_o` |

If the tag rejects the reader, `session_done_o` pulses one cycle after the tag's `fail`. The server
is then still waiting for `T_R`. A new `start_i` (or `init_i`) is accepted in that state, and the
next session restarts cleanly.

### Interface of `rfid_map`

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `init_i` | in | load `seed_i` into the seed registers of both tag and server |
| `start_i` | in | start a session |
| `key_server_i`, `key_reader_i`, `key_tag_i` | in | each party's copy of `K` (tie together in normal use) |
| `seed_i` | in | initial seed |
| `id_tag_server_i`, `id_tag_i` | in | the database's and the tag's copy of `ID_T` |
| `id_reader_server_i`, `id_reader_i` | in | the database's and the reader's copy of `ID_R` |
| `obs_o` | out | `map_obs_t` struct with every intermediate value (`server_data`, `server_cipher`, `server_decipher1`, `reader_cipher`, `tag_cipher`, `tag_response`, `server_decipher2`, `server_cipher2`, `id_match`, `updated_seed_tag`, `updated_seed_server`) |
| `reader_auth_o`, `tag_auth_o`, `sync_done_o` | out | results; held until the next `start_i` |
| `session_done_o` | out | one-cycle pulse at the end of a session |
| `seed_tag_o`, `seed_server_o` | out | the seed each side will use next |

Each party gets its own key and ID inputs so that a party with wrong secrets can be simulated.

### Reference session

With `K = aaaabbbbccccddddeeeeffff00001111`, `S = aaaaaaaaaaaaaaaa`, `ID_T = ffffffffffffffff` and
`ID_R = 12345678ffffffff`, the design produces:

| signal | value |
|--------|-------|
| `server_data` | `b89efcd255555555` |
| `SC1` | `58df97781a447af7` |
| `SD1` | `b89efcd255555555` |
| `R_C`, `T_C`, `SC2` | `f50763ee4ae71fe3` |
| `T_R` | `e2ac0e49748ca3c5` |
| `SD2` | `e41663eeb518f10d` |
| `ID_S` | `ffffffffffffffff` |
| `US_T`, `US_S` | `1be99c114ae70ef2` |

`rfid_map_tb` checks all of these values.

## How far to trust it, and where it departs from the published design

The cipher is standard PRINCE. It reproduces the five published PRINCE test vectors, including
`E_0(0) = 818665aa0d02dfda`, and decrypts every result back. Every block has its own self-checking
testbench. The expected values come from a separate software model, not from the RTL.

Points where this RTL makes its own choice, or differs from the design it follows:

- **Round constant RC3** is `082efa98ec4e6c89`. It is the only value for which
  `RC3 ^ RC8 = α`, the property that decryption relies on.
- **Decryption keys.** Decryption uses `K0'` first, `K1 ^ α` in the rounds and `K0` last. Another
  key order also appears in the description of this design. It was not used, because under it
  decryption would not invert encryption.
- **Latency.** The cipher gives its result 4 cycles after start and takes 5 cycles per block. The
  published figure is 3.5 cycles, which a single-edge synchronous design cannot produce. Its
  throughput figures (e.g. 4.11 Gbps at 224 MHz) assume 3.5 cycles per block. At 5 cycles per
  block, the same clock gives 2.87 Gbps.
- **Session latency** is 27 cycles from `start_i` to `sync_done_o`. The published figure is
  35.5 cycles. The message timing here is this design's own.
- **Start handshake.** The controller waits in idle for `start_i`. In the original description it
  cycles through its states continuously.
- **Query input.** The query encrypts `S ^ ID_R`, and `R_C = E(D(SC1) ^ ID_R)`. The seed-update
  and ID formulas use `K1`, the low 64 bits of `K`, wherever a 64-bit word is combined with "K".
- **Protocol behaviour chosen here:**
  - The tag starts computing `T_C` at session start.
  - On a mismatch, a party raises `fail` and keeps its seed. It does not retry by itself.
  - `init_i` re-seeds both sides.
- **Reset** is asynchronous and active low. Reset values (all zero, controller idle) are this
  design's choice.
- **Scope.** The radio link, antenna and analog front end of a real tag are not modelled.
  Messages pass directly between the three modules.
- **Tool warnings.** Verilator reports `SYNCASYNCNET` because `rst_n` is both the asynchronous
  reset and the `disable iff` of the assertions. This is intended.

FPGA area, clock rate and power cannot be judged from this RTL.

## Files

| file | content |
|------|---------|
| `rtl/prince_pkg.sv` | types (`word_t`, `key_t`, `msg_t`, `map_obs_t`, state enums), constants, S-box/SR/M' functions |
| `rtl/prince_round.sv` | one round operation, shape chosen by `KIND` |
| `rtl/prince_keygen.sv` | `K0/K1/K0'` and the mode-dependent key order |
| `rtl/prince_regs.sv` | state, key, round and control registers |
| `rtl/prince_datapath.sv` | the four pipeline stages and the next-state selection |
| `rtl/prince_fsm.sv` | controller decoding |
| `rtl/prince_cipher.sv` | the cipher |
| `rtl/rfid_server.sv`, `rtl/rfid_reader.sv`, `rtl/rfid_tag.sv` | the three protocol parties |
| `rtl/rfid_map.sv` | top level: the three parties wired together, plus the sync flag |
| `tb/<module>_tb.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. With Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/prince_pkg.sv tb/rfid_map_tb.sv --top-module rfid_map_tb
    ./obj_dir/Vrfid_map_tb

Replace `rfid_map_tb` with any other testbench name. `rfid_map_tb` runs six sessions, all at the
design's only configuration:

1. the reference session
2. a session from the updated seed
3. a database with a wrong tag ID (tag rejected, seeds drift apart)
4. a tag rejecting the reader because of that drift
5. a re-seed, after which the server restarts from waiting and the session succeeds
6. a reader with a wrong key

The testbench counts each mechanism and fails if one never happens. `prince_cipher_tb` covers the
published vectors, decryption, the latency, back-to-back operation and a start while busy.
