# Pipelined DES engine, with Triple DES and RC5 beside it

The main design is a DES encryptor and decryptor built as a pipeline. The
Data Encryption Standard takes a 64-bit block through sixteen identical
Feistel rounds. Here each round has its own hardware with a register behind
it, so sixteen blocks are in flight at once. With a fixed key the engine
takes a new block on every clock and returns it 16 cycles later. The reference
FPGA implementation reports 34.4 MHz, which is 275 MB/s.

A small front end adds the two classic modes of operation:

- **ECB** streams at the full rate.
- **CBC** chains each block on the previous ciphertext. This dependency keeps
  the pipeline from filling, so CBC runs at one block per 16 cycles.

Two further ciphers stand next to the DES engine and share only clock and
reset with it:

- **Triple DES (EDE):** three DES pipelines in series.
- **RC5:** a small iterative core.

## Dataflow of one DES block

```
 pt ─► IP ─► L0,R0 ─► [round 1] ─► [round 2] ─► … ─► [round 16] ─► swap ─► IP⁻¹ ─► ct
                        ▲ K1         ▲ K2               ▲ K16
 key ─► PC-1 ─► C0,D0 ─► rotate ─► PC-2  (all sixteen keys computed at once)
```

- **IP and IP⁻¹** (`des_ip`, `des_fp`) are fixed bit permutations. IP splits
  the block into the halves L0 and R0.
- **A round** (`des_round`) computes `L[i] = R[i-1]` and
  `R[i] = L[i-1] xor f(R[i-1], K[i])`. It captures both halves in a 64-bit
  register when `ce` is high.
- **The round function** (`des_f`) computes
  `f(R, K) = P(S(E(R) xor K))`:
  - `des_expand` widens R from 32 to 48 bits. Each 4-bit group takes a copy
    of its neighbour bit on each side.
  - The round key is XORed in.
  - Eight S-boxes (`des_sbox`) each turn 6 bits into 4.
  - `des_pperm` permutes the 32 resulting bits.
- **The final swap:** the last round's halves go into IP⁻¹ as R16 followed
  by L16. `des_pipe` does this swap in its wiring.
- **Decryption** uses the same datapath. Only the key order changes: round i
  gets `K[17-i]`.

### Bit numbering

DES numbers bits from 1, and bit 1 is the most significant. Every table in
`des_pkg` uses that convention: entry n names the 1-based input bit that
becomes output bit n+1. In the packed vectors of the RTL, DES bit `b` of a
`W`-bit word is vector bit `[W-b]`, and each permutation is a generate loop
built on that rule. A 64-bit value written in hex (`64'h0123456789ABCDEF`)
therefore has the same bit order as the DES standard and its test vectors.

### Key schedule (`des_keysched`)

1. PC-1 drops the parity bits (8, 16, …, 64). It arranges the other 56 bits
   into two 28-bit halves, C0 and D0.
2. Before round i, both halves rotate left by 1 or 2 places. The sequence is
   `1 1 2 2 2 2 2 2 1 2 2 2 2 2 2 1`, 28 places in total.
3. PC-2 selects 48 of the 56 bits as K[i].

The unit is combinational and gives all sixteen keys at once. Its `decrypt`
input reverses the order. The key is *not* pipelined: every stage reads the
same key. `key` and `decrypt` must therefore stay stable while blocks are in
the pipeline. The front end guarantees this because it registers them and
changes them only when the pipeline is empty.

### S-boxes (`des_sbox`)

S-box `BOX` uses b1 (the MSB) and b6 to choose one of four rows. It uses
b2..b5 to choose one of sixteen columns. The RTL is organised the way a
LUT-based FPGA stores the box: two 32-entry halves and a 2:1 multiplexer
switched by b1. The lower half holds rows 0–1 and the upper half rows 2–3.
Both halves are addressed by b2..b6. Synthesis keeps each half as a small
ROM. The testbench checks the contents of S-box 1 against two published
32-bit FPGA ROM images, 86E67619 and 869D497A.

## Pipeline timing (`des_pipe`)

| signal | meaning |
|---|---|
| `in_valid`, `pt` | block entering at a rising edge where `ce` is high |
| `out_valid`, `ct` | result, 16 enabled edges later |
| `ce` | clock enable for all 16 stages; low freezes the pipeline |
| `key`, `decrypt` | shared by every stage; hold stable while blocks are in flight |
| `rst_n` | asynchronous, active-low; clears only the valid flags |

The data registers have no reset. A 16-bit valid shift register runs beside
them and tells which stages hold real blocks.

## ECB/CBC front end (`des_modes`)

This is the part with the most control logic. It has three valid/ready ports.
A transfer happens on a rising edge where both valid and ready are high.

- **`cfg_*`** loads the key, the direction, the mode (`MODE_ECB`/`MODE_CBC`)
  and the CBC initial value (IV).
  - `cfg_ready` is high only when no block is in flight.
  - A pending `cfg_valid` blocks new input, so a new configuration can never
    mix with blocks that are already running.
- **`in_*`** accepts blocks.
  - In ECB, `in_ready` follows the pipeline's clock enable, so one block per
    cycle enters.
  - In CBC, at most one block is in flight.
- **`out_*`** delivers results. If `out_ready` is low while a result is
  waiting, the whole pipeline stalls through `ce`. The result then stays on
  `out_data`, and `in_ready` drops.

How CBC keeps its rate:

- **Encryption** computes `ct[i] = DES(pt[i] xor ct[i-1])`, with `ct[0]` taken
  from the IV. In the cycle where a ciphertext is handed out, the front end
  forwards it straight to the XOR in front of the pipeline. The next block is
  accepted on that same edge. The result is exactly one block every 16
  cycles. Without the forwarding path it would be one block every 17 cycles.
- **Decryption** computes `pt[i] = DES⁻¹(ct[i]) xor ct[i-1]`. A register keeps
  the ciphertext of the block in flight, and a second one keeps the previous
  ciphertext. Decryption uses the same one-block-at-a-time control as
  encryption, although CBC decryption could in principle be pipelined.

Immediate assertions check three rules:

- A block is never accepted together with a configuration.
- CBC never has two blocks in flight.
- There are never more blocks in flight than pipeline stages.

## Triple DES (`tdes_pipe`)

`ct = DES(key3, DES⁻¹(key2, DES(key1, pt)))`. Setting `key3 = key1` gives the
two-key variant. The three DES pipelines are chained by their valid flags and
share one clock enable. The unit takes one block per cycle with a latency of
48 cycles. Only encryption is built.

## RC5 (`rc5_core`)

RC5 works on two W-bit words A and B and uses only three operations: XOR,
addition mod 2^W and data-dependent rotation. Encryption:

1. `A += S[0]`, `B += S[1]`.
2. For i = 1..R:
   - `A = ((A xor B) <<< B) + S[2i]`
   - `B = ((B xor A) <<< A) + S[2i+1]`

Each rotation uses the low log2(W) bits of the other word. Decryption runs the
inverse steps in reverse order.

The core does one full round per clock:

- The first key addition is merged into the load.
- For decryption, the final subtraction is merged into the last round.
- `start` is accepted on a clock edge, and `done` pulses R+1 cycles later.
  With the defaults W = 32 and R = 12 that is 13 cycles.

The expanded key words `S[0..2R+1]` are an input port. The core does not
derive them from the user key.

## How far it can be trusted, and where it departs

- **DES datapath.** The whole datapath matches published DES test vectors:
  - key `133457799BBCDFF1`, pt `0123456789ABCDEF` gives `85E813540F0AB405`;
  - key `0E329232EA6D0D73`, pt `8787878787878787` gives `0000000000000000`.

  The testbenches also check the intermediate values of that first example:
  IP, E, the round-1 S-box outputs, P, R1, K1 and K16. A bit-level software
  model in `tb/des_ref_pkg.sv` checks thousands of random blocks and keys.
- **Key per block.** A fixed key is assumed for each stream. Changing the key
  on every block, which a key-search machine needs, would require pipelining
  the key schedule next to the data. That is not built.
- **Own choices beyond the algorithms:**
  - the valid flags;
  - the asynchronous reset;
  - all handshakes;
  - the IV register;
  - CBC decryption and its one-block-at-a-time policy;
  - CBC forwarding;
  - the iterative RC5 structure;
  - the pipelined Triple DES construction.
- **RC5.** The default sizes are the first of the sizes the cipher is usually
  quoted with: w = 32 or 64, r = 12 or 16. The parameters accept 64/16, and
  both 32/12 and 64/16 are simulated. The rotation is taken to be a left rotation.
- **Not included:**
  - RC5 key expansion;
  - Triple DES decryption;
  - a DES key-search unit (like the units of the EFF "Deep Crack" machine).
- **Timing.** No timing closure was attempted. Each pipeline stage has one
  round of logic: an XOR, eight S-box look-ups and another XOR.

## Simulating

Every testbench prints one line `TB_RESULT checks=N failures=M` and stops
itself. The DES testbenches need the package files, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/des_pkg.sv tb/des_ref_pkg.sv tb/rc5_ref_pkg.sv tb/tb_des_top.sv \
    --top-module tb_des_top
./obj_dir/Vtb_des_top
```

`-Irtl` lets verilator find each module from its file name.

| testbench | what it covers |
|---|---|
| `tb_des_ip`, `tb_des_fp`, `tb_des_expand`, `tb_des_pperm` | the permutations: single bits, known values, random values |
| `tb_des_sbox` | all 8 boxes × 64 inputs, ROM images |
| `tb_des_f`, `tb_des_round` | round function and registered round, `ce` hold |
| `tb_des_keysched` | K1/K16 known answers, parity bits ignored, reversed order |
| `tb_des_pipe` | known answers, 64 blocks in 64 cycles, latency 16, `ce` stalls, decryption |
| `tb_des_modes` | ECB and CBC in both directions, CBC rate of 1 per 16 cycles, back-pressure |
| `tb_tdes_pipe` | three-key and two-key EDE, latency 48, equal keys give single DES |
| `tb_rc5_core` | encrypt/decrypt against a software model, 13 cycles per block |
| `tb_rc5_64_16` | the same at 64-bit words and 16 rounds, 17 cycles per block |
| `tb_des_top` | the whole design at default sizes; counts each mechanism (ECB streaming, CBC forwarding, output stall, reconfiguration, decryption, Triple DES pause, RC5 in both directions) and fails if one never happens |

The testbenches use `$urandom` with the simulator's default seed. To change
the sizes, override `W`/`R` on `rc5_core` or `RC5_W`/`RC5_R` on `des_top`. The
DES sizes are fixed by the standard.

## Files

| file | content |
|---|---|
| `rtl/des_pkg.sv` | types, `mode_e`, the DES tables (IP, IP⁻¹, E, P, PC-1, PC-2, rotations, S-boxes) |
| `rtl/des_ip.sv`, `rtl/des_fp.sv` | initial and final permutation |
| `rtl/des_expand.sv`, `rtl/des_pperm.sv`, `rtl/des_sbox.sv`, `rtl/des_f.sv` | round function |
| `rtl/des_round.sv` | one registered round |
| `rtl/des_keysched.sv` | key schedule |
| `rtl/des_pipe.sv` | 16-stage DES pipeline |
| `rtl/des_modes.sv` | ECB/CBC front end |
| `rtl/tdes_pipe.sv` | Triple DES pipeline |
| `rtl/rc5_core.sv` | RC5 core |
| `rtl/des_top.sv` | top level |
| `tb/des_ref_pkg.sv`, `tb/rc5_ref_pkg.sv` | software reference models |
| `tb/tb_*.sv` | testbenches |
