# Byte-serial low-power AES-128 encryption cores

Two small AES-128 encryption engines for battery-powered and IoT devices.
Both process the 128-bit block a few bytes at a time, so that only a handful
of Sboxes and one 128-bit state store are needed. A multiplexer in front of
the clock tree stops each core completely between jobs.

* **2-Sbox core** (`aes_core_2sbox`). One Sbox works in the round datapath
  and one in the key schedule, so the key is expanded alongside the data.
  With an 8-bit datapath a block takes 160 clock cycles, which is 16 cycles
  per round. The datapath width `W` is a parameter (8, 16, 32 or 64 bits),
  which gives 160, 80, 40 or 20 cycles per block.
* **1-Sbox core** (`aes_core_1sbox`, 8-bit). One Sbox is shared by the
  datapath and the key schedule. A round takes 20 cycles: 16 for the state
  bytes, then 4 in which the key schedule borrows the Sbox. One block takes
  216 cycles.

`aes_top` places both cores side by side with separate ports. They share only
the clock input and the reset. The cores are alternatives: one is faster, the
other is smaller.

The architecture follows the paper "Design of ultra-low power AES encryption
cores with silicon demonstration in SOTB CMOS process". That paper fixes the
set of blocks, the widths, the cycle budgets, the controller style, the
composite-field Sbox and the clock gate. It does not give the byte-level
scheduling, so the schedule here is this design's own. The departures from
the paper are listed under "Differences from the published architecture"
below.

## Data flow of the 2-Sbox core

```
                 +-------------- key expansion (k_j byte by byte, own Sbox, Rcon) ---+
                 |                                                                   |
 data_in ^ key_in --E1--> +-------------+  ShiftRows   +------+   +-------------+     |
                          | state store |--- read ---->| Sbox |-->| MixColumns  |--(^ kcol)--E2--> state store
                          | 4 rows x 4  |  (selector)  +------+   | n-bit, buf  |
                          +-------------+                 |       +-------------+
                                                          +--(^ key byte)--> data_out  (round 10)
```

In each cycle the core reads `W/8` state bytes in ShiftRows order and passes
them through the Sboxes. The MixColumns unit collects the results into a
32-bit column. When a column is complete, the core writes
`MixColumns(column) ^ round-key column` back into the state store. The store
therefore always holds the state after AddRoundKey. At loading time the core
writes `data_in ^ key_in`, which is AddRoundKey with the cipher key. Round 10
has no MixColumns: the Sbox output is XORed with the last round-key bytes and
leaves as `data_out`.

## ShiftRows without a second buffer

This is the least obvious part of the design.

In a byte-serial round, output column `c` needs the bytes `(0,c)`,
`(1,c+1)`, `(2,c+2)` and `(3,c+3)`, with column indices taken mod 4. Those
bytes are spread over all four columns of the input state. The new column
cannot overwrite old column `c`, because three of its bytes are still
needed. A naive design would double-buffer the state.

This design writes the new column into the four slots it has just read,
which are exactly the diagonal above. Each write leaves row `r` of the store
rotated by `r` more positions. `aes_state_reg` keeps a 2-bit **epoch** `e`
that counts these rotations:

* Logical byte `(r, c)` is kept in physical slot `(r, (c + e*r) mod 4)`.
* A round reads output byte `4c+r` from slot `(r, (c + (e+1)*r) mod 4)`
  (`aes_shift_row`). That is logical byte `(r, c+r)`, which is ShiftRows.
* The round writes new column `c` into the same four slots. At the end of
  the round the epoch advances (`adv`).

Every slot is read before it is written, so a single 128-bit store is enough.
The MixColumns write (E2) and the input write (E1) both use the epoch-`e+1`
mapping. That lets the next block be loaded during round 10, into the slots
that round 10 frees, in the same cycle they are read. In a stream, each block
therefore costs exactly 10 rounds. Only the first block after reset needs a
separate 16/(W/8)-cycle loading round.

## Key schedule

**2-Sbox core** (`aes_key_expansion`). The round key is produced in the same
byte order in which it is consumed, overwriting the 16-byte key register in
place:

```
k_j[i] = k_{j-1}[i] ^ S(k_{j-1}[12 + (i+1) mod 4]) ^ (i==0 ? Rcon(j) : 0)   i = 0..3
k_j[i] = k_{j-1}[i] ^ k_j[i-4]                                              i = 4..15
```

* Bytes 12..15 of the old key are still in the register when bytes 0..3
  need them.
* `k_j[i-4]` comes from a 4-byte register holding the four newest key bytes.
  At W = 64 it comes instead from a lane of the same cycle.
* The key Sbox is busy only for the first four byte positions of a round.
  There are min(W/8, 4) key Sboxes.
* During round 10 the register takes the next block's `key_in` instead of
  `k10`, while `k10` still reaches the output XOR.

`aes_rcon` computes the round constant from the round index with a few gates
rather than a table: `x^(j-1)` in GF(2^8), which gives 01..80, 1b, 36.

**1-Sbox core** (`aes1_key_expansion`). The key register does not change
while the 16 data bytes of a round are processed, so the datapath can pick
any key byte. In the four key cycles that end round `j`, the shared Sbox
substitutes `RotWord` of the last key word, one byte per cycle. In the fourth
cycle the whole of `k_j` is formed at once.

## Timing and control

Both controllers are a counter plus comparators plus a little logic.

| core | counter | phases | cycles per block |
|---|---|---|---|
| 2-Sbox, W bits | CNT = {round, step}. The round (upper half) also drives Rcon. | round 0: load (first block only); rounds 1..10: 16/(W/8) cycles each; round 10 is followed by round 1 | 160·8/W (160, 80, 40, 20) |
| 1-Sbox | `r_in`, `CNT` | r_in = 0: 16-cycle I/O phase; r_in = 1..10: CNT 0..15 data (Sel = 00), CNT 16..19 key (Sel = 10) | 216 |

**2-Sbox interface.** After reset with `start_in = 1`, the core takes the
plaintext and key on `data_in`/`key_in` for 16/(W/8) cycles while
`in_ready = 1`. Bytes arrive in FIPS-197 order, with byte 0 in the top bits
of the bus. The first ciphertext appears `out_valid = 1` exactly 160·8/W
cycles after the first input cycle. During those output cycles `in_ready` is
also 1, and the core takes the next block. A new ciphertext then follows
every 160·8/W cycles.

**1-Sbox interface.** `in_ready` is 1 during the 16-cycle I/O phase. In every
I/O phase except the first after reset, `out_valid` is also 1, and the
previous block's ciphertext leaves byte by byte while the next block enters.
The control table for `Sel` is:

| r_in | CNT | Sel(1:0) | Sbox serves |
|---|---|---|---|
| > 0 | 0..15 | 00 | state byte ^ key byte |
| > 0 | 16..19 | 10 | key expansion |
| 0 | 0..15 | 01 | idle (I/O phase) |

## Clock gating and reset

`aes_clk_gate` makes `clk = start_in ? clk_aes : 1`. While `start_in = 0`
the core's registers see no edges, so it consumes only leakage power, and it
resumes where it stopped. The testbenches pause both cores in the middle of a
block to show this. The environment must change `start_in` only while
`clk_aes` is high, so that the gate cannot glitch. In a standard-cell flow,
replace the multiplexer with an integrated clock-gating cell.

`rst_n` is an asynchronous, active-low reset that clears every register. It
does not need the clock. In simulation it must actually fall, because a
reset held low from time zero triggers no `negedge`. To start a fresh
sequence, for example after abandoning a stream, pulse `rst_n`.

## Composite-field Sbox

`aes_sbox` computes SubBytes without a table. It works in three steps:

1. It maps the byte into the tower field GF(((2^2)^2)^2), defined by
   `x^2 = x+1`, `y^2 = y+x` and `z^2 = z + x*y`.
2. It inverts there:
   `(a1 z + a0)^-1 = (a1 d^-1) z + (a0+a1) d^-1`, with
   `d = a1^2 λ + a1 a0 + a0^2`. This needs only GF(2^4) multipliers and one
   GF(2^4) inverse, which is itself built the same way from GF(2^2).
3. It maps the result back, with the AES affine transform merged into the
   inverse basis change.

The two 8x8 bit matrices (`IN_MAP`, `OUT_MAP`) follow from the choice of
tower constants. A root β of the AES polynomial `x^8+x^4+x^3+x+1` is found in
the tower field, and column `i` of the forward map is `β^i`. If you change
the constants in `aes_pkg`, re-derive the matrices the same way.
`tb_aes_sbox` checks all 256 inputs.

## Differences from the published architecture

* **Key XOR position.** The paper's figure XORs the round key into the
  state on its way from the shift register to ShiftRows. Here AddRoundKey
  happens when a column is written back, so the 2-Sbox key schedule can run
  in place, in consumption order. The 1-Sbox core keeps the key XOR in front
  of the Sbox, as published.
* **State register.** The published shift register is four rows of
  registers chained serially. Here the rows are addressed slots with the
  epoch rotation described above. The 4-row organisation and the two write
  paths (E1 from the input, E2 from MixColumns) are kept.
* **1-Sbox cycle count.** The paper reports 210 cycles per block, with
  `r_in` running 0..9. This core uses 16 + 10·20 = 216 cycles, with `r_in`
  running 0..10, where 0 is the I/O phase. The plaintext is stored without
  passing through the Sbox. The `Sel = others` code of the I/O phase
  therefore leaves the Sbox idle instead of feeding it `data_in ^ key_in`.
* **1-Sbox ShiftRows.** ShiftRows is done by the read selector instead of a
  unit after the Sbox.
* **Streaming and first block.** The 2-Sbox core's 160 cycles per block
  hold in a stream. The first block after reset needs one extra loading
  round, 176 cycles in total at W = 8.
* **Chosen by this design.** The paper does not specify the handshake
  signals, the bus byte order, the reset and the number of key Sboxes for
  W > 8. They were chosen here.

The power, area and frequency figures reported for the chip (65 nm SOTB,
0.55 V: 0.40 µW/MHz, 2.6 kGE and 130.9 MHz for the 8-bit 2-Sbox core) belong
to the silicon implementation. This RTL says nothing about them.

## Files

| file | role |
|---|---|
| `rtl/aes_top.sv` | both cores side by side |
| `rtl/aes_core_2sbox.sv` | 2-Sbox core, parameter `W` (8/16/32/64) and `N` (MixColumns width, 32 or 64) |
| `rtl/aes_core_1sbox.sv` | 1-Sbox 8-bit core |
| `rtl/aes_controller.sv`, `rtl/aes1_controller.sv` | counter-based controllers |
| `rtl/aes_key_expansion.sv`, `rtl/aes1_key_expansion.sv` | key schedules |
| `rtl/aes_state_reg.sv`, `rtl/aes_shift_row.sv` | state store with epoch addressing, and the ShiftRows read selector |
| `rtl/aes_mixcolumns.sv`, `rtl/aes_sbox.sv`, `rtl/aes_rcon.sv` | round functions |
| `rtl/aes_clk_gate.sv` | start_in clock gate |
| `rtl/aes_pkg.sv` | shared types, GF(2^8) and tower-field arithmetic |
| `tb/aes_ref_pkg.sv` | behavioural reference AES-128 used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For example,
the end-to-end test of both cores at the default parameters:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_top.sv --top-module tb_aes_top
./obj_dir/Vtb_aes_top
```

Replace `tb_aes_top` with any other `tb/tb_*.sv` to run that test.

What the tests cover:

* `tb_aes_top` streams six blocks through each core. The first block is the
  FIPS-197 example (plaintext `00112233…`, key `000102…`, ciphertext
  `69c4e0d8…`); the others are random. The test checks each ciphertext
  against the reference model and checks the block times of 160 and 216
  cycles. It counts each mechanism and fails if any never occurred: clock
  pauses, overlapped loading, Sbox lending, and I/O swaps.
* `tb_aes_core_2sbox` runs all four datapath widths and checks the 160, 80,
  40 and 20-cycle block times.
* The unit tests check the Sbox exhaustively, and check MixColumns, the
  store mapping, the ShiftRows selector, both key schedules against the
  FIPS-197 key expansion, both controllers cycle by cycle, and the clock
  gate.
