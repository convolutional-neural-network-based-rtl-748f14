# CIS: an AES-128 processor with a separate round-key generator

This is a small AES-128 encryption/decryption processor, called the
crypt-intelligent system (CIS) after the article it is based on, *"Convolutional
neural network based key generation for security of data through encryption
with advanced encryption standard"*. Its main idea is to take the key expansion
out of the cipher. A separate key generator turns the 128-bit cipher key into
all eleven round keys at once. It writes them into a block RAM, and the cipher
then takes one key per round. The cipher itself runs one round per clock, on a
datapath in which SubBytes and MixColumns are folded into four small tables,
G0 to G3, whose products are formed with GF(2^8) logarithms.

In the article the key generator is a trained convolutional neural network
(CNN). The network was trained to reproduce the standard AES key schedule. Its
layers and weights are not published, so this RTL has no network. Its key
generator computes the schedule the network was trained on, exactly. Every
ciphertext is therefore standard AES-128 and matches the FIPS-197 test vectors.

## Structure

```
             key_i ──► control_unit ──kg_start──► keygen ──RotWord bytes──► memory_unit
                        │  FSM                      │  ◄──S-box bytes──────  RAM0 512x8 (S-box, log)
                        │  RAM1 port muxes  ◄───────┘ writes rk0..rk10 ───►  RAM1 512x8 (round keys)
                        │  round-key bank (11 x 128) ◄──── fetch, 2 bytes/clk ──┘
 din_i, mode_i ───────► │
                        └─ start, rk[rk_idx] ──► aes_core ──► dout_o
                                                  ├─ aes_round     (16 x g_table)
                                                  └─ aes_inv_round
```

| module          | role |
|-----------------|------|
| `cis_top`       | wires the four units together; the only module a user needs |
| `keygen`        | makes rk0..rk10 from the cipher key, writes them into RAM1 |
| `memory_unit`   | RAM0 (S-box at 0..255, log table at 256..511) and RAM1 (round keys) |
| `dp_ram`        | 512 x 8 true dual-port RAM with a synchronous read |
| `control_unit`  | FSM, RAM1 port multiplexers, round-key bank, handshakes |
| `aes_core`      | round counter and state register; one round per clock |
| `aes_round`     | one encryption round built from 16 `g_table` lookups |
| `g_table`       | G0..G3 for one byte |
| `aes_inv_round` | one decryption round |
| `cis_pkg`       | types, AES constants, the table builders |

## The G-table round

An ordinary AES encryption round applies SubBytes (SB), ShiftRows (SR),
MixColumns (MC) and AddRoundKey. The state is a 4x4 byte matrix, d15..d0. In
this RTL, d15 is bits [127:120] of the block and sits in row 0, column 0. d0 is
bits [7:0], in row 3, column 3. This is the usual FIPS-197 order.

MixColumns multiplies each column by constants 01, 02 and 03, and the S-box
sits in front of it. The round is therefore written in terms of four tables per
input byte `a`:

```
G0(a) = G1(a) = SB(a)
G2(a) = alog[(log[02] + log[SB(a)]) mod 255]     = {02}·SB(a)
G3(a) = alog[(log[03] + log[SB(a)]) mod 255]     = {03}·SB(a)
```

Here `log` and `alog` are the logarithm and antilogarithm tables of GF(2^8),
with generator {03}. A zero S-box output gives zero, because log(0) is
undefined. ShiftRows costs nothing: it only decides which input byte feeds
which output column. Each output byte is then the XOR of four table outputs
and one round-key byte. The first column is:

```
H15 = G2(d15) ^ G3(d10) ^ G1(d5)  ^ G0(d0)  ^ rk15
H14 = G0(d15) ^ G2(d10) ^ G3(d5)  ^ G1(d0)  ^ rk14
H13 = G1(d15) ^ G0(d10) ^ G2(d5)  ^ G3(d0)  ^ rk13
H12 = G3(d15) ^ G1(d10) ^ G0(d5)  ^ G2(d0)  ^ rk12
```

The other columns take the next diagonal of the state: (d11, d6, d1, d12),
(d7, d2, d13, d8) and (d3, d14, d9, d4). In `aes_round` the pattern is a
loop: output row r, column c, takes input row j from column (c + j) mod 4,
through table `tsel(r, j)`. The last round leaves out MixColumns, so each
output byte is just G0 of the shifted byte XOR the key byte.

Each of the 16 `g_table` instances holds its own S-box, log and antilog
ROMs. They are computed at elaboration by the constant functions in
`cis_pkg`, so there are no data files. An FPGA tool maps them to LUTs or to
ROM.

Decryption (`aes_inv_round`) is the plain inverse cipher:
InvShiftRows (row r rotated right by r), the inverse S-box, the round-key
XOR, then InvMixColumns with the constants 0e, 0b, 0d, 09. The constant
products are built from xtime chains, not tables. The first key addition
uses rk10 and the rounds then take rk9 down to rk0.

## Round keys: generation, storage, fetch

`keygen` computes, for rounds 1 to 10,

```
w0' = w0 ^ SubWord(RotWord(w3)) ^ rcon,   w1' = w1 ^ w0',   w2' = w2 ^ w1',   w3' = w3 ^ w2'
```

Here rcon = {01}, {02}, {04} … {1b}, {36} in the top byte. Its four S-box
lookups go through the two ports of RAM0, two per clock. Each key, rk0 first,
is written into RAM1 two bytes per clock. Key i goes at bytes 16·i to
16·i+15, most significant byte first. One pass takes 8 write clocks per key
and 3 lookup clocks between keys: 119 clocks for all eleven.

Two 8-bit ports cannot deliver a 128-bit key every clock, which a
one-round-per-clock cipher needs. So `control_unit` reads the 176 bytes back
once (89 clocks) into a bank of eleven 128-bit registers. The cipher reads
that bank through a multiplexer. This bank is a choice of this
implementation; the article only says the control unit uses the stored keys
"at specific moments".

## Timing and handshakes

All of `cis_top`'s interfaces are valid/ready pairs. A transfer happens on a
rising edge where both signals are high. Reset is synchronous and active low
(`rst_ni`).

| event | clocks |
|-------|--------|
| key accepted → `keys_loaded_o` high | 209 (120 generation, 89 fetch) |
| block accepted → `dout_valid_o` | 11 |
| block to block, offered back to back | 12 |

A block cycle is 1 clock for the first key addition, 10 round clocks and 1
clock with the result on `dout_o`. The design stalls blocks in three cases:

- blocks offered before a key or during a key load wait (`din_ready_o` low);
- blocks wait while the cipher unit is busy;
- a key offered in the same clock as a block is taken first.

A new key can be loaded between blocks. `mode_i` (0 = encrypt, 1 = decrypt)
travels with each block, so consecutive blocks may switch direction.

At 12 clocks per 128-bit block, throughput is 10.67 bits per clock. At the
377.3 MHz the article reports for its FPGA build, that would be about
4.0 Gbit/s. No timing closure has been done on this RTL.

## Where this RTL departs from the article, and why

- **No neural network.** The CNN's layer sizes, number format and weights are
  not published. `keygen` produces the keys the network was trained to
  imitate, by the exact recurrence. A trained network with a small error rate
  could give different keys; this one cannot.
- **Clocks per block.** The article says one round per clock and 12 clocks
  per block. Its throughput figure (965.88 Mbit/s at 377.301 MHz) works out
  to 50 clocks per block. The RTL follows the 12-clock description.
- **Tables.** The article keeps the S-box and the logarithm tables in RAM0.
  Here RAM0 does hold the S-box and the log table, and the key generator reads
  the S-box from it. But the 16 lookups of a one-clock round are served by ROM
  copies inside the G tables. The antilog table would not fit in RAM0 next to
  the other two, so it exists only as ROM.
- **Memory contents.** The article also mentions data and 32-bit instruction
  words in 512 x 8 RAMs. No instruction set is described, so the control unit
  is a fixed FSM and the RAMs hold only tables and keys.
- **RAM1 holds rk0 too**, so that every key the cipher uses comes from the
  RAM.
- **Decryption.** The article describes the inverse cipher but reports
  results for encryption only. Its inverse MixColumns polynomial is the
  standard AES one.
- Handshakes, reset, the RAM1 layout and the key-over-block priority are this
  implementation's own choices.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The expected values come
from `tb/aes_ref_pkg.sv`, a separate AES model: shift-and-add field products,
inverse by search, bitwise affine map. It shares no code with the RTL.

| testbench | what it checks |
|-----------|----------------|
| `tb_g_table` | all 256 inputs of G0..G3 |
| `tb_aes_round`, `tb_aes_inv_round` | FIPS-197 App. B intermediate states, 200 random rounds each |
| `tb_aes_core` | FIPS-197 B and C.1 both ways, the state after the first key addition, random blocks, 11-clock latency, 12-clock spacing |
| `tb_dp_ram`, `tb_memory_unit` | RAM0 image, both ports, read-before-write, collisions |
| `tb_keygen` | every key on the stream and every byte in RAM1, 119-clock duration |
| `tb_control_unit` | handshakes in every state, 209-clock key load, bank contents |
| `tb_cis_top` | end to end at the default (and only) configuration: FIPS-197 vectors, random keys and blocks in both directions; counts every stall case, key reloads and direction switches, and fails if one never happens |

To run one with Verilator 5 (from the directory that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/cis_pkg.sv tb/aes_ref_pkg.sv tb/tb_cis_top.sv --top-module tb_cis_top
./obj_dir/Vtb_cis_top
```

The simulator has two states, so every register the logic reads has a reset
or an initial value. The RAMs start from their initial image. To change the
RAM sizes, set `DEPTH`/`WIDTH` on `memory_unit`; the AES constants are in
`cis_pkg`.
