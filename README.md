# Grain-128AEAD, 64-way unrolled

This is synthesizable SystemVerilog for the Grain-128AEAD authenticated stream
cipher. The core advances the cipher N bit-steps per clock: N = 64 by default, and
any power of two from 1 to 64 can be chosen. N = 1 is the bit-serial version. At N = 64 it produces 32 keystream
bits per clock and authenticates 32 message bits per clock. It reaches this by
unrolling the feedback functions past the point where plain parallel copies stop
working: copy 32 and later copies feed on bits that earlier copies make in the
same clock.

Two more structures support the speed:
- A register stage cuts the pre-output function off from the authentication
  logic.
- A controller built from a thermometer shift register and a clock divider
  replaces the state machine. A state machine with a counter is also included
  as an option.

## The cipher in hardware terms

The state is two 128-bit registers, an NFSR `b` and an LFSR `s`. Bit 0 is the
oldest bit, the one that leaves next. In the formulas below, `+` is XOR.

    f = s0 + s7 + s38 + s70 + s81 + s96
    g = s0 + b0 + b26 + b56 + b91 + b96 + b3b67 + b11b13 + b17b18 + b27b59
        + b40b48 + b61b65 + b68b84 + b88b92b93b95 + b70b78b82 + b22b24b25
    y = b12s8 + s13s20 + b95s42 + s60s79 + b12b95s94 + s93
        + b2 + b15 + b36 + b45 + b64 + b73 + b89

Each bit-step shifts `f` into the LFSR and `g` into the NFSR. One run, counted
in bit-steps after a start:

| phase | bit-steps | what enters the registers | where y goes |
|---|---|---|---|
| loading | 128 | key into the NFSR; IV, then 31 ones and a zero, into the LFSR | nowhere |
| initialisation | 256 | `f + y` and `g + y` | fed back |
| accumulator loading | 128 | `f + key bit`, `g`: the key is added a second time | the first 64 bits become the accumulator, the next 64 the shift register |
| normal | any | `f`, `g` | even bits are keystream, odd bits are MAC bits |

In normal operation, message bit `i` is XORed with keystream bit `z_i = y(384+2i)`.
Authentication then works bit by bit:
- If the plaintext bit is 1, the 64-bit shift register is XORed into the 64-bit
  accumulator.
- The shift register then takes in the next MAC bit, `y(384+2i+1)`.

After the whole message, the accumulator is the tag. The message must end with a
single padding bit of value one.

## Unrolling to 64 (`grain_unrolled`)

Copy `k` of `f`, `g` and `y` works on the register window moved `k` steps ahead.
The highest tap is at offset 96, so with up to 32 copies every window lies
inside the current registers. For copy `k >= 32`, window bit `j` with
`k + j >= 128` is the new bit made by copy `k + j - 128` in the same clock.
Bit 96 of copy 32, for example, is the output of copy 0. The chained value is
the bit that actually enters the register: the output of the load, feedback and
key muxes. Chaining is therefore correct in every phase, including
initialisation, where `y` feeds into `f` and `g`. The longest combinational path
grows past N = 32: copies 32..63 wait for copies 0..31.

The new bits are split into two output vectors, copies 0..31 (`*_lo`) and copies
32..N-1 (`*_hi`). The chained copies then read a vector that they do not write,
and lint tools see no false loop. Verilator still reports `UNOPTFLAT` once,
after it merges the vectors inside the full top level. The logic has no loop at
bit level: every chained bit depends only on copies with a lower index.

`grain_fsr` holds each 128-bit register and shifts it by N per clock with
`q <= {new bits, q[127:N]}`.

## Galois-form registers (`grain_galois_fsr`, `GALOIS = 1`, N <= 16)

In the form above, each new bit comes out of one deep XOR tree. The Galois form
splits the tree. A term of f or g is moved `d` places down the register: it is
added to the bit passing position `127 - d`, with every index lowered by `d`.
It therefore reads the same state bits, just `d` bit-steps later. Once a bit
has passed the lowest tap it holds exactly the value of the plain form, and
the f, g and y inputs all lie below that point. The keystream and tag are
therefore unchanged. Offsets are multiples of N, so a bit crosses at most one
tap per clock:

| N | LFSR taps (position: term) | NFSR: lowest tap |
|---|---|---|
| 1, 2, 4 | 127: s0 s7; 123: s38; 119: s70; 115: s81; 111: s96 | 97 (N <= 2), 99 (N = 4) |
| 8 | 127: s0 s7 s38; 119: s70; 111: s81; 103: s96 | 103 |
| 16 | 127: s0 s7 s38 s70; 111: s81 s96 | 111 |

The NFSR offsets are listed per term in `grain_galois_fsr.sv`. For N <= 2, b91
sits at 117; for N = 16, b22b24b25 sits at 111. Both are choices made here.

**The initial state.** Loading must leave the Galois image of the plain state,
not the plain state itself. Taps are therefore switched off while loading.
Each entering bit `j` gets the terms of all taps below `j` added at once. Those
terms read bits that were loaded earlier, so no extra clock is needed.
`load_pos`, the index of the first bit of the chunk, tells the block which taps
lie below `j`.

This option is off by default, because the 64-way build cannot use it: with
chained copies there is no free distance between taps.

**Splitting y as well (`YTRANS = 1`, N = 1 only).** During initialisation the
whole of y is added to the entering bits, so y sits in the feedback path. In
the bit-serial case `grain_y_transform` cuts it into three parts, each with
indices lowered by its distance from 127:

    y127 = b12 s8 + s13 s20 + b95 s42                  (added at 127)
    y126 = b11 b94 s93 + b72 + b1 + s59 s78           (added at 126)
    y125 = s91 + b87 + b13 + b34 + b43 + b62          (added at 125)

A bit entering in the last two initialisation clocks still owes its later
parts. Two flags (`init_q`) record this, so those parts are added during the
first clocks of accumulator loading. The `y` output stays the full function,
because the keystream and MAC bits need it. At the top level, `YTRANS = 1`
requires `GALOIS = 1` and `N = 1`.

## Controllers

Both controllers drive the same `ctrl_t` bundle: `load`, `init`, `accload`,
`normal` and `acc_copy`. The clock after `start_i` is clock 0. Loading covers
clocks `0 .. 128/N-1`, initialisation runs until `384/N`, accumulator loading
until `512/N`, and normal operation follows.

- **`grain_ctrl_shift`** (default, `SHIFT_CTRL = 1`). A `K`-bit divider
  (`grain_clkdiv`) ticks every `2^K` clocks. Each tick shifts a one into a
  thermometer register of `512/(2^K N)` bits. Register bits `128/(2^K N) - 1`,
  `384/(2^K N) - 1` and the last bit mark the three phase changes, so each mux
  control needs one to three register bits. `2^K N` must not exceed 128, so at
  N = 64 only K = 1 is legal, which gives a 4-bit register. The divider tick is
  used as a clock enable; there is no second clock.
- **`grain_ctrl_fsm`** (`SHIFT_CTRL = 0`). Five states (reset, load, init,
  accload, normal) with a cycle counter.

`acc_copy` fires at clock `448/N`, in the middle of accumulator loading. At that
point the shift register holds the first 64 y bits of the phase. The
accumulator, cleared at start, absorbs them through the normal update with the
message bit forced to one. No separate load path is needed. In the shift
controller this clock may fall between two shifts: at N = 64 and K = 1 it is
clock 7, while shifts happen every 2 clocks. It is therefore decoded from the
register bits together with the divider count.

## Authentication section (`auth_section`, `auth_shiftreg`, `auth_accumulator`)

In normal operation, N/2 MAC bits enter the shift register each clock. While the
registers are being filled, all N y bits enter. `auth_shiftreg` selects an N or
N/2 shift.

For P = N/2 message bits per clock, the accumulator update is:

    a_next = a  XOR  sum over k < P of  msg[k] * e[k +: 64],   e = {mac bits of this clock, r}

This is exactly P steps of the bit-serial rule. Message bit `k` sees the
register shifted by `k`, and its top bits are the MAC bits that arrive in the
same clock.

With `ISOLATE = 1` (the default when N > 2), the y word, the selected plaintext,
the controls and `last_i` are registered before the shift register and the
accumulator. This removes the y function from the accumulator path, and the tag
comes one clock later. `tag_o` stays zero until the tag is valid, so the
accumulator is never visible mid-message.

## The bit-serial version (N = 1)

With one bit-step per clock, y is a keystream bit on one clock and a MAC bit on
the next. The authentication registers must therefore move at half rate. A
one-bit `grain_clkdiv` gives the phase. It is used as a clock enable, so there
is still one clock.
- Phase 0 is a keystream clock: `msg_i` is consumed, and `msg_take_o` is high.
  The y bit, the plaintext to authenticate and `last_i` go into a holding
  register. When decrypting, that plaintext is `data_o`, so this register is
  the delay on the decrypted data.
- Phase 1 is a MAC clock: the held bit and the new y bit go as a pair to a
  two-bit authentication section (`auth_section` with N = 2). Message inputs
  are ignored on this clock.

Accumulator loading uses the same pairing: the 64-bit shift register takes two
y bits every second clock. The tag comes 2 clocks after the clock that carried
the last message bit (3 with `ISOLATE = 1`, which is off by default for N <= 2).

## Using the top level (`grain128aead_top`)

| port | dir | width | use |
|---|---|---|---|
| `start_i` | in | 1 | begin a run (any time; restarts a run in progress) |
| `key_i`, `iv_i` | in | N | chunk `j` = bits `jN .. jN+N-1`, bit `jN` on `[0]` |
| `load_o` | out | 1 | loading: present key and IV chunk `j` in the `j`-th loading clock. IV positions 96..127 are ignored and padded inside. |
| `y_flag_o` | out | 1 | accumulator loading: present the key chunks again, in the same order |
| `normal_o` | out | 1 | normal operation: message words are consumed from now on, with no gaps |
| `msg_take_o` | out | 1 | `msg_i` is consumed on this clock: every normal clock, or every second one for N = 1 |
| `msg_i`, `ce_i` | in | N/2 (1 for N = 1) | message bits (bit 0 first). `ce_i[i] = 1` encrypts or decrypts bit i; 0 passes it through (associated data, padding). |
| `cm_i` | in | 1 | 0: encrypt (`msg_i` is authenticated); 1: decrypt (`data_o` is authenticated) |
| `last_i` | in | 1 | on the word that holds the padding one; later bits of that word must be zero |
| `ks_o`, `data_o` | out | N/2 (1 for N = 1) | keystream, and `msg_i XOR (ce_i AND ks_o)`. Both are zero outside normal. |
| `tag_o`, `tag_valid_o` | out | 64, 1 | valid 2 clocks after the `last_i` clock (1 clock with `ISOLATE = 0`; one more for N = 1). Held until the next start. |

Timing at the defaults: 2 loading clocks, 4 initialisation clocks and 2
accumulator-loading clocks. Normal operation therefore starts 8 clocks after the
start clock.

Parameters: `N` (1..64, power of two), `SHIFT_CTRL`, `K` (with `2^K N <= 128`),
`ISOLATE`, `GALOIS` (N <= 16) and `YTRANS` (with `GALOIS`, N = 1). The reset `rst_n` is asynchronous and active low.

## What is not here, and where this RTL makes its own choices

- Only the bit-serial **y transform** is built, and only inside
  `grain_galois_fsr`. Two parts are missing. First, the splits for N = 2..16
  are not built. Second, the **pipelined `y`** used outside initialisation is
  not built: it would delay keystream, MAC bits and the accumulator copy by a
  clock, and the controller would have to switch between the two paths.
- Transistor-level realisations of the AND-XOR terms are outside the scope of RTL.
- This design's own choices:
  - The `last_i`/`tag_valid_o` handshake.
  - The accumulator and register freeze after the last word.
  - The per-bit `ce_i`.
  - IV padding made inside from a loading counter.
  - Registering the plaintext together with y in the isolation stage.
  - The accumulator-copy decode in the shift controller.
  - Asynchronous reset.
  - The divider used as a clock enable rather than as a clock.
  - For N = 1: the `msg_take_o` port and the pairing of y bits during
    accumulator loading.
- The message stream cannot stall. Associated-data length encoding and padding
  are the user's job; the core authenticates whatever bit stream it is given.
- Byte and bit order inside the key, IV and message follow the chunk rule above.
  No published test vector was run, so external byte-order conventions must be
  mapped onto `key_i[0]` = key bit 0 by the user.

## How far it has been checked

Every block has a self-checking testbench in `tb/`, and each testbench fails
against a deliberately broken copy of its block. The reference is
`tb/grain_ref_pkg.sv`, a bit-serial model written directly from the equations
above, one bit-step at a time.
- `grain128aead_top_tb` runs nine configurations side by side:
  - N = 64 with the shift controller
  - N = 8 with the state machine
  - N = 2 with K = 2 and no isolation
  - N = 32 with K = 2
  - N = 1, the bit-serial version
  - N = 64 with the state machine
  - N = 4 and N = 16 with Galois-form registers
  - N = 1 with Galois-form registers and the split y (`YTRANS = 1`)

  Each encrypts and then decrypts random messages with associated data. The
  testbench checks keystream, data, tag value, tag latency, phase lengths and a
  restart in mid-message.
- `grain128aead_full_tb` runs the unmodified top level the same way.
- `grain_galois_fsr_tb` drives the Galois-form registers alone at N = 16, 8, 2
  and 1, and at N = 1 with `YTRANS = 1`. It compares every y bit from
  initialisation on with the reference sequence.
- `grain_y_transform_tb` checks that the three y parts, each read one
  bit-step later than the previous one, add up to y.

## Simulating

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/grain_pkg.sv tb/grain_ref_pkg.sv tb/grain128aead_top_tb.sv \
        --top-module grain128aead_top_tb -o sim
    ./obj_dir/sim

Replace the testbench name to run any other test. Each test prints
`TB_RESULT checks=… failures=…`.
