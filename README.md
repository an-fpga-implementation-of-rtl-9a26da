# ZUC stream cipher on an FPGA: one 32-bit keystream word per clock

ZUC is the word-oriented stream cipher behind the LTE confidentiality and
integrity algorithms 128-EEA3 and 128-EIA3. It takes a 128-bit key and a 128-bit
IV and produces a stream of 32-bit keystream words. The data is encrypted by
XORing it with that keystream.

This RTL builds the cipher so that every clock cycle completes a whole round:
the LFSR update, bit reorganisation and the nonlinear function all fit in one
cycle. After a 35-cycle start-up the generator delivers 32 bits per clock. At
65 MHz that is 2.08 Gbit/s.

Around the generator sits a small demonstration system: the FPGA board is
connected to a PC by a serial line. The PC sends a key, an IV and then
plaintext bytes. The board sends each byte back encrypted, so the result can be
watched in a terminal program.

```
 PC --serial--> uart_rx -> zuc_host_ctrl --key/IV/start--> zuc_core
                                 |                            | 32-bit words
                                 +--data bytes--> zuc_stream_xor <+
 PC <--serial-- uart_tx <--------------ciphertext bytes--+
```

## The three layers and how one round fits in a cycle

The cipher state is sixteen 31-bit cells `s0..s15` (the LFSR) and two 32-bit
registers `R1`, `R2` (the memory of the nonlinear function F). One round works
as follows:

1. **Bit reorganisation** takes 16-bit halves of eight cells and concatenates
   them into four words. H means bits 30..15 of a cell and L means bits 15..0:
   `X0 = s15H‖s14L`, `X1 = s11L‖s9H`, `X2 = s7L‖s5H`, `X3 = s2L‖s0H`.
   In hardware this is wiring only.
2. **F** computes the following, where `+` is addition modulo 2^32:
   - `W = (X0 ^ R1) + R2`
   - `W1 = R1 + X1`
   - `W2 = R2 ^ X2`
   - then it updates `R1 = S(L1(W1L‖W2H))` and `R2 = S(L2(W2L‖W1H))`.
3. **The LFSR** computes a new cell
   `s16 = 2^15·s15 + 2^17·s13 + 2^21·s10 + 2^20·s4 + (1+2^8)·s0  mod (2^31−1)`.
   During initialisation it also adds `u = W >> 1`. An `s16` of 0 is replaced by
   2^31−1. Then the register shifts by one cell.

In the working stage the keystream word is `Z = W ^ X3`.

All three steps depend only on the current register contents. So they are
evaluated together as one combinational cloud, and all 16 cells and R1/R2 are
written at the same clock edge. The longest path is through F during
initialisation: a 32-bit adder for W, then the LFSR adder tree, whose last
level takes `u`.

### Arithmetic modulo 2^31−1 (`zuc_lfsr`, `zuc_pkg`)

This is the least obvious part of the design, and it needs no multipliers:

- **Multiplying by 2^k** modulo 2^31−1 is a 31-bit left rotation by k, because
  2^31 ≡ 1. `rol31()` does this, so the five weighted terms are free rewiring
  of the cells.
- **Addition** modulo 2^31−1 is a 32-bit add whose carry out is added back in
  at bit 0 (end-around carry). `add_mod31()` does this. The result can be
  2^31−1, the second encoding of zero. That is harmless, since the final
  `s16 = 0 → 2^31−1` rule maps both encodings to the same cell value.
- **The adder tree** has three levels: `(t15+t13) + (t10+t4)` and
  `(t0·2^8 + s0) [+ u]`, then one final sum. The `u` term is added only in
  initialisation mode.

### S-boxes and linear transforms (`zuc_sbox`, `zuc_linear`, `zuc_pkg`)

S is built from two 8×8 boxes, `S = (S0, S1, S0, S1)`. The most significant
byte goes through S0.

- **S0** is the specification's 256-entry table, held in `zuc_pkg`.
- **S1** is not stored as numbers. The package computes it at elaboration time
  from its algebraic form, `S1(x) = A·x⁻¹ ⊕ 0x55` in GF(2^8) modulo
  x^8+x^7+x^3+x+1, with 0⁻¹ = 0. The columns of the 8×8 bit matrix `A` are
  `97 3E 6D CB EE DD BB 77` (hex, column i is the image of bit i). This gives
  the specification's S1 table.
- Both tables become small ROMs. On an FPGA these are LUT ROMs. A synthesis
  tool may also merge the R1/R2 registers into the ROMs as a registered read.
- **L1 and L2** are XORs of four 32-bit rotations of the input:
  - `L1(X) = X ⊕ X⋘2 ⊕ X⋘10 ⊕ X⋘18 ⊕ X⋘24`
  - `L2(X) = X ⊕ X⋘8 ⊕ X⋘14 ⊕ X⋘22 ⊕ X⋘30`

## Start-up, stalls and timing (`zuc_ctrl`, `zuc_core`)

| cycle after `start` | state | action |
|---|---|---|
| 1 | LOAD | key loading writes `s_i = k_i ‖ d_i ‖ iv_i` into the LFSR and clears R1, R2 |
| 2 … 33 | INIT | 32 rounds in initialisation mode, feeding `W >> 1` back into the LFSR |
| 34 | DROP | one working-mode round whose output is thrown away |
| 35 … | RUN | `ks_valid` = 1; a round on every cycle with `ks_ready` = 1 |

- **Key loading:** `k_i` and `iv_i` are byte i of the key and IV, with byte 0
  in bits 127:120. `d_i` are the specification's 15-bit constants.
- **Holding `key` and `iv`:** both must stay stable in the `start` cycle and
  the cycle after it.
- **Stalls:** a low `ks_ready` freezes the whole state, so the word on
  `ks_word` stays put. An assertion in `zuc_core` checks this.
- **Restart:** a new `start` restarts from LOAD in any state.

## The board-level system (`zuc_fpga_top`)

The serial line uses 8N1 framing at `BAUD` (default 115200). The bit period is
`round(CLK_HZ / BAUD)` clocks, which is 564 at 65 MHz.

**Protocol after reset:**

- The first 16 bytes received are the key, starting with byte 0.
- The next 16 bytes are the IV. The last IV byte starts the generator and
  raises `keyed`.
- Every later byte is XORed with the next keystream byte and sent back. The
  keystream bytes come most significant byte first, as in 128-EEA3.
- Decryption is the same operation: send the ciphertext after the same key and
  IV, and the plaintext comes back.
- A new key needs a reset.

**Buffering:**

- `zuc_stream_xor` holds one keystream word and asks for the next only when
  its four bytes are used up. The generator therefore spends nearly all its
  time stalled in this system.
- `zuc_host_ctrl` holds one received byte until the transmitter can take it.
  At the line rate this always suffices.
- If a sender runs faster than the line rate, the byte register overflows. The
  byte is dropped and the sticky `overrun` output is set.

**Top ports:**

- `clk` and `rst_n` (synchronous, active low).
- `uart_rxd` and `uart_txd`.
- Status outputs: `keyed`, `busy` (initialising) and `overrun`.

## Where this design follows its source and where it chooses

**Follows the published design:**

- The layer structure.
- The 16×31-bit LFSR with its two modes and the zero rule.
- Bit reorganisation, with the note that it merges with F into one clock cycle.
- F with R1/R2.
- S = (S0, S1, S0, S1).
- One keystream word per clock cycle.
- 65 MHz with 2.08 Gbit/s.
- The PC ↔ board encryption setup.

**Taken from the ZUC specification,** because the source only refers to it:

- The S0/S1 contents.
- L1/L2.
- The key-loading constants.
- The 32 initialisation rounds and the discarded round.

F uses `W1 = R1 + X1`, as in the specification. Read literally, the source
also writes `W1 = R1 + R2`. That version does not produce the standard
keystream.

**Choices of this design:**

- The valid/ready handshakes and the FSM.
- The single-cycle (not pipelined) LFSR adder tree.
- The serial framing, baud rate and byte protocol.
- The one-byte buffering with the overrun flag.
- Synchronous active-low reset.

The source also mentions variants that are not built here:

- S-box area reuse.
- A carry-save adder tree.
- A deeper pipelined design aimed at 7.1 Gbit/s.

No timing or area results are claimed for this RTL. Whether one round closes
at 65 MHz depends on the device and tools. The source reports its design on a
Xilinx Spartan-3. This RTL uses no vendor primitives.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`. Expected values come from `tb/zuc_ref_pkg.sv`,
a software-style model written differently from the RTL:

- It uses 64-bit sums and `%` for the LFSR, and shifts on 64-bit values for
  the rotations.
- It finds S1 by a brute-force inverse search.
- It shares only the S0 table with the RTL.

| testbench | what it establishes |
|---|---|
| `tb_zuc_core` | published test vectors (key = IV = 0 → `27bede74 018082da`; key = IV = all ones → `0657cfa0 7096398b`); random keys against the model; first word exactly 35 cycles after `start`; 64 words in 64 cycles; random stalls; restart mid-stream |
| `tb_zuc_lfsr` | both modes against `%` arithmetic, including cells equal to 2^31−1; the `s16 = 0 → 2^31−1` rule |
| `tb_zuc_nonlinear_f` | bit reorganisation, W, Z and the R1/R2 sequence; clear and hold |
| `tb_zuc_sbox`, `tb_zuc_linear` | table spot values, the permutation property, all S1 entries; L1/L2 bit by bit |
| `tb_zuc_ctrl` | 1 load, 32 init, 1 discarded round; steps follow `ks_ready` |
| `tb_uart_rx`, `tb_uart_tx`, `tb_zuc_stream_xor`, `tb_zuc_host_ctrl` | serial framing, glitch rejection, byte order, key/IV collection, overrun |
| `tb_zuc_fpga_top` | whole system at its default parameters (65 MHz, 115200 baud): the test-vector bytes over the serial line, random plaintext against the model, decryption after reset, and overrun under a too-fast sender; it counts key loads, init rounds, discarded rounds, stalls, words, bytes and overruns, and requires each at least once |

## Simulating

All testbenches run with plain Verilator 5, for example:

```
verilator --binary --timing --assert --top-module tb_zuc_core \
  -y rtl -y tb +libext+.sv rtl/zuc_pkg.sv tb/zuc_ref_pkg.sv tb/tb_zuc_core.sv
./obj_dir/Vtb_zuc_core
```

- **Other testbenches:** replace `tb_zuc_core` with the testbench's name.
- **Serial tests:** `tb_uart_rx` and `tb_zuc_fpga_top` also need
  `tb/uart_line_pkg.sv` ahead of the testbench on the command line.
- **Run time:** the full-system test simulates about 1.5 million cycles and
  runs in seconds.
- **Another board clock or baud rate:** set `CLK_HZ` and `BAUD` on
  `zuc_fpga_top`.
- **Bare generator:** `zuc_core` is a self-contained keystream generator with a
  valid/ready output, and can be used on its own.

## Files

| file | content |
|---|---|
| `rtl/zuc_pkg.sv` | types, S0 table, S1 generator, key-loading constants and function, mod 2^31−1 helpers |
| `rtl/zuc_lfsr.sv` | 16×31-bit LFSR, both modes, one round per cycle |
| `rtl/zuc_nonlinear_f.sv` | bit reorganisation + F + R1/R2, outputs W and Z |
| `rtl/zuc_sbox.sv`, `rtl/zuc_linear.sv` | S and L1/L2 |
| `rtl/zuc_ctrl.sv`, `rtl/zuc_core.sv` | sequencer and keystream generator |
| `rtl/zuc_stream_xor.sv` | keystream-to-byte XOR combiner |
| `rtl/zuc_host_ctrl.sv`, `rtl/uart_rx.sv`, `rtl/uart_tx.sv` | serial byte protocol |
| `rtl/zuc_fpga_top.sv` | board top |
