# AES-CCM authenticated encryption on a single byte-serial AES core

This is a small AES-CCM engine. It encrypts a message and computes its
authentication tag, and it uses one AES-128 core for both jobs. That core has
an 8-bit datapath: it takes 160 clocks per block and contains only two S-boxes,
one for the data and one for the key schedule. Both S-boxes compute the
inverse in a composite field GF(((2^2)^2)^2), so no 256-entry table is needed.
Every AES operation of CCM runs on the same core, one after another, under a
small FSM:

* the CBC-MAC over B0, the associated-data blocks and the payload blocks;
* the counter-mode encryptions of CTR0 (which masks the tag) and CTR1..CTRn
  (which encrypt the payload).

The target is low-rate, low-area use such as wireless body-area network nodes,
where a few Mbit/s is enough. The architecture follows the FPGA core described
in "An Efficient FPGA Implementation of AES-CCM Authenticated Encryption IP
Core". The message formatting follows NIST SP 800-38C. Where the RTL goes
beyond what that description fixes, or departs from it, the text says so, and
the section "Departures and open points" lists every such case.

Only generation-encryption is implemented. Decryption and verification of a
received message are not.

## Using the core

`aes_ccm_top` has four parameters. Their defaults describe the reference
message: 8-byte nonce, 16 bytes of associated data (AD), 16 bytes of payload
and a 6-byte tag.

| parameter | default | meaning |
|-----------|---------|---------|
| `NLEN` | 8  | nonce bytes, 7..13 |
| `TLEN` | 6  | tag (MAC) bytes, 4, 6, .., 16 |
| `ALEN` | 16 | associated-data bytes, 0..65279 |
| `PLEN` | 16 | payload bytes, 1 or more |

Field lengths are fixed when the design is built. The core processes messages
of exactly this shape.

| port | dir | width | function |
|------|-----|-------|----------|
| `clk` | in | 1 | clock, all logic on the rising edge |
| `reset` | in | 1 | synchronous, active high |
| `load_in` | in | 1 | load strobe: one byte of every field per clock |
| `key_in`, `nonce`, `associated_data`, `payload` | in | 8 each | field bytes |
| `start_in` | in | 1 | start the encryption of the loaded message |
| `get_c` | in | 1 | take the current output byte |
| `cipher_text` | out | 8 | current output byte |
| `bit_req` | out | 1 | high while output bytes remain |

A message goes through the core in three steps.

1. **Load.** Hold `load_in` high for max(16, NLEN, ALEN, PLEN) clocks. In clock
   *i* of the burst, drive byte *i* of the key, the nonce, the AD and the
   payload on their four buses at the same time. Each field keeps only its
   first 16 / NLEN / ALEN / PLEN bytes. The byte position restarts whenever
   `load_in` is low.
2. **Start.** Pulse `start_in` for one clock. The core then works on its own.
   It ignores `start_in` and `load_in` until the message is finished.
3. **Read.** `bit_req` rises 162 × L + 3 clocks after the clock that samples
   `start_in`, where L is the number of AES loops. For the default message
   L = 6, so this is 975 clocks. `cipher_text` then shows byte 0. Each clock
   with `get_c` high moves it on by one byte. The core first gives the PLEN
   bytes of encrypted payload, then the TLEN bytes of the MAC. `bit_req` falls
   once the last byte has been taken. `get_c` can be held high or pulsed in any
   pattern.

## The CCM sequence

The number of AES loops is fixed by the parameters:
L = (1 + NA + NP) + (NP + 1). Here NA = ceil((ALEN+2)/16), or 0 if there is no
AD, and NP = ceil(PLEN/16).

* **Formatting** (`framing_format`) stores the nonce, AD and payload bytes once.
  It assembles each block with a multiplexer when that block is needed:
  * B0 holds the flags byte (Adata, (t-2)/2, q-1), the nonce, and the payload
    length in q = 15 − NLEN bytes.
  * B1..B(NA) hold a 2-byte AD length, then the AD, zero-padded to a whole
    block.
  * The following blocks hold the payload, zero-padded.
* **CBC-MAC.** The FSM (`ccm_fsm`) feeds B0 straight to the AES core. It feeds
  every later block XORed with the previous AES output. The input multiplexer
  `ccm_input_mux` does this under selects `sel1`, `sel2` and `sel3`. The last
  output is kept as the Tag.
* **Counter mode.** `ctr_gen` derives CTR0 = (q−1) ‖ nonce ‖ 0 from B0 and
  increments the q-byte counter after each loop. E(CTR0) goes into the S0
  register. Each later E(CTR_i) is XORed with payload block i−1 and written
  into the ciphertext buffer. `ccm_output_stage` does this under `sel4`.
* **MAC.** The first TLEN bytes of Tag ⊕ S0 are appended behind the payload in
  `cipher_text_buffer`.

`loop_counter` counts `done_aes` pulses. This count is the block index the FSM
uses. The FSM clears it at the start and between the two phases.

Each loop takes 162 clocks:

* one clock in which the FSM asserts `we` with the selected block on the AES
  `data` input;
* the 160-clock AES frame;
* one clock in which the FSM sees `done_aes` and stores the result.

## Inside the 8-bit AES core

`aes_core_8bit` is the part worth reading closely. It keeps the 16-byte state
and the 16-byte round key in registers. Per clock it moves exactly one byte
through one S-box, so a round takes 16 clocks and the ten rounds take 160.

In clock `pos` (0..15) of round `rnd` (1..10), the column is c = pos/4 and the
row is r = pos%4.

1. **Byte permutation.** `aes_byte_perm` selects state byte
   src = 4·((c + r) mod 4) + r. This is ShiftRows done as a read order: no data
   moves, a 16:1 byte multiplexer picks the byte.
2. **AddRoundKey.** That byte is XORed with byte `src` of round key `rnd−1`.
   Because XOR commutes with the permutation, the key can be added on the 8-bit
   path before the S-box, byte by byte.
3. **S-box 1.** The sum goes through `aes_sbox`. The result goes into a 3-byte
   column buffer, or straight on when r = 3.
4. **MixColumn.** When r = 3 the column is complete. `aes_mixcolumn` mixes it,
   and the four bytes are written into column c of the next-state buffer in
   `aes_p2s_converter`. At pos = 15 the next state becomes the current state.
   Two buffers are needed because ShiftRows reads bytes from columns that were
   already rewritten.
5. **Last round.** In round 10 MixColumn is skipped. The S-box byte is XORed
   with byte `pos` of round key 10, which the key expansion produces in that
   same clock. The result is shifted into `aes_out_shift_reg`, so after 16
   clocks `dataout_aes` holds the ciphertext.

The state register keeps MixColumn outputs *without* the round key. The key is
added when a byte is read back. The initial AddRoundKey is therefore simply the
first read: `we` loads the plaintext into the state and the cipher key into the
round-key register in parallel.

**Key expansion** (`aes_key_expansion`) is byte-serial and runs in step with
the rounds. During round `rnd`, the register `rk` holds round key rnd−1 for
random access. In clock `pos` the unit computes byte `pos` of round key `rnd`:

* for pos 0..3: rk[pos] ⊕ S(rk[12 + (pos+1) mod 4]), plus ⊕ Rcon for pos 0;
* for pos 4..15: rk[pos] ⊕ new[pos−4].

It stores that byte in a next-key register. The four SubWord bytes are needed
in four different clocks, so one S-box ("S-box 2") covers them. At pos = 15
`rk` takes the completed key.

**Timing.** `done_aes` is a one-clock pulse 160 clocks after the clock that
samples `we`. `dataout_aes` stays valid until the last round of the next
block starts shifting in new bytes, which is what the CBC chaining relies on. A `we` during a running block restarts the
core.

## The composite-field S-box

`aes_sbox` follows this chain: *lin. map → S1 → S2 → S3 → inv. lin. map*.

* `sbox_lin_map` is an 8×8 GF(2) matrix from the AES polynomial basis to a
  tower basis. This design uses normal bases at every level:
  * GF(4) = {W², W}, with W² + W + 1 = 0;
  * GF(16) = {Z⁴, Z}, with Z² + Z + N = 0 and N = W²;
  * GF(256) = {Y¹⁶, Y}, with Y² + Y + ν = 0 and ν = W·Z.

  In these bases the unit element is all ones. Squaring and inverting in GF(4)
  are both a bit swap.
* `sbox_s1` splits the byte into its halves g1 and g0 (outputs S12 and S14). It
  computes the norm S13 = (g1⊕g0)²·ν ⊕ g1·g0. A GF(16) product uses three GF(4)
  products, one of them scaled by N.
* `sbox_s2` inverts in GF(16) the same way one level down. The GF(4) inverse is
  a wire swap.
* `sbox_s3` forms the inverse (S21·g0, S21·g1).
* `sbox_inv_lin_map` maps back to the polynomial basis. The AES affine
  transform is folded into the same matrix, followed by XOR 0x63.

The arithmetic is collected in `gf_tower_pkg`.

**The two matrices.** The rows of the input map are the inverse of the matrix
whose column k is the field element of tower bit k. Bit 7 down to bit 0 are
W²Z⁴Y¹⁶, WZ⁴Y¹⁶, W²ZY¹⁶, WZY¹⁶, W²Z⁴Y, WZ⁴Y, W²ZY and WZY, each evaluated in
GF(2⁸) modulo x⁸+x⁴+x³+x+1. The roots W, Z and Y are the smallest byte values
that solve their equations. The output matrix is the affine matrix times that
basis matrix.

To use other bases, recompute the two matrices this way and change `NU` in the
package. `tb_aes_sbox` checks all 256 inputs against an S-box computed from
its definition, so a wrong matrix shows up at once.

## Departures and open points

* **Loop count.** The published description counts 5 AES loops (800 clocks) for
  the default message. Correct CCM for that message needs six encryptions:
  B0, two AD blocks (16 AD bytes plus the 2-byte length), one payload block,
  CTR0 and CTR1. The published ciphertext can only come out of all six. This
  core runs 6 × 160 clocks of AES, plus 2 control clocks per loop and 3 at the
  end.
* **Reference ciphertext.** The published test-vector table gives the sixth
  ciphertext byte as 0xae. The accompanying simulation waveform shows 0xEA, and
  0xea is the value NIST SP 800-38C Example 2 gives. The testbench expects
  0xea.
* **Input shift registers of the AES core.** The published AES core shifts data
  and key in through shift registers. Here the CCM layer already holds the
  128-bit block and key, so `we` loads both in parallel. The 160-clock frame
  therefore includes no load time. The key arrives byte-serially into
  `key_shift_reg` in the CCM layer, as in the published block diagram.
* **Block registers.** The block diagram shows B0..Bn as separate 128-bit
  registers. `framing_format` stores each input byte once and builds the blocks
  with multiplexers, which holds the same data in fewer flip-flops.
* **Control details.** The FSM states and their order (all CBC loops, then
  CTR0, then CTR1..), the 8-bit counter width, the reset (synchronous, active
  high) and the handshake meaning of `get_c` and `bit_req` are this design's
  choices. The published text names these signals but does not define them
  further.
* **Memory.** The published FPGA results list 552 bits of block RAM/ROM. This
  RTL uses flip-flops only, about 1,700 bits at the default sizes. Area and
  clock frequency of this RTL have not been measured on an FPGA.
* **Throughput.** At the published FPGA clock rates (44 to 72 MHz), the default
  16-byte message comes out at 5.6 to 9.1 Mbit/s of payload. That includes
  loading and read-out. Longer payloads approach 128 bits per 324 clocks,
  which is 17 Mbit/s at 44 MHz.
* **Not implemented:** decryption and tag verification. Variable message
  lengths at run time are not supported either, since lengths are parameters.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each testbench
prints `TB_RESULT checks=N failures=M` and has a watchdog. The reference models
are in `tb/aes_ref_pkg.sv`: a table-free AES-128, in which the S-box is x^254
followed by the affine map, and a CCM model written straight from SP 800-38C.

* `tb_aes_ccm_top` runs at the default sizes, with no parameter overrides. It
  checks the published example byte by byte against its 22-byte ciphertext,
  then three random messages against the model. It also checks:
  * the 975-clock latency;
  * the `bit_req` behaviour, with `get_c` paused;
  * that `start_in` and `load_in` are ignored while the core is busy;
  * that chained and direct loops, the Tag, S0 and ciphertext stores, the MAC
    write and the read-out each happen at least once.
* `tb_aes_ccm_top_var` uses the `tb/ccm_harness.sv` driver to run three more
  shapes: NIST SP 800-38C Examples 1 and 3, and a message with no AD, a 13-byte
  nonce, a 40-byte payload and a 16-byte tag. A fourth instance uses a 64-byte
  payload, the smallest that reaches 10 Mbit/s at 44 MHz. For every shape the
  harness checks the latency of 162 × L + 3 clocks.
* `tb_aes_core_8bit` uses the FIPS-197 vectors and random blocks. It checks that
  `done_aes` comes exactly 160 clocks after `we`.
* The S-box tests check the parts against field properties:
  * the input map is an isomorphism;
  * S2 is a GF(16) inverse;
  * S1, S2 and S3 together invert every element;
  * the S-box is checked exhaustively.

To simulate one testbench with Verilator (5.x):

```sh
verilator --binary --timing --assert -Wno-fatal --top-module tb_aes_ccm_top \
  -y rtl -y tb +libext+.sv \
  rtl/aes_pkg.sv rtl/gf_tower_pkg.sv rtl/ccm_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_ccm_top.sv
./obj_dir/Vtb_aes_ccm_top
```

List the packages first, as shown. Verilator finds the remaining modules
through `-y`. The full-size end-to-end test finishes in well under a second of
simulation time.

## Files

| file | content |
|------|---------|
| `rtl/aes_ccm_top.sv` | top level, wiring of the CCM core |
| `rtl/framing_format.sv`, `rtl/key_shift_reg.sv`, `rtl/ctr_gen.sv` | message capture, B-block formatting, key loading, counter blocks |
| `rtl/ccm_fsm.sv`, `rtl/loop_counter.sv` | controller and loop index |
| `rtl/ccm_input_mux.sv`, `rtl/ccm_output_stage.sv`, `rtl/cipher_text_buffer.sv` | AES input selection and CBC XOR; Tag/S0/ciphertext/MAC; output buffer |
| `rtl/aes_core_8bit.sv` | byte-serial AES-128 |
| `rtl/aes_p2s_converter.sv`, `rtl/aes_byte_perm.sv`, `rtl/aes_mixcolumn.sv`, `rtl/aes_key_expansion.sv`, `rtl/aes_out_shift_reg.sv` | parts of the AES core |
| `rtl/aes_sbox.sv`, `rtl/sbox_*.sv`, `rtl/gf_tower_pkg.sv` | composite-field S-box |
| `rtl/aes_pkg.sv`, `rtl/ccm_pkg.sv` | shared constants and CCM block counts |
| `tb/` | testbenches, `aes_ref_pkg` reference models, `ccm_harness` driver |
