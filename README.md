# AES-128 with a shared-inverse composite S-Box and a shared-product Inv MixColumn

This is a fully unrolled, pipelined AES-128 engine. One 128-bit block enters per clock.
`sel` = 0 encrypts it and `sel` = 1 decrypts it. The result leaves 10 clocks later.
Area is saved in two places:

* **Composite S-Box** (`composite_sbox`). One GF(2^8) multiplicative inverse, computed in
  the composite field GF((2^4)^2), serves both the S-Box and the Inv S-Box. Two
  multiplexers add the affine transform (encryption) or the inverse affine transform
  (decryption). In the inverse, squaring and multiplying by the constant lambda are merged
  into one three-XOR network (`gf4_sq_lambda`):
  `h = q2^q3, K3 = q0^q3, K2 = q1^h, K1 = h, K0 = q2`. Done separately, they cost eight XORs.
* **Inv MixColumn** (`enh_inv_mixcolumn`). Only {02}, {04} and {09} times each byte are
  formed. {0e}, {0b} and {0d} are XOR sums of these.

## The composite field, and why its mapping is unusual
The three-XOR network equals lambda·q² with lambda = {1000}. Here GF(2^4) is built as
pairs over GF(2^2): z² = z + {10}, w² = w + 1. The usual isomorphic-mapping matrices assume
lambda = {1100} and give a wrong S-Box with this network. So `gf_iso_map` uses matrices
derived for lambda = {1000}: the AES element x maps to beta = {60}, a root of
x^8+x^4+x^3+x+1 in the composite field. Each matrix row is an 8-bit mask in the file.
All 256 S-Box and Inv S-Box values are checked against FIPS-197.

## Pipelines
* `aes_enc`: initial AddRoundKey, then 10 `aes_enc_round`s, with a register after each
  round. The key schedule (`aes_key_step`) is unrolled beside the data, so every block can
  have its own key. `key_out` returns the block's round-10 key.
* `aes_dec`: takes the **round-10 key**, not the cipher key, and walks the key schedule
  backwards. Rounds are in the order Inv SubBytes, Inv ShiftRows, Inv MixColumn, then
  AddRoundKey with the round key also passed through Inv MixColumn (the equivalent
  inverse cipher). `key_out` returns the cipher key.
* `aes_top`: steers each block by `sel` and merges the two result streams. Both pipelines
  are 10 stages deep, so results stay in order. `sel_out` gives each result's direction.

Timing: a block presented with `valid_in` in clock cycle t appears with `valid_out` in
cycle t+10. There is no back-pressure. `rst_n` is synchronous, active low, and clears only
the valid bits.

## Departures and own choices
* Only AES-128 (10 rounds). 192- and 256-bit keys are not built.
* The printed MixColumns and Inv MixColumn matrices each had one wrong row. The standard
  AES matrices are used.
* The isomorphic mapping, the GF(2^4) multiplier and inverse, the key schedule, the
  pipeline registers for keys, the valid bits and the `sel` steering are this design's own
  choices.
* Worked example: key 2b7e151628aed2a6abf7158809cf4f3c, plaintext
  85fc3432abcd53210be0ac125ccdb110, ciphertext 9ba71628a7ee25e0416a7354a15b1321.
  Decryption uses round-10 key d014f9a8c9ee2589e13f0cc8b6630ca6.
* No FPGA area, delay or power figures are reproduced.

## Files and simulation
`rtl/aes_pkg.sv` holds the shared types and the ShiftRows helpers. Every module has its own
file, and each has a self-checking testbench `tb/tb_<module>.sv`. `tb/aes_tb_pkg.sv` is an
independent FIPS-197 reference model. `tb/tb_aes_top.sv` runs the full-size design with
mixed encryptions, decryptions, mode switches, bubbles and round trips. To run it:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
      rtl/aes_pkg.sv tb/aes_tb_pkg.sv tb/tb_aes_top.sv --top-module tb_aes_top
    ./obj_dir/Vtb_aes_top

Each testbench prints `TB_RESULT checks=N failures=M`.
