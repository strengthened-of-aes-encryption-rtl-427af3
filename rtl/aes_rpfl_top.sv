// aes_rpfl_top -- AES-128 engine hardened against differential power analysis
// by Random Power Fixed Logic (RPFL) exclusive-OR gates in AddRoundKey.
//
// Every bit of every AddRoundKey operation is computed by an RPFL cell, a
// static CMOS XOR whose transistor networks are switched between an AOI and an
// OAI arrangement by a random select bit. The logic result is unchanged, but
// the current drawn when the key meets the data varies at random, which lowers
// the correlation between power and key that a DPA attack relies on. The
// select bits come from per-column generators that mix a free-running LFSR with
// the data entering AddRoundKey.
//
// Blocks: aes_key_expand (key schedule into an 11-entry store) and aes_core
// (one round per clock: SubBytes, ShiftRows, MixColumns and the protected
// AddRoundKey, with the inverse steps for decryption).
//
// Usage and timing: pulse key_load with key_in; key_ready rises 10 cycles later
// and stays high until the next key_load. Then pulse start with block_in and
// decrypt (0 = encrypt, 1 = decrypt); start is ignored while busy or while the
// key is not ready. done pulses 11 cycles after start with block_out valid;
// block_out holds until the next result. Asynchronous active-low reset.
// The use of RPFL cells for the key injection follows the RPFL proposal; the AES-128
// choice, the iterative structure and this interface are this design's own.
module aes_rpfl_top
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   key_load,
  input  state_t key_in,
  output logic   key_ready,
  input  logic   start,
  input  logic   decrypt,
  input  state_t block_in,
  output state_t block_out,
  output logic   busy,
  output logic   done
);

  round_t rk_addr;
  state_t rk_data;
  // Random topology bits: observable in simulation, deliberately left without
  // a load and never brought to a pin, since exposing them would hand the
  // mask to an attacker (hence the lint note on an unused signal).
  state_t ark_r;

  aes_key_expand u_keys (
    .clk      (clk),
    .rst_n    (rst_n),
    .key_load (key_load),
    .key_in   (key_in),
    .ready    (key_ready),
    .rk_addr  (rk_addr),
    .rk_data  (rk_data)
  );

  aes_core u_core (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start && key_ready && !key_load),
    .decrypt   (decrypt),
    .block_in  (block_in),
    .rk_addr   (rk_addr),
    .rk_data   (rk_data),
    .block_out (block_out),
    .busy      (busy),
    .done      (done),
    .ark_r     (ark_r)
  );

endmodule
