// aes_sub_bytes -- SubBytes / InvSubBytes on the 128-bit AES state.
//
// Each of the 16 bytes is replaced through the FIPS-197 S-box (inv = 0) or its
// inverse (inv = 1). Both 256-entry tables are constants computed at
// elaboration by aes_pkg (GF(2^8) inverse plus affine map), so each lookup is a
// ROM. The step itself follows the RPFL proposal; the table construction is the
// standard one. Purely combinational.
module aes_sub_bytes
  import aes_pkg::*;
(
  input  state_t state_in,
  input  logic   inv,
  output state_t state_out
);

  localparam sbox_t SBOX     = gen_sbox();
  localparam sbox_t INV_SBOX = gen_inv_sbox();

  always_comb begin
    for (int n = 0; n < 16; n++) begin
      state_out[127 - 8*n -: 8] = inv ? INV_SBOX[state_in[127 - 8*n -: 8]]
                                      : SBOX[state_in[127 - 8*n -: 8]];
    end
  end

endmodule
