// aes_mix_columns -- MixColumns / InvMixColumns on the 128-bit AES state.
//
// Each 4-byte column is multiplied in GF(2^8) by the fixed circulant matrix
// (02 03 01 01) for encryption, or (0e 0b 0d 09) for decryption (inv = 1), so
// every output byte depends on all four input bytes of its column. The RPFL
// proposal allows a combinational or a sequential implementation; this one is
// combinational, built from xtime() doublings.
module aes_mix_columns
  import aes_pkg::*;
(
  input  state_t state_in,
  input  logic   inv,
  output state_t state_out
);

  // Forward column mix.
  function automatic word_t mix(word_t col);
    byte_t a0 = col[31:24], a1 = col[23:16], a2 = col[15:8], a3 = col[7:0];
    byte_t t  = a0 ^ a1 ^ a2 ^ a3;
    return {a0 ^ t ^ xtime(a0 ^ a1),
            a1 ^ t ^ xtime(a1 ^ a2),
            a2 ^ t ^ xtime(a2 ^ a3),
            a3 ^ t ^ xtime(a3 ^ a0)};
  endfunction

  // Inverse mix = forward mix after a pre-step u = xtime(xtime(a0 ^ a2)),
  // v = xtime(xtime(a1 ^ a3)) folded into the column.
  function automatic word_t inv_mix(word_t col);
    byte_t a0 = col[31:24], a1 = col[23:16], a2 = col[15:8], a3 = col[7:0];
    byte_t u  = xtime(xtime(a0 ^ a2));
    byte_t v  = xtime(xtime(a1 ^ a3));
    return mix({a0 ^ u, a1 ^ v, a2 ^ u, a3 ^ v});
  endfunction

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      state_out[127 - 32*c -: 32] = inv ? inv_mix(state_in[127 - 32*c -: 32])
                                        : mix(state_in[127 - 32*c -: 32]);
    end
  end

endmodule
