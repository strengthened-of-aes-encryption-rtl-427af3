// aes_shift_rows -- ShiftRows / InvShiftRows on the 128-bit AES state.
//
// Row r of the state is rotated left by r byte positions (right for inv = 1).
// Byte n lives in row n % 4, column n / 4, so the output byte at row r,
// column c is taken from column (c + r) % 4 (or (c - r) % 4 for the inverse).
// As the RPFL proposal suggests, this is routing only: no gates besides the
// direction multiplexer. Purely combinational.
module aes_shift_rows
  import aes_pkg::*;
(
  input  state_t state_in,
  input  logic   inv,
  output state_t state_out
);

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) begin
        state_out[127 - 8*(4*c + r) -: 8] =
          inv ? state_in[127 - 8*(4*((c + 4 - r) % 4) + r) -: 8]
              : state_in[127 - 8*(4*((c + r) % 4) + r) -: 8];
      end
    end
  end

endmodule
