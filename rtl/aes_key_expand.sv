// aes_key_expand -- AES-128 key schedule with an 11-entry round-key store.
//
// A pulse on key_load captures key_in as round key 0 and clears ready. On each
// of the next 10 cycles one further round key is derived from the previous one
// (FIPS-197: w0' = w0 ^ SubWord(RotWord(w3)) ^ Rcon, w1' = w1 ^ w0', ...) and
// written into the store; ready rises once round key 10 is written, 10 cycles
// after key_load. The store is read combinationally: rk_data = round key
// rk_addr (addresses above 10 read round key 10). The store is what lets the
// decryptor use the keys in reverse order.
// The RPFL proposal only speaks of the "sub-key" added in each round; the schedule is
// the standard one and its sequential, stored form is this design's choice.
// Reset is asynchronous and active low; key_load during expansion restarts it.
module aes_key_expand
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   key_load,
  input  state_t key_in,
  output logic   ready,
  input  round_t rk_addr,
  output state_t rk_data
);

  localparam sbox_t SBOX = gen_sbox();

  state_t rk_q [NR+1];
  state_t last_q, next_key;
  round_t rnd_q;        // index of the round key to be written next
  logic   run_q;

  always_comb begin
    word_t w0, w1, w2, w3, t;
    {w0, w1, w2, w3} = last_q;
    // RotWord then SubWord of the last word.
    t = {SBOX[w3[23:16]], SBOX[w3[15:8]], SBOX[w3[7:0]], SBOX[w3[31:24]]};
    t[31:24] = t[31:24] ^ rcon(rnd_q);
    w0 = w0 ^ t;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    next_key = {w0, w1, w2, w3};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q  <= 1'b0;
      ready  <= 1'b0;
      rnd_q  <= '0;
      last_q <= '0;
      for (int i = 0; i <= int'(NR); i++) rk_q[i] <= '0;
    end else if (key_load) begin
      rk_q[0] <= key_in;
      last_q  <= key_in;
      rnd_q   <= 4'd1;
      run_q   <= 1'b1;
      ready   <= 1'b0;
    end else if (run_q) begin
      rk_q[rnd_q] <= next_key;
      last_q      <= next_key;
      rnd_q       <= rnd_q + 4'd1;
      if (rnd_q == round_t'(NR)) begin
        run_q <= 1'b0;
        ready <= 1'b1;
      end
    end
  end

  always_comb rk_data = rk_q[(rk_addr > round_t'(NR)) ? round_t'(NR) : rk_addr];

endmodule
