// aes_core -- iterative AES-128 encryption / decryption round engine.
//
// One round is computed per clock in a single round datapath whose AddRoundKey
// is the protected aes_add_round_key (RPFL cells with random topology bits),
// so every XOR of a round key into the data, including the first and the last,
// goes through RPFL cells.
//   encrypt: s = ARK(in, k0); rounds 1..9: s = ARK(MC(SR(SB(s))), ki);
//            round 10: s = ARK(SR(SB(s)), k10)
//   decrypt: s = ARK(in, k10); rounds 1..9: s = IMC(ARK(ISR(ISB(s)), k(10-i)));
//            round 10: s = ARK(ISR(ISB(s)), k0)
// SubBytes and ShiftRows commute, so one S-box bank and one row shifter serve
// both directions; the forward and inverse column mixers are separate so that
// the two directions share no combinational path through a multiplexer.
// The four AES steps and the protected AddRoundKey follow the RPFL proposal; the
// iterative one-round-per-cycle organisation and the controller are this
// design's choices.
//
// Interface and timing: start (accepted only when not busy) samples block_in
// and decrypt and performs the initial AddRoundKey in that cycle. Ten round
// cycles follow; done pulses for one cycle with block_out valid 11 cycles after
// start, and block_out holds until the next result. busy is high from the cycle
// after start until done. Round keys are fetched combinationally through
// rk_addr / rk_data. ark_r shows the topology bits used by the AddRoundKey in
// the current cycle (observation only). Asynchronous active-low reset.
module aes_core
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  logic   decrypt,
  input  state_t block_in,
  output round_t rk_addr,
  input  state_t rk_data,
  output state_t block_out,
  output logic   busy,
  output logic   done,
  output state_t ark_r
);

  typedef enum logic {S_IDLE, S_RUN} fsm_e;

  fsm_e   fsm_q;
  state_t state_q;
  round_t rnd_q;      // round being computed, 1..NR
  logic   dec_q;

  state_t sb_out, sr_out, mc_out, imc_out, ark_in, ark_out, round_out;
  logic   accept, last, ark_en;

  assign accept = (fsm_q == S_IDLE) && start;
  assign last   = (rnd_q == round_t'(NR));
  assign ark_en = accept || (fsm_q == S_RUN);

  // Round-key index: initial key on start, then forwards or backwards.
  always_comb begin
    if (fsm_q == S_IDLE) rk_addr = decrypt ? round_t'(NR) : '0;
    else                 rk_addr = dec_q ? round_t'(NR) - rnd_q : rnd_q;
  end

  aes_sub_bytes   u_sb  (.state_in(state_q), .inv(dec_q), .state_out(sb_out));
  aes_shift_rows  u_sr  (.state_in(sb_out),  .inv(dec_q), .state_out(sr_out));
  aes_mix_columns u_mc  (.state_in(sr_out),  .inv(1'b0),  .state_out(mc_out));
  aes_mix_columns u_imc (.state_in(ark_out), .inv(1'b1),  .state_out(imc_out));

  always_comb begin
    if (fsm_q == S_IDLE)   ark_in = block_in;
    else if (dec_q || last) ark_in = sr_out;
    else                   ark_in = mc_out;
  end

  aes_add_round_key #(.NWORDS(NB)) u_ark (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (ark_en),
    .state_in  (ark_in),
    .round_key (rk_data),
    .state_out (ark_out),
    .r_bits    (ark_r)
  );

  assign round_out = (dec_q && !last) ? imc_out : ark_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fsm_q     <= S_IDLE;
      state_q   <= '0;
      rnd_q     <= '0;
      dec_q     <= 1'b0;
      done      <= 1'b0;
      block_out <= '0;
    end else begin
      done <= 1'b0;
      unique case (fsm_q)
        S_IDLE: if (start) begin
          state_q <= ark_out;
          dec_q   <= decrypt;
          rnd_q   <= 4'd1;
          fsm_q   <= S_RUN;
        end
        S_RUN: begin
          state_q <= round_out;
          rnd_q   <= rnd_q + 4'd1;
          if (last) begin
            block_out <= round_out;
            done      <= 1'b1;
            fsm_q     <= S_IDLE;
          end
        end
        default: fsm_q <= S_IDLE;
      endcase
    end
  end

  assign busy = (fsm_q == S_RUN);

`ifndef SYNTHESIS
  // The round counter never leaves 1..NR while a block is in flight.
  a_round_range: assert property (@(posedge clk) disable iff (!rst_n)
    fsm_q == S_RUN |-> (rnd_q >= 4'd1 && rnd_q <= round_t'(NR)));
  // done is a single-cycle pulse.
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n) done |=> !done);
`endif

endmodule
