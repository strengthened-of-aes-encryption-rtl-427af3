// rpfl_rand_gen -- source of the random topology-select bits R of an RPFL array.
//
// The select bits are "generated randomly using input data": a WIDTH-bit Galois
// LFSR (default polynomial x^32 + x^22 + x^2 + x + 1, TAPS = 32'h80200003)
// advances once per enabled cycle and the data word presented on data_in is
// XORed into its next state, so the sequence depends on both the free-running
// register and the data being processed. r_out is the register itself.
// Only the purpose and the use of the input data come from the RPFL proposal; the LFSR,
// its polynomial and its seed are this design's choices.
//
// Timing: r_out is a register output, so it changes only at the rising clock
// edge and is stable for the whole cycle in which the data it protects is
// evaluated. Reset (asynchronous, active low) loads SEED, which must be nonzero.
module rpfl_rand_gen #(
  parameter int unsigned      WIDTH = 32,
  parameter logic [WIDTH-1:0] TAPS  = WIDTH'(32'h8020_0003),
  parameter logic [WIDTH-1:0] SEED  = WIDTH'(1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] data_in,
  output logic [WIDTH-1:0] r_out
);

  logic [WIDTH-1:0] state_q, step;

  // One Galois step: shift right, fold the taps in when bit 0 falls out.
  always_comb step = (state_q >> 1) ^ (state_q[0] ? TAPS : '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  state_q <= SEED;
    else if (en) state_q <= step ^ data_in;
  end

  assign r_out = state_q;

endmodule
