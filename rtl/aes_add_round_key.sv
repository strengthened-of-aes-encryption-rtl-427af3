// aes_add_round_key -- protected AddRoundKey for the 128-bit AES state.
//
// The state is split into NWORDS 32-bit columns; each column is XORed with the
// matching round-key word by an rpfl_ark_word, i.e. 32 RPFL cells with their own
// random topology generator. The generators get distinct seeds so the columns do
// not switch topology in step. state_out = state_in ^ round_key, whatever the
// random bits are. Using RPFL cells for this step follows the RPFL proposal; the split
// into four parallel 32-bit units is this design's reading of its 32-bit
// AddRoundKey element.
//
// Timing: state_out is combinational. The random bits (r_bits, for observation
// only) advance at each rising edge with en high.
module aes_add_round_key #(
  parameter int unsigned NWORDS = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic [32*NWORDS-1:0]   state_in,
  input  logic [32*NWORDS-1:0]   round_key,
  output logic [32*NWORDS-1:0]   state_out,
  output logic [32*NWORDS-1:0]   r_bits
);

  for (genvar w = 0; w < int'(NWORDS); w++) begin : g_word
    // Distinct nonzero seeds per column.
    localparam logic [31:0] WSEED = 32'h9e37_79b9 * (w + 1) | 32'h1;
    rpfl_ark_word #(.WIDTH(32), .SEED(WSEED)) u_word (
      .clk      (clk),
      .rst_n    (rst_n),
      .en       (en),
      .data_in  (state_in [32*w +: 32]),
      .key_in   (round_key[32*w +: 32]),
      .data_out (state_out[32*w +: 32]),
      .r_bits   (r_bits   [32*w +: 32])
    );
  end

endmodule
