// rpfl_ark_word -- one protected AddRoundKey word: WIDTH RPFL exclusive-OR cells.
//
// Each bit of the data word is combined with the matching sub-key bit in its own
// rpfl_cell; the cell's topology bit comes from an rpfl_rand_gen fed with the
// same data word, so every gate switches between its AOI and OAI topology at
// random from one use to the next. data_out is always data_in ^ key_in.
// The 32-bit width and the structure (one random bit per RPFL gate, the random
// bits derived from the input data) follow the RPFL proposal; the generator is this
// design's own.
//
// Timing: data_out is combinational from data_in and key_in. r_bits is
// registered; it moves on to new values at each rising edge with en high,
// taking the current data_in into account.
module rpfl_ark_word #(
  parameter int unsigned      WIDTH = 32,
  parameter logic [WIDTH-1:0] SEED  = WIDTH'(1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] data_in,
  input  logic [WIDTH-1:0] key_in,
  output logic [WIDTH-1:0] data_out,
  output logic [WIDTH-1:0] r_bits
);

  rpfl_rand_gen #(.WIDTH(WIDTH), .SEED(SEED)) u_rand (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (en),
    .data_in (data_in),
    .r_out   (r_bits)
  );

  for (genvar i = 0; i < int'(WIDTH); i++) begin : g_cell
    rpfl_cell u_cell (
      .a (data_in[i]),
      .b (key_in[i]),
      .r (r_bits[i]),
      .y (data_out[i])
    );
  end

endmodule
