// tb_rpfl_rand_gen -- checks the topology-bit generator against a software
// model of the data-mixed Galois LFSR (reset value, hold when en is low, step
// when en is high), and that over a long run with constant data every bit is
// 1 about half of the time.
module tb_rpfl_rand_gen;
  localparam int W = 32;
  localparam logic [W-1:0] TAPS = 32'h8020_0003;
  localparam logic [W-1:0] SEED = 32'h1;
  logic clk = 0, rst_n = 1, en = 0;
  logic [W-1:0] data_in = '0, r_out, model;
  int checks = 0, failures = 0;
  int ones [W];

  rpfl_rand_gen dut (.clk(clk), .rst_n(rst_n), .en(en), .data_in(data_in), .r_out(r_out));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] step(logic [W-1:0] s, logic [W-1:0] d);
    logic [W-1:0] n = s >> 1;
    if (s[0]) n ^= TAPS;
    return n ^ d;
  endfunction

  task automatic check(string what);
    checks++;
    if (r_out !== model) begin
      failures++;
      $display("FAIL %s: r_out=%h model=%h", what, r_out, model);
    end
  endtask

  initial begin
    model = SEED;
    #1 rst_n = 0;
    #1; check("reset");
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // Random data, random enable.
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en = 1'($urandom);
      data_in = $urandom;
      @(posedge clk);
      if (en) model = step(model, data_in);
      #1; check("step");
    end
    // Balance with constant all-zero data (plain LFSR).
    @(negedge clk); en = 1; data_in = '0;
    foreach (ones[i]) ones[i] = 0;
    for (int i = 0; i < 4000; i++) begin
      @(posedge clk); #1;
      for (int b = 0; b < W; b++) ones[b] += int'(r_out[b]);
    end
    foreach (ones[i]) begin
      checks++;
      if (ones[i] < 1800 || ones[i] > 2200) begin
        failures++;
        $display("FAIL balance bit %0d: %0d ones of 4000", i, ones[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
