// tb_aes_add_round_key -- the 128-bit protected AddRoundKey: the output must be
// state ^ round_key for random operands, all 128 cells must use both
// topologies, and the four column generators must not run in step.
module tb_aes_add_round_key;
  logic clk = 0, rst_n = 1, en = 0;
  logic [127:0] s = '0, k = '0, q, r;
  int checks = 0, failures = 0;
  int seen0 [128], seen1 [128];
  int same01 = 0;

  aes_add_round_key dut (.clk(clk), .rst_n(rst_n), .en(en), .state_in(s), .round_key(k), .state_out(q), .r_bits(r));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen0[i]) begin seen0[i] = 0; seen1[i] = 0; end
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      en = 1'b1;
      s = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      if (i % 5 == 0) s[31:0] = s[63:32];   // equal column data
      #1;
      checks++;
      if (q !== (s ^ k)) begin
        failures++;
        $display("FAIL s=%h k=%h q=%h", s, k, q);
      end
      if (r[31:0] == r[63:32]) same01++;
      for (int b = 0; b < 128; b++) if (r[b]) seen1[b]++; else seen0[b]++;
    end
    for (int b = 0; b < 128; b++) begin
      checks++;
      if (seen0[b] == 0 || seen1[b] == 0) begin
        failures++;
        $display("FAIL cell %0d never switched topology", b);
      end
    end
    checks++;
    if (same01 > 10) begin failures++; $display("FAIL columns 0/1 topology bits equal %0d times", same01); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
