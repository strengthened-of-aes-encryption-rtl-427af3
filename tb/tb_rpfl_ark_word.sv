// tb_rpfl_ark_word -- random data and sub-key words: data_out must equal
// data ^ key every cycle whatever the topology bits, and every one of the 32
// cells must be seen in both topologies (r = 0 and r = 1).
module tb_rpfl_ark_word;
  localparam int W = 32;
  logic clk = 0, rst_n = 1, en = 0;
  logic [W-1:0] d = '0, k = '0, q, r;
  int checks = 0, failures = 0;
  int seen0 [W], seen1 [W];

  rpfl_ark_word dut (.clk(clk), .rst_n(rst_n), .en(en), .data_in(d), .key_in(k), .data_out(q), .r_bits(r));

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
      d = $urandom; k = $urandom;
      if (i % 7 == 0) k = ~d;      // all-ones result
      if (i % 11 == 0) k = d;      // all-zeros result
      #1;
      checks++;
      if (q !== (d ^ k)) begin
        failures++;
        $display("FAIL d=%h k=%h q=%h", d, k, q);
      end
      for (int b = 0; b < W; b++) if (r[b]) seen1[b]++; else seen0[b]++;
    end
    for (int b = 0; b < W; b++) begin
      checks++;
      if (seen0[b] == 0 || seen1[b] == 0) begin
        failures++;
        $display("FAIL cell %0d never switched topology", b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
