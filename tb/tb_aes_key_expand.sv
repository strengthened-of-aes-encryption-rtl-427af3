// tb_aes_key_expand -- the FIPS-197 Appendix A.1 key and random keys: all 11
// stored round keys against the reference schedule, ready exactly 10 cycles
// after key_load, and a key_load in the middle of an expansion restarting it.
module tb_aes_key_expand;
  import tb_aes_ref_pkg::*;
  logic clk = 0, rst_n = 1, key_load = 0, ready;
  logic [127:0] key_in = '0, rk_data;
  logic [3:0] rk_addr = '0;
  int checks = 0, failures = 0;

  aes_key_expand dut (.clk(clk), .rst_n(rst_n), .key_load(key_load), .key_in(key_in),
                      .ready(ready), .rk_addr(rk_addr), .rk_data(rk_data));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_and_check(logic [127:0] key);
    rks_t exp = expand(key);
    int cyc = 0;
    @(negedge clk); key_in = key; key_load = 1;
    @(negedge clk); key_load = 0;
    while (!ready && cyc < 50) begin @(negedge clk); cyc++; end
    // ready is seen 10 rising edges after the edge that samples key_load.
    checks++;
    if (cyc != 10) begin failures++; $display("FAIL latency: ready after %0d extra cycles", cyc); end
    for (int r = 0; r < 11; r++) begin
      rk_addr = 4'(r); #1;
      checks++;
      if (rk_data !== exp[r]) begin
        failures++;
        $display("FAIL key %h round %0d: got %h exp %h", key, r, rk_data, exp[r]);
      end
    end
  endtask

  initial begin
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    checks++;
    if (ready) begin failures++; $display("FAIL ready after reset"); end
    load_and_check(128'h2b7e151628aed2a6abf7158809cf4f3c);
    rk_addr = 4'd10; #1;
    checks++;
    if (rk_data !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) begin
      failures++; $display("FAIL FIPS A.1 round 10 key %h", rk_data);
    end
    for (int i = 0; i < 20; i++) load_and_check({$urandom, $urandom, $urandom, $urandom});
    // Restart in the middle of an expansion.
    @(negedge clk); key_in = {4{32'hdeadbeef}}; key_load = 1;
    @(negedge clk); key_load = 0;
    repeat (4) @(negedge clk);
    load_and_check(128'h000102030405060708090a0b0c0d0e0f);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
