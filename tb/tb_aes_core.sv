// tb_aes_core -- the round engine alone, with round keys served by the
// testbench from the reference key schedule. Checks the FIPS-197 Appendix C.1
// vector both ways, random blocks and keys both ways against the reference
// cipher, the 11-cycle start-to-done latency, that done is a single pulse, and
// that a start while busy is ignored.
module tb_aes_core;
  import tb_aes_ref_pkg::*;
  logic clk = 0, rst_n = 1, start = 0, decrypt = 0, busy, done;
  logic [127:0] block_in = '0, block_out, rk_data, ark_r;
  logic [3:0] rk_addr;
  rks_t rks;
  int checks = 0, failures = 0;

  aes_core dut (.clk(clk), .rst_n(rst_n), .start(start), .decrypt(decrypt), .block_in(block_in),
                .rk_addr(rk_addr), .rk_data(rk_data), .block_out(block_out), .busy(busy),
                .done(done), .ark_r(ark_r));

  always_comb rk_data = (rk_addr <= 4'd10) ? rks[rk_addr] : '0;

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [127:0] key, logic [127:0] din, bit dec, logic [127:0] exp, bit poke_busy);
    int cyc = 0;
    rks = expand(key);
    @(negedge clk); block_in = din; decrypt = dec; start = 1;
    @(negedge clk); start = 0; cyc = 1;
    if (poke_busy) begin
      // A start in mid-operation with other data must be ignored.
      repeat (3) @(negedge clk);
      cyc += 3;
      block_in = ~din; decrypt = ~dec; start = 1;
      @(negedge clk); start = 0; cyc++;
      block_in = din;
    end
    while (!done && cyc < 100) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 11) begin failures++; $display("FAIL latency %0d", cyc); end
    checks++;
    if (block_out !== exp) begin
      failures++;
      $display("FAIL %s key=%h in=%h got %h exp %h", dec ? "dec" : "enc", key, din, block_out, exp);
    end
    @(negedge clk);
    checks++;
    if (done) begin failures++; $display("FAIL done longer than one cycle"); end
  endtask

  initial begin
    rks = expand('0);
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff, 0,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a, 0);
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, 1,
        128'h00112233445566778899aabbccddeeff, 0);
    for (int i = 0; i < 40; i++) begin
      logic [127:0] k, p;
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      run(k, p, 0, encrypt(k, p), i % 8 == 3);
      run(k, p, 1, tb_aes_ref_pkg::decrypt(k, p), i % 8 == 5);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
