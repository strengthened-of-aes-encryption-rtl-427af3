// tb_aes_rpfl_top -- end-to-end test of the hardened AES-128 engine at its
// default configuration.
//
// Loads keys, encrypts and decrypts the FIPS-197 Appendix C.1 vector and random
// blocks under random keys, and compares every result with the reference model
// (tb_aes_ref_pkg), including the 10-cycle key expansion and the 11-cycle
// block latency. It makes each mechanism of the design happen and counts it:
// key expansion, encryption, decryption, a start ignored while busy, a start
// ignored while the key is being expanded, a key change between blocks, and
// both topologies (AOI and OAI) of each of the 128 AddRoundKey cells. A
// mechanism that never happened counts as a failure.
module tb_aes_rpfl_top;
  import tb_aes_ref_pkg::*;
  logic clk = 0, rst_n = 1, key_load = 0, key_ready, start = 0, dec = 0, busy, done;
  logic [127:0] key_in = '0, block_in = '0, block_out;
  int checks = 0, failures = 0;
  int n_keyexp = 0, n_enc = 0, n_dec = 0, n_busy_ign = 0, n_key_ign = 0, n_rekey = 0;
  int seen_aoi [128], seen_oai [128];
  logic [127:0] cur_key;

  aes_rpfl_top dut (.clk(clk), .rst_n(rst_n), .key_load(key_load), .key_in(key_in),
                    .key_ready(key_ready), .start(start), .decrypt(dec), .block_in(block_in),
                    .block_out(block_out), .busy(busy), .done(done));

  always #5 clk = ~clk;

  // Topology use of every AddRoundKey cell while a block is processed.
  always @(posedge clk) if (rst_n && (busy || (start && key_ready)))
    for (int b = 0; b < 128; b++) if (dut.ark_r[b]) seen_oai[b]++; else seen_aoi[b]++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_key(logic [127:0] k, bit try_start);
    int cyc = 0;
    @(negedge clk); key_in = k; key_load = 1;
    @(negedge clk); key_load = 0;
    if (try_start) begin
      // start while the schedule is running must be ignored.
      start = 1; block_in = '1;
      @(negedge clk); start = 0; cyc++;
      checks++;
      if (busy) begin failures++; $display("FAIL start accepted during key expansion"); end
      else n_key_ign++;
    end
    while (!key_ready && cyc < 50) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 10) begin failures++; $display("FAIL key latency %0d", cyc); end
    if (n_keyexp > 0 && k != cur_key) n_rekey++;
    cur_key = k;
    n_keyexp++;
  endtask

  task automatic run(logic [127:0] din, bit d, logic [127:0] exp, bit poke_busy);
    int cyc = 0;
    @(negedge clk); block_in = din; dec = d; start = 1;
    @(negedge clk); start = 0; cyc = 1;
    if (poke_busy) begin
      repeat (2) @(negedge clk);
      cyc += 2;
      block_in = ~din; dec = ~d; start = 1;
      @(negedge clk); start = 0; cyc++;
      n_busy_ign++;
    end
    while (!done && cyc < 100) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 11) begin failures++; $display("FAIL block latency %0d", cyc); end
    checks++;
    if (block_out !== exp) begin
      failures++;
      $display("FAIL %s key=%h in=%h got %h exp %h", d ? "dec" : "enc", cur_key, din, block_out, exp);
    end
    if (d) n_dec++; else n_enc++;
  endtask

  task automatic mech(string name, int n);
    checks++;
    $display("mechanism %-28s happened %0d times", name, n);
    if (n == 0) begin failures++; $display("FAIL mechanism %s never happened", name); end
  endtask

  initial begin
    int aoi_all = 1, oai_all = 1;
    foreach (seen_aoi[i]) begin seen_aoi[i] = 0; seen_oai[i] = 0; end
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Start before any key: must be ignored.
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    checks++;
    if (busy) begin failures++; $display("FAIL start accepted without a key"); end else n_key_ign++;

    load_key(128'h000102030405060708090a0b0c0d0e0f, 1);
    run(128'h00112233445566778899aabbccddeeff, 0, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, 0);
    run(128'h69c4e0d86a7b0430d8cdb78070b4c55a, 1, 128'h00112233445566778899aabbccddeeff, 0);
    for (int i = 0; i < 30; i++) begin
      logic [127:0] k;
      k = {$urandom, $urandom, $urandom, $urandom};
      load_key(k, i % 5 == 2);
      for (int j = 0; j < 4; j++) begin
        logic [127:0] p, c;
        p = {$urandom, $urandom, $urandom, $urandom};
        c = encrypt(k, p);
        run(p, 0, c, j == 1);
        run(c, 1, p, j == 2);
      end
    end
    for (int b = 0; b < 128; b++) begin
      if (seen_aoi[b] == 0) aoi_all = 0;
      if (seen_oai[b] == 0) oai_all = 0;
    end
    mech("key expansion", n_keyexp);
    mech("key change", n_rekey);
    mech("encryption", n_enc);
    mech("decryption", n_dec);
    mech("start ignored while busy", n_busy_ign);
    mech("start ignored without key", n_key_ign);
    mech("every cell in AOI topology", aoi_all);
    mech("every cell in OAI topology", oai_all);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
