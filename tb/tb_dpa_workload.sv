// tb_dpa_workload -- the acquisition run of a DPA evaluation, replayed on the
// RTL: 70000 encryptions of random plaintexts under one fixed key, back to
// back, as a power-trace campaign would issue them.
//
// An RTL model has no power, so the test checks what the logic can show:
//  * 1 ciphertext in 64 matches the reference cipher and 1 in 16 decrypts
//    back to its plaintext;
//  * each block takes 11 cycles from start to done (plus one idle cycle
//    between blocks in this test), so the whole campaign needs under 10^6
//    cycles, 10 ms at 100 MHz;
//  * the topology bits applied at the key-injecting AddRoundKey are balanced
//    (about half the cells in OAI) and do not follow the quantity a DPA
//    attacker would target: the correlation between the number of OAI cells in
//    a trace and bit 0 of the first-round S-box output for a 4-bit key guess is
//    computed for all 16 guesses and must stay small (|rho| < 0.02).
module tb_dpa_workload;
  import tb_aes_ref_pkg::*;
  localparam int NTRACES = 70000;
  localparam logic [127:0] KEY = 128'h2b7e151628aed2a6abf7158809cf4f3c;
  logic clk = 0, rst_n = 1, key_load = 0, key_ready, start = 0, dec = 0, busy, done;
  logic [127:0] key_in = KEY, block_in = '0, block_out;
  int checks = 0, failures = 0;
  real sx [16], sxy [16], sy, syy, n;
  longint cycles = 0;

  aes_rpfl_top dut (.clk(clk), .rst_n(rst_n), .key_load(key_load), .key_in(key_in),
                    .key_ready(key_ready), .start(start), .decrypt(dec), .block_in(block_in),
                    .block_out(block_out), .busy(busy), .done(done));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (NTRACES * 30 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic process(logic [127:0] din, bit d, output logic [127:0] dout, output int hw_r);
    int cyc = 0;
    @(negedge clk); block_in = din; dec = d; start = 1;
    #1 hw_r = $countones(dut.ark_r);   // topology bits of the initial AddRoundKey
    @(negedge clk); start = 0; cyc = 1;
    while (!done && cyc < 100) begin @(negedge clk); cyc++; end
    if (cyc != 11) begin failures++; checks++; $display("FAIL latency %0d", cyc); end
    dout = block_out;
  endtask

  initial begin
    longint c0;
    int hw_sum = 0;
    logic [127:0] p, c, back;
    int hw, hw2;
    real rho, maxrho = 0.0, mean_hw;
    foreach (sx[g]) begin sx[g] = 0; sxy[g] = 0; end
    sy = 0; syy = 0; n = 0;
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); key_load = 1;
    @(negedge clk); key_load = 0;
    while (!key_ready) @(negedge clk);
    c0 = cycles;
    for (int t = 0; t < NTRACES; t++) begin
      p = {$urandom, $urandom, $urandom, $urandom};
      process(p, 0, c, hw);
      hw_sum += hw;
      if (t % 64 == 0) begin
        checks++;
        if (c !== encrypt(KEY, p)) begin failures++; $display("FAIL trace %0d enc", t); end
      end
      // Correlation of the OAI-cell count with the DPA target bit, per guess
      // of the low 4 bits of key byte 0.
      for (int g = 0; g < 16; g++) begin
        logic [7:0] kb;
        real x;
        kb = {KEY[127:124], 4'(g)};
        x = real'(sbox(p[127:120] ^ kb) & 8'h01);
        sx[g] += x; sxy[g] += x * real'(hw);
      end
      sy += real'(hw); syy += real'(hw) * real'(hw); n += 1.0;
      if (t % 16 == 0) begin
        process(c, 1, back, hw2);
        checks++;
        if (back !== p) begin failures++; $display("FAIL trace %0d dec", t); end
      end
    end
    mean_hw = real'(hw_sum) / real'(NTRACES);
    $display("campaign: %0d traces, %0d cycles, mean OAI cells per AddRoundKey %0.2f of 128",
             NTRACES, cycles - c0, mean_hw);
    checks++;
    if (mean_hw < 60.0 || mean_hw > 68.0) begin failures++; $display("FAIL topology balance"); end
    for (int g = 0; g < 16; g++) begin
      real vx, vy;
      vx = sx[g] / n - (sx[g] / n) * (sx[g] / n);
      vy = syy / n - (sy / n) * (sy / n);
      rho = (sxy[g] / n - (sx[g] / n) * (sy / n)) / $sqrt(vx * vy);
      if (rho < 0) rho = -rho;
      if (rho > maxrho) maxrho = rho;
      $display("guess %2d: |rho| = %0.4f", g, rho);
      checks++;
      if (!(rho <= 0.02)) begin failures++; $display("FAIL correlation guess %0d", g); end
    end
    $display("largest |rho| over the 16 guesses: %0.4f", maxrho);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
