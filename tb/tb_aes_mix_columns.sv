// tb_aes_mix_columns -- MixColumns and InvMixColumns against the reference
// (general GF(2^8) matrix product) and the FIPS-197 round-1 value.
module tb_aes_mix_columns;
  import tb_aes_ref_pkg::*;
  logic [127:0] s, q;
  logic inv;
  int checks = 0, failures = 0;

  aes_mix_columns dut (.state_in(s), .inv(inv), .state_out(q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    // FIPS-197 Appendix B, round 1: after ShiftRows -> after MixColumns.
    s = 128'hd4bf5d30e0b452aeb84111f11e2798e5; inv = 0; #1;
    expect_eq(q, 128'h046681e5e0cb199a48f8d37a2806264c, "FIPS B round 1");
    inv = 1; s = 128'h046681e5e0cb199a48f8d37a2806264c; #1;
    expect_eq(q, 128'hd4bf5d30e0b452aeb84111f11e2798e5, "FIPS B inverse");
    for (int i = 0; i < 300; i++) begin
      s = {$urandom, $urandom, $urandom, $urandom};
      inv = 0; #1; expect_eq(q, mix_columns(s, 0), "forward");
      inv = 1; #1; expect_eq(q, mix_columns(s, 1), "inverse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
