// tb_aes_shift_rows -- ShiftRows and InvShiftRows against the reference, a
// FIPS-197 round-1 value, and the inverse undoing the forward shift.
module tb_aes_shift_rows;
  import tb_aes_ref_pkg::*;
  logic [127:0] s, q;
  logic inv;
  int checks = 0, failures = 0;

  aes_shift_rows dut (.state_in(s), .inv(inv), .state_out(q));

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
    // FIPS-197 Appendix B, round 1: after SubBytes -> after ShiftRows.
    s = 128'hd42711aee0bf98f1b8b45de51e415230; inv = 0; #1;
    expect_eq(q, 128'hd4bf5d30e0b452aeb84111f11e2798e5, "FIPS B round 1");
    for (int i = 0; i < 300; i++) begin
      logic [127:0] f;
      s = {$urandom, $urandom, $urandom, $urandom};
      inv = 0; #1; expect_eq(q, shift_rows(s, 0), "forward"); f = q;
      inv = 1; #1; expect_eq(q, shift_rows(s, 1), "inverse");
      s = f; #1; expect_eq(q, shift_rows(f, 1), "round trip");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
