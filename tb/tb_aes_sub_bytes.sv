// tb_aes_sub_bytes -- every byte value through every byte lane, forward and
// inverse, against the search-based reference S-box, plus FIPS-197 spot
// values (S(00) = 63, S(53) = ED, S^-1(ED) = 53).
module tb_aes_sub_bytes;
  import tb_aes_ref_pkg::*;
  logic [127:0] s, q;
  logic inv;
  int checks = 0, failures = 0;

  aes_sub_bytes dut (.state_in(s), .inv(inv), .state_out(q));

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
    s = '0; inv = 0; #1;
    expect_eq(q, {16{8'h63}}, "S(00)");
    s = {16{8'h53}}; #1;
    expect_eq(q, {16{8'hED}}, "S(53)");
    inv = 1; s = {16{8'hED}}; #1;
    expect_eq(q, {16{8'h53}}, "InvS(ED)");
    for (int v = 0; v < 256; v++) begin
      for (int n = 0; n < 16; n++) s[127-8*n -: 8] = 8'(v + 17*n);
      inv = 0; #1; expect_eq(q, sub_bytes(s, 0), "forward");
      inv = 1; #1; expect_eq(q, sub_bytes(s, 1), "inverse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
