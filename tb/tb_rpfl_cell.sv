// tb_rpfl_cell -- exhaustive check of the RPFL gate model: for every a, b and
// topology select r the output must be a ^ b, and it must not depend on r.
module tb_rpfl_cell;
  logic a, b, r, y;
  int checks = 0, failures = 0;

  rpfl_cell dut (.a(a), .b(b), .r(r), .y(y));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {r, a, b} = 3'(i);
      #1;
      checks++;
      if (y !== (a ^ b)) begin
        failures++;
        $display("FAIL r=%0b a=%0b b=%0b y=%0b", r, a, b, y);
      end
    end
    // Toggling r alone with fixed data must never glitch the logic value.
    for (int i = 0; i < 4; i++) begin
      logic y0;
      {a, b} = 2'(i);
      r = 1'b0; #1; y0 = y;
      r = 1'b1; #1;
      checks++;
      if (y !== y0) begin failures++; $display("FAIL r toggle a=%0b b=%0b", a, b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
