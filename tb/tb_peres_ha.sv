// tb_peres_ha: exhaustive self-check of the Peres-gate half adder.
// For all 4 inputs: {c, s} must equal a + b, and garbage must equal a.
module tb_peres_ha;
  logic a, b, s, c, g;
  int checks = 0, failures = 0;

  peres_ha dut (.a(a), .b(b), .s(s), .c(c), .garbage(g));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (int'({c, s}) != int'(a) + int'(b) || g !== a) begin
        failures++;
        $display("FAIL a=%b b=%b -> c=%b s=%b g=%b", a, b, c, s, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
