// tb_feynman_gate: exhaustive self-check of the Feynman gate.
// Drives all 4 input patterns, compares (P, Q) with (A, (A+B) mod 2) and
// checks that no two inputs give the same output (the gate is reversible).
module tb_feynman_gate;
  logic a, b, p, q;
  int checks = 0, failures = 0;
  bit seen [4];

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

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
      if (p !== a || q !== 1'((int'(a) + int'(b)) % 2)) begin
        failures++;
        $display("FAIL in=%b%b out=%b%b", a, b, p, q);
      end
      checks++;
      if (seen[{p, q}]) begin
        failures++;
        $display("FAIL output %b%b repeated", p, q);
      end
      seen[{p, q}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
