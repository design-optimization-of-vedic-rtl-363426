// tb_peres_gate: exhaustive self-check of the Peres gate.
// All 8 input patterns; P = A, Q = (A+B) mod 2, R = (A*B + C) mod 2; the
// 8 output patterns must all differ (reversibility).
module tb_peres_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  bit seen [8];

  peres_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (p !== a || q !== 1'((int'(a) + int'(b)) % 2) ||
          r !== 1'((int'(a) * int'(b) + int'(c)) % 2)) begin
        failures++;
        $display("FAIL in=%b%b%b out=%b%b%b", a, b, c, p, q, r);
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL output %b%b%b repeated", p, q, r);
      end
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
