// tb_hng_gate: exhaustive self-check of the HNG gate.
// All 16 input patterns. Reference: R = (A+B+C) mod 2 and
// S = (A+B+C >= 2) xor D, i.e. with D = 0 the gate is a full adder.
// The 16 output patterns must all differ (reversibility).
module tb_hng_gate;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;
  int n;
  bit seen [16];

  hng_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      n = int'(a) + int'(b) + int'(c);
      checks++;
      if (p !== a || q !== b || r !== 1'(n % 2) || s !== ((n >= 2) != d)) begin
        failures++;
        $display("FAIL in=%b%b%b%b out=%b%b%b%b", a, b, c, d, p, q, r, s);
      end
      checks++;
      if (seen[{p, q, r, s}]) begin
        failures++;
        $display("FAIL output %b%b%b%b repeated", p, q, r, s);
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
