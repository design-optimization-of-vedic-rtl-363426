// tb_bvppg_gate: exhaustive self-check of the BVPPG gate.
// All 32 input patterns. Reference: P = A, Q = B, R = (A*B + C) mod 2,
// S = D, T = (A*D + E) mod 2. The 32 output patterns must all differ.
module tb_bvppg_gate;
  logic a, b, c, d, e, p, q, r, s, t;
  int checks = 0, failures = 0;
  bit seen [32];

  bvppg_gate dut (.a(a), .b(b), .c(c), .d(d), .e(e), .p(p), .q(q), .r(r), .s(s), .t(t));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {a, b, c, d, e} = 5'(v);
      #1;
      checks++;
      if (p !== a || q !== b || s !== d ||
          r !== 1'((int'(a) * int'(b) + int'(c)) % 2) ||
          t !== 1'((int'(a) * int'(d) + int'(e)) % 2)) begin
        failures++;
        $display("FAIL in=%b%b%b%b%b out=%b%b%b%b%b", a, b, c, d, e, p, q, r, s, t);
      end
      checks++;
      if (seen[{p, q, r, s, t}]) begin
        failures++;
        $display("FAIL output %b%b%b%b%b repeated", p, q, r, s, t);
      end
      seen[{p, q, r, s, t}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
