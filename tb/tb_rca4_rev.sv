// tb_rca4_rev: exhaustive self-check of the 4-bit reversible adder.
// For all 256 operand pairs: {cout, s} must equal a + b. Also counts how
// often the carry ripples through all four bits (a + b = 15 with a
// carry from bit 0 is impossible, so the long ripple case checked is
// a + b >= 16 with a[0] & b[0]) and fails if that never happened.
module tb_rca4_rev;
  logic [3:0] a, b, s;
  logic       cout;
  logic [6:0] g;
  int checks = 0, failures = 0, long_ripples = 0;

  rca4_rev dut (.a(a), .b(b), .s(s), .cout(cout), .garbage(g));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++) begin
      for (int y = 0; y < 16; y++) begin
        a = 4'(x);
        b = 4'(y);
        #1;
        checks++;
        if (int'({cout, s}) != x + y) begin
          failures++;
          $display("FAIL %0d + %0d -> cout=%b s=%0d", x, y, cout, s);
        end
        if (x + y >= 16 && a[0] && b[0]) long_ripples++;
      end
    end
    checks++;
    if (long_ripples == 0) begin
      failures++;
      $display("FAIL carry never rippled from bit 0 out of bit 3");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
