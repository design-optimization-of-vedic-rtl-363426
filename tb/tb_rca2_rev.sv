// tb_rca2_rev: exhaustive self-check of the 2-bit reversible adder.
// For all 16 operand pairs: {cout, s} must equal a + b.
module tb_rca2_rev;
  logic [1:0] a, b, s;
  logic       cout;
  logic [2:0] g;
  int checks = 0, failures = 0;

  rca2_rev dut (.a(a), .b(b), .s(s), .cout(cout), .garbage(g));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 4; x++) begin
      for (int y = 0; y < 4; y++) begin
        a = 2'(x);
        b = 2'(y);
        #1;
        checks++;
        if (int'({cout, s}) != x + y) begin
          failures++;
          $display("FAIL %0d + %0d -> cout=%b s=%0d", x, y, cout, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
