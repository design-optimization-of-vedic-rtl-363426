// tb_vedic2x2_rev: self-check of the reversible 2x2 multiplier.
// First plays the six operand pairs of the published 2x2 simulation
// (3*0, 2*2, 1*3, 3*2, 1*1, 2*0 -> 0, 4, 3, 6, 1, 0), then all 16 pairs
// against the integer product. Also checks that the 9 output bits
// {q, garbage} differ for all 16 inputs, i.e. no input information is lost.
module tb_vedic2x2_rev;
  logic [1:0] a, b;
  logic [3:0] q;
  logic [4:0] g;
  int checks = 0, failures = 0;
  logic [8:0] outs [16];

  vedic2x2_rev dut (.a(a), .b(b), .q(q), .garbage(g));

  localparam int NV = 6;
  localparam int VA [NV] = '{3, 2, 1, 3, 1, 2};
  localparam int VB [NV] = '{0, 2, 3, 2, 1, 0};
  localparam int VQ [NV] = '{0, 4, 3, 6, 1, 0};

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NV; i++) begin
      a = 2'(VA[i]);
      b = 2'(VB[i]);
      #1;
      checks++;
      if (int'(q) != VQ[i]) begin
        failures++;
        $display("FAIL vector %0d: %0d*%0d -> %0d, expected %0d", i, VA[i], VB[i], q, VQ[i]);
      end
    end
    for (int x = 0; x < 4; x++) begin
      for (int y = 0; y < 4; y++) begin
        a = 2'(x);
        b = 2'(y);
        #1;
        checks++;
        if (int'(q) != x * y) begin
          failures++;
          $display("FAIL %0d*%0d -> %0d", x, y, q);
        end
        outs[4*x+y] = {q, g};
      end
    end
    for (int i = 0; i < 16; i++) begin
      for (int j = i + 1; j < 16; j++) begin
        checks++;
        if (outs[i] == outs[j]) begin
          failures++;
          $display("FAIL inputs %0d and %0d give the same outputs", i, j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
