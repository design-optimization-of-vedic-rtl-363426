// tb_vedic4x4_rev: end-to-end self-check of the reversible 4x4 multiplier,
// at its only (default) configuration.
//
//  1. The eight operand pairs of the published 4x4 simulation
//     (15*15, 14*7, 10*3, 11*6, 9*12, 7*7, 6*5, 4*0 -> 225, 98, 30, 66, 108,
//     49, 30, 0).
//  2. All 256 operand pairs against the integer product; the discarded last
//     carry must be 0 every time.
//  3. Reversibility at the top: the 46 output bits {r, garbage} must differ
//     for all 256 inputs (no input information is lost).
//  4. The cost totals of the gate network against the published figures:
//     31 gates, 31 constant inputs, 38 garbage outputs, quantum cost 150,
//     TRLIC 250.
// It also counts how often each part of the adder network does real work:
// a carry out of the first and of the second 4-bit adder, a 1 on the half
// adder's sum (a carry to pass up), and operand pairs whose upper halves are
// both non-zero (the case an earlier arrangement got wrong). Each must occur.
// The two carries never occur together (the first adder carries only for
// J = K = 9, i.e. a = b = 15, when the second one cannot), so the half
// adder's carry must stay 0; that is checked too.
module tb_vedic4x4_rev;
  import rev_pkg::*;

  logic [3:0]  a, b;
  logic [7:0]  r;
  logic        c_last;
  logic [37:0] g;
  int checks = 0, failures = 0;
  int n_c1 = 0, n_c2 = 0, n_hs = 0, n_hc = 0, n_upper = 0;
  logic [45:0] outs [256];

  vedic4x4_rev dut (.a(a), .b(b), .r(r), .c_last(c_last), .garbage(g));

  localparam int NV = 8;
  localparam int VA [NV] = '{15, 14, 10, 11, 9, 7, 6, 4};
  localparam int VB [NV] = '{15, 7, 3, 6, 12, 7, 5, 0};
  localparam int VR [NV] = '{225, 98, 30, 66, 108, 49, 30, 0};

  task automatic expect_eq(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s = %0d, expected %0d", what, got, want);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NV; i++) begin
      a = 4'(VA[i]);
      b = 4'(VB[i]);
      #1;
      expect_eq($sformatf("vector %0d*%0d", VA[i], VB[i]), int'(r), VR[i]);
    end

    for (int x = 0; x < 16; x++) begin
      for (int y = 0; y < 16; y++) begin
        a = 4'(x);
        b = 4'(y);
        #1;
        checks++;
        if (int'(r) != x * y || c_last !== 1'b0) begin
          failures++;
          $display("FAIL %0d*%0d -> %0d (c_last=%b)", x, y, r, c_last);
        end
        outs[16*x+y] = {r, g};
        if (dut.c1) n_c1++;
        if (dut.c2) n_c2++;
        if (dut.hs) n_hs++;
        if (dut.hc) n_hc++;
        if (a[3:2] != 0 && b[3:2] != 0) n_upper++;
      end
    end

    for (int i = 0; i < 256; i++) begin
      for (int j = i + 1; j < 256; j++) begin
        checks++;
        if (outs[i] == outs[j]) begin
          failures++;
          $display("FAIL inputs %0d and %0d give the same outputs", i, j);
        end
      end
    end

    expect_eq("gate count", int'(COST_V4X4.gates), 31);
    expect_eq("constant inputs", int'(COST_V4X4.consts), 31);
    expect_eq("garbage outputs", int'(COST_V4X4.garbage), 38);
    expect_eq("garbage port width", $bits(g), 38);
    expect_eq("quantum cost", int'(COST_V4X4.qcost), 150);
    expect_eq("TRLIC", int'(trlic(COST_V4X4)), 250);
    expect_eq("2x2 quantum cost", int'(COST_V2X2.qcost), 23);
    expect_eq("2x2 TRLIC", int'(trlic(COST_V2X2)), 38);

    $display("events: carry of adder 1 %0d, carry of adder 2 %0d, half-adder sum %0d, half-adder carry %0d, both upper halves non-zero %0d",
             n_c1, n_c2, n_hs, n_hc, n_upper);
    checks++;
    if (n_c1 == 0) begin failures++; $display("FAIL first adder never carried"); end
    checks++;
    if (n_c2 == 0) begin failures++; $display("FAIL second adder never carried"); end
    checks++;
    if (n_hs == 0) begin failures++; $display("FAIL half adder never passed a carry up"); end
    expect_eq("half-adder carries", n_hc, 0);
    checks++;
    if (n_upper == 0) begin failures++; $display("FAIL upper halves never both non-zero"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
