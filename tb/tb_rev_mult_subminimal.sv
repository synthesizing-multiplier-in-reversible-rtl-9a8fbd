// Self-checking testbench for rev_mult_subminimal.
//
// For N = 1, 2 and the default N = 3, all input pairs are applied. Checks:
//   zero_o = 1 iff a*b = 0; then prod_o = {a, b}, else prod_o = a*b;
//   the outputs {prod_o, zero_o, garb_o} of different inputs all differ
//   (the embedding is injective);
//   the line count 2N + 1 + G is 3, 6 and 9 for N = 1, 2, 3 (published figures),
//   i.e. G = 0, 1 and 2 garbage outputs.
module tb_rev_mult_subminimal;
  int checks = 0;
  int failures = 0;

  logic       a1, b1, z1;
  logic [1:0] p1;
  logic       g1;
  logic [1:0] a2, b2;
  logic [3:0] p2;
  logic       z2, g2;
  logic [2:0] a3, b3;
  logic [5:0] p3;
  logic       z3;
  logic [1:0] g3;

  rev_mult_subminimal #(.N(1)) u1 (.a_i(a1), .b_i(b1), .prod_o(p1), .zero_o(z1), .garb_o(g1));
  rev_mult_subminimal #(.N(2)) u2 (.a_i(a2), .b_i(b2), .prod_o(p2), .zero_o(z2), .garb_o(g2));
  rev_mult_subminimal u3 (.a_i(a3), .b_i(b3), .prod_o(p3), .zero_o(z3), .garb_o(g3));

  // Output patterns already produced by N = 3, indexed by {prod, zero, garb}.
  logic seen3 [512];
  logic seen2 [64];
  logic seen1 [8];

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prod, lines;
    foreach (seen3[i]) seen3[i] = 1'b0;
    foreach (seen2[i]) seen2[i] = 1'b0;
    foreach (seen1[i]) seen1[i] = 1'b0;
    // line counts: primary outputs + indicator + garbage (G = 0 for N = 1)
    lines = $bits(p1) + 1;
    check("LC N=1", lines, 3);
    lines = $bits(p2) + 1 + $bits(g2);
    check("LC N=2", lines, 6);
    lines = $bits(p3) + 1 + $bits(g3);
    check("LC N=3", lines, 9);
    for (int v = 0; v < 64; v++) begin
      {a3, b3} = v[5:0];
      {a2, b2} = v[3:0];
      {a1, b1} = v[1:0];
      #1;
      prod = int'(a3) * int'(b3);
      check("n3 zero", int'(z3), int'(prod == 0));
      check("n3 prod", int'(p3), (prod == 0) ? int'({a3, b3}) : prod);
      check("n3 unique", int'(seen3[{p3, z3, g3}]), 0);
      seen3[{p3, z3, g3}] = 1'b1;
      if (v < 16) begin
        prod = int'(a2) * int'(b2);
        check("n2 zero", int'(z2), int'(prod == 0));
        check("n2 prod", int'(p2), (prod == 0) ? int'({a2, b2}) : prod);
        check("n2 unique", int'(seen2[{p2, z2, g2}]), 0);
        seen2[{p2, z2, g2}] = 1'b1;
      end
      if (v < 4) begin
        check("n1 zero", int'(z1), int'((a1 & b1) == 1'b0));
        check("n1 prod", int'(p1), (a1 & b1) ? 1 : int'({a1, b1}));
        check("n1 garbage", int'(g1), 0);
        check("n1 unique", int'(seen1[{p1, z1}]), 0);
        seen1[{p1, z1}] = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
