// End-to-end testbench for rev_mult_top at its default parameters
// (32-bit Karatsuba and hierarchical multipliers, turning point 8, 3-bit
// sub-minimal specification, example circuit).
//
// Both multipliers get the same random and corner factors and must return the
// exact 64-bit product. The sub-minimal specification is swept over all 64
// input pairs and checked for the zero indicator, the primary outputs and
// injectivity. The example circuit is checked on the published vector.
// Each mechanism of the design is counted and must occur at least once:
//   carry into the top product line of either multiplier (p[63] = 1),
//   a zero factor (product 0), the zero indicator of the sub-minimal
//   specification, a non-zero garbage output there (two factor pairs with
//   the same product told apart).
module tb_rev_mult_top;
  int checks = 0;
  int failures = 0;

  logic [31:0] ka, kb, ha, hb;
  logic [63:0] kp, hp;
  logic [2:0]  sa, sb;
  logic [5:0]  sp;
  logic        sz;
  logic [1:0]  sg;
  logic [2:0]  ex_i, ex_o;

  rev_mult_top dut (
    .kara_a(ka), .kara_b(kb), .kara_p(kp),
    .hier_a(ha), .hier_b(hb), .hier_p(hp),
    .sub_a(sa), .sub_b(sb), .sub_p(sp), .sub_zero(sz), .sub_garb(sg),
    .ex_i(ex_i), .ex_o(ex_o));

  int n_top_k = 0, n_top_h = 0, n_zero_factor = 0, n_sub_zero = 0, n_sub_garb = 0;
  logic seen [512];

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] exp;
    foreach (seen[i]) seen[i] = 1'b0;
    sa = '0; sb = '0; ex_i = '0;
    for (int v = 0; v < 5000; v++) begin
      ka = $urandom;
      kb = $urandom;
      case (v)
        0: begin ka = '1; kb = '1; end
        1: begin ka = '0; kb = $urandom; end
        2: begin ka = 32'hdead_beef; kb = '0; end
        3: begin ka = 32'h8000_0000; kb = 32'hffff_ffff; end
        default: ;
      endcase
      ha = ka;
      hb = kb;
      #1;
      exp = 64'(ka) * 64'(kb);
      check("karatsuba product", kp, exp);
      check("hierarchical product", hp, exp);
      if (kp[63]) n_top_k++;
      if (hp[63]) n_top_h++;
      if (ka == 0 || kb == 0) n_zero_factor++;
    end
    for (int v = 0; v < 64; v++) begin
      int prod;
      {sa, sb} = v[5:0];
      #1;
      prod = int'(sa) * int'(sb);
      check("sub-minimal zero indicator", 64'(sz), 64'(prod == 0));
      check("sub-minimal primary outputs", 64'(sp), (prod == 0) ? 64'({sa, sb}) : 64'(prod));
      check("sub-minimal injective", 64'(seen[{sp, sz, sg}]), 64'(0));
      seen[{sp, sz, sg}] = 1'b1;
      if (sz) n_sub_zero++;
      if (!sz && sg != 0) n_sub_garb++;
    end
    ex_i = 3'b010;
    #1;
    check("example circuit", 64'(ex_o), 64'(3'b001));
    $display("mechanisms: karatsuba top carry %0d, hierarchical top carry %0d, zero factor %0d, sub-minimal zero indicator %0d, sub-minimal garbage in use %0d",
             n_top_k, n_top_h, n_zero_factor, n_sub_zero, n_sub_garb);
    if (n_top_k == 0 || n_top_h == 0 || n_zero_factor == 0 || n_sub_zero == 0 || n_sub_garb == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
