// Self-checking testbench for rev_mult_hier.
//
// Function: exhaustive for N = 1, 2, 3 and 8, random and corner vectors at the
// default N = 32. The product lines enter as 0; c_o must equal a*b and the
// factor lines must come back unchanged.
// Cost: line count, gate count, quantum cost and transistor cost of the
// construction (counted from the adder's gate list) are compared with the
// published figures for the hierarchical multiplier at widths 1..1024.
// The circuit is combinational; a 1 ns step separates vectors.
module tb_rev_mult_hier;
  import rev_pkg::*;

  int checks = 0;
  int failures = 0;

  logic        a1, b1, a1o, b1o;
  logic [1:0]  c1o;
  logic [1:0]  a2, b2, a2o, b2o;
  logic [3:0]  c2o;
  logic [2:0]  a3, b3, a3o, b3o;
  logic [5:0]  c3o;
  logic [7:0]  a8, b8, a8o, b8o;
  logic [15:0] c8o;
  logic [31:0] a32, b32, a32o, b32o;
  logic [63:0] c32o;

  rev_mult_hier #(.N(1)) u1 (.a_i(a1), .b_i(b1), .c_i('0), .a_o(a1o), .b_o(b1o), .c_o(c1o));
  rev_mult_hier #(.N(2)) u2 (.a_i(a2), .b_i(b2), .c_i('0), .a_o(a2o), .b_o(b2o), .c_o(c2o));
  rev_mult_hier #(.N(3)) u3 (.a_i(a3), .b_i(b3), .c_i('0), .a_o(a3o), .b_o(b3o), .c_o(c3o));
  rev_mult_hier #(.N(8)) u8 (.a_i(a8), .b_i(b8), .c_i('0), .a_o(a8o), .b_o(b8o), .c_o(c8o));
  rev_mult_hier u32 (.a_i(a32), .b_i(b32), .c_i('0), .a_o(a32o), .b_o(b32o), .c_o(c32o));

  // Published costs: width, LC, GC, QC, TC.
  typedef struct {
    int n;
    int lc;
    int gc;
    int qc;
    int tc;
  } cost_t;
  cost_t table_iv [12] = '{
    '{1, 4, 1, 5, 16},
    '{2, 8, 10, 74, 184},
    '{3, 12, 33, 245, 608},
    '{4, 16, 70, 518, 1288},
    '{8, 32, 358, 2630, 6568},
    '{16, 64, 1606, 11750, 29416},
    '{32, 128, 6790, 49574, 124264},
    '{64, 256, 27910, 203558, 510568},
    '{128, 512, 113158, 824870, 2069608},
    '{256, 1024, 455686, 3320870, 8333416},
    '{512, 2048, 1828870, 13326374, 33443944},
    '{1024, 4096, 7327750, 53391398, 133996648}
  };

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a32 = '0; b32 = '0;
    foreach (table_iv[i]) begin
      check($sformatf("LC n=%0d", table_iv[i].n), 64'(hier_lines(table_iv[i].n)), 64'(table_iv[i].lc));
      check($sformatf("GC n=%0d", table_iv[i].n), 64'(hier_gc(table_iv[i].n)), 64'(table_iv[i].gc));
      check($sformatf("QC n=%0d", table_iv[i].n), 64'(hier_qc(table_iv[i].n)), 64'(table_iv[i].qc));
      check($sformatf("TC n=%0d", table_iv[i].n), 64'(hier_tc(table_iv[i].n)), 64'(table_iv[i].tc));
    end
    for (int v = 0; v < 2 ** 16; v++) begin
      {a8, b8} = v[15:0];
      {a3, b3} = v[5:0];
      {a2, b2} = v[3:0];
      {a1, b1} = v[1:0];
      #1;
      check("n8 c", 64'(c8o), 64'(a8) * 64'(b8));
      check("n8 ab", 64'({a8o, b8o}), 64'({a8, b8}));
      if (v < 64) begin
        check("n3 c", 64'(c3o), 64'(a3) * 64'(b3));
        check("n3 ab", 64'({a3o, b3o}), 64'({a3, b3}));
      end
      if (v < 16) begin
        check("n2 c", 64'(c2o), 64'(a2) * 64'(b2));
        check("n2 ab", 64'({a2o, b2o}), 64'({a2, b2}));
      end
      if (v < 4) begin
        check("n1 c", 64'(c1o), 64'(a1 & b1));
        check("n1 ab", 64'({a1o, b1o}), 64'({a1, b1}));
      end
    end
    for (int v = 0; v < 20000; v++) begin
      a32 = $urandom;
      b32 = $urandom;
      if (v == 0) begin a32 = '1; b32 = '1; end
      if (v == 1) begin a32 = 32'h8000_0001; b32 = '1; end
      #1;
      check("n32 c", c32o, 64'(a32) * 64'(b32));
      check("n32 ab", {a32o, b32o}, {a32, b32});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
