// Self-checking testbench for rev_mult_kara.
//
// Products are compared with the '*' operator of the simulator, and the factor
// lines must come back unchanged. Coverage:
//   N = 4, T = 4   exhaustive (one Karatsuba step over 2- and 3-bit hierarchical parts)
//   N = 5, T = 4   exhaustive (odd width, padded to 6, two Karatsuba levels)
//   N = 8, T = 8   exhaustive (the smallest width above the turning point)
//   N = 32, T = 8  default parameters, random and corner vectors (recursion
//                  32 -> 16 -> 8, with the odd 9- and 17-bit middle products)
// The line count, gate count, quantum cost and transistor cost of each size are
// printed. The multipliers are combinational; a 1 ns step separates vectors.
module tb_rev_mult_kara;
  import rev_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [3:0]  a4, b4, a4o, b4o;
  logic [7:0]  c4o;
  logic [4:0]  a5, b5, a5o, b5o;
  logic [9:0]  c5o;
  logic [7:0]  a8, b8, a8o, b8o;
  logic [15:0] c8o;
  logic [31:0] a32, b32, a32o, b32o;
  logic [63:0] c32o;

  rev_mult_kara #(.N(4), .T(4)) u4 (
    .a_i(a4), .b_i(b4), .c_i('0), .a_o(a4o), .b_o(b4o), .c_o(c4o));
  rev_mult_kara #(.N(5), .T(4)) u5 (
    .a_i(a5), .b_i(b5), .c_i('0), .a_o(a5o), .b_o(b5o), .c_o(c5o));
  rev_mult_kara #(.N(8), .T(8)) u8 (
    .a_i(a8), .b_i(b8), .c_i('0), .a_o(a8o), .b_o(b8o), .c_o(c8o));
  rev_mult_kara u32 (
    .a_i(a32), .b_i(b32), .c_i('0), .a_o(a32o), .b_o(b32o), .c_o(c32o));

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h", what, got, exp);
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
    a4 = '0; b4 = '0; a5 = '0; b5 = '0; a32 = '0; b32 = '0;
    for (int v = 0; v < 2 ** 16; v++) begin
      {a8, b8} = v[15:0];
      {a4, b4} = v[7:0];
      {a5, b5} = v[9:0];
      #1;
      check("n8 c", 64'(c8o), 64'(a8) * 64'(b8));
      check("n8 a", 64'(a8o), 64'(a8));
      check("n8 b", 64'(b8o), 64'(b8));
      if (v < 2 ** 10) begin
        check("n5 c", 64'(c5o), 64'(a5) * 64'(b5));
        check("n5 ab", {a5o, b5o}, {a5, b5});
      end
      if (v < 2 ** 8) begin
        check("n4 c", 64'(c4o), 64'(a4) * 64'(b4));
        check("n4 ab", {a4o, b4o}, {a4, b4});
      end
    end
    for (int v = 0; v < 20000; v++) begin
      a32 = $urandom;
      b32 = $urandom;
      case (v)
        0: begin a32 = '1; b32 = '1; end
        1: begin a32 = '1; b32 = 32'd1; end
        2: begin a32 = 32'h8000_0000; b32 = 32'h8000_0000; end
        3: begin a32 = 32'hffff_0000; b32 = 32'h0000_ffff; end
        4: begin a32 = '0; b32 = '1; end
        default: ;
      endcase
      #1;
      check("n32 c", c32o, 64'(a32) * 64'(b32));
      check("n32 ab", {a32o, b32o}, {a32, b32});
    end
    for (int n = 8; n <= 1024; n *= 2)
      $display("Karatsuba T=8 N=%0d: lines=%0d gates=%0d qc=%0d tc=%0d", n,
               kara_lines(n, 8), kara_gc(n, 8), kara_qc(n, 8), kara_tc(n, 8));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
