// Reversible multiplier library, top level.
//
// Four independent circuits stand side by side, each with its own ports:
//   * kara_*  the Karatsuba multiplier (N_MULT bits, turning point T), the
//             scalable construction with the lowest gate and quantum cost at
//             large widths;
//   * hier_*  the hierarchical multiplier (N_MULT bits) made of controlled
//             adders, the construction with the fewest lines (4 * N_MULT);
//   * sub_*   the sub-minimal multiplier specification (N_SUB bits) with its
//             zero indicator and garbage outputs;
//   * ex_*    the three-line example Toffoli circuit.
// The product lines of both multipliers enter as the constant 0 here, so the
// ports present them as ordinary multipliers: p = a * b. The factor lines
// that the circuits hand back unchanged, and the helper lines, stay inside.
// All four are combinational; there is no clock.
// Defaults: 32-bit multipliers and turning point 8, as in the published
// comparison of the two scalable methods (32 bits is one of the practically
// relevant widths it names); N_SUB = 3 is the largest width the sub-minimal
// specification was worked through for.
module rev_mult_top #(
  parameter int unsigned N_MULT = 32,
  parameter int unsigned T      = 8,
  parameter int unsigned N_SUB  = 3,
  localparam int unsigned G_SUB = rev_pkg::submin_garbage(N_SUB),
  localparam int unsigned GW_SUB = (G_SUB > 0) ? G_SUB : 1
) (
  input  logic [N_MULT-1:0]   kara_a,
  input  logic [N_MULT-1:0]   kara_b,
  output logic [2*N_MULT-1:0] kara_p,

  input  logic [N_MULT-1:0]   hier_a,
  input  logic [N_MULT-1:0]   hier_b,
  output logic [2*N_MULT-1:0] hier_p,

  input  logic [N_SUB-1:0]    sub_a,
  input  logic [N_SUB-1:0]    sub_b,
  output logic [2*N_SUB-1:0]  sub_p,
  output logic                sub_zero,
  output logic [GW_SUB-1:0]   sub_garb,

  input  logic [2:0]          ex_i,
  output logic [2:0]          ex_o
);
  logic [N_MULT-1:0] kara_a_o, kara_b_o, hier_a_o, hier_b_o;

  rev_mult_kara #(.N(N_MULT), .T(T)) u_kara (
    .a_i(kara_a), .b_i(kara_b), .c_i('0),
    .a_o(kara_a_o), .b_o(kara_b_o), .c_o(kara_p));

  rev_mult_hier #(.N(N_MULT)) u_hier (
    .a_i(hier_a), .b_i(hier_b), .c_i('0),
    .a_o(hier_a_o), .b_o(hier_b_o), .c_o(hier_p));

  rev_mult_subminimal #(.N(N_SUB)) u_sub (
    .a_i(sub_a), .b_i(sub_b),
    .prod_o(sub_p), .zero_o(sub_zero), .garb_o(sub_garb));

  toffoli_example u_ex (.line_i(ex_i), .line_o(ex_o));
endmodule
