// Reversible N x N multiplier by Karatsuba's divide and conquer.
//
// A 2K-bit product is formed from three smaller products: ah*bh, al*bl and
// (ah+al)*(bh+bl), plus additions and subtractions. This module picks the
// construction for its width:
//   * N < T (the turning point): the hierarchical multiplier rev_mult_hier,
//     since for small widths the extra lines of a Karatsuba step do not pay;
//   * N odd: one zero bit is added to each factor and two zero lines to the
//     product, and the (N+1)-bit step is used;
//   * N even (N = 2K): one Karatsuba step, whose three sub-products
//     instantiate rev_mult_kara again at widths K and K+1.
// The turning point rule, the odd-width padding and the recursion follow the
// Karatsuba method; T must be at least 4, since with T <= 3 a 3-bit product
// pads to 4 bits and needs a 3-bit product again. The line and gate counts of
// a configuration are given by rev_pkg::kara_lines() and rev_pkg::kara_count().
//
// One step, with a = ah*2^K + al and b = bh*2^K + bl,
//   a*b = ah*bh*2^2K + ((al+ah)*(bl+bh) - ah*bh - al*bl)*2^K + al*bl,
// runs on the lines a, b, c (product, entering as 0) and the zero-initialised
// helper lines d, e (K+1 each) and f (2K+2):
//   1. c[2K-1:0]  = al*bl           (K-bit multiplier)
//   2. c[4K-1:2K] = ah*bh           (K-bit multiplier)
//   3. d = ah + al                  (copy ah onto d with K CNOTs, then add al)
//   4. e = bh + bl                  (same)
//   5. f = d*e                      ((K+1)-bit multiplier)
//   6. f -= ah*bh, 7. f -= al*bl    (rev_sub: invert f, add, invert)
//   8. c[4K-1:K] += f               (f < 2^(2K+1) here, so its top line is 0)
// The adders are the ancilla-free rev_adder; an adder whose carry line is the
// next-higher target bit forms a modular sum one bit wider than its operand.
// Operands still narrower than the target are widened with P = max(1, K-2)
// shared zero lines, which the adders return as 0. d, e and f end as garbage.
// The decomposition, the order of the steps and the copy-then-add sums follow
// the Karatsuba method; the subtraction by inversion and the widening lines
// are this design's own choices.
// The Verilator linter reports the outputs of the recursive instances
// (al1 .. ch1, f1) as undriven: it does not follow output ports through a
// recursive instantiation. They are driven; simulation at every tested width
// checks the products they carry.
// Interface: a_i/b_i/c_i in, a_o/b_o/c_o out; with c_i = 0, c_o = a_i * b_i
// and the factors come back unchanged. Helper and garbage lines stay inside.
// Purely combinational.
module rev_mult_kara #(
  parameter int unsigned N = 32,
  parameter int unsigned T = 8
) (
  input  logic [N-1:0]   a_i,
  input  logic [N-1:0]   b_i,
  input  logic [2*N-1:0] c_i,
  output logic [N-1:0]   a_o,
  output logic [N-1:0]   b_o,
  output logic [2*N-1:0] c_o
);
  if (T < 4) begin : g_bad_t
    $error("rev_mult_kara: turning point %0d must be at least 4", T);
  end

  if (N < T) begin : g_hier
    rev_mult_hier #(.N(N)) u_hier (
      .a_i(a_i), .b_i(b_i), .c_i(c_i), .a_o(a_o), .b_o(b_o), .c_o(c_o));

  end else if (N % 2 == 1) begin : g_odd
    // Pad to N+1 bits: a_N, b_N, c_2N, c_2N+1 are extra zero lines.
    logic [N:0]     ap_o, bp_o;
    logic [2*N+1:0] cp_o;
    rev_mult_kara #(.N(N + 1), .T(T)) u_even (
      .a_i({1'b0, a_i}), .b_i({1'b0, b_i}), .c_i({2'b00, c_i}),
      .a_o(ap_o), .b_o(bp_o), .c_o(cp_o));
    assign a_o = ap_o[N-1:0];
    assign b_o = bp_o[N-1:0];
    assign c_o = cp_o[2*N-1:0];

  end else begin : g_even
    localparam int unsigned K = N / 2;
    localparam int unsigned P = (K > 3) ? K - 2 : 1;  // zero lines for operand widening

    // Steps 1 and 2: the two half products into the product lines.
    logic [K-1:0]   al1, bl1, ah1, bh1;
    logic [2*K-1:0] cl1, ch1;
    rev_mult_kara #(.N(K), .T(T)) u_lo (
      .a_i(a_i[K-1:0]), .b_i(b_i[K-1:0]), .c_i(c_i[2*K-1:0]),
      .a_o(al1), .b_o(bl1), .c_o(cl1));
    rev_mult_kara #(.N(K), .T(T)) u_hi (
      .a_i(a_i[N-1:K]), .b_i(b_i[N-1:K]), .c_i(c_i[4*K-1:2*K]),
      .a_o(ah1), .b_o(bh1), .c_o(ch1));

    // Steps 3 and 4: d = ah + al, e = bh + bl (copy, then add in place).
    logic [K-1:0] dcopy, ecopy, d_lo, e_lo, al2, bl2;
    logic         d_hi, e_hi;
    // Copy: one CNOT per bit onto the zero lines of d and e.
    assign dcopy = ah1;
    assign ecopy = bh1;
    rev_adder #(.N(K)) u_sum_d (
      .ctl(1'b0), .x_i(al1), .y_i(dcopy), .z_i(1'b0),
      .x_o(al2), .y_o(d_lo), .z_o(d_hi));
    rev_adder #(.N(K)) u_sum_e (
      .ctl(1'b0), .x_i(bl1), .y_i(ecopy), .z_i(1'b0),
      .x_o(bl2), .y_o(e_lo), .z_o(e_hi));

    // Step 5: f = d * e.
    logic [K:0]     d_g, e_g;
    logic [2*K+1:0] f1;
    rev_mult_kara #(.N(K + 1), .T(T)) u_mid (
      .a_i({d_hi, d_lo}), .b_i({e_hi, e_lo}), .c_i('0),
      .a_o(d_g), .b_o(e_g), .c_o(f1));

    // Steps 6 and 7: f -= ch, f -= cl, each as invert, add, invert.
    logic [2*K+1:0] f2, f3;
    logic [2*K-1:0] ch2, cl2;
    logic [P-1:0]   pad1, pad2;
    rev_sub #(.N(2 * K + 1), .M(2 * K), .P(P)) u_sub_h (
      .x_i(ch1), .pad_i('0), .y_i(f1), .x_o(ch2), .pad_o(pad1), .y_o(f2));
    rev_sub #(.N(2 * K + 1), .M(2 * K), .P(P)) u_sub_l (
      .x_i(cl1), .pad_i(pad1), .y_i(f2), .x_o(cl2), .pad_o(pad2), .y_o(f3));

    // Step 8: c[4K-1:K] += f. f < 2^(2K+1) here, so its top line stays 0.
    logic [4*K-1:0] c_mid;
    logic [3*K-2:0] op_o;
    logic [3*K-2:0] win_o;
    logic           top_o;
    assign c_mid = {ch2, cl2};
    if (K > 2) begin : g_wide
      rev_adder #(.N(3 * K - 1)) u_add (
        .ctl(1'b0), .x_i({pad2[K-3:0], f3[2*K:0]}), .y_i(c_mid[4*K-2:K]),
        .z_i(c_mid[4*K-1]), .x_o(op_o), .y_o(win_o), .z_o(top_o));
    end else begin : g_narrow
      rev_adder #(.N(3 * K - 1)) u_add (
        .ctl(1'b0), .x_i(f3[2*K:0]), .y_i(c_mid[4*K-2:K]),
        .z_i(c_mid[4*K-1]), .x_o(op_o), .y_o(win_o), .z_o(top_o));
    end

    assign a_o = {ah1, al2};
    assign b_o = {bh1, bl2};
    assign c_o = {top_o, win_o, c_mid[K-1:0]};
  end
endmodule
