// Sub-minimal embedding of an N x N multiplier.
//
// Embedding the (irreversible) product into a reversible function needs
// ceil(log2(mu)) garbage outputs, mu being how often the most frequent output
// pattern occurs. For a multiplier that pattern is zero (2^(N+1)-1 times). This
// block implements the adjusted specification that removes it: a separate
// indicator output zero_o is 1 iff a*b = 0, and in that case the primary
// outputs are free and carry the inputs themselves, {a, b}; otherwise they carry
// the product. The garbage outputs garb_o then only need to tell apart the
// factor pairs of the most frequent non-zero product: garb_o is the rank of a
// among the factors a' < a for which a' * b' = a*b with some N-bit b'. The map
// (a, b) -> {prod_o, zero_o, garb_o} is injective, so the function occupies
// 2N + 1 + G lines (9 for N = 3, against 10 for the conventional embedding).
// G = ceil(log2(max multiplicity of a non-zero product)) is computed at
// elaboration; when it is 0 (N = 1) garb_o keeps one line that is always 0.
// This is the specification, written as combinational logic; the Toffoli
// cascade that a truth-table synthesis tool would derive from it is not part
// of this design. The indicator, the {a, b} placement for zero products and the
// garbage count follow the method; the rank encoding of the garbage is this
// design's choice. Meant for small N (the logic grows as 4^N).
// Interface: a_i, b_i (N each) in; prod_o (2N), zero_o, garb_o (max(G,1)) out.
module rev_mult_subminimal #(
  parameter int unsigned  N  = 3,
  localparam int unsigned G  = rev_pkg::submin_garbage(N),
  localparam int unsigned GW = (G > 0) ? G : 1
) (
  input  logic [N-1:0]   a_i,
  input  logic [N-1:0]   b_i,
  output logic [2*N-1:0] prod_o,
  output logic           zero_o,
  output logic [GW-1:0]  garb_o
);
  localparam int unsigned MAXF = (1 << N) - 1;

  logic [2*N-1:0] prod;
  logic [GW-1:0]  rank;

  assign prod = (2 * N)'(a_i) * (2 * N)'(b_i);

  // Rank of a among the smaller factors of the same product.
  always_comb begin
    rank = '0;
    for (int unsigned a2 = 1; a2 <= MAXF; a2++)
      for (int unsigned b2 = 1; b2 <= MAXF; b2++)
        if (a2 < 32'(a_i) && (2 * N)'(a2 * b2) == prod) rank = rank + 1'b1;
  end

  always_comb begin
    zero_o = (prod == '0);
    prod_o = zero_o ? {a_i, b_i} : prod;
    garb_o = zero_o ? '0 : rank;
  end
endmodule
