// Reversible N x N multiplier built from controlled adders (hierarchical method).
//
// The product is the sum of the partial products a_i * b * 2^i. The circuit has
// 4N lines: the factors a and b, and 2N product lines c that must enter as 0.
// Stage 0 is a controlled duplication, c_j ^= a_0 b_j (N C2NOT gates), since
// adding b to an all-zero product is the same as copying it. Stage i (1..N-1)
// is an N-bit adder controlled by a_i that adds b into c[i+N-1:i] and XORs its
// carry into c[N+i], a line still 0 at that point; the lower product bits are
// final and are not touched again, so each stage works on a window shifted by
// one bit. Gate count: 5N^2-9N+5 C2NOT and 2N^2-3N+1 C3NOT.
// Interface: a_i/b_i/c_i in, a_o/b_o/c_o out. With c_i = 0, c_o = a_i * b_i and
// a_o = a_i, b_o = b_i (the factors are restored). Purely combinational.
// The structure (duplication then N-1 controlled adders, the shifted windows,
// the carry into bit N+i) follows the hierarchical method; the adder's gate
// order is this library's (see rev_adder).
module rev_mult_hier #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]   a_i,
  input  logic [N-1:0]   b_i,
  input  logic [2*N-1:0] c_i,
  output logic [N-1:0]   a_o,
  output logic [N-1:0]   b_o,
  output logic [2*N-1:0] c_o
);
  // Product lines after stage 0.
  logic [2*N-1:0] c_s0;

  // Stage 0: controlled duplication of b into c[N-1:0], controlled by a_0
  // (a column of N C2NOT gates on disjoint targets).
  assign c_s0[N-1:0] = c_i[N-1:0] ^ (b_i & {N{a_i[0]}});
  if (N > 1) begin : g_hi
    assign c_s0[2*N-1:N] = c_i[2*N-1:N];
  end else begin : g_hi1
    assign c_s0[1] = c_i[1];
  end

  // Stages 1..N-1: controlled adders on a window shifted by i bits.
  // Each stage keeps its own copy of the lines so that no signal spans stages.
  for (genvar i = 1; i < N; i++) begin : g_stage
    logic [2*N-1:0] c_prev, c_cur;
    logic [N-1:0]   b_prev, b_cur;
    logic [N-1:0]   win_o;
    logic           carry_o;
    if (i == 1) begin : g_first
      assign c_prev = c_s0;
      assign b_prev = b_i;
    end else begin : g_next
      assign c_prev = g_stage[i-1].c_cur;
      assign b_prev = g_stage[i-1].b_cur;
    end
    rev_adder #(.N(N), .CONTROLLED(1'b1)) u_add (
      .ctl(a_i[i]),
      .x_i(b_prev),
      .y_i(c_prev[i+N-1:i]),
      .z_i(c_prev[N+i]),
      .x_o(b_cur),
      .y_o(win_o),
      .z_o(carry_o)
    );
    always_comb begin
      c_cur          = c_prev;
      c_cur[i+N-1:i] = win_o;
      c_cur[N+i]     = carry_o;
    end
  end

  assign a_o = a_i;
  if (N > 1) begin : g_out
    assign b_o = g_stage[N-1].b_cur;
    assign c_o = g_stage[N-1].c_cur;
  end else begin : g_out1
    assign b_o = b_i;
    assign c_o = c_s0;
  end
endmodule
