// Reversible in-place subtractor y := (y - x) mod 2^(N+1).
//
// The operand x has M <= N lines and is widened to N lines with N-M of the P
// zero lines pad_i (P >= N-M); the subtraction is formed as ~(~y + x): the
// N+1 target lines are inverted (NOT gates), the ancilla-free rev_adder adds
// the widened x into y[N-1:0] with its carry line on y[N], and the target is
// inverted again. x and the zero lines are returned unchanged.
// Used by the Karatsuba multiplier to remove the two outer partial products
// from the middle product; the inversion trick is this design's choice.
// Interface: x_i/x_o (M), pad_i/pad_o (P), y_i/y_o (N+1). Combinational.
module rev_sub #(
  parameter int unsigned N = 9,
  parameter int unsigned M = 8,
  parameter int unsigned P = 1
) (
  input  logic [M-1:0] x_i,
  input  logic [P-1:0] pad_i,
  input  logic [N:0]   y_i,
  output logic [M-1:0] x_o,
  output logic [P-1:0] pad_o,
  output logic [N:0]   y_o
);
  if (M > N || N - M > P) begin : g_bad
    $error("rev_sub: cannot widen %0d lines to %0d with %0d zero lines", M, N, P);
  end

  logic [N:0]   y_inv, y_sum;
  logic [N-1:0] op_i, op_o;

  // Invert the target lines (a column of NOT gates).
  assign y_inv = ~y_i;

  if (N > M) begin : g_widen
    assign op_i = {pad_i[N-M-1:0], x_i};
    assign x_o  = op_o[M-1:0];
    if (P > N - M) begin : g_rest
      assign pad_o = {pad_i[P-1:N-M], op_o[N-1:M]};
    end else begin : g_all
      assign pad_o = op_o[N-1:M];
    end
  end else begin : g_same
    assign op_i  = x_i;
    assign x_o   = op_o;
    assign pad_o = pad_i;
  end

  rev_adder #(.N(N)) u_add (
    .ctl(1'b0), .x_i(op_i), .y_i(y_inv[N-1:0]), .z_i(y_inv[N]),
    .x_o(op_o), .y_o(y_sum[N-1:0]), .z_o(y_sum[N]));

  // Invert them back.
  assign y_o = ~y_sum;
endmodule
