// In-place reversible adder without ancilla lines.
//
// Computes y := (y + x) mod 2^N and z := z ^ carry_out, leaving x unchanged.
// Because the carry is XORed into z, an adder whose z line holds bit N of the
// target acts as an (N+1)-bit modular adder of an N-bit operand; the
// multipliers use it that way. The cascade has 7N-6 gates (5N-5 CNOT and
// 2N-1 C2NOT for N >= 2): the carries are rippled into the x lines, added to y
// and then uncomputed, so no helper line is needed. With CONTROLLED = 1 the
// line ctl is added as a control to every gate (a controlled increaser: the sum
// is formed only when ctl = 1) and the gates become C2NOT and C3NOT.
// The gate counts and the ancilla-free property are the ones the multiplier
// construction relies on; the exact gate order is the well-known ripple adder
// that meets those counts, chosen here.
// The cascade is written phase by phase, in the gate order of the list
// rev_pkg::ttk_gate() that the cost functions count: gates on disjoint lines
// are applied together as one vector operation, and the phases whose gates
// form a chain are written as loops over the bits.
// Interface: x_i/x_o, y_i/y_o (N lines each), z_i/z_o (1 line), ctl (control
// line, read only, since a control line leaves the circuit unchanged).
// Purely combinational.
module rev_adder #(
  parameter int unsigned N          = 32,
  parameter bit          CONTROLLED = 1'b0
) (
  input  logic         ctl,
  input  logic [N-1:0] x_i,
  input  logic [N-1:0] y_i,
  input  logic         z_i,
  output logic [N-1:0] x_o,
  output logic [N-1:0] y_o,
  output logic         z_o
);
  // Every gate of a controlled adder also carries the control line.
  logic en;
  assign en = CONTROLLED ? ctl : 1'b1;

  if (N == 1) begin : g_one
    // z ^= x0 y0, then y0 ^= x0.
    assign x_o = x_i;
    assign z_o = z_i ^ (en & x_i[0] & y_i[0]);
    assign y_o = y_i ^ (en & x_i);

  end else begin : g_many
    logic [N-1:0] x1, x2, x3, x4;
    logic [N-1:0] y1, y2, y3;
    logic         z1, z2;

    always_comb begin
      // Phase 1: y_i ^= x_i, i = 1..N-1 (CNOT column).
      y1 = y_i ^ ({x_i[N-1:1], 1'b0} & {N{en}});
      // Phase 2: z ^= x_{N-1}; x_{i+1} ^= x_i for i = N-2 down to 1. In
      // descending order every gate reads a line not yet changed.
      z1 = z_i ^ (en & x_i[N-1]);
      x1 = x_i;
      for (int i = N - 2; i >= 1; i--) x1[i+1] = x1[i+1] ^ (en & x1[i]);
      // Phase 3: x_{i+1} ^= x_i y_i, i = 0..N-2 (ripples the carries), then
      // z ^= x_{N-1} y_{N-1}.
      x2 = x1;
      for (int i = 0; i <= N - 2; i++) x2[i+1] = x2[i+1] ^ (en & x2[i] & y1[i]);
      z2 = z1 ^ (en & x2[N-1] & y1[N-1]);
      // Phase 4: for i = N-1 down to 1: y_i ^= x_i, then x_i ^= x_{i-1} y_{i-1}.
      y2 = y1;
      x3 = x2;
      for (int i = N - 1; i >= 1; i--) begin
        y2[i] = y2[i] ^ (en & x3[i]);
        x3[i] = x3[i] ^ (en & x3[i-1] & y2[i-1]);
      end
      // Phase 5: x_{i+1} ^= x_i, i = 1..N-2 (CNOT chain).
      x4 = x3;
      for (int i = 1; i <= N - 2; i++) x4[i+1] = x4[i+1] ^ (en & x4[i]);
      // Phase 6: y_i ^= x_i for all i (CNOT column).
      y3 = y2 ^ (x4 & {N{en}});
    end

    assign x_o = x4;
    assign y_o = y3;
    assign z_o = z2;
  end
endmodule
