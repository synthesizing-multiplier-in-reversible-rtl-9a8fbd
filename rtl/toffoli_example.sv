// Three-line example Toffoli circuit of six gates.
//
// Lines l0, l1, l2 pass through this cascade (gate: control(s) -> target):
//   1. l2 -> l0         (CNOT)
//   2. l0 -> l1         (CNOT)
//   3. l0, l1 -> l2     (C2NOT)
//   4. l1 -> l0         (CNOT)
//   5. l0 -> l1         (CNOT)
//   6. l2 -> l1         (CNOT)
// Cost: 3 lines, 6 gates, quantum cost 10, transistor cost 56. Input
// (l0, l1, l2) = (0, 1, 0) gives (1, 0, 0). It shows how an MCT cascade is
// built and costed; every gate is one toffoli_gate instance.
// Interface: line_i[0..2] in, line_o[0..2] out, bit k = line lk. Combinational.
module toffoli_example (
  input  logic [2:0] line_i,
  output logic [2:0] line_o
);
  logic [2:0] s1, s2, s3, s4, s5;

  toffoli_gate #(.W(3), .CTRL(3'b100), .TGT(0)) u_g1 (.line_i(line_i), .line_o(s1));
  toffoli_gate #(.W(3), .CTRL(3'b001), .TGT(1)) u_g2 (.line_i(s1), .line_o(s2));
  toffoli_gate #(.W(3), .CTRL(3'b011), .TGT(2)) u_g3 (.line_i(s2), .line_o(s3));
  toffoli_gate #(.W(3), .CTRL(3'b010), .TGT(0)) u_g4 (.line_i(s3), .line_o(s4));
  toffoli_gate #(.W(3), .CTRL(3'b001), .TGT(1)) u_g5 (.line_i(s4), .line_o(s5));
  toffoli_gate #(.W(3), .CTRL(3'b100), .TGT(1)) u_g6 (.line_i(s5), .line_o(line_o));
endmodule
