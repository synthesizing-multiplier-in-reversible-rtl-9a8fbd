// Multiple-control Toffoli gate over W lines.
//
// The gate passes every line through unchanged except the target line TGT,
// which is inverted when all lines selected by the mask CTRL are 1. With an
// empty mask it is a NOT gate, with one control a CNOT, with k controls a
// C^k NOT. The gate is its own inverse, so any cascade of them is reversible.
// Interface: line_i (W lines in), line_o (W lines out). Purely combinational.
// The gate definition follows the standard MCT gate; the mask-and-index
// parameterisation is this library's choice.
module toffoli_gate #(
  parameter int unsigned   W    = 3,
  parameter logic [W-1:0]  CTRL = '0,
  parameter int unsigned   TGT  = 0
) (
  input  logic [W-1:0] line_i,
  output logic [W-1:0] line_o
);
  if (TGT >= W) begin : g_bad_tgt
    $error("toffoli_gate: target %0d outside %0d lines", TGT, W);
  end else if (CTRL[TGT]) begin : g_bad_ctrl
    $error("toffoli_gate: target %0d is also a control", TGT);
  end

  logic fire;
  assign fire = &(line_i | ~CTRL);

  always_comb begin
    line_o      = line_i;
    line_o[TGT] = line_i[TGT] ^ fire;
  end
endmodule
