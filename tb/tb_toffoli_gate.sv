// Self-checking testbench for toffoli_gate.
//
// Four gates on 4 lines (NOT, CNOT, C2NOT, C3NOT) are driven with all 16 line
// values. The expected output is computed here from the gate rule: the target
// flips iff every control line is 1, all other lines pass unchanged. Applying a
// gate twice must give back the input (each gate is its own inverse).
module tb_toffoli_gate;
  int checks = 0;
  int failures = 0;

  logic [3:0] l_in;
  logic [3:0] o_not, o_cnot, o_c2, o_c3, o_c3b;

  toffoli_gate #(.W(4), .CTRL(4'b0000), .TGT(2)) u_not  (.line_i(l_in), .line_o(o_not));
  toffoli_gate #(.W(4), .CTRL(4'b0001), .TGT(3)) u_cnot (.line_i(l_in), .line_o(o_cnot));
  toffoli_gate #(.W(4), .CTRL(4'b1010), .TGT(0)) u_c2   (.line_i(l_in), .line_o(o_c2));
  toffoli_gate #(.W(4), .CTRL(4'b1101), .TGT(1)) u_c3   (.line_i(l_in), .line_o(o_c3));
  toffoli_gate #(.W(4), .CTRL(4'b1101), .TGT(1)) u_c3b  (.line_i(o_c3), .line_o(o_c3b));

  task automatic check(input string what, input logic [3:0] got, input logic [3:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: in %b got %b expected %b", what, l_in, got, exp);
    end
  endtask

  initial begin : watchdog
    #10_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      l_in = v[3:0];
      #1;
      check("NOT",   o_not,  {l_in[3], ~l_in[2], l_in[1:0]});
      check("CNOT",  o_cnot, {l_in[3] ^ l_in[0], l_in[2:0]});
      check("C2NOT", o_c2,   {l_in[3:1], l_in[0] ^ (l_in[3] & l_in[1])});
      check("C3NOT", o_c3,   {l_in[3:2], l_in[1] ^ (l_in[3] & l_in[2] & l_in[0]), l_in[0]});
      check("self-inverse", o_c3b, l_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
