// Self-checking testbench for toffoli_example.
//
// Checks the published input/output pair (0,1,0) -> (1,0,0), and that the
// circuit is a bijection on the 8 line values (every output occurs once).
// The full truth table is also compared with a table worked out by hand from
// the gate list: inputs 0..7 map to 0, 4, 1, 3, 2, 6, 5, 7 (bit k = line lk).
module tb_toffoli_example;
  int checks = 0;
  int failures = 0;

  logic [2:0] l_in, l_out;
  logic [7:0] seen;
  logic [2:0] expect_tab [8] = '{3'd0, 3'd4, 3'd1, 3'd3, 3'd2, 3'd6, 3'd5, 3'd7};

  toffoli_example dut (.line_i(l_in), .line_o(l_out));

  task automatic check(input string what, input logic [2:0] got, input logic [2:0] exp);
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
    seen = '0;
    // l0 = 0, l1 = 1, l2 = 0  ->  l0 = 1, l1 = 0, l2 = 0
    l_in = 3'b010;
    #1;
    check("published example", l_out, 3'b001);
    for (int v = 0; v < 8; v++) begin
      l_in = v[2:0];
      #1;
      check("truth table", l_out, expect_tab[v]);
      seen[l_out] = 1'b1;
    end
    checks++;
    if (seen != 8'hff) begin
      failures++;
      $display("FAIL not a bijection: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
