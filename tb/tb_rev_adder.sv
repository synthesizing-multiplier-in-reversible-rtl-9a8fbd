// Self-checking testbench for rev_adder.
//
// Checks, exhaustively for N = 2 and N = 4 (controlled and uncontrolled) and
// with random vectors at the default N = 32 (uncontrolled):
//   y_o = y_i + x_i (mod 2^N) when enabled, y unchanged when a controlled
//   adder sees ctl = 0,
//   z_o = z_i ^ carry out, x_o = x_i.
// It also checks the gate counts of the cascade: 5N-5 CNOT and 2N-1 C2NOT for
// the uncontrolled adder, and for N = 4 compares every output with the gate
// list rev_pkg::ttk_gate() applied one gate at a time (with the control line
// added to each gate for the controlled adder). The adder is combinational; a 1 ns step separates
// the vectors. A watchdog ends the run if it does not finish.
module tb_rev_adder;
  import rev_pkg::*;

  int checks = 0;
  int failures = 0;

  logic       ctl2, ctl4, ctl4u, ctl32;
  logic [1:0] x2, y2, x2o, y2o;
  logic       z2, z2o;
  logic [3:0] x4, y4, x4o, y4o, x4u, y4u, x4uo, y4uo;
  logic       z4, z4o, z4u, z4uo;
  logic [31:0] x32, y32, x32o, y32o;
  logic        z32, z32o;

  rev_adder #(.N(2), .CONTROLLED(1'b1)) u2 (
    .ctl(ctl2), .x_i(x2), .y_i(y2), .z_i(z2), .x_o(x2o), .y_o(y2o), .z_o(z2o));
  rev_adder #(.N(4), .CONTROLLED(1'b1)) u4 (
    .ctl(ctl4), .x_i(x4), .y_i(y4), .z_i(z4), .x_o(x4o), .y_o(y4o), .z_o(z4o));
  rev_adder #(.N(4), .CONTROLLED(1'b0)) u4u (
    .ctl(ctl4u), .x_i(x4u), .y_i(y4u), .z_i(z4u), .x_o(x4uo), .y_o(y4uo), .z_o(z4uo));
  rev_adder u32 (
    .ctl(ctl32), .x_i(x32), .y_i(y32), .z_i(z32), .x_o(x32o), .y_o(y32o), .z_o(z32o));

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // Lines {ctl, z, y, x} after applying the N = 4 gate list gate by gate.
  function automatic logic [9:0] gate_model(logic [9:0] v, bit controlled);
    mct_t g;
    logic fire;
    for (int k = 0; k < ttk_len(4); k++) begin
      g = ttk_gate(4, k);
      fire = 1'b1;
      if (g.c0 != NONE) fire &= v[g.c0];
      if (g.c1 != NONE) fire &= v[g.c1];
      if (controlled) fire &= v[9];
      v[g.t] ^= fire;
    end
    return v;
  endfunction

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0]  s4;
    logic [2:0]  s2;
    logic [32:0] s32;
    ctl4u = 1'b0;  // unused by the uncontrolled adder
    ctl32 = 1'b1;
    x32 = '0; y32 = '0; z32 = 1'b0;
    // gate counts
    for (int n = 2; n <= 64; n++) begin
      check("CNOT count", adder_count(n, 1), 5 * n - 5);
      check("C2NOT count", adder_count(n, 2), 2 * n - 1);
    end
    // exhaustive small widths
    for (int v = 0; v < 2 ** 10; v++) begin
      {ctl4, z4, x4, y4} = v[9:0];
      {ctl2, z2, x2, y2} = v[5:0];
      {z4u, x4u, y4u}    = v[8:0];
      #1;
      check("u4 gate list", {ctl4, z4o, y4o, x4o}, gate_model({ctl4, z4, y4, x4}, 1'b1));
      check("u4u gate list", {z4uo, y4uo, x4uo}, 9'(gate_model({1'b0, z4u, y4u, x4u}, 1'b0)));
      s4 = {1'b0, x4} + {1'b0, y4};
      check("u4 x", x4o, x4);
      check("u4 y", y4o, ctl4 ? s4[3:0] : y4);
      check("u4 z", z4o, ctl4 ? z4 ^ s4[4] : z4);
      s2 = {1'b0, x2} + {1'b0, y2};
      check("u2 x", x2o, x2);
      check("u2 y", y2o, ctl2 ? s2[1:0] : y2);
      check("u2 z", z2o, ctl2 ? z2 ^ s2[2] : z2);
      s4 = {1'b0, x4u} + {1'b0, y4u};
      check("u4u x", x4uo, x4u);
      check("u4u y", y4uo, s4[3:0]);
      check("u4u z", z4uo, z4u ^ s4[4]);
    end
    // random full width
    for (int v = 0; v < 2000; v++) begin
      x32 = $urandom; y32 = $urandom; z32 = 1'($urandom); ctl32 = 1'($urandom);
      if (v < 4) begin x32 = '1; y32 = 32'(v); end
      #1;
      s32 = {1'b0, x32} + {1'b0, y32};
      check("u32 x", x32o, x32);
      check("u32 y", y32o, s32[31:0]);
      check("u32 z", z32o, z32 ^ s32[32]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
