// Shared types and elaboration-time functions for the reversible multipliers.
//
// Every circuit in this library is a cascade of multiple-control Toffoli (MCT)
// gates over a set of lines. A gate is described by mct_t: up to three control
// line indices (-1 = unused) and one target line index. Indices are local to the
// module that owns the cascade.
//
// The package holds three kinds of function:
//   * ttk_gate()      - the gate list of the in-place adder without ancilla lines
//                       (7n-6 gates: 5n-5 CNOT and 2n-1 C2NOT, the published cost
//                       of this adder);
//   * *_count()       - number of gates with a given number of controls in each
//                       construction, obtained by walking the same gate lists and
//                       composition rules the modules use;
//   * *_lines(), qc(), tc() - line count, quantum cost and transistor cost.
// Quantum cost per gate follows the usual table for 0..3 controls (1, 1, 5, 13);
// transistor cost is 8 per control line. No gate in this library has more than
// three controls, so the larger table entries are not needed.
package rev_pkg;

  typedef struct packed {
    int c0;  // first control line, -1 if none
    int c1;  // second control line, -1 if none
    int c2;  // third control line, -1 if none
    int t;   // target line
  } mct_t;

  localparam int NONE = -1;

  function automatic mct_t mk(int c0, int c1, int t);
    mct_t g;
    g.c0 = c0;
    g.c1 = c1;
    g.c2 = NONE;
    g.t  = t;
    return g;
  endfunction

  function automatic int nctl(mct_t g);
    return int'(g.c0 != NONE) + int'(g.c1 != NONE) + int'(g.c2 != NONE);
  endfunction

  // Number of gates of the n-bit adder.
  function automatic int ttk_len(int n);
    return (n == 1) ? 2 : 7 * n - 6;
  endfunction

  // Gate g of the n-bit adder y := y + x, z := z ^ carry_out.
  // Line layout: x[i] = i, y[i] = n + i, z = 2n.
  // Six phases: (1) y_i ^= x_i, i = 1..n-1; (2) z ^= x_{n-1}, then
  // x_{i+1} ^= x_i for i = n-2 down to 1; (3) ripple the carries into the x
  // lines, x_{i+1} ^= x_i y_i, and finally z ^= x_{n-1} y_{n-1}; (4) for i = n-1
  // down to 1, y_i ^= x_i then x_i ^= x_{i-1} y_{i-1} (uncomputes the carry);
  // (5) x_{i+1} ^= x_i for i = 1..n-2; (6) y_i ^= x_i for all i.
  function automatic mct_t ttk_gate(int n, int g);
    int x, y, z, i;
    x = 0;
    y = n;
    z = 2 * n;
    if (n == 1) begin
      if (g == 0) return mk(x, y, z);
      return mk(x, NONE, y);
    end
    // phase 1
    if (g < n - 1) begin
      i = g + 1;
      return mk(x + i, NONE, y + i);
    end
    g -= n - 1;
    // phase 2
    if (g < n - 1) begin
      if (g == 0) return mk(x + n - 1, NONE, z);
      i = n - 1 - g;  // n-2 down to 1
      return mk(x + i, NONE, x + i + 1);
    end
    g -= n - 1;
    // phase 3
    if (g < n) begin
      if (g == n - 1) return mk(x + n - 1, y + n - 1, z);
      i = g;
      return mk(x + i, y + i, x + i + 1);
    end
    g -= n;
    // phase 4
    if (g < 2 * (n - 1)) begin
      i = n - 1 - g / 2;  // n-1 down to 1
      if (g % 2 == 0) return mk(x + i, NONE, y + i);
      return mk(x + i - 1, y + i - 1, x + i);
    end
    g -= 2 * (n - 1);
    // phase 5
    if (g < n - 2) begin
      i = g + 1;
      return mk(x + i, NONE, x + i + 1);
    end
    g -= n - 2;
    // phase 6
    i = g;
    return mk(x + i, NONE, y + i);
  endfunction

  // Gates with k controls in the uncontrolled n-bit adder.
  function automatic int adder_count(int n, int k);
    int cnt;
    cnt = 0;
    for (int g = 0; g < ttk_len(n); g++)
      if (nctl(ttk_gate(n, g)) == k) cnt++;
    return cnt;
  endfunction

  // Hierarchical multiplier: a controlled duplication (n C2NOT gates) followed by
  // n-1 controlled adders, each gate of which carries one more control.
  function automatic int hier_count(int n, int k);
    int cnt;
    cnt = (k == 2) ? n : 0;
    if (n > 1 && k >= 1) cnt += (n - 1) * adder_count(n, k - 1);
    return cnt;
  endfunction

  function automatic int hier_lines(int n);
    return 4 * n;
  endfunction

  // Zero-initialised helper lines used to widen operands of the adders in one
  // Karatsuba step with half width k.
  function automatic int kara_pad(int k);
    return (k - 2 > 1) ? k - 2 : 1;
  endfunction

  // Karatsuba multiplier with turning point t (hierarchical below t).
  function automatic int kara_count(int n, int t, int k);
    int h, cnt;
    if (n < t) return hier_count(n, k);
    if (n % 2 == 1) return kara_count(n + 1, t, k);
    h = n / 2;
    cnt = 2 * kara_count(h, t, k) + kara_count(h + 1, t, k);
    // two sums: copy (h CNOT) then add (h-bit adder)
    cnt += 2 * adder_count(h, k);
    if (k == 1) cnt += 2 * h;
    // two subtractions: invert f (2h+2 NOT), add, invert f again
    cnt += 2 * adder_count(2 * h + 1, k);
    if (k == 0) cnt += 2 * 2 * (2 * h + 2);
    // shifted addition of f into the product
    cnt += adder_count(3 * h - 1, k);
    return cnt;
  endfunction

  function automatic int kara_lines(int n, int t);
    int h;
    if (n < t) return hier_lines(n);
    if (n % 2 == 1) return kara_lines(n + 1, t);
    h = n / 2;
    return 4 * n                                  // a, b, product
         + 2 * (h + 1) + (2 * h + 2)              // d, e, f
         + kara_pad(h)                            // operand padding
         + 2 * (kara_lines(h, t) - 4 * h)         // helpers of the half products
         + (kara_lines(h + 1, t) - 4 * (h + 1));  // helpers of d*e
  endfunction

  // Cost of one gate with k controls.
  function automatic int gate_qc(int k);
    case (k)
      0, 1:    return 1;
      2:       return 5;
      default: return 13;
    endcase
  endfunction

  function automatic int gate_tc(int k);
    return 8 * k;
  endfunction

  function automatic int hier_gc(int n);
    int s;
    s = 0;
    for (int k = 0; k <= 3; k++) s += hier_count(n, k);
    return s;
  endfunction

  function automatic int hier_qc(int n);
    int s;
    s = 0;
    for (int k = 0; k <= 3; k++) s += hier_count(n, k) * gate_qc(k);
    return s;
  endfunction

  function automatic int hier_tc(int n);
    int s;
    s = 0;
    for (int k = 0; k <= 3; k++) s += hier_count(n, k) * gate_tc(k);
    return s;
  endfunction

  function automatic int kara_gc(int n, int t);
    int s;
    s = 0;
    for (int k = 0; k <= 3; k++) s += kara_count(n, t, k);
    return s;
  endfunction

  function automatic int kara_qc(int n, int t);
    int s;
    s = 0;
    for (int k = 0; k <= 3; k++) s += kara_count(n, t, k) * gate_qc(k);
    return s;
  endfunction

  function automatic int kara_tc(int n, int t);
    int s;
    s = 0;
    for (int k = 0; k <= 3; k++) s += kara_count(n, t, k) * gate_tc(k);
    return s;
  endfunction

  // Garbage outputs of the sub-minimal multiplier embedding: ceil(log2) of the
  // largest number of factor pairs (a, b), both non-zero and n bits wide, that
  // share one product.
  function automatic int submin_garbage(int n);
    int maxf, best, cnt;
    maxf = (1 << n) - 1;
    best = 1;
    for (int a = 1; a <= maxf; a++)
      for (int b = 1; b <= maxf; b++) begin
        cnt = 0;
        for (int a2 = 1; a2 <= maxf; a2++)
          for (int b2 = 1; b2 <= maxf; b2++)
            if (a2 * b2 == a * b) cnt++;
        if (cnt > best) best = cnt;
      end
    return $clog2(best);
  endfunction

endpackage
