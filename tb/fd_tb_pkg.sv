// Testbench helpers: the example functions and the programming of the c terminals.
//
// Truth tables are indexed by the circuit's variable vector (bit i of the index is
// x[i]). For a function f and a selector set made of the first S variables, block j
// is programmed with the largest f0 / f1 allowed: f0_j(u) = 1 when f = 1 for every
// input with x[j] = 0 and bus/c variables u, likewise f1_j with x[j] = 1. When the
// selector set is a set of independent variables of f, OR_j (~x_j f0_j | x_j f1_j)
// equals f. The terminal code of each c terminal then follows from the value of
// f0_j / f1_j at x_n = 0 and x_n = 1.
package fd_tb_pkg;
  import fd_pkg::*;

  // Example 1 on the original variables x1..x8 (v[0] = x1).
  function automatic bit ex1(bit [7:0] v);
    bit x1 = v[0], x2 = v[1], x3 = v[2], x4 = v[3], x5 = v[4], x6 = v[5], x7 = v[6], x8 = v[7];
    return (x1 & !x3 & x5 & x8) | (x2 & !x3 & !x5 & !x8) | (x3 & !x4 & !x5 & x8) |
           (!x3 & x5 & x6 & x8) | (x3 & !x5 & !x6 & x8) | (!x3 & !x5 & !x7 & x8);
  endfunction

  // Example 1 on the circuit's port order: x1 x2 x4 x6 x7 | x3 x5 | x8.
  function automatic bit ex1_port(bit [7:0] p);
    bit [7:0] v;
    v[0] = p[0]; v[1] = p[1]; v[3] = p[2]; v[5] = p[3]; v[6] = p[4];
    v[2] = p[5]; v[4] = p[6]; v[7] = p[7];
    return ex1(v);
  endfunction

  // Example 2 (two outputs) on the original variables x1..x8.
  function automatic bit ex2(int o, bit [7:0] v);
    bit x1 = v[0], x2 = v[1], x3 = v[2], x4 = v[3], x5 = v[4], x6 = v[5], x7 = v[6], x8 = v[7];
    if (o == 0)
      return (!x1 & !x2 & !x4 & !x6) | (x2 & x3 & !x4 & !x6) | (!x2 & x4 & !x6) | (x1 & x7) |
             (x2 & x4 & x6 & !x7) | (!x2 & !x3 & !x4 & x6) | (x2 & !x4 & x5 & x6);
    return (!x2 & x4 & !x6 & !x7) | (x1 & !x4 & x6 & !x7) | (x4 & x6 & !x8) |
           (!x4 & !x5 & x6 & x7) | (x4 & x7);
  endfunction

  // Example 2 on the multi-output port order: x1 x3 x5 x8 | x2 x4 x6 | x7.
  function automatic bit ex2_port(int o, bit [7:0] p);
    bit [7:0] v;
    v[0] = p[0]; v[2] = p[1]; v[4] = p[2]; v[7] = p[3];
    v[1] = p[4]; v[3] = p[5]; v[5] = p[6]; v[6] = p[7];
    return ex2(o, v);
  endfunction

  // Transient function used for the shift-register circuit, on its variable vector
  // v = {x0, x1, y0, y1 | x2, x3, y2 | y3}.
  function automatic bit seq_f(bit [7:0] v);
    return (v[0] & v[4] & !v[5]) | (!v[1] & v[6] & v[7]) | (v[2] & !v[4] & !v[7]) |
           (v[3] & v[5] & v[6]) | (v[4] & v[5] & v[6] & v[7]) | (!v[2] & !v[6]);
  endfunction

  // Largest f_h^(j) value at bus/c assignment u (u bit 0 = x[S]).
  function automatic bit part_max(bit [255:0] tt, int n, int s, int j, int h, int u);
    for (int g = 0; g < (1 << s); g++) begin
      int idx;
      if (((g >> j) & 1) != h) continue;
      idx = g | (u << s);
      if (!tt[idx]) return 1'b0;
    end
    return 1'b1;
  endfunction

  // Code of terminal c_j^k (k: top bit = half, then x[S] .. x[n-2], MSB first).
  function automatic cval_e code_for(bit [255:0] tt, int n, int s, int j, int k);
    int l = n - s - 1;
    int h = (k >> l) & 1;
    int u = 0;
    bit v0, v1;
    for (int i = 0; i < l; i++)            // bus level i+1 carries x[s+i]
      u |= ((k >> (l - 1 - i)) & 1) << i;
    v0 = part_max(tt, n, s, j, h, u);
    v1 = part_max(tt, n, s, j, h, u | (1 << l));
    case ({v1, v0})
      2'b00:   return CV_ZERO;
      2'b11:   return CV_ONE;
      2'b10:   return CV_XN;
      default: return CV_XN_N;
    endcase
  endfunction

  // A line inside a block: half h (0 = f0 tree), level lv (1 = block output),
  // index idx within that level of the half (0 .. 2**(lv-1)-1, top bit = y_1).
  typedef struct {
    int h;
    int lv;
    int idx;
  } line_t;

  // Expected length of a diagnosis with s blocks and l levels when the lines in
  // sa1 are stuck at 1 (no other fault on their paths): 2 clocks for the collector
  // tests, then per level tl and path u a round of 2 + 2s clocks, plus s when a
  // stuck f1 line lies on the path (H tests) and s when a stuck f0 line does
  // (J tests).
  function automatic int diag_cycles(int s, int l, line_t sa1[$]);
    int cyc = 2;
    for (int tl = 1; tl <= l; tl++)
      for (int u = 0; u < (1 << (tl - 1)); u++) begin
        bit t1 = 1'b0, t2 = 1'b0;
        foreach (sa1[k])
          if (sa1[k].lv <= tl && sa1[k].idx == (u >> (tl - sa1[k].lv))) begin
            if (sa1[k].h == 1) t2 = 1'b1;
            else               t1 = 1'b1;
          end
        cyc += 2 + 2 * s + (t2 ? s : 0) + (t1 ? s : 0);
      end
    return cyc;
  endfunction

endpackage
