// Circuit check at N = 8, S = 5, one spare, two collectors, programmed with
// Example 1 (selector set {x1, x2, x4, x6, x7}). All 256 inputs are checked on F1
// and F2 against the function's sum-of-products form, then:
//  - one block alone (only p_j = 1) must give ~x_j f0_j | x_j f1_j (property 1);
//  - block 2 exchanged for the spare must leave f unchanged (property 2);
//  - with the output of chain 1 stuck, F2 must still be right (property 3);
//  - (r_1, s_1) = (0,0) / s_1 = 1 force the level-1 lines (property 4), seen
//    through the collector with single blocks enabled.
module tb_fd_comb_circuit;
  import fd_pkg::*;
  import fd_tb_pkg::*;
  localparam int N = 8, S = 5, M = 1, NB = S + M, NC = 2**(N-S), L = N - S - 1;

  logic [NB-1:0]         xs, p;
  logic [NB-1:0][NC-1:0] c;
  logic [L-1:0]          y, r, s;
  logic                  c_in;
  logic [1:0]            f_out;
  bit   [255:0]          tt;
  cval_e                 code [S][NC];
  int checks = 0, failures = 0;

  fd_comb_circuit #(.N(N), .S(S), .M_SPARE(M), .N_COLL(2)) dut (
    .xs, .c, .y, .r, .s, .p, .c_in, .f_out
  );

  task automatic check(logic got, logic exp_v, string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("mismatch %s got=%b exp=%b", what, got, exp_v);
    end
  endtask

  // Drive the terminals for input vector v; spare_for < 0: no exchange.
  task automatic apply(bit [7:0] v, int spare_for);
    xs = '0; p = '0; c = '0;
    for (int j = 0; j < S; j++) begin
      xs[j] = v[j];
      p[j]  = 1'b1;
      for (int k = 0; k < NC; k++) c[j][k] = cval_resolve(code[j][k], v[N-1]);
    end
    if (spare_for >= 0) begin
      p[spare_for] = 1'b0;
      p[S]         = 1'b1;
      xs[S]        = v[spare_for];
      c[S]         = c[spare_for];
    end
    y = v[N-2:S]; r = '1; s = '0; c_in = 1'b0;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) tt[i] = ex1_port(8'(i));
    for (int j = 0; j < S; j++) for (int k = 0; k < NC; k++) code[j][k] = code_for(tt, N, S, j, k);

    for (int i = 0; i < 256; i++) begin
      apply(8'(i), -1); #1;
      check(f_out[0], ex1_port(8'(i)), $sformatf("F1 x=%b", 8'(i)));
      check(f_out[1], ex1_port(8'(i)), $sformatf("F2 x=%b", 8'(i)));
    end
    // property 1
    for (int j = 0; j < S; j++)
      for (int i = 0; i < 256; i += 3) begin
        int u;
        apply(8'(i), -1);
        p = '0; p[j] = 1'b1; #1;
        u = i >> S;
        check(f_out[0], part_max(tt, N, S, j, (i >> j) & 1, u), $sformatf("single block %0d x=%b", j, 8'(i)));
      end
    // property 2
    for (int i = 0; i < 256; i++) begin
      apply(8'(i), 2); #1;
      check(f_out[0], ex1_port(8'(i)), $sformatf("spare x=%b", 8'(i)));
    end
    // property 4 through the collector
    for (int j = 0; j < S; j++) begin
      apply(8'($urandom), -1);
      p = '0; p[j] = 1'b1; r[0] = 1'b0; #1;
      check(f_out[0], 1'b0, "r1s1=00");
      s[0] = 1'b1; #1;
      check(f_out[0], 1'b1, "s1=1");
    end
    // property 3: chain 1 stuck at 0
    force dut.f_out[0] = 1'b0;
    for (int i = 0; i < 256; i++) begin
      apply(8'(i), -1); #1;
      check(f_out[1], ex1_port(8'(i)), $sformatf("F2 with F1 broken x=%b", 8'(i)));
    end
    release dut.f_out[0];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
