// Multi-output check with Example 2: two outputs over x1..x8 with the common set
// K = {x2, x4, x6, x7}; selector variables x1 x3 x5 x8 on xs, x2 x4 x6 on the shared
// bus and x7 at the c terminals. Each output's blocks are programmed from its own
// truth table; all 256 inputs are checked on both collectors of both outputs, then
// again with block 1 of output 0 and block 3 of output 1 exchanged for the spares.
module tb_fd_multi_circuit;
  import fd_pkg::*;
  import fd_tb_pkg::*;
  localparam int N = 8, S = 4, NOUT = 2, M = 1, NB = S + M, NC = 2**(N-S), L = N - S - 1;

  logic [NOUT-1:0][NB-1:0]         xs, p;
  logic [NOUT-1:0][NB-1:0][NC-1:0] c;
  logic [L-1:0]                    y, r, s;
  logic [NOUT-1:0]                 c_in;
  logic [NOUT-1:0][1:0]            f_out;
  bit   [255:0]                    tt [NOUT];
  cval_e                           code [NOUT][S][NC];
  int checks = 0, failures = 0;

  fd_multi_circuit #(.N(N), .S(S), .NOUT(NOUT), .M_SPARE(M), .N_COLL(2)) dut (
    .xs, .c, .y, .r, .s, .p, .c_in, .f_out
  );

  task automatic check(logic got, logic exp_v, string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("mismatch %s got=%b exp=%b", what, got, exp_v);
    end
  endtask

  task automatic apply(bit [7:0] v, int swap0, int swap1);
    xs = '0; p = '0; c = '0;
    for (int o = 0; o < NOUT; o++) begin
      int sw = (o == 0) ? swap0 : swap1;
      for (int j = 0; j < S; j++) begin
        xs[o][j] = v[j];
        p[o][j]  = 1'b1;
        for (int k = 0; k < NC; k++) c[o][j][k] = cval_resolve(code[o][j][k], v[N-1]);
      end
      if (sw >= 0) begin
        p[o][sw] = 1'b0; p[o][S] = 1'b1; xs[o][S] = v[sw]; c[o][S] = c[o][sw];
      end
    end
    y = v[N-2:S]; r = '1; s = '0; c_in = '0;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < NOUT; o++) begin
      for (int i = 0; i < 256; i++) tt[o][i] = ex2_port(o, 8'(i));
      for (int j = 0; j < S; j++) for (int k = 0; k < NC; k++) code[o][j][k] = code_for(tt[o], N, S, j, k);
    end
    for (int pass = 0; pass < 2; pass++)
      for (int i = 0; i < 256; i++) begin
        if (pass == 0) apply(8'(i), -1, -1); else apply(8'(i), 1, 3);
        #1;
        for (int o = 0; o < NOUT; o++) begin
          check(f_out[o][0], ex2_port(o, 8'(i)), $sformatf("pass %0d f%0d F1 x=%b", pass, o + 1, 8'(i)));
          check(f_out[o][1], ex2_port(o, 8'(i)), $sformatf("pass %0d f%0d F2 x=%b", pass, o + 1, 8'(i)));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
