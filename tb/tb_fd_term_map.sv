// Terminal map check at N = 8, S = 5, one spare, with random codes and inputs:
// selector and bus terminals carry x, c terminals carry the resolved codes
// (0, 1, x_n, ~x_n), p = 1 for working blocks. With one faulty block the spare
// takes its variable and programming and the block's p drops; with two faulty
// blocks only the first is exchanged and `unrepaired` rises.
module tb_fd_term_map;
  import fd_pkg::*;
  localparam int N = 8, S = 5, M = 1, NB = S + M, NC = 2**(N-S);

  logic  [N-1:0]          x;
  cval_e [S-1:0][NC-1:0]  a_code;
  logic  [S-1:0]          faulty;
  logic  [NB-1:0]         xs, p;
  logic  [NB-1:0][NC-1:0] c;
  logic  [N-S-2:0]        y;
  logic                   unrepaired;
  int checks = 0, failures = 0;

  fd_term_map #(.N(N), .S(S), .M_SPARE(M)) dut (.x, .a_code, .faulty, .xs, .c, .y, .p, .unrepaired);

  task automatic check(logic got, logic exp_v, string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("mismatch %s got=%b exp=%b", what, got, exp_v);
    end
  endtask

  function automatic logic val(cval_e code, logic xn);
    if (code == CV_ZERO) return 1'b0;
    if (code == CV_ONE)  return 1'b1;
    if (code == CV_XN)   return xn;
    return !xn;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      int f1, f2;
      x = 8'($urandom);
      for (int j = 0; j < S; j++) for (int k = 0; k < NC; k++) a_code[j][k] = cval_e'($urandom_range(3));
      f1 = $urandom_range(S - 1);
      f2 = $urandom_range(S - 1);
      case (t % 3)
        0: faulty = '0;
        1: begin faulty = '0; faulty[f1] = 1'b1; end
        default: begin faulty = '0; faulty[f1] = 1'b1; faulty[f2] = 1'b1; end
      endcase
      #1;
      for (int i = 0; i < N - S - 1; i++) check(y[i], x[S+i], "bus");
      for (int j = 0; j < S; j++) begin
        check(xs[j], x[j], "xs");
        for (int k = 0; k < NC; k++) check(c[j][k], val(a_code[j][k], x[N-1]), "c");
      end
      if (faulty == '0) begin
        check(p[S], 1'b0, "spare idle");
        check(|c[S], 1'b0, "spare c idle");
        for (int j = 0; j < S; j++) check(p[j], 1'b1, "p working");
        check(unrepaired, 1'b0, "no fault");
      end else begin
        int first;
        first = -1;
        for (int j = 0; j < S; j++) if (faulty[j] && first < 0) first = j;
        check(p[first], 1'b0, "faulty p");
        check(p[S], 1'b1, "spare p");
        check(xs[S], x[first], "spare xs");
        for (int k = 0; k < NC; k++) check(c[S][k], val(a_code[first][k], x[N-1]), "spare c");
        for (int j = 0; j < S; j++) if (j != first) check(p[j], 1'b1, "other p");
        check(unrepaired, 1'b0 | ($countones(faulty) > 1), "unrepaired");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
