// Diagnose-and-repair check at N = 8, S = 5, one spare, programmed with Example 1.
// Faults are injected by forcing block output lines and the end of the F1
// collector chain.
// After each diagnosis the reported lines are compared with the injected ones and
// the repaired circuit must again compute Example 1 on all 256 inputs. Diagnosis
// length is checked against its expected value (diag_cycles).
module tb_fd_repairable;
  import fd_pkg::*;
  import fd_tb_pkg::*;
  localparam int N = 8, S = 5, M = 1, NC = 2**(N-S);

  logic clk = 1'b0, rst_n = 1'b0, diag_start = 1'b0;
  logic [N-1:0] x;
  cval_e [S-1:0][NC-1:0] a_code;
  logic f, diag_busy, diag_done, coll_faulty, unrepaired;
  logic [S-1:0] f0_sa1, f1_sa1, f0_sa0, f1_sa0;
  bit [255:0] tt;
  int checks = 0, failures = 0;
  line_t no_sa1[$];  // empty: no line stuck at 1

  fd_repairable #(.N(N), .S(S), .M_SPARE(M)) dut (
    .clk, .rst_n, .diag_start, .x, .a_code, .f, .diag_busy, .diag_done, .coll_faulty,
    .f0_sa1, .f1_sa1, .f0_sa0, .f1_sa0, .unrepaired
  );

  always #5 clk = ~clk;

  task automatic check(logic [31:0] got, logic [31:0] exp_v, string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("mismatch %s got=%0h exp=%0h", what, got, exp_v);
    end
  endtask

  task automatic sweep(string what);
    for (int i = 0; i < 256; i++) begin
      x = 8'(i); #1;
      check(32'(f), 32'(tt[i]), $sformatf("%s x=%b", what, x));
    end
  endtask

  task automatic diagnose(line_t sa1[$]);
    int cyc = 0, exp_cyc = diag_cycles(S, N - S - 1, sa1);
    @(negedge clk) diag_start = 1'b1;
    @(negedge clk) diag_start = 1'b0;
    while (!diag_done) begin
      if (diag_busy) cyc++;
      @(negedge clk);
    end
    check(32'(cyc), 32'(exp_cyc), "diagnosis cycles");
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) tt[i] = ex1_port(8'(i));
    for (int j = 0; j < S; j++) for (int k = 0; k < NC; k++) a_code[j][k] = code_for(tt, N, S, j, k);
    x = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    sweep("fault free");
    diagnose(no_sa1);
    check(32'({coll_faulty, f0_sa1, f1_sa1, f0_sa0, f1_sa0}), 0, "clean diagnosis");

    // f1 of block 2 stuck at 1
    force dut.u_circ.f1_line[2] = 1'b1;
    begin
      int wrong = 0;
      for (int i = 0; i < 256; i++) begin
        x = 8'(i); #1;
        if (f !== tt[i]) wrong++;
      end
      check(32'(wrong > 0), 1, "injected fault is visible");
    end
    diagnose({'{h: 1, lv: 1, idx: 0}});
    check(32'(f1_sa1), 32'b00100, "f1 sa1 located");
    check(32'(unrepaired), 0, "repaired");
    sweep("after spare swap");
    release dut.u_circ.f1_line[2];

    // f0 of block 0 stuck at 0
    force dut.u_circ.f0_line[0] = 1'b0;
    diagnose(no_sa1);
    check(32'(f0_sa0), 32'b00001, "f0 sa0 located");
    check(32'(f1_sa1 | f0_sa1 | f1_sa0), 0, "nothing else");
    sweep("after spare swap");
    release dut.u_circ.f0_line[0];

    // collector chain of F1 stuck at 1, and f0 of block 4 stuck at 1
    force dut.f_term[0] = 1'b1;
    force dut.u_circ.f0_line[4] = 1'b1;
    diagnose({'{h: 0, lv: 1, idx: 0}});
    check(32'(coll_faulty), 1, "collector fault");
    check(32'(f0_sa1), 32'b10000, "f0 sa1 located");
    sweep("on F2 with spare");
    release dut.u_circ.f0_line[4];

    // two faulty blocks, one spare
    force dut.u_circ.f1_line[1] = 1'b0;
    force dut.u_circ.f0_line[3] = 1'b0;
    diagnose(no_sa1);
    check(32'(f1_sa0), 32'b00010, "f1 sa0");
    check(32'(f0_sa0), 32'b01000, "f0 sa0");
    check(32'(unrepaired), 1, "too many faults");
    release dut.u_circ.f1_line[1];
    release dut.u_circ.f0_line[3];
    release dut.f_term[0];
    diagnose(no_sa1);
    sweep("fault free again");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
