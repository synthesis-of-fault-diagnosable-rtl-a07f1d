// Diagnose-and-repair check of the two-output circuit (N = 8, S = 4, one spare per
// output) programmed with Example 2 on the port order x1 x3 x5 x8 | x2 x4 x6 | x7.
// Faults are injected by forcing block output lines of one output at a time and the
// end of an output's F1 collector chain. After each diagnosis the results of each
// output are compared with the injected faults, and both outputs must again compute
// Example 2 on all 256 inputs. The diagnosis length must equal one sequencer run
// per output (diag_cycles) plus two clocks per output for starting and finishing
// the run.
module tb_fd_multi_repairable;
  import fd_pkg::*;
  import fd_tb_pkg::*;
  localparam int N = 8, S = 4, NOUT = 2, M = 1, NC = 2**(N-S), L = N - S - 1;

  logic clk = 1'b0, rst_n = 1'b0, diag_start = 1'b0;
  logic [N-1:0] x;
  cval_e [NOUT-1:0][S-1:0][NC-1:0] a_code;
  logic [NOUT-1:0] f, coll_faulty, unrepaired;
  logic [NOUT-1:0][S-1:0] faulty_blocks;
  logic diag_busy, diag_done;
  bit [255:0] tt [NOUT];
  int checks = 0, failures = 0;
  line_t no_sa1[$];

  fd_multi_repairable #(.N(N), .S(S), .NOUT(NOUT), .M_SPARE(M)) dut (
    .clk, .rst_n, .diag_start, .x, .a_code, .f, .diag_busy, .diag_done, .coll_faulty,
    .faulty_blocks, .unrepaired
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
      for (int o = 0; o < NOUT; o++)
        check(32'(f[o]), 32'(tt[o][i]), $sformatf("%s f%0d x=%b", what, o + 1, x));
    end
  endtask

  // sa1_0 / sa1_1: lines stuck at 1 in output 0 / output 1
  task automatic diagnose(line_t sa1_0[$], line_t sa1_1[$]);
    int cyc = 0;
    int exp_cyc = diag_cycles(S, L, sa1_0) + diag_cycles(S, L, sa1_1) + 2 * NOUT;
    @(negedge clk) diag_start = 1'b1;
    @(negedge clk) diag_start = 1'b0;
    while (!diag_done) begin
      if (diag_busy) cyc++;
      @(negedge clk);
    end
    check(32'(cyc), 32'(exp_cyc), "diagnosis cycles");
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < NOUT; o++) begin
      for (int i = 0; i < 256; i++) tt[o][i] = ex2_port(o, 8'(i));
      for (int j = 0; j < S; j++) for (int k = 0; k < NC; k++) a_code[o][j][k] = code_for(tt[o], N, S, j, k);
    end
    x = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    sweep("fault free");
    diagnose(no_sa1, no_sa1);
    check(32'({coll_faulty, faulty_blocks, unrepaired}), 0, "clean diagnosis");

    // output 1: f1 of block 2 stuck at 1; output 0: f0 of block 0 stuck at 0
    force dut.u_circ.f1_line[1][2] = 1'b1;
    force dut.u_circ.f0_line[0][0] = 1'b0;
    diagnose(no_sa1, {'{h: 1, lv: 1, idx: 0}});
    check(32'(faulty_blocks[0]), 32'b0001, "output 0 block located");
    check(32'(faulty_blocks[1]), 32'b0100, "output 1 block located");
    check(32'(coll_faulty), 0, "collectors sound");
    check(32'(unrepaired), 0, "repaired");
    sweep("both outputs on spares");
    release dut.u_circ.f1_line[1][2];
    release dut.u_circ.f0_line[0][0];

    // output 0: F1 collector stuck at 1 and f0 of block 3 stuck at 1
    force dut.f_term[0][0] = 1'b1;
    force dut.u_circ.f0_line[0][3] = 1'b1;
    diagnose({'{h: 0, lv: 1, idx: 0}}, no_sa1);
    check(32'(coll_faulty), 32'b01, "output 0 on F2");
    check(32'(faulty_blocks[0]), 32'b1000, "output 0 block located");
    check(32'(faulty_blocks[1]), 0, "output 1 clean");
    sweep("output 0 on F2 with spare");
    release dut.u_circ.f0_line[0][3];
    release dut.f_term[0][0];

    // output 1: two faulty blocks, one spare
    force dut.u_circ.f1_line[1][1] = 1'b0;
    force dut.u_circ.f0_line[1][3] = 1'b0;
    diagnose(no_sa1, no_sa1);
    check(32'(faulty_blocks[1]), 32'b1010, "output 1 blocks located");
    check(32'(unrepaired), 32'b10, "output 1 out of spares");
    release dut.u_circ.f1_line[1][1];
    release dut.u_circ.f0_line[1][3];
    diagnose(no_sa1, no_sa1);
    check(32'({coll_faulty, faulty_blocks, unrepaired}), 0, "clean again");
    sweep("fault free again");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
