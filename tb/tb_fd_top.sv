// End-to-end check of fd_top at its default sizes (no parameter overrides).
//  Single-output circuit: Example 1 is programmed and checked on all 256 inputs;
//  then faults are forced one scenario at a time (f1 stuck-at-1, f0 stuck-at-1,
//  stuck-at-0 lines, a broken F1 collector, too many faulty blocks), each followed
//  by a diagnosis and, where repairable, a full re-check of the function.
//  Multi-output circuit: Example 2 on both outputs, fault free, then after
//  diagnoses with faulty blocks in both outputs (repaired by each output's spare)
//  and with the F1 collector of output 1 broken (output 1 moves to F2).
//  Sequential circuit: random run against a shift-register reference model, a
//  diagnosis in the middle with a fault forced in its combinational part.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_fd_top;
  import fd_pkg::*;
  import fd_tb_pkg::*;
  localparam int N = 8, S = 5, NC = 2**(N-S), MS = 4, MNC = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic diag_start = 1'b0;
  logic [N-1:0] x;
  cval_e [S-1:0][NC-1:0] a_code;
  logic f, diag_busy, diag_done, coll_faulty, unrepaired;
  logic [S-1:0] f0_sa1, f1_sa1, f0_sa0, f1_sa0;
  logic [7:0] m_x;
  cval_e [1:0][MS-1:0][MNC-1:0] m_a_code;
  logic [1:0][MS-1:0] m_faulty_blocks;
  logic [1:0] m_coll_faulty, m_f, m_unrepaired;
  logic m_diag_start = 1'b0, m_diag_busy, m_diag_done;
  logic q_en = 1'b0, q_diag_start = 1'b0;
  logic [3:0] q_x, q_y, q_faulty_blocks, q_y_ref;
  cval_e [3:0][15:0] q_a_code;
  logic q_f, q_diag_busy, q_diag_done, q_coll_faulty, q_unrepaired;
  bit [255:0] tt, tt_q;
  bit [255:0] tt_m [2];
  int checks = 0, failures = 0;
  line_t no_sa1[$];  // empty: no line stuck at 1
  // mechanism counters
  int n_h = 0, n_j = 0, n_sa0 = 0, n_coll = 0, n_spare = 0, n_unrep = 0;
  int n_m_spare = 0, n_m_f2 = 0, n_shift = 0, n_hold = 0, n_deep = 0;

  fd_top dut (
    .clk, .rst_n, .diag_start, .x, .a_code, .f, .diag_busy, .diag_done, .coll_faulty,
    .f0_sa1, .f1_sa1, .f0_sa0, .f1_sa0, .unrepaired,
    .m_x, .m_a_code, .m_diag_start, .m_f, .m_diag_busy, .m_diag_done, .m_coll_faulty,
    .m_faulty_blocks, .m_unrepaired,
    .q_en, .q_x, .q_a_code, .q_diag_start, .q_y, .q_f, .q_diag_busy, .q_diag_done,
    .q_coll_faulty, .q_faulty_blocks, .q_unrepaired
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
      if (diag_busy && dut.u_single.u_diag.lv != 0) n_deep++;   // tests below level 1
      @(negedge clk);
    end
    if (f1_sa1 != 0) n_h++;
    if (f0_sa1 != 0) n_j++;
    if (f0_sa0 != 0 || f1_sa0 != 0) n_sa0++;
    if (coll_faulty) n_coll++;
    if ((f0_sa1 | f1_sa1 | f0_sa0 | f1_sa0) != 0 && !unrepaired) n_spare++;
    if (unrepaired) n_unrep++;
    check(32'(cyc), 32'(exp_cyc), "diagnosis cycles");
  endtask

  task automatic m_sweep(string what);
    for (int i = 0; i < 256; i++) begin
      m_x = 8'(i); #1;
      for (int o = 0; o < 2; o++)
        check(32'(m_f[o]), 32'(tt_m[o][i]), $sformatf("%s f%0d x=%b", what, o + 1, m_x));
    end
  endtask

  // Diagnoses both multi-output outputs; sa1_0 / sa1_1 are the lines stuck at 1.
  task automatic m_diagnose(line_t sa1_0[$], line_t sa1_1[$]);
    int cyc = 0;
    int exp_cyc = diag_cycles(MS, 8 - MS - 1, sa1_0) + diag_cycles(MS, 8 - MS - 1, sa1_1) + 4;
    @(negedge clk) m_diag_start = 1'b1;
    @(negedge clk) m_diag_start = 1'b0;
    while (!m_diag_done) begin
      if (m_diag_busy) cyc++;
      @(negedge clk);
    end
    if (m_faulty_blocks != 0 && m_unrepaired == 0) n_m_spare++;
    if (m_coll_faulty != 0) n_m_f2++;
    check(32'(cyc), 32'(exp_cyc), "multi diagnosis cycles");
  endtask

  function automatic bit [7:0] qv(logic [3:0] xi, logic [3:0] yi);
    return {yi[3], yi[2], xi[3], xi[2], yi[1], yi[0], xi[1], xi[0]};
  endfunction

  task automatic q_run(int n);
    for (int t = 0; t < n; t++) begin
      @(negedge clk);
      q_x = 4'($urandom); q_en = ($urandom_range(3) != 0);
      #1;
      check(32'(q_f), 32'(seq_f(qv(q_x, q_y_ref))), "seq f");
      if (q_en) begin q_y_ref = {q_y_ref[2:0], seq_f(qv(q_x, q_y_ref))}; n_shift++; end
      @(posedge clk); #1;
      check(32'(q_y), 32'(q_y_ref), "seq state");
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      tt[i] = ex1_port(8'(i));
      tt_q[i] = seq_f(8'(i));
      for (int o = 0; o < 2; o++) tt_m[o][i] = ex2_port(o, 8'(i));
    end
    for (int j = 0; j < S; j++) for (int k = 0; k < NC; k++) a_code[j][k] = code_for(tt, N, S, j, k);
    for (int j = 0; j < 4; j++) for (int k = 0; k < 16; k++) q_a_code[j][k] = code_for(tt_q, 8, 4, j, k);
    for (int o = 0; o < 2; o++)
      for (int j = 0; j < MS; j++) for (int k = 0; k < MNC; k++) m_a_code[o][j][k] = code_for(tt_m[o], 8, MS, j, k);
    x = '0; m_x = '0; q_x = '0; q_y_ref = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // ---- single-output circuit ----
    sweep("Example 1");
    diagnose(no_sa1);
    check(32'({coll_faulty, f0_sa1, f1_sa1, f0_sa0, f1_sa0}), 0, "clean diagnosis");

    force dut.u_single.u_circ.f1_line[4] = 1'b1;
    diagnose({'{h: 1, lv: 1, idx: 0}});
    check(32'(f1_sa1), 32'b10000, "H located f1 sa1");
    sweep("spare for block 5");
    release dut.u_single.u_circ.f1_line[4];

    force dut.u_single.u_circ.f0_line[1] = 1'b1;
    diagnose({'{h: 0, lv: 1, idx: 0}});
    check(32'(f0_sa1), 32'b00010, "J located f0 sa1");
    sweep("spare for block 2");
    release dut.u_single.u_circ.f0_line[1];

    force dut.u_single.u_circ.f1_line[0] = 1'b0;
    force dut.u_single.f_term[0] = 1'b0;
    diagnose(no_sa1);
    check(32'(coll_faulty), 1, "collector fault");
    check(32'(f1_sa0), 32'b00001, "D located f1 sa0");
    sweep("F2 and spare");
    release dut.u_single.u_circ.f1_line[0];

    force dut.u_single.u_circ.f0_line[2] = 1'b0;
    force dut.u_single.u_circ.f0_line[3] = 1'b0;
    diagnose(no_sa1);
    check(32'(f0_sa0), 32'b01100, "E located f0 sa0");
    check(32'(unrepaired), 1, "unrepairable");
    release dut.u_single.u_circ.f0_line[2];
    release dut.u_single.u_circ.f0_line[3];
    release dut.u_single.f_term[0];
    diagnose(no_sa1);
    sweep("healed");


    // ---- multi-output circuit ----
    m_sweep("Example 2");
    m_diagnose(no_sa1, no_sa1);
    check(32'({m_coll_faulty, m_faulty_blocks, m_unrepaired}), 0, "multi clean diagnosis");
    force dut.u_multi.u_circ.f1_line[0][2] = 1'b1;
    force dut.u_multi.u_circ.f0_line[1][0] = 1'b0;
    m_diagnose({'{h: 1, lv: 1, idx: 0}}, no_sa1);
    check(32'(m_faulty_blocks), 32'b0001_0100, "multi blocks located");
    check(32'(m_unrepaired), 0, "multi repaired");
    m_sweep("Example 2 on spares");
    release dut.u_multi.u_circ.f1_line[0][2];
    release dut.u_multi.u_circ.f0_line[1][0];
    force dut.u_multi.f_term[1][0] = 1'b1;
    m_diagnose(no_sa1, no_sa1);
    check(32'(m_coll_faulty), 32'b10, "multi collector located");
    check(32'(m_faulty_blocks), 0, "multi blocks sound");
    m_sweep("Example 2 on F2");
    release dut.u_multi.f_term[1][0];

    // ---- sequential circuit ----
    q_run(200);
    force dut.u_seq.u_comb.u_circ.f0_line[0] = 1'b1;
    @(negedge clk) q_en = 1'b0; q_diag_start = 1'b1;
    @(negedge clk) q_en = 1'b1; q_diag_start = 1'b0;   // en is ignored while busy
    while (!q_diag_done) begin
      check(32'(q_y), 32'(q_y_ref), "seq state held");
      n_hold++;
      @(negedge clk);
    end
    q_en = 1'b0;
    check(32'(q_faulty_blocks), 32'b0001, "seq fault located");
    q_run(200);
    release dut.u_seq.u_comb.u_circ.f0_line[0];

    $display("mechanisms: H=%0d J=%0d sa0=%0d collector=%0d spare=%0d unrepaired=%0d deep=%0d multi_spare=%0d multi_F2=%0d shifts=%0d holds=%0d",
             n_h, n_j, n_sa0, n_coll, n_spare, n_unrep, n_deep, n_m_spare, n_m_f2, n_shift, n_hold);
    if (n_h == 0 || n_j == 0 || n_sa0 == 0 || n_coll == 0 || n_spare == 0 || n_unrep == 0 ||
        n_deep == 0 || n_m_spare == 0 || n_m_f2 == 0 || n_shift == 0 || n_hold == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
