// Sequencer check at S = 5 blocks of L = 3 levels against a behavioural model of
// the circuit's response. The model gives each block half at most one stuck line
// (any level, any index, stuck at 0 or 1); a line observed at the tested level
// through path u is the stuck value if a stuck line lies on that path at or above
// the tested level, else the forced value ((r,s) = (0,0) gives 0, s = 1 gives 1).
// Two collector chains are modelled, chain 1 possibly stuck at 0; the observed
// terminal is F2 once the sequencer reports a collector fault. For each scenario
// the reported block halves and the run length are compared with the injected
// faults.
module tb_fd_diag_ctrl;
  import fd_tb_pkg::*;
  localparam int S = 5, M = 1, NB = S + M, L = 3;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, f_in;
  logic busy, done, t_c, coll_faulty;
  logic [L-1:0] t_y, t_r, t_s;
  logic [NB-1:0] t_xs, t_p;
  logic [S-1:0] f0_sa1, f1_sa1, f0_sa0, f1_sa0;
  int checks = 0, failures = 0;

  // injected faults, per block and half: kind 0 none, 1 stuck-at-0, 2 stuck-at-1
  int   k_kind [S][2];
  int   k_lv   [S][2];
  int   k_idx  [S][2];
  logic inj_coll;

  fd_diag_ctrl #(.S(S), .M_SPARE(M), .L(L)) dut (
    .clk, .rst_n, .start, .f_in, .busy, .done, .t_xs, .t_p, .t_c, .t_y, .t_r, .t_s,
    .coll_faulty, .f0_sa1, .f1_sa1, .f0_sa0, .f1_sa0
  );

  always #5 clk = ~clk;

  function automatic logic observe(int j, int h);
    int tl = 0, u = 0;
    logic forced;
    for (int m = L - 1; m >= 0; m--)
      if (!t_r[m] || t_s[m]) tl = m + 1;
    if (tl == 0) return 1'($urandom);          // normal operation: any value
    forced = t_s[tl-1];
    for (int m = 0; m < tl - 1; m++) u = (u << 1) | int'(t_y[m]);
    if (k_kind[j][h] != 0 && k_lv[j][h] <= tl && k_idx[j][h] == (u >> (tl - k_lv[j][h])))
      return (k_kind[j][h] == 2);
    return forced;
  endfunction

  always_comb begin
    logic fsum;
    fsum = t_c;
    for (int j = 0; j < S; j++)
      if (t_p[j]) fsum |= observe(j, int'(t_xs[j]));
    if (t_p[S]) fsum |= |t_s;                    // spare block is fault free
    f_in = (inj_coll && !coll_faulty) ? 1'b0 : fsum;
  end

  task automatic check(logic [31:0] got, logic [31:0] exp_v, string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("mismatch %s got=%0h exp=%0h", what, got, exp_v);
    end
  endtask

  task automatic run(logic col);
    int cyc;
    logic [S-1:0] e0_sa1, e1_sa1, e0_sa0, e1_sa0;
    line_t sa1[$];
    e0_sa1 = '0; e1_sa1 = '0; e0_sa0 = '0; e1_sa0 = '0;
    for (int j = 0; j < S; j++)
      for (int h = 0; h < 2; h++) begin
        if (k_kind[j][h] == 2) begin
          sa1.push_back('{h: h, lv: k_lv[j][h], idx: k_idx[j][h]});
          if (h == 1) e1_sa1[j] = 1'b1; else e0_sa1[j] = 1'b1;
        end
        if (k_kind[j][h] == 1) begin
          if (h == 1) e1_sa0[j] = 1'b1; else e0_sa0[j] = 1'b1;
        end
      end
    inj_coll = col;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 0;
    while (!done) begin
      if (busy) cyc++;
      @(negedge clk);
    end
    check(32'(f0_sa1), 32'(e0_sa1), "f0_sa1");
    check(32'(f1_sa1), 32'(e1_sa1), "f1_sa1");
    check(32'(f0_sa0), 32'(e0_sa0), "f0_sa0");
    check(32'(f1_sa0), 32'(e1_sa0), "f1_sa0");
    check(32'(coll_faulty), 32'(col), "collector");
    check(32'(cyc), 32'(diag_cycles(S, L, sa1)), "cycles");
  endtask

  task automatic clear();
    for (int j = 0; j < S; j++) for (int h = 0; h < 2; h++) k_kind[j][h] = 0;
  endtask

  task automatic put(int j, int h, int kind, int lv, int idx);
    k_kind[j][h] = kind; k_lv[j][h] = lv; k_idx[j][h] = idx;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear(); inj_coll = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(1'b0);                                          // fault free
    clear(); put(1, 1, 2, 1, 0); put(3, 1, 2, 1, 0); run(1'b0);   // f1 stuck at 1: H
    clear(); put(0, 0, 2, 1, 0); run(1'b0);                       // f0 stuck at 1: J
    clear(); put(4, 0, 2, 1, 0); put(2, 1, 2, 1, 0); run(1'b0);   // both
    clear(); put(1, 0, 1, 1, 0); put(3, 1, 1, 1, 0); run(1'b0);   // stuck at 0
    clear(); put(2, 0, 2, 2, 1); run(1'b0);                       // level 2, path 1
    clear(); put(0, 1, 1, 3, 2); put(4, 0, 2, 3, 3); run(1'b0);   // level 3
    clear(); put(0, 1, 2, 1, 0); put(2, 0, 1, 2, 0); run(1'b1);   // and collector
    for (int t = 0; t < 30; t++) begin
      clear();
      for (int j = 0; j < S; j++)
        for (int h = 0; h < 2; h++)
          if ($urandom_range(3) == 0) begin
            int lv = $urandom_range(L, 1);
            put(j, h, $urandom_range(2, 1), lv, $urandom_range((1 << (lv - 1)) - 1));
          end
      run(1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
