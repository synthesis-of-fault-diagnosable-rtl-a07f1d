// Shift-register circuit check (4 inputs, 4 stages): the transient function
// programmed into the combinational part is run for many random input cycles and
// the state is compared every clock with a reference model y' = {y[2:0], f(v)}.
// Then a stuck-at-1 fault is forced on a level-1 line, a diagnosis is run (the
// state must hold while it runs), and the repaired machine must again follow the
// model.
module tb_fd_shift_seq;
  import fd_pkg::*;
  import fd_tb_pkg::*;
  localparam int NX = 4, NY = 4, NX2 = 2, NY2 = 2, N = 8, S = 4, NC = 2**(N-S);

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, diag_start = 1'b0;
  logic [NX-1:0] x;
  cval_e [S-1:0][NC-1:0] a_code;
  logic [NY-1:0] y, y_ref;
  logic f, diag_busy, diag_done, coll_faulty, unrepaired;
  logic [S-1:0] faulty_blocks;
  bit [255:0] tt;
  int checks = 0, failures = 0;

  fd_shift_seq #(.NX(NX), .NY(NY), .NX2(NX2), .NY2(NY2), .M_SPARE(1)) dut (
    .clk, .rst_n, .en, .x, .a_code, .diag_start, .y, .f, .diag_busy, .diag_done,
    .coll_faulty, .faulty_blocks, .unrepaired
  );

  always #5 clk = ~clk;

  function automatic bit [7:0] vvec(logic [3:0] xi, logic [3:0] yi);
    return {yi[3], yi[2], xi[3], xi[2], yi[1], yi[0], xi[1], xi[0]};
  endfunction

  task automatic check(logic [31:0] got, logic [31:0] exp_v, string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("mismatch %s got=%0h exp=%0h", what, got, exp_v);
    end
  endtask

  task automatic run_cycles(int n);
    for (int t = 0; t < n; t++) begin
      @(negedge clk);
      x  = 4'($urandom);
      en = ($urandom_range(3) != 0);
      #1;
      check(32'(f), 32'(seq_f(vvec(x, y_ref))), "f");
      if (en) y_ref = {y_ref[2:0], seq_f(vvec(x, y_ref))};
      @(posedge clk); #1;
      check(32'(y), 32'(y_ref), "state");
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) tt[i] = seq_f(8'(i));
    for (int j = 0; j < S; j++) for (int k = 0; k < NC; k++) a_code[j][k] = code_for(tt, N, S, j, k);
    x = '0; y_ref = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run_cycles(300);

    force dut.u_comb.u_circ.f1_line[3] = 1'b1;
    @(negedge clk);
    en = 1'b0; diag_start = 1'b1;
    @(negedge clk);
    en = 1'b1; diag_start = 1'b0;   // en is ignored while busy
    while (!diag_done) begin
      check(32'(y), 32'(y_ref), "state held during diagnosis");
      @(negedge clk);
    end
    en = 1'b0;
    check(32'(faulty_blocks), 32'b1000, "faulty block found");
    check(32'(unrepaired), 0, "repaired");
    run_cycles(300);
    release dut.u_comb.u_circ.f1_line[3];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
