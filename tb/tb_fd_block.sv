// Block check at LEVELS = 2 (8 c terminals). Normal mode: for random terminal
// values and every bus value, f0 must equal c[{y1,y2}] and f1 c[4+{y1,y2}]
// (sum-of-minterms form). Override: (r_1,s_1) = (0,0) forces both outputs to 0,
// s_1 = 1 forces them to 1; an override on level 2 only acts through level 1.
module tb_fd_block;
  localparam int L = 2;
  logic [2**(L+1)-1:0] c;
  logic [L-1:0] y, r, s;
  logic f0, f1;
  int checks = 0, failures = 0;

  fd_block #(.LEVELS(L)) dut (.c, .y, .r, .s, .f0, .f1);

  task automatic check(logic got, logic exp_v, string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("mismatch %s c=%b y=%b r=%b s=%b got=%b", what, c, y, r, s, got);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      c = 8'($urandom);
      r = '1; s = '0;
      for (int b = 0; b < 4; b++) begin
        y = 2'(b);           // y[0] = y_1 is the MSB of the minterm index
        #1;
        check(f0, c[{y[0], y[1]}], "f0");
        check(f1, c[4 + {y[0], y[1]}], "f1");
      end
      y = 2'($urandom);
      r = 2'b10; s = 2'b00; #1;          // level 1 (bit 0) forced to 0
      check(f0, 1'b0, "f0 r1s1=00"); check(f1, 1'b0, "f1 r1s1=00");
      r = 2'b11; s = 2'b01; #1;          // level 1 forced to 1
      check(f0, 1'b1, "f0 s1=1"); check(f1, 1'b1, "f1 s1=1");
      r = 2'b01; s = 2'b00; #1;          // level 2 forced to 0: level 1 passes 0
      check(f0, 1'b0, "f0 r2s2=00"); check(f1, 1'b0, "f1 r2s2=00");
      r = 2'b11; s = 2'b10; #1;          // level 2 forced to 1
      check(f0, 1'b1, "f0 s2=1"); check(f1, 1'b1, "f1 s2=1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
