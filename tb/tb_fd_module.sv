// Exhaustive check of the building element: all 32 input combinations against
// q = s | (r & (y ? d1 : d0)), i.e. select in normal mode, 0 for (r,s)=(0,0),
// 1 for s=1.
module tb_fd_module;
  logic d0, d1, y, r, s, q;
  int checks = 0, failures = 0;

  fd_module dut (.d0, .d1, .y, .r, .s, .q);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic exp_q;
      {d0, d1, y, r, s} = 5'(v);
      #1;
      if (s)       exp_q = 1'b1;
      else if (!r) exp_q = 1'b0;
      else         exp_q = y ? d1 : d0;
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("mismatch d0=%b d1=%b y=%b r=%b s=%b q=%b", d0, d1, y, r, s, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
