// Collector check with 6 elements: random inputs against
// F = C | OR_j p_j (x_j ? f1_j : f0_j), plus the collector test patterns
// (all p = 0: F follows C).
module tb_fd_collector;
  localparam int NB = 6;
  logic [NB-1:0] xs, f0, f1, p;
  logic c_in, f_out;
  int checks = 0, failures = 0;

  fd_collector #(.NB(NB)) dut (.xs, .f0, .f1, .p, .c_in, .f_out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      logic exp_f;
      {xs, f0, f1, p} = 24'($urandom);
      c_in = (t % 7 == 0);
      if (t % 5 == 0) p = '0;
      #1;
      exp_f = c_in;
      for (int j = 0; j < NB; j++)
        exp_f = exp_f | (p[j] & (xs[j] ? f1[j] : f0[j]));
      checks++;
      if (f_out !== exp_f) begin
        failures++;
        $display("mismatch xs=%b f0=%b f1=%b p=%b C=%b F=%b", xs, f0, f1, p, c_in, f_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
