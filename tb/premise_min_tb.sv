// premise_min_tb: random and corner vectors of four truth values; the output
// must be their minimum. Includes the two-input case of the introductory
// example (0.85 and 0.65 -> 0.65).
module premise_min_tb;
  import fc_pkg::*;

  mu_t alpha [4];
  mu_t omega;
  mu_t a2 [2];
  mu_t o2;
  int checks = 0, failures = 0;

  premise_min #(.N(4)) dut (.alpha, .omega);
  premise_min #(.N(2)) dut2 (.alpha(a2), .omega(o2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      automatic int want = 255;
      for (int i = 0; i < 4; i++) begin
        alpha[i] = (n % 5 == 0) ? mu_t'($urandom_range(3) * 85) : mu_t'($urandom);
        if (int'(alpha[i]) < want) want = int'(alpha[i]);
      end
      #1;
      checks++;
      if (int'(omega) != want) begin
        failures++;
        if (failures < 10) $display("min(%0d,%0d,%0d,%0d) = %0d want %0d", alpha[0], alpha[1], alpha[2], alpha[3], omega, want);
      end
    end
    a2[0] = 8'd217; a2[1] = 8'd166; #1;   // 0.85, 0.65
    checks++;
    if (o2 != 8'd166) begin failures++; $display("two-input min wrong: %0d", o2); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
