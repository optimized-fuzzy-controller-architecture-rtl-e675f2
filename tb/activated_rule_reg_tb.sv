// activated_rule_reg_tb: drives frames of 256 rules (random truth values and
// conclusion MFs, many zeros) and compares Reg0'..Reg7' after each transfer
// with the per-MF maximum computed in the testbench. Consecutive frames use
// different value ranges, so a register that is not cleared at the transfer
// shows up; Reg' must also hold still during a frame. A frame with valid low
// must transfer all zeros.
module activated_rule_reg_tb;
  import fc_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic     rst_n, valid, transfer;
  mu_t      omega, omega_even, omega_odd;
  mf_num_t  mf_num;
  mf_code_t rd_code_even, rd_code_odd;
  int       want [NMF];
  int checks = 0, failures = 0;

  activated_rule_reg dut (.clk, .rst_n, .valid, .omega, .mf_num, .transfer,
                          .rd_code_even, .rd_code_odd, .omega_even, .omega_odd);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_regp(input string what);
    for (int c = 0; c < NMF_BANK; c++) begin
      rd_code_even = MF_CODE_W'(c); rd_code_odd = MF_CODE_W'(c); #1;
      checks += 2;
      if (int'(omega_even) != want[2*c]) begin
        failures++;
        if (failures < 10) $display("%s Reg%0d' = %0d want %0d", what, 2*c, omega_even, want[2*c]);
      end
      if (int'(omega_odd) != want[2*c+1]) begin
        failures++;
        if (failures < 10) $display("%s Reg%0d' = %0d want %0d", what, 2*c+1, omega_odd, want[2*c+1]);
      end
    end
  endtask

  initial begin
    int maxv [NMF];
    rst_n = 1'b0; valid = 1'b0; transfer = 1'b0; omega = '0; mf_num = '0;
    rd_code_even = '0; rd_code_odd = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int f = 0; f < 8; f++) begin
      automatic int hi = (f % 2 == 0) ? 255 : 60;
      automatic bit v = (f != 5);
      for (int m = 0; m < NMF; m++) maxv[m] = 0;
      for (int r = 0; r < NRULES; r++) begin
        valid    = v;
        omega    = ($urandom_range(3) == 0) ? mu_t'(0) : mu_t'($urandom_range(hi));
        mf_num   = mf_num_t'($urandom_range(NMF - 1));
        if (r == NRULES - 1) omega = mu_t'(hi);   // the last rule must not be lost
        transfer = (r == NRULES - 1);
        if (v && int'(omega) > maxv[mf_num]) maxv[mf_num] = int'(omega);
        if (r == 100 && f > 0) check_regp("mid-frame");
        @(posedge clk); #1;
      end
      valid = 1'b0; transfer = 1'b0;
      for (int m = 0; m < NMF; m++) want[m] = maxv[m];
      check_regp("after transfer");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
