// rule_base_tb: writes 256 random rules and reads them back field by field.
// Also checks the bit order of a rule word with the 3-input example
// "A3, B4, C7 then X4" = 011 100 111 100.
module rule_base_tb;
  import fc_pkg::*;

  localparam int unsigned N_IN = 4, N_OUT = 1;
  localparam int unsigned RULE_W = MF_NUM_W * (N_IN + N_OUT);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic              we;
  logic [7:0]        waddr, raddr;
  logic [RULE_W-1:0] wdata;
  mf_num_t           premise [N_IN];
  mf_num_t           conclusion [N_OUT];
  // 3-input instance for the bit-order example
  logic              we3;
  logic [8:0]        wdata3;
  mf_num_t           premise3 [3];
  mf_num_t           conclusion3 [1];
  logic [11:0]       word3;
  int                rules [NRULES][N_IN + N_OUT];
  int checks = 0, failures = 0;

  rule_base #(.N_IN(N_IN), .N_OUT(N_OUT)) dut (.clk, .we, .waddr, .wdata, .raddr, .premise, .conclusion);
  rule_base #(.N_IN(3), .N_OUT(1)) dut3 (.clk, .we(we3), .waddr, .wdata(word3), .raddr,
                                          .premise(premise3), .conclusion(conclusion3));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; we3 = 1'b0; waddr = '0; raddr = '0; wdata = '0; wdata3 = '0; word3 = '0;
    @(posedge clk); #1;
    for (int r = 0; r < NRULES; r++) begin
      wdata = '0;
      for (int f = 0; f < N_IN + N_OUT; f++) begin
        rules[r][f] = $urandom_range(NMF - 1);
        wdata = (wdata << MF_NUM_W) | RULE_W'(rules[r][f]);
      end
      we = 1'b1; waddr = 8'(r);
      @(posedge clk); #1;
      we = 1'b0;
    end
    for (int r = NRULES - 1; r >= 0; r--) begin
      raddr = 8'(r); #1;
      for (int i = 0; i < N_IN; i++) begin
        checks++;
        if (int'(premise[i]) != rules[r][i]) begin
          failures++;
          if (failures < 10) $display("rule %0d premise %0d: %0d want %0d", r, i, premise[i], rules[r][i]);
        end
      end
      checks++;
      if (int'(conclusion[0]) != rules[r][N_IN]) begin
        failures++;
        if (failures < 10) $display("rule %0d conclusion: %0d want %0d", r, conclusion[0], rules[r][N_IN]);
      end
    end
    // bit-order example
    word3 = 12'b011_100_111_100; we3 = 1'b1; waddr = 8'd7;
    @(posedge clk); #1;
    we3 = 1'b0; raddr = 8'd7; #1;
    checks++;
    if (premise3[0] != 3 || premise3[1] != 4 || premise3[2] != 7 || conclusion3[0] != 4) begin
      failures++;
      $display("example rule decoded as %0d %0d %0d -> %0d", premise3[0], premise3[1], premise3[2], conclusion3[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
