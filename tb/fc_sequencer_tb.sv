// fc_sequencer_tb: over several frames checks that the rule address counts
// 0..255 and wraps, that frame_last is high exactly when it reads 255 (once
// every 256 clocks), and that phi = Phi/256 is low for 128 clocks and high
// for 128.
module fc_sequencer_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       rst_n, frame_last, phi;
  logic [7:0] rule_addr;
  int checks = 0, failures = 0;

  fc_sequencer dut (.clk, .rst_n, .rule_addr, .frame_last, .phi);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int last_fl = -1, fl_count = 0, phi_high = 0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 4 * 256; c++) begin
      checks++;
      if (int'(rule_addr) != c % 256) begin
        failures++;
        if (failures < 10) $display("cycle %0d addr %0d", c, rule_addr);
      end
      checks++;
      if (frame_last != (c % 256 == 255) || phi != (c % 256 >= 128)) begin
        failures++;
        if (failures < 10) $display("cycle %0d frame_last %b phi %b", c, frame_last, phi);
      end
      if (frame_last) begin
        if (last_fl >= 0) begin
          checks++;
          if (c - last_fl != 256) begin failures++; $display("frame length %0d", c - last_fl); end
        end
        last_fl = c; fl_count++;
      end
      if (phi) phi_high++;
      @(posedge clk); #1;
    end
    checks++;
    if (fl_count != 4 || phi_high != 4 * 128) begin
      failures++; $display("frames %0d phi high %0d", fl_count, phi_high);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
