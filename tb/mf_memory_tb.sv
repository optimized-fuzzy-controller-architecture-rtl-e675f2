// mf_memory_tb: loads both banks of the membership-function RAM with random
// words, kept in a testbench copy, and reads every address back, checking
// that each bank returns its own word and that a write to one bank leaves
// the other untouched.
module mf_memory_tb;
  import fc_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic           we, wr_odd;
  logic [RES-1:0] waddr, raddr;
  mf_word_t       wdata, even_q, odd_q;
  mf_word_t       ref_e [NPTS];
  mf_word_t       ref_o [NPTS];
  int checks = 0, failures = 0;

  mf_memory dut (.clk, .we, .wr_odd, .waddr, .wdata, .raddr, .even_q, .odd_q);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic odd, input int a, input mf_word_t d);
    we = 1'b1; wr_odd = odd; waddr = RES'(a); wdata = d;
    @(posedge clk); #1;
    we = 1'b0;
  endtask

  task automatic check_all();
    for (int a = 0; a < NPTS; a++) begin
      raddr = RES'(a); #1;
      checks++;
      if (even_q !== ref_e[a] || odd_q !== ref_o[a]) begin
        failures++;
        if (failures < 10) $display("addr %0d: got %h/%h want %h/%h", a, even_q, odd_q, ref_e[a], ref_o[a]);
      end
    end
  endtask

  initial begin
    we = 1'b0; wr_odd = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    @(posedge clk); #1;
    for (int a = 0; a < NPTS; a++) begin
      ref_e[a] = mf_word_t'($urandom);
      ref_o[a] = mf_word_t'($urandom);
      wr(1'b0, a, ref_e[a]);
      wr(1'b1, a, ref_o[a]);
    end
    check_all();
    // overwrite some odd words only
    for (int n = 0; n < 64; n++) begin
      automatic int a = $urandom_range(NPTS - 1);
      ref_o[a] = mf_word_t'($urandom);
      wr(1'b1, a, ref_o[a]);
    end
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
