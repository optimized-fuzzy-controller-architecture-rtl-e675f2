// fuzzifier_tb: checks the subpremise truth value.
// 1) The worked example: at input 183 the even RAM holds 128 for MF 6 and the
//    odd RAM 204 for MF 5; asking for MF 5 must give 204, MF 6 128, any other
//    MF 0.
// 2) Eight overlapping triangular MFs are computed directly in the testbench,
//    packed into the even/odd RAMs, and for every input value and every MF
//    number the fuzzifier must return the directly computed membership.
module fuzzifier_tb;
  import fc_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic           cfg_we, cfg_odd;
  logic [RES-1:0] cfg_addr;
  mf_word_t       cfg_data;
  mu_t            x, alpha;
  mf_num_t        mf_sel;
  int checks = 0, failures = 0;

  fuzzifier dut (.clk, .cfg_we, .cfg_odd, .cfg_addr, .cfg_data, .x, .mf_sel, .alpha);

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // triangle MF m: centre 36*m + 2, half width 36, peak 255
  function automatic int tri_mu(int m, int v);
    automatic int c = 36 * m + 2;
    automatic int d = (v > c) ? v - c : c - v;
    if (d >= 36) return 0;
    return 255 - (d * 255) / 36;
  endfunction

  task automatic wr(input logic odd, input int a, input mu_t mu, input int code);
    cfg_we = 1'b1; cfg_odd = odd; cfg_addr = RES'(a); cfg_data = '{mu: mu, code: MF_CODE_W'(code)};
    @(posedge clk); #1;
    cfg_we = 1'b0;
  endtask

  task automatic expect_alpha(input int v, input int m, input int want);
    x = RES'(v); mf_sel = MF_NUM_W'(m); #1;
    checks++;
    if (int'(alpha) != want) begin
      failures++;
      if (failures < 10) $display("x=%0d mf=%0d: alpha=%0d want %0d", v, m, alpha, want);
    end
  endtask

  initial begin
    cfg_we = 1'b0; cfg_odd = 1'b0; cfg_addr = '0; cfg_data = '0; x = '0; mf_sel = '0;
    @(posedge clk); #1;
    // worked example
    wr(1'b0, 183, 8'd128, 3);   // even bank, code 11 -> MF 6
    wr(1'b1, 183, 8'd204, 2);   // odd bank,  code 10 -> MF 5
    for (int m = 0; m < NMF; m++)
      expect_alpha(183, m, (m == 5) ? 204 : (m == 6) ? 128 : 0);

    // full table of triangles
    for (int v = 0; v < NPTS; v++) begin
      automatic int ce = 0, co = 0;
      automatic int me = 0, mo = 0;
      for (int m = 0; m < NMF; m++)
        if (tri_mu(m, v) > 0) begin
          if (m % 2 == 0) begin ce = m / 2; me = tri_mu(m, v); end
          else            begin co = m / 2; mo = tri_mu(m, v); end
        end
      // where no MF of a bank is active, store a code of a far-away MF
      if (me == 0) ce = (v < 128) ? 3 : 0;
      if (mo == 0) co = (v < 128) ? 3 : 0;
      wr(1'b0, v, mu_t'(me), ce);
      wr(1'b1, v, mu_t'(mo), co);
    end
    for (int v = 0; v < NPTS; v++)
      for (int m = 0; m < NMF; m++)
        expect_alpha(v, m, tri_mu(m, v));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
