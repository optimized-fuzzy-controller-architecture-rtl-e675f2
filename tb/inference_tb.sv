// inference_tb: loads output MFs (eight triangles) and models the register
// block Reg' in the testbench (a table read through the rd_code ports).
// Over several frames with random truth values and random cascade inputs it
// checks every streamed element against
//   max over m of min(mu_m(e), omega_m), and CAS_in,
// computed straight from the triangle formulas, the order e = 255 .. 0, the
// first/last marks, the one-cycle delay of the stream, and CAS_out.
module inference_tb;
  import fc_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic           rst_n, frame_last, active;
  logic           cfg_we, cfg_odd;
  logic [RES-1:0] cfg_addr;
  mf_word_t       cfg_data;
  mf_code_t       rd_code_even, rd_code_odd;
  mu_t            omega_even, omega_odd, cas_in, cas_out;
  fset_stream_t   fset;
  int             regp [NMF];
  int             cycle;
  int checks = 0, failures = 0;

  inference dut (.clk, .rst_n, .frame_last, .active, .cfg_we, .cfg_odd, .cfg_addr, .cfg_data,
                 .rd_code_even, .rd_code_odd, .omega_even, .omega_odd, .cas_in, .cas_out, .fset);

  // register block model
  assign omega_even = mu_t'(regp[2 * rd_code_even]);
  assign omega_odd  = mu_t'(regp[2 * rd_code_odd + 1]);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int tri_mu(int m, int v);
    automatic int c = 36 * m + 2;
    automatic int d = (v > c) ? v - c : c - v;
    if (d >= 36) return 0;
    return 255 - (d * 255) / 36;
  endfunction

  function automatic int expect_at(int e, int cas);
    automatic int r = cas;
    for (int m = 0; m < NMF; m++) begin
      automatic int l = (tri_mu(m, e) < regp[m]) ? tri_mu(m, e) : regp[m];
      if (l > r) r = l;
    end
    return r;
  endfunction

  task automatic wr(input logic odd, input int a, input int mu, input int code);
    cfg_we = 1'b1; cfg_odd = odd; cfg_addr = RES'(a); cfg_data = '{mu: mu_t'(mu), code: MF_CODE_W'(code)};
    @(posedge clk); #1;
    cfg_we = 1'b0;
  endtask

  initial begin
    rst_n = 1'b0; frame_last = 1'b0; active = 1'b0; cfg_we = 1'b0; cfg_odd = 1'b0;
    cfg_addr = '0; cfg_data = '0; cas_in = '0;
    for (int m = 0; m < NMF; m++) regp[m] = 0;
    @(posedge clk); #1;
    for (int v = 0; v < NPTS; v++) begin
      automatic int ce = 0, co = 0, me = 0, mo = 0;
      for (int m = 0; m < NMF; m++)
        if (tri_mu(m, v) > 0) begin
          if (m % 2 == 0) begin ce = m / 2; me = tri_mu(m, v); end
          else            begin co = m / 2; mo = tri_mu(m, v); end
        end
      wr(1'b0, v, me, ce);
      wr(1'b1, v, mo, co);
    end
    rst_n = 1'b1;
    // align: the counter starts at 255 after reset
    for (int f = 0; f < 6; f++) begin
      automatic int prev_want = 0;
      for (int m = 0; m < NMF; m++) regp[m] = (f == 2) ? 0 : $urandom_range(255);
      active = (f != 4);
      for (int k = 0; k < NPTS; k++) begin
        automatic int e = NPTS - 1 - k;
        automatic int cas = (f >= 3 && $urandom_range(3) == 0) ? $urandom_range(255) : 0;
        int want;
        cas_in = mu_t'(cas);
        frame_last = (k == NPTS - 1);
        want = expect_at(e, cas);
        #1;
        checks++;
        if (int'(cas_out) != want) begin
          failures++;
          if (failures < 10) $display("frame %0d e=%0d cas_out=%0d want %0d", f, e, cas_out, want);
        end
        // stream element of the previous cycle
        if (k > 0) begin
          checks++;
          if (int'(fset.data) != prev_want || fset.valid != active || fset.first != (k == 1) || fset.last) begin
            failures++;
            if (failures < 10) $display("frame %0d e=%0d stream %p want %0d", f, e + 1, fset, prev_want);
          end
        end
        prev_want = want;
        @(posedge clk); #1;
      end
      checks++;
      if (int'(fset.data) != prev_want || !fset.last || fset.valid != active) begin
        failures++;
        $display("frame %0d last element %p want %0d", f, fset, prev_want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
