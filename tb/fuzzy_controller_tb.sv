// fuzzy_controller_tb: end-to-end test of the controller at its default size
// (4 inputs, 1 output, 256 rules, 8-bit resolution).
//
// Two controllers run from one clock and reset; the cascade output of A
// feeds the cascade input of B, so B's result is the centre of gravity of
// the union of both inferred sets. Each gets its own random membership
// functions (triangles of random width around fixed centres, only neighbours
// overlapping) and its own 256 random rules, loaded through the configuration
// port while reset is held. Then a new random input vector is presented
// every frame. The testbench computes every result directly from the
// membership-function formulas and the rule list (MIN over the premises,
// MAX per conclusion, clipped output MFs united by MAX, COG = floor(sum e*I /
// sum I)) and compares y_out of both controllers. It checks that a result
// comes 2*256 + 10 cycles after the sampling edge and one every 256 cycles,
// and counts the mechanisms of the design: rules that fire, rules that raise
// an MF's truth value and rules that do not, points where the cascade input
// dominates, operations with no rule firing (output 0) and overlapping
// operations in the pipeline. Each must occur at least once.
module fuzzy_controller_tb;
  import fc_pkg::*;

  localparam int NI = 4;
  localparam int RW = MF_NUM_W * (NI + 1);
  localparam int NOPS = 14;
  localparam int LATENCY = 2 * NPTS + 10;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst_n;
  mu_t         x_a [NI], x_b [NI];
  mu_t         y_a [1], y_b [1];
  logic [0:0]  yv_a, yv_b;
  logic        phi_a, phi_b, sample_a, sample_b;
  mu_t         cas_zero [1], cas_ab [1], cas_out_b [1];
  logic        cfg_we_a, cfg_we_b, cfg_odd;
  cfg_target_e cfg_target;
  logic [3:0]  cfg_var;
  logic [7:0]  cfg_addr;
  mf_word_t    cfg_mf;
  logic [RW-1:0] cfg_rule;

  fuzzy_controller dut_a (
    .clk, .rst_n, .x_in(x_a), .y_out(y_a), .y_valid(yv_a), .phi(phi_a), .sample(sample_a),
    .cas_in(cas_zero), .cas_out(cas_ab),
    .cfg_we(cfg_we_a), .cfg_target, .cfg_var, .cfg_odd, .cfg_addr, .cfg_mf, .cfg_rule);
  fuzzy_controller dut_b (
    .clk, .rst_n, .x_in(x_b), .y_out(y_b), .y_valid(yv_b), .phi(phi_b), .sample(sample_b),
    .cas_in(cas_ab), .cas_out(cas_out_b),
    .cfg_we(cfg_we_b), .cfg_target, .cfg_var, .cfg_odd, .cfg_addr, .cfg_mf, .cfg_rule);

  assign cas_zero[0] = '0;

  // ------------------------------------------------------------ the model
  int in_w  [2][NI][NMF];   // half widths of the input MFs
  int out_w [2][NMF];       // half widths of the output MFs
  int rules [2][NRULES][NI + 1];

  int checks = 0, failures = 0;
  int n_fired = 0, n_raise = 0, n_keep = 0, n_cas = 0, n_empty = 0, n_overlap = 0;
  int cycle = 0;

  function automatic int mf_mu(int m, int v, int w);
    int c = 36 * m + 2;
    int d = (v > c) ? v - c : c - v;
    if (d >= w) return 0;
    return 255 - (d * 255) / w;
  endfunction

  // inferred output set of controller k for inputs x; also counts mechanisms
  function automatic void infer(int k, int x [NI], output int set [NPTS]);
    int regv [NMF];
    for (int m = 0; m < NMF; m++) regv[m] = 0;
    for (int r = 0; r < NRULES; r++) begin
      int w = 255;
      for (int i = 0; i < NI; i++) begin
        int a = mf_mu(rules[k][r][i], x[i], in_w[k][i][rules[k][r][i]]);
        if (a < w) w = a;
      end
      if (w > 0) begin
        n_fired++;
        if (w > regv[rules[k][r][NI]]) begin regv[rules[k][r][NI]] = w; n_raise++; end
        else n_keep++;
      end
    end
    for (int e = 0; e < NPTS; e++) begin
      int s = 0;
      for (int m = 0; m < NMF; m++) begin
        int l = mf_mu(m, e, out_w[k][m]);
        if (regv[m] < l) l = regv[m];
        if (l > s) s = l;
      end
      set[e] = s;
    end
  endfunction

  function automatic int cog(int set [NPTS]);
    longint sn = 0, sd = 0;
    for (int e = 0; e < NPTS; e++) begin sn += longint'(e) * set[e]; sd += longint'(set[e]); end
    if (sd == 0) return 0;
    return int'(sn / sd);
  endfunction

  // ------------------------------------------------------------ loading
  task automatic cfg_write(int k);
    if (k == 0) cfg_we_a = 1'b1; else cfg_we_b = 1'b1;
    @(posedge clk); #1;
    cfg_we_a = 1'b0; cfg_we_b = 1'b0;
  endtask

  task automatic load_var(int k, cfg_target_e tgt, int var_i, int w [NMF]);
    for (int v = 0; v < NPTS; v++) begin
      int ce = 0, co = 0, me = 0, mo = 0;
      for (int m = 0; m < NMF; m++)
        if (mf_mu(m, v, w[m]) > 0) begin
          if (m % 2 == 0) begin ce = m / 2; me = mf_mu(m, v, w[m]); end
          else            begin co = m / 2; mo = mf_mu(m, v, w[m]); end
        end
      cfg_target = tgt; cfg_var = 4'(var_i); cfg_addr = 8'(v);
      cfg_odd = 1'b0; cfg_mf = '{mu: mu_t'(me), code: MF_CODE_W'(ce)}; cfg_write(k);
      cfg_odd = 1'b1; cfg_mf = '{mu: mu_t'(mo), code: MF_CODE_W'(co)}; cfg_write(k);
    end
  endtask

  task automatic load_all(int k);
    for (int i = 0; i < NI; i++) load_var(k, CFG_IN_MF, i, in_w[k][i]);
    load_var(k, CFG_OUT_MF, 0, out_w[k]);
    for (int r = 0; r < NRULES; r++) begin
      logic [RW-1:0] word = '0;
      for (int f = 0; f <= NI; f++) word = (word << MF_NUM_W) | RW'(rules[k][r][f]);
      cfg_target = CFG_RULE; cfg_addr = 8'(r); cfg_rule = word;
      cfg_write(k);
    end
  endtask

  // ------------------------------------------------------------ checking
  int exp_a [$], exp_b [$], exp_t [$];
  int last_out = -1;

  always @(posedge clk) cycle <= cycle + 1;

  always @(negedge clk) begin
    if (rst_n && (yv_a[0] || yv_b[0])) begin
      checks++;
      if (!(yv_a[0] && yv_b[0]) || exp_a.size() == 0) begin
        failures++;
        $display("unexpected or unaligned result at cycle %0d", cycle);
      end else begin
        automatic int wa = exp_a.pop_front();
        automatic int wb = exp_b.pop_front();
        automatic int t0 = exp_t.pop_front();
        checks += 2;
        if (int'(y_a[0]) != wa || int'(y_b[0]) != wb) begin
          failures++;
          $display("cycle %0d: y_a=%0d (want %0d) y_b=%0d (want %0d)", cycle, y_a[0], wa, y_b[0], wb);
        end
        if (cycle - t0 != LATENCY) begin
          failures++;
          $display("latency %0d, want %0d", cycle - t0, LATENCY);
        end
        if (last_out >= 0) begin
          checks++;
          if (cycle - last_out != NPTS) begin failures++; $display("result spacing %0d", cycle - last_out); end
        end
        last_out = cycle;
      end
    end
  end

  initial begin
    repeat (NOPS * NPTS + 4 * NPTS + 2 * 12 * NPTS * 2 + 4 * NRULES + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; cfg_we_a = 1'b0; cfg_we_b = 1'b0; cfg_odd = 1'b0; cfg_target = CFG_RULE;
    cfg_var = '0; cfg_addr = '0; cfg_mf = '0; cfg_rule = '0;
    for (int i = 0; i < NI; i++) begin x_a[i] = '0; x_b[i] = '0; end
    for (int k = 0; k < 2; k++) begin
      for (int m = 0; m < NMF; m++) begin
        out_w[k][m] = $urandom_range(36, 14);
        for (int i = 0; i < NI; i++) in_w[k][i][m] = $urandom_range(36, 20);
      end
      for (int r = 0; r < NRULES; r++)
        for (int f = 0; f <= NI; f++)
          rules[k][r][f] = (f == NI || $urandom_range(9) == 0) ? $urandom_range(NMF - 1)
                                                               : $urandom_range(5, 2);
    end
    @(posedge clk); #1;
    load_all(0);
    load_all(1);
    @(posedge clk); #1;
    rst_n = 1'b1;

    for (int op = 0; op < NOPS; op++) begin
      int xa [NI], xb [NI];
      int sa [NPTS], sb [NPTS], su [NPTS];
      for (int i = 0; i < NI; i++) begin
        // operation 3 drives every input far from all rules' MFs
        xa[i] = (op == 3) ? $urandom_range(8) : $urandom_range(182, 74);
        xb[i] = (op == 3) ? $urandom_range(8) : $urandom_range(182, 74);
        x_a[i] = mu_t'(xa[i]); x_b[i] = mu_t'(xb[i]);
      end
      // wait for the sampling edge
      while (!sample_a) begin @(posedge clk); #1; end
      if (exp_a.size() > 0) n_overlap++;
      infer(0, xa, sa);
      infer(1, xb, sb);
      for (int e = 0; e < NPTS; e++) begin
        su[e] = (sa[e] > sb[e]) ? sa[e] : sb[e];
        if (sa[e] > sb[e]) n_cas++;
      end
      if (cog(sa) == 0 && cog(su) == 0) n_empty++;
      exp_a.push_back(cog(sa));
      exp_b.push_back(cog(su));
      exp_t.push_back(cycle + 1);   // the sampling edge is the next one
      @(posedge clk); #1;
    end
    // drain the pipeline
    while (exp_a.size() > 0 && cycle < 100000) begin @(posedge clk); #1; end
    repeat (5) @(posedge clk);

    $display("mechanisms: fired=%0d raise=%0d keep=%0d cascade_points=%0d empty_ops=%0d overlapped_ops=%0d",
             n_fired, n_raise, n_keep, n_cas, n_empty, n_overlap);
    checks++; if (n_fired == 0)   begin failures++; $display("no rule fired"); end
    checks++; if (n_raise == 0)   begin failures++; $display("no MAX update"); end
    checks++; if (n_keep == 0)    begin failures++; $display("no MAX keep"); end
    checks++; if (n_cas == 0)     begin failures++; $display("cascade never dominated"); end
    checks++; if (n_empty == 0)   begin failures++; $display("no empty operation"); end
    checks++; if (n_overlap == 0) begin failures++; $display("no pipelined operations"); end
    checks++; if (exp_a.size() != 0) begin failures++; $display("%0d results missing", exp_a.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
