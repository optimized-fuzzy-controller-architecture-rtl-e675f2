// fuzzy_controller_multi_tb: a controller with 3 inputs and 2 outputs (the
// 3-input rule format "A, B, C then X", extended by a second conclusion).
// Random MFs for every variable, 256 random rules, 10 operations; each
// output is checked against a direct MIN-MAX/COG model, both outputs must
// report in the same cycle, 2*256+10 cycles after the inputs were sampled.
// This exercises the per-output register blocks, inference units, adders
// and dividers that share one rule evaluation stage.
module fuzzy_controller_multi_tb;
  import fc_pkg::*;

  localparam int NI = 3;
  localparam int NO = 2;
  localparam int RW = MF_NUM_W * (NI + NO);
  localparam int NOPS = 10;
  localparam int LATENCY = 2 * NPTS + 10;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          rst_n;
  mu_t           x_in [NI];
  mu_t           y_out [NO];
  logic [NO-1:0] y_valid;
  logic          phi, sample;
  mu_t           cas_in [NO], cas_out [NO];
  logic          cfg_we, cfg_odd;
  cfg_target_e   cfg_target;
  logic [3:0]    cfg_var;
  logic [7:0]    cfg_addr;
  mf_word_t      cfg_mf;
  logic [RW-1:0] cfg_rule;

  fuzzy_controller #(.N_IN(NI), .N_OUT(NO)) dut (
    .clk, .rst_n, .x_in, .y_out, .y_valid, .phi, .sample, .cas_in, .cas_out,
    .cfg_we, .cfg_target, .cfg_var, .cfg_odd, .cfg_addr, .cfg_mf, .cfg_rule);

  assign cas_in = '{default: '0};

  int in_w  [NI][NMF];
  int out_w [NO][NMF];
  int rules [NRULES][NI + NO];
  int checks = 0, failures = 0;
  int cycle = 0;
  int exp_y [$], exp_t [$];

  function automatic int mf_mu(int m, int v, int w);
    int c = 36 * m + 2;
    int d = (v > c) ? v - c : c - v;
    if (d >= w) return 0;
    return 255 - (d * 255) / w;
  endfunction

  // crisp value of output o for inputs x
  function automatic int model(int o, int x [NI]);
    int regv [NMF];
    longint sn = 0, sd = 0;
    for (int m = 0; m < NMF; m++) regv[m] = 0;
    for (int r = 0; r < NRULES; r++) begin
      int w = 255;
      for (int i = 0; i < NI; i++) begin
        int a = mf_mu(rules[r][i], x[i], in_w[i][rules[r][i]]);
        if (a < w) w = a;
      end
      if (w > regv[rules[r][NI + o]]) regv[rules[r][NI + o]] = w;
    end
    for (int e = 0; e < NPTS; e++) begin
      int s = 0;
      for (int m = 0; m < NMF; m++) begin
        int l = mf_mu(m, e, out_w[o][m]);
        if (regv[m] < l) l = regv[m];
        if (l > s) s = l;
      end
      sn += longint'(e) * s; sd += longint'(s);
    end
    return (sd == 0) ? 0 : int'(sn / sd);
  endfunction

  task automatic wr();
    cfg_we = 1'b1; @(posedge clk); #1; cfg_we = 1'b0;
  endtask

  task automatic load_var(cfg_target_e tgt, int var_i, int w [NMF]);
    for (int v = 0; v < NPTS; v++) begin
      int ce = 0, co = 0, me = 0, mo = 0;
      for (int m = 0; m < NMF; m++)
        if (mf_mu(m, v, w[m]) > 0) begin
          if (m % 2 == 0) begin ce = m / 2; me = mf_mu(m, v, w[m]); end
          else            begin co = m / 2; mo = mf_mu(m, v, w[m]); end
        end
      cfg_target = tgt; cfg_var = 4'(var_i); cfg_addr = 8'(v);
      cfg_odd = 1'b0; cfg_mf = '{mu: mu_t'(me), code: MF_CODE_W'(ce)}; wr();
      cfg_odd = 1'b1; cfg_mf = '{mu: mu_t'(mo), code: MF_CODE_W'(co)}; wr();
    end
  endtask

  always @(posedge clk) cycle <= cycle + 1;

  always @(negedge clk) begin
    if (rst_n && y_valid != '0) begin
      checks++;
      if (y_valid != '1 || exp_t.size() == 0) begin
        failures++;
        $display("cycle %0d: y_valid=%b unexpected", cycle, y_valid);
      end else begin
        automatic int t0 = exp_t.pop_front();
        for (int o = 0; o < NO; o++) begin
          automatic int want = exp_y.pop_front();
          checks++;
          if (int'(y_out[o]) != want) begin
            failures++;
            $display("cycle %0d: y_out[%0d]=%0d want %0d", cycle, o, y_out[o], want);
          end
        end
        checks++;
        if (cycle - t0 != LATENCY) begin failures++; $display("latency %0d", cycle - t0); end
      end
    end
  end

  initial begin
    repeat (NOPS * NPTS + 2 * NPTS * (NI + NO) * 2 + NRULES + 3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; cfg_we = 1'b0; cfg_odd = 1'b0; cfg_target = CFG_RULE; cfg_var = '0;
    cfg_addr = '0; cfg_mf = '0; cfg_rule = '0;
    for (int i = 0; i < NI; i++) x_in[i] = '0;
    for (int m = 0; m < NMF; m++) begin
      for (int i = 0; i < NI; i++) in_w[i][m] = $urandom_range(36, 20);
      for (int o = 0; o < NO; o++) out_w[o][m] = $urandom_range(36, 14);
    end
    for (int r = 0; r < NRULES; r++)
      for (int f = 0; f < NI + NO; f++)
        rules[r][f] = (f >= NI || $urandom_range(9) == 0) ? $urandom_range(NMF - 1) : $urandom_range(5, 2);
    @(posedge clk); #1;
    for (int i = 0; i < NI; i++) load_var(CFG_IN_MF, i, in_w[i]);
    for (int o = 0; o < NO; o++) load_var(CFG_OUT_MF, o, out_w[o]);
    for (int r = 0; r < NRULES; r++) begin
      automatic logic [RW-1:0] word = '0;
      for (int f = 0; f < NI + NO; f++) word = (word << MF_NUM_W) | RW'(rules[r][f]);
      cfg_target = CFG_RULE; cfg_addr = 8'(r); cfg_rule = word; wr();
    end
    @(posedge clk); #1;
    rst_n = 1'b1;
    for (int op = 0; op < NOPS; op++) begin
      int x [NI];
      for (int i = 0; i < NI; i++) begin
        x[i] = $urandom_range(182, 74);
        x_in[i] = mu_t'(x[i]);
      end
      while (!sample) begin @(posedge clk); #1; end
      for (int o = 0; o < NO; o++) exp_y.push_back(model(o, x));
      exp_t.push_back(cycle + 1);   // the sampling edge is the next one
      @(posedge clk); #1;
    end
    while (exp_t.size() > 0 && cycle < 100000) begin @(posedge clk); #1; end
    checks++;
    if (exp_t.size() != 0) begin failures++; $display("%0d results missing", exp_t.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
