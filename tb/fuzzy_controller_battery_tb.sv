// fuzzy_controller_battery_tb: the three-rule battery-charging controller
// run on the default-size (4-input) controller.
//
//   R1: IF dU is negative AND T is normal THEN I is low
//   R2: IF dU is positive AND T is high   THEN I is low
//   R3: IF dU is positive AND T is normal THEN I is high
//
// dU is input 0 (MF 0 negative, MF 1 positive), T is input 1 (MF 0 normal,
// MF 1 high), I is the output (MF 0 low, MF 1 high). Inputs 2 and 3 are not
// used: their MF 0 is 1.0 everywhere and every rule names it, so it never
// limits a MIN. The 253 unused rule slots repeat R1.
//
// At the operating point the membership functions give the textbook values
// alpha(dU positive) = 0.85, alpha(dU negative) = 0, alpha(T high) = 0.65,
// alpha(T normal) = 0.70 (8-bit: 217, 0, 166, 179), so R1 does not fire,
// R2 fires with 0.65 and R3 with 0.70: I low is clipped at 0.65 and I high at
// 0.70. The testbench checks the crisp output, taken 2*256+10 cycles after
// the inputs were sampled, against the centre of gravity of that clipped
// union computed from the MF formulas, and repeats at two other points.
module fuzzy_controller_battery_tb;
  import fc_pkg::*;

  localparam int NI = 4;
  localparam int RW = MF_NUM_W * (NI + 1);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          rst_n;
  mu_t           x_in [NI];
  mu_t           y_out [1];
  logic [0:0]    y_valid;
  logic          phi, sample;
  mu_t           cas_in [1], cas_out [1];
  logic          cfg_we, cfg_odd;
  cfg_target_e   cfg_target;
  logic [3:0]    cfg_var;
  logic [7:0]    cfg_addr;
  mf_word_t      cfg_mf;
  logic [RW-1:0] cfg_rule;
  int checks = 0, failures = 0;

  fuzzy_controller dut (.clk, .rst_n, .x_in, .y_out, .y_valid, .phi, .sample, .cas_in, .cas_out,
                        .cfg_we, .cfg_target, .cfg_var, .cfg_odd, .cfg_addr, .cfg_mf, .cfg_rule);

  assign cas_in[0] = '0;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // input MFs, piecewise linear with integer slopes:
  //   dU negative: peak 255 at 40, slope 2     dU positive: peak at 238, slope 1
  //   T  normal:   peak 255 at 80, slope 2     T  high:     peak at 207, slope 1
  // At dU = 200, T = 118: negative 0, positive 217, normal 179, high 166.
  function automatic int peak(int v, int c, int slope);
    int d = (v > c) ? v - c : c - v;
    return (slope * d >= 255) ? 0 : 255 - slope * d;
  endfunction
  function automatic int mu_in(int var_i, int m, int v);
    if (var_i == 0) return (m == 0) ? peak(v, 40, 2) : peak(v, 238, 1);
    return (m == 0) ? peak(v, 80, 2) : peak(v, 207, 1);
  endfunction
  // output MFs: triangles around 80 (low) and 170 (high), half width 60
  function automatic int out_mu(int m, int e);
    int c = (m == 0) ? 80 : 170;
    int d = (e > c) ? e - c : c - e;
    return (d >= 60) ? 0 : 255 - (d * 255) / 60;
  endfunction

  task automatic wr();
    cfg_we = 1'b1; @(posedge clk); #1; cfg_we = 1'b0;
  endtask

  task automatic wr_mf(cfg_target_e t, int var_i, int a, logic odd, int mu);
    cfg_target = t; cfg_var = 4'(var_i); cfg_addr = 8'(a); cfg_odd = odd;
    cfg_mf = '{mu: mu_t'(mu), code: '0};
    wr();
  endtask

  task automatic wr_rule(int r, int du, int t, int i);
    cfg_target = CFG_RULE; cfg_addr = 8'(r);
    cfg_rule = {3'(du), 3'(t), 3'd0, 3'd0, 3'(i)};
    wr();
  endtask

  // expected crisp output for clipping levels w_low, w_high
  function automatic int expect_cog(int w_low, int w_high);
    longint sn = 0, sd = 0;
    for (int e = 0; e < NPTS; e++) begin
      int a = (out_mu(0, e) < w_low)  ? out_mu(0, e) : w_low;
      int b = (out_mu(1, e) < w_high) ? out_mu(1, e) : w_high;
      int s = (a > b) ? a : b;
      sn += longint'(e) * s; sd += longint'(s);
    end
    return (sd == 0) ? 0 : int'(sn / sd);
  endfunction

  function automatic int min2(int a, int b); return (a < b) ? a : b; endfunction
  function automatic int max2(int a, int b); return (a > b) ? a : b; endfunction

  task automatic run_point(int du, int t);
    // rule truth values straight from the rule list
    int w1 = min2(mu_in(0, 0, du), mu_in(1, 0, t));
    int w2 = min2(mu_in(0, 1, du), mu_in(1, 1, t));
    int w3 = min2(mu_in(0, 1, du), mu_in(1, 0, t));
    int want = expect_cog(max2(w1, w2), w3);
    x_in[0] = mu_t'(du); x_in[1] = mu_t'(t);
    while (!sample) begin @(posedge clk); #1; end
    @(posedge clk); #1;                    // the sampling edge
    repeat (2 * NPTS + 10) @(posedge clk);  // latency of the controller
    #1;
    checks++;
    if (!y_valid[0]) begin failures++; $display("no result 2*256+10 cycles after sampling"); end
    checks++;
    if (int'(y_out[0]) != want) begin
      failures++;
      $display("dU=%0d T=%0d: I=%0d want %0d (w1=%0d w2=%0d w3=%0d)", du, t, y_out[0], want, w1, w2, w3);
    end else
      $display("dU=%0d T=%0d: omega = %0d/%0d/%0d, crisp I = %0d", du, t, w1, w2, w3, y_out[0]);
  endtask

  initial begin
    rst_n = 1'b0; cfg_we = 1'b0; cfg_odd = 1'b0; cfg_target = CFG_RULE; cfg_var = '0;
    cfg_addr = '0; cfg_mf = '0; cfg_rule = '0;
    for (int i = 0; i < NI; i++) x_in[i] = '0;
    @(posedge clk); #1;
    for (int v = 0; v < NPTS; v++) begin
      for (int i = 0; i < 2; i++) begin
        wr_mf(CFG_IN_MF, i, v, 1'b0, mu_in(i, 0, v));
        wr_mf(CFG_IN_MF, i, v, 1'b1, mu_in(i, 1, v));
      end
      for (int i = 2; i < NI; i++) begin
        wr_mf(CFG_IN_MF, i, v, 1'b0, 255);
        wr_mf(CFG_IN_MF, i, v, 1'b1, 0);
      end
      wr_mf(CFG_OUT_MF, 0, v, 1'b0, out_mu(0, v));
      wr_mf(CFG_OUT_MF, 0, v, 1'b1, out_mu(1, v));
    end
    wr_rule(0, 0, 0, 0);   // R1
    wr_rule(1, 1, 1, 0);   // R2
    wr_rule(2, 1, 0, 1);   // R3
    for (int r = 3; r < NRULES; r++) wr_rule(r, 0, 0, 0);
    @(posedge clk); #1;
    rst_n = 1'b1;

    // the operating point of the example
    checks++;
    if (mu_in(0, 0, 200) != 0 || mu_in(0, 1, 200) != 217 || mu_in(1, 0, 118) != 179 || mu_in(1, 1, 118) != 166) begin
      failures++; $display("operating point arithmetic wrong");
    end
    run_point(200, 118);   // R1 0, R2 0.65, R3 0.70
    run_point(60, 90);     // mainly R1
    run_point(230, 200);   // mainly R2
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
