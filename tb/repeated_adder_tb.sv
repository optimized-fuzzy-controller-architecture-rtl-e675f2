// repeated_adder_tb: streams fuzzy sets of 256 points (e = 255 first) into
// the repeated adder and compares num/den with sum(e * I(e)) and sum(I(e))
// computed by multiplication in the testbench. Cases: random sets, an
// all-255 set (largest sums), an empty set, a single spike, and gaps with
// valid low inside a set. done must pulse exactly once, one clock after
// the last element.
module repeated_adder_tb;
  import fc_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst_n, done;
  fset_stream_t fset;
  logic [23:0]  num;
  logic [15:0]  den;
  int checks = 0, failures = 0;
  int dones = 0;

  repeated_adder dut (.clk, .rst_n, .fset, .done, .num, .den);

  always @(negedge clk) if (rst_n && done) dones++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_set(input int kind);
    longint wn = 0, wd = 0;
    for (int k = 0; k < NPTS; k++) begin
      int e = NPTS - 1 - k;
      int v;
      case (kind)
        0: v = $urandom_range(255);
        1: v = 255;
        2: v = 0;
        3: v = (e == 77) ? 200 : 0;
        default: v = ($urandom_range(4) == 0) ? 0 : $urandom_range(255);
      endcase
      if (kind == 4 && $urandom_range(2) == 0) begin
        // a gap: nothing valid this cycle
        fset = '{valid: 1'b0, first: 1'b0, last: 1'b0, data: mu_t'($urandom)};
        @(posedge clk); #1;
      end
      fset = '{valid: 1'b1, first: (k == 0), last: (k == NPTS - 1), data: mu_t'(v)};
      wn += longint'(e) * v;
      wd += longint'(v);
      @(posedge clk); #1;
    end
    fset = '0;
    checks++;
    if (!done) begin failures++; $display("kind %0d: done not raised", kind); end
    checks++;
    if (longint'(num) != wn || longint'(den) != wd) begin
      failures++;
      $display("kind %0d: num=%0d den=%0d want %0d %0d", kind, num, den, wn, wd);
    end
    @(posedge clk); #1;
    checks++;
    if (done) begin failures++; $display("kind %0d: done longer than one clock", kind); end
  endtask

  initial begin
    rst_n = 1'b0; fset = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 20; n++) begin
      automatic int startd = dones;
      run_set(n % 5);
      checks++;
      if (dones != startd + 1) begin failures++; $display("set %0d: %0d done pulses", n, dones - startd); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
