// cog_divider_tb: random numerator/denominator pairs whose quotient fits in
// 8 bits (num <= 255 * den), plus corner cases (num = 0, num = 255 * den,
// largest sums, den = 0). Checks q against integer division and that done
// comes exactly 8 clocks after start.
module cog_divider_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst_n, start, busy, done;
  logic [23:0] num;
  logic [15:0] den;
  logic [7:0]  q;
  int checks = 0, failures = 0;

  cog_divider dut (.clk, .rst_n, .start, .num, .den, .busy, .done, .q);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic divide(input int n, input int d);
    automatic int lat = 0;
    automatic int want = (d == 0) ? 0 : n / d;
    num = 24'(n); den = 16'(d); start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0; num = '0; den = '0;
    while (!done && lat < 40) begin @(posedge clk); #1; lat++; end
    checks++;
    if (int'(q) != want) begin
      failures++;
      if (failures < 10) $display("%0d / %0d = %0d want %0d", n, d, q, want);
    end
    checks++;
    if (lat != 8) begin failures++; if (failures < 10) $display("latency %0d, want 8", lat); end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; num = '0; den = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    divide(0, 100);
    divide(255 * 65280, 65280);
    divide(8323200, 65280);
    divide(12345, 0);
    divide(1, 1);
    divide(254, 1);
    divide(9999, 40);
    for (int n = 0; n < 1000; n++) begin
      automatic int d = $urandom_range(65280, 1);
      automatic int nn = $urandom_range(255 * d);
      if (n % 3 == 0) d = $urandom_range(300, 1);
      if (n % 3 == 0) nn = $urandom_range(255 * d);
      divide(nn, d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
