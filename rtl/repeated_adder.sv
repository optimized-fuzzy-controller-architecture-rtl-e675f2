// repeated_adder: numerator and denominator of the centre of gravity.
//
// The crisp output is COG = sum(e * I'(e)) / sum(I'(e)). Instead of a
// multiplier, a first accumulator sums the incoming I'(e) (the denominator)
// and a second accumulator adds up the first one's running value (the
// numerator). The set arrives from e = 255 down to e = 0, and each element
// adds the first accumulator's value *before* that element, i.e.
// sum_{j > e} I'(j); summed over all e this counts every I'(j) exactly j
// times, which is the numerator. Widths: 16-bit denominator
// (256 x 255 < 2^16) and 24-bit numerator (255 x 255 x 256 / 2 < 2^24).
//
// Interface: a valid element marked `first` restarts both sums (this is the
// accumulators' reset); on the element marked `last` the finished sums are
// registered into num/den and `done` pulses for one clock in the next cycle.
//
// The two accumulators and their widths follow the original architecture;
// the element order and the restart on `first` are choices made here.
module repeated_adder
  import fc_pkg::*;
#(
  parameter int unsigned DEN_W = 16,
  parameter int unsigned NUM_W = 24
) (
  input  logic             clk,
  input  logic             rst_n,
  input  fset_stream_t     fset,
  output logic             done,
  output logic [NUM_W-1:0] num,
  output logic [DEN_W-1:0] den
);

  logic [DEN_W-1:0] den_acc, den_base, den_nxt;
  logic [NUM_W-1:0] num_acc, num_base, num_nxt;

  always_comb begin
    den_base = fset.first ? '0 : den_acc;
    num_base = fset.first ? '0 : num_acc;
    den_nxt  = den_base + DEN_W'(fset.data);
    num_nxt  = num_base + NUM_W'(den_base);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      den_acc <= '0;
      num_acc <= '0;
      done    <= 1'b0;
      num     <= '0;
      den     <= '0;
    end else begin
      done <= 1'b0;
      if (fset.valid) begin
        den_acc <= den_nxt;
        num_acc <= num_nxt;
        if (fset.last) begin
          num  <= num_nxt;
          den  <= den_nxt;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
