// cog_divider: the division of the centre-of-gravity calculation.
//
// Restoring division, one quotient bit per clock, most significant first:
// the divisor shifted left by the bit position is subtracted from the
// remainder whenever it fits. The quotient of a centre of gravity lies in
// the output universe, so Q_W = 8 bits are enough (num <= 255 * den).
// The quotient is truncated. A zero denominator (no rule fired) gives 0.
//
// Timing: `start` is sampled with num/den; Q_W clocks later `done` pulses
// for one clock and q holds the result until the next division. A start
// while busy is not allowed (checked by an assertion).
//
// That a divider forms the output in the third stage follows the original
// architecture; its restoring structure, truncation and the zero-denominator
// rule are choices made here.
module cog_divider #(
  parameter int unsigned NUM_W = 24,
  parameter int unsigned DEN_W = 16,
  parameter int unsigned Q_W   = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NUM_W-1:0] num,
  input  logic [DEN_W-1:0] den,
  output logic             busy,
  output logic             done,
  output logic [Q_W-1:0]   q
);

  localparam int unsigned W = NUM_W + Q_W;

  logic [W-1:0]           rem;
  logic [W-1:0]           dsr;
  logic [$clog2(Q_W)-1:0] idx;
  logic [Q_W-1:0]         q_acc, q_nxt;
  logic [W-1:0]           trial, rem_nxt;
  logic                   fits;

  always_comb begin
    trial   = dsr << idx;
    fits    = (dsr != '0) && (rem >= trial);
    rem_nxt = fits ? rem - trial : rem;
    q_nxt   = q_acc;
    q_nxt[idx] = fits;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem   <= '0;
      dsr   <= '0;
      idx   <= '0;
      q_acc <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      q     <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        rem   <= W'(num);
        dsr   <= W'(den);
        idx   <= $clog2(Q_W)'(Q_W - 1);
        q_acc <= '0;
        busy  <= 1'b1;
      end else if (busy) begin
        rem   <= rem_nxt;
        q_acc <= q_nxt;
        idx   <= idx - 1'b1;
        if (idx == '0) begin
          busy <= 1'b0;
          done <= 1'b1;
          q    <= q_nxt;
        end
      end
    end
  end

  // A new division may only start when the previous one has finished.
  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
  // The quotient must fit into Q_W bits.
  assert property (@(posedge clk) disable iff (!rst_n)
                   start && (den != '0) |-> (W'(num) < (W'(den) << Q_W)));

endmodule
