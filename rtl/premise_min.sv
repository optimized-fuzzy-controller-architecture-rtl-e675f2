// premise_min: fuzzy AND of a rule's subpremises.
//
// The truth value omega of a rule is the minimum of the truth values alpha
// of its subpremises, one per input variable. Purely combinational; in the
// controller it is evaluated once per cycle for the current rule.
//
// The MIN follows the original architecture; its form as a compare chain is
// a choice made here.
module premise_min
  import fc_pkg::*;
#(
  parameter int unsigned N = 4   // number of input variables
) (
  input  mu_t alpha [N],
  output mu_t omega
);

  always_comb begin
    omega = alpha[0];
    for (int i = 1; i < N; i++)
      if (alpha[i] < omega) omega = alpha[i];
  end

endmodule
