// rule_base: memory of the fuzzy rules.
//
// Each of the 256 words is one rule "IF x0 is A and x1 is B ... THEN y0 is X".
// A word holds one 3-bit MF number per input variable (the premise) followed
// by one 3-bit MF number per output variable (the conclusion), first input in
// the most significant bits:
//     [ in0 | in1 | ... | in(N_IN-1) | out0 | ... | out(N_OUT-1) ]
// so a rule with 3 inputs and one output, "A3, B4, C7 then X4", is the
// 12-bit word 011 100 111 100. Storage is 3 x (N_IN + N_OUT) bits per rule.
//
// Interface: synchronous write port, combinational read addressed by the
// rule counter; the fields come out already split per variable. Not reset.
//
// The word format follows the original architecture; the write port and
// the combinational read are choices made here.
module rule_base
  import fc_pkg::*;
#(
  parameter int unsigned N_IN  = 4,
  parameter int unsigned N_OUT = 1,
  localparam int unsigned RULE_W = MF_NUM_W * (N_IN + N_OUT)
) (
  input  logic                      clk,
  input  logic                      we,
  input  logic [$clog2(NRULES)-1:0] waddr,
  input  logic [RULE_W-1:0]         wdata,
  input  logic [$clog2(NRULES)-1:0] raddr,
  output mf_num_t                   premise [N_IN],
  output mf_num_t                   conclusion [N_OUT]
);

  logic [RULE_W-1:0] mem [NRULES];
  logic [RULE_W-1:0] word;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign word = mem[raddr];

  always_comb begin
    for (int i = 0; i < N_IN; i++)
      premise[i] = word[RULE_W - 1 - MF_NUM_W*i -: MF_NUM_W];
    for (int o = 0; o < N_OUT; o++)
      conclusion[o] = word[MF_NUM_W*(N_OUT - o) - 1 -: MF_NUM_W];
  end

endmodule
