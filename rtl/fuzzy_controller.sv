// fuzzy_controller: pipelined MIN-MAX fuzzy controller with centre-of-gravity
// defuzzification, N_IN crisp inputs and N_OUT crisp outputs of 8 bits,
// 256 rules and up to 8 membership functions per variable.
//
// Three pipeline stages, each one frame of 256 main-clock cycles long:
//   stage 1  The inputs, sampled at the start of the frame, address the
//            fuzzifiers. Each cycle one rule is read from the rule base; the
//            fuzzifiers return the truth values of its subpremises, MIN gives
//            the rule's truth value, and the register block for activated
//            rules keeps per output MF the largest one (MAX).
//   stage 2  The register block's result (Reg') is applied to the output MFs
//            point by point (compositional rule of inference, MIN then MAX
//            with CAS_in), and the repeated adder forms the COG numerator
//            and denominator from the resulting stream.
//   stage 3  The divider produces the crisp output.
// A new input vector is accepted every 256 cycles (51.2 us at 5 MHz),
// whatever N_IN and N_OUT are; a result appears 2 x 256 + 10 cycles after
// its inputs were sampled.
//
// Interface:
//   x_in      sampled on the closing edge of every frame (frame_last = 1).
//   y_out     updated with a one-clock y_valid pulse per output; results
//             of frames begun before the first sample are suppressed.
//   phi       the external clock Phi/256.
//   cas_in /  cascade of the inferred output set: connect cas_out of one
//   cas_out   controller to cas_in of another fed from the same clock and
//             reset; tie unused cas_in to 0.
//   cfg_*     load port of the rule base (cfg_target = CFG_RULE, word in
//             cfg_rule, address = rule number) and of the MF memories of
//             input / output variable cfg_var (CFG_IN_MF / CFG_OUT_MF,
//             word in cfg_mf, cfg_odd selects the bank, address = crisp
//             value). The memories are not reset and must be loaded before
//             the results mean anything.
// Every rule slot is evaluated in every frame; fill unused slots with copies
// of a used rule. The memories are modelled as on-chip arrays here, the
// interfaces between the blocks as single-cycle registered transfers.
//
// The three stages, their blocks and the cascade follow the original
// architecture; one-chip integration, input sampling, the valid tags, the
// load port and the exact latency are choices made here.
module fuzzy_controller
  import fc_pkg::*;
#(
  parameter int unsigned N_IN  = 4,
  parameter int unsigned N_OUT = 1,
  localparam int unsigned RULE_W = MF_NUM_W * (N_IN + N_OUT),
  localparam int unsigned VAR_W  = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // crisp inputs and outputs
  input  mu_t                       x_in   [N_IN],
  output mu_t                       y_out  [N_OUT],
  output logic [N_OUT-1:0]          y_valid,
  output logic                      phi,
  output logic                      sample,   // x_in is taken at this cycle's end
  // cascade
  input  mu_t                       cas_in  [N_OUT],
  output mu_t                       cas_out [N_OUT],
  // configuration load port
  input  logic                      cfg_we,
  input  cfg_target_e               cfg_target,
  input  logic [VAR_W-1:0]          cfg_var,
  input  logic                      cfg_odd,
  input  logic [RES-1:0]            cfg_addr,
  input  mf_word_t                  cfg_mf,
  input  logic [RULE_W-1:0]         cfg_rule
);

  // ---------------------------------------------------------------- timing
  logic [$clog2(NRULES)-1:0] rule_addr;
  logic                      frame_last;

  fc_sequencer u_seq (
    .clk        (clk),
    .rst_n      (rst_n),
    .rule_addr  (rule_addr),
    .frame_last (frame_last),
    .phi        (phi)
  );

  assign sample = frame_last;

  // Input register and the tags that say a stage works on a real sample.
  mu_t  x_reg [N_IN];
  logic s1_busy, s2_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_reg   <= '{default: '0};
      s1_busy <= 1'b0;
      s2_busy <= 1'b0;
    end else if (frame_last) begin
      x_reg   <= x_in;
      s1_busy <= 1'b1;
      s2_busy <= s1_busy;
    end
  end

  // --------------------------------------------------------------- stage 1
  mf_num_t premise    [N_IN];
  mf_num_t conclusion [N_OUT];
  mu_t     alpha      [N_IN];
  mu_t     omega;

  rule_base #(.N_IN(N_IN), .N_OUT(N_OUT)) u_rules (
    .clk        (clk),
    .we         (cfg_we && cfg_target == CFG_RULE),
    .waddr      (cfg_addr),
    .wdata      (cfg_rule),
    .raddr      (rule_addr),
    .premise    (premise),
    .conclusion (conclusion)
  );

  for (genvar i = 0; i < N_IN; i++) begin : g_in
    fuzzifier u_fuzz (
      .clk      (clk),
      .cfg_we   (cfg_we && cfg_target == CFG_IN_MF && cfg_var == VAR_W'(i)),
      .cfg_odd  (cfg_odd),
      .cfg_addr (cfg_addr),
      .cfg_data (cfg_mf),
      .x        (x_reg[i]),
      .mf_sel   (premise[i]),
      .alpha    (alpha[i])
    );
  end

  premise_min #(.N(N_IN)) u_min (
    .alpha (alpha),
    .omega (omega)
  );

  // ------------------------------------------------- stages 2 and 3, per output
  for (genvar o = 0; o < N_OUT; o++) begin : g_out
    mf_code_t         rd_code_even, rd_code_odd;
    mu_t              omega_even, omega_odd;
    fset_stream_t     fset;
    logic             sums_done;
    logic [23:0]      num;
    logic [15:0]      den;

    activated_rule_reg u_act (
      .clk          (clk),
      .rst_n        (rst_n),
      .valid        (s1_busy),
      .omega        (omega),
      .mf_num       (conclusion[o]),
      .transfer     (frame_last),
      .rd_code_even (rd_code_even),
      .rd_code_odd  (rd_code_odd),
      .omega_even   (omega_even),
      .omega_odd    (omega_odd)
    );

    inference u_inf (
      .clk          (clk),
      .rst_n        (rst_n),
      .frame_last   (frame_last),
      .active       (s2_busy),
      .cfg_we       (cfg_we && cfg_target == CFG_OUT_MF && cfg_var == VAR_W'(o)),
      .cfg_odd      (cfg_odd),
      .cfg_addr     (cfg_addr),
      .cfg_data     (cfg_mf),
      .rd_code_even (rd_code_even),
      .rd_code_odd  (rd_code_odd),
      .omega_even   (omega_even),
      .omega_odd    (omega_odd),
      .cas_in       (cas_in[o]),
      .cas_out      (cas_out[o]),
      .fset         (fset)
    );

    repeated_adder #(.DEN_W(16), .NUM_W(24)) u_radd (
      .clk   (clk),
      .rst_n (rst_n),
      .fset  (fset),
      .done  (sums_done),
      .num   (num),
      .den   (den)
    );

    cog_divider #(.NUM_W(24), .DEN_W(16), .Q_W(RES)) u_div (
      .clk   (clk),
      .rst_n (rst_n),
      .start (sums_done),
      .num   (num),
      .den   (den),
      .busy  (),
      .done  (y_valid[o]),
      .q     (y_out[o])
    );
  end

endmodule
